// dps_system: the experimental high-speed imaging system: the board-side
// acquisition sequencer driving the digital pixel sensor chip, whose 64-bit
// output bus goes to the frame grabber cards (two 32-bit cards take one
// 64-bit word per clock; a third card carries the host's control data).
//
// The host programs a list of capture times after a pixel reset and a frame
// count (see acquisition_sequencer) and pulses `start`. Every capture
// produces one complete frame on `data_out`, framed by `data_valid`:
// R*C/8 words, 8 pixels of 8 bits per word, rows top to bottom, lowest column
// in the lowest byte, each pixel holding its gray (or, with `use_aux`,
// binary) code. With the defaults and a 20 MHz clock (the grabber cards'
// rate) a frame takes 25.6 us to convert and 634 us to read, so captures
// can follow each other about every 0.66 ms.
//
// The light for the behavioural pixel front end enters through the scene
// port. `phase`, `capture`, `frame` and `overruns` are status for the host.
// The partition follows the document's system; the clock and the status
// signals are this design's choice.
module dps_system
  import dps_pkg::*;
#(
  parameter int unsigned R        = ROWS,
  parameter int unsigned C        = COLS,
  parameter int unsigned MAX_CAPS = 65,
  parameter int unsigned TICK_CYC = 20,
  parameter int unsigned CNT_DIV  = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host control
  input  logic                          cap_we,
  input  logic [$clog2(MAX_CAPS)-1:0]   cap_idx,
  input  logic [16:0]                   cap_time,
  input  logic [$clog2(MAX_CAPS+1)-1:0] num_caps,
  input  logic [15:0]                   num_frames,
  input  logic                          use_aux,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output phase_e                        phase,
  output logic [$clog2(MAX_CAPS)-1:0]   capture,
  output logic [15:0]                   frame,
  output logic [15:0]                   overruns,
  // image data to the grabber cards
  output logic [BUS_BITS-1:0]           data_out,
  output logic                          data_valid,
  // scene
  input  logic                          scene_we,
  input  logic [8:0]                    scene_row,
  input  logic [8:0]                    scene_col,
  input  logic [7:0]                    scene_rate
);
  logic   power_enable, write_enable, counter_aux, counter_reset, counter_step;
  logic   pixel_reset, tx, pg, read_reset;
  pixel_t aux_digital_ramp;
  mv_t    analog_ramp_mv, reset_voltage_mv;

  acquisition_sequencer #(
    .R(R), .C(C), .MAX_CAPS(MAX_CAPS), .TIME_W(17), .TICK_CYC(TICK_CYC), .CNT_DIV(CNT_DIV)
  ) u_seq (
    .clk, .rst_n, .cap_we, .cap_idx, .cap_time, .num_caps, .num_frames, .use_aux,
    .start, .busy, .done, .phase, .capture, .frame, .overruns,
    .power_enable, .write_enable, .counter_aux, .aux_digital_ramp, .counter_reset,
    .counter_step, .analog_ramp_mv, .reset_voltage_mv, .pixel_reset, .tx, .pg,
    .read_reset, .data_valid
  );

  dps_chip #(.R(R), .C(C)) u_chip (
    .clk, .rst_n, .power_enable, .write_enable, .counter_aux, .aux_digital_ramp,
    .counter_reset, .counter_step, .analog_ramp_mv, .reset_voltage_mv, .pixel_reset,
    .tx, .pg, .read_reset, .data_out, .data_valid,
    .scene_we, .scene_row, .scene_col, .scene_rate
  );
endmodule
