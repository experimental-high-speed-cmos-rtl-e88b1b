// dps_chip: the digital pixel sensor (DPS) chip. Every pixel holds a
// photogate front end, a comparator and an 8-bit memory, so the whole array
// converts in parallel ("snap-shot" single-slope A/D conversion) and the
// stored codes are then read out digitally.
//
// Conversion: the board raises the analog ramp from its lowest level while
// the chip's 8-bit gray code counter (or the off-chip auxiliary digital
// ramp, chosen by Counter/Aux) is broadcast to all pixel memories with Write
// Enable high. Each pixel keeps loading the code until its comparator sees
// the ramp cross its sense node, so it ends up holding the last code before
// the crossing. Power Enable powers the comparators down between
// conversions.
// Readout: a Read Reset strobe makes the readout controller read the memories
// a row at a time into the row buffer and shift each row out as 44 words of
// 64 bits (8 pixels x 8 bits, lowest column in the lowest byte), one word per
// read clock with `data_valid` as the handshake output; the next row is read
// while the current one is shifted. A 352 x 288 frame takes 3 + 12,672
// cycles, i.e. about 76 us at the chip's 167 MHz read clock.
//
// The chip has separate counter and read clocks; here one clock `clk` runs
// everything and the counter clock is the enable `counter_step`. The light
// reaches the pixels through the scene port of the behavioural front end.
// The block structure and pin set follow the chip; the single clock, the mV
// codes for analog pins and the scene port are this model's choices. The
// "Aux Controls" pins are not modelled: their function is not given.
// The counter's binary value and the readout controller's frame_done and
// busy are left unused on purpose: the chip has no pins for them.
module dps_chip
  import dps_pkg::*;
#(
  parameter int unsigned R = ROWS,
  parameter int unsigned C = COLS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // conversion pins
  input  logic                 power_enable,
  input  logic                 write_enable,
  input  logic                 counter_aux,      // 1: gray counter, 0: aux ramp
  input  pixel_t               aux_digital_ramp,
  input  logic                 counter_reset,
  input  logic                 counter_step,     // Counter Clock
  input  mv_t                  analog_ramp_mv,
  // pixel pins
  input  mv_t                  reset_voltage_mv,
  input  logic                 pixel_reset,
  input  logic                 tx,
  input  logic                 pg,
  // readout pins
  input  logic                 read_reset,
  output logic [BUS_BITS-1:0]  data_out,
  output logic                 data_valid,       // read clock handshake
  // scene (light) for the behavioural front end
  input  logic                 scene_we,
  input  logic [8:0]           scene_row,
  input  logic [8:0]           scene_col,
  input  logic [7:0]           scene_rate
);
  pixel_t               gray, gray_bin;
  pixel_t               ramp_bus;
  logic                 ramp_write;
  logic [C-1:0]         comp [R];
  logic                 mem_rd_en;
  logic [$clog2(R)-1:0] mem_rd_row;
  logic [C-1:0][PIX_BITS-1:0] sense_amp_row;
  logic                 buf_load, xfer, shift, frame_done, busy;

  gray_counter #(.W(PIX_BITS)) u_counter (
    .clk, .rst_n, .counter_reset, .step(counter_step), .gray, .count(gray_bin)
  );

  digital_ramp_mux #(.W(PIX_BITS)) u_ramp_mux (
    .counter_aux, .write_enable, .counter_gray(gray), .aux_ramp(aux_digital_ramp),
    .ramp_bus, .ramp_write
  );

  pixel_frontend_array #(.R(R), .C(C)) u_frontend (
    .clk, .rst_n, .pixel_reset, .reset_voltage_mv, .pg, .tx, .power_enable,
    .analog_ramp_mv, .scene_we, .scene_row, .scene_col, .scene_rate, .comp
  );

  pixel_memory_array #(.R(R), .C(C), .W(PIX_BITS)) u_memory (
    .clk, .write(ramp_write), .ramp_bus, .comp,
    .rd_en(mem_rd_en), .rd_row(mem_rd_row), .rd_data(sense_amp_row)
  );

  readout_controller #(.R(R), .C(C), .W(PIX_BITS), .BUS(BUS_BITS)) u_ctrl (
    .clk, .rst_n, .read_reset, .mem_rd_en, .mem_rd_row, .buf_load, .xfer,
    .shift, .data_valid, .frame_done, .busy
  );

  readout_buffer #(.C(C), .W(PIX_BITS), .BUS(BUS_BITS)) u_rdbuf (
    .clk, .load(buf_load), .row_in(sense_amp_row), .xfer, .shift, .data_out
  );

  // Pixel memories must not be written while a row is being read out.
  a_no_write_during_read: assert property (@(posedge clk) disable iff (!rst_n)
    !(ramp_write && mem_rd_en));
endmodule
