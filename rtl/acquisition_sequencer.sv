// acquisition_sequencer: the board-side controller that runs the imager's
// four phases (reset, integration, A/D conversion, readout) for one
// programmed acquisition, the way the host asks for it: a list of capture
// times after a pixel reset, repeated for a number of frames.
//
// A list [0 T] with many frames is video with digital correlated double
// sampling (a read of the reset level, then a read after T, then a new
// reset); a list [0 t1 ... tN] with one frame is a non-destructive
// multi-capture. For each frame: Pixel Reset is held for RESET_CYC cycles;
// then PG is raised and stays high (integration goes on during conversions
// and readouts). The integration time is counted in ticks of TICK_CYC cycles.
// When it reaches capture time i, TX is pulsed for TX_CYC cycles, then an A/D
// conversion runs: comparators powered up, gray counter and ramp DAC counter
// cleared, Write Enable high, and 256 ramp steps of CNT_DIV cycles each, the
// gray counter and the DAC stepping together. Then Read Reset is pulsed and
// the sequencer waits for the frame's R*C/8 valid words. A capture whose time
// has already passed when the previous readout ends is taken at once and
// counted in `overruns`.
//
// `use_aux` converts with the board's binary ramp code on the chip's
// auxiliary digital ramp pins instead of the on-chip gray code.
// Host interface: write capture times with cap_we/cap_idx/cap_time, set
// num_caps (1..MAX_CAPS), num_frames and use_aux, pulse `start`; `busy` is
// high until the acquisition ends with a one-cycle `done`.
// The phases, their order and the exposure-list interface follow the
// document; all cycle counts, the tick and the overrun rule are this
// design's choice. Defaults assume a 20 MHz clock: 1 us ticks, 100 ns ramp
// steps (25.6 us conversions).
module acquisition_sequencer
  import dps_pkg::*;
#(
  parameter int unsigned R         = ROWS,
  parameter int unsigned C         = COLS,
  parameter int unsigned MAX_CAPS  = 65,
  parameter int unsigned TIME_W    = 17,    // capture times in ticks
  parameter int unsigned TICK_CYC  = 20,
  parameter int unsigned CNT_DIV   = 2,
  parameter int unsigned RESET_CYC = 20,
  parameter int unsigned TX_CYC    = 2,
  parameter int unsigned RAMP_LO_MV   = 390,
  parameter int unsigned RAMP_STEP_MV = 4,
  parameter int unsigned RESET_MV     = 1400
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host
  input  logic                        cap_we,
  input  logic [$clog2(MAX_CAPS)-1:0] cap_idx,
  input  logic [TIME_W-1:0]           cap_time,
  input  logic [$clog2(MAX_CAPS+1)-1:0] num_caps,
  input  logic [15:0]                 num_frames,
  input  logic                        use_aux,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  output phase_e                      phase,
  output logic [$clog2(MAX_CAPS)-1:0] capture,     // current capture index
  output logic [15:0]                 frame,       // current frame index
  output logic [15:0]                 overruns,
  // chip
  output logic                        power_enable,
  output logic                        write_enable,
  output logic                        counter_aux,
  output pixel_t                      aux_digital_ramp,
  output logic                        counter_reset,
  output logic                        counter_step,
  output mv_t                         analog_ramp_mv,
  output mv_t                         reset_voltage_mv,
  output logic                        pixel_reset,
  output logic                        tx,
  output logic                        pg,
  output logic                        read_reset,
  input  logic                        data_valid
);
  localparam int unsigned FRAME_WORDS = R * C * PIX_BITS / BUS_BITS;
  localparam int unsigned STEPS       = 1 << PIX_BITS;
  localparam int unsigned CW          = 24;

  logic [TIME_W-1:0] cap_times [MAX_CAPS];
  logic [CW-1:0]     cyc;         // cycles within the current phase / step
  logic [CW-1:0]     tick_cyc;    // cycles within the current tick
  logic [TIME_W:0]   itime;       // integration time in ticks
  logic [PIX_BITS:0] steps_done;
  logic [CW-1:0]     words;
  logic              conv_first;  // first cycle of a conversion
  pixel_t            dac_code;
  logic              rd_start;    // first cycle of a readout

  always_ff @(posedge clk) begin
    if (cap_we) cap_times[cap_idx] <= cap_time;
  end

  wire [TIME_W:0] target   = {1'b0, cap_times[capture]};
  wire            step_end = (32'(cyc) == CNT_DIV - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_IDLE;
      cyc        <= '0;
      tick_cyc   <= '0;
      itime      <= '0;
      steps_done <= '0;
      words      <= '0;
      capture    <= '0;
      frame      <= '0;
      overruns   <= '0;
      conv_first <= 1'b0;
      rd_start   <= 1'b0;
      done       <= 1'b0;
    end else begin
      done     <= 1'b0;
      rd_start <= 1'b0;
      // integration clock, running from the end of the reset
      if (phase == PH_IDLE || phase == PH_RESET) begin
        tick_cyc <= '0;
        itime    <= '0;
      end else if (32'(tick_cyc) == TICK_CYC - 1) begin
        tick_cyc <= '0;
        itime    <= itime + 1'b1;
      end else begin
        tick_cyc <= tick_cyc + 1'b1;
      end

      unique case (phase)
        PH_IDLE: if (start) begin
          phase    <= PH_RESET;
          cyc      <= '0;
          capture  <= '0;
          frame    <= '0;
          overruns <= '0;
        end
        PH_RESET: begin
          if (32'(cyc) == RESET_CYC - 1) begin
            phase <= PH_INTEG;
            cyc   <= '0;
          end else cyc <= cyc + 1'b1;
        end
        PH_INTEG: if (itime >= target) begin
          phase <= PH_XFER;
          cyc   <= '0;
        end
        PH_XFER: begin
          if (32'(cyc) == TX_CYC - 1) begin
            phase      <= PH_CONVERT;
            cyc        <= '0;
            steps_done <= '0;
            conv_first <= 1'b1;
          end else cyc <= cyc + 1'b1;
        end
        PH_CONVERT: begin
          conv_first <= 1'b0;
          if (!conv_first) begin
            if (step_end) begin
              cyc        <= '0;
              steps_done <= steps_done + 1'b1;
              if (32'(steps_done) == STEPS - 1) begin
                phase    <= PH_READOUT;
                words    <= '0;
                rd_start <= 1'b1;
              end
            end else cyc <= cyc + 1'b1;
          end
        end
        PH_READOUT: begin
          if (data_valid) words <= words + 1'b1;
          if (data_valid && 32'(words) == FRAME_WORDS - 1) begin
            if (32'(capture) == 32'(num_caps) - 1) begin
              capture <= '0;
              if (32'(frame) == 32'(num_frames) - 1) begin
                phase <= PH_IDLE;
                done  <= 1'b1;
              end else begin
                frame <= frame + 1'b1;
                phase <= PH_RESET;
                cyc   <= '0;
              end
            end else begin
              capture <= capture + 1'b1;
              phase   <= PH_INTEG;
              if (itime > {1'b0, cap_times[capture + 1'b1]}) overruns <= overruns + 1'b1;
            end
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // Ramp DAC and auxiliary digital ramp, stepped with the gray counter.
  ramp_dac_counter #(.W(PIX_BITS), .LO_MV(RAMP_LO_MV), .STEP_MV(RAMP_STEP_MV)) u_dac (
    .clk, .rst_n, .clear(conv_first), .step(counter_step),
    .code(dac_code), .ramp_mv(analog_ramp_mv)
  );

  always_comb begin
    busy             = (phase != PH_IDLE);
    pixel_reset      = (phase == PH_RESET);
    reset_voltage_mv = mv_t'(RESET_MV);
    pg               = (phase == PH_INTEG) || (phase == PH_XFER) ||
                       (phase == PH_CONVERT) || (phase == PH_READOUT);
    tx               = (phase == PH_XFER);
    power_enable     = (phase == PH_CONVERT);
    write_enable     = (phase == PH_CONVERT) && !conv_first;
    counter_reset    = conv_first;
    counter_step     = (phase == PH_CONVERT) && !conv_first && step_end &&
                       (32'(steps_done) != STEPS - 1);
    counter_aux      = !use_aux;
    aux_digital_ramp = dac_code;
    read_reset       = rd_start;
  end

endmodule
