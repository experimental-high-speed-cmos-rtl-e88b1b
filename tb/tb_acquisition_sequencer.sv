// tb_acquisition_sequencer: the board sequencer for a tiny 2 x 32 array
// (8 words per frame), with a model of the chip's readout handshake (first
// valid word 3 cycles after Read Reset, then 8 consecutive words).
// Run 1: multi-capture, times [0 150 300 500] ticks, one frame, gray counter.
// Run 2: video with CDS, times [0 200], three frames, auxiliary ramp.
// Run 3: times [0 10] ticks, closer than a capture can take: an overrun.
// Checked: the Pixel Reset width; each TX pulse at its programmed time
// (t * TICK_CYC + 1 cycles after the reset ends) unless overrun; TX width;
// 255 counter steps every CNT_DIV cycles per conversion, each with the DAC at
// 390 + 4 * step mV and the aux ramp at the step number; power and write
// enable only inside conversions; one Read Reset per capture; the capture,
// frame and overrun counts; `done`.
module tb_acquisition_sequencer;
  import dps_pkg::*;
  localparam int R = 2, C = 32, TICK = 4, DIV = 2, RST = 3, TXC = 2;
  localparam int FRAME_WORDS = R * C / 8;
  logic clk = 0, rst_n = 0;
  logic cap_we = 0, use_aux = 0, start = 0;
  logic [6:0] cap_idx = 0, num_caps = 0;
  logic [16:0] cap_time = 0;
  logic [15:0] num_frames = 0, frame, overruns;
  logic busy, done;
  phase_e phase;
  logic [6:0] capture;
  logic power_enable, write_enable, counter_aux, counter_reset, counter_step;
  logic pixel_reset, tx, pg, read_reset, data_valid;
  pixel_t aux_digital_ramp;
  mv_t analog_ramp_mv, reset_voltage_mv;
  int checks = 0, failures = 0;

  acquisition_sequencer #(.R(R), .C(C), .MAX_CAPS(65), .TIME_W(17), .TICK_CYC(TICK),
    .CNT_DIV(DIV), .RESET_CYC(RST), .TX_CYC(TXC)) dut (.*);

  always #5 clk = ~clk;

  // chip readout handshake model
  int rr_cnt = -1;
  always_ff @(posedge clk) begin
    if (read_reset) rr_cnt <= 0;
    else if (rr_cnt >= 0 && rr_cnt < 3 + FRAME_WORDS - 1) rr_cnt <= rr_cnt + 1;
    else rr_cnt <= -1;
  end
  assign data_valid = (rr_cnt >= 3);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  int cyc = 0, integ_start = 0, rst_len = 0, tx_len = 0, steps = 0, last_step = -1;
  int tx_rises = 0, read_resets = 0, convs = 0;
  logic tx_q = 0, pr_q = 0;
  int sched [$];
  bit allow_late = 0;

  always @(negedge clk) begin
    cyc++;
    if (pixel_reset) rst_len++;
    if (pr_q && !pixel_reset) begin
      check(rst_len == RST, $sformatf("reset width %0d", rst_len));
      integ_start = cyc; rst_len = 0;
    end
    if (tx) tx_len++;
    if (tx && !tx_q) begin
      int t;
      t = sched[tx_rises % sched.size()];
      if (allow_late) check(cyc - integ_start >= t * TICK + 1, "tx not early");
      else check(cyc - integ_start == t * TICK + 1,
                 $sformatf("tx at %0d, expected %0d", cyc - integ_start, t * TICK + 1));
      tx_rises++;
    end
    if (!tx && tx_q) begin check(tx_len == TXC, "tx width"); tx_len = 0; end
    if (counter_reset) begin steps = 0; last_step = -1; convs++; end
    if (write_enable) begin
      check(power_enable, "write only while powered");
      check(int'(analog_ramp_mv) == 390 + 4 * steps, $sformatf("ramp %0d at step %0d", analog_ramp_mv, steps));
      check(int'(aux_digital_ramp) == steps, "aux ramp value");
    end
    if (counter_step) begin
      if (last_step >= 0) check(cyc - last_step == DIV, "step spacing");
      last_step = cyc; steps++;
    end
    if (read_reset) begin
      check(steps == 255, $sformatf("steps per conversion %0d", steps));
      check(!power_enable, "comparators powered down for readout");
      read_resets++;
    end
    check(!(power_enable && phase != PH_CONVERT), "power only in conversion");
    check(pg || phase == PH_RESET || phase == PH_IDLE, "pg during integration");
    tx_q = tx; pr_q = pixel_reset;
  end

  task automatic load_schedule(int times[$], int frames, bit aux);
    sched = times;
    foreach (times[i]) begin
      cap_we = 1; cap_idx = 7'(i); cap_time = 17'(times[i]);
      @(negedge clk);
    end
    cap_we = 0; num_caps = 7'(times.size()); num_frames = 16'(frames); use_aux = aux;
  endtask

  task automatic run(int times[$], int frames, bit aux, int exp_over);
    int t0;
    load_schedule(times, frames, aux);
    tx_rises = 0; read_resets = 0;
    start = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    check(counter_aux == !aux, "counter/aux select");
    t0 = 0;
    while (!done && t0 < 40000) begin @(negedge clk); t0++; end
    check(done, "done");
    check(tx_rises == times.size() * frames, $sformatf("captures %0d", tx_rises));
    check(read_resets == times.size() * frames, "readouts");
    check(int'(overruns) == exp_over, $sformatf("overruns %0d expected %0d", overruns, exp_over));
    @(negedge clk);
    check(!busy, "idle at end");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run('{0, 150, 300, 500}, 1, 0, 0);
    run('{0, 200}, 3, 1, 0);
    allow_late = 1;
    run('{0, 10}, 1, 0, 1);
    check(convs == 4 + 6 + 2, "conversion count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
