// tb_workloads: the two acquisitions the system was built for, at the
// default timing (20 MHz clock, 1 us capture-time ticks, 100 ns ramp steps)
// on a 2 x 24 pixel array, so that the full exposure times can be simulated.
//   1. High dynamic range multi-capture: 65 non-destructive captures
//      uniformly spaced 1 ms apart over 64 ms (capture times 0, 1000, ...,
//      64000 us), one reset.
//   2. Video with CDS: 12 frames at 200 frames/s, each a reset, a read of
//      the reset level at 0 and a read after 4330 us, so that one frame
//      (reset, two captures, exposure) of a full 352 x 288 array would last
//      close to 5 ms; the check adds the readout words the small array
//      saves to its measured period.
// Every pixel of every frame is checked against the closed-form reference
// (sense = 1400 mV - rate * n / 65536 mV, floored at 400 mV; code = the last
// ramp step 390 + 4k mV below it, gray-coded). Also checked: no overruns,
// each capture's transfer at its programmed time, the video frame period
// within 1% of 5 ms, and that the brightest pixels saturate during the 64 ms
// exposure while dark ones do not.
module tb_workloads;
  import dps_pkg::*;
  localparam int R = 2, C = 24, WORDS = C / 8, TICK = 20;
  logic clk = 0, rst_n = 0;
  logic cap_we = 0, use_aux = 0, start = 0, busy, done, data_valid;
  logic [6:0] cap_idx = 0, num_caps = 0, capture;
  logic [16:0] cap_time = 0;
  logic [15:0] num_frames = 0, frame, overruns;
  phase_e phase;
  logic [63:0] data_out;
  logic scene_we = 0;
  logic [8:0] scene_row = 0, scene_col = 0;
  logic [7:0] scene_rate = 0;
  int checks = 0, failures = 0, shown = 0;

  dps_system #(.R(R), .C(C)) dut (.*);
  always #25 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (shown++ < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int rate_of(int r, int c);
    return (r * C + c) * 11 % 256;
  endfunction

  // integrating clocks since the reset, snapshot at each transfer
  longint integ = 0;
  int cyc = 0, since_reset = 0, n_sat = 0, n_dark = 0;
  int xfer_at [$], reset_at [$];
  longint integ_at [$];
  phase_e ph_q = PH_IDLE;
  always @(negedge clk) begin
    cyc++;
    if (phase == PH_RESET) begin
      if (ph_q != PH_RESET) reset_at.push_back(cyc);
      integ = 0; since_reset = 0;
    end else if (phase != PH_IDLE) begin
      if (phase == PH_XFER && ph_q != PH_XFER) begin
        xfer_at.push_back(since_reset);
        integ_at.push_back(integ);
      end
      if (phase != PH_XFER) integ++;
      since_reset++;
    end
    ph_q = phase;
  end

  // check each word as it arrives, against the latest transfer
  int word_n = 0, frames_seen = 0;
  always @(negedge clk) begin
    if (data_valid) begin
      for (int p = 0; p < 8; p++) begin
        int r, c, k;
        longint s;
        logic [7:0] e;
        r = word_n / WORDS; c = (word_n % WORDS) * 8 + p;
        s = (longint'(1400) << 16) - longint'(rate_of(r, c)) * integ_at[integ_at.size() - 1];
        if (s <= (longint'(400) << 16)) begin s = longint'(400) << 16; n_sat++; end
        else if (s > (longint'(1300) << 16)) n_dark++;
        k = int'((s - (longint'(390) << 16) + (longint'(4) << 16) - 1) / (longint'(4) << 16)) - 1;
        if (k > 255) k = 255;
        e = 8'(k) ^ (8'(k) >> 1);
        check(data_out[p*8 +: 8] === e, $sformatf("frame %0d r%0d c%0d: %h expected %h",
                                                  frames_seen, r, c, data_out[p*8 +: 8], e));
      end
      word_n++;
      if (word_n == R * WORDS) begin word_n = 0; frames_seen++; end
    end
  end

  task automatic acquire(int times[$], int nframes);
    int t = 0;
    foreach (times[i]) begin
      cap_we = 1; cap_idx = 7'(i); cap_time = 17'(times[i]); @(negedge clk);
    end
    cap_we = 0; num_caps = 7'(times.size()); num_frames = 16'(nframes);
    frames_seen = 0; xfer_at.delete(); integ_at.delete(); reset_at.delete();
    start = 1; @(negedge clk); start = 0;
    while (!done && t < 3000000) begin @(negedge clk); t++; end
    check(done, "acquisition done");
    check(frames_seen == times.size() * nframes, $sformatf("frames %0d", frames_seen));
    check(overruns == 0, $sformatf("overruns %0d", overruns));
    foreach (xfer_at[i])
      check(xfer_at[i] == times[i % times.size()] * TICK + 1,
            $sformatf("transfer %0d at %0d", i, xfer_at[i]));
  endtask

  initial begin
    int hdr [$], cds [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        scene_we = 1; scene_row = 9'(r); scene_col = 9'(c); scene_rate = 8'(rate_of(r, c));
        @(negedge clk);
      end
    scene_we = 0;

    for (int i = 0; i <= 64; i++) hdr.push_back(i * 1000);
    acquire(hdr, 1);
    check(n_sat > 0, "bright pixels saturate within 64 ms");
    check(n_dark > 0, "dark pixels stay near the reset level");
    $display("multi-capture: %0d frames, %0d saturated and %0d dark pixel samples",
             frames_seen, n_sat, n_dark);

    cds = '{0, 4330};
    acquire(cds, 12);
    // Only the last capture's readout lies on the frame's critical path, so
    // the full-size frame period is this array's period plus the extra words
    // a 352 x 288 frame needs.
    for (int i = 1; i < reset_at.size(); i++) begin
      int period;
      period = reset_at[i] - reset_at[i-1] + (ROWS * COLS / 8 - R * WORDS);
      check(period > 99000 && period < 101000, $sformatf("video frame period %0d clocks", period));
    end
    $display("video: %0d captures, period %0d clocks at this size", frames_seen,
             reset_at.size() > 1 ? reset_at[1] - reset_at[0] : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
