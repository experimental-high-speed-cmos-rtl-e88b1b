// tb_dps_system: end-to-end test of the imaging system at 3 rows x 24
// columns, 64 clocks per integration tick, 2 clocks per ramp step. A random
// scene (a few pixels bright enough to saturate) is loaded, then three
// acquisitions run:
//   1. multi-capture, capture times [0 1000 2000 4200] ticks, one frame, gray code
//   2. video with CDS, times [0 3000], two frames, auxiliary binary ramp
//   3. times [0 2], closer than a capture takes: one overrun
// Every frame is collected from the 64-bit bus and each pixel compared with a
// code computed here from the scene: the sense node falls from 1400 mV by
// rate/65536 mV per integrating clock (the clocks spent in integration,
// conversion and readout, not in transfer) down to 400 mV, and the code is
// the last ramp step (390 + 4k mV) still below it. Also checked: each
// transfer starts t*64+1 clocks after the reset ends (runs 1 and 2); a frame
// is R*C/8 words with no gap; the frame, overrun and done status. Counted, and
// each required at least once: reset-level (CDS) captures, non-destructive
// repeat captures, gray and aux conversions, saturated pixels, repeated
// frames, overruns.
module tb_dps_system;
  import dps_pkg::*;
  localparam int R = 3, C = 24, WORDS = C / 8, TICK = 64, DIV = 2;
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
  int checks = 0, failures = 0;
  int rate [R][C];

  dps_system #(.R(R), .C(C), .MAX_CAPS(65), .TICK_CYC(TICK), .CNT_DIV(DIV)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_cds = 0, n_repeat = 0, n_gray = 0, n_aux = 0, n_sat = 0, n_frames_rep = 0;

  // phase monitor: integrating clocks since the end of the last reset
  longint integ = 0;
  int since_reset = 0, xfer_at [$];
  longint integ_at [$];
  phase_e ph_q = PH_IDLE;
  always @(negedge clk) begin
    if (phase == PH_RESET) begin integ = 0; since_reset = 0; end
    else if (phase != PH_IDLE) begin
      if (phase == PH_XFER && ph_q != PH_XFER) begin
        xfer_at.push_back(since_reset);
        integ_at.push_back(integ);
      end
      if (phase != PH_XFER) integ++;
      since_reset++;
    end
    ph_q = phase;
  end

  // frame collector
  logic [7:0] frames [$][R][C];
  int word_n = 0, gaps = 0;
  logic [7:0] cur [R][C];
  always @(negedge clk) begin
    if (data_valid) begin
      for (int p = 0; p < 8; p++) cur[word_n / WORDS][(word_n % WORDS) * 8 + p] = data_out[p*8 +: 8];
      word_n++;
      if (word_n == R * WORDS) begin frames.push_back(cur); word_n = 0; end
    end else if (word_n != 0) gaps++;
  end

  function automatic int ref_code(longint s);
    int k = -1;
    for (int i = 0; i < 256; i++) if (s > (longint'(390 + 4 * i) << 16)) k = i;
    return k;
  endfunction

  task automatic acquire(int times[$], int nframes, bit aux, bit timed, int exp_over);
    int t = 0;
    foreach (times[i]) begin
      cap_we = 1; cap_idx = 7'(i); cap_time = 17'(times[i]); @(negedge clk);
    end
    cap_we = 0; num_caps = 7'(times.size()); num_frames = 16'(nframes); use_aux = aux;
    frames.delete(); xfer_at.delete(); integ_at.delete();
    start = 1; @(negedge clk); start = 0;
    while (!done && t < 2000000) begin @(negedge clk); t++; end
    check(done, "acquisition done");
    @(negedge clk);
    check(frames.size() == times.size() * nframes, $sformatf("frames %0d", frames.size()));
    check(int'(overruns) == exp_over, $sformatf("overruns %0d", overruns));
    check(gaps == 0, "no gap inside a frame");
    for (int f = 0; f < frames.size() && f < integ_at.size(); f++) begin
      int ci = f % times.size();
      if (timed) check(xfer_at[f] == times[ci] * TICK + 1,
                       $sformatf("transfer %0d at %0d", f, xfer_at[f]));
      if (times[ci] == 0) n_cds++; else n_repeat++;
      if (f >= times.size()) n_frames_rep++;
      if (aux) n_aux++; else n_gray++;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          longint s;
          int k;
          logic [7:0] e;
          s = (longint'(1400) << 16) - longint'(rate[r][c]) * integ_at[f];
          if (s < (longint'(400) << 16)) begin s = longint'(400) << 16; n_sat++; end
          k = ref_code(s);
          e = aux ? 8'(k) : (8'(k) ^ (8'(k) >> 1));
          check(frames[f][r][c] === e,
                $sformatf("frame %0d r%0d c%0d: %h expected %h", f, r, c, frames[f][r][c], e));
        end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        rate[r][c] = (c % 7 == 0) ? 255 : $urandom_range(0, 120);
        scene_we = 1; scene_row = 9'(r); scene_col = 9'(c); scene_rate = 8'(rate[r][c]);
        @(negedge clk);
      end
    scene_we = 0;
    acquire('{0, 1000, 2000, 4200}, 1, 0, 1, 0);
    acquire('{0, 3000}, 2, 1, 1, 0);
    acquire('{0, 2}, 1, 0, 0, 1);
    check(n_cds > 0, "reset-level captures");
    check(n_repeat > 0, "non-destructive repeat captures");
    check(n_gray > 0 && n_aux > 0, "gray and aux conversions");
    check(n_sat > 0, "saturated pixels");
    check(n_frames_rep > 0, "repeated frames");
    $display("mechanisms: cds=%0d repeat=%0d gray=%0d aux=%0d saturated=%0d repeated_frames=%0d",
             n_cds, n_repeat, n_gray, n_aux, n_sat, n_frames_rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
