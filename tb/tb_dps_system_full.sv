// tb_dps_system_full: one complete video-with-CDS acquisition on the
// full-size system (352 x 288 pixels, default parameters: 1 us ticks at
// 20 MHz, 100 ns ramp steps): a pixel reset, a capture of the reset level at
// 0 us and a capture after 1000 us, each converted and read out as a full
// 12,672-word frame. The scene is a fixed pattern, rate = (7r + 13c) mod 256.
// Every pixel of both frames is checked against a closed-form reference:
// sense = 1400 mV - rate * n / 65536 mV (n = integrating clocks before the
// transfer, floored at 400 mV), code = ceil((sense - 390 mV) / 4 mV) - 1,
// gray-coded. Also checked: the transfer at t*20+1 clocks after the reset,
// each frame's words back to back, and the frame time (about 634 us of
// readout at one word per clock).
module tb_dps_system_full;
  import dps_pkg::*;
  localparam int WORDS = COLS / 8;
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

  dps_system dut (.*);
  always #25 clk = ~clk;   // 20 MHz

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rate_of(int r, int c);
    return (7 * r + 13 * c) % 256;
  endfunction

  function automatic logic [7:0] expect_code(int r, int c, longint n);
    longint s, d;
    int k;
    s = (longint'(1400) << 16) - longint'(rate_of(r, c)) * n;
    if (s < (longint'(400) << 16)) s = longint'(400) << 16;
    d = s - (longint'(390) << 16);
    k = int'((d + (longint'(4) << 16) - 1) / (longint'(4) << 16)) - 1;
    if (k > 255) k = 255;
    return 8'(k) ^ (8'(k) >> 1);
  endfunction

  // integrating clocks since the reset, snapshot at each transfer
  longint integ = 0, n_cur = 0;
  int since_reset = 0, xfers = 0;
  int xfer_time [2];
  phase_e ph_q = PH_IDLE;
  always @(negedge clk) begin
    if (phase == PH_RESET) begin integ = 0; since_reset = 0; end
    else if (phase != PH_IDLE) begin
      if (phase == PH_XFER && ph_q != PH_XFER) begin
        n_cur = integ;
        if (xfers < 2) xfer_time[xfers] = since_reset;
        xfers++;
      end
      if (phase != PH_XFER) integ++;
      since_reset++;
    end
    ph_q = phase;
  end

  // check every word as it arrives
  int word_n = 0, frames_seen = 0, gaps = 0, first_cyc = 0, cyc = 0;
  always @(negedge clk) begin
    cyc++;
    if (data_valid) begin
      if (word_n == 0) first_cyc = cyc;
      for (int p = 0; p < 8; p++) begin
        int r, c;
        logic [7:0] e;
        r = word_n / WORDS; c = (word_n % WORDS) * 8 + p;
        e = expect_code(r, c, n_cur);
        checks++;
        if (data_out[p*8 +: 8] !== e) begin
          failures++;
          if (shown++ < 10) $display("FAIL frame %0d r%0d c%0d: %h expected %h",
                                     frames_seen, r, c, data_out[p*8 +: 8], e);
        end
      end
      word_n++;
      if (word_n == ROWS * WORDS) begin
        checks++;
        if (cyc - first_cyc != ROWS * WORDS - 1) begin
          failures++; $display("FAIL frame took %0d clocks", cyc - first_cyc + 1);
        end
        word_n = 0; frames_seen++;
      end
    end else if (word_n != 0) gaps++;
  end

  initial begin
    int t = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        scene_we = 1; scene_row = 9'(r); scene_col = 9'(c); scene_rate = 8'(rate_of(r, c));
        @(negedge clk);
      end
    scene_we = 0;
    cap_we = 1; cap_idx = 0; cap_time = 0; @(negedge clk);
    cap_idx = 1; cap_time = 1000; @(negedge clk);
    cap_we = 0; num_caps = 2; num_frames = 1; use_aux = 0;
    start = 1; @(negedge clk); start = 0;
    while (!done && t < 200000) begin @(negedge clk); t++; end
    checks++; if (!done) begin failures++; $display("FAIL not done"); end
    checks++; if (frames_seen != 2) begin failures++; $display("FAIL frames %0d", frames_seen); end
    checks++; if (gaps != 0) begin failures++; $display("FAIL gaps in frame"); end
    checks++; if (overruns != 0) begin failures++; $display("FAIL overrun"); end
    checks++;
    if (xfer_time[0] != 1 || xfer_time[1] != 1000 * 20 + 1) begin
      failures++; $display("FAIL transfer times %0d %0d", xfer_time[0], xfer_time[1]);
    end
    $display("acquisition took %0d clocks", t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
