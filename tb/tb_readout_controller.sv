// tb_readout_controller: the readout controller of a 5-row, 32-column array
// (4 words per row) driving a model of the memory sense path (a fixed random
// row pattern, one-cycle read latency) and the real readout buffer. Checks:
// the first word 3 cycles after Read Reset, R*4 consecutive valid words with
// no gap (one word per clock), every word's data in row and column order,
// one frame_done on the last word, and a Read Reset in mid-frame restarting
// from row 0.
module tb_readout_controller;
  localparam int R = 5, C = 32, W = 8, BUS = 64, WORDS = C * W / BUS;
  logic clk = 0, rst_n = 0, read_reset = 0;
  logic mem_rd_en, buf_load, xfer, shift, data_valid, frame_done, busy;
  logic [2:0] mem_rd_row;
  logic [C*W-1:0] rows [R];
  logic [C*W-1:0] sense_row;
  logic [BUS-1:0] data_out;
  int checks = 0, failures = 0;

  readout_controller #(.R(R), .C(C), .W(W), .BUS(BUS)) dut (.*);
  readout_buffer #(.C(C), .W(W), .BUS(BUS)) u_buf (
    .clk, .load(buf_load), .row_in(sense_row), .xfer, .shift, .data_out);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (mem_rd_en) sense_row <= rows[mem_rd_row];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_frame(int stop_after);
    int lat, n, dones;
    read_reset = 1; @(negedge clk); read_reset = 0;
    lat = 0;
    while (!data_valid && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("first word latency %0d", lat));
    n = 0; dones = 0;
    while (data_valid && n < stop_after) begin
      int r, w;
      logic [BUS-1:0] e;
      r = n / WORDS; w = n % WORDS;
      for (int p = 0; p < BUS / W; p++) e[p*W +: W] = rows[r][(w * (BUS / W) + p) * W +: W];
      check(data_out === e, $sformatf("word %0d of row %0d: %h vs %h", w, r, data_out, e));
      if (frame_done) dones++;
      check(frame_done == (n == R * WORDS - 1), "frame_done position");
      n++;
      @(negedge clk);
    end
    if (stop_after >= R * WORDS) begin
      check(n == R * WORDS, $sformatf("valid words %0d", n));
      check(dones == 1, "one frame_done");
      check(!busy, "idle after frame");
    end
  endtask

  initial begin
    for (int r = 0; r < R; r++)
      for (int i = 0; i < C * W / 32; i++) rows[r][i*32 +: 32] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_frame(1000);
    repeat (3) @(negedge clk);
    run_frame(7);              // interrupted by the next read reset
    run_frame(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
