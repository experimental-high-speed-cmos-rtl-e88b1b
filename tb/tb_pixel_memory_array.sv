// tb_pixel_memory_array: a 4 x 6 pixel memory. Each pixel gets a random
// switching step t; a conversion broadcasts gray codes for steps 0..255 and
// drives each pixel's comparator high for steps up to t, so every pixel must
// end holding gray(t). One pixel's comparator is never high and must keep
// its old value; writes with `write` low must change nothing. Rows are read
// back through the one-cycle read port and checked.
module tb_pixel_memory_array;
  localparam int R = 4, C = 6;
  logic clk = 0, write = 0, rd_en = 0;
  logic [7:0] ramp_bus = 0;
  logic [C-1:0] comp [R];
  logic [1:0] rd_row = 0;
  logic [C-1:0][7:0] rd_data;
  int checks = 0, failures = 0;
  int thr [R][C];
  logic [7:0] expv [R][C];

  pixel_memory_array #(.R(R), .C(C), .W(8)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] g(int v);
    return 8'(v) ^ (8'(v) >> 1);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(bit use_never);
    for (int k = 0; k < 256; k++) begin
      ramp_bus = g(k); write = 1;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          comp[r][c] = (k <= thr[r][c]) && !(use_never && r == 1 && c == 2);
      @(negedge clk);
    end
    write = 0;
  endtask

  task automatic read_check(string what);
    for (int r = 0; r < R; r++) begin
      rd_row = 2'(r); rd_en = 1;
      @(negedge clk);
      rd_en = 0;
      for (int c = 0; c < C; c++) begin
        checks++;
        if (rd_data[c] !== expv[r][c]) begin
          failures++;
          $display("FAIL %s r%0d c%0d: %h expected %h", what, r, c, rd_data[c], expv[r][c]);
        end
      end
    end
  endtask

  initial begin
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        thr[r][c] = $urandom_range(0, 255); comp[r][c] = 0;
      end
    thr[0][0] = 0; thr[3][5] = 255;
    @(negedge clk);
    convert(0);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) expv[r][c] = g(thr[r][c]);
    read_check("first conversion");
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) thr[r][c] = $urandom_range(0, 255);
    convert(1);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        if (!(r == 1 && c == 2)) expv[r][c] = g(thr[r][c]);
    read_check("second conversion");
    // comparators high but write disabled: nothing changes
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) comp[r][c] = 1;
    ramp_bus = 8'h5A; write = 0;
    repeat (3) @(negedge clk);
    read_check("write disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
