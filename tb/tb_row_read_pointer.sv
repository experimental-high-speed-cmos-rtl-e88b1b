// tb_row_read_pointer: advances a 5-row pointer with random gaps and clears,
// checking the row and last flag against a model count, including the wrap
// from the last row to row 0 and clear winning over advance.
module tb_row_read_pointer;
  localparam int R = 5;
  logic clk = 0, rst_n = 0, clear = 0, advance = 0, last;
  logic [2:0] row;
  int checks = 0, failures = 0, exp_row = 0, wraps = 0;

  row_read_pointer #(.R(R)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      advance = ($urandom_range(0, 2) != 0);
      clear   = ($urandom_range(0, 30) == 0);
      @(negedge clk);
      if (clear) exp_row = 0;
      else if (advance) begin
        if (exp_row == R - 1) wraps++;
        exp_row = (exp_row + 1) % R;
      end
      checks++;
      if (int'(row) != exp_row || last != (exp_row == R - 1)) begin
        failures++;
        $display("FAIL row=%0d last=%b expected %0d", row, last, exp_row);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
