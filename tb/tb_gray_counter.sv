// tb_gray_counter: steps the 8-bit gray code counter through more than a full
// wrap, with random idle cycles, and checks every value against a reference
// gray sequence built bit by bit from a model count (bit i = bit i of n xor
// bit i+1 of n), that exactly one bit changes per step, that idle cycles hold
// the value and that Counter Reset returns it to zero.
module tb_gray_counter;
  logic clk = 0, rst_n = 0, counter_reset = 0, step = 0;
  logic [7:0] gray, count;
  int checks = 0, failures = 0;
  int unsigned n = 0;

  gray_counter #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_gray(int unsigned v);
    logic [7:0] g;
    for (int i = 0; i < 8; i++) g[i] = v[i] ^ ((i < 7) ? v[i+1] : 1'b0);
    return g;
  endfunction

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (gray !== exp) begin
      failures++;
      $display("FAIL %s: gray=%h expected %h", what, gray, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(8'h00, "after reset");
    for (int i = 0; i < 300; i++) begin
      prev = gray;
      step = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (step) n = (n + 1) % 256;
      check(ref_gray(n), "step");
      checks++;
      if (step && $countones(gray ^ prev) != 1) begin
        failures++;
        $display("FAIL more than one bit changed: %h -> %h", prev, gray);
      end
    end
    step = 1; counter_reset = 1;
    @(negedge clk);
    counter_reset = 0; step = 0; n = 0;
    check(8'h00, "counter reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
