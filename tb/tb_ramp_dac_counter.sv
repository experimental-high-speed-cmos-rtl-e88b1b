// tb_ramp_dac_counter: steps the ramp DAC counter through its full range and
// beyond, checking the code, its saturation at 255, the millivolt level
// (390 mV + 4 mV per step) and clear.
module tb_ramp_dac_counter;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [7:0] code;
  logic [11:0] ramp_mv;
  int checks = 0, failures = 0, n = 0;

  ramp_dac_counter #(.W(8), .LO_MV(390), .STEP_MV(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      step = ($urandom_range(0, 1) == 1);
      @(negedge clk);
      if (step && n < 255) n++;
      checks++;
      if (int'(code) != n || int'(ramp_mv) != 390 + 4 * n) begin
        failures++; $display("FAIL code=%0d mv=%0d expected %0d", code, ramp_mv, n);
      end
    end
    checks++;
    if (n != 255) begin failures++; $display("FAIL never saturated"); end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (code != 0 || ramp_mv != 12'd390) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
