// tb_digital_ramp_mux: drives random counter and auxiliary ramp values under
// every combination of Counter/Aux and Write Enable and checks the column
// bus and its write strobe.
module tb_digital_ramp_mux;
  logic counter_aux, write_enable, ramp_write;
  logic [7:0] counter_gray, aux_ramp, ramp_bus;
  logic [7:0] exp;
  int checks = 0, failures = 0;

  digital_ramp_mux #(.W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      counter_gray = 8'($urandom); aux_ramp = 8'($urandom);
      counter_aux = 1'($urandom); write_enable = 1'($urandom);
      #1;
      exp = !write_enable ? 8'h00 : (counter_aux ? counter_gray : aux_ramp);
      checks++;
      if (ramp_bus !== exp || ramp_write !== write_enable) begin
        failures++;
        $display("FAIL sel=%b we=%b bus=%h exp=%h", counter_aux, write_enable, ramp_bus, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
