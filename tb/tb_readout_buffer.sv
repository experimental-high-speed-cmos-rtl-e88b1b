// tb_readout_buffer: loads random rows (C = 32 pixels, 4 words per row) into
// the row buffer, moves them to the shift register and shifts them out,
// checking every 64-bit word against the row's bytes in column order. A
// second row is loaded into the buffer while the first is shifting, to show
// that the two stages are independent.
module tb_readout_buffer;
  localparam int C = 32, W = 8, BUS = 64, WORDS = C * W / BUS;
  logic clk = 0, load = 0, xfer = 0, shift = 0;
  logic [C*W-1:0] row_in, rowa, rowb;
  logic [BUS-1:0] data_out;
  int checks = 0, failures = 0;

  readout_buffer #(.C(C), .W(W), .BUS(BUS)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [BUS-1:0] ref_word(logic [C*W-1:0] row, int w);
    logic [BUS-1:0] x;
    for (int p = 0; p < BUS / W; p++) x[p*W +: W] = row[(w * (BUS / W) + p) * W +: W];
    return x;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < C * W / 32; i++) begin
      rowa[i*32 +: 32] = $urandom; rowb[i*32 +: 32] = $urandom;
    end
    @(negedge clk); row_in = rowa; load = 1;
    @(negedge clk); load = 0; xfer = 1;
    @(negedge clk); xfer = 0;
    for (int w = 0; w < WORDS; w++) begin
      checks++;
      if (data_out !== ref_word(rowa, w)) begin
        failures++; $display("FAIL row a word %0d: %h", w, data_out);
      end
      shift = (w != WORDS - 1);
      load  = (w == 0); row_in = rowb;
      xfer  = (w == WORDS - 1);
      @(negedge clk); shift = 0; load = 0; xfer = 0;
    end
    for (int w = 0; w < WORDS; w++) begin
      checks++;
      if (data_out !== ref_word(rowb, w)) begin
        failures++; $display("FAIL row b word %0d: %h", w, data_out);
      end
      shift = 1;
      @(negedge clk); shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
