// gray_counter: the chip's 8-bit gray code counter that produces the digital
// ramp loaded into every pixel memory during A/D conversion.
//
// A binary count advances by one on every cycle in which `step` (the chip's
// Counter Clock, modelled as a clock enable of the single system clock) is
// high; `counter_reset` (the chip's Counter Reset pin) clears it
// synchronously and wins over `step`. The output is the reflected gray code of
// the registered count, so only one bit changes per step. The count wraps
// after 2**W-1. The document gives the width and the gray coding; the
// binary-plus-encode structure and the synchronous reset are this design's
// choice.
module gray_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,          // chip-level asynchronous reset
  input  logic         counter_reset,  // Counter Reset pin
  input  logic         step,           // Counter Clock pulse
  output logic [W-1:0] gray,
  output logic [W-1:0] count           // binary value, for observation
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             count <= '0;
    else if (counter_reset) count <= '0;
    else if (step)          count <= count + 1'b1;
  end

  assign gray = count ^ (count >> 1);

// One bit of the gray code changes per step.
  a_one_bit: assert property (@(posedge clk) disable iff (!rst_n)
    $past(step) && !$past(counter_reset) && $past(rst_n) |-> $countones(gray ^ $past(gray)) == 1);
endmodule
