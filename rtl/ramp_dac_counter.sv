// ramp_dac_counter: the board counter that steps the DAC producing the
// analog ADC ramp, kept in lock step with the chip's gray code counter.
//
// `clear` returns the count to 0; `step` advances it by one (saturating at
// 2**W-1). The DAC code and the voltage it stands for are outputs:
// ramp_mv = LO_MV + code * STEP_MV. With the defaults (390 mV start, 4 mV
// steps) 256 steps span about 1 V, the chip's typical ADC range, starting
// just below the lowest sense node level of the front-end model. The binary
// code also serves as the board's auxiliary digital ramp. The document only
// says that the ramp is made on the board with DACs and counters; the linear
// ramp, its levels and the saturating count are this design's choice.
module ramp_dac_counter
  import dps_pkg::*;
#(
  parameter int unsigned W       = PIX_BITS,
  parameter int unsigned LO_MV   = 390,
  parameter int unsigned STEP_MV = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         step,
  output logic [W-1:0] code,
  output mv_t          ramp_mv
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       code <= '0;
    else if (clear)                   code <= '0;
    else if (step && code != '1)      code <= code + 1'b1;
  end

  assign ramp_mv = mv_t'(LO_MV + 32'(code) * STEP_MV);

  initial assert (LO_MV + ((1 << W) - 1) * STEP_MV < (1 << MV_BITS))
    else $error("ramp_dac_counter: ramp exceeds the mV code range");
endmodule
