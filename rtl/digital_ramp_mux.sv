// digital_ramp_mux: the input periphery between the gray code counter and the
// pixel memories (the chip's column drivers and multiplexers).
//
// `counter_aux` selects the source of the digital ramp: 1 takes the on-chip
// gray code counter, 0 the off-chip Aux Digital Ramp pins, which allow other
// conversion codes (for example a logarithmic sequence). The selected value
// is driven onto the column write bus `ramp_bus` whenever `write_enable` is
// high; `ramp_write` tells the pixel memories that the bus carries a value
// they may load. With `write_enable` low the bus is held at zero and no
// memory loads. Purely combinational. The document gives the two sources,
// the select and the write enable; the polarity of `counter_aux` and the
// zero idle value are this design's choice.
module digital_ramp_mux #(
  parameter int unsigned W = 8
) (
  input  logic         counter_aux,   // 1: gray counter, 0: aux digital ramp
  input  logic         write_enable,  // Write Enable pin
  input  logic [W-1:0] counter_gray,
  input  logic [W-1:0] aux_ramp,      // Aux Digital Ramp pins
  output logic [W-1:0] ramp_bus,      // Digital Ramp Seq. to the columns
  output logic         ramp_write
);
  always_comb begin
    ramp_write = write_enable;
    if (!write_enable)   ramp_bus = '0;
    else if (counter_aux) ramp_bus = counter_gray;
    else                  ramp_bus = aux_ramp;
  end
endmodule
