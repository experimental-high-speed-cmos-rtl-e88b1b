// readout_buffer: the 352 x 8-bit row buffer and the 352-pixel to 64-bit
// shift-register output multiplexer of the readout path.
//
// `load` copies a row from the column sense amps into the row buffer.
// `xfer` copies the row buffer into the shift register; `shift` moves the
// shift register down by one bus word. `data_out` is always the lowest word
// of the shift register: 8 pixels, the lowest column in the lowest byte. The
// two stages let the next row be read from the pixel memories into the
// buffer while the current row is being shifted out. `xfer` wins over
// `shift`. The document gives the two stages and their sizes; the shift
// direction and byte order are this design's choice.
module readout_buffer
  import dps_pkg::*;
#(
  parameter int unsigned C   = COLS,
  parameter int unsigned W   = PIX_BITS,
  parameter int unsigned BUS = BUS_BITS
) (
  input  logic               clk,
  input  logic               load,
  input  logic [C*W-1:0]     row_in,
  input  logic               xfer,
  input  logic               shift,
  output logic [BUS-1:0]     data_out
);
  logic [C*W-1:0] row_buf;
  logic [C*W-1:0] shreg;

  always_ff @(posedge clk) begin
    if (load) row_buf <= row_in;
  end

  always_ff @(posedge clk) begin
    if (xfer)       shreg <= row_buf;
    else if (shift) shreg <= shreg >> BUS;
  end

  assign data_out = shreg[BUS-1:0];
endmodule
