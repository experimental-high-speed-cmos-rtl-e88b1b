// row_read_pointer: the memory row read pointer that addresses the pixel
// memories one row at a time during readout.
//
// `clear` (from the read reset strobe) points it at row 0; `advance` moves it
// to the next row, wrapping from R-1 back to 0. `last` flags the final row.
// Clear wins over advance. The document names the pointer and its job; the
// binary encoding (rather than a one-hot shift chain) is this design's choice.
module row_read_pointer
  import dps_pkg::*;
#(
  parameter int unsigned R = ROWS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 advance,
  output logic [$clog2(R)-1:0] row,
  output logic                 last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       row <= '0;
    else if (clear)   row <= '0;
    else if (advance) row <= (32'(row) == R - 1) ? '0 : row + 1'b1;
  end

  assign last = (32'(row) == R - 1);
endmodule
