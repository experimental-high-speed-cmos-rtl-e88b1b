// pixel_memory_array: the 8-bit memory inside every pixel and the column
// sense path that reads it a row at a time.
//
// Write side (A/D conversion): on every clock cycle in which `write` is high,
// each pixel whose comparator output is high loads the value on the global
// digital ramp bus. Once a pixel's comparator has switched low the pixel
// stops loading, so it keeps the last code presented before the switch: the
// single-slope conversion result. All pixels load in parallel.
// Read side: `rd_en` reads row `rd_row` through the column sense amps into
// `rd_data` on the next clock edge (one cycle latency), column 0 in the
// lowest byte. Reading does not disturb the stored values.
//
// The document specifies 3T-DRAM cells with a 10 ms hold time and
// charge-redistribution sense amps; here every cell is an ideal register that
// holds forever and is not reset (a pixel that never converted holds
// whatever it held before). The one-cycle read latency is this design's
// choice.
module pixel_memory_array
  import dps_pkg::*;
#(
  parameter int unsigned R = ROWS,
  parameter int unsigned C = COLS,
  parameter int unsigned W = PIX_BITS
) (
  input  logic                    clk,
  input  logic                    write,
  input  logic [W-1:0]            ramp_bus,
  input  logic [C-1:0]            comp [R],
  input  logic                    rd_en,
  input  logic [$clog2(R)-1:0]    rd_row,
  output logic [C-1:0][W-1:0]     rd_data
);
  logic [C-1:0][W-1:0] mem [R];

  // One block of storage per row keeps every procedural loop to one row.
  for (genvar r = 0; r < R; r++) begin : g_row
    logic [C-1:0][W-1:0] cells;

    always_ff @(posedge clk) begin
      if (write) begin
        for (int c = 0; c < C; c++)
          if (comp[r][c]) cells[c] <= ramp_bus;
      end
    end

    assign mem[r] = cells;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_row];
  end
endmodule
