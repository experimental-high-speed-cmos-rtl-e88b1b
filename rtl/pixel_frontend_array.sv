// pixel_frontend_array: BEHAVIOURAL MODEL of the analog part of every pixel,
// the photogate circuit (photogate, transfer gate, reset transistor, storage
// capacitor = sense node) and the per-pixel comparator. It is not
// synthesizable hardware: in silicon these are analog circuits.
//
// Voltages are carried as millivolt codes; the sense node is held with
// FRAC_BITS extra fractional bits. Light is given per pixel as a photocurrent
// `rate`, loaded through the scene port: while PG is high a pixel's photogate
// collects rate * 2**-FRAC_BITS mV of signal per clock cycle. A cycle with TX
// high transfers the collected signal to the sense node (lowering it, never
// below SAT_MV) and empties the photogate; the sense node keeps what it has
// been given, so any number of transfers and conversions may follow one reset
// (non-destructive readout). A cycle with Pixel Reset high sets every sense
// node to the Reset Voltage and empties the photogates; this is also how the
// electrical test path drives a chosen level onto the sense nodes.
//
// Each comparator has the sense node on its non-inverting input and the
// global analog ramp on its inverting input: comp[r][c] is high while the
// sense node is above the ramp, and low while Power Enable is low (comparators
// powered down). Comparator outputs are combinational.
//
// The document gives the circuit elements, the comparator connection and the
// power-down; the linear photocurrent, the ideal comparator, the saturation
// floor, the empty-on-reset photogate and every number here are this model's.
module pixel_frontend_array
  import dps_pkg::*;
#(
  parameter int unsigned R      = ROWS,
  parameter int unsigned C      = COLS,
  parameter int unsigned SAT_MV = 400     // lowest level the sense node reaches
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // global pixel controls
  input  logic                 pixel_reset,
  input  mv_t                  reset_voltage_mv,
  input  logic                 pg,
  input  logic                 tx,
  input  logic                 power_enable,
  input  mv_t                  analog_ramp_mv,
  // scene: photocurrent of one pixel per write
  input  logic                 scene_we,
  input  logic [8:0]           scene_row,
  input  logic [8:0]           scene_col,
  input  logic [7:0]           scene_rate,
  // comparator outputs
  output logic [C-1:0]         comp [R]
);
  localparam int unsigned SW = MV_BITS + FRAC_BITS;
  localparam logic [SW-1:0] FLOOR = SW'(SAT_MV) << FRAC_BITS;

  logic [31:0] elapsed;          // PG-high cycles since the last transfer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 elapsed <= '0;
    else if (pixel_reset || tx) elapsed <= '0;
    else if (pg)                elapsed <= elapsed + 1;
  end

  // One block per row keeps every procedural loop to one row.
  for (genvar r = 0; r < R; r++) begin : g_row
    logic [7:0]    rate  [C];
    logic [SW-1:0] sense [C];

    always_ff @(posedge clk) begin
      if (scene_we && 32'(scene_row) == r && 32'(scene_col) < C)
        rate[scene_col] <= scene_rate;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int c = 0; c < C; c++) sense[c] <= FLOOR;
      end else if (pixel_reset) begin
        for (int c = 0; c < C; c++) sense[c] <= SW'(reset_voltage_mv) << FRAC_BITS;
      end else if (tx) begin
        for (int c = 0; c < C; c++) begin
          logic [39:0] delta;
          delta = 40'(rate[c]) * 40'(elapsed);
          if (40'(sense[c]) <= 40'(FLOOR) + delta) sense[c] <= FLOOR;
          else                                     sense[c] <= sense[c] - SW'(delta);
        end
      end
    end

    always_comb begin
      for (int c = 0; c < C; c++)
        comp[r][c] = power_enable && (sense[c] > (SW'(analog_ramp_mv) << FRAC_BITS));
    end
  end
endmodule
