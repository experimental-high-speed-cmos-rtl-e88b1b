// dps_pkg: constants and types shared by the digital pixel sensor (DPS) chip
// and the board that drives it.
//
// The array size (352 x 288), the 8-bit per-pixel ADC/memory, and the 64-bit
// (8 pixels per word) output bus are the chip's own numbers. The millivolt
// scale used for the analog quantities of the behavioural front end, and the
// 16 fractional bits of its charge arithmetic, are this model's choices.
package dps_pkg;
  localparam int unsigned ROWS       = 288;  // array rows
  localparam int unsigned COLS       = 352;  // array columns
  localparam int unsigned PIX_BITS   = 8;    // ADC resolution = pixel memory width
  localparam int unsigned BUS_BITS   = 64;   // output bus width
  localparam int unsigned PIX_PER_WD = BUS_BITS / PIX_BITS;  // 8 pixels per word
  localparam int unsigned MV_BITS    = 12;   // analog levels carried as mV codes
  localparam int unsigned FRAC_BITS  = 16;   // fractional bits of charge arithmetic

  typedef logic [PIX_BITS-1:0] pixel_t;
  typedef logic [MV_BITS-1:0]  mv_t;

  // Phases of the imager (reset, integration, A/D conversion, readout).
  typedef enum logic [2:0] {
    PH_IDLE    = 3'd0,
    PH_RESET   = 3'd1,
    PH_INTEG   = 3'd2,
    PH_XFER    = 3'd3,
    PH_CONVERT = 3'd4,
    PH_READOUT = 3'd5
  } phase_e;

  // Binary to reflected gray code, and back.
  function automatic pixel_t bin2gray(input pixel_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic pixel_t gray2bin(input pixel_t g);
    pixel_t b;
    b[PIX_BITS-1] = g[PIX_BITS-1];
    for (int i = PIX_BITS - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
endpackage
