// cfa_pkg: types and helpers shared by the voltage-scalable colour
// interpolation (demosaicking) datapath.
//
// Pixels are 8-bit unsigned CFA samples. Filter arithmetic is carried in a
// small signed accumulator because gradient terms are subtracted; every
// result is saturated back to 8 bits before the output multiplexer, so the
// multiplexers themselves are 8 bits wide as in the architecture.
// The supply operating point is one of three levels: nominal, scaled
// level 1 (0.8 x nominal) and scaled level 2 (0.6 x nominal).
package cfa_pkg;

  localparam int unsigned PIX_W = 8;   // sample width
  localparam int unsigned ACC_W = 12;  // signed filter accumulator width

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Supply operating point chosen by the system.
  typedef enum logic [1:0] {
    VDD_NOM = 2'd0,
    VDD_1   = 2'd1,
    VDD_2   = 2'd2
  } vdd_level_e;

  // One RGB output pixel.
  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  // Widen an unsigned sample (or sum of samples) into the accumulator.
  function automatic acc_t widen(input logic [ACC_W-2:0] v);
    return acc_t'({1'b0, v});
  endfunction

  // Saturate an accumulator value to the 0..255 pixel range.
  function automatic pix_t sat8(input acc_t v);
    if (v < 0)        return '0;
    else if (v > 255) return 8'd255;
    else              return v[PIX_W-1:0];
  endfunction

endpackage
