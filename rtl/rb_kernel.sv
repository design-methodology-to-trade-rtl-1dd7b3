// rb_kernel: voltage-scalable filter for the two missing colours at a
// red (or blue) CFA site.
//
// At an R site it estimates G and B; at a B site the same hardware
// estimates G and R with the red and blue inputs interchanged, so the
// ports speak of the centre colour X and the opposite chroma colour Y.
// The filters are 5x5 kernels divided by 8; instead of dividing the result,
// each input group is shifted before it enters the adders:
//
//   nominal: G = (2*sum G_orth + 4*X - sum X_far)            / 8
//            Y = (2*sum Y_diag + 6*X - 3/2*sum X_far)        / 8
//   level 1: G = (2*sum G_orth + 2*X - X(i,j-2) - X(i,j+2))  / 8
//            Y = (2*sum Y_diag + 2*X - X(i,j-2) - X(i,j+2))  / 8
//   level 2: G = sum G_orth / 4,  Y = sum Y_diag / 4  (bilinear only)
//
// The bilinear sums are formed first (adders ab1/ab2, result G'1 / Y'1),
// so they settle earliest. The input multiplexer M1 scales X by 1/2
// (nominal) or 1/4 (V1 = 1); the term  s = M1(X) - (X(i,j-2)+X(i,j+2))/8
// is computed once and shared by both estimates. G'2 = G'1 + s and
// Y'2 = Y'1 + s are the level-1 results; G'3 subtracts the vertical far
// pair /8, Y'3 adds X/4 - (both far pairs)/16 - (vertical far pair)/8.
// The way the extra nominal terms of Y'3 are split over shifts, the
// rounding (every shift truncates) and the saturation of each candidate
// to 0..255 are this design's choices. Two quality_mux instances pick the
// result under V1/V2. Purely combinational: the whole chain sits inside
// one clock period, and lowering Vdd lengthens it until only the earlier
// taps are valid.
// Kernels, the bilinear-first adder order, the shared M1 term and the
// output mux follow the published architecture.
module rb_kernel
  import cfa_pkg::*;
(
  input  pix_t       x_c,     // centre sample X(i,j)
  input  pix_t [3:0] g_orth,  // G(i-1,j), G(i,j-1), G(i,j+1), G(i+1,j)
  input  pix_t [3:0] y_diag,  // Y(i-1,j-1), Y(i-1,j+1), Y(i+1,j-1), Y(i+1,j+1)
  input  pix_t [1:0] x_h,     // X(i,j-2), X(i,j+2)
  input  pix_t [1:0] x_v,     // X(i-2,j), X(i+2,j)
  input  logic       v1,      // voltage-scaling control 1
  input  logic       v2,      // voltage-scaling control 2
  output pix_t       g_out,   // estimated G at (i,j)
  output pix_t       y_out    // estimated Y at (i,j)
);

  acc_t ab1a, ab1b, ab2;      // bilinear G adders
  acc_t yb1a, yb1b, yb2;      // bilinear Y adders
  acc_t g1, g2, g3, y1, y2, y3;
  acc_t m1, xh_sum, xv_sum, s;

  always_comb begin
    // Bilinear components.
    ab1a = widen(11'(g_orth[0])) + widen(11'(g_orth[1]));
    ab1b = widen(11'(g_orth[2])) + widen(11'(g_orth[3]));
    ab2  = ab1a + ab1b;
    g1   = ab2 >>> 2;
    yb1a = widen(11'(y_diag[0])) + widen(11'(y_diag[1]));
    yb1b = widen(11'(y_diag[2])) + widen(11'(y_diag[3]));
    yb2  = yb1a + yb1b;
    y1   = yb2 >>> 2;

    // Shared gradient term through input mux M1.
    m1     = v1 ? widen(11'(x_c >> 2)) : widen(11'(x_c >> 1));
    xh_sum = widen(11'(x_h[0])) + widen(11'(x_h[1]));
    xv_sum = widen(11'(x_v[0])) + widen(11'(x_v[1]));
    s      = m1 - (xh_sum >>> 3);

    g2 = g1 + s;
    y2 = y1 + s;

    // Remaining nominal gradient terms.
    g3 = g2 - (xv_sum >>> 3);
    y3 = y2 + widen(11'(x_c >> 2)) - ((xh_sum + xv_sum) >>> 4) - (xv_sum >>> 3);
  end

  quality_mux u_mux_g (
    .c1(sat8(g1)), .c2(sat8(g2)), .c3(sat8(g3)), .v1(v1), .v2(v2), .y(g_out)
  );

  quality_mux u_mux_y (
    .c1(sat8(y1)), .c2(sat8(y2)), .c3(sat8(y3)), .v1(v1), .v2(v2), .y(y_out)
  );

endmodule
