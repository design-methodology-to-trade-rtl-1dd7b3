// g_kernel: voltage-scalable filter for the two missing colours at a
// green CFA site.
//
// H is the chroma colour of the horizontal neighbours and V that of the
// vertical neighbours: on an R-G row H = R and V = B, on a G-B row the
// inputs are interchanged (H = B, V = R), so one circuit serves both.
// The kernels (divided by 8, inputs pre-shifted) are
//
//   nominal: H = (5G + 4*sum H - sum G_diag - sum G_h2 + 1/2 sum G_v2) / 8
//            V = (5G + 4*sum V - sum G_diag - sum G_v2 + 1/2 sum G_h2) / 8
//   level 1: H = (4G + 4*sum H - sum G_diag) / 8      (V likewise)
//   level 2: H = ( G + 4*sum H - G(i-1,j-1)) / 8      (V likewise)
//
// so the gradient coefficients always sum to zero. Adder abil2 forms the
// bilinear half-sum of the two chroma neighbours; the input mux M1 scales
// G(i,j) by 1/2 (V2 = 0) or 1/8 (V2 = 1), and a1 = M1(G) - G(i-1,j-1)/8 is
// shared by both estimates. a2 = bilinear + a1 gives H'1 (level-2 result),
// a3 subtracts the other three diagonal G /8 to give H'2 (level 1), and a4
// adds the far-G terms for H'3 (nominal). The longest path
// M1 + a1 + a2 + a3 + a4 + M is the critical path of the whole design.
// A 2-input M1 cannot by itself give the 5/8 weight that the nominal
// kernel needs, so the missing G(i,j)/8 is added in the a4 branch, which
// only the nominal output uses: this keeps the gradient zero-sum at all
// three levels and is this design's reading of the architecture. Shifts
// truncate; each candidate is saturated to 0..255 before quality_mux.
// Purely combinational.
// Kernels, the adder chain a1..a4, the 2-input M1 and the output muxes
// follow the published architecture; the G(i,j)/8 in a4 is this design's.
module g_kernel
  import cfa_pkg::*;
(
  input  pix_t       g_c,     // centre sample G(i,j)
  input  pix_t [1:0] h_nb,    // H(i,j-1), H(i,j+1)
  input  pix_t [1:0] v_nb,    // V(i-1,j), V(i+1,j)
  input  pix_t [3:0] g_diag,  // G(i-1,j-1), G(i+1,j-1), G(i-1,j+1), G(i+1,j+1)
  input  pix_t [1:0] g_h2,    // G(i,j-2), G(i,j+2)
  input  pix_t [1:0] g_v2,    // G(i-2,j), G(i+2,j)
  input  logic       v1,      // voltage-scaling control 1
  input  logic       v2,      // voltage-scaling control 2
  output pix_t       h_out,   // estimated H colour at (i,j)
  output pix_t       v_out    // estimated V colour at (i,j)
);

  acc_t hbil, vbil, m1, a1, q, h2sum, v2sum;
  acc_t h1, h2, h3, vv1, vv2, vv3;

  always_comb begin
    // Bilinear half-sums (abil2) and the shared M1/a1 term.
    hbil = (widen(11'(h_nb[0])) + widen(11'(h_nb[1]))) >>> 1;
    vbil = (widen(11'(v_nb[0])) + widen(11'(v_nb[1]))) >>> 1;
    m1   = v2 ? widen(11'(g_c >> 3)) : widen(11'(g_c >> 1));
    a1   = m1 - widen(11'(g_diag[0] >> 3));

    // a2: level-2 results.
    h1  = hbil + a1;
    vv1 = vbil + a1;

    // a3: remaining diagonal G terms, level-1 results.
    q   = widen(11'(g_diag[1] >> 3))
        + ((widen(11'(g_diag[2])) + widen(11'(g_diag[3]))) >>> 3);
    h2  = h1 - q;
    vv2 = vv1 - q;

    // a4: far-G terms plus the extra G(i,j)/8, nominal results.
    h2sum = widen(11'(g_h2[0])) + widen(11'(g_h2[1]));
    v2sum = widen(11'(g_v2[0])) + widen(11'(g_v2[1]));
    h3  = h2  - ((h2sum >>> 3) - (v2sum >>> 4) - widen(11'(g_c >> 3)));
    vv3 = vv2 - ((v2sum >>> 3) - (h2sum >>> 4) - widen(11'(g_c >> 3)));
  end

  quality_mux u_mux_h (
    .c1(sat8(h1)), .c2(sat8(h2)), .c3(sat8(h3)), .v1(v1), .v2(v2), .y(h_out)
  );

  quality_mux u_mux_v (
    .c1(sat8(vv1)), .c2(sat8(vv2)), .c3(sat8(vv3)), .v1(v1), .v2(v2), .y(v_out)
  );

endmodule
