// pair_datapath: interpolates the two centre pixels of a 5x6 Bayer window
// in one pass.
//
// The CFA is RGGB: even rows are R-G rows (R on even columns), odd rows
// are G-B rows (B on odd columns). Of the two centre pixels win[2][2] and
// win[2][3], one is always a chroma site and the other a green site, so one
// rb_kernel and one g_kernel cover every pair. Only the input routing
// depends on the row type: on an R-G row the chroma site is the left pixel
// (R, kernel estimates G and B) and the green site's horizontal neighbours
// are R; on a G-B row the chroma site is the right pixel (B, kernel
// estimates G and R) and the green site's horizontal neighbours are B, so
// the R and B roles are simply interchanged. The known sample of each
// pixel passes through unchanged. V1/V2 go straight to both kernels.
// Purely combinational.
// The two-kernel arrangement and the R/B interchange by row type follow
// the published architecture; the RGGB phase is this design's choice.
module pair_datapath
  import cfa_pkg::*;
(
  input  pix_t [4:0][5:0] win,     // win[row][col], centre row 2
  input  logic            gb_row,  // centre row is a G-B row
  input  logic            v1,
  input  logic            v2,
  output rgb_t [1:0]      pix_out  // [0] column 2, [1] column 3
);

  int unsigned rc, gc;   // window columns of the chroma and green sites

  pix_t       x_c, g_c;
  pix_t [3:0] g_orth, y_diag, g_diag;
  pix_t [1:0] x_h, x_v, h_nb, v_nb, g_h2, g_v2;
  pix_t       g_est, y_est, h_est, v_est;

  always_comb begin
    rc = gb_row ? 3 : 2;
    gc = gb_row ? 2 : 3;

    // Chroma site (R on R-G rows, B on G-B rows).
    x_c       = win[2][rc];
    g_orth[0] = win[1][rc];
    g_orth[1] = win[2][rc-1];
    g_orth[2] = win[2][rc+1];
    g_orth[3] = win[3][rc];
    y_diag[0] = win[1][rc-1];
    y_diag[1] = win[1][rc+1];
    y_diag[2] = win[3][rc-1];
    y_diag[3] = win[3][rc+1];
    x_h[0]    = win[2][rc-2];
    x_h[1]    = win[2][rc+2];
    x_v[0]    = win[0][rc];
    x_v[1]    = win[4][rc];

    // Green site.
    g_c       = win[2][gc];
    h_nb[0]   = win[2][gc-1];
    h_nb[1]   = win[2][gc+1];
    v_nb[0]   = win[1][gc];
    v_nb[1]   = win[3][gc];
    g_diag[0] = win[1][gc-1];
    g_diag[1] = win[3][gc-1];
    g_diag[2] = win[1][gc+1];
    g_diag[3] = win[3][gc+1];
    g_h2[0]   = win[2][gc-2];
    g_h2[1]   = win[2][gc+2];
    g_v2[0]   = win[0][gc];
    g_v2[1]   = win[4][gc];
  end

  rb_kernel u_rb (
    .x_c(x_c), .g_orth(g_orth), .y_diag(y_diag), .x_h(x_h), .x_v(x_v),
    .v1(v1), .v2(v2), .g_out(g_est), .y_out(y_est)
  );

  g_kernel u_g (
    .g_c(g_c), .h_nb(h_nb), .v_nb(v_nb), .g_diag(g_diag), .g_h2(g_h2),
    .g_v2(g_v2), .v1(v1), .v2(v2), .h_out(h_est), .v_out(v_est)
  );

  always_comb begin
    if (!gb_row) begin
      pix_out[0] = '{r: x_c,   g: g_est, b: y_est};  // R site
      pix_out[1] = '{r: h_est, g: g_c,   b: v_est};  // G site, R left/right
    end else begin
      pix_out[0] = '{r: v_est, g: g_c,   b: h_est};  // G site, B left/right
      pix_out[1] = '{r: y_est, g: g_est, b: x_c};    // B site
    end
  end

endmodule
