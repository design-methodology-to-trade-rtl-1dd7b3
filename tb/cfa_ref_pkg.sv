// cfa_ref_pkg: behavioural reference for the voltage-scalable Bayer
// interpolation, used by the testbenches.
//
// The reference is written from the filter coefficients per quality level
// (0 = nominal, 1 = scaled level 1, 2 = scaled level 2), term by term, with
// plain integers: each input group is divided by its power of two with
// floor rounding before it is summed, which is the arithmetic the hardware
// is specified to have. It also holds a test image (RGGB) in a package
// array so full-image references do not copy the image per call.
package cfa_ref_pkg;

  int img_w;
  int img_h;
  int img [];

  function automatic int clamp(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // Floor division by 2**k of a non-negative sum.
  function automatic int fd(input int v, input int k);
    return v / (1 << k);
  endfunction

  // Quality level in use for a supply level (0/1/2) and a slow-corner flag.
  function automatic int level_of(input int vdd, input int slow);
    return (vdd + slow > 2) ? 2 : vdd + slow;
  endfunction

  // Chroma site: returns {g, y} estimates.
  function automatic void ref_rb(input int c, input int go[4], input int yd[4],
                                 input int xh[2], input int xv[2], input int lvl,
                                 output int g, output int y);
    int sg, sy, sh, sv;
    sg = go[0] + go[1] + go[2] + go[3];
    sy = yd[0] + yd[1] + yd[2] + yd[3];
    sh = xh[0] + xh[1];
    sv = xv[0] + xv[1];
    case (lvl)
      2: begin
        g = fd(sg, 2);
        y = fd(sy, 2);
      end
      1: begin   // 2*G_orth + 2*X - X(i,j+-2)
        g = fd(sg, 2) + fd(c, 2) - fd(sh, 3);
        y = fd(sy, 2) + fd(c, 2) - fd(sh, 3);
      end
      default: begin  // 4*X - X_far for G; 6*X - 3/2*X_far for Y
        g = fd(sg, 2) + fd(c, 1) - fd(sh, 3) - fd(sv, 3);
        y = fd(sy, 2) + fd(c, 1) + fd(c, 2) - fd(sh, 3) - fd(sh + sv, 4) - fd(sv, 3);
      end
    endcase
    g = clamp(g);
    y = clamp(y);
  endfunction

  // Green site: returns {h, v} estimates. gd[0] is G(i-1,j-1).
  function automatic void ref_g(input int c, input int hn[2], input int vn[2],
                                input int gd[4], input int gh[2], input int gv[2],
                                input int lvl, output int h, output int v);
    int sh, sv, h2, v2, dg;
    sh = hn[0] + hn[1];
    sv = vn[0] + vn[1];
    h2 = gh[0] + gh[1];
    v2 = gv[0] + gv[1];
    dg = fd(gd[1], 3) + fd(gd[2] + gd[3], 3);
    case (lvl)
      2: begin   // 4*H + G - G(i-1,j-1)
        h = fd(sh, 1) + fd(c, 3) - fd(gd[0], 3);
        v = fd(sv, 1) + fd(c, 3) - fd(gd[0], 3);
      end
      1: begin   // 4*H + 4*G - G_diag
        h = fd(sh, 1) + fd(c, 1) - fd(gd[0], 3) - dg;
        v = fd(sv, 1) + fd(c, 1) - fd(gd[0], 3) - dg;
      end
      default: begin  // 4*H + 5*G - G_diag - G_h2 + 1/2 G_v2 (and mirrored)
        h = fd(sh, 1) + fd(c, 1) + fd(c, 3) - fd(gd[0], 3) - dg - fd(h2, 3) + fd(v2, 4);
        v = fd(sv, 1) + fd(c, 1) + fd(c, 3) - fd(gd[0], 3) - dg - fd(v2, 3) + fd(h2, 4);
      end
    endcase
    h = clamp(h);
    v = clamp(v);
  endfunction

  // Sample of the package image.
  function automatic int px(input int r, input int c);
    return img[r * img_w + c];
  endfunction

  // Full RGB estimate at interior image position (r, c), RGGB pattern.
  function automatic void ref_pixel(input int r, input int c, input int lvl,
                                    output int ro, output int go, output int bo);
    int a, b;
    bit r_row, even_c;
    r_row  = (r % 2) == 0;
    even_c = (c % 2) == 0;
    if (r_row == even_c) begin  // chroma site: R (R-G row) or B (G-B row)
      ref_rb(px(r, c),
             '{px(r-1, c), px(r, c-1), px(r, c+1), px(r+1, c)},
             '{px(r-1, c-1), px(r-1, c+1), px(r+1, c-1), px(r+1, c+1)},
             '{px(r, c-2), px(r, c+2)}, '{px(r-2, c), px(r+2, c)}, lvl, a, b);
      go = a;
      if (r_row) begin ro = px(r, c); bo = b; end
      else       begin bo = px(r, c); ro = b; end
    end else begin              // green site
      ref_g(px(r, c), '{px(r, c-1), px(r, c+1)}, '{px(r-1, c), px(r+1, c)},
            '{px(r-1, c-1), px(r+1, c-1), px(r-1, c+1), px(r+1, c+1)},
            '{px(r, c-2), px(r, c+2)}, '{px(r-2, c), px(r+2, c)}, lvl, a, b);
      go = px(r, c);
      if (r_row) begin ro = a; bo = b; end
      else       begin bo = a; ro = b; end
    end
  endfunction

  // Synthetic test scene: smooth ramps, a vertical and a horizontal edge,
  // a saturated highlight block and some noise.
  function automatic void make_image(input int w, input int h, input int seed);
    int v, n;
    img_w = w;
    img_h = h;
    img = new[w * h];
    n = seed;
    for (int r = 0; r < h; r++) begin
      for (int c = 0; c < w; c++) begin
        n = n * 1103515245 + 12345;
        v = 40 + (c * 120) / w + (r * 60) / h;
        if (c > w / 2) v = v + 70 - (r % 2) * 30 + (c % 2) * 25;  // edge + colour
        if (r > (3 * h) / 4) v = v - 35;
        if (r >= h / 4 && r < h / 4 + 6 && c >= w / 5 && c < w / 5 + 8)
          v = ((r + c) % 2 == 1) ? 255 : 10;                     // sharp highlight
        v = v + ((n >>> 16) & 15) - 8;
        img[r * w + c] = clamp(v);
      end
    end
  endfunction

endpackage
