// tb_cfa_psnr: image-quality workload at the default 768 x 512 size.
// A synthetic full-colour scene (strongly correlated R, G and B over a
// textured luminance with edges) is sampled through an RGGB mosaic and
// streamed through the interpolator once per quality level. For each
// level the PSNR of the interior pixels against the original scene is
// computed, and also for plain bilinear interpolation computed here.
// Checks: every output pixel matches the reference model, and the PSNR
// degrades gracefully: nominal >= level 1 >= level 2 >= bilinear.
module tb_cfa_psnr;
  import cfa_pkg::*;
  import cfa_ref_pkg::*;

  localparam int W = 768, H = 512;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, slow_corner, in_valid, out_valid, v1, v2;
  vdd_level_e  vdd_level;
  pix_t [1:0]  in_pair;
  rgb_t [1:0]  out_pix;
  logic [15:0] out_row, out_col;

  int checks = 0, failures = 0;
  int cur_lvl = 0;
  int rgb_img [3][];            // original scene, per channel
  real sse [4];                 // per level 0..2, 3 = bilinear
  longint npix [4];

  cfa_interp_top dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int orig(input int ch, input int r, input int c);
    return rgb_img[ch][r * W + c];
  endfunction

  function automatic real err2(input int a, input int b);
    return real'((a - b) * (a - b));
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      for (int k = 0; k < 2; k++) begin
        int er, eg, eb, c;
        c = out_col + k;
        ref_pixel(out_row, c, cur_lvl, er, eg, eb);
        checks++;
        if (out_pix[k].r != er || out_pix[k].g != eg || out_pix[k].b != eb) begin
          failures++;
          if (failures < 10)
            $display("FAIL lvl=%0d (%0d,%0d)", cur_lvl, out_row, c);
        end
        sse[cur_lvl] += err2(out_pix[k].r, orig(0, out_row, c))
                      + err2(out_pix[k].g, orig(1, out_row, c))
                      + err2(out_pix[k].b, orig(2, out_row, c));
        npix[cur_lvl] += 3;
      end
    end
  end

  function automatic real psnr(input real s, input longint n);
    return 10.0 * $log10(255.0 * 255.0 / (s / real'(n)));
  endfunction

  // Bilinear estimate of channel ch at (r, c) from the mosaic.
  function automatic int bil(input int ch, input int r, input int c);
    bit r_row, even_c;
    int site;   // 0 = R site, 1 = G site, 2 = B site
    r_row  = (r % 2) == 0;
    even_c = (c % 2) == 0;
    site = (r_row && even_c) ? 0 : (!r_row && !even_c) ? 2 : 1;
    if (ch == site) return px(r, c);
    if (ch == 1) return (px(r-1, c) + px(r+1, c) + px(r, c-1) + px(r, c+1)) / 4;
    if (site != 1)   // opposite chroma at a chroma site: diagonals
      return (px(r-1, c-1) + px(r-1, c+1) + px(r+1, c-1) + px(r+1, c+1)) / 4;
    // chroma at a green site: horizontal pair on its own row type
    if ((ch == 0) == r_row) return (px(r, c-1) + px(r, c+1)) / 2;
    return (px(r-1, c) + px(r+1, c)) / 2;
  endfunction

  initial begin
    int n;
    real p [4];
    // Scene: luminance with a ramp, fine stripes, a disc and noise;
    // colour differences vary slowly, as in natural images.
    img_w = W; img_h = H;
    img = new[W * H];
    foreach (rgb_img[ch]) rgb_img[ch] = new[W * H];
    n = 11;
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        int y, dx, dy;
        n = n * 1103515245 + 12345;
        y = 60 + (c * 80) / W + (r * 40) / H;
        if ((c / 24) % 2 == 1 && r < H / 2) y += 50;                  // vertical edges
        if ((r / 16) % 2 == 1 && c > (2 * W) / 3) y += 40;            // horizontal edges
        dx = c - W / 3; dy = r - (2 * H) / 3;
        if (dx * dx + dy * dy < 90 * 90) y += 60;                     // disc
        y += ((n >>> 16) & 7) - 4;
        rgb_img[0][r * W + c] = clamp(y + 30 - (c * 40) / W);
        rgb_img[1][r * W + c] = clamp(y);
        rgb_img[2][r * W + c] = clamp(y - 20 + (r * 40) / H);
      end
    end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r * W + c] = ((r % 2) == 0 && (c % 2) == 0) ? rgb_img[0][r * W + c]
                       : ((r % 2) == 1 && (c % 2) == 1) ? rgb_img[2][r * W + c]
                       : rgb_img[1][r * W + c];
    for (int k = 0; k < 4; k++) begin sse[k] = 0.0; npix[k] = 0; end
    for (int r = 2; r < H - 2; r++)
      for (int c = 2; c < W - 2; c++) begin
        for (int ch = 0; ch < 3; ch++) sse[3] += err2(bil(ch, r, c), orig(ch, r, c));
        npix[3] += 3;
      end

    rst_n = 1'b0; in_valid = 1'b0; in_pair = '0;
    vdd_level = VDD_NOM; slow_corner = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int lvl = 0; lvl < 3; lvl++) begin
      vdd_level = vdd_level_e'(lvl);
      cur_lvl = lvl;
      for (int r = 0; r < H; r++)
        for (int q = 0; q < W / 2; q++) begin
          in_valid = 1'b1;
          in_pair[0] = pix_t'(px(r, 2 * q));
          in_pair[1] = pix_t'(px(r, 2 * q + 1));
          @(posedge clk);
          #1;
        end
      in_valid = 1'b0;
      repeat (4) @(posedge clk);
      #1;
    end

    for (int k = 0; k < 4; k++) p[k] = psnr(sse[k], npix[k]);
    $display("PSNR dB: nominal %0.2f  level1 %0.2f  level2 %0.2f  bilinear %0.2f",
             p[0], p[1], p[2], p[3]);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (npix[k] != longint'(3 * 2 * (H - 4) * (W / 2 - 2))) failures++;
      checks++;
      if (!(p[k] >= p[k+1])) begin
        failures++;
        $display("FAIL PSNR not graceful at step %0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
