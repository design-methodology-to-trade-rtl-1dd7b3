// tb_pair_datapath: random 5x6 windows from R-G and G-B rows at every
// quality level; both output pixels (all three colours) are compared with
// the per-pixel reference, which locates each site in the RGGB pattern on
// its own and so also checks the R/B interchange between row types.
module tb_pair_datapath;
  import cfa_pkg::*;
  import cfa_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  pix_t [4:0][5:0] win;
  logic            gb_row, v1, v2;
  rgb_t [1:0]      pix_out;
  int checks = 0, failures = 0;
  int rows_seen [2] = '{0, 0};

  pair_datapath dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img_w = 6; img_h = 6;
    img = new[36];
    for (int n = 0; n < 6000; n++) begin
      int lvl, base, er, eg, eb;
      lvl = n % 3;
      gb_row = n[3];
      v1 = (lvl >= 1);
      v2 = (lvl == 2);
      for (int k = 0; k < 36; k++) img[k] = (n % 7 == 0) ? (($urandom % 2) ? 255 : 0)
                                                         : $urandom % 256;
      base = gb_row ? 1 : 0;
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 6; c++) win[r][c] = pix_t'(px(base + r, c));
      @(posedge clk);
      rows_seen[gb_row]++;
      for (int k = 0; k < 2; k++) begin
        ref_pixel(base + 2, 2 + k, lvl, er, eg, eb);
        checks++;
        if (pix_out[k].r != er || pix_out[k].g != eg || pix_out[k].b != eb) begin
          failures++;
          $display("FAIL n=%0d gb=%0b lvl=%0d pix%0d got %0d,%0d,%0d exp %0d,%0d,%0d",
                   n, gb_row, lvl, k, pix_out[k].r, pix_out[k].g, pix_out[k].b, er, eg, eb);
        end
      end
    end
    checks++;
    if (rows_seen[0] == 0 || rows_seen[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
