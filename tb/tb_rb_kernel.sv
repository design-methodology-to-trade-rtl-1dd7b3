// tb_rb_kernel: self-checking test of the chroma-site filter.
// Random windows at every V1/V2 setting are compared with the coefficient
// reference; flat windows (multiples of 16) must reproduce the flat value
// exactly at every level (zero-sum gradient); extreme windows exercise the
// saturation to 0 and 255.
module tb_rb_kernel;
  import cfa_pkg::*;
  import cfa_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  pix_t       x_c;
  pix_t [3:0] g_orth, y_diag;
  pix_t [1:0] x_h, x_v;
  logic       v1, v2;
  pix_t       g_out, y_out;

  int checks = 0, failures = 0;
  int sat_lo = 0, sat_hi = 0;

  rb_kernel dut (.*);

  task automatic check_one(input int lvl);
    int go[4], yd[4], xh[2], xv[2], eg, ey;
    for (int k = 0; k < 4; k++) begin go[k] = g_orth[k]; yd[k] = y_diag[k]; end
    for (int k = 0; k < 2; k++) begin xh[k] = x_h[k]; xv[k] = x_v[k]; end
    ref_rb(x_c, go, yd, xh, xv, lvl, eg, ey);
    #1;
    checks += 2;
    if (g_out != eg || y_out != ey) begin
      failures++;
      $display("FAIL lvl=%0d v1=%0b v2=%0b x=%0d: g %0d/%0d y %0d/%0d",
               lvl, v1, v2, x_c, g_out, eg, y_out, ey);
    end
    if (eg == 0 || ey == 0) sat_lo++;
    if (eg == 255 || ey == 255) sat_hi++;
  endtask

  task automatic set_ctrl(input int sel);
    // sel: 0 nominal, 1 level 1, 2 level 2 (V1 and V2), 3 V2 alone
    v1 = (sel == 1 || sel == 2);
    v2 = (sel >= 2);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Random windows.
    for (int sel = 0; sel < 4; sel++) begin
      set_ctrl(sel);
      for (int n = 0; n < 3000; n++) begin
        x_c = pix_t'($urandom);
        for (int k = 0; k < 4; k++) begin
          g_orth[k] = pix_t'($urandom);
          y_diag[k] = pix_t'($urandom);
        end
        for (int k = 0; k < 2; k++) begin
          x_h[k] = pix_t'($urandom);
          x_v[k] = pix_t'($urandom);
        end
        check_one(sel == 3 ? 2 : sel);
        @(posedge clk);
      end
    end

    // Flat windows: zero-sum gradient gives back the flat value.
    for (int sel = 0; sel < 3; sel++) begin
      set_ctrl(sel);
      for (int f = 0; f < 256; f += 16) begin
        x_c = pix_t'(f); g_orth = {4{pix_t'(f)}}; y_diag = {4{pix_t'(f)}};
        x_h = {2{pix_t'(f)}}; x_v = {2{pix_t'(f)}};
        #1;
        checks++;
        if (g_out != f || y_out != f) begin
          failures++;
          $display("FAIL flat %0d sel=%0d: g=%0d y=%0d", f, sel, g_out, y_out);
        end
        @(posedge clk);
      end
    end

    // Saturation: bright centre with dark surroundings and vice versa.
    set_ctrl(0);
    x_c = 8'd255; g_orth = {4{8'd250}}; y_diag = {4{8'd250}}; x_h = '0; x_v = '0;
    check_one(0);
    x_c = 8'd0; g_orth = '0; y_diag = '0; x_h = {2{8'd255}}; x_v = {2{8'd255}};
    check_one(0);
    checks++;
    if (sat_lo == 0 || sat_hi == 0) begin
      failures++;
      $display("FAIL saturation not exercised lo=%0d hi=%0d", sat_lo, sat_hi);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
