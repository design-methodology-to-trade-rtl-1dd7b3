// tb_g_kernel: self-checking test of the green-site filter.
// Random windows at every V1/V2 setting are compared with the coefficient
// reference; flat windows (multiples of 16) must come back unchanged at
// every level; extreme windows exercise saturation.
module tb_g_kernel;
  import cfa_pkg::*;
  import cfa_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  pix_t       g_c;
  pix_t [1:0] h_nb, v_nb, g_h2, g_v2;
  pix_t [3:0] g_diag;
  logic       v1, v2;
  pix_t       h_out, v_out;

  int checks = 0, failures = 0;
  int sat_lo = 0, sat_hi = 0;

  g_kernel dut (.*);

  task automatic check_one(input int lvl);
    int hn[2], vn[2], gd[4], gh[2], gv[2], eh, ev;
    for (int k = 0; k < 4; k++) gd[k] = g_diag[k];
    for (int k = 0; k < 2; k++) begin
      hn[k] = h_nb[k]; vn[k] = v_nb[k]; gh[k] = g_h2[k]; gv[k] = g_v2[k];
    end
    ref_g(g_c, hn, vn, gd, gh, gv, lvl, eh, ev);
    #1;
    checks += 2;
    if (h_out != eh || v_out != ev) begin
      failures++;
      $display("FAIL lvl=%0d v1=%0b v2=%0b g=%0d: h %0d/%0d v %0d/%0d",
               lvl, v1, v2, g_c, h_out, eh, v_out, ev);
    end
    if (eh == 0 || ev == 0) sat_lo++;
    if (eh == 255 || ev == 255) sat_hi++;
  endtask

  task automatic set_ctrl(input int sel);
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
    for (int sel = 0; sel < 4; sel++) begin
      set_ctrl(sel);
      for (int n = 0; n < 3000; n++) begin
        g_c = pix_t'($urandom);
        for (int k = 0; k < 4; k++) g_diag[k] = pix_t'($urandom);
        for (int k = 0; k < 2; k++) begin
          h_nb[k] = pix_t'($urandom); v_nb[k] = pix_t'($urandom);
          g_h2[k] = pix_t'($urandom); g_v2[k] = pix_t'($urandom);
        end
        check_one(sel == 3 ? 2 : sel);
        @(posedge clk);
      end
    end

    for (int sel = 0; sel < 3; sel++) begin
      set_ctrl(sel);
      for (int f = 0; f < 256; f += 16) begin
        g_c = pix_t'(f); g_diag = {4{pix_t'(f)}};
        h_nb = {2{pix_t'(f)}}; v_nb = {2{pix_t'(f)}};
        g_h2 = {2{pix_t'(f)}}; g_v2 = {2{pix_t'(f)}};
        #1;
        checks++;
        if (h_out != f || v_out != f) begin
          failures++;
          $display("FAIL flat %0d sel=%0d: h=%0d v=%0d", f, sel, h_out, v_out);
        end
        @(posedge clk);
      end
    end

    set_ctrl(0);
    g_c = 8'd255; h_nb = {2{8'd255}}; v_nb = {2{8'd255}}; g_diag = '0;
    g_h2 = '0; g_v2 = {2{8'd255}};
    check_one(0);
    g_c = 8'd0; h_nb = '0; v_nb = '0; g_diag = {4{8'd255}};
    g_h2 = {2{8'd255}}; g_v2 = '0;
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
