// tb_cfa_interp_full: end-to-end test of the streaming interpolator at its
// default size, 768 x 512 pixels (the size of the standard photographic
// test images it is meant for), with the top's parameters untouched. Six
// frames are streamed back to back, without reset, one for each supply
// level with and without the slow-corner flag,
// with random idle cycles between pairs. Every output pixel is compared
// with the reference at the quality level expected for that frame, its
// coordinates and its 2-cycle latency are checked, and so is the number of
// pixels per frame. Mechanisms that must occur at least once: each of the
// three quality levels, slow-corner demotion, R-G and G-B rows (R/B
// interchange), saturation of an estimate, idle cycles in the stream and
// back-to-back frames.
module tb_cfa_interp_full;
  import cfa_pkg::*;
  import cfa_ref_pkg::*;

  localparam int W = 768, H = 512;
  localparam int PER_FRAME = (H - 4) * (W / 2 - 2);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, slow_corner, in_valid, out_valid, v1, v2;
  vdd_level_e  vdd_level;
  pix_t [1:0]  in_pair;
  rgb_t [1:0]  out_pix;
  logic [15:0] out_row, out_col;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int cur_lvl = 0, frame_outs = 0;
  // Mechanism counters.
  int n_lvl [3] = '{0, 0, 0};
  int n_demote = 0, n_rg = 0, n_gb = 0, n_sat = 0, n_idle = 0, n_b2b = 0;

  typedef struct { int r; int c; longint t; } exp_t;
  exp_t expq [$];

  cfa_interp_top dut (.*);

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      int er, eg, eb;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at row %0d col %0d", out_row, out_col);
      end else begin
        e = expq.pop_front();
        if (out_row != e.r || out_col != e.c || cycle - e.t != 2) begin
          failures++;
          $display("FAIL position/latency: got (%0d,%0d) exp (%0d,%0d) latency %0d",
                   out_row, out_col, e.r, e.c, cycle - e.t);
        end
      end
      for (int k = 0; k < 2; k++) begin
        ref_pixel(out_row, out_col + k, cur_lvl, er, eg, eb);
        checks++;
        if (out_pix[k].r != er || out_pix[k].g != eg || out_pix[k].b != eb) begin
          failures++;
          $display("FAIL lvl=%0d (%0d,%0d) got %0d,%0d,%0d exp %0d,%0d,%0d", cur_lvl,
                   out_row, out_col + k, out_pix[k].r, out_pix[k].g, out_pix[k].b,
                   er, eg, eb);
        end
        // Saturation of an estimated (not passed-through) colour.
        if (out_row[0] == 0 && k == 0) begin        // R site
          if (eg == 0 || eg == 255 || eb == 0 || eb == 255) n_sat++;
        end else if (out_row[0] == 1 && k == 1) begin // B site
          if (eg == 0 || eg == 255 || er == 0 || er == 255) n_sat++;
        end else begin                              // G site
          if (er == 0 || er == 255 || eb == 0 || eb == 255) n_sat++;
        end
      end
      if (out_row[0]) n_gb++; else n_rg++;
      frame_outs++;
    end
  end

  task automatic run_frame(input int vdd, input int slow, input bit first);
    int lvl;
    lvl = level_of(vdd, slow);
    vdd_level   = vdd_level_e'(vdd);
    slow_corner = slow[0];
    @(posedge clk);
    #1;
    checks++;
    if ({v1, v2} != {1'(lvl >= 1), 1'(lvl == 2)}) begin
      failures++;
      $display("FAIL control vdd=%0d slow=%0d v1=%0b v2=%0b", vdd, slow, v1, v2);
    end
    cur_lvl = lvl;
    n_lvl[lvl]++;
    if (slow != 0 && lvl > vdd) n_demote++;
    if (!first) n_b2b++;
    frame_outs = 0;
    for (int r = 0; r < H; r++) begin
      for (int p = 0; p < W / 2; p++) begin
        if ($urandom % 4 == 0) begin
          n_idle++;
          @(posedge clk);
          #1;
        end
        in_valid = 1'b1;
        in_pair[0] = pix_t'(px(r, 2 * p));
        in_pair[1] = pix_t'(px(r, 2 * p + 1));
        if (r >= 4 && p >= 2) expq.push_back('{r - 2, 2 * (p - 1), cycle});
        @(posedge clk);
        #1 in_valid = 1'b0;
      end
    end
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (frame_outs != PER_FRAME || expq.size() != 0) begin
      failures++;
      $display("FAIL frame vdd=%0d slow=%0d: %0d outputs, exp %0d, %0d pending",
               vdd, slow, frame_outs, PER_FRAME, expq.size());
    end
  endtask

  initial begin
    make_image(W, H, 7);
    // Add saturated samples next to dark ones so gradients overshoot.
    img[5 * W + 6] = 255; img[5 * W + 7] = 0; img[6 * W + 6] = 0;
    rst_n = 1'b0; in_valid = 1'b0; in_pair = '0;
    vdd_level = VDD_NOM; slow_corner = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int vdd = 0; vdd < 3; vdd++)
      for (int slow = 0; slow < 2; slow++)
        run_frame(vdd, slow, vdd == 0 && slow == 0);

    $display("mechanisms: nominal=%0d level1=%0d level2=%0d demote=%0d rg_rows=%0d gb_rows=%0d sat=%0d idle=%0d back_to_back=%0d",
             n_lvl[0], n_lvl[1], n_lvl[2], n_demote, n_rg, n_gb, n_sat, n_idle, n_b2b);
    foreach (n_lvl[k]) begin
      checks++;
      if (n_lvl[k] == 0) failures++;
    end
    checks += 6;
    if (n_demote == 0) failures++;
    if (n_rg == 0) failures++;
    if (n_gb == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_idle == 0) failures++;
    if (n_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
