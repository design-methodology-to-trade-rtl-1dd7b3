// tb_window_5x6: streams a random 12-pixel-wide image as pixel pairs with
// random idle cycles and, after every pair that completes a window, checks
// all 30 window samples against the image (rows r-4..r, columns 2p-4..2p+1).
module tb_window_5x6;
  import cfa_pkg::*;

  localparam int W = 12, H = 9;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic            rst_n, en;
  pix_t [1:0]      pair_in;
  pix_t [4:0][5:0] win;
  int img [H][W];
  int checks = 0, failures = 0;

  window_5x6 #(.IMG_W(W)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img[r][c] = $urandom % 256;
    rst_n = 1'b0; en = 1'b0; pair_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < H; r++) begin
      for (int p = 0; p < W / 2; p++) begin
        while ($urandom % 3 == 0) @(posedge clk);  // idle cycles
        #1;
        en = 1'b1;
        pair_in[0] = pix_t'(img[r][2*p]);
        pair_in[1] = pix_t'(img[r][2*p+1]);
        @(posedge clk);
        #1 en = 1'b0;
        if (r >= 4 && p >= 2) begin
          for (int wr = 0; wr < 5; wr++) begin
            for (int wc = 0; wc < 6; wc++) begin
              checks++;
              if (win[wr][wc] != img[r-4+wr][2*p-4+wc]) begin
                failures++;
                $display("FAIL r=%0d p=%0d win[%0d][%0d]=%0d exp=%0d", r, p, wr, wc,
                         win[wr][wc], img[r-4+wr][2*p-4+wc]);
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
