// window_5x6: 5-row by 6-column sliding window over a Bayer stream that
// arrives as pixel pairs, two pixels per cycle, in raster order.
//
// Four line_buffer instances in cascade provide the same pair column of
// the four previous lines; together with the incoming pair these are the
// five rows of the window. On every enabled cycle the window shifts left
// by one pair (two columns) and the five new pairs enter on the right.
// win[r][c]: r = 0 is the oldest line (the centre row's i-2), r = 4 the
// newest; c = 0 is the leftmost column. The two interpolation centres are
// win[2][2] and win[2][3]; each has two columns on either side, so both
// adjacent pixels are filtered at once, doubling throughput over a 5x5
// window at the cost of one more column of registers. The window is valid
// one cycle after the pair that completes it is presented. Line width is
// IMG_W pixels and must be even; window registers reset to zero.
// The 5x6 window and its two-pixel throughput follow the published
// architecture; the pair-wide input and line-buffer layout are this design's.
module window_5x6
  import cfa_pkg::*;
#(
  parameter int unsigned IMG_W = 768
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,       // a new pair is presented
  input  pix_t [1:0]       pair_in,  // [0] even column, [1] odd column
  output pix_t [4:0][5:0]  win
);

  // tap[4] is the incoming line, tap[0] the line four lines above.
  pix_t [4:0][1:0] tap;

  assign tap[4] = pair_in;

  for (genvar k = 0; k < 4; k++) begin : g_lb
    line_buffer #(.DEPTH(IMG_W / 2), .WIDTH(2 * PIX_W)) u_lb (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .din  (tap[4-k]),
      .dout (tap[3-k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
    end else if (en) begin
      for (int r = 0; r < 5; r++) begin
        for (int c = 0; c < 4; c++) win[r][c] <= win[r][c+2];
        win[r][4] <= tap[r][0];
        win[r][5] <= tap[r][1];
      end
    end
  end

endmodule
