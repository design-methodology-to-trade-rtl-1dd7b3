// cfa_interp_top: streaming, voltage-scalable Bayer colour interpolation.
//
// A raw RGGB image enters as pixel pairs (two horizontally adjacent
// samples per cycle, raster order, in_valid qualifies each pair; no
// back-pressure). window_5x6 keeps the 5x6 neighbourhood, pair_datapath
// estimates the two missing colours of both centre pixels, and vdd_ctrl
// turns the supply operating point and the process-corner flag into V1/V2,
// which choose how much gradient correction is used: full filter at
// nominal supply, a shortened filter at level 1, (nearly) bilinear at
// level 2. The arithmetic is identical at every level; only the output
// multiplexers change, so a lower supply or a slow corner degrades image
// quality gracefully instead of producing timing errors.
//
// Timing: the pair presented with in_valid at clock edge k completes a
// window at edge k; the two RGB pixels of that window's centre appear on
// out_pix with out_valid after edge k+1 (latency 2 cycles from
// presentation). Throughput is one pair, i.e. two output pixels, per
// input cycle. The centre pair lags the newest input by two lines and
// one pair. Pixels within two rows or columns of the image border are not
// produced (this design's choice: border handling is left open), so each
// frame yields (IMG_H-4) rows of (IMG_W/2-2) pairs; out_row/out_col give
// the image coordinates of out_pix[0] (out_col is always even). Row and pair counters wrap at the
// end of a frame, so frames may follow back to back. IMG_W must be even.
// The datapath and control follow the published architecture; the stream
// interface, counters, registers and border policy are this design's.
module cfa_interp_top
  import cfa_pkg::*;
#(
  parameter int unsigned IMG_W = 768,   // image width in pixels
  parameter int unsigned IMG_H = 512    // image height in pixels
) (
  input  logic        clk,
  input  logic        rst_n,
  input  vdd_level_e  vdd_level,    // supply operating point
  input  logic        slow_corner,  // process sensor: slow corner detected
  input  logic        in_valid,
  input  pix_t [1:0]  in_pair,      // [0] even column, [1] odd column
  output logic        out_valid,
  output rgb_t [1:0]  out_pix,      // [0] column out_col, [1] out_col+1
  output logic [15:0] out_row,
  output logic [15:0] out_col,
  output logic        v1,           // control signals in use (observability)
  output logic        v2
);

  localparam int unsigned NPAIR = IMG_W / 2;

  logic [15:0]     in_row, in_pair_idx;
  pix_t [4:0][5:0] win;
  logic            win_valid;
  logic [15:0]     win_row, win_col;
  rgb_t [1:0]      dp_pix;

  // Input position counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_row      <= '0;
      in_pair_idx <= '0;
    end else if (in_valid) begin
      if (in_pair_idx == 16'(NPAIR - 1)) begin
        in_pair_idx <= '0;
        in_row      <= (in_row == 16'(IMG_H - 1)) ? '0 : in_row + 1'b1;
      end else begin
        in_pair_idx <= in_pair_idx + 1'b1;
      end
    end
  end

  window_5x6 #(.IMG_W(IMG_W)) u_win (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .pair_in(in_pair), .win(win)
  );

  // Window is valid once it holds five lines and three pairs of one line.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      win_row   <= '0;
      win_col   <= '0;
    end else begin
      win_valid <= in_valid && (in_row >= 16'd4) && (in_pair_idx >= 16'd2);
      if (in_valid) begin
        win_row <= in_row - 16'd2;
        win_col <= 16'((in_pair_idx - 16'd1) << 1);
      end
    end
  end

  vdd_ctrl u_ctrl (
    .vdd_level(vdd_level), .slow_corner(slow_corner), .v1(v1), .v2(v2)
  );

  pair_datapath u_dp (
    .win(win), .gb_row(win_row[0]), .v1(v1), .v2(v2), .pix_out(dp_pix)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      out_valid <= win_valid;
      if (win_valid) begin
        out_pix <= dp_pix;
        out_row <= win_row;
        out_col <= win_col;
      end
    end
  end

endmodule
