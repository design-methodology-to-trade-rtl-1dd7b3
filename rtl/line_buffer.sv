// line_buffer: one image line of delay for the sliding filter window.
//
// A circular memory of DEPTH words. Each cycle with en = 1 the word
// written DEPTH enables earlier appears on dout (read combinationally
// before the write) and din is written in its place, so dout is the
// sample of the same column one image line above. With DEPTH equal to
// the number of pixel pairs in a line, chaining four of these yields the
// five rows of a 5-row window. The memory is not reset: its first line of
// output is stale and the window logic ignores it. Reset only clears the
// address pointer.
// The published architecture does not describe its line storage; this
// circular buffer is this design's.
module line_buffer #(
  parameter int unsigned DEPTH = 384,  // words per line (768 pixels / 2)
  parameter int unsigned WIDTH = 16    // word width (two 8-bit pixels)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ptr <= '0;
    else if (en) begin
      if (ptr == AW'(DEPTH - 1))      ptr <= '0;
      else                            ptr <= ptr + 1'b1;
    end
  end

endmodule
