// quality_mux: the 3-input output multiplexer "M" that follows every
// estimate in the voltage-scalable architecture.
//
// Each estimate is produced at three points of the adder chain: c1 holds
// the bilinear part (plus, for the G-pixel filters, a small gradient), c2
// adds the gradient terms that still settle at scaled level 1, and c3 is
// the full filter used at nominal supply. The two voltage-scaling control
// signals choose among them: V2 = 1 selects c1, otherwise V1 = 1 selects
// c2, and V1 = V2 = 0 (nominal) selects c3. V2 takes priority, so the
// mux is correct whether or not V1 is held high together with V2 (the
// priority is this design's choice). Purely combinational; 8 bits wide.
// The three-tap selection by V1/V2 follows the published architecture.
module quality_mux
  import cfa_pkg::*;
(
  input  pix_t c1,    // top input: bilinear (+ small gradient)
  input  pix_t c2,    // middle input: reduced gradient
  input  pix_t c3,    // bottom input: full gradient correction
  input  logic v1,    // scaled level 1 / slow-corner control
  input  logic v2,    // scaled level 2 control
  output pix_t y
);

  always_comb begin
    if (v2)      y = c1;
    else if (v1) y = c2;
    else         y = c3;
  end

endmodule
