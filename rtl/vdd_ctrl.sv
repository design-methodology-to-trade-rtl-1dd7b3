// vdd_ctrl: derives the two voltage-scaling control signals V1 and V2 of
// the scalable interpolation datapath.
//
// The supply operating point (nominal, level 1 = 0.8 x nominal, level 2 =
// 0.6 x nominal) fixes how much of each adder chain settles in one clock
// period: nominal uses the full filter (V1 = V2 = 0), level 1 sets V1, and
// level 2 sets V2. A process-corner flag from an on-die sensor demotes the
// datapath by one more step, because a slow corner leaves the last adder
// of the current level incomplete: nominal + slow behaves as level 1 and
// level 1 + slow as level 2. Level 2 is the floor: its bilinear-side
// output is the one expected to settle even at a slow corner.
// V1 stays high whenever V2 is high (this design's choice; the output
// mux gives V2 priority anyway). Purely combinational; the caller holds
// both inputs stable while a frame is processed.
// The V1/V2 settings per supply level and the one-step demotion at a slow
// corner follow the published architecture; the encoding is this design's.
module vdd_ctrl
  import cfa_pkg::*;
(
  input  vdd_level_e vdd_level,    // supply operating point
  input  logic       slow_corner,  // process sensor reports a slow corner
  output logic       v1,
  output logic       v2
);

  always_comb begin
    unique case (vdd_level)
      VDD_NOM: begin v1 = slow_corner; v2 = 1'b0;        end
      VDD_1:   begin v1 = 1'b1;        v2 = slow_corner; end
      default: begin v1 = 1'b1;        v2 = 1'b1;        end
    endcase
  end

endmodule
