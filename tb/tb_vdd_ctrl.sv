// tb_vdd_ctrl: checks the V1/V2 control table for every supply level with
// and without the slow-corner flag.
module tb_vdd_ctrl;
  import cfa_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  vdd_level_e vdd_level;
  logic       slow_corner, v1, v2;
  int checks = 0, failures = 0;

  vdd_ctrl dut (.*);

  // Expected {V1,V2} per (level, slow): nominal 00/10, level1 10/11, level2 11/11.
  localparam logic [1:0] EXP [3][2] = '{'{2'b00, 2'b10}, '{2'b10, 2'b11}, '{2'b11, 2'b11}};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 3; l++) begin
      for (int s = 0; s < 2; s++) begin
        vdd_level   = vdd_level_e'(l);
        slow_corner = s[0];
        @(posedge clk);
        checks++;
        if ({v1, v2} != EXP[l][s]) begin
          failures++;
          $display("FAIL level=%0d slow=%0d v1v2=%b exp=%b", l, s, {v1, v2}, EXP[l][s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
