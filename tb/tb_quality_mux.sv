// tb_quality_mux: exhaustive test of the 3-input output multiplexer over
// all V1/V2 combinations with random data.
module tb_quality_mux;
  import cfa_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  pix_t c1, c2, c3, y;
  logic v1, v2;
  int checks = 0, failures = 0;

  quality_mux dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      pix_t exp_y;
      c1 = pix_t'($urandom); c2 = pix_t'($urandom); c3 = pix_t'($urandom);
      {v1, v2} = 2'(n);
      exp_y = v2 ? c1 : (v1 ? c2 : c3);
      @(posedge clk);
      checks++;
      if (y != exp_y) begin
        failures++;
        $display("FAIL v1=%0b v2=%0b y=%0d exp=%0d", v1, v2, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
