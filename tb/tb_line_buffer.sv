// tb_line_buffer: a small line buffer is written with random data under a
// random enable; every enabled read must return the word written exactly
// DEPTH enabled cycles earlier, and idle cycles must not advance it.
module tb_line_buffer;
  localparam int unsigned DEPTH = 7;
  localparam int unsigned WIDTH = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n, en;
  logic [WIDTH-1:0] din, dout;
  logic [WIDTH-1:0] hist [$];
  int checks = 0, failures = 0;

  line_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      en  = ($urandom % 4) != 0;
      din = WIDTH'($urandom);
      #1;
      if (en) begin
        if (hist.size() == DEPTH) begin
          checks++;
          if (dout != hist[0]) begin
            failures++;
            $display("FAIL n=%0d dout=%h exp=%h", n, dout, hist[0]);
          end
          void'(hist.pop_front());
        end
        hist.push_back(din);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
