// tb_class1_coder: checks class1_coder against the example's flow table
// (state s1..s4 = 0..3), typed here independently of the canonical form:
//   s1: x=0 -> S3,1  x=1 -> S4,0     s2: x=0 -> S4,0  x=1 -> S1,1
//   s3: x=0 -> S4,1  x=1 -> S2,0     s4: x=0 -> S3,0  x=1 -> S2,1
// and checks the Class I property that the two inputs of every state give
// different outputs.
module tb_class1_coder;
  import lossless_pkg::*;
  logic clk = 0, rst, x, y;
  state4_e s;
  int checks = 0, failures = 0;
  localparam int NS [4][2] = '{'{2, 3}, '{3, 0}, '{3, 1}, '{2, 1}};
  localparam bit Y  [4][2] = '{'{1, 0}, '{0, 1}, '{1, 0}, '{0, 1}};
  int ms;

  class1_coder dut (.clk(clk), .rst(rst), .x(x), .y(y), .s(s));
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; x = 0; ms = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int t = 0; t < 300; t++) begin
      x = 1'($urandom);
      #1;
      chk(int'(s) == ms, "state");
      chk(y == Y[ms][x], "output");
      ms = NS[ms][x];
      @(negedge clk);
    end
    for (int st = 0; st < 4; st++) chk(Y[st][0] != Y[st][1], "Class I property of the table");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
