// tb_class2_coder: checks class2_coder against the Class II example's flow
// table (s1..s4 = 0..3), typed here:
//   s1: x=0 -> S2,0  x=1 -> S3,1     s2: x=0 -> S1,0  x=1 -> S3,0
//   s3: x=0 -> S4,1  x=1 -> S1,1     s4: x=0 -> S2,1  x=1 -> S4,0
// It also checks the Class II property: every state is entered by exactly
// two transitions, with different outputs (checked on the table, and on the
// transitions the coder actually made).
module tb_class2_coder;
  import lossless_pkg::*;
  logic clk = 0, rst, x, y;
  state4_e s;
  int checks = 0, failures = 0;
  localparam int NS [4][2] = '{'{1, 2}, '{0, 2}, '{3, 0}, '{1, 3}};
  localparam bit Y  [4][2] = '{'{0, 1}, '{0, 0}, '{1, 1}, '{1, 0}};
  int ms;
  int into [4];
  bit seen [4][2];

  class2_coder dut (.clk(clk), .rst(rst), .x(x), .y(y), .s(s));
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin into[i] = 0; seen[i] = '{0, 0}; end
    for (int st = 0; st < 4; st++) for (int b = 0; b < 2; b++) begin
      into[NS[st][b]]++;
      chk(!seen[NS[st][b]][Y[st][b]], "two entries of a state share an output");
      seen[NS[st][b]][Y[st][b]] = 1;
    end
    for (int i = 0; i < 4; i++) chk(into[i] == 2, "two transitions into each state");
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
