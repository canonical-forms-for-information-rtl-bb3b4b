// tb_gen_coder: checks gen_coder against the five-state example's original
// flow table (states s1..s5), typed here:
//   s1: x=0 -> S1,1  x=1 -> S3,1     s2: x=0 -> S5,0  x=1 -> S2,1
//   s3: x=0 -> S4,0  x=1 -> S1,0     s4: x=0 -> S3,0  x=1 -> S2,0
//   s5: x=0 -> S2,1  x=1 -> S1,0
// The coder's symbol pair (a, b) must name the model's state through
//   (a1,b1)=s4 (a1,b2)=s1 (a1,b3)=s5 (a2,b1)=s1 (a2,b2)=s3 (a2,b3)=s2
// at every step, and its output must match the table.
module tb_gen_coder;
  import lossless_pkg::*;
  logic clk = 0, rst, x, y;
  asym_e a;
  bsym_e b;
  int checks = 0, failures = 0;
  localparam int NS [1:5][2] = '{'{1, 3}, '{5, 2}, '{4, 1}, '{3, 2}, '{2, 1}};
  localparam bit Y  [1:5][2] = '{'{1, 1}, '{0, 1}, '{0, 0}, '{0, 0}, '{1, 0}};
  localparam int AB2S [2][3] = '{'{4, 1, 5}, '{1, 3, 2}};
  int ms;
  int hits [2];

  gen_coder dut (.clk(clk), .rst(rst), .x(x), .y(y), .a(a), .b(b));
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hits = '{0, 0};
    rst = 1; x = 0; ms = 1;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int t = 0; t < 400; t++) begin
      x = 1'($urandom);
      #1;
      chk(int'(b) < 3, "b is a real symbol");
      if (int'(b) < 3) chk(AB2S[int'(a)][int'(b)] == ms, "(a,b) names the model state");
      chk(y == Y[ms][x], "output");
      hits[int'(a)]++;
      ms = NS[ms][x];
      @(negedge clk);
    end
    chk(hits[0] > 0 && hits[1] > 0, "both a-symbols used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
