// tb_class1_inverse: a behavioural model of the Class I example coder (its
// flow table, typed here) produces outputs from random inputs; class1_inverse,
// started in the same state, must return each input in the same cycle.
module tb_class1_inverse;
  import lossless_pkg::*;
  logic clk = 0, rst, x, y;
  state4_e s;
  int checks = 0, failures = 0;
  localparam int NS [4][2] = '{'{2, 3}, '{3, 0}, '{3, 1}, '{2, 1}};
  localparam bit Y  [4][2] = '{'{1, 0}, '{0, 1}, '{1, 0}, '{0, 1}};
  int ms;
  bit xin;

  class1_inverse dut (.clk(clk), .rst(rst), .y(y), .x(x), .s(s));
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; y = 0; ms = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int t = 0; t < 300; t++) begin
      xin = 1'($urandom);
      y = Y[ms][xin];
      #1;
      chk(x == xin, "recovered input");
      chk(int'(s) == ms, "state tracks coder");
      ms = NS[ms][xin];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
