// tb_lossy_two_state: checks the two-state machine against its flow table
//   s1: x=0 -> s1,0  x=1 -> s2,0     s2: x=0 -> s2,0  x=1 -> s1,1
// for random inputs, and reproduces the information-loss example: from s1
// the inputs 0,1 and 1,0 both give outputs 0,0 and both end in s2.
module tb_lossy_two_state;
  logic clk = 0, rst, x, y, s;
  int checks = 0, failures = 0;
  logic ms;  // model state: 0 = s1, 1 = s2
  logic ey;
  logic [1:0] yseq [2];
  logic       send [2];

  lossy_two_state dut (.clk(clk), .rst(rst), .x(x), .y(y), .s(s));
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; x = 0; ms = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int t = 0; t < 200; t++) begin
      x = 1'($urandom);
      #1;
      ey = (ms == 1'b1) && x;
      chk(y == ey, "output");
      chk(s == ms, "state");
      ms = (ms == 1'b0) ? x : ~x;
      @(negedge clk);
    end
    // loss example: two different input pairs from s1
    for (int p = 0; p < 2; p++) begin
      rst = 1; @(negedge clk); rst = 0;
      x = (p == 1); #1; yseq[p][1] = y; @(negedge clk);
      x = (p == 0); #1; yseq[p][0] = y; @(negedge clk);
      send[p] = s;
    end
    chk(yseq[0] == 2'b00 && yseq[1] == 2'b00, "both pairs give 0,0");
    chk(send[0] == 1'b1 && send[1] == 1'b1, "both pairs end in s2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
