// tb_nth_output_section: checks the output section at its default size and
// with a two-bit state: the state must be the last M enabled output symbols
// (newest in bit 0, starting from A_INIT = 0), and the C-signals the table
// row it selects. Random y and enable.
module tb_nth_output_section;
  logic clk = 0, rst, en, y;
  logic       a1;
  logic [1:0] a2;
  logic [7:0] c1, c2;
  int checks = 0, failures = 0;
  localparam logic [31:0] T2 = 32'h5AC3_96F0;

  nth_output_section                                  dut1 (.clk(clk), .rst(rst), .en(en), .y(y), .a(a1), .c(c1));
  nth_output_section #(.N(3), .M(2), .CTABLE(T2))     dut2 (.clk(clk), .rst(rst), .en(en), .y(y), .a(a2), .c(c2));
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [1:0] past;
    logic [15:0] t1;
    t1 = 16'hF0CA;
    rst = 1; en = 0; y = 0; past = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int t = 0; t < 300; t++) begin
      en = ($urandom_range(3) != 0);
      y  = 1'($urandom);
      #1;
      chk(a1 == past[0], "M=1 state");
      chk(a2 == past, "M=2 state");
      chk(c1 == t1[past[0]*8 +: 8], "M=1 C-signals");
      chk(c2 == T2[past*8 +: 8], "M=2 C-signals");
      if (en) past = {past[0], y};
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
