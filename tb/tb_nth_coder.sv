// tb_nth_coder: checks nth_coder at its default size (N = 3, one-bit output
// section) and at N = 4 with a two-bit output section, against a behavioural
// model of the definitions (tb_nth_coder_run). Both K0 values and every K^i
// must occur.
module tb_nth_coder;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] done;
  int ck [2], fl [2], z [2];
  int k3 [3], k4 [4];

  tb_nth_coder_run u3 (.clk(clk), .done(done[0]), .checks(ck[0]), .failures(fl[0]),
    .n_k0zero(z[0]), .n_k(k3));
  tb_nth_coder_run #(.N(4), .M(2), .CTABLE(64'hFF00_F0F0_CCCC_7D28)) u4 (.clk(clk),
    .done(done[1]), .checks(ck[1]), .failures(fl[1]), .n_k0zero(z[1]), .n_k(k4));

  initial begin
    #200000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wait (&done);
    checks = ck[0] + ck[1];
    failures = fl[0] + fl[1];
    $display("N=3: K0=0 steps %0d, K^1..3 = %0d %0d %0d", z[0], k3[0], k3[1], k3[2]);
    $display("N=4: K0=0 steps %0d, K^1..4 = %0d %0d %0d %0d", z[1], k4[0], k4[1], k4[2], k4[3]);
    checks++; if (z[0] == 0 || z[1] == 0) begin failures++; $display("FAIL: K0=0 never seen"); end
    for (int i = 0; i < 3; i++) begin checks++; if (k3[i] == 0) begin failures++; $display("FAIL: N=3 K^%0d never 1", i + 1); end end
    for (int i = 0; i < 4; i++) begin checks++; if (k4[i] == 0) begin failures++; $display("FAIL: N=4 K^%0d never 1", i + 1); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
