// tb_nth_decoder: self-checking test of nth_decoder, run in cascade with
// nth_coder for several orders N, output-section sizes M and C tables. The
// reference is the coder's own input delayed by N symbols, which does not
// depend on how the decoder works. Every decoding path (each K^m and the
// plain K0 = 0 path) must have decided at least one bit over all pairs, and
// the N = 3 default pair must show both K0 values. A further eight N = 3,
// M = 2 pairs use arbitrary C tables (fixed constants with no structure) to
// show that decoding does not depend on a well-chosen table.
module tb_nth_decoder;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [4:0] done;
  int ck [5], fl [5], pl [5];
  int p0 [3], p1 [3], p2 [2], p3 [4], p4 [3];

  localparam int NX = 8;
  localparam logic [31:0] XTAB [NX] = '{32'h1D2C_9E47, 32'hB5A0_3F6E, 32'h7C19_E2D4, 32'h0F5B_A863,
                                         32'hE93A_5C17, 32'h4476_0BF9, 32'hA1C8_D25E, 32'h6B0F_7394};
  logic [NX-1:0] xdone;
  int xck [NX], xfl [NX], xpl [NX];
  int xp [NX][3];
  for (genvar g = 0; g < NX; g++) begin : g_extra
    tb_nth_pair #(.N(3), .M(2), .CTABLE(XTAB[g])) u (.clk(clk), .done(xdone[g]), .checks(xck[g]),
      .failures(xfl[g]), .n_plain(xpl[g]), .n_path(xp[g]));
  end

  tb_nth_pair #(.N(3), .M(1), .CTABLE(16'hF0CA))          u0 (.clk(clk), .done(done[0]), .checks(ck[0]), .failures(fl[0]), .n_plain(pl[0]), .n_path(p0));
  tb_nth_pair #(.N(3), .M(2), .CTABLE(32'h5AC3_96F0))     u1 (.clk(clk), .done(done[1]), .checks(ck[1]), .failures(fl[1]), .n_plain(pl[1]), .n_path(p1));
  tb_nth_pair #(.N(2), .M(2), .CTABLE(16'h9C63))          u2 (.clk(clk), .done(done[2]), .checks(ck[2]), .failures(fl[2]), .n_plain(pl[2]), .n_path(p2));
  tb_nth_pair #(.N(4), .M(2), .CTABLE(64'hFF00_F0F0_CCCC_7D28)) u3 (.clk(clk), .done(done[3]), .checks(ck[3]), .failures(fl[3]), .n_plain(pl[3]), .n_path(p3));
  tb_nth_pair #(.N(3), .M(1), .CTABLE(16'hF0E8))          u4 (.clk(clk), .done(done[4]), .checks(ck[4]), .failures(fl[4]), .n_plain(pl[4]), .n_path(p4));

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done && &xdone);
    for (int i = 0; i < 5; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    for (int i = 0; i < NX; i++) begin
      checks += xck[i];
      failures += xfl[i];
    end
    $display("plain-path decisions per pair: %0d %0d %0d %0d %0d", pl[0], pl[1], pl[2], pl[3], pl[4]);
    $display("N=3 default pair: K^1 %0d  K^2 %0d  K^3 %0d", p0[0], p0[1], p0[2]);
    $display("N=4 pair: K^1 %0d K^2 %0d K^3 %0d K^4 %0d", p3[0], p3[1], p3[2], p3[3]);
    checks++; if (pl[0] + pl[1] + pl[2] + pl[3] + pl[4] == 0) begin failures++; $display("FAIL: plain path never used"); end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (p0[m] + p1[m] + p4[m] == 0) begin failures++; $display("FAIL: N=3 path K^%0d never used", m + 1); end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (p3[m] == 0) begin failures++; $display("FAIL: N=4 path K^%0d never used", m + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
