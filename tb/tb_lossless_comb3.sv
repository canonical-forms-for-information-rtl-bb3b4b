// tb_lossless_comb3: checks lossless_comb3 against its full truth table,
// entered here row by row from the published table of combinations, and
// checks that the eight outputs are all different (the map is lossless).
module tb_lossless_comb3;
  logic [2:0] x, y;
  int checks = 0, failures = 0;
  // expected y1y2y3 for x1x2x3 = 000 .. 111
  localparam logic [2:0] EXP [8] = '{3'b111, 3'b001, 3'b100, 3'b011,
                                     3'b000, 3'b010, 3'b110, 3'b101};
  logic [7:0] seen;

  lossless_comb3 dut (.x(x), .y(y));

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      x = 3'(i);
      #1;
      checks++;
      if (y !== EXP[i]) begin failures++; $display("FAIL x=%b y=%b exp=%b", x, y, EXP[i]); end
      seen[y] = 1'b1;
    end
    checks++;
    if (seen != 8'hFF) begin failures++; $display("FAIL: outputs not a permutation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
