// tb_lossless_comb3_inv: checks lossless_comb3_inv against the published
// forward table of combinations read backwards: for every row (x -> y) the
// inverse must return x from y.
module tb_lossless_comb3_inv;
  logic [2:0] x, y;
  int checks = 0, failures = 0;
  localparam logic [2:0] FWD [8] = '{3'b111, 3'b001, 3'b100, 3'b011,
                                     3'b000, 3'b010, 3'b110, 3'b101};

  lossless_comb3_inv dut (.y(y), .x(x));

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      y = FWD[i];
      #1;
      checks++;
      if (x !== 3'(i)) begin failures++; $display("FAIL y=%b x=%b exp=%b", y, x, 3'(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
