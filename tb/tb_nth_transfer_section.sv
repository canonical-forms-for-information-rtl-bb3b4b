// tb_nth_transfer_section: exhaustive check of the transfer section for N = 3
// (all 256 C vectors x 8 control words) and a random check for N = 4. The
// expected lead contents come from what each lead means:
//   F^0 = C[c]; a lead r whose first 1 is at position i carries C[q] with
//   q = (c_1 .. c_{i-1}, NOT c_i, r_{i+1} .. r_N).
module tb_nth_transfer_section;
  int checks = 0, failures = 0;
  logic [7:0]  c3, f3;
  logic [2:0]  k3;
  logic [15:0] c4, f4;
  logic [3:0]  k4;

  nth_transfer_section               dut3 (.c(c3), .ctrl(k3), .f(f3));
  nth_transfer_section #(.N(4))      dut4 (.c(c4), .ctrl(k4), .f(f4));

  function automatic int expect_idx(int n, int ctrl, int r);
    int i, q;
    if (r == 0) return ctrl;
    i = 1;
    while (((r >> (n - i)) & 1) == 0) i++;
    q = (ctrl >> (n - i + 1)) << (n - i + 1);            // c_1..c_{i-1}
    q |= ((((ctrl >> (n - i)) & 1) ^ 1) << (n - i));     // NOT c_i
    q |= r & ((1 << (n - i)) - 1);                       // r_{i+1}..r_N
    return q;
  endfunction

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int cv = 0; cv < 256; cv++) for (int kv = 0; kv < 8; kv++) begin
      c3 = 8'(cv); k3 = 3'(kv);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (f3[r] !== c3[expect_idx(3, kv, r)]) begin
          failures++;
          if (failures < 10) $display("FAIL N=3 c=%h ctrl=%b lead %0d", c3, k3, r);
        end
      end
    end
    for (int e = 0; e < 500; e++) begin
      c4 = 16'($urandom); k4 = 4'($urandom);
      #1;
      for (int r = 0; r < 16; r++) begin
        checks++;
        if (f4[r] !== c4[expect_idx(4, int'(k4), r)]) begin
          failures++;
          if (failures < 10) $display("FAIL N=4 c=%h ctrl=%b lead %0d", c4, k4, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
