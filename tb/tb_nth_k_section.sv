// tb_nth_k_section: drives random F vectors into the K-section (N = 3) and
// checks, every symbol:
//   K^i_t = K0_t AND (F^0 != F^r for every lead r whose first 1 is at i)
//   K0_t  = K^1_{t-1} OR K^2_{t-2} OR K^3_{t-3}  (times before reset count as 1)
// The F vectors are biased so that every K^i is sometimes 1 and K0 is
// sometimes 0; both are required.
module tb_nth_k_section;
  logic clk = 0, rst;
  logic [7:0] f;
  logic [2:0] k;
  logic k0;
  int checks = 0, failures = 0;
  bit [3:0] kh [200];
  int nzero;
  bit done = 0;
  int nk [3];

  nth_k_section dut (.clk(clk), .rst(rst), .f(f), .k(k), .k0(k0));
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit ek0, ek;
    nzero = 0; nk = '{0, 0, 0};
    rst = 1; f = '0;
    for (int ph = 0; ph < 5; ph++) begin
      rst = 1;
      repeat (2) @(negedge clk);
      for (int t = 0; t < 40; t++) begin
        if (t == 0) rst = 0; else @(negedge clk);
        case ($urandom_range(6))
          0: f = 8'hF0 ^ {8{1'($urandom)}};     // K^1 pattern
          1: f = 8'h0C ^ {8{1'($urandom)}};     // K^2 pattern
          2: f = 8'h02 ^ {8{1'($urandom)}};     // K^3 pattern
          3: f = 8'($urandom);
          default: f = {8{1'($urandom)}};       // no K^i at all
        endcase
        ek0 = 0;
        for (int i = 1; i <= 3; i++) if (t - i < 0 || kh[t-i][i]) ek0 = 1;
        for (int i = 1; i <= 3; i++) begin
          ek = ek0;
          for (int r = (1 << (3 - i)); r < (2 << (3 - i)); r++) if (f[r] == f[0]) ek = 0;
          kh[t][i] = ek;
        end
        #1;
        chk(k0 == ek0, "K0");
        for (int i = 1; i <= 3; i++) begin
          chk(k[i-1] == kh[t][i], "K^i");
          if (k[i-1]) nk[i-1]++;
        end
        if (!k0) nzero++;
      end
    end
    done = 1;
  end

  // summary in its own process, after the stimulus loop has finished
  initial begin
    wait (done);
    chk(nzero > 0, "K0 = 0 seen");
    for (int i = 0; i < 3; i++) chk(nk[i] > 0, "every K^i seen");
    $display("K0=0: %0d, K^1..3: %0d %0d %0d", nzero, nk[0], nk[1], nk[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
