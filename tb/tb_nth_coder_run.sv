// tb_nth_coder_run: drives one nth_coder with random inputs (resetting it
// every STEPS symbols) and compares every output and K flag with a
// behavioural model written from the definitions, not from the circuit:
//   K0_t  = OR over i of K^i_{t-i}   (K^i of times before reset count as 1)
//   c_i   = K0_t AND x_{t-N+i},  q = (c_1 ... c_N) as a binary number
//   y_t   = C_t[q] xor x_{t-N},   C_t = table row of the last M outputs
//   K^i_t = K0_t AND (C_t[r] != C_t[q] for every r that agrees with q in
//           positions 1..i-1 and differs in position i)
// It also counts steps with K0 = 0 and with each K^i = 1.
module tb_nth_coder_run #(
  parameter int unsigned           N      = 3,
  parameter int unsigned           M      = 1,
  parameter logic [(2**(M+N))-1:0] CTABLE = 16'hF0CA,
  parameter int unsigned           STEPS  = 30,
  parameter int unsigned           PHASES = 40
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_k0zero,
  output int   n_k [N]
);
  logic         rst, x, y, k0;
  logic [N-1:0] k;
  logic [M-1:0] a;

  nth_coder #(.N(N), .M(M), .CTABLE(CTABLE)) dut (.clk(clk), .rst(rst), .x(x), .y(y),
    .k0(k0), .k(k), .a(a));

  bit xs [STEPS + 8];
  bit kk [STEPS + 8][N + 1];
  bit ys [STEPS + 8];

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL N=%0d %s", N, w); end
  endtask

  function automatic bit xat(int t);
    return (t < 0) ? 1'b0 : xs[t];
  endfunction

  initial begin
    int ma, q, ek0;
    bit ey, ek, cbit;
    logic [(2**N)-1:0] crow;
    done = 0; checks = 0; failures = 0; n_k0zero = 0;
    for (int i = 0; i < N; i++) n_k[i] = 0;
    rst = 1; x = 0;
    for (int ph = 0; ph < PHASES; ph++) begin
      rst = 1;
      repeat (2) @(negedge clk);
      for (int t = 0; t < STEPS; t++) begin
        if (t == 0) rst = 0; else @(negedge clk);
        x = 1'($urandom);
        if (ph % 4 == 3) x = ((t / 5) % 2) != 0;
        xs[t] = x;
        // model
        ek0 = 0;
        for (int i = 1; i <= N; i++) if (t - i < 0 || kk[t-i][i]) ek0 = 1;
        ma = 0;
        for (int j = 1; j <= M; j++) if (t - j >= 0 && ys[t-j]) ma += 1 << (j - 1);
        crow = CTABLE[ma * (2**N) +: (2**N)];
        q = 0;
        for (int i = 1; i <= N; i++) if (ek0 != 0 && xat(t - N + i)) q += 1 << (N - i);
        ey = crow[q] ^ xat(t - N);
        ys[t] = ey;
        for (int i = 1; i <= N; i++) begin
          ek = (ek0 != 0);
          for (int r = 0; r < 2**N; r++)
            if ((((r ^ q) >> (N - i + 1)) == 0) && (((r ^ q) >> (N - i)) & 1) == 1)
              if (crow[r] == crow[q]) ek = 0;
          kk[t][i] = ek;
        end
        #1;
        chk(k0 == (ek0 != 0), "K0");
        chk(y == ey, "output y");
        chk(a == M'(ma), "output-section state");
        for (int i = 1; i <= N; i++) begin
          cbit = k[i-1];
          chk(cbit == kk[t][i], "K^i");
          if (cbit) n_k[i-1]++;
        end
        if (!k0) n_k0zero++;
      end
    end
    done = 1;
  end
endmodule
