// tb_nth_pair: test harness for one N-th order coder/decoder pair with a
// given output-section table. It drives random inputs (with runs of
// constant input mixed in), resets the pair every STEPS symbols, PHASES times, and checks that
//  * the decoder's output equals the coder input of N symbols earlier,
//  * x_valid is low for exactly the first N symbols after each reset,
//  * the decoder's K0 equals the coder's K0 at every valid step.
// It counts how often each decoding path decided a bit (K^m = 1 for each m,
// and the plain path K0 = 0) so the caller can require that each happened.
module tb_nth_pair #(
  parameter int unsigned           N      = 3,
  parameter int unsigned           M      = 1,
  parameter logic [(2**(M+N))-1:0] CTABLE = 16'hF0CA,
  parameter int unsigned           STEPS  = 24,
  parameter int unsigned           PHASES = 60
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_plain,
  output int   n_path [N]
);
  logic         rst, x, y, k0c, k0d, xd, xv;
  logic [N-1:0] kc, kd;
  logic [M-1:0] a;
  logic [N-1:0] hist;  // hist[0] = x_{t-1}
  int           since_reset;

  nth_coder #(.N(N), .M(M), .CTABLE(CTABLE)) dut_c (.clk(clk), .rst(rst), .x(x), .y(y),
    .k0(k0c), .k(kc), .a(a));
  nth_decoder #(.N(N), .M(M), .CTABLE(CTABLE)) dut_d (.clk(clk), .rst(rst), .y(y), .x(xd),
    .x_valid(xv), .k0(k0d), .k(kd));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d M=%0d table=%h t=%0d: %s", N, M, CTABLE, since_reset, what);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_plain = 0;
    for (int i = 0; i < N; i++) n_path[i] = 0;
    x = 0; rst = 1; hist = '0; since_reset = 0;
    for (int phase = 0; phase < PHASES; phase++) begin
      rst = 1;
      repeat (2) @(negedge clk);
      hist = '0; since_reset = 0;
      for (int t = 0; t < STEPS; t++) begin
        if (t == 0) rst = 0;
        else        @(negedge clk);
        // constant runs in some phases, random bits otherwise
        if (phase % 3 == 2 && (t / 8) % 2 == 1) x = ((t / 16) % 2) != 0;
        else                                 x = 1'($urandom);
        #1;
        check(xv == (since_reset >= N), "x_valid timing");
        if (xv) begin
          check(xd == hist[N-1], "decoded bit");
          check(k0d == k0c, "decoder K0 matches coder K0");
          if (!k0d) n_plain++;
          for (int m = 0; m < N; m++) if (kd[m]) n_path[m]++;
        end
        hist = {hist[N-2:0], x};
        since_reset++;
      end
    end
    done = 1;
  end
endmodule
