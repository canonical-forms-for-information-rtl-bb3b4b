// tb_nth_decision: checks the three decision subcircuits of a third-order
// decoder (MI = 1, 2, 3), each against a reference written from the meaning
// of a decision rather than from the routing of the RTL. For random C-signals
// and random steering inputs r1..r3, the coder's output of that step is
// formed as y = C^(r1 r2 r3) xor x_old. Then, with the steering inputs older
// than position MI given as decided:
//  * the reference lists every assignment of the undecided positions, and
//    x_hat must be 1 exactly when no assignment with r_MI = 0 reproduces y,
//    and k exactly when one value of r_MI can be ruled out;
//  * soundness: x_hat = 1 only if r_MI really is 1, and when k = 1 the
//    decision x_hat equals r_MI;
//  * with k0_then = 0 both outputs must be 0.
// Random (c, y) pairs that no coder step produced are applied as well.
module tb_nth_decision;
  localparam int N = 3;
  int checks = 0, failures = 0;
  int n_decided = 0, n_one = 0;

  logic [7:0] c;
  logic [N-1:0] ctrl [N+1];
  logic y, x_old, k0_then;
  logic [N:1] x_hat, k;

  for (genvar mi = 1; mi <= N; mi++) begin : g_dut
    nth_decision #(.N(N), .MI(mi)) dut (.c(c), .ctrl(ctrl[mi]), .y(y), .x_old(x_old),
      .k0_then(k0_then), .x_hat(x_hat[mi]), .k(k[mi]));
  end

  task automatic chk(input bit cnd, input string w);
    checks++; if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  // C index of a steering assignment: r1 is the most significant bit
  function automatic int idx(input bit r [1:N]);
    int v = 0;
    for (int l = 1; l <= N; l++) v = v * 2 + int'(r[l]);
    return v;
  endfunction

  // can steering assignments agreeing with r on positions < mi and having
  // r_mi = val reproduce output yv?
  function automatic bit possible(input logic [7:0] cv, input bit r [1:N], input int mi,
                                  input bit val, input bit yv, input bit xo);
    bit q [1:N];
    bit found = 0;
    for (int u = 0; u < (1 << N); u++) begin
      for (int l = 1; l <= N; l++) q[l] = u[N-l];
      if (q[mi] != val) continue;
      begin
        bit agree = 1;
        for (int l = 1; l < mi; l++) if (q[l] != r[l]) agree = 0;
        if (agree && ((cv[idx(q)] ^ xo) == yv)) found = 1;
      end
    end
    return found;
  endfunction

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit r [1:N];
    for (int e = 0; e < 3000; e++) begin
      c = 8'($urandom);
      for (int l = 1; l <= N; l++) r[l] = 1'($urandom);
      x_old = 1'($urandom);
      k0_then = (e % 8 != 7);
      // a real coder step, or (every fifth trial) an arbitrary output
      y = (e % 5 == 4) ? 1'($urandom) : c[idx(r)] ^ x_old;
      for (int mi = 1; mi <= N; mi++) begin
        ctrl[mi] = '0;
        for (int l = 1; l < mi; l++) ctrl[mi][N-l] = r[l];
      end
      #1;
      for (int mi = 1; mi <= N; mi++) begin
        bit p0, p1;
        p0 = possible(c, r, mi, 1'b0, y, x_old);
        p1 = possible(c, r, mi, 1'b1, y, x_old);
        if (!k0_then) begin
          chk(x_hat[mi] == 0 && k[mi] == 0, "outputs gated when K0 of that step is 0");
        end else begin
          chk(x_hat[mi] == !p0, "x_hat: no r_MI = 0 assignment fits");
          chk(k[mi] == (!p0 || !p1), "k: one value of r_MI ruled out");
          if (e % 5 != 4) begin
            if (x_hat[mi]) chk(r[mi] == 1, "x_hat sound");
            if (k[mi]) chk(x_hat[mi] == r[mi], "decision correct");
          end
          if (k[mi]) n_decided++;
          if (x_hat[mi]) n_one++;
        end
      end
    end
    chk(n_decided > 0 && n_one > 0, "decisions and 1-decisions occurred");
    $display("decided %0d, decided one %0d", n_decided, n_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
