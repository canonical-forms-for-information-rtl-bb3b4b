// tb_gen_iterative_coder: exhaustive test of the unrolled general-form coder.
// The reference is the example machine's combined table (x, a, b => A, B, y),
// typed here independently of the RTL:
//   a1,b1: x=0 -> A2,B2,0  x=1 -> A2,B3,0    a2,b1: x=0 -> A2,B1,1  x=1 -> A2,B2,1
//   a1,b2: x=0 -> A2,B1,1  x=1 -> A2,B2,1    a2,b2: x=0 -> A1,B1,0  x=1 -> A1,B2,0
//   a1,b3: x=0 -> A2,B3,1  x=1 -> A2,B1,0    a2,b3: x=0 -> A1,B3,0  x=1 -> A2,B3,1
// Every 3-step experiment from every reachable start (a, b) is applied; the
// outputs and the final (a, b) must match the table, and the block decoder fed
// with (initial a, outputs, final b) must return the inputs and initial b.
// Random 8-step experiments follow on a second, longer instance.
module tb_gen_iterative_coder;
  import lossless_pkg::*;
  int checks = 0, failures = 0;
  localparam int TA [2][3][2] = '{'{'{1, 1}, '{1, 1}, '{1, 1}}, '{'{1, 1}, '{0, 0}, '{0, 1}}};
  localparam int TB [2][3][2] = '{'{'{1, 2}, '{0, 1}, '{2, 0}}, '{'{0, 1}, '{0, 1}, '{2, 2}}};
  localparam bit TY [2][3][2] = '{'{'{0, 0}, '{1, 1}, '{1, 0}}, '{'{1, 1}, '{0, 0}, '{0, 1}}};

  asym_e a3, a3_last, a3_dec_last, a8, a8_last;
  bsym_e b3, b3_last, b3_dec_first, b8, b8_last;
  logic [2:0] x3, y3, x3_dec;
  logic [7:0] x8, y8;

  gen_iterative_coder #(.STEPS(3)) dut3 (.a_first(a3), .b_first(b3), .x(x3), .y(y3),
    .a_last(a3_last), .b_last(b3_last));
  gen_iterative_decoder #(.STEPS(3)) dec3 (.a_first(a3), .y(y3), .b_last(b3_last),
    .x(x3_dec), .b_first(b3_dec_first), .a_last(a3_dec_last));
  gen_iterative_coder #(.STEPS(8)) dut8 (.a_first(a8), .b_first(b8), .x(x8), .y(y8),
    .a_last(a8_last), .b_last(b8_last));

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  task automatic run(input int a0, input int b0, input logic [7:0] xs, input int n,
                     output logic [7:0] ys, output int af, output int bf);
    int ca, cb, na;
    ca = a0; cb = b0; ys = '0;
    for (int t = 0; t < n; t++) begin
      ys[t] = TY[ca][cb][xs[t]];
      na    = TA[ca][cb][xs[t]];
      cb    = TB[ca][cb][xs[t]];
      ca    = na;
    end
    af = ca; bf = cb;
  endtask

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] ys;
    int af, bf;
    for (int a0 = 0; a0 < 2; a0++) for (int b0 = 0; b0 < 3; b0++) for (int xv = 0; xv < 8; xv++) begin
      run(a0, b0, 8'(xv), 3, ys, af, bf);
      a3 = asym_e'(a0); b3 = bsym_e'(b0); x3 = 3'(xv);
      #1;
      chk(y3 == ys[2:0], "3-step outputs");
      chk(int'(a3_last) == af, "3-step final a");
      chk(int'(b3_last) == bf, "3-step final b");
      chk(x3_dec == x3, "block decoder returns inputs");
      chk(int'(b3_dec_first) == b0 && a3_dec_last == a3_last, "block decoder returns states");
    end
    for (int e = 0; e < 300; e++) begin
      int a0, b0;
      a0 = int'($urandom_range(1)); b0 = int'($urandom_range(2));
      a8 = asym_e'(a0); b8 = bsym_e'(b0); x8 = 8'($urandom);
      run(a0, b0, x8, 8, ys, af, bf);
      #1;
      chk(y8 == ys, "8-step outputs");
      chk(int'(a8_last) == af && int'(b8_last) == bf, "8-step final state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
