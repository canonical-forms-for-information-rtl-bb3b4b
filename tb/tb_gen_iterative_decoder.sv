// tb_gen_iterative_decoder: exhaustive test of the block decoder of the
// general canonical form. A behavioural model of the example coder, written
// as its combined table (x, a, b => A, B, y), typed here:
//   a1,b1: x=0 -> A2,B2,0  x=1 -> A2,B3,0    a2,b1: x=0 -> A2,B1,1  x=1 -> A2,B2,1
//   a1,b2: x=0 -> A2,B1,1  x=1 -> A2,B2,1    a2,b2: x=0 -> A1,B1,0  x=1 -> A1,B2,0
//   a1,b3: x=0 -> A2,B3,1  x=1 -> A2,B1,0    a2,b3: x=0 -> A1,B3,0  x=1 -> A2,B3,1
// runs every experiment of 3 steps from every start (a, b), and random
// 8-step experiments; the decoders must return the inputs, the initial b and
// the final a from (initial a, outputs, final B).
module tb_gen_iterative_decoder;
  import lossless_pkg::*;
  int checks = 0, failures = 0;
  localparam int TA [2][3][2] = '{'{'{1, 1}, '{1, 1}, '{1, 1}}, '{'{1, 1}, '{0, 0}, '{0, 1}}};
  localparam int TB [2][3][2] = '{'{'{1, 2}, '{0, 1}, '{2, 0}}, '{'{0, 1}, '{0, 1}, '{2, 2}}};
  localparam bit TY [2][3][2] = '{'{'{0, 0}, '{1, 1}, '{1, 0}}, '{'{1, 1}, '{0, 0}, '{0, 1}}};

  asym_e a3, a3_last, a8, a8_last;
  bsym_e b3_last, b3_first, b8_last, b8_first;
  logic [2:0] y3, x3;
  logic [7:0] y8, x8;

  gen_iterative_decoder #(.STEPS(3)) dut3 (.a_first(a3), .y(y3), .b_last(b3_last),
    .x(x3), .b_first(b3_first), .a_last(a3_last));
  gen_iterative_decoder #(.STEPS(8)) dut8 (.a_first(a8), .y(y8), .b_last(b8_last),
    .x(x8), .b_first(b8_first), .a_last(a8_last));

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  // run the model: returns outputs, final a and final b
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
      a3 = asym_e'(a0); y3 = ys[2:0]; b3_last = bsym_e'(bf);
      #1;
      chk(x3 == 3'(xv), "3-step inputs");
      chk(int'(b3_first) == b0, "3-step initial b");
      chk(int'(a3_last) == af, "3-step final a");
    end
    for (int e = 0; e < 200; e++) begin
      int a0, b0;
      logic [7:0] xv;
      a0 = int'($urandom_range(1)); b0 = int'($urandom_range(2)); xv = 8'($urandom);
      run(a0, b0, xv, 8, ys, af, bf);
      a8 = asym_e'(a0); y8 = ys; b8_last = bsym_e'(bf);
      #1;
      chk(x8 == xv, "8-step inputs");
      chk(int'(b8_first) == b0, "8-step initial b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
