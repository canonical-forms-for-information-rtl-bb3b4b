// gen_coder: the general canonical form into which every information-lossless
// finite-state machine can be put, filled in with the source's five-state
// example. Two subcircuits talk to each other:
//  * the a-subcircuit (gen_a_logic + register) is driven only by the output
//    y, so its state a is always known to an observer of the output;
//  * the lossless subcircuit (gen_net + register) maps (x, b) to (y, B)
//    one-to-one under control of a.
// The machine state is the pair (a, b). Given the initial a, the output
// sequence and the final b, the inputs can be recovered
// (gen_iterative_decoder), although no finite-delay inverse need exist.
// Interface: x in, y out (combinational from x, a, b); a and b are the
// present symbols. Timing: one symbol per clock; synchronous reset to
// (INIT_A, INIT_B), (a1, b2) = state s1 by default (design choice).
module gen_coder
  import lossless_pkg::*;
#(
  parameter asym_e INIT_A = A1,
  parameter bsym_e INIT_B = B2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  x,
  output logic  y,
  output asym_e a,
  output bsym_e b
);
  asym_e a_next;
  bsym_e b_next;

  gen_net     u_net (.a(a), .x(x), .b(b), .y(y), .b_next(b_next));
  gen_a_logic u_alg (.a(a), .y(y), .a_next(a_next));

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= INIT_A;
      b <= INIT_B;
    end else begin
      a <= a_next;
      b <= b_next;
    end
  end
endmodule
