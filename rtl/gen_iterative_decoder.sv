// gen_iterative_decoder: decoder for the general canonical form, built as an
// iterative (space-unrolled) circuit of STEPS cells. The a-symbols flow left
// to right exactly as in the coder (gen_a_logic, driven by the outputs). The
// b-symbols flow right to left: each cell's gen_net_inv takes the control a_i,
// the output y_i and the later symbol B_i = b_{i+1} and returns the input x_i
// and b_i. So the inputs of a STEPS-symbol experiment follow from the initial
// a, the outputs and the final B. Because b information comes from the end of
// the block, this cannot be a finite-delay sequential inverse; it decodes a
// complete block at once.
// Interface: y[i-1] = y_i, x[i-1] = x_i (time order from bit 0). b_last is
// the coder's b after the last step, b_first the recovered initial b, a_last
// the a after the last step. Timing: purely combinational.
module gen_iterative_decoder
  import lossless_pkg::*;
#(
  parameter int unsigned STEPS = 3
) (
  input  asym_e             a_first,
  input  logic [STEPS-1:0]  y,
  input  bsym_e             b_last,
  output logic [STEPS-1:0]  x,
  output bsym_e             b_first,
  output asym_e             a_last
);
  asym_e a_chain [STEPS+1];  // a_chain[i] = a of cell i
  bsym_e b_chain [STEPS+1];  // b_chain[i] = b entering cell i; b_chain[STEPS] = final B

  assign a_chain[0]     = a_first;
  assign b_chain[STEPS] = b_last;

  for (genvar i = 0; i < STEPS; i++) begin : g_cell
    gen_a_logic u_alg (.a(a_chain[i]), .y(y[i]), .a_next(a_chain[i+1]));
    gen_net_inv u_inv (.a(a_chain[i]), .y(y[i]), .b_next(b_chain[i+1]),
                       .x(x[i]), .b(b_chain[i]));
  end

  assign b_first = b_chain[0];
  assign a_last  = a_chain[STEPS];
endmodule
