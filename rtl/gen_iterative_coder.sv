// gen_iterative_coder: the general canonical-form coder laid out in space
// instead of time. It is the iterative circuit obtained by drawing STEPS
// successive time steps of gen_coder side by side, each cell holding one copy
// of the lossless network (gen_net) and of the a-logic (gen_a_logic). The a-
// and b-symbols pass from cell to cell, left to right, just as they pass
// through the coder's state registers from one clock to the next, so cell i
// computes the output of time step i. Given the initial state (a_first,
// b_first) and the inputs it returns the outputs and the final state; the
// decoding counterpart, with the b-chain reversed, is gen_iterative_decoder.
// The unrolled layout follows the source; the STEPS parameter (3 steps, as
// in its illustration) and the bit ordering are this design's.
// Interface: x[i-1] = x_i, y[i-1] = y_i (time order from bit 0). a_last and
// b_last are the symbols after the last step. Timing: purely combinational.
module gen_iterative_coder
  import lossless_pkg::*;
#(
  parameter int unsigned STEPS = 3
) (
  input  asym_e             a_first,
  input  bsym_e             b_first,
  input  logic [STEPS-1:0]  x,
  output logic [STEPS-1:0]  y,
  output asym_e             a_last,
  output bsym_e             b_last
);
  asym_e a_chain [STEPS+1];  // a_chain[i] = a of cell i
  bsym_e b_chain [STEPS+1];  // b_chain[i] = b of cell i

  assign a_chain[0] = a_first;
  assign b_chain[0] = b_first;

  for (genvar i = 0; i < STEPS; i++) begin : g_cell
    gen_net     u_net (.a(a_chain[i]), .x(x[i]), .b(b_chain[i]),
                       .y(y[i]), .b_next(b_chain[i+1]));
    gen_a_logic u_alg (.a(a_chain[i]), .y(y[i]), .a_next(a_chain[i+1]));
  end

  assign a_last = a_chain[STEPS];
  assign b_last = b_chain[STEPS];
endmodule
