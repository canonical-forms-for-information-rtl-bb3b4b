// gen_a_logic: next-a-symbol logic of the general canonical form for the
// five-state example (relation y, a => A). The a-symbols name sets of states
// the machine may be in as seen by an observer of the output only:
//   a1: y=0 -> A2, y=1 -> A2;   a2: y=0 -> A1, y=1 -> A2.
// With a1/a2 encoded 0/1 this is A = NOT a OR y.
// Timing: purely combinational.
module gen_a_logic
  import lossless_pkg::*;
(
  input  asym_e a,
  input  logic  y,
  output asym_e a_next
);
  always_comb begin
    a_next = ((a == A1) || y) ? A2 : A1;
  end
endmodule
