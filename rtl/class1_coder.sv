// class1_coder: canonical form of a Class I information-lossless machine.
// The output differs from the input, mod 2, by a fixed function of the state
// (y = x ^ f(s)), and the next state is computed from the state and the
// OUTPUT symbol. Since the two transitions out of every state carry different
// outputs, the inverse machine (class1_inverse) runs the same state logic on y
// and recovers x with no delay.
// The functions f and next are the four-state example machine of the
// source (lossless_pkg::class1_f / class1_next).
// Interface: x in, y out (combinational from x and s), s = present state.
// Timing: one symbol per clock. Synchronous reset to INIT (s1 by default),
// an initial state this design chose.
module class1_coder
  import lossless_pkg::*;
#(
  parameter state4_e INIT = S1
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    x,
  output logic    y,
  output state4_e s
);
  assign y = x ^ class1_f(s);

  always_ff @(posedge clk) begin
    if (rst) s <= INIT;
    else     s <= class1_next(s, y);
  end
endmodule
