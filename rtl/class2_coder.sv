// class2_coder: canonical form of a Class II information-lossless machine: a
// lossless combinational network (class2_net) whose next-state outputs are fed
// back through a one-symbol delay. Unlike a Class I machine, an output symbol
// need not reveal the input immediately; instead the final state and the
// output sequence determine the inputs, working backwards
// (class2_reverse_decoder).
// Interface: x in, y out (combinational from x and s), s = present state.
// Timing: one symbol per clock; synchronous reset to INIT (s1 by default, a
// design choice).
module class2_coder
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
  state4_e s_next;

  class2_net u_net (.x(x), .s(s), .y(y), .s_next(s_next));

  always_ff @(posedge clk) begin
    if (rst) s <= INIT;
    else     s <= s_next;
  end
endmodule
