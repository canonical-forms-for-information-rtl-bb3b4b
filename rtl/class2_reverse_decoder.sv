// class2_reverse_decoder: recovers the inputs of a Class II experiment from
// its final state and its output sequence. Knowing a state and the output
// symbol of the transition that entered it fixes the preceding state and the
// input of that transition, so the decoder walks the experiment backwards.
// Operation: pulse load with final_state = the coder's state after its last
// symbol. Then present the outputs last-first, one per clock on y: x shows
// the input of that step (combinational), and on the clock edge s moves to
// the state before that step. The source gives the procedure; the load/step
// interface is this design's own.
// Timing: one symbol per clock; load has priority; reset clears s to s1.
module class2_reverse_decoder
  import lossless_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    load,
  input  state4_e final_state,
  input  logic    y,
  output logic    x,
  output state4_e s
);
  state4_e s_prev;

  class2_net_inv u_inv (.y(y), .s_next(s), .x(x), .s(s_prev));

  always_ff @(posedge clk) begin
    if (rst)       s <= S1;
    else if (load) s <= final_state;
    else           s <= s_prev;
  end
endmodule
