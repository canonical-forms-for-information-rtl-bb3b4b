// class1_inverse: the inverse of class1_coder. It differs from the coder only
// in the connections of the mod-2 adder: the state logic is driven by the
// received y (exactly as in the coder), and x = y ^ f(s). Started in the same
// state as the coder and fed the coder's output, it reproduces the coder's
// input in the same clock cycle (zero decoding delay).
// Interface: y in, x out (combinational), s = present state.
// Timing: one symbol per clock; synchronous reset to INIT (design choice).
module class1_inverse
  import lossless_pkg::*;
#(
  parameter state4_e INIT = S1
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    y,
  output logic    x,
  output state4_e s
);
  assign x = y ^ class1_f(s);

  always_ff @(posedge clk) begin
    if (rst) s <= INIT;
    else     s <= class1_next(s, y);
  end
endmodule
