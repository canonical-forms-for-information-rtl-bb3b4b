// lossy_two_state: the two-state sequential circuit used to introduce the
// terminal description of finite-state machines:
//   y = x AND s,   S = x XOR s   (s1 encoded 0, s2 encoded 1).
// It is NOT information-lossless: from s1 the input pairs 0,1 and 1,0 both
// give outputs 0,0 and both end in s2, so the input cannot be recovered.
// Interface: one input bit and one output bit per clock; s is the present
// state. Timing: y is combinational from x and s; the state register updates
// on the rising clock edge. Synchronous reset to s1 is this design's choice.
module lossy_two_state (
  input  logic clk,
  input  logic rst,
  input  logic x,
  output logic y,
  output logic s
);
  assign y = x & s;

  always_ff @(posedge clk) begin
    if (rst) s <= 1'b0;
    else     s <= x ^ s;
  end
endmodule
