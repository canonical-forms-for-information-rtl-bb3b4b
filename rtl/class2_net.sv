// class2_net: the lossless combinational network of the Class II canonical
// form. It maps (input x, present state s) to (output y, next state S) and is
// one-to-one: no two (x, s) pairs give the same (y, S). That is what makes the
// whole sequential machine lossless - every state is entered by exactly two
// transitions, and those two carry different output symbols.
// The table is the four-state Class II example of the source (states s1..s4
// encoded 0..3):
//   s1: x=0 -> S2,0   x=1 -> S3,1
//   s2: x=0 -> S1,0   x=1 -> S3,0
//   s3: x=0 -> S4,1   x=1 -> S1,1
//   s4: x=0 -> S2,1   x=1 -> S4,0
// Timing: purely combinational. Its inverse is class2_net_inv.
module class2_net
  import lossless_pkg::*;
(
  input  logic    x,
  input  state4_e s,
  output logic    y,
  output state4_e s_next
);
  always_comb begin
    unique case (s)
      S1:      {s_next, y} = x ? {S3, 1'b1} : {S2, 1'b0};
      S2:      {s_next, y} = x ? {S3, 1'b0} : {S1, 1'b0};
      S3:      {s_next, y} = x ? {S1, 1'b1} : {S4, 1'b1};
      default: {s_next, y} = x ? {S4, 1'b0} : {S2, 1'b1};  // S4
    endcase
  end
endmodule
