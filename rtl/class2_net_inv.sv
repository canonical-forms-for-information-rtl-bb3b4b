// class2_net_inv: inverse of class2_net. Given the state a transition led to
// (S) and the output symbol of that transition (y), it returns the state the
// transition started from (s) and the input that caused it (x).
// The table is class2_net read backwards (s1..s4 encoded 0..3):
//   S1: y=0 -> s2,x=0   y=1 -> s3,x=1
//   S2: y=0 -> s1,x=0   y=1 -> s4,x=0
//   S3: y=0 -> s2,x=1   y=1 -> s1,x=1
//   S4: y=0 -> s4,x=1   y=1 -> s3,x=0
// Timing: purely combinational.
module class2_net_inv
  import lossless_pkg::*;
(
  input  logic    y,
  input  state4_e s_next,
  output logic    x,
  output state4_e s
);
  always_comb begin
    unique case (s_next)
      S1:      {s, x} = y ? {S3, 1'b1} : {S2, 1'b0};
      S2:      {s, x} = y ? {S4, 1'b0} : {S1, 1'b0};
      S3:      {s, x} = y ? {S1, 1'b1} : {S2, 1'b1};
      default: {s, x} = y ? {S3, 1'b0} : {S4, 1'b1};  // S4
    endcase
  end
endmodule
