// gen_net: the "lossless" network of the general canonical form, filled in
// for the five-state example machine of the source. Under the control of the
// a-symbol, it maps (input x, b-symbol) one-to-one onto (output y, next
// b-symbol B); for each fixed a no two (x, b) pairs give the same (y, B).
// Symbols: a1/a2 = 0/1, b1/b2/b3 = 0/1/2 (lossless_pkg). A pair (a, b) names a
// state of the example machine: (a1,b1)=s4 (a1,b2)=s1 (a1,b3)=s5
// (a2,b1)=s1 (a2,b2)=s3 (a2,b3)=s2.
// Table (x=0 | x=1), each entry "y, B":
//   a1,b1: 0,B2 | 0,B3     a2,b1: 1,B1 | 1,B2
//   a1,b2: 1,B1 | 1,B2     a2,b2: 0,B1 | 0,B2
//   a1,b3: 1,B3 | 0,B1     a2,b3: 0,B3 | 1,B3
// The unused b code acts as the source's dummy state: y = x, B = b.
// Timing: purely combinational. Inverse: gen_net_inv.
module gen_net
  import lossless_pkg::*;
(
  input  asym_e a,
  input  logic  x,
  input  bsym_e b,
  output logic  y,
  output bsym_e b_next
);
  always_comb begin
    y      = x;
    b_next = b;
    if (a == A1) begin
      unique case (b)
        B1:      {y, b_next} = x ? {1'b0, B3} : {1'b0, B2};
        B2:      {y, b_next} = x ? {1'b1, B2} : {1'b1, B1};
        B3:      {y, b_next} = x ? {1'b0, B1} : {1'b1, B3};
        default: ;
      endcase
    end else begin
      unique case (b)
        B1:      {y, b_next} = x ? {1'b1, B2} : {1'b1, B1};
        B2:      {y, b_next} = x ? {1'b0, B2} : {1'b0, B1};
        B3:      {y, b_next} = x ? {1'b1, B3} : {1'b0, B3};
        default: ;
      endcase
    end
  end
endmodule
