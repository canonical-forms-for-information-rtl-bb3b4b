// gen_net_inv: inverse of gen_net. For a fixed control symbol a, it returns
// the input x and the present b-symbol from the output y and the next
// b-symbol B (relation y, a, B => x, b of the general canonical form).
// Table (y=0 | y=1), each entry "x, b":
//   a1,B1: 1,b3 | 0,b2     a2,B1: 0,b2 | 0,b1
//   a1,B2: 0,b1 | 1,b2     a2,B2: 1,b2 | 1,b1
//   a1,B3: 1,b1 | 0,b3     a2,B3: 0,b3 | 1,b3
// The unused b code maps to itself with x = y (dummy state).
// Timing: purely combinational.
module gen_net_inv
  import lossless_pkg::*;
(
  input  asym_e a,
  input  logic  y,
  input  bsym_e b_next,
  output logic  x,
  output bsym_e b
);
  always_comb begin
    x = y;
    b = b_next;
    if (a == A1) begin
      unique case (b_next)
        B1:      {x, b} = y ? {1'b0, B2} : {1'b1, B3};
        B2:      {x, b} = y ? {1'b1, B2} : {1'b0, B1};
        B3:      {x, b} = y ? {1'b0, B3} : {1'b1, B1};
        default: ;
      endcase
    end else begin
      unique case (b_next)
        B1:      {x, b} = y ? {1'b0, B1} : {1'b0, B2};
        B2:      {x, b} = y ? {1'b1, B1} : {1'b1, B2};
        B3:      {x, b} = y ? {1'b1, B3} : {1'b0, B3};
        default: ;
      endcase
    end
  end
endmodule
