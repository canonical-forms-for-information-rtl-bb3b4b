// lossless_comb3: a nonlinear, one-to-one (lossless) combinational map from
// three input bits to three output bits. Because the map is a permutation of
// the eight input combinations, the inputs can always be recovered from the
// outputs (see lossless_comb3_inv).
//
// Equations (products are AND, sums are mod 2):
//   y1 = 1 ^ x1 ^ x3 ^ x1x2 ^ x1x3
//   y2 = 1 ^ x1 ^ x2 ^ x3
//   y3 = 1 ^ x1 ^ x2 ^ x1x2 ^ x2x3
// Interface: x = {x1, x2, x3}, y = {y1, y2, y3} (x1, y1 in the MSB).
// Timing: purely combinational. The equations follow the source example.
module lossless_comb3 (
  input  logic [2:0] x,
  output logic [2:0] y
);
  logic x1, x2, x3;
  assign {x1, x2, x3} = x;

  always_comb begin
    y[2] = 1'b1 ^ x1 ^ x3 ^ (x1 & x2) ^ (x1 & x3);
    y[1] = 1'b1 ^ x1 ^ x2 ^ x3;
    y[0] = 1'b1 ^ x1 ^ x2 ^ (x1 & x2) ^ (x2 & x3);
  end
endmodule
