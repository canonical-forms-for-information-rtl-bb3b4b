// lossless_comb3_inv: the inverse of lossless_comb3. It solves the three
// nonlinear equations of the forward map for the inputs:
//   x1 = 1 ^ y1 ^ y3 ^ y1y2
//   x2 = y1 ^ y2y3
//   x3 = y2 ^ y3 ^ y1y2 ^ y2y3
// Interface: y = {y1, y2, y3}, x = {x1, x2, x3} (index 1 in the MSB).
// Timing: purely combinational. lossless_comb3_inv(lossless_comb3(x)) == x for
// all eight inputs. The equations follow the source example.
module lossless_comb3_inv (
  input  logic [2:0] y,
  output logic [2:0] x
);
  logic y1, y2, y3;
  assign {y1, y2, y3} = y;

  always_comb begin
    x[2] = 1'b1 ^ y1 ^ y3 ^ (y1 & y2);
    x[1] = y1 ^ (y2 & y3);
    x[0] = y2 ^ y3 ^ (y1 & y2) ^ (y2 & y3);
  end
endmodule
