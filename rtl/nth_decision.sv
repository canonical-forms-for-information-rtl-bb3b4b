// nth_decision: one decision subcircuit of the N-th order decoder. It looks
// back at the step of the coder in which the input being decoded, x_0, was the
// MI-th steering input (MI = 1 is the oldest steering position, MI = N the
// newest). At that step the coder formed F^0 = y xor x_old, where x_old is the
// input N steps before that step. The C-signals of that step are routed by the
// older, already decided steering inputs (the MI-1 high bits of ctrl); the
// remaining candidates split into those with x_0 = 0 and x_0 = 1.
//  * x_hat = 1 when F^0 differs from every candidate with x_0 = 0, which
//    proves x_0 = 1;
//  * k = 1 when F^0 differs from every candidate of one of the two groups,
//    i.e. that step's output alone decided x_0 (the coder's K^MI then).
// Both outputs are forced to 0 when k0_then (K0 of that step) is 0, because
// the coder's output then depended only on x_old. This gating is this
// design's; the comparison structure follows the source.
// Timing: purely combinational.
module nth_decision #(
  parameter int unsigned N  = 3,
  parameter int unsigned MI = 1
) (
  input  logic [(2**N)-1:0] c,
  input  logic [N-1:0]      ctrl,     // ctrl[N-l] = decided input at steering position l < MI
  input  logic              y,
  input  logic              x_old,
  input  logic              k0_then,
  output logic              x_hat,
  output logic              k
);
  localparam int unsigned W = 2**N;

  logic f0;
  logic all_diff0, all_diff1;

  assign f0 = y ^ x_old;

  always_comb begin
    all_diff0 = 1'b1;
    all_diff1 = 1'b1;
    for (int unsigned q = 0; q < W; q++) begin
      // candidate q agrees with the decided steering inputs 1..MI-1
      if (((q ^ 32'(ctrl)) >> (N - MI + 1)) == 0) begin
        if (q[N-MI]) all_diff1 = all_diff1 & (f0 ^ c[q]);
        else         all_diff0 = all_diff0 & (f0 ^ c[q]);
      end
    end
    x_hat = k0_then & all_diff0;
    k     = k0_then & (all_diff0 | all_diff1);
  end
endmodule
