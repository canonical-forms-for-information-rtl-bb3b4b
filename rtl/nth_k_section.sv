// nth_k_section: comparators and K-section of the N-th order lossless coder.
//  * G^r = F^0 xor F^r for every lead r != 0: 1 when the output would have
//    differed had the stored inputs been those of lead r.
//  * K^i = AND of G^r over the leads whose first 1 is at position i: 1 when
//    the present output alone decides the input x_{t-N+i}, given the older
//    ones. Here K^i is also ANDed with K0 (see below).
//  * K0_t = K^1_{t-1} OR K^2_{t-2} OR ... OR K^N_{t-N}: 1 when x_{t-N} was
//    already decided by the outputs since it was applied. It is built as a
//    chain of N one-symbol delays with an OR between them.
// K0 gating is this design's addition: while K0 = 0 the coder's output
// depends on x_{t-N} only, so no later input can be decided by it; without
// the gate the comparators could report otherwise and the decoder would go
// wrong for some C tables. The delay registers reset to 1 because the inputs
// before reset are known constants.
// Interface: k[i-1] = K^i (combinational from f and the registers), k0 = K0
// (register output). Timing: one symbol per clock.
module nth_k_section #(
  parameter int unsigned N = 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [(2**N)-1:0] f,
  output logic [N-1:0]      k,
  output logic              k0
);
  localparam int unsigned W = 2**N;

  logic [W-1:0] g;
  logic [N:1]   kreg;  // kreg[i] holds K^i OR kreg[i+1] of the previous symbol

  always_comb begin
    g = f ^ {W{f[0]}};
    for (int unsigned i = 1; i <= N; i++) begin
      k[i-1] = k0;
      for (int unsigned r = (1 << (N - i)); r < (2 << (N - i)); r++)
        k[i-1] = k[i-1] & g[r];
    end
  end

  assign k0 = kreg[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      kreg <= '1;
    end else begin
      kreg[N] <= k[N-1];
      for (int unsigned i = 1; i < N; i++)
        kreg[i] <= k[i-1] | kreg[i+1];
    end
  end
endmodule
