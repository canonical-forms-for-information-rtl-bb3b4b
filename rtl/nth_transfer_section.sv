// nth_transfer_section: the "transfer section" of the N-th order lossless
// coder. N levels of controlled transfers route the 2^N C-signals onto the
// 2^N F-leads. A transfer passes its signals straight down when its control
// is 0 and exchanges the two leads when its control is 1. Level i (i = 1..N,
// control ctrl[N-i]) acts only on the leads whose first i-1 index bits are 0,
// exchanging lead (0..0 0 r) with lead (0..0 1 r).
// Result, with controls c1..cN:
//   F^(0...0)          = C^(c1 c2 ... cN)        (the signal actually used)
//   F^(0..0 1 r)       = C^(c1..c_{i-1}, NOT ci, r)
// i.e. the lead whose first 1 is in position i carries what F^(0..0) would
// have been had the i-th stored input been different and the later ones
// equal to r. The structure follows the source; the index convention (bit r
// of the vectors is lead r, i1 in the MSB) is this design's.
// Timing: purely combinational.
module nth_transfer_section #(
  parameter int unsigned N = 3
) (
  input  logic [(2**N)-1:0] c,
  input  logic [N-1:0]      ctrl,
  output logic [(2**N)-1:0] f
);
  localparam int unsigned W = 2**N;

  logic [W-1:0] lvl [N+1];

  always_comb begin
    lvl[0] = c;
    for (int unsigned i = 1; i <= N; i++) begin
      for (int unsigned r = 0; r < W; r++) begin
        if (((r >> (N - i + 1)) == 0) && ctrl[N-i])
          lvl[i][r] = lvl[i-1][r ^ (1 << (N - i))];
        else
          lvl[i][r] = lvl[i-1][r];
      end
    end
    f = lvl[N];
  end
endmodule
