// nth_coder: canonical form of an N-th order information-lossless machine - a
// coder whose input can always be regenerated from its output after a delay
// of at most N symbols (nth_decoder).
// How it works: the input section keeps the last N inputs x_{t-N}..x_{t-1}.
// The output section (nth_output_section) turns the past outputs into 2^N
// C-signals, one per combination of the N newest inputs x_{t-N+1}..x_t. The
// transfer section (nth_transfer_section), steered by those inputs, selects
// F^0 = C^(x_{t-N+1}..x_t), and the output is y_t = F^0 xor x_{t-N}. The
// K-section (nth_k_section) tracks whether x_{t-N} was already decided by the
// outputs seen since it entered (K0). If it was not (K0 = 0), the steering
// inputs are forced to 0 so that y_t = C^0 xor x_{t-N} depends on x_{t-N}
// alone and decides it.
// Structure and equations follow the source (shown there for N = 3). The
// output-section logic, the reset values and the gating of K^i by K0 are this
// design's choices (see the sub-modules).
// Interface: x in, y out (combinational from x and state); k0, k (k[i-1] =
// K^i) and a are observation outputs. Timing: one symbol per clock,
// synchronous reset: stored inputs 0, K registers 1, a = A_INIT.
module nth_coder #(
  parameter int unsigned           N      = 3,
  parameter int unsigned           M      = 1,
  parameter logic [(2**(M+N))-1:0] CTABLE = 16'hF0CA,
  parameter logic [M-1:0]          A_INIT = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         x,
  output logic         y,
  output logic         k0,
  output logic [N-1:0] k,
  output logic [M-1:0] a
);
  logic [N-1:0]      hist;  // hist[j] = x_{t-N+j}
  logic [N-1:0]      ctrl;  // ctrl[N-i] = x_{t-N+i} AND K0
  logic [(2**N)-1:0] c, f;

  always_comb begin
    for (int unsigned i = 1; i < N; i++)
      ctrl[N-i] = hist[i] & k0;
    ctrl[0] = x & k0;
  end

  nth_output_section #(.N(N), .M(M), .CTABLE(CTABLE), .A_INIT(A_INIT)) u_out (
    .clk(clk), .rst(rst), .en(1'b1), .y(y), .a(a), .c(c));

  nth_transfer_section #(.N(N)) u_xfer (.c(c), .ctrl(ctrl), .f(f));

  nth_k_section #(.N(N)) u_ksec (.clk(clk), .rst(rst), .f(f), .k(k), .k0(k0));

  assign y = f[0] ^ hist[0];

  always_ff @(posedge clk) begin
    if (rst) hist <= '0;
    else     hist <= {x, hist[N-1:1]};
  end
endmodule
