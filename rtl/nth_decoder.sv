// nth_decoder: inverse of nth_coder. Fed the coder's outputs y_t (both reset
// together), it regenerates x_{t-N} in the same cycle, a net delay of N
// symbols.
// How it works:
//  * it stores the last N received outputs and the last N decoded inputs;
//  * N+1 copies of the coder's output section, driven by y_t, y_{t-1}, ...,
//    y_{t-N}, give the C-signals of the coder at each of those steps;
//  * for each of the N earlier steps in which x_{t-N} steered the coder, an
//    nth_decision subcircuit checks whether that step's output decided it
//    (and which way);
//  * their "decided" flags ORed give K0_t; if none decided, the coder sent
//    x_{t-N} plainly: x = NOT K0_t AND (C^0_t xor y_t);
//  * the decoded bit is the OR of the N+1 subcircuit outputs.
// It also keeps its own K0 of the last N steps to gate the subcircuits,
// matching the coder's gating of K^i by K0 (this design's addition). For N
// cycles after reset it outputs the known reset inputs (0), with x_valid low.
// Structure follows the source; the warm-up handling is this design's.
// Interface: y in; x, x_valid, k0, k (k[m-1]: subcircuit m decided) out, all
// combinational from y and the state. Timing: one symbol per clock,
// synchronous reset.
module nth_decoder #(
  parameter int unsigned           N      = 3,
  parameter int unsigned           M      = 1,
  parameter logic [(2**(M+N))-1:0] CTABLE = 16'hF0CA,
  parameter logic [M-1:0]          A_INIT = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         y,
  output logic         x,
  output logic         x_valid,
  output logic         k0,
  output logic [N-1:0] k
);
  localparam int unsigned W  = 2**N;
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] cnt;         // symbols seen since reset, saturating at N
  logic [N:0]    yd;          // yd[d] = y_{t-d}
  logic [N:1]    yh;          // stored outputs
  logic [N:1]    xh;          // xh[d] = x_{t-N-d}
  logic [N:1]    k0h;         // k0h[d] = K0_{t-d}
  logic [W-1:0]  cd [N+1];    // cd[d] = C-signals at step t-d
  logic [N:1]    xhat;
  logic          x0_plain;
  logic          warm;
  logic [N:0]    copy_en;     // copy d runs once y_{t-d} is a real output

  assign warm = (cnt < CW'(N));
  assign yd   = {yh, y};

  always_comb begin
    copy_en[0] = 1'b1;
    for (int unsigned d = 1; d <= N; d++)
      copy_en[d] = (cnt >= CW'(d));
  end

  for (genvar d = 0; d <= N; d++) begin : g_copy
    logic [M-1:0] a_unused;
    nth_output_section #(.N(N), .M(M), .CTABLE(CTABLE), .A_INIT(A_INIT)) u_out (
      .clk(clk), .rst(rst), .en(copy_en[d]), .y(yd[d]), .a(a_unused), .c(cd[d]));
  end

  for (genvar d = 1; d <= N; d++) begin : g_dec
    logic [N-1:0] ctrl;
    always_comb begin
      ctrl = '0;
      for (int unsigned l = 1; l < d; l++)
        ctrl[N-l] = xh[d-l];
    end
    nth_decision #(.N(N), .MI(d)) u_dec (
      .c(cd[d]), .ctrl(ctrl), .y(yh[d]), .x_old(xh[d]), .k0_then(k0h[d]),
      .x_hat(xhat[d]), .k(k[d-1]));
  end

  assign k0       = warm | (|k);
  assign x0_plain = ~k0 & (cd[0][0] ^ y);
  assign x        = ~warm & ((|xhat) | x0_plain);
  assign x_valid  = ~warm;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      yh  <= '0;
      xh  <= '0;
      k0h <= '1;
    end else begin
      if (warm) cnt <= cnt + 1'b1;
      yh  <= yd[N-1:0];
      xh  <= {xh[N-1:1], x};
      k0h <= {k0h[N-1:1], k0};
    end
  end
endmodule
