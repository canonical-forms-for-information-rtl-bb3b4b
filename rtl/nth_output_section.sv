// nth_output_section: the "output section" of the N-th order lossless coder
// together with the logic network that turns its state into the 2^N
// C-signals. It is driven only by the coder's output symbols, so its state -
// and hence every C-signal - is a function of the past output sequence and is
// reproducible by a decoder that sees the same outputs.
// The source leaves this subcircuit open (any function of the past outputs
// will do). This design uses the simplest general choice: an M-bit shift
// register of the last M outputs (A = {a, y}, newest in bit 0) and a constant
// table CTABLE that holds, for every state a, the C-signal vector
// CTABLE[a*2^N +: 2^N]. Bit r of that vector is C^r, with r written as the
// bits (i1 i2 ... iN), i1 the MSB.
// Interface: en advances the state by one symbol y; c is combinational from
// the present state a. Timing: synchronous reset to A_INIT.
module nth_output_section #(
  parameter int unsigned                  N      = 3,
  parameter int unsigned                  M      = 1,
  parameter logic [(2**(M+N))-1:0]        CTABLE = 16'hF0CA,
  parameter logic [M-1:0]                 A_INIT = '0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               y,
  output logic [M-1:0]       a,
  output logic [(2**N)-1:0]  c
);
  assign c = CTABLE[a * (2**N) +: (2**N)];

  always_ff @(posedge clk) begin
    if (rst)     a <= A_INIT;
    else if (en) a <= M'({a, y});
  end
endmodule
