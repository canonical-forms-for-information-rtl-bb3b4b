// lossless_machines_top: every information-lossless machine of this library
// side by side, each with its own ports. They are independent examples of
// one theory, from the simplest to the most general:
//  * comb:  a 3-bit lossless combinational map and its inverse, chained;
//  * lossy: a two-state machine that loses information (contrast case);
//  * c1:    Class I coder chained to its zero-delay inverse;
//  * c2:    Class II coder, plus the backward decoder with its own ports
//           (it needs the final state and the outputs last-first);
//  * gen:   general canonical-form coder, plus the block decoder with its own
//           ports (it needs the initial a, the outputs and the final b);
//  * gic:   the same coder unrolled into STEPS combinational cells;
//  * nth:   N-th order coder chained to its N-symbol-delay decoder.
// Interface: one symbol per clock on every machine; a shared synchronous
// reset. The chained pairs regenerate their inputs: c1_x_back = c1_x in the
// same cycle, nth_x_back = nth_x of N cycles earlier (when nth_x_valid).
module lossless_machines_top
  import lossless_pkg::*;
#(
  parameter int unsigned           N      = 3,
  parameter int unsigned           M      = 1,
  parameter logic [(2**(M+N))-1:0] CTABLE = 16'hF0CA,
  parameter int unsigned           STEPS  = 3
) (
  input  logic             clk,
  input  logic             rst,
  // lossless combinational map
  input  logic [2:0]       comb_x,
  output logic [2:0]       comb_y,
  output logic [2:0]       comb_x_back,
  // two-state lossy machine
  input  logic             lossy_x,
  output logic             lossy_y,
  output logic             lossy_s,
  // Class I coder -> inverse
  input  logic             c1_x,
  output logic             c1_y,
  output logic             c1_x_back,
  output state4_e          c1_s,
  // Class II coder
  input  logic             c2_x,
  output logic             c2_y,
  output state4_e          c2_s,
  // Class II backward decoder
  input  logic             c2d_load,
  input  state4_e          c2d_final_state,
  input  logic             c2d_y,
  output logic             c2d_x,
  output state4_e          c2d_s,
  // general canonical-form coder
  input  logic             gen_x,
  output logic             gen_y,
  output asym_e            gen_a,
  output bsym_e            gen_b,
  // general-form block decoder
  input  asym_e            gid_a_first,
  input  logic [STEPS-1:0] gid_y,
  input  bsym_e            gid_b_last,
  output logic [STEPS-1:0] gid_x,
  output bsym_e            gid_b_first,
  output asym_e            gid_a_last,
  // general canonical-form coder, unrolled
  input  asym_e            gic_a_first,
  input  bsym_e            gic_b_first,
  input  logic [STEPS-1:0] gic_x,
  output logic [STEPS-1:0] gic_y,
  output asym_e            gic_a_last,
  output bsym_e            gic_b_last,
  // N-th order coder -> decoder
  input  logic             nth_x,
  output logic             nth_y,
  output logic             nth_k0,
  output logic [N-1:0]     nth_k,
  output logic             nth_x_back,
  output logic             nth_x_valid,
  output logic             nth_dec_k0,
  output logic [N-1:0]     nth_dec_k
);
  lossless_comb3     u_comb     (.x(comb_x), .y(comb_y));
  lossless_comb3_inv u_comb_inv (.y(comb_y), .x(comb_x_back));

  lossy_two_state u_lossy (.clk(clk), .rst(rst), .x(lossy_x), .y(lossy_y), .s(lossy_s));

  state4_e c1_s_inv_unused;
  class1_coder   u_c1     (.clk(clk), .rst(rst), .x(c1_x), .y(c1_y), .s(c1_s));
  class1_inverse u_c1_inv (.clk(clk), .rst(rst), .y(c1_y), .x(c1_x_back), .s(c1_s_inv_unused));

  class2_coder u_c2 (.clk(clk), .rst(rst), .x(c2_x), .y(c2_y), .s(c2_s));
  class2_reverse_decoder u_c2d (.clk(clk), .rst(rst), .load(c2d_load),
    .final_state(c2d_final_state), .y(c2d_y), .x(c2d_x), .s(c2d_s));

  gen_coder u_gen (.clk(clk), .rst(rst), .x(gen_x), .y(gen_y), .a(gen_a), .b(gen_b));
  gen_iterative_decoder #(.STEPS(STEPS)) u_gid (.a_first(gid_a_first), .y(gid_y),
    .b_last(gid_b_last), .x(gid_x), .b_first(gid_b_first), .a_last(gid_a_last));
  gen_iterative_coder #(.STEPS(STEPS)) u_gic (.a_first(gic_a_first), .b_first(gic_b_first),
    .x(gic_x), .y(gic_y), .a_last(gic_a_last), .b_last(gic_b_last));

  logic [M-1:0] nth_a_unused;
  nth_coder #(.N(N), .M(M), .CTABLE(CTABLE)) u_nth (.clk(clk), .rst(rst), .x(nth_x),
    .y(nth_y), .k0(nth_k0), .k(nth_k), .a(nth_a_unused));
  nth_decoder #(.N(N), .M(M), .CTABLE(CTABLE)) u_nth_dec (.clk(clk), .rst(rst), .y(nth_y),
    .x(nth_x_back), .x_valid(nth_x_valid), .k0(nth_dec_k0), .k(nth_dec_k));
endmodule
