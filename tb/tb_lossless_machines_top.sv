// tb_lossless_machines_top: end-to-end test of every machine in
// lossless_machines_top at its default parameters (N = 3, one-bit output
// section, three-step block decoder). Each coder is driven with random
// inputs and each decoder must give them back:
//  * comb:  comb_x_back == comb_x for every input, comb_y per the table;
//  * lossy: output and state per the two-state flow table;
//  * c1:    c1_x_back == c1_x in the same cycle;
//  * c2:    runs of 40 symbols; then the backward decoder, loaded with the
//           final state, returns the 40 inputs from the outputs last-first;
//  * gen:   every 3 symbols the block decoder, given the a at the start, the
//           3 outputs and the b at the end, returns the 3 inputs; the
//           unrolled coder, given the start state and the 3 inputs, must
//           give the same outputs and end state as the sequential coder;
//  * nth:   nth_x_back == nth_x of N symbols earlier once nth_x_valid.
// The machines are reset every 90 symbols. Mechanisms counted, each of which
// must occur: all 8 comb inputs, all 4 Class I states, backward decodes,
// both a-symbols, N-th order warm-up, the plain (K0 = 0) path and every K^i
// path.
module tb_lossless_machines_top;
  import lossless_pkg::*;
  localparam int N = 3;
  localparam logic [2:0] CFWD [8] = '{3'b111, 3'b001, 3'b100, 3'b011,
                                      3'b000, 3'b010, 3'b110, 3'b101};

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic [2:0] comb_x, comb_y, comb_x_back;
  logic lossy_x, lossy_y, lossy_s;
  logic c1_x, c1_y, c1_x_back; state4_e c1_s;
  logic c2_x, c2_y; state4_e c2_s;
  logic c2d_load, c2d_y, c2d_x; state4_e c2d_final_state, c2d_s;
  logic gen_x, gen_y; asym_e gen_a; bsym_e gen_b;
  asym_e gid_a_first, gid_a_last; logic [2:0] gid_y, gid_x; bsym_e gid_b_last, gid_b_first;
  asym_e gic_a_first, gic_a_last; bsym_e gic_b_first, gic_b_last; logic [2:0] gic_x, gic_y;
  logic nth_x, nth_y, nth_k0, nth_x_back, nth_x_valid, nth_dec_k0;
  logic [N-1:0] nth_k, nth_dec_k;

  lossless_machines_top dut (.*);

  int checks = 0, failures = 0;
  int m_comb [8], m_c1state [4], m_c2back = 0, m_gena [2], m_gen = 0;
  int m_warm = 0, m_plain = 0, m_kpath [N], m_nth = 0, m_loss = 0;
  bit done = 0;

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", w, $time); end
  endtask

  initial begin
    #2000000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit lossy_ms;
    bit c2xs [40], c2ys [40];
    state4_e c2_final;
    bit [N-1:0] nhist;
    int since;
    asym_e ga0; bsym_e gb0; bit [2:0] gxs, gys;
    for (int i = 0; i < 8; i++) m_comb[i] = 0;
    for (int i = 0; i < 4; i++) m_c1state[i] = 0;
    m_gena = '{0, 0};
    for (int i = 0; i < N; i++) m_kpath[i] = 0;
    {comb_x, lossy_x, c1_x, c2_x, c2d_load, c2d_y, gen_x, nth_x} = '0;
    c2d_final_state = S1; gid_a_first = A1; gid_y = '0; gid_b_last = B1;
    gic_a_first = A1; gic_b_first = B1; gic_x = '0;
    for (int ph = 0; ph < 20; ph++) begin
      rst = 1;
      repeat (2) @(negedge clk);
      lossy_ms = 0; nhist = '0; since = 0;
      ga0 = A1; gb0 = B1; gxs = '0; gys = '0;
      for (int t = 0; t < 90; t++) begin
        if (t == 0) rst = 0; else @(negedge clk);
        comb_x  = 3'($urandom);
        lossy_x = 1'($urandom);
        c1_x    = 1'($urandom);
        c2_x    = 1'($urandom);
        gen_x   = 1'($urandom);
        nth_x   = (ph % 3 == 2) ? ((t / 4) % 2 == 1) : 1'($urandom);
        if (t % 3 == 0) begin ga0 = gen_a; gb0 = gen_b; end
        // class II backward decoding of the previous 40-symbol run
        c2d_load = (t == 40);
        c2d_final_state = c2_s;
        if (t > 40 && t <= 80) c2d_y = c2ys[80 - t];
        #1;
        // comb
        chk(comb_y == CFWD[comb_x], "comb forward table");
        chk(comb_x_back == comb_x, "comb round trip");
        m_comb[comb_x]++;
        // lossy
        chk(lossy_s == lossy_ms && lossy_y == (lossy_ms & lossy_x), "two-state machine");
        if (lossy_ms == 0 && lossy_x == 1) m_loss++;
        lossy_ms = lossy_ms ^ lossy_x;
        // class I
        chk(c1_x_back == c1_x, "Class I round trip");
        m_c1state[int'(c1_s)]++;
        // class II
        if (t < 40) begin c2xs[t] = c2_x; c2ys[t] = c2_y; end
        if (t > 40 && t <= 80) begin chk(c2d_x == c2xs[80 - t], "Class II backward decode"); m_c2back++; end
        // general form
        gxs[t % 3] = gen_x; gys[t % 3] = gen_y;
        m_gena[int'(gen_a)]++;
        // N-th order
        chk(nth_x_valid == (since >= N), "N-th order valid timing");
        if (!nth_x_valid) m_warm++;
        else begin
          chk(nth_x_back == nhist[N-1], "N-th order decode");
          chk(nth_dec_k0 == nth_k0, "decoder K0 tracks coder K0");
          m_nth++;
          if (!nth_dec_k0) m_plain++;
          for (int i = 0; i < N; i++) if (nth_dec_k[i]) m_kpath[i]++;
        end
        nhist = {nhist[N-2:0], nth_x};
        since++;
        if (t % 3 == 2) begin
          @(posedge clk); #1;
          gid_a_first = ga0; gid_y = gys; gid_b_last = gen_b;
          #1;
          chk(gid_x == gxs, "general-form block decode");
          gic_a_first = ga0; gic_b_first = gb0; gic_x = gxs;
          #1;
          chk(gic_y == gys && gic_a_last == gen_a && gic_b_last == gen_b,
              "unrolled coder matches sequential coder");
          m_gen++;
        end
      end
    end
    done = 1;
  end

  initial begin
    wait (done);
    for (int i = 0; i < 8; i++) chk(m_comb[i] > 0, "every comb input");
    for (int i = 0; i < 4; i++) chk(m_c1state[i] > 0, "every Class I state");
    chk(m_c2back > 0, "Class II backward decodes");
    chk(m_gena[0] > 0 && m_gena[1] > 0, "both a-symbols");
    chk(m_gen > 0, "general-form block decodes");
    chk(m_loss > 0, "two-state machine left s1 on x=1");
    chk(m_warm > 0, "N-th order warm-up");
    chk(m_plain > 0, "N-th order plain path (K0 = 0)");
    for (int i = 0; i < N; i++) chk(m_kpath[i] > 0, "N-th order K^i path");
    $display("comb inputs %0d %0d %0d %0d %0d %0d %0d %0d", m_comb[0], m_comb[1], m_comb[2],
             m_comb[3], m_comb[4], m_comb[5], m_comb[6], m_comb[7]);
    $display("Class I states %0d %0d %0d %0d; Class II backward %0d; general blocks %0d (a1 %0d a2 %0d)",
             m_c1state[0], m_c1state[1], m_c1state[2], m_c1state[3], m_c2back, m_gen, m_gena[0], m_gena[1]);
    $display("N-th order: decoded %0d, warm-up %0d, plain %0d, K^1 %0d K^2 %0d K^3 %0d",
             m_nth, m_warm, m_plain, m_kpath[0], m_kpath[1], m_kpath[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
