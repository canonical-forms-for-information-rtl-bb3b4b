// tb_class2_reverse_decoder: a behavioural model of the Class II example
// (its flow table, typed here) runs random experiments of random length from
// random initial states. The decoder is loaded with the final state and fed
// the outputs last-first; it must return every input and, at the end, the
// initial state.
module tb_class2_reverse_decoder;
  import lossless_pkg::*;
  logic clk = 0, rst, load, y, x;
  state4_e final_state, s;
  int checks = 0, failures = 0;
  localparam int NS [4][2] = '{'{1, 2}, '{0, 2}, '{3, 0}, '{1, 3}};
  localparam bit Y  [4][2] = '{'{0, 1}, '{0, 0}, '{1, 1}, '{1, 0}};
  bit xs [64], ys [64];
  int st [65];
  int len;

  class2_reverse_decoder dut (.clk(clk), .rst(rst), .load(load), .final_state(final_state),
                              .y(y), .x(x), .s(s));
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  initial begin
    #200000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; load = 0; y = 0; final_state = S1;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int e = 0; e < 40; e++) begin
      len = 1 + int'($urandom_range(63));
      st[0] = int'($urandom_range(3));
      for (int t = 0; t < len; t++) begin
        xs[t] = 1'($urandom);
        ys[t] = Y[st[t]][xs[t]];
        st[t+1] = NS[st[t]][xs[t]];
      end
      load = 1; final_state = state4_e'(st[len]);
      @(negedge clk);
      load = 0;
      for (int t = len - 1; t >= 0; t--) begin
        y = ys[t];
        #1;
        chk(int'(s) == st[t+1], "state before step");
        chk(x == xs[t], "recovered input");
        @(negedge clk);
      end
      chk(int'(s) == st[0], "initial state recovered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
