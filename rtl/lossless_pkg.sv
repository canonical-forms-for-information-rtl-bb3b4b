// lossless_pkg: state encodings and next-state/output functions shared by the
// Class I coder and its inverse, and the symbol encodings of the general
// canonical-form example.
//
// Class I example machine (4 states s1..s4, encoded 0..3). A Class I machine
// is one in which the two transitions leaving any state carry different
// output symbols, so y = x xor f(s) and the next state is a function of the
// present state and the OUTPUT symbol. The tables below are that machine's
// flow table rewritten in this form. In state s1 the output bits follow the
// derived (y -> next state) table; the flow table printed beside it gives the
// same output for both inputs there, which would not be Class I.
package lossless_pkg;

  typedef enum logic [1:0] {S1 = 2'd0, S2 = 2'd1, S3 = 2'd2, S4 = 2'd3} state4_e;

  // General canonical form example: a-symbols a1/a2 and b-symbols b1..b3.
  // Code B_DUMMY is the unused b code, treated as the dummy state (y = x,
  // state kept) so that the lossless network stays one-to-one on all codes.
  typedef enum logic       {A1 = 1'b0, A2 = 1'b1} asym_e;
  typedef enum logic [1:0] {B1 = 2'd0, B2 = 2'd1, B3 = 2'd2, B_DUMMY = 2'd3} bsym_e;

  // Class I: output produced when x = 0 (y = x xor class1_f(s)).
  function automatic logic class1_f(state4_e s);
    case (s)
      S1:      return 1'b1;
      S2:      return 1'b0;
      S3:      return 1'b1;
      default: return 1'b0;  // S4
    endcase
  endfunction

  // Class I: next state as a function of present state and output symbol.
  function automatic state4_e class1_next(state4_e s, logic y);
    case (s)
      S1:      return y ? S3 : S4;
      S2:      return y ? S1 : S4;
      S3:      return y ? S4 : S2;
      default: return y ? S2 : S3;  // S4
    endcase
  endfunction

endpackage
