// symbol_encoder_t1: basic and type I symbol encoder.
//
// The encoder turns each of the Q characters of the input symbol into a
// one-cold group of 2**CHAR_W outputs: output k of group j is 0 exactly when
// character j equals k, and every other output of the group is 1.  A
// shift-or register wired to output f(p) of group j therefore receives the
// bit S_c[i] of the shift-or algorithm without any ROM, and any number of
// pattern registers can share the one encoder.  With Q = 1 this is the basic
// symbol encoder (one group of |Sigma| outputs); with Q > 1 it is the type I
// encoder, whose output count grows only linearly with Q.
//
// Interface: sym holds Q characters, character 0 the earliest in the stream.
// enc_n[j][k] is the output k of group G_(j+1).  Purely combinational.
// The one-cold output coding and the grouping follow the paper's
// description; the 8-bit character width is its header alphabet {00..FF}.
module symbol_encoder_t1 #(
  parameter int Q      = 8,
  parameter int CHAR_W = 8
) (
  input  logic [Q-1:0][CHAR_W-1:0]      sym,
  output logic [Q-1:0][2**CHAR_W-1:0]   enc_n
);
  always_comb begin
    for (int j = 0; j < Q; j++) begin
      for (int k = 0; k < 2**CHAR_W; k++) begin
        enc_n[j][k] = (sym[j] != CHAR_W'(k));
      end
    end
  end
endmodule
