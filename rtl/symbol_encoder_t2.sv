// symbol_encoder_t2: type II symbol encoder.
//
// Each 8-bit character is split into two 4-bit halves (the byte alphabet is
// the cross product of the nibble alphabet {0..F} with itself) and each half
// is encoded one-cold on its own group of 16 outputs.  A symbol of Q
// characters thus drives 2*Q groups of 16 outputs instead of Q groups of
// 256: a shift-or stage that wants to test "character j equals byte b" ORs
// output b[7:4] of the high group with output b[3:0] of the low group, which
// is 0 only when both halves agree.
//
// Interface: sym holds Q characters, character 0 the earliest.
// enc_n[j][1] is group G_(j+1)1 (high nibble), enc_n[j][0] is group
// G_(j+1)2 (low nibble); output k of a group is 0 when that nibble equals k.
// Purely combinational.  The grouping into 2q groups of sqrt(|Sigma|)
// outputs is the paper's; which half is called the first group is this
// design's choice.
module symbol_encoder_t2 #(
  parameter int Q = 8
) (
  input  logic [Q-1:0][7:0]            sym,
  output logic [Q-1:0][1:0][15:0]      enc_n
);
  always_comb begin
    for (int j = 0; j < Q; j++) begin
      for (int k = 0; k < 16; k++) begin
        enc_n[j][1][k] = (sym[j][7:4] != 4'(k));
        enc_n[j][0][k] = (sym[j][3:0] != 4'(k));
      end
    end
  end
endmodule
