// signature_matcher: payload signature matching with shift-or registers.
//
// Each rule's content string is searched for anywhere in the packet while
// the packet streams past at Q bytes per clock.  A string can end in any of
// the Q lanes of a symbol, so each rule has Q shift-or registers, one per
// alignment a = 0..Q-1: register a expects the string to start in lane a,
// the lanes before it being left unconnected.  All registers share one
// symbol encoder, wired exactly as in the header modules.  A register is
// restarted at the first symbol of a packet so that no match spans two
// packets, and lanes beyond the end of the packet (in_empty) count as
// mismatches.  Hits are collected per packet.
//
// Interface: in_valid/in_sop/in_eop/in_empty/in_data as for the header
// classifier (in_empty = unused lanes at the top of the eop symbol).  One
// clock after the eop symbol is accepted, sig_valid pulses and sig_hit holds
// one bit per rule for that packet until the next packet ends.  The
// shift-or-with-encoder structure and the use of one register per alignment
// follow the paper; the per-packet collection is this design's.
module signature_matcher
  import hc_pkg::*;
#(
  parameter int Q        = 8,
  parameter int ENC_TYPE = ENC_TYPE2,
  parameter int EMPTY_W  = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sop,
  input  logic                 in_eop,
  input  logic [EMPTY_W-1:0]   in_empty,
  input  logic [Q-1:0][7:0]    in_data,
  output logic                 sig_valid,
  output logic [M_RULES-1:0]   sig_hit
);
  logic [Q-1:0][255:0]     enc1_n;
  logic [Q-1:0][1:0][15:0] enc2_n;

  if (ENC_TYPE == ENC_TYPE1) begin : g_enc1
    symbol_encoder_t1 #(.Q(Q), .CHAR_W(8)) u_enc (.sym(in_data), .enc_n(enc1_n));
    assign enc2_n = '1;
  end else begin : g_enc2
    symbol_encoder_t2 #(.Q(Q)) u_enc (.sym(in_data), .enc_n(enc2_n));
    assign enc1_n = '1;
  end

  // lanes holding packet bytes in this symbol
  logic [Q-1:0] lane_ok;
  always_comb begin
    for (int j = 0; j < Q; j++)
      lane_ok[j] = !(in_eop && (j >= Q - int'(in_empty)));
  end

  logic [M_RULES-1:0] hit_now;

  for (genvar r = 0; r < M_RULES; r++) begin : g_rule
    localparam int L = int'(SIG_TABLE[r].len);
    logic [Q-1:0] align_hit;

    for (genvar a = 0; a < Q; a++) begin : g_align
      localparam int STAGES = (a + L + Q - 1) / Q;
      logic [STAGES-1:0] s_n;
      logic [STAGES-1:0] r_next;
      logic              match_n;

      always_comb begin
        for (int k = 0; k < STAGES; k++) begin
          s_n[k] = 1'b0;
          for (int j = 0; j < Q; j++) begin
            if (k * Q + j - a >= 0 && k * Q + j - a < L) begin
              if (ENC_TYPE == ENC_TYPE1)
                s_n[k] = s_n[k] | enc1_n[j][SIG_TABLE[r].str[8*(k*Q+j-a) +: 8]];
              else
                s_n[k] = s_n[k] | enc2_n[j][1][SIG_TABLE[r].str[8*(k*Q+j-a)+4 +: 4]]
                                | enc2_n[j][0][SIG_TABLE[r].str[8*(k*Q+j-a) +: 4]];
              s_n[k] = s_n[k] | !lane_ok[j];
            end
          end
        end
      end

      shift_or_chain #(.STAGES(STAGES)) u_chain (
        .clk     (clk),
        .rst_n   (rst_n),
        .en      (in_valid),
        .restart (in_sop),
        .s_n     (s_n),
        .match_n (match_n),
        .r_next  (r_next)
      );

      assign align_hit[a] = ~match_n;
    end

    assign hit_now[r] = in_valid & (|align_hit);
  end

  // per-packet collection
  logic [M_RULES-1:0] seen_q, seen_next;
  assign seen_next = (in_sop ? '0 : seen_q) | hit_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_q    <= '0;
      sig_hit   <= '0;
      sig_valid <= 1'b0;
    end else begin
      sig_valid <= in_valid && in_eop;
      if (in_valid) seen_q <= seen_next;
      if (in_valid && in_eop) sig_hit <= seen_next;
    end
  end
endmodule
