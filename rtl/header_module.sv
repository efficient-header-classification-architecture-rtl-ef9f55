// header_module: matches one distinct rule header.
//
// The module has the two components of a header matcher.  The first is a
// shift-or register fed by the shared symbol encoder.  Its OR gate for
// symbol i is wired to the encoder outputs of the pattern bytes of that
// symbol: for an exact field the wire is fixed by the byte value; for a
// HOME_NET field a multiplexer picks the encoder output named by the HOME_NET
// buffer.  Bytes of fields given as "any" (and ranged ports) are not wired,
// and the register only spans the symbols from the first to the last
// compared byte, so rules with unspecified fields get shorter registers.
// Since the header sits at a fixed place, the check point is sampled in the
// one cycle in which symbol LAST_SYM of a packet is accepted.
// The second component, present only if a port is a range, is a
// port_range_matcher with the rule's bounds.
//
// With Q bytes per symbol, an OR gate has one input per compared byte (type
// I encoder: output b of group j) or two (type II: output b[7:4] of the
// high-nibble group and b[3:0] of the low-nibble group), plus the previous
// flip-flop.
//
// Interface: sym_valid/sym_idx come from packet_framer; enc1_n or enc2_n
// (per ENC_TYPE) from the shared encoder; home from home_net_buffer;
// sport/dport from the port capture registers.  hit is 1 when both
// components matched the latest packet; it is meaningful from two clocks
// after the last header symbol was accepted until the next packet reaches
// symbol LAST_SYM.  The shift-or wiring, the HOME_NET multiplexers and the
// comparators follow the paper; the sampling scheme is this design's.
module header_module
  import hc_pkg::*;
#(
  parameter int        Q        = 8,
  parameter int        ENC_TYPE = ENC_TYPE2,
  parameter hdr_spec_t SPEC     = HDR_TABLE[0],
  parameter int        IDX_W    = $clog2(HDR_BYTES / Q + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sym_valid,
  input  logic [IDX_W-1:0]        sym_idx,
  input  logic [Q-1:0][255:0]     enc1_n,
  input  logic [Q-1:0][1:0][15:0] enc2_n,
  input  logic [31:0]             home,
  input  logic [15:0]             sport,
  input  logic [15:0]             dport,
  output logic                    hit
);
  localparam logic [HDR_BYTES-1:0][7:0] PAT  = spec_pattern(SPEC);
  localparam logic [HDR_BYTES-1:0]      CARE = spec_care(SPEC);
  localparam logic [HDR_BYTES-1:0]      HOME = spec_home(SPEC);
  localparam int FIRST_BYTE = mask_first(CARE | HOME);
  localparam int LAST_BYTE  = mask_last(CARE | HOME);
  localparam bit HAS_SO     = (FIRST_BYTE >= 0);
  localparam bit HAS_RANGE  = (SPEC.sp_spec == PORT_RANGE) || (SPEC.dp_spec == PORT_RANGE);

  initial assert (ENC_TYPE == ENC_TYPE1 || ENC_TYPE == ENC_TYPE2)
    else $fatal(1, "header_module: ENC_TYPE must be 1 or 2");

  // Byte of the HOME_NET buffer compared with header byte b.
  function automatic logic [7:0] home_byte(logic [31:0] h, int b);
    if (b >= OFF_SIP && b < OFF_SIP + 4) return h[8*(3-(b-OFF_SIP)) +: 8];
    return h[8*(3-(b-OFF_DIP)) +: 8];
  endfunction

  // ------------------------------------------------ shift-or component
  logic so_q;   // 1: the shift-or pattern matched the latest packet

  if (HAS_SO) begin : g_so
    localparam int FIRST_SYM = FIRST_BYTE / Q;
    localparam int LAST_SYM  = LAST_BYTE / Q;
    localparam int STAGES    = LAST_SYM - FIRST_SYM + 1;

    logic [STAGES-1:0] s_n;
    logic [STAGES-1:0] r_next;
    logic              match_n;

    always_comb begin
      for (int s = 0; s < STAGES; s++) begin
        s_n[s] = 1'b0;
        for (int j = 0; j < Q; j++) begin
          if ((FIRST_SYM + s) * Q + j < HDR_BYTES) begin
            if (CARE[(FIRST_SYM + s) * Q + j]) begin
              // fixed wire to the encoder output of the pattern byte
              if (ENC_TYPE == ENC_TYPE1)
                s_n[s] = s_n[s] | enc1_n[j][PAT[(FIRST_SYM + s) * Q + j]];
              else
                s_n[s] = s_n[s] | enc2_n[j][1][PAT[(FIRST_SYM + s) * Q + j][7:4]]
                                | enc2_n[j][0][PAT[(FIRST_SYM + s) * Q + j][3:0]];
            end else if (HOME[(FIRST_SYM + s) * Q + j]) begin
              // multiplexer steered by the HOME_NET buffer
              if (ENC_TYPE == ENC_TYPE1)
                s_n[s] = s_n[s] | enc1_n[j][home_byte(home, (FIRST_SYM + s) * Q + j)];
              else
                s_n[s] = s_n[s] | enc2_n[j][1][home_byte(home, (FIRST_SYM + s) * Q + j)[7:4]]
                                | enc2_n[j][0][home_byte(home, (FIRST_SYM + s) * Q + j)[3:0]];
            end
          end
        end
      end
    end

    shift_or_chain #(.STAGES(STAGES)) u_chain (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (sym_valid),
      .restart (1'b0),
      .s_n     (s_n),
      .match_n (match_n),
      .r_next  (r_next)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        so_q <= 1'b0;
      else if (sym_valid && sym_idx == IDX_W'(LAST_SYM))
        so_q <= ~match_n;
    end
  end else begin : g_no_so
    assign so_q = 1'b1;
  end

  // ------------------------------------------------ range component
  logic range_ok;

  if (HAS_RANGE) begin : g_range
    logic miss;
    port_range_matcher u_range (
      .clk   (clk),
      .rst_n (rst_n),
      .sport (sport),
      .dport (dport),
      .sp_lo ((SPEC.sp_spec == PORT_RANGE) ? SPEC.sp_lo : 16'h0000),
      .sp_hi ((SPEC.sp_spec == PORT_RANGE) ? SPEC.sp_hi : 16'hFFFF),
      .dp_lo ((SPEC.dp_spec == PORT_RANGE) ? SPEC.dp_lo : 16'h0000),
      .dp_hi ((SPEC.dp_spec == PORT_RANGE) ? SPEC.dp_hi : 16'hFFFF),
      .miss  (miss)
    );
    assign range_ok = ~miss;
  end else begin : g_no_range
    assign range_ok = 1'b1;
  end

  assign hit = so_q & range_ok;
endmodule
