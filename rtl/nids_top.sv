// nids_top: packet classification front end of a network intrusion detector.
//
// Every packet is broadcast to two circuits working side by side: the
// header classification circuit, which decides for each rule whether the
// packet's five-tuple (addresses, protocol, ports) fits the rule header, and
// the signature matching circuit, which decides for each rule whether the
// rule's content string occurs in the packet.  The rule encoder raises an
// alarm for a rule only when both agree.  Both circuits are built from
// shift-or registers fed by shared symbol encoders and take Q bytes per
// clock (Q = 8 with the type II encoder by default: 64 bits per clock).
//
// Interface: packet stream in_valid/in_sop/in_eop/in_empty/in_data (byte 0
// of the packet in lane 0 of the sop symbol; in_empty = unused top lanes of
// the eop symbol; no back-pressure).  Packets must be at least 24 bytes
// long.  home_we/home_be/home_wdata rewrite the HOME_NET address between
// packets.  Outputs: hdr_valid/hdr_hit (two clocks after the last header
// symbol), sig_valid/sig_hit (one clock after eop) and
// alarm_valid/alarm/alarm_any/alarm_rule (four clocks after eop).  The
// split into the two circuits and the encoder follows the paper; the stream
// format and result timing are this design's.
module nids_top
  import hc_pkg::*;
#(
  parameter int Q        = 8,
  parameter int ENC_TYPE = ENC_TYPE2,
  parameter int EMPTY_W  = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_sop,
  input  logic                      in_eop,
  input  logic [EMPTY_W-1:0]        in_empty,
  input  logic [Q-1:0][7:0]         in_data,
  input  logic                      home_we,
  input  logic [3:0]                home_be,
  input  logic [31:0]               home_wdata,
  output logic [31:0]               home,
  output logic                      hdr_valid,
  output logic [M_RULES-1:0]        hdr_hit,
  output logic                      sig_valid,
  output logic [M_RULES-1:0]        sig_hit,
  output logic                      alarm_valid,
  output logic [M_RULES-1:0]        alarm,
  output logic                      alarm_any,
  output logic [$clog2(M_RULES+1)-1:0] alarm_rule
);
  header_classifier #(.Q(Q), .ENC_TYPE(ENC_TYPE)) u_hdr (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_sop     (in_sop),
    .in_data    (in_data),
    .home_we    (home_we),
    .home_be    (home_be),
    .home_wdata (home_wdata),
    .home       (home),
    .hdr_valid  (hdr_valid),
    .hdr_hit    (hdr_hit)
  );

  signature_matcher #(.Q(Q), .ENC_TYPE(ENC_TYPE)) u_sig (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_sop    (in_sop),
    .in_eop    (in_eop),
    .in_empty  (in_empty),
    .in_data   (in_data),
    .sig_valid (sig_valid),
    .sig_hit   (sig_hit)
  );

  // Header result of the latest packet, held until the next one's arrives.
  logic [M_RULES-1:0] hdr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         hdr_q <= '0;
    else if (hdr_valid) hdr_q <= hdr_hit;
  end

  // The header result of a packet is ready at most three clocks after its
  // eop symbol (when the packet is exactly one header long); the encoder
  // samples then.
  logic [2:0] eop_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) eop_d <= '0;
    else        eop_d <= {eop_d[1:0], in_valid & in_eop};
  end

  rule_encoder #(.M(M_RULES)) u_enc (
    .clk         (clk),
    .rst_n       (rst_n),
    .strobe      (eop_d[2]),
    .hdr_hit     (hdr_q),
    .sig_hit     (sig_hit),
    .alarm_valid (alarm_valid),
    .alarm       (alarm),
    .alarm_any   (alarm_any),
    .alarm_rule  (alarm_rule)
  );
endmodule
