// header_classifier: the header classification circuit.
//
// One header_module per distinct rule header (N_HDR of them) listens to the
// packet stream in parallel.  All of them share one symbol encoder (type I
// or type II, chosen by ENC_TYPE) and one HOME_NET buffer; rules with the
// same header share a module, and RULE_HDR fans the module hits out to the
// M_RULES rule hits.  A capture register collects the two port fields as
// they pass so that the range comparators can see them whole.
//
// Interface: a symbol of Q bytes (byte 0 of the packet in lane 0 of the sop
// symbol) is taken when in_valid is 1.  Packets must be at least HDR_BYTES
// long; the HOME_NET buffer is written through home_we/home_be/home_wdata
// and should be changed only between packets.  hdr_valid pulses two clocks
// after the symbol holding the last header byte is accepted; in that cycle
// hdr_hit holds one bit per rule.  One symbol per clock is accepted, so the
// throughput is 8*Q bits per clock.  The module arrangement and shared
// encoder follow the paper; the port capture and the result timing are this
// design's.
module header_classifier
  import hc_pkg::*;
#(
  parameter int Q        = 8,
  parameter int ENC_TYPE = ENC_TYPE2,
  parameter logic [31:0] HOME_RESET = 32'hC0A80100
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sop,
  input  logic [Q-1:0][7:0]    in_data,
  input  logic                 home_we,
  input  logic [3:0]           home_be,
  input  logic [31:0]          home_wdata,
  output logic [31:0]          home,
  output logic                 hdr_valid,
  output logic [M_RULES-1:0]   hdr_hit
);
  localparam int HDR_SYMS = HDR_BYTES / Q;
  localparam int IDX_W    = $clog2(HDR_SYMS + 1);
  localparam int LAST_HDR_SYM = (HDR_BYTES - 1) / Q;

  initial assert (Q == 1 || Q == 2 || Q == 4 || Q == 8)
    else $fatal(1, "header_classifier: Q must be 1, 2, 4 or 8");

  logic [IDX_W-1:0] sym_idx;

  packet_framer #(.Q(Q)) u_framer (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_sop   (in_sop),
    .sym_idx  (sym_idx)
  );

  // ---------------------------------------------------- shared encoder
  logic [Q-1:0][255:0]     enc1_n;
  logic [Q-1:0][1:0][15:0] enc2_n;

  if (ENC_TYPE == ENC_TYPE1) begin : g_enc1
    symbol_encoder_t1 #(.Q(Q), .CHAR_W(8)) u_enc (.sym(in_data), .enc_n(enc1_n));
    assign enc2_n = '1;
  end else begin : g_enc2
    symbol_encoder_t2 #(.Q(Q)) u_enc (.sym(in_data), .enc_n(enc2_n));
    assign enc1_n = '1;
  end

  home_net_buffer #(.RESET_ADDR(HOME_RESET)) u_home (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (home_we),
    .wr_be   (home_be),
    .wr_data (home_wdata),
    .home    (home)
  );

  // ---------------------------------------------------- port capture
  logic [3:0][7:0] port_q;   // bytes 20..23 in wire order
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_q <= '0;
    end else if (in_valid) begin
      for (int p = 0; p < 4; p++)
        if (sym_idx == IDX_W'((OFF_SPORT + p) / Q))
          port_q[p] <= in_data[(OFF_SPORT + p) % Q];
    end
  end

  logic [15:0] sport, dport;
  assign sport = {port_q[0], port_q[1]};
  assign dport = {port_q[2], port_q[3]};

  // ---------------------------------------------------- header modules
  logic [N_HDR-1:0] mod_hit;

  for (genvar h = 0; h < N_HDR; h++) begin : g_mod
    header_module #(
      .Q        (Q),
      .ENC_TYPE (ENC_TYPE),
      .SPEC     (HDR_TABLE[h]),
      .IDX_W    (IDX_W)
    ) u_mod (
      .clk       (clk),
      .rst_n     (rst_n),
      .sym_valid (in_valid),
      .sym_idx   (sym_idx),
      .enc1_n    (enc1_n),
      .enc2_n    (enc2_n),
      .home      (home),
      .sport     (sport),
      .dport     (dport),
      .hit       (mod_hit[h])
    );
  end

  for (genvar r = 0; r < M_RULES; r++) begin : g_rule
    assign hdr_hit[r] = mod_hit[RULE_HDR[r]];
  end

  // ---------------------------------------------------- result timing
  logic last_d1, last_d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_d1 <= 1'b0;
      last_d2 <= 1'b0;
    end else begin
      last_d1 <= in_valid && (sym_idx == IDX_W'(LAST_HDR_SYM));
      last_d2 <= last_d1;
    end
  end
  assign hdr_valid = last_d2;
endmodule
