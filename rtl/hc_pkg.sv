// hc_pkg: types, constants and the example rule set shared by the header
// classification design.
//
// Packet bytes arrive as a stream of symbols of Q bytes; byte k of a packet
// sits in symbol k/Q, lane k%Q (lane 0 is the earliest byte on the wire).
// The classifier looks at an IPv4 packet without options followed by a TCP
// or UDP header, so the five header fields sit at fixed byte offsets:
// protocol at 9, source IP at 12..15, destination IP at 16..19, source port
// at 20..21 and destination port at 22..23 (all big-endian).  Only these 24
// bytes are used for header classification.
//
// A rule header is described by an hdr_spec_t.  IP addresses may be "any",
// an exact address, or HOME_NET (the run-time programmable protected
// network).  Ports may be "any", exact (matched by the shift-or register) or
// a range [lo, hi] (matched by comparators).  The rule set below is an example
// chosen to exercise every kind of field; replace HDR_TABLE, RULE_HDR and
// SIG_TABLE to build a classifier for another rule set.
package hc_pkg;

  localparam int BYTE_W    = 8;
  localparam int HDR_BYTES = 24;   // bytes 0..23 hold all five header fields
  localparam int OFF_PROTO = 9;
  localparam int OFF_SIP   = 12;
  localparam int OFF_DIP   = 16;
  localparam int OFF_SPORT = 20;
  localparam int OFF_DPORT = 22;

  // Symbol encoder kinds (section "type I" / "type II").  Type I with Q = 1
  // is the basic symbol encoder.
  localparam int ENC_TYPE1 = 1;
  localparam int ENC_TYPE2 = 2;

  typedef enum logic [1:0] {IP_ANY = 2'd0, IP_EXACT = 2'd1, IP_HOME = 2'd2} ip_spec_e;
  typedef enum logic [1:0] {PORT_ANY = 2'd0, PORT_EXACT = 2'd1, PORT_RANGE = 2'd2} port_spec_e;

  typedef struct packed {
    ip_spec_e   sip_spec;
    logic [31:0] sip;
    ip_spec_e   dip_spec;
    logic [31:0] dip;
    logic       proto_any;
    logic [7:0] proto;
    port_spec_e sp_spec;
    logic [15:0] sp_lo;
    logic [15:0] sp_hi;     // equal to sp_lo for an exact port
    port_spec_e dp_spec;
    logic [15:0] dp_lo;
    logic [15:0] dp_hi;
  } hdr_spec_t;

  // Content signature of a rule: len bytes, byte 0 in str[7:0].
  localparam int SIG_MAX = 8;
  typedef struct packed {
    logic [3:0]             len;
    logic [SIG_MAX*8-1:0]   str;
  } sig_spec_t;

  // ---------------------------------------------------------------- rules
  localparam int N_HDR   = 6;   // distinct headers = header modules
  localparam int M_RULES = 8;   // rules

  localparam hdr_spec_t HDR_TABLE [N_HDR] = '{
    // 0: tcp any any -> HOME_NET 80
    '{IP_ANY, 32'h0, IP_HOME, 32'h0, 1'b0, 8'd6,
      PORT_ANY, 16'd0, 16'hFFFF, PORT_EXACT, 16'd80, 16'd80},
    // 1: udp any any -> HOME_NET 53
    '{IP_ANY, 32'h0, IP_HOME, 32'h0, 1'b0, 8'd17,
      PORT_ANY, 16'd0, 16'hFFFF, PORT_EXACT, 16'd53, 16'd53},
    // 2: tcp 10.1.2.3 any -> any 6000:6063
    '{IP_EXACT, 32'h0A010203, IP_ANY, 32'h0, 1'b0, 8'd6,
      PORT_ANY, 16'd0, 16'hFFFF, PORT_RANGE, 16'd6000, 16'd6063},
    // 3: icmp any any -> any any
    '{IP_ANY, 32'h0, IP_ANY, 32'h0, 1'b0, 8'd1,
      PORT_ANY, 16'd0, 16'hFFFF, PORT_ANY, 16'd0, 16'hFFFF},
    // 4: tcp HOME_NET 1024:65535 -> 192.168.7.20 22
    '{IP_HOME, 32'h0, IP_EXACT, 32'hC0A80714, 1'b0, 8'd6,
      PORT_RANGE, 16'd1024, 16'hFFFF, PORT_EXACT, 16'd22, 16'd22},
    // 5: udp 172.16.0.9 any -> 172.16.0.10 any
    '{IP_EXACT, 32'hAC100009, IP_EXACT, 32'hAC10000A, 1'b0, 8'd17,
      PORT_ANY, 16'd0, 16'hFFFF, PORT_ANY, 16'd0, 16'hFFFF}
  };

  // Header module used by each rule (rules sharing a header share a module).
  localparam int RULE_HDR [M_RULES] = '{0, 0, 1, 2, 3, 4, 5, 0};

  // Content signature of each rule.
  localparam sig_spec_t SIG_TABLE [M_RULES] = '{
    '{4'd8, "mda/ TEG"},          // "GET /adm"
    '{4'd7, {8'h00, "exe.dmc"}},  // "cmd.exe"
    '{4'd7, {8'h00, "noisrev"}},  // "version"
    '{4'd5, {24'h0, "mretx"}},    // "xterm"
    '{4'd4, {32'h0, "GNIP"}},     // "PING"
    '{4'd5, {24'h0, "1-HSS"}},    // "SSH-1"
    '{4'd4, {32'h0, "toor"}},     // "root"
    '{4'd6, {16'h0, "dwssap"}}    // "passwd"
  };

  // ------------------------------------------------------------ functions
  // Expected byte value at header offset b for a spec (exact fields only).
  function automatic logic [7:0] spec_byte(hdr_spec_t s, int b);
    logic [7:0] v;
    v = 8'h00;
    if (b == OFF_PROTO)                          v = s.proto;
    else if (b >= OFF_SIP && b < OFF_SIP + 4)    v = s.sip[8*(3-(b-OFF_SIP)) +: 8];
    else if (b >= OFF_DIP && b < OFF_DIP + 4)    v = s.dip[8*(3-(b-OFF_DIP)) +: 8];
    else if (b >= OFF_SPORT && b < OFF_SPORT + 2) v = s.sp_lo[8*(1-(b-OFF_SPORT)) +: 8];
    else if (b >= OFF_DPORT && b < OFF_DPORT + 2) v = s.dp_lo[8*(1-(b-OFF_DPORT)) +: 8];
    return v;
  endfunction

  // Fixed pattern bytes of a spec, byte b at index b.
  function automatic logic [HDR_BYTES-1:0][7:0] spec_pattern(hdr_spec_t s);
    logic [HDR_BYTES-1:0][7:0] p;
    for (int b = 0; b < HDR_BYTES; b++) p[b] = spec_byte(s, b);
    return p;
  endfunction

  // 1 where header byte b is compared against a fixed pattern byte.
  function automatic logic [HDR_BYTES-1:0] spec_care(hdr_spec_t s);
    logic [HDR_BYTES-1:0] c;
    c = '0;
    if (!s.proto_any) c[OFF_PROTO] = 1'b1;
    if (s.sip_spec == IP_EXACT) c[OFF_SIP +: 4] = 4'hF;
    if (s.dip_spec == IP_EXACT) c[OFF_DIP +: 4] = 4'hF;
    if (s.sp_spec == PORT_EXACT) c[OFF_SPORT +: 2] = 2'b11;
    if (s.dp_spec == PORT_EXACT) c[OFF_DPORT +: 2] = 2'b11;
    return c;
  endfunction

  // 1 where header byte b is compared against the HOME_NET buffer.
  function automatic logic [HDR_BYTES-1:0] spec_home(hdr_spec_t s);
    logic [HDR_BYTES-1:0] c;
    c = '0;
    if (s.sip_spec == IP_HOME) c[OFF_SIP +: 4] = 4'hF;
    if (s.dip_spec == IP_HOME) c[OFF_DIP +: 4] = 4'hF;
    return c;
  endfunction

  // Index of the lowest / highest set bit of a header byte mask (-1 if none).
  function automatic int mask_first(logic [HDR_BYTES-1:0] m);
    for (int i = 0; i < HDR_BYTES; i++) if (m[i]) return i;
    return -1;
  endfunction

  function automatic int mask_last(logic [HDR_BYTES-1:0] m);
    for (int i = HDR_BYTES - 1; i >= 0; i--) if (m[i]) return i;
    return -1;
  endfunction

endpackage
