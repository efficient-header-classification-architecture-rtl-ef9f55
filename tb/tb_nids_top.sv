// tb_nids_top: end-to-end test of the intrusion detection front end at its
// default size (8 bytes per clock, type II encoder, the example rule set).
//
// Random IPv4/TCP/UDP packets are built around the rule headers, some fields
// are then disturbed, payloads are filled with random bytes and sometimes a
// rule's content string, and the HOME_NET buffer is rewritten from time to
// time.  The packet stream has random idle cycles.  A reference model
// computes, straight from the rule table, which rule headers and signatures
// each packet should hit; the header hits, signature hits and alarms of the
// design are compared with it, and their latencies (2 clocks after the last
// header symbol, 1 and 4 clocks after the eop symbol) are checked.  Each
// mechanism (exact, HOME_NET, range and shortened patterns, a HOME_NET
// rewrite changing a result, stalls, partial last symbols, alarms) is counted
// and must occur at least once.
module tb_nids_top;
  import hc_pkg::*;

  localparam int Q       = 8;
  localparam int EMPTY_W = 3;
  localparam int NPKT    = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0;
  logic [EMPTY_W-1:0] in_empty = '0;
  logic [Q-1:0][7:0] in_data = '0;
  logic home_we = 1'b0;
  logic [3:0] home_be = '0;
  logic [31:0] home_wdata = '0;
  logic [31:0] home;
  logic hdr_valid, sig_valid, alarm_valid, alarm_any;
  logic [M_RULES-1:0] hdr_hit, sig_hit, alarm;
  logic [$clog2(M_RULES+1)-1:0] alarm_rule;

  nids_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_exact_hit, n_home_hit, n_range_hit, n_range_miss, n_short_hit;
  int n_home_change, n_stall, n_partial, n_alarm, n_hdr_only, n_sig_only, n_shared;

  // reference model state
  logic [31:0] ref_home = 32'hC0A80100;
  logic [M_RULES-1:0] exp_hdr_q[$], exp_sig_q[$];
  int last_hdr_cyc_q[$], eop_cyc_q[$], eop_cyc_q2[$];
  logic [M_RULES-1:0] exp_alarm_hdr_q[$];
  int n_alarms_seen = 0;
  int tb_sym = 0;

  function automatic bit ip_ok(ip_spec_e sp, logic [31:0] want, logic [31:0] got, logic [31:0] h);
    case (sp)
      IP_EXACT: return got == want;
      IP_HOME:  return got == h;
      default:  return 1'b1;
    endcase
  endfunction

  function automatic bit port_ok(port_spec_e sp, logic [15:0] lo, logic [15:0] hi, logic [15:0] p);
    case (sp)
      PORT_EXACT: return p == lo;
      PORT_RANGE: return (p >= lo) && (p <= hi);
      default:    return 1'b1;
    endcase
  endfunction

  function automatic logic [M_RULES-1:0] ref_hdr(byte unsigned pkt[], logic [31:0] h);
    logic [M_RULES-1:0] r;
    logic [31:0] sip, dip;
    logic [15:0] sp, dp;
    sip = {pkt[12], pkt[13], pkt[14], pkt[15]};
    dip = {pkt[16], pkt[17], pkt[18], pkt[19]};
    sp  = {pkt[20], pkt[21]};
    dp  = {pkt[22], pkt[23]};
    for (int i = 0; i < M_RULES; i++) begin
      hdr_spec_t s;
      s = HDR_TABLE[RULE_HDR[i]];
      r[i] = (s.proto_any || pkt[9] == s.proto) &&
             ip_ok(s.sip_spec, s.sip, sip, h) && ip_ok(s.dip_spec, s.dip, dip, h) &&
             port_ok(s.sp_spec, s.sp_lo, s.sp_hi, sp) && port_ok(s.dp_spec, s.dp_lo, s.dp_hi, dp);
    end
    return r;
  endfunction

  function automatic logic [M_RULES-1:0] ref_sig(byte unsigned pkt[]);
    logic [M_RULES-1:0] r;
    for (int i = 0; i < M_RULES; i++) begin
      int len;
      len = int'(SIG_TABLE[i].len);
      r[i] = 1'b0;
      for (int st = 0; st + len <= pkt.size(); st++) begin
        bit ok;
        ok = 1'b1;
        for (int k = 0; k < len; k++)
          if (pkt[st + k] != SIG_TABLE[i].str[8*k +: 8]) ok = 1'b0;
        if (ok) r[i] = 1'b1;
      end
    end
    return r;
  endfunction

  // ------------------------------------------------------------ driving
  task automatic send_packet(byte unsigned pkt[]);
    int nsym;
    nsym = (pkt.size() + Q - 1) / Q;
    for (int s = 0; s < nsym; s++) begin
      while ($urandom_range(0, 3) == 0) begin   // idle cycle
        @(negedge clk);
        in_valid = 1'b0;
        if (s > 0) n_stall++;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_sop   = (s == 0);
      in_eop   = (s == nsym - 1);
      in_empty = (s == nsym - 1) ? EMPTY_W'(nsym * Q - pkt.size()) : '0;
      for (int j = 0; j < Q; j++)
        in_data[j] = (s * Q + j < pkt.size()) ? pkt[s * Q + j] : 8'($urandom);
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_sop = 1'b0;
    in_eop = 1'b0;
  endtask

  task automatic write_home(logic [31:0] a);
    @(negedge clk);
    home_we = 1'b1;
    home_be = 4'hF;
    home_wdata = a;
    @(negedge clk);
    home_we = 1'b0;
    ref_home = a;
  endtask

  function automatic logic [31:0] pick_ip(ip_spec_e sp, logic [31:0] v, logic [31:0] h);
    if (sp == IP_EXACT) return v;
    if (sp == IP_HOME)  return h;
    return $urandom;
  endfunction

  function automatic logic [15:0] pick_port(port_spec_e sp, logic [15:0] lo, logic [15:0] hi);
    if (sp == PORT_EXACT) return lo;
    if (sp == PORT_RANGE) begin
      case ($urandom_range(0, 3))
        0: return lo;
        1: return hi;
        2: return 16'(lo + $urandom_range(0, 32'(hi - lo)));
        default: return (lo > 0 && $urandom_range(0, 1) == 0) ? 16'(lo - 1)
                       : (hi < 16'hFFFF ? 16'(hi + 1) : 16'(lo - 1));
      endcase
    end
    return $urandom;
  endfunction

  task automatic make_packet(output byte unsigned pkt[], input logic [31:0] h);
    int hsel, plen;
    hdr_spec_t s;
    logic [31:0] sip, dip;
    logic [15:0] sp, dp;
    plen = 24 + $urandom_range(0, 40);
    pkt = new[plen];
    for (int i = 0; i < plen; i++) pkt[i] = 8'($urandom);
    pkt[0] = 8'h45;
    hsel = $urandom_range(0, N_HDR);   // N_HDR: fully random header
    if (hsel < N_HDR) begin
      s = HDR_TABLE[hsel];
      pkt[9] = s.proto;
      sip = pick_ip(s.sip_spec, s.sip, h);
      dip = pick_ip(s.dip_spec, s.dip, h);
      sp  = pick_port(s.sp_spec, s.sp_lo, s.sp_hi);
      dp  = pick_port(s.dp_spec, s.dp_lo, s.dp_hi);
      {pkt[12], pkt[13], pkt[14], pkt[15]} = sip;
      {pkt[16], pkt[17], pkt[18], pkt[19]} = dip;
      {pkt[20], pkt[21]} = sp;
      {pkt[22], pkt[23]} = dp;
      // sometimes disturb one header byte
      if ($urandom_range(0, 4) == 0) begin
        int b;
        b = $urandom_range(9, 23);
        pkt[b] = pkt[b] ^ 8'(1 << $urandom_range(0, 7));
      end
    end
    // sometimes plant a signature in the payload (or at the very end)
    if ($urandom_range(0, 2) != 0) begin
      int r, len, st;
      r = $urandom_range(0, M_RULES - 1);
      len = int'(SIG_TABLE[r].len);
      st = ($urandom_range(0, 3) == 0) ? plen - len : $urandom_range(24, plen - len);
      for (int k = 0; k < len; k++) pkt[st + k] = SIG_TABLE[r].str[8*k +: 8];
    end
  endtask

  // ------------------------------------------------------------ checking
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid) begin
        tb_sym = in_sop ? 0 : tb_sym + 1;
        if (tb_sym == (24 - 1) / Q) last_hdr_cyc_q.push_back(cyc);
      end
      if (in_valid && in_eop) begin
        eop_cyc_q.push_back(cyc);
        eop_cyc_q2.push_back(cyc);
      end
      if (hdr_valid) begin
        logic [M_RULES-1:0] e;
        int c0;
        e = exp_hdr_q.pop_front();
        c0 = last_hdr_cyc_q.pop_front();
        checks += 2;
        if (hdr_hit !== e) begin
          failures++;
          $display("FAIL hdr_hit %b expected %b", hdr_hit, e);
        end
        if (cyc - c0 != 2) begin
          failures++;
          $display("FAIL hdr latency %0d", cyc - c0);
        end
      end
      if (sig_valid) begin
        logic [M_RULES-1:0] e;
        int c0;
        e = exp_sig_q[0];
        c0 = eop_cyc_q.pop_front();
        checks += 2;
        if (sig_hit !== e) begin
          failures++;
          $display("FAIL sig_hit %b expected %b", sig_hit, e);
        end
        if (cyc - c0 != 1) begin
          failures++;
          $display("FAIL sig latency %0d", cyc - c0);
        end
      end
      if (alarm_valid) begin
        logic [M_RULES-1:0] e, eh, es;
        int c0, first;
        es = exp_sig_q.pop_front();
        eh = exp_alarm_hdr_q.pop_front();
        e  = eh & es;
        c0 = eop_cyc_q2.pop_front();
        first = 0;
        for (int i = M_RULES - 1; i >= 0; i--) if (e[i]) first = i;
        checks += 4;
        if (alarm !== e)            begin failures++; $display("FAIL alarm %b expected %b", alarm, e); end
        if (alarm_any !== (|e))     begin failures++; $display("FAIL alarm_any"); end
        if (int'(alarm_rule) != first) begin failures++; $display("FAIL alarm_rule %0d expected %0d", alarm_rule, first); end
        if (cyc - c0 != 4)          begin failures++; $display("FAIL alarm latency %0d", cyc - c0); end
        if (|e) n_alarm++;
        if (|(eh & ~es)) n_hdr_only++;
        if (|(es & ~eh)) n_sig_only++;
        n_alarms_seen++;
      end
    end
  end


  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned pkt[];
    logic [M_RULES-1:0] eh, es, eh_old;
    logic [31:0] prev_home = 32'hC0A80100;
    logic [31:0] homes [4] = '{32'hC0A80105, 32'h0A000001, 32'hC0A80106, 32'hAC100063};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NPKT; n++) begin
      if (n % 25 == 10) begin
        prev_home = ref_home;
        write_home(homes[(n / 25) % 4]);
      end
      make_packet(pkt, ref_home);
      eh = ref_hdr(pkt, ref_home);
      es = ref_sig(pkt);
      // would the previous HOME_NET have given another result?
      eh_old = ref_hdr(pkt, prev_home);
      if (eh != eh_old) n_home_change++;
      // rule 4: protocol only (shortest register); rule 6: exact addresses;
      // rules 0, 2, 5: HOME_NET; rules 3, 5: port ranges
      if (eh[4]) n_short_hit++;
      if (eh[6]) n_exact_hit++;
      if (eh[0] || eh[2] || eh[5]) n_home_hit++;
      if (eh[3] || eh[5]) n_range_hit++;
      if ((pkt[9] == 8'd6) && ({pkt[12], pkt[13], pkt[14], pkt[15]} == 32'h0A010203) && !eh[3])
        n_range_miss++;
      if (eh[0] && eh[1] && eh[7]) n_shared++;
      if ((pkt.size() % Q) != 0) n_partial++;
      exp_hdr_q.push_back(eh);
      exp_alarm_hdr_q.push_back(eh);
      exp_sig_q.push_back(es);
      send_packet(pkt);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_alarms_seen != NPKT || exp_hdr_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results for %0d packets", n_alarms_seen, NPKT);
    end
    $display("mechanisms: exact=%0d home=%0d range_hit=%0d range_miss=%0d short=%0d home_change=%0d stall=%0d partial=%0d alarm=%0d hdr_only=%0d sig_only=%0d shared=%0d",
             n_exact_hit, n_home_hit, n_range_hit, n_range_miss, n_short_hit, n_home_change,
             n_stall, n_partial, n_alarm, n_hdr_only, n_sig_only, n_shared);
    begin
      int cnt [12];
      cnt = '{n_exact_hit, n_home_hit, n_range_hit, n_range_miss, n_short_hit, n_home_change,
                       n_stall, n_partial, n_alarm, n_hdr_only, n_sig_only, n_shared};
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
