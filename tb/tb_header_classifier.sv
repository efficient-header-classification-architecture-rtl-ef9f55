// tb_header_classifier: checks the full header classification circuit in a
// non-default configuration: two bytes per clock with a type I encoder.
//
// Packets are built around the example rule headers (or fully random),
// sometimes disturbed, and streamed with random idle cycles; HOME_NET is
// rewritten every 20 packets.  For each packet the per-rule header hits
// must equal a direct comparison of the packet fields with the rule table,
// and hdr_valid must come two clocks after the symbol holding byte 23.
module tb_header_classifier;
  import hc_pkg::*;
  localparam int Q = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, tb_sym = 0;
  int n_hits = 0, n_results = 0;

  logic in_valid = 0, in_sop = 0;
  logic [Q-1:0][7:0] in_data = '0;
  logic home_we = 0;
  logic [3:0] home_be = 0;
  logic [31:0] home_wdata = 0, home;
  logic hdr_valid;
  logic [M_RULES-1:0] hdr_hit;

  header_classifier #(.Q(Q), .ENC_TYPE(ENC_TYPE1)) dut (.*);

  logic [M_RULES-1:0] exp_q[$];
  int last_q[$];
  logic [31:0] ref_home = 32'hC0A80100;

  function automatic logic [M_RULES-1:0] ref_hdr(byte unsigned p[], logic [31:0] hn);
    logic [M_RULES-1:0] r;
    logic [31:0] sip, dip;
    logic [15:0] sp, dp;
    sip = {p[12], p[13], p[14], p[15]};
    dip = {p[16], p[17], p[18], p[19]};
    sp = {p[20], p[21]};
    dp = {p[22], p[23]};
    for (int i = 0; i < M_RULES; i++) begin
      hdr_spec_t s;
      bit ok;
      s = HDR_TABLE[RULE_HDR[i]];
      ok = s.proto_any || (p[9] == s.proto);
      if (s.sip_spec == IP_EXACT) ok &= (sip == s.sip);
      if (s.sip_spec == IP_HOME)  ok &= (sip == hn);
      if (s.dip_spec == IP_EXACT) ok &= (dip == s.dip);
      if (s.dip_spec == IP_HOME)  ok &= (dip == hn);
      if (s.sp_spec == PORT_EXACT) ok &= (sp == s.sp_lo);
      if (s.sp_spec == PORT_RANGE) ok &= (sp >= s.sp_lo) && (sp <= s.sp_hi);
      if (s.dp_spec == PORT_EXACT) ok &= (dp == s.dp_lo);
      if (s.dp_spec == PORT_RANGE) ok &= (dp >= s.dp_lo) && (dp <= s.dp_hi);
      r[i] = ok;
    end
    return r;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid) begin
        tb_sym = in_sop ? 0 : tb_sym + 1;
        if (tb_sym == 23 / Q) last_q.push_back(cyc);
      end
      if (hdr_valid) begin
        logic [M_RULES-1:0] e;
        int c0;
        e = exp_q.pop_front();
        c0 = last_q.pop_front();
        checks += 2;
        if (hdr_hit !== e) begin failures++; $display("FAIL hdr_hit %b expected %b", hdr_hit, e); end
        if (cyc - c0 != 2) begin failures++; $display("FAIL latency %0d", cyc - c0); end
        if (|e) n_hits++;
        n_results++;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned p[];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int hs, len;
      if (n % 20 == 7) begin
        @(negedge clk);
        home_we = 1; home_be = 4'hF;
        home_wdata = {8'd10, 8'd0, 8'd0, 8'($urandom_range(1, 3))};
        ref_home = home_wdata;
        @(negedge clk) home_we = 0;
      end
      len = 24 + 2 * $urandom_range(0, 6);
      p = new[len];
      foreach (p[i]) p[i] = 8'($urandom);
      hs = $urandom_range(0, N_HDR);
      if (hs < N_HDR) begin
        hdr_spec_t s;
        s = HDR_TABLE[hs];
        p[9] = s.proto;
        if (s.sip_spec != IP_ANY) {p[12], p[13], p[14], p[15]} = (s.sip_spec == IP_HOME) ? ref_home : s.sip;
        if (s.dip_spec != IP_ANY) {p[16], p[17], p[18], p[19]} = (s.dip_spec == IP_HOME) ? ref_home : s.dip;
        if (s.sp_spec != PORT_ANY) {p[20], p[21]} = 16'($urandom_range(s.sp_lo - 1, s.sp_hi));
        if (s.dp_spec != PORT_ANY) {p[22], p[23]} = 16'($urandom_range(s.dp_lo, s.dp_hi + 1));
        if ($urandom_range(0, 4) == 0) p[$urandom_range(9, 23)] ^= 8'h10;
      end
      exp_q.push_back(ref_hdr(p, ref_home));
      for (int k = 0; k < len / Q; k++) begin
        while ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1;
        in_sop = (k == 0);
        for (int j = 0; j < Q; j++) in_data[j] = p[k * Q + j];
      end
      @(negedge clk);
      in_valid = 0;
      in_sop = 0;
    end
    repeat (10) @(negedge clk);
    checks += 2;
    if (n_results != 300) begin failures++; $display("FAIL %0d results", n_results); end
    if (n_hits == 0) begin failures++; $display("FAIL no hits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
