// tb_signature_matcher: checks payload signature matching in a
// non-default configuration: four bytes per clock with a type I encoder.
//
// Random packets of random length receive zero, one or two of the example
// rule strings at random offsets, including the very end of a packet (a
// partial last symbol) and across the end of one packet and the start of the
// next (which must not match).  After each packet the per-rule hits must
// equal a byte-by-byte search of the packet, one clock after its eop symbol.
module tb_signature_matcher;
  import hc_pkg::*;
  localparam int Q = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  int n_hits = 0, n_results = 0, n_tail = 0, n_split = 0;

  logic in_valid = 0, in_sop = 0, in_eop = 0;
  logic [1:0] in_empty = 0;
  logic [Q-1:0][7:0] in_data = '0;
  logic sig_valid;
  logic [M_RULES-1:0] sig_hit;

  signature_matcher #(.Q(Q), .ENC_TYPE(ENC_TYPE1)) dut (.*);

  logic [M_RULES-1:0] exp_q[$];
  int eop_q[$];

  function automatic logic [M_RULES-1:0] ref_sig(byte unsigned p[]);
    logic [M_RULES-1:0] r;
    for (int i = 0; i < M_RULES; i++) begin
      int len;
      len = int'(SIG_TABLE[i].len);
      r[i] = 1'b0;
      for (int st = 0; st + len <= p.size(); st++) begin
        bit ok;
        ok = 1'b1;
        for (int k = 0; k < len; k++) if (p[st + k] != SIG_TABLE[i].str[8*k +: 8]) ok = 1'b0;
        if (ok) r[i] = 1'b1;
      end
    end
    return r;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_eop) eop_q.push_back(cyc);
      if (sig_valid) begin
        logic [M_RULES-1:0] e;
        int c0;
        e = exp_q.pop_front();
        c0 = eop_q.pop_front();
        checks += 2;
        if (sig_hit !== e) begin failures++; $display("FAIL sig_hit %b expected %b", sig_hit, e); end
        if (cyc - c0 != 1) begin failures++; $display("FAIL latency %0d", cyc - c0); end
        if (|e) n_hits++;
        n_results++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned p[];
    int split_rule = -1, split_cut = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int len, nsym;
      len = $urandom_range(5, 40);
      p = new[len];
      foreach (p[i]) p[i] = 8'("a" + $urandom_range(0, 25));
      // second half of a string cut at the end of the previous packet
      if (split_rule >= 0) begin
        for (int k = split_cut; k < int'(SIG_TABLE[split_rule].len); k++)
          p[k - split_cut] = SIG_TABLE[split_rule].str[8*k +: 8];
        split_rule = -1;
      end
      for (int t = 0; t < $urandom_range(0, 2); t++) begin
        int r, sl, st;
        r = $urandom_range(0, M_RULES - 1);
        sl = int'(SIG_TABLE[r].len);
        if (sl <= len) begin
          st = ($urandom_range(0, 2) == 0) ? len - sl : $urandom_range(0, len - sl);
          if (st == len - sl && (len % Q) != 0) n_tail++;
          for (int k = 0; k < sl; k++) p[st + k] = SIG_TABLE[r].str[8*k +: 8];
        end
      end
      // first half of a string at the very end of this packet
      if ($urandom_range(0, 5) == 0) begin
        split_rule = $urandom_range(0, M_RULES - 1);
        split_cut = $urandom_range(1, int'(SIG_TABLE[split_rule].len) - 1);
        if (split_cut <= len) begin
          for (int k = 0; k < split_cut; k++) p[len - split_cut + k] = SIG_TABLE[split_rule].str[8*k +: 8];
          n_split++;
        end else split_rule = -1;
      end
      exp_q.push_back(ref_sig(p));
      nsym = (len + Q - 1) / Q;
      for (int k = 0; k < nsym; k++) begin
        while ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1;
        in_sop = (k == 0);
        in_eop = (k == nsym - 1);
        in_empty = (k == nsym - 1) ? 2'(nsym * Q - len) : 2'd0;
        // bytes past the end repeat the start of a string, to catch
        // matches in empty lanes
        for (int j = 0; j < Q; j++)
          in_data[j] = (k * Q + j < len) ? p[k * Q + j] : SIG_TABLE[0].str[8*(k * Q + j - len) +: 8];
      end
      @(negedge clk);
      in_valid = 0; in_sop = 0; in_eop = 0;
    end
    repeat (5) @(negedge clk);
    checks += 4;
    if (n_results != 400) begin failures++; $display("FAIL %0d results", n_results); end
    if (n_hits == 0) begin failures++; $display("FAIL no hits"); end
    if (n_tail == 0) begin failures++; $display("FAIL no tail strings"); end
    if (n_split == 0) begin failures++; $display("FAIL no split strings"); end
    $display("hits=%0d tail=%0d split=%0d", n_hits, n_tail, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
