// tb_header_module: checks single header modules against a direct field
// comparison.
//
// Two modules are tested side by side on the same headers: one processing
// one byte per clock with a basic encoder, for the rule "tcp HOME_NET
// 1024:65535 -> 192.168.7.20 22" (HOME_NET multiplexers, a port range and
// exact fields), and one processing eight bytes per clock with a type II
// encoder, for "tcp 10.1.2.3 any -> any 6000:6063".  The encoder outputs
// and symbol positions are generated by the testbench itself.  Headers are
// built to fit either rule and then randomly disturbed; the HOME_NET value
// changes between headers.  hit is checked two clocks after the last
// header symbol.
module tb_header_module;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_hit_a = 0, n_miss_a = 0, n_hit_b = 0, n_miss_b = 0;

  localparam hdr_spec_t SPEC_A = HDR_TABLE[4];
  localparam hdr_spec_t SPEC_B = HDR_TABLE[2];

  // module A: Q = 1, type I (basic) encoder
  logic va = 0;
  logic [4:0] idx_a = '0;
  logic [0:0][255:0] enc1_a = '1;
  logic [0:0][1:0][15:0] enc2_a = '1;
  logic [31:0] home = 32'hC0A80100;
  logic [15:0] sport = 0, dport = 0;
  logic hit_a;
  header_module #(.Q(1), .ENC_TYPE(ENC_TYPE1), .SPEC(SPEC_A), .IDX_W(5)) dut_a (
    .clk, .rst_n, .sym_valid(va), .sym_idx(idx_a), .enc1_n(enc1_a), .enc2_n(enc2_a),
    .home, .sport, .dport, .hit(hit_a));

  // module B: Q = 8, type II encoder
  logic vb = 0;
  logic [1:0] idx_b = '0;
  logic [7:0][255:0] enc1_b = '1;
  logic [7:0][1:0][15:0] enc2_b = '1;
  logic hit_b;
  header_module #(.Q(8), .ENC_TYPE(ENC_TYPE2), .SPEC(SPEC_B), .IDX_W(2)) dut_b (
    .clk, .rst_n, .sym_valid(vb), .sym_idx(idx_b), .enc1_n(enc1_b), .enc2_n(enc2_b),
    .home, .sport, .dport, .hit(hit_b));

  function automatic bit ref_match(hdr_spec_t s, byte unsigned h[24], logic [31:0] hn);
    logic [31:0] sip, dip;
    logic [15:0] sp, dp;
    bit ok;
    sip = {h[12], h[13], h[14], h[15]};
    dip = {h[16], h[17], h[18], h[19]};
    sp = {h[20], h[21]};
    dp = {h[22], h[23]};
    ok = s.proto_any || (h[9] == s.proto);
    if (s.sip_spec == IP_EXACT) ok &= (sip == s.sip);
    if (s.sip_spec == IP_HOME)  ok &= (sip == hn);
    if (s.dip_spec == IP_EXACT) ok &= (dip == s.dip);
    if (s.dip_spec == IP_HOME)  ok &= (dip == hn);
    if (s.sp_spec == PORT_EXACT) ok &= (sp == s.sp_lo);
    if (s.sp_spec == PORT_RANGE) ok &= (sp >= s.sp_lo) && (sp <= s.sp_hi);
    if (s.dp_spec == PORT_EXACT) ok &= (dp == s.dp_lo);
    if (s.dp_spec == PORT_RANGE) ok &= (dp >= s.dp_lo) && (dp <= s.dp_hi);
    return ok;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned h[24];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      hdr_spec_t s;
      for (int i = 0; i < 24; i++) h[i] = 8'($urandom);
      if (n % 10 == 5) home = {8'hC0, 8'hA8, 8'($urandom_range(0, 3)), 8'($urandom_range(0, 3))};
      s = (n % 2) ? SPEC_A : SPEC_B;
      h[9] = s.proto;
      {h[12], h[13], h[14], h[15]} = (s.sip_spec == IP_HOME) ? home : s.sip;
      {h[16], h[17], h[18], h[19]} = (s.dip_spec == IP_EXACT) ? s.dip : 32'($urandom);
      {h[20], h[21]} = (s.sp_spec == PORT_RANGE) ? 16'($urandom_range(s.sp_lo - 2, s.sp_hi)) : 16'($urandom);
      {h[22], h[23]} = (s.dp_spec == PORT_EXACT) ? s.dp_lo : 16'($urandom_range(s.dp_lo - 3, s.dp_hi + 3));
      if ($urandom_range(0, 3) == 0) h[$urandom_range(9, 23)] ^= 8'(1 << $urandom_range(0, 7));
      sport = {h[20], h[21]};
      dport = {h[22], h[23]};
      // Q = 1 stream: 24 symbols, with random stalls
      fork
        begin
          for (int k = 0; k < 24; k++) begin
            while ($urandom_range(0, 4) == 0) begin @(negedge clk); va = 0; end
            @(negedge clk);
            va = 1;
            idx_a = 5'(k);
            enc1_a[0] = '1;
            enc1_a[0][h[k]] = 1'b0;
          end
          @(negedge clk) va = 0;
        end
        begin
          for (int k = 0; k < 3; k++) begin
            @(negedge clk);
            vb = 1;
            idx_b = 2'(k);
            for (int j = 0; j < 8; j++) begin
              enc2_b[j][1] = '1; enc2_b[j][1][h[8*k+j] >> 4] = 1'b0;
              enc2_b[j][0] = '1; enc2_b[j][0][h[8*k+j] & 8'hF] = 1'b0;
            end
          end
          @(negedge clk) vb = 0;
        end
      join
      @(negedge clk);
      checks += 2;
      if (hit_a !== ref_match(SPEC_A, h, home)) begin failures++; $display("FAIL A n=%0d hit=%b", n, hit_a); end
      if (hit_b !== ref_match(SPEC_B, h, home)) begin failures++; $display("FAIL B n=%0d hit=%b", n, hit_b); end
      if (hit_a) n_hit_a++; else n_miss_a++;
      if (hit_b) n_hit_b++; else n_miss_b++;
    end
    checks++;
    if (n_hit_a == 0 || n_miss_a == 0 || n_hit_b == 0 || n_miss_b == 0) begin
      failures++;
      $display("FAIL coverage %0d %0d %0d %0d", n_hit_a, n_miss_a, n_hit_b, n_miss_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
