// tb_rule_encoder: checks that an alarm needs both the header and the
// signature hit of a rule, the any-flag, the index of the lowest alarming
// rule and the one-clock output latency.
module tb_rule_encoder;
  localparam int M = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic strobe = 0, alarm_valid, alarm_any;
  logic [M-1:0] hdr_hit = 0, sig_hit = 0, alarm;
  logic [$clog2(M+1)-1:0] alarm_rule;
  rule_encoder #(.M(M)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      logic [M-1:0] e;
      int first;
      @(negedge clk);
      strobe = 1;
      hdr_hit = $urandom;
      sig_hit = $urandom;
      if (n % 3 == 0) sig_hit = sig_hit & ~hdr_hit;   // no alarm at all
      e = hdr_hit & sig_hit;
      first = 0;
      for (int r = M - 1; r >= 0; r--) if (e[r]) first = r;
      #1;
      checks++;
      if (alarm_valid !== 1'b0) begin failures++; $display("FAIL early alarm_valid"); end
      @(negedge clk);
      strobe = 0;
      hdr_hit = $urandom;
      sig_hit = $urandom;
      checks += 4;
      if (alarm_valid !== 1'b1) begin failures++; $display("FAIL alarm_valid"); end
      if (alarm !== e) begin failures++; $display("FAIL alarm %b expected %b", alarm, e); end
      if (alarm_any !== (|e)) begin failures++; $display("FAIL alarm_any"); end
      if (int'(alarm_rule) != first) begin failures++; $display("FAIL alarm_rule %0d expected %0d", alarm_rule, first); end
      @(negedge clk);
      checks++;
      if (alarm_valid !== 1'b0 || alarm !== e) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
