// tb_shift_or_chain: checks the shift-or register against the recurrence.
//
// Part 1 replays the textbook example (pattern "aab" in text "acaab") and
// checks that the check point is 0 exactly after the fifth character.
// Part 2 drives a 4-stage register with random text over a 3-letter
// alphabet, random stalls and random restarts, builds the mismatch bits
// from the pattern directly, and compares the check point with a direct
// comparison of the last four accepted characters since the last restart.
module tb_shift_or_chain;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- part 1: m = 3
  logic en3 = 1'b0, rs3 = 1'b0;
  logic [2:0] s3 = '1, rn3;
  logic m3;
  shift_or_chain #(.STAGES(3)) dut3 (.clk, .rst_n, .en(en3), .restart(rs3), .s_n(s3), .match_n(m3), .r_next(rn3));

  // ---- part 2: m = 4
  logic en4 = 1'b0, rs4 = 1'b0;
  logic [3:0] s4 = '1, rn4;
  logic m4;
  shift_or_chain #(.STAGES(4)) dut4 (.clk, .rst_n, .en(en4), .restart(rs4), .s_n(s4), .match_n(m4), .r_next(rn4));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned pat3 [3] = '{"a", "a", "b"};
    byte unsigned txt  [5] = '{"a", "c", "a", "a", "b"};
    byte unsigned pat4 [4] = '{"b", "a", "c", "a"};
    byte unsigned hist [$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < 5; j++) begin
      @(negedge clk);
      en3 = 1'b1;
      for (int i = 0; i < 3; i++) s3[i] = (txt[j] != pat3[i]);
      #1;
      checks++;
      if (m3 !== (j == 4 ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL example j=%0d match_n=%b", j + 1, m3);
      end
    end
    @(negedge clk) en3 = 1'b0;

    for (int n = 0; n < 2000; n++) begin
      byte unsigned c;
      bit exp_match;
      @(negedge clk);
      en4 = ($urandom_range(0, 4) != 0);
      rs4 = ($urandom_range(0, 30) == 0);
      c = 8'("a" + $urandom_range(0, 2));
      for (int i = 0; i < 4; i++) s4[i] = (c != pat4[i]);
      if (rs4 && en4) hist.delete();
      #1;
      exp_match = 0;
      if (hist.size() >= 3) begin
        int k;
        k = hist.size();
        exp_match = (hist[k-3] == pat4[0]) && (hist[k-2] == pat4[1]) &&
                    (hist[k-1] == pat4[2]) && (c == pat4[3]);
      end
      checks++;
      if (m4 !== !exp_match) begin
        failures++;
        $display("FAIL random n=%0d match_n=%b expected %b", n, m4, !exp_match);
      end
      if (en4) hist.push_back(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
