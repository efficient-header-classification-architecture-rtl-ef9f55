// tb_port_range_matcher: checks the range comparators and their buffer.
//
// Random ports and random bounds (including ports equal to and one beyond
// each bound) are applied every clock; one clock later miss must be 0
// exactly when both ports lie inside their closed ranges.
module tb_port_range_matcher;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] sport = 0, dport = 0, sp_lo = 0, sp_hi = 0, dp_lo = 0, dp_hi = 0;
  logic miss;
  port_range_matcher dut (.*);

  function automatic logic [15:0] near(logic [15:0] lo, logic [15:0] hi);
    case ($urandom_range(0, 5))
      0: return lo;
      1: return hi;
      2: return 16'(lo - 1);
      3: return 16'(hi + 1);
      default: return $urandom;
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_miss, n_in = 0, n_out = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] a, b;
      @(negedge clk);
      a = $urandom; b = $urandom;
      sp_lo = (a < b) ? a : b; sp_hi = (a < b) ? b : a;
      a = $urandom; b = $urandom;
      if ($urandom_range(0, 3) == 0) b = a;
      dp_lo = (a < b) ? a : b; dp_hi = (a < b) ? b : a;
      sport = near(sp_lo, sp_hi);
      dport = near(dp_lo, dp_hi);
      exp_miss = !((sport >= sp_lo) && (sport <= sp_hi) && (dport >= dp_lo) && (dport <= dp_hi));
      @(negedge clk);
      checks++;
      if (miss !== exp_miss) begin
        failures++;
        $display("FAIL sp=%0d [%0d,%0d] dp=%0d [%0d,%0d] miss=%b", sport, sp_lo, sp_hi, dport, dp_lo, dp_hi, miss);
      end
      if (exp_miss) n_out = 1; else n_in = 1;
    end
    checks++;
    if (!(n_in && n_out)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
