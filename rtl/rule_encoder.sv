// rule_encoder: combines header hits and signature hits into alarms.
//
// A rule raises an alarm only when both its header hit (from the header
// classification circuit) and its signature hit (from the payload signature
// matcher) are present for the same packet.  The encoder forms the per-rule
// AND, flags whether any rule alarmed, and encodes the lowest-numbered
// alarming rule as a binary index.
//
// Interface: when strobe is 1 the hit vectors of a finished packet are
// sampled; one clock later alarm_valid pulses with alarm (per rule),
// alarm_any and alarm_rule (index, 0 when none).  The AND rule is the
// paper's; the priority encoding and the registered output are this
// design's choice.
module rule_encoder #(
  parameter int M = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  strobe,
  input  logic [M-1:0]          hdr_hit,
  input  logic [M-1:0]          sig_hit,
  output logic                  alarm_valid,
  output logic [M-1:0]          alarm,
  output logic                  alarm_any,
  output logic [$clog2(M+1)-1:0] alarm_rule
);
  logic [M-1:0]           both;
  logic [$clog2(M+1)-1:0] first;

  assign both = hdr_hit & sig_hit;

  always_comb begin
    first = '0;
    for (int r = M - 1; r >= 0; r--)
      if (both[r]) first = ($clog2(M+1))'(r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alarm_valid <= 1'b0;
      alarm       <= '0;
      alarm_any   <= 1'b0;
      alarm_rule  <= '0;
    end else begin
      alarm_valid <= strobe;
      if (strobe) begin
        alarm      <= both;
        alarm_any  <= |both;
        alarm_rule <= first;
      end
    end
  end
endmodule
