// port_range_matcher: range matching of the source and destination ports.
//
// Four 16-bit comparators check the source port against the upper and lower
// bounds of its range and the destination port against the upper and lower
// bounds of its range.  In keeping with the shift-or registers, every signal
// is "0 = matches": a comparator outputs 1 when the port lies beyond its
// bound, the two comparators of a port are ORed, the result of each port is
// held in a buffer flip-flop, and the two buffers are ORed into miss.  So
// miss is 0 exactly when lo <= port <= hi holds for both ports, which lets a
// range be any interval of [0, 65535].
//
// Interface: sport/dport are the ports, *_lo/*_hi the bounds (constants
// for a fixed rule).  Timing: miss reflects the ports and bounds present one
// clock earlier (the buffer stage).  The four comparators, the buffers and
// the 16-bit bounds are the paper's; the active-low coding is this design's.
module port_range_matcher (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] sport,
  input  logic [15:0] dport,
  input  logic [15:0] sp_lo,
  input  logic [15:0] sp_hi,
  input  logic [15:0] dp_lo,
  input  logic [15:0] dp_hi,
  output logic        miss
);
  logic sp_above, sp_below, dp_above, dp_below;
  logic sp_buf_q, dp_buf_q;

  assign sp_above = (sport > sp_hi);
  assign sp_below = (sport < sp_lo);
  assign dp_above = (dport > dp_hi);
  assign dp_below = (dport < dp_lo);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_buf_q <= 1'b1;
      dp_buf_q <= 1'b1;
    end else begin
      sp_buf_q <= sp_above | sp_below;
      dp_buf_q <= dp_above | dp_below;
    end
  end

  assign miss = sp_buf_q | dp_buf_q;
endmodule
