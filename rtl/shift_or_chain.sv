// shift_or_chain: the shift register of the shift-or algorithm.
//
// For a pattern of STAGES symbols the register holds STAGES-1 flip-flops
// FF_1..FF_(m-1) and STAGES OR gates.  OR gate i combines the state bit of
// the previous stage, R_j[i-1], with the mismatch bit S_c[i] supplied by the
// symbol encoder, giving R_(j+1)[i] = R_j[i-1] OR S_c[i]; the first gate sees
// R_j[0] = 0.  FF_i stores the output of OR gate i when a symbol is
// accepted.  The output of the last OR gate, match_n, is the check point: it
// is 0 in the cycle in which the last symbol of the pattern is presented and
// the whole pattern has been seen.
//
// Interface: s_n[i-1] is S_c[i] (1 = symbol differs from pattern symbol i).
// en accepts the current symbol.  restart makes the gates treat the stored
// state as all ones, so no partial match carries into the current symbol
// (used at the start of a packet).  Reset sets the state to ones, the
// initial condition R_0[i] = 1.  match_n is combinational from s_n.
// The structure is the paper's; en, restart and the reset are this
// design's additions for a stalling packet stream.
module shift_or_chain #(
  parameter int STAGES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              restart,
  input  logic [STAGES-1:0] s_n,
  output logic              match_n,
  output logic [STAGES-1:0] r_next     // R_(j+1)[1..m], for observation
);
  initial assert (STAGES >= 1) else $fatal(1, "shift_or_chain: STAGES must be >= 1");

  logic [STAGES-1:0] prev;   // R_j[i-1] as seen by OR gate i

  if (STAGES == 1) begin : g_one
    assign prev = 1'b0;
  end else begin : g_ff
    logic [STAGES-2:0] ff_q;   // FF_1 .. FF_(m-1)
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   ff_q <= '1;
      else if (en)  ff_q <= r_next[STAGES-2:0];
    end
    assign prev = {(restart ? {(STAGES-1){1'b1}} : ff_q), 1'b0};
  end

  assign r_next  = prev | s_n;
  assign match_n = r_next[STAGES-1];
endmodule
