// packet_framer: position of the current symbol within the packet header.
//
// Because header fields sit at fixed offsets, every shift-or register knows
// in which symbol its pattern ends; this counter tells it which symbol is on
// the input.  sym_idx is 0 for the symbol flagged in_sop and counts accepted
// symbols after it, saturating at HDR_SYMS (= past the header).
//
// Interface: in_valid accepts a symbol, in_sop marks the first symbol of a
// packet.  sym_idx is combinational (valid in the cycle the symbol is
// offered).  This counter is this design's own; the paper only states that
// header locations are fixed.
module packet_framer #(
  parameter int Q        = 8,
  parameter int HDR_SYMS = hc_pkg::HDR_BYTES / Q,
  parameter int IDX_W    = $clog2(HDR_SYMS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sop,
  output logic [IDX_W-1:0] sym_idx
);
  logic [IDX_W-1:0] cnt_q;

  assign sym_idx = in_sop ? '0 : cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cnt_q <= IDX_W'(HDR_SYMS);
    else if (in_valid)
      cnt_q <= (sym_idx == IDX_W'(HDR_SYMS)) ? IDX_W'(HDR_SYMS) : sym_idx + 1'b1;
  end
endmodule
