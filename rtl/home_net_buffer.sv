// home_net_buffer: storage for the HOME_NET address pattern.
//
// Rules whose source or destination address is HOME_NET compare the packet
// against the protected network, which depends on where the detector is
// installed.  Their shift-or registers reach the symbol encoder through
// multiplexers instead of fixed wires, and the multiplexer selects come from
// this buffer: the four bytes of the HOME_NET address.  With the type II
// encoder each byte is used as two 4-bit selects, with type I as one 8-bit
// select.  The buffer is rewritten byte by byte when the protected network
// changes; it should be written between packets.
//
// Interface: wr_en with byte enables wr_be (bit 3 = first address byte on
// the wire) loads wr_data; home holds the address, ready one clock after the
// write.  RESET_ADDR is the value after reset.  The buffer and its role are
// the paper's; the byte-enable write port and reset value are this design's.
module home_net_buffer #(
  parameter logic [31:0] RESET_ADDR = 32'hC0A80100   // 192.168.1.0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [3:0]  wr_be,
  input  logic [31:0] wr_data,
  output logic [31:0] home
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      home <= RESET_ADDR;
    end else if (wr_en) begin
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) home[8*b +: 8] <= wr_data[8*b +: 8];
    end
  end
endmodule
