// tb_home_net_buffer: checks reset value and byte-enabled writes of the
// HOME_NET buffer against a model.
module tb_home_net_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0;
  logic [3:0] wr_be = 0;
  logic [31:0] wr_data = 0, home, model;
  home_net_buffer #(.RESET_ADDR(32'h0A0B0C0D)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = 32'h0A0B0C0D;
    checks++;
    if (home !== model) begin failures++; $display("FAIL reset value %h", home); end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_be = $urandom;
      wr_data = $urandom;
      if (wr_en) for (int b = 0; b < 4; b++) if (wr_be[b]) model[8*b +: 8] = wr_data[8*b +: 8];
      @(negedge clk);
      wr_en = 0;
      checks++;
      if (home !== model) begin failures++; $display("FAIL home %h expected %h", home, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
