// tb_symbol_encoder_t2: checks the type II symbol encoder.
//
// Every pair of byte values is applied to a two-character encoder.  Each of
// the four groups must be one-cold at the nibble it encodes, and for every
// byte b the OR of output b[7:4] of the high group and output b[3:0] of the
// low group (what a shift-or stage wired for byte b sees) must be 0 exactly
// when the character equals b.
module tb_symbol_encoder_t2;
  int checks = 0, failures = 0;
  logic [1:0][7:0]       sym;
  logic [1:0][1:0][15:0] enc;
  symbol_encoder_t2 #(.Q(2)) dut (.sym(sym), .enc_n(enc));

  initial begin
    for (int v = 0; v < 65536; v += 13) begin
      sym = 16'(v);
      #1;
      for (int g = 0; g < 2; g++) begin
        logic [15:0] hi, lo;
        hi = '1; hi[sym[g] >> 4] = 1'b0;
        lo = '1; lo[sym[g] & 8'hF] = 1'b0;
        checks += 2;
        if (enc[g][1] !== hi) begin failures++; $display("FAIL high group %0d %h", g, sym[g]); end
        if (enc[g][0] !== lo) begin failures++; $display("FAIL low group %0d %h", g, sym[g]); end
        for (int b = 0; b < 256; b += 17) begin
          checks++;
          if ((enc[g][1][b >> 4] | enc[g][0][b & 15]) !== (sym[g] != 8'(b))) begin
            failures++;
            $display("FAIL byte test %0d %h vs %h", g, sym[g], b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
