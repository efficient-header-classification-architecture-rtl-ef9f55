// tb_symbol_encoder_t1: checks the basic / type I symbol encoder.
//
// Part 1 uses a one-character encoder over the 4-letter alphabet {a,b,c,d}
// (2-bit characters) and wires three patterns, aadc, bdd and ddac, to it;
// the bit vectors each pattern register receives for each input letter must
// equal the pattern table of the shared-encoder example (e.g. 0011 for a
// into aadc, written with pattern position 1 first).  Part 2 checks a
// two-group 8-bit type I encoder exhaustively against its definition.
module tb_symbol_encoder_t1;
  int checks = 0, failures = 0;

  logic [0:0][1:0] sym_s;
  logic [0:0][3:0] enc_s;
  symbol_encoder_t1 #(.Q(1), .CHAR_W(2)) dut_s (.sym(sym_s), .enc_n(enc_s));

  logic [1:0][7:0]   sym_w;
  logic [1:0][255:0] enc_w;
  symbol_encoder_t1 #(.Q(2), .CHAR_W(8)) dut_w (.sym(sym_w), .enc_n(enc_w));

  // pattern letters as indices a=0 b=1 c=2 d=3
  function automatic string vec(int pat[], logic [3:0] e);
    string s;
    s = "";
    foreach (pat[i]) s = {s, e[pat[i]] ? "1" : "0"};
    return s;
  endfunction

  initial begin
    int p1[] = '{0, 0, 3, 2};   // aadc
    int p2[] = '{1, 3, 3};      // bdd
    int p3[] = '{3, 3, 0, 2};   // ddac
    string t1[4] = '{"0011", "1111", "1110", "1101"};
    string t2[4] = '{"111", "011", "111", "100"};
    string t3[4] = '{"1101", "1111", "1110", "0011"};
    for (int k = 0; k < 4; k++) begin
      sym_s[0] = 2'(k);
      #1;
      checks += 3;
      if (vec(p1, enc_s[0]) != t1[k]) begin failures++; $display("FAIL aadc %0d %s", k, vec(p1, enc_s[0])); end
      if (vec(p2, enc_s[0]) != t2[k]) begin failures++; $display("FAIL bdd %0d %s", k, vec(p2, enc_s[0])); end
      if (vec(p3, enc_s[0]) != t3[k]) begin failures++; $display("FAIL ddac %0d %s", k, vec(p3, enc_s[0])); end
    end
    for (int v = 0; v < 65536; v += 37) begin
      sym_w = 16'(v);
      #1;
      for (int g = 0; g < 2; g++) begin
        logic [255:0] e;
        e = '1;
        e[sym_w[g]] = 1'b0;
        checks++;
        if (enc_w[g] !== e) begin failures++; $display("FAIL type I group %0d value %h", g, sym_w[g]); end
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
