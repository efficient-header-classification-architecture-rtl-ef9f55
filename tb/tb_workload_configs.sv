// tb_workload_configs: runs the whole front end in every evaluated
// configuration of bytes per clock and symbol encoder.
//
// Seven nids_top instances run side by side, each driven and checked by its
// own tb_cfg_runner: the basic encoder at one byte per clock, type I at 2, 4
// and 8 bytes per clock, and type II at 2, 4 and 8 bytes per clock.  Every
// instance must reproduce the reference results for its packets; the
// testbench fails if any runner reports a failure or does not finish.
module tb_workload_configs;
  localparam int NCFG = 7;
  localparam int QS [NCFG] = '{1, 2, 4, 8, 2, 4, 8};
  localparam int ES [NCFG] = '{1, 1, 1, 1, 2, 2, 2};

  logic [NCFG-1:0] done;
  int c [NCFG];
  int f [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    tb_cfg_runner #(.Q(QS[i]), .ENC_TYPE(ES[i]), .NPKT(150)) u_run (
      .done(done[i]), .n_checks(c[i]), .n_failures(f[i]));
  end

  int checks, failures;

  task automatic report(bit timeout);
    checks = 0;
    failures = timeout ? 1 : 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      if (!done[i]) begin
        failures++;
        $display("FAIL configuration Q=%0d ENC_TYPE=%0d did not finish", QS[i], ES[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #20ms;
    report(1'b1);
  end

  initial begin
    wait (&done);
    #100ns;
    report(1'b0);
  end
endmodule
