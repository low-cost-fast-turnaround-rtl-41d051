// tb_fpfa_cond: self-checking test of the condition logic. Random truth
// tables, input selections and condition codes; the expected output is the
// truth-table bit addressed by the selected codes, computed independently.
module tb_fpfa_cond;
  import fpfa_pkg::*;

  logic [NFLAG-1:0] flags;
  cond_cfg_t        cfg;
  logic [NCOND-1:0] cond;
  int checks = 0, failures = 0;

  fpfa_cond dut (.flags(flags), .cfg(cfg), .cond(cond));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fixed case: cond0 = flag2 AND NOT flag5, cond1 = flag7
    cfg[0].in_sel = '{3'd0, 3'd0, 3'd5, 3'd2};   // in3,in2,in1=5,in0=2
    cfg[0].tt     = 16'h2222;                    // in0 & ~in1
    cfg[1].in_sel = '{3'd7, 3'd7, 3'd7, 3'd7};
    cfg[1].tt     = 16'h8000;                    // all four inputs set
    for (int f = 0; f < 256; f++) begin
      flags = 8'(f);
      #1;
      checks++;
      if (cond !== {flags[7], flags[2] & ~flags[5]}) begin
        failures++;
        $display("FAIL fixed flags=%b cond=%b", flags, cond);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      logic [NCOND-1:0] exp;
      for (int n = 0; n < NCOND; n++) begin
        for (int i = 0; i < 4; i++) cfg[n].in_sel[i] = 3'($urandom);
        cfg[n].tt = 16'($urandom);
      end
      flags = NFLAG'($urandom);
      #1;
      for (int n = 0; n < NCOND; n++) begin
        int a;
        a = 0;
        for (int i = 0; i < 4; i++) if (flags[cfg[n].in_sel[i]]) a += (1 << i);
        exp[n] = cfg[n].tt[a];
      end
      checks++;
      if (cond !== exp) begin
        failures++;
        $display("FAIL flags=%b cond=%b exp=%b", flags, cond, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
