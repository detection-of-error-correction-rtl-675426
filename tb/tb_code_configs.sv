// tb_code_configs
//
// Runs the configurations for which the code is specified:
//   * 64, 128 and 256 data bits with 3 control bits (7, 8 and 9 check bits);
//   * the minimum-shared-bits table for 128 and 256 data bits with 3 to 8
//     control bits: minimum P_CD = 3, 4, 4, 4, 4, 5 for c = 3 .. 8.
// For each configuration every single error must be corrected, the data
// must fit with the tabulated P_CD, and must not fit with one fewer shared
// bit (which shows the tabulated value is the minimum).
module tb_code_configs;
  localparam int NCFG = 13;
  // Row i: {D, C, PCD, PD}
  function automatic int cfg(input int i, input int f);
    int row [4];
    case (i)
      0: row = '{ 64, 3, 3, 4};
      1: row = '{128, 3, 3, 5};
      2: row = '{256, 3, 3, 6};
      3: row = '{128, 4, 4, 4};
      4: row = '{128, 5, 4, 4};
      5: row = '{128, 6, 4, 4};
      6: row = '{128, 7, 4, 4};
      7: row = '{128, 8, 5, 3};
      8: row = '{256, 4, 4, 5};
      9: row = '{256, 5, 4, 5};
      10: row = '{256, 6, 4, 5};
      11: row = '{256, 7, 4, 5};
      default: row = '{256, 8, 5, 4};
    endcase
    return row[f];
  endfunction
  // Published minimum P_CD per row.
  localparam int TABLE_PCD [NCFG] = '{3, 3, 3, 4, 4, 4, 4, 5, 4, 4, 4, 4, 5};

  int   chk [NCFG], fl [NCFG], rm [NCFG], rl [NCFG];
  logic dn [NCFG];
  int   checks = 0, failures = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    sec_cfg_check #(.D(cfg(g, 0)), .C(cfg(g, 1)), .PCD(cfg(g, 2)), .PD(cfg(g, 3))) u_chk (
      .checks_o(chk[g]), .failures_o(fl[g]), .room_o(rm[g]), .room_less_o(rl[g]), .done_o(dn[g]));
  end

  initial begin : watchdog
    #1_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #1;
      all_done = 1'b1;
      for (int i = 0; i < NCFG; i++) all_done &= dn[i];
    end while (!all_done);
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i] + 3;
      failures += fl[i];
      if (cfg(i, 2) != TABLE_PCD[i]) begin
        failures++;
        $display("FAIL row %0d: configured P_CD differs from the table", i);
      end
      if (rm[i] < cfg(i, 0)) begin
        failures++;
        $display("FAIL row %0d: %0d data bits do not fit (room %0d)", i, cfg(i, 0), rm[i]);
      end
      if (rl[i] >= cfg(i, 0)) begin
        failures++;
        $display("FAIL row %0d: P_CD-1 would suffice (room %0d)", i, rl[i]);
      end
      $display("D=%0d c=%0d P_CD=%0d P_D=%0d: room %0d (with P_CD-1: %0d), %0d error cases",
               cfg(i, 0), cfg(i, 1), cfg(i, 2), cfg(i, 3), rm[i], rl[i], chk[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
