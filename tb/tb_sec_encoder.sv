// tb_sec_encoder
//
// Self-checking test of sec_encoder at its default size (256 data bits,
// 3 control bits, 3 shared + 6 data-only check bits). The parity-check
// columns are read back by encoding unit vectors, and checked against the
// rules a SEC code with fast control decoding must obey, without reusing
// the construction code:
//   * every column has weight >= 2 and all columns are distinct (SEC);
//   * control columns have an all-zero data-only part;
//   * no data column shares its shared part with a control column;
//   * control bit 0 uses s1 & s2 & ~s3 (shared value 3'b011), bits 1 and 2
//     use 3'b101 and 3'b110;
//   * the encoder is linear and maps zero to zero.
module tb_sec_encoder;
  localparam int D = 256, C = 3, PCD = 3, PD = 6, P = PCD + PD, N = D + C;

  logic [D-1:0] data;
  logic [C-1:0] ctrl;
  logic [P-1:0] chk;
  int checks = 0, failures = 0;
  logic [P-1:0] cols [N];

  sec_encoder #(.DATA_W(D), .CTRL_W(C), .P_CD(PCD), .P_D(PD)) dut (
    .data_i(data), .ctrl_i(ctrl), .chk_o(chk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0] da, db;
    logic [C-1:0] ca, cb;
    logic [P-1:0] pa, pb;
    data = '0; ctrl = '0; #1;
    check(chk == '0, "zero word must have zero check bits");
    for (int i = 0; i < N; i++) begin
      data = '0; ctrl = '0;
      if (i < D) data[i] = 1'b1; else ctrl[i-D] = 1'b1;
      #1 cols[i] = chk;
      check($countones(chk) >= 2, $sformatf("column %0d weight below 2: %b", i, chk));
    end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (cols[i] == cols[j]) check(1'b0, $sformatf("columns %0d and %0d equal", i, j));
    checks++;  // distinctness counted once as a whole
    for (int k = 0; k < C; k++) begin
      check(cols[D+k][P-1:PCD] == '0, $sformatf("control %0d uses data-only bits", k));
      for (int j = 0; j < D; j++)
        if (cols[j][PCD-1:0] == cols[D+k][PCD-1:0])
          check(1'b0, $sformatf("data %0d aliases control %0d in shared part", j, k));
    end
    check(cols[D+0][PCD-1:0] == 3'b011, "control 0 shared value");
    check(cols[D+1][PCD-1:0] == 3'b101, "control 1 shared value");
    check(cols[D+2][PCD-1:0] == 3'b110, "control 2 shared value");
    for (int t = 0; t < 300; t++) begin
      for (int w = 0; w < D / 32; w++) begin
        da[w*32 +: 32] = $urandom;
        db[w*32 +: 32] = $urandom;
      end
      ca = C'($urandom); cb = C'($urandom);
      data = da; ctrl = ca; #1 pa = chk;
      data = db; ctrl = cb; #1 pb = chk;
      data = da ^ db; ctrl = ca ^ cb; #1;
      check(chk == (pa ^ pb), "linearity");
      // Also against the columns read back above.
      begin
        logic [P-1:0] exp;
        exp = '0;
        for (int i = 0; i < D; i++) if (da[i] ^ db[i]) exp ^= cols[i];
        for (int k = 0; k < C; k++) if (ca[k] ^ cb[k]) exp ^= cols[D+k];
        check(chk == exp, "sum of columns");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
