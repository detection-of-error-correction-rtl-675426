// tb_sec_decoder
//
// Self-checking test of sec_decoder at the default size. Random codewords
// are built with sec_encoder; then no error, every single-bit error, and a
// set of random double errors are injected.
//   * no error: outputs equal inputs, err_o = 0;
//   * single error anywhere: data_o and ctrl_o equal the original, err_o = 1,
//     uncorrectable_o = 0, and the syndrome is non-zero;
//   * double error: err_o = 1 (a SEC code always sees a double error as a
//     non-zero syndrome since all columns are distinct).
module tb_sec_decoder;
  localparam int D = 256, C = 3, PCD = 3, PD = 6, P = PCD + PD, N = D + C + P;

  logic [D-1:0] data, rdata, data_o;
  logic [C-1:0] ctrl, rctrl, ctrl_o, flip_o;
  logic [P-1:0] chk, rchk, syn;
  logic err, unc;
  int checks = 0, failures = 0;

  sec_encoder #(.DATA_W(D), .CTRL_W(C), .P_CD(PCD), .P_D(PD)) u_enc (
    .data_i(data), .ctrl_i(ctrl), .chk_o(chk));

  sec_decoder #(.DATA_W(D), .CTRL_W(C), .P_CD(PCD), .P_D(PD)) dut (
    .data_i(rdata), .ctrl_i(rctrl), .chk_i(rchk),
    .data_o(data_o), .ctrl_o(ctrl_o), .syndrome_o(syn), .err_o(err),
    .ctrl_flip_o(flip_o), .uncorrectable_o(unc));

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
    logic [N-1:0] cw, e;
    int a, b;
    for (int t = 0; t < 8; t++) begin
      for (int w = 0; w < D / 32; w++) data[w*32 +: 32] = $urandom;
      ctrl = C'(t);
      #1;
      cw = {chk, ctrl, data};
      for (int i = -1; i < N; i++) begin
        e = '0;
        if (i >= 0) e[i] = 1'b1;
        {rchk, rctrl, rdata} = cw ^ e;
        #1;
        check(data_o == data, $sformatf("data not corrected, error at %0d", i));
        check(ctrl_o == ctrl, $sformatf("ctrl not corrected, error at %0d", i));
        check(err == (i >= 0), $sformatf("err flag, error at %0d", i));
        check(!unc, $sformatf("single error flagged uncorrectable at %0d", i));
        check(flip_o == ((i >= D && i < D + C) ? C'(1) << (i - D) : '0), "ctrl flip");
      end
      for (int r = 0; r < 200; r++) begin
        a = $urandom_range(N - 1);
        do b = $urandom_range(N - 1); while (b == a);
        e = '0; e[a] = 1'b1; e[b] = 1'b1;
        {rchk, rctrl, rdata} = cw ^ e;
        #1;
        check(err && syn != '0, $sformatf("double error %0d,%0d not seen", a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
