// tb_ctrl_fast_decoder
//
// Self-checking test of ctrl_fast_decoder at the default size. Codewords
// are made with sec_encoder from random data and control bits; then no
// error, or a single error in every bit position (data, control and
// check bits) is injected. Only the shared check bits reach the fast
// decoder. Expected: the control outputs always equal the original control
// bits, and ctrl_flip_o is set exactly for an error in that control bit.
// The partial syndrome must equal the low bits of the full syndrome.
module tb_ctrl_fast_decoder;
  localparam int D = 256, C = 3, PCD = 3, PD = 6, P = PCD + PD, N = D + C + P;

  logic [D-1:0] data, rdata;
  logic [C-1:0] ctrl, rctrl, ctrl_o, flip_o;
  logic [P-1:0] chk, rchk;
  logic [PCD-1:0] s_cd;
  int checks = 0, failures = 0;

  sec_encoder #(.DATA_W(D), .CTRL_W(C), .P_CD(PCD), .P_D(PD)) u_enc (
    .data_i(data), .ctrl_i(ctrl), .chk_o(chk));

  ctrl_fast_decoder #(.DATA_W(D), .CTRL_W(C), .P_CD(PCD), .P_D(PD)) dut (
    .data_i(rdata), .ctrl_i(rctrl), .chk_cd_i(rchk[PCD-1:0]),
    .ctrl_o(ctrl_o), .ctrl_flip_o(flip_o), .s_cd_o(s_cd));

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
    logic [N-1:0] cw, err;
    for (int t = 0; t < 12; t++) begin
      for (int w = 0; w < D / 32; w++) data[w*32 +: 32] = $urandom;
      ctrl = C'(t);  // cover every control pattern
      #1;
      cw = {chk, ctrl, data};
      for (int e = -1; e < N; e++) begin
        err = '0;
        if (e >= 0) err[e] = 1'b1;
        {rchk, rctrl, rdata} = cw ^ err;
        #1;
        check(ctrl_o == ctrl, $sformatf("ctrl wrong, error at %0d: %b vs %b", e, ctrl_o, ctrl));
        for (int k = 0; k < C; k++)
          check(flip_o[k] == (e == D + k), $sformatf("flip %0d wrong, error at %0d", k, e));
        if (e == -1) check(s_cd == '0, "clean word has non-zero partial syndrome");
        else if (e >= D + C) check(s_cd == ((e - D - C) < PCD ? PCD'(1) << (e - D - C) : '0),
                                   $sformatf("partial syndrome for check bit %0d", e - D - C));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
