// sec_cfg_check
//
// Test helper: checks one configuration of the SEC code with fast control
// decoding. It builds random codewords with sec_encoder, injects no error
// and every single error (data, control and check bits), and requires
// sec_decoder to return the original data and control bits. It also counts,
// by enumerating all 2^(P_CD+P_D) columns, how many data bits the split
// can protect with P_CD shared bits, and with one shared bit fewer, so
// that the caller can compare the minimum P_CD with the published table.
// Results are reported on ports when done_o rises.
module sec_cfg_check #(
  parameter int D    = 64,
  parameter int C    = 3,
  parameter int PCD  = 3,
  parameter int PD   = 4,
  parameter int REPS = 3
) (
  output int   checks_o,
  output int   failures_o,
  output int   room_o,        // data bits that fit with PCD shared bits
  output int   room_less_o,   // ... with PCD-1 shared bits (same total)
  output logic done_o
);
  localparam int P = PCD + PD, N = D + C + P;

  logic [D-1:0] data, rdata, data_o;
  logic [C-1:0] ctrl, rctrl, ctrl_o, flip_o;
  logic [P-1:0] chk, rchk, syn;
  logic err, unc;

  sec_encoder #(.DATA_W(D), .CTRL_W(C), .P_CD(PCD), .P_D(PD)) u_enc (
    .data_i(data), .ctrl_i(ctrl), .chk_o(chk));
  sec_decoder #(.DATA_W(D), .CTRL_W(C), .P_CD(PCD), .P_D(PD)) u_dec (
    .data_i(rdata), .ctrl_i(rctrl), .chk_i(rchk), .data_o(data_o), .ctrl_o(ctrl_o),
    .syndrome_o(syn), .err_o(err), .ctrl_flip_o(flip_o), .uncorrectable_o(unc));

  // Columns usable for data with q shared bits out of P, when C shared
  // values of weight >= 2 are taken by the control bits.
  function automatic int room(input int q);
    int n = 0, taken = 0;
    for (int v = 0; v < (1 << q); v++) begin
      if ($countones(v) >= 2 && taken < C) begin
        taken++;
        continue;
      end
      for (int u = 0; u < (1 << (P - q)); u++)
        if ($countones(v) + $countones(u) >= 2) n++;
    end
    return (taken < C) ? -1 : n;
  endfunction

  initial begin
    logic [N-1:0] cw, e;
    checks_o = 0; failures_o = 0; done_o = 1'b0;
    room_o = room(PCD);
    room_less_o = room(PCD - 1);
    for (int t = 0; t < REPS; t++) begin
      for (int w = 0; w < D; w += 32) data[w +: 32] = $urandom;
      ctrl = C'($urandom);
      #1;
      cw = {chk, ctrl, data};
      for (int i = -1; i < N; i++) begin
        e = '0;
        if (i >= 0) e[i] = 1'b1;
        {rchk, rctrl, rdata} = cw ^ e;
        #1;
        checks_o++;
        if (data_o != data || ctrl_o != ctrl || err != (i >= 0) || unc) begin
          failures_o++;
          $display("FAIL D=%0d C=%0d PCD=%0d: error at %0d not corrected", D, C, PCD, i);
        end
      end
    end
    done_o = 1'b1;
  end
endmodule
