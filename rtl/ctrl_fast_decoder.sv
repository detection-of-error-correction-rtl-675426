// ctrl_fast_decoder
//
// Fast correction of the control bits of the SEC code built by
// sec_code_pkg. Only the P_CD shared check bits are recomputed: the partial
// syndrome s_cd is the received shared check bits XOR the parity over the
// control bits and over those data bits whose column has a non-zero shared
// part (data bits with an all-zero shared part are not read at all). Control
// bit k is flipped when s_cd equals its shared value, e.g. for P_CD = 3
// control bit 0 flips on s1 & s2 & ~s3. Under the single-error assumption
// of the code this is exact, because no data or check-bit column carries a
// control bit's shared value. The data-only syndrome bits are not examined,
// which is what shortens the path to the control outputs.
//
// Interface: received data_i, ctrl_i and the shared check bits chk_cd_i in;
// corrected ctrl_o, per-bit flip indication ctrl_flip_o and the partial
// syndrome s_cd_o out. Timing: combinational.
module ctrl_fast_decoder #(
  parameter int unsigned DATA_W = 256,
  parameter int unsigned CTRL_W = 3,
  parameter int unsigned P_CD   = 3,
  parameter int unsigned P_D    = 6
) (
  input  logic [DATA_W-1:0] data_i,
  input  logic [CTRL_W-1:0] ctrl_i,
  input  logic [P_CD-1:0]   chk_cd_i,
  output logic [CTRL_W-1:0] ctrl_o,
  output logic [CTRL_W-1:0] ctrl_flip_o,
  output logic [P_CD-1:0]   s_cd_o
);
  import sec_code_pkg::*;

  logic [DATA_W-1:0][P_CD-1:0] dterm;
  logic [CTRL_W-1:0][P_CD-1:0] cterm;

  for (genvar j = 0; j < int'(DATA_W); j++) begin : g_data
    localparam logic [P_CD-1:0] SCOL = P_CD'(data_col(j, CTRL_W, P_CD, P_D));
    if (SCOL != '0) begin : g_used
      assign dterm[j] = data_i[j] ? SCOL : '0;
    end else begin : g_unused
      // Shared part is zero: this data bit plays no part in the fast path.
      assign dterm[j] = '0;
    end
  end

  for (genvar k = 0; k < int'(CTRL_W); k++) begin : g_ctrl
    localparam logic [P_CD-1:0] SCOL = P_CD'(ctrl_col(k, P_CD));
    assign cterm[k]       = ctrl_i[k] ? SCOL : '0;
    assign ctrl_flip_o[k] = (s_cd_o == SCOL);
  end

  always_comb begin
    s_cd_o = chk_cd_i;
    for (int j = 0; j < int'(DATA_W); j++) s_cd_o ^= dterm[j];
    for (int k = 0; k < int'(CTRL_W); k++) s_cd_o ^= cterm[k];
  end

  assign ctrl_o = ctrl_i ^ ctrl_flip_o;

endmodule
