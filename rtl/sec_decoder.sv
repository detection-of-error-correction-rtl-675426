// sec_decoder
//
// Decoder of the SEC code with fast-decodable control bits. Two paths run
// side by side:
//   * the data path recomputes all P = P_CD + P_D check bits (a sec_encoder
//     instance), forms the full syndrome and flips data bit j when the
//     syndrome equals that bit's column;
//   * the control path is a ctrl_fast_decoder, which recomputes only the
//     P_CD shared check bits and needs none of the data-only syndrome.
// For any single error both paths give the right word. Flags: err_o when the
// syndrome is non-zero; uncorrectable_o when it is non-zero but matches no
// column (no data, control or check bit), which reveals many multiple
// errors. A double error can also alias onto a column and be miscorrected;
// detecting every double error is not a property of a SEC code.
//
// Interface: received data_i, ctrl_i, chk_i in; corrected data_o, ctrl_o,
// syndrome_o, the fast path's control flip bits ctrl_flip_o and flags out. Timing: combinational.
// The flags are this design's own addition to the correction logic.
module sec_decoder #(
  parameter int unsigned DATA_W = 256,
  parameter int unsigned CTRL_W = 3,
  parameter int unsigned P_CD   = 3,
  parameter int unsigned P_D    = 6,
  localparam int unsigned P     = P_CD + P_D
) (
  input  logic [DATA_W-1:0] data_i,
  input  logic [CTRL_W-1:0] ctrl_i,
  input  logic [P-1:0]      chk_i,
  output logic [DATA_W-1:0] data_o,
  output logic [CTRL_W-1:0] ctrl_o,
  output logic [P-1:0]      syndrome_o,
  output logic              err_o,
  output logic [CTRL_W-1:0] ctrl_flip_o,
  output logic              uncorrectable_o
);
  import sec_code_pkg::*;

  logic [P-1:0]      chk_re;
  logic [DATA_W-1:0] dflip;
  logic [CTRL_W-1:0] cmatch;

  sec_encoder #(.DATA_W(DATA_W), .CTRL_W(CTRL_W), .P_CD(P_CD), .P_D(P_D)) u_recompute (
    .data_i(data_i),
    .ctrl_i(ctrl_i),
    .chk_o (chk_re)
  );

  assign syndrome_o = chk_re ^ chk_i;

  for (genvar j = 0; j < int'(DATA_W); j++) begin : g_data
    localparam logic [P-1:0] COL = P'(data_col(j, CTRL_W, P_CD, P_D));
    assign dflip[j] = (syndrome_o == COL);
  end

  for (genvar k = 0; k < int'(CTRL_W); k++) begin : g_ctrl
    localparam logic [P-1:0] COL = P'(ctrl_col(k, P_CD));
    assign cmatch[k] = (syndrome_o == COL);
  end

  ctrl_fast_decoder #(.DATA_W(DATA_W), .CTRL_W(CTRL_W), .P_CD(P_CD), .P_D(P_D)) u_fast (
    .data_i     (data_i),
    .ctrl_i     (ctrl_i),
    .chk_cd_i   (chk_i[P_CD-1:0]),
    .ctrl_o     (ctrl_o),
    .ctrl_flip_o(ctrl_flip_o),
    .s_cd_o     ()  // same value as syndrome_o[P_CD-1:0]
  );

  assign data_o = data_i ^ dflip;
  assign err_o  = |syndrome_o;

  // A check-bit error has a weight-one syndrome.
  logic chk_hit;
  always_comb begin
    chk_hit = 1'b0;
    for (int i = 0; i < int'(P); i++)
      if (syndrome_o == P'(1) << i) chk_hit = 1'b1;
  end

  assign uncorrectable_o = err_o && !(|dflip) && !(|cmatch) && !chk_hit;

endmodule
