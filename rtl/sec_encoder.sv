// sec_encoder
//
// Encoder of the SEC code with fast-decodable control bits (see
// sec_code_pkg for the column construction). Check bit k is the XOR of every
// data and control bit whose parity-check column has a 1 in row k, so that
// the full codeword {chk, ctrl, data} has a zero syndrome. The shared group
// chk[P_CD-1:0] covers data and control bits; chk[P_CD+P_D-1:P_CD] covers
// data bits only.
//
// Interface: data_i (DATA_W), ctrl_i (CTRL_W) in, chk_o (P_CD+P_D) out.
// Timing: purely combinational, no clock.
//
// Defaults follow the main configuration of the method: 256 data bits and
// 3 control bits with 9 check bits, of which 3 are shared (the minimum given
// for 3 control bits). 64-bit data uses P_D = 4, 128-bit data P_D = 5.
// The order of the data columns is this design's own choice.
module sec_encoder #(
  parameter int unsigned DATA_W = 256,
  parameter int unsigned CTRL_W = 3,
  parameter int unsigned P_CD   = 3,
  parameter int unsigned P_D    = 6,
  localparam int unsigned P     = P_CD + P_D
) (
  input  logic [DATA_W-1:0] data_i,
  input  logic [CTRL_W-1:0] ctrl_i,
  output logic [P-1:0]      chk_o
);
  import sec_code_pkg::*;

  if (capacity(CTRL_W, P_CD, P_D) < int'(DATA_W) || ctrl_slots(P_CD) < int'(CTRL_W)) begin : g_bad_size
    $error("sec_encoder: P_CD/P_D too small for DATA_W/CTRL_W");
  end

  logic [DATA_W-1:0][P-1:0] dterm;
  logic [CTRL_W-1:0][P-1:0] cterm;

  for (genvar j = 0; j < int'(DATA_W); j++) begin : g_data
    localparam logic [P-1:0] COL = P'(data_col(j, CTRL_W, P_CD, P_D));
    assign dterm[j] = data_i[j] ? COL : '0;
  end

  for (genvar k = 0; k < int'(CTRL_W); k++) begin : g_ctrl
    localparam logic [P-1:0] COL = P'(ctrl_col(k, P_CD));
    assign cterm[k] = ctrl_i[k] ? COL : '0;
  end

  always_comb begin
    chk_o = '0;
    for (int j = 0; j < int'(DATA_W); j++) chk_o ^= dterm[j];
    for (int k = 0; k < int'(CTRL_W); k++) chk_o ^= cterm[k];
  end

endmodule
