// pkt_ecc_buffer
//
// Packet storage path protected by the SEC code with fast-decodable control
// bits. On the write side the sec_encoder computes the check bits of each
// data word together with its three markers (SOP, EOP, ERR), and the whole
// codeword {check, markers, data} is stored in packet_ram. On the read side
// the word coming out of the RAM is corrected by sec_decoder: the data
// through the full syndrome, the markers through the fast partial-syndrome
// path, because the markers steer the framing state machine (packet_fsm),
// whose next-state logic is the timing-critical loop of the read side. The
// corrected data is captured in the data register inside packet_fsm.
//
// Interface: write side wr_valid/wr_ready (ready = not full), wr_data,
// wr_ctrl; read side rd_en (pop one word when not empty), out_* from the
// state machine, per-word ECC status ecc_corrected/ecc_uncorrectable
// aligned with out_valid, and the buffer's empty flag and word count
// (rd_en on an empty buffer is ignored).
// Timing: one word per cycle on each side; a word popped by rd_en appears
// on out_* two clock edges later (RAM read register, then the data and
// state registers). Reset: synchronous, active low.
// The RAM depth and the handshake are this design's choices.
module pkt_ecc_buffer
  import pkt_pkg::*;
#(
  parameter int unsigned DATA_W = 256,
  parameter int unsigned P_CD   = 3,
  parameter int unsigned P_D    = 6,
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned P     = P_CD + P_D,
  localparam int unsigned WIDTH = P + CTRL_W + DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  logic [DATA_W-1:0]        wr_data,
  input  pkt_ctrl_t                wr_ctrl,
  input  logic                     rd_en,
  output logic                     out_valid,
  output logic [DATA_W-1:0]        out_data,
  output pkt_ctrl_t                out_ctrl,
  output logic                     pkt_drop,
  output logic                     frame_err,
  output pkt_state_t               state,
  output logic                     ecc_corrected,
  output logic                     ecc_uncorrectable,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  logic [P-1:0]      wr_chk;
  logic [WIDTH-1:0]  rd_word;
  logic              rd_valid, full;
  logic [DATA_W-1:0] dec_data;
  logic [CTRL_W-1:0] dec_ctrl;
  logic              dec_err, dec_unc;

  sec_encoder #(.DATA_W(DATA_W), .CTRL_W(CTRL_W), .P_CD(P_CD), .P_D(P_D)) u_enc (
    .data_i(wr_data),
    .ctrl_i(wr_ctrl),
    .chk_o (wr_chk)
  );

  assign wr_ready = !full;

  packet_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_ram (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (wr_valid),
    .wr_word ({wr_chk, wr_ctrl, wr_data}),
    .rd_en   (rd_en),
    .rd_word (rd_word),
    .rd_valid(rd_valid),
    .full    (full),
    .empty   (empty),
    .count   (count)
  );

  sec_decoder #(.DATA_W(DATA_W), .CTRL_W(CTRL_W), .P_CD(P_CD), .P_D(P_D)) u_dec (
    .data_i         (rd_word[DATA_W-1:0]),
    .ctrl_i         (rd_word[DATA_W +: CTRL_W]),
    .chk_i          (rd_word[DATA_W + CTRL_W +: P]),
    .data_o         (dec_data),
    .ctrl_o         (dec_ctrl),
    .syndrome_o     (),
    .err_o          (dec_err),
    .ctrl_flip_o    (),
    .uncorrectable_o(dec_unc)
  );

  packet_fsm #(.DATA_W(DATA_W)) u_fsm (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (rd_valid),
    .in_ctrl    (pkt_ctrl_t'(dec_ctrl)),
    .in_data    (dec_data),
    .out_valid  (out_valid),
    .out_ctrl   (out_ctrl),
    .out_data   (out_data),
    .pkt_drop_o (pkt_drop),
    .frame_err_o(frame_err),
    .state_o    (state)
  );

  // ECC status registered alongside the data register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ecc_corrected     <= 1'b0;
      ecc_uncorrectable <= 1'b0;
    end else begin
      ecc_corrected     <= rd_valid && dec_err && !dec_unc;
      ecc_uncorrectable <= rd_valid && dec_unc;
    end
  end

endmodule
