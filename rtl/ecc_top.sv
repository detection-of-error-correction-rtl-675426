// ecc_top
//
// Top level holding the two independent designs side by side:
//   * the packet storage path protected by the SEC code with fast
//     control-bit decoding (pkt_ecc_buffer: encoder, RAM, decoder with the
//     fast marker path, framing state machine), ports prefixed pb_;
//   * the 256-bit comparison-based double-error corrector built from four
//     edc64 slices (top_256), ports prefixed dc_.
// The two share only the clock. Each keeps its own reset as in its own
// block: pb_rst_n is active low, dc_rst active high.
// Defaults: 256 data bits, 3 markers, 3 shared + 6 data-only check bits,
// a 16-word buffer; 4 x 64-bit correction slices.
module ecc_top
  import pkt_pkg::*;
#(
  parameter int unsigned DATA_W = 256,
  parameter int unsigned P_CD   = 3,
  parameter int unsigned P_D    = 6,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned SLICES = 4,
  localparam int unsigned DC_W  = SLICES * 64
) (
  input  logic                   clk,
  // SEC-protected packet buffer
  input  logic                   pb_rst_n,
  input  logic                   pb_wr_valid,
  output logic                   pb_wr_ready,
  input  logic [DATA_W-1:0]      pb_wr_data,
  input  pkt_ctrl_t              pb_wr_ctrl,
  input  logic                   pb_rd_en,
  output logic                   pb_out_valid,
  output logic [DATA_W-1:0]      pb_out_data,
  output pkt_ctrl_t              pb_out_ctrl,
  output logic                   pb_pkt_drop,
  output logic                   pb_frame_err,
  output pkt_state_t             pb_state,
  output logic                   pb_ecc_corrected,
  output logic                   pb_ecc_uncorrectable,
  output logic                   pb_empty,
  output logic [$clog2(DEPTH):0] pb_count,
  // double-error corrector
  input  logic                   dc_rst,
  input  logic [DC_W-1:0]        dc_a,
  input  logic [DC_W-1:0]        dc_b,
  output logic [DC_W-1:0]        dc_y,
  output logic [SLICES-1:0]      dc_err,
  output logic [SLICES-1:0]      dc_cor
);

  pkt_ecc_buffer #(.DATA_W(DATA_W), .P_CD(P_CD), .P_D(P_D), .DEPTH(DEPTH)) u_pb (
    .clk              (clk),
    .rst_n            (pb_rst_n),
    .wr_valid         (pb_wr_valid),
    .wr_ready         (pb_wr_ready),
    .wr_data          (pb_wr_data),
    .wr_ctrl          (pb_wr_ctrl),
    .rd_en            (pb_rd_en),
    .out_valid        (pb_out_valid),
    .out_data         (pb_out_data),
    .out_ctrl         (pb_out_ctrl),
    .pkt_drop         (pb_pkt_drop),
    .frame_err        (pb_frame_err),
    .state            (pb_state),
    .ecc_corrected    (pb_ecc_corrected),
    .ecc_uncorrectable(pb_ecc_uncorrectable),
    .empty            (pb_empty),
    .count            (pb_count)
  );

  top_256 #(.SLICES(SLICES), .SLICE_W(64)) u_dc (
    .clk  (clk),
    .rst  (dc_rst),
    .a_i  (dc_a),
    .b_i  (dc_b),
    .y_o  (dc_y),
    .err_o(dc_err),
    .cor_o(dc_cor)
  );

endmodule
