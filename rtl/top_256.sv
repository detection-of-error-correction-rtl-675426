// top_256
//
// 256-bit double-error detection and correction built from four edc64
// slices (generate blocks m[0]..m[3]), each handling one 64-bit quarter of the word:
// m[0] bits 63:0, m[1] bits 127:64, m[2] bits 191:128, m[3] bits 255:192. The
// slices run in parallel and share the clock and reset, so a double error
// is corrected in each quarter independently (up to eight flipped bits in
// all, two per quarter).
//
// Interface: clk, rst (synchronous, active high), a_i (word as sent), b_i
// (word as received) in; y_o (corrected word), err_o and cor_o (one bit per
// slice) out. Timing: one clock edge from input to output.
// The mapping of quarters to instances is this design's choice.
module top_256 #(
  parameter int unsigned SLICES  = 4,
  parameter int unsigned SLICE_W = 64,
  localparam int unsigned W      = SLICES * SLICE_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [W-1:0]      a_i,
  input  logic [W-1:0]      b_i,
  output logic [W-1:0]      y_o,
  output logic [SLICES-1:0] err_o,
  output logic [SLICES-1:0] cor_o
);
  for (genvar s = 0; s < int'(SLICES); s++) begin : m
    edc64 #(.W(SLICE_W)) u_edc (
      .clk  (clk),
      .rst  (rst),
      .a_i  (a_i[s*SLICE_W +: SLICE_W]),
      .b_i  (b_i[s*SLICE_W +: SLICE_W]),
      .y_o  (y_o[s*SLICE_W +: SLICE_W]),
      .err_o(err_o[s]),
      .cor_o(cor_o[s])
    );
  end

endmodule
