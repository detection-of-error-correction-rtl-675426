// packet_ram
//
// Buffer memory for protected packet words, organised as a first-in
// first-out queue (as used to decouple processing rates in packet
// equipment). Each entry holds one whole codeword: markers, data and check
// bits side by side; the memory itself neither checks nor corrects.
//
// Interface: wr_en/wr_word write one entry per cycle when not full;
// rd_en reads the oldest entry when not empty. Writes to a full queue and
// reads from an empty one are ignored.
// Timing: synchronous write; registered read, rd_word/rd_valid appear one
// cycle after rd_en. full/empty/count reflect the state after the last edge.
// Depth and reset (synchronous, active low, pointers only) are this
// design's choices; the memory array is not reset.
module packet_ram #(
  parameter int unsigned WIDTH = 268,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_word,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_word,
  output logic             rd_valid,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_word;
    if (do_rd) rd_word <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
