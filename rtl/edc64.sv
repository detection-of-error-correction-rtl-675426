// edc64
//
// Double-error detection and correction slice of the comparison-based
// extension. The word as sent (a_i) and as received (b_i) are both present.
// Their XOR p = a ^ b marks every erroneous bit with a 1. The pairs of p are
// examined in the order (p0,p1), (p0,p2), ..., (p0,p63), (p1,p2), ...;
// at the first pair whose AND is 1, those two bits of b are inverted.
// The first pair in that order is always the lowest and second-lowest set
// bits of p, so the scan is built directly as a two-deep priority search.
// For exactly two flipped bits the output equals a_i. A single flipped bit
// is detected (err_o) but, as the pair scan finds no pair, not corrected;
// with three or more flipped bits only the first two are corrected.
//
// Interface: clk, rst (synchronous, active high), a_i, b_i in; y_o
// (corrected word), err_o (a and b differ), cor_o (a pair was corrected)
// out. Timing: the result is registered, one clock edge after the inputs.
// The output register and the reset polarity are this design's choices.
module edc64 #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] y_o,
  output logic         err_o,
  output logic         cor_o
);
  logic [W-1:0] p;
  logic [W-1:0] pair;      // the two bits selected by the scan
  logic         first_hit, second_hit;

  assign p = a_i ^ b_i;

  always_comb begin
    pair       = '0;
    first_hit  = 1'b0;
    second_hit = 1'b0;
    for (int i = 0; i < int'(W); i++) begin
      if (p[i] && !second_hit) begin
        pair[i] = 1'b1;
        if (first_hit) second_hit = 1'b1;
        first_hit = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_o   <= '0;
      err_o <= 1'b0;
      cor_o <= 1'b0;
    end else begin
      y_o   <= second_hit ? (b_i ^ pair) : b_i;
      err_o <= |p;
      cor_o <= second_hit;
    end
  end

endmodule
