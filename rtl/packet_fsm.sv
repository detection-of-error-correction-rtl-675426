// packet_fsm
//
// Packet framing state machine fed by the corrected marker bits, together
// with the output data register. A word read between packets starts a new
// packet; the EOP marker closes it, so the word after an EOP is always the
// start of the next packet. SOP is expected on that first word: a first
// word without SOP, or an SOP inside a packet, raises frame_err_o for that
// word (the framing then follows EOP, and an SOP inside a packet is taken
// as a new start). An ERR marker on any word marks the packet as bad;
// pkt_drop_o is raised with the packet's last word if any of its words
// carried ERR, telling the consumer to discard the packet.
//
// Interface: in_valid, in_ctrl (pkt_ctrl_t) and in_data in; registered
// out_valid, out_data, out_ctrl, pkt_drop_o, frame_err_o and state_o out.
// Timing: one register stage; outputs follow the input by one clock edge.
// Reset: synchronous, active low, to S_IDLE. The framing rules for missing
// or extra SOP markers are this design's own choice.
module packet_fsm
  import pkt_pkg::*;
#(
  parameter int unsigned DATA_W = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pkt_ctrl_t         in_ctrl,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  output pkt_ctrl_t         out_ctrl,
  output logic [DATA_W-1:0] out_data,
  output logic              pkt_drop_o,
  output logic              frame_err_o,
  output pkt_state_t        state_o
);
  pkt_state_t state, state_nx;
  logic       bad, bad_nx;   // ERR seen earlier in the current packet
  logic       frame_err_nx, drop_nx;

  always_comb begin
    state_nx     = state;
    bad_nx       = bad;
    frame_err_nx = 1'b0;
    drop_nx      = 1'b0;
    if (in_valid) begin
      unique case (state)
        S_IDLE: begin
          frame_err_nx = !in_ctrl.sop;
          bad_nx       = in_ctrl.err;
        end
        S_IN_PKT: begin
          frame_err_nx = in_ctrl.sop;
          bad_nx       = in_ctrl.sop ? in_ctrl.err : (bad | in_ctrl.err);
        end
        default: ;
      endcase
      if (in_ctrl.eop) begin
        drop_nx  = bad_nx;
        state_nx = S_IDLE;
        bad_nx   = 1'b0;
      end else begin
        state_nx = S_IN_PKT;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      bad         <= 1'b0;
      out_valid   <= 1'b0;
      out_ctrl    <= '0;
      pkt_drop_o  <= 1'b0;
      frame_err_o <= 1'b0;
    end else begin
      state       <= state_nx;
      bad         <= bad_nx;
      out_valid   <= in_valid;
      out_ctrl    <= in_valid ? in_ctrl : '0;
      pkt_drop_o  <= drop_nx;
      frame_err_o <= frame_err_nx;
    end
  end

  // Data register: loaded with every valid word, no reset needed.
  always_ff @(posedge clk) begin
    if (in_valid) out_data <= in_data;
  end

  assign state_o = state;

endmodule
