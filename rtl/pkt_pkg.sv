// pkt_pkg
//
// Types shared by the packet-storage path. The three control bits that
// travel with every data word are the packet markers: start of packet,
// end of packet and a packet-error mark that tells the consumer to drop
// the packet. Their bit order inside the protected word (SOP = bit 0,
// EOP = bit 1, ERR = bit 2) is this design's choice.
package pkt_pkg;

  typedef struct packed {
    logic err;  // packet is corrupted and must be dropped
    logic eop;  // last word of a packet
    logic sop;  // first word of a packet
  } pkt_ctrl_t;

  localparam int unsigned CTRL_W = $bits(pkt_ctrl_t);

  typedef enum logic [0:0] {
    S_IDLE   = 1'b0,  // between packets: the next word starts a packet
    S_IN_PKT = 1'b1   // inside a packet: waiting for EOP
  } pkt_state_t;

endpackage
