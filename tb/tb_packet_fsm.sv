// tb_packet_fsm
//
// Self-checking test of packet_fsm. The testbench generates a stream of
// packets of random length (1 to 8 words) with idle gaps and random ERR
// marks, plus deliberate framing faults: a first word without SOP and an
// SOP inside a packet. The expected per-word outputs are worked out from the
// packet list as it is generated: drop on the last word of a packet in
// which any word had ERR, frame_err on the faulty words, state S_IN_PKT
// after a non-final word. Each output must appear exactly one clock edge
// after its input word.
module tb_packet_fsm;
  import pkt_pkg::*;
  localparam int D = 32;

  logic clk = 1'b0, rst_n;
  logic in_valid, out_valid, pkt_drop_o, frame_err_o;
  pkt_ctrl_t in_ctrl, out_ctrl;
  logic [D-1:0] in_data, out_data;
  pkt_state_t state_o;
  int checks = 0, failures = 0;
  int n_drop = 0, n_ferr = 0, n_pkts = 0, n_single = 0;

  packet_fsm #(.DATA_W(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one word and check the registered result after the edge.
  task automatic word(input pkt_ctrl_t c, input logic [D-1:0] d,
                      input bit exp_drop, input bit exp_ferr, input pkt_state_t exp_state);
    in_valid = 1'b1; in_ctrl = c; in_data = d;
    @(posedge clk); #1;
    check(out_valid, "out_valid");
    check(out_data == d, "data register");
    check(out_ctrl == c, "ctrl register");
    check(pkt_drop_o == exp_drop, $sformatf("drop exp %0d", exp_drop));
    check(frame_err_o == exp_ferr, $sformatf("frame_err exp %0d", exp_ferr));
    check(state_o == exp_state, "state");
    if (exp_drop) n_drop++;
    if (exp_ferr) n_ferr++;
    in_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    in_valid = 1'b0; in_ctrl = '0;
    repeat (n) begin
      @(posedge clk); #1;
      check(!out_valid && !pkt_drop_o && !frame_err_o, "idle outputs");
    end
  endtask

  initial begin
    pkt_ctrl_t c;
    bit bad, fault_nosop, fault_midsop;
    int len;
    rst_n = 1'b0; in_valid = 1'b0; in_ctrl = '0; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(state_o == S_IDLE, "reset state");
    for (int p = 0; p < 400; p++) begin
      len = $urandom_range(1, 8);
      fault_nosop  = ($urandom_range(9) == 0);
      fault_midsop = (len > 2) && ($urandom_range(9) == 0);
      bad = 1'b0;
      n_pkts++;
      if (len == 1) n_single++;
      for (int w = 0; w < len; w++) begin
        c.sop = (w == 0) ? !fault_nosop : (fault_midsop && w == 1);
        c.eop = (w == len - 1);
        c.err = ($urandom_range(7) == 0);
        // an SOP inside a packet restarts it: earlier ERR marks are forgotten
        if (c.sop && w != 0) bad = 1'b0;
        bad |= c.err;
        word(c, D'($urandom), c.eop && bad,
             (w == 0 && fault_nosop) || (w == 1 && fault_midsop),
             c.eop ? S_IDLE : S_IN_PKT);
      end
      if ($urandom_range(1) == 1) idle($urandom_range(1, 3));
    end
    check(n_drop > 0 && n_ferr > 0 && n_single > 0, "every case must occur");
    $display("packets %0d, dropped %0d, framing errors %0d, single-word %0d",
             n_pkts, n_drop, n_ferr, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
