// tb_pkt_ecc_buffer
//
// Self-checking test of pkt_ecc_buffer at a reduced size: 64 data bits
// (3 shared + 4 data-only check bits, the 64-bit configuration of the
// code) and a 4-word buffer, so that full and empty happen often.
// A generator makes packets of 1 to 6 words with random ERR marks and
// occasional framing faults; expected drop and framing flags are worked out
// when each word is generated. Right after a word is written, a single
// error is injected into a data, marker or check bit of the stored
// codeword, or a double error in two data bits chosen (with the columns
// read from a separate encoder) so that it must be flagged uncorrectable.
// Every word must come out two clock edges after its read request with the
// original data and markers, the right ECC status and framing flags.
// Each mechanism is counted; one that never happened is a failure.
module tb_pkt_ecc_buffer;
  import pkt_pkg::*;
  localparam int D = 64, PCD = 3, PD = 4, P = PCD + PD, C = 3, DEPTH = 4;
  localparam int NCYC = 3000;

  logic clk = 1'b0;
  logic pb_rst_n, pb_wr_valid, pb_wr_ready, pb_rd_en, pb_out_valid;
  logic [D-1:0] pb_wr_data, pb_out_data;
  pkt_ctrl_t pb_wr_ctrl, pb_out_ctrl;
  logic pb_pkt_drop, pb_frame_err, pb_ecc_corrected, pb_ecc_uncorrectable, pb_empty;
  pkt_state_t pb_state;
  logic [$clog2(DEPTH):0] pb_count;

  pkt_ecc_buffer #(.DATA_W(D), .P_CD(PCD), .P_D(PD), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(pb_rst_n), .wr_valid(pb_wr_valid), .wr_ready(pb_wr_ready),
    .wr_data(pb_wr_data), .wr_ctrl(pb_wr_ctrl), .rd_en(pb_rd_en),
    .out_valid(pb_out_valid), .out_data(pb_out_data), .out_ctrl(pb_out_ctrl),
    .pkt_drop(pb_pkt_drop), .frame_err(pb_frame_err), .state(pb_state),
    .ecc_corrected(pb_ecc_corrected), .ecc_uncorrectable(pb_ecc_uncorrectable),
    .empty(pb_empty), .count(pb_count));

  // Reference encoder, used only to read back the parity-check columns.
  logic [D-1:0] ref_data;
  logic [C-1:0] ref_ctrl;
  logic [P-1:0] ref_chk;
  sec_encoder #(.DATA_W(D), .CTRL_W(C), .P_CD(PCD), .P_D(PD)) u_ref (
    .data_i(ref_data), .ctrl_i(ref_ctrl), .chk_o(ref_chk));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {INJ_NONE, INJ_DATA, INJ_MARK, INJ_CHK, INJ_DOUBLE} inj_t;
  typedef struct {
    logic [D-1:0] data;
    pkt_ctrl_t    ctrl;
    bit           drop;
    bit           ferr;
    inj_t         inj;
    logic [D-1:0] out_data;  // expected data at the output
  } word_t;

  word_t pending [$];   // generated, not yet written
  word_t stored  [$];   // written, in buffer order

  logic [P-1:0] cols [D + C];
  bit           is_col [int];
  bit           is_ctrl_shared [int];

  // counters of mechanisms
  int n_inj [5] = '{0, 0, 0, 0, 0};
  int n_full_hold = 0, n_empty_rd = 0, n_drop = 0, n_ferr = 0, n_words = 0;

  task automatic gen_packet();
    int len;
    bit bad, f_nosop, f_midsop;
    word_t w;
    len = $urandom_range(1, 6);
    f_nosop  = ($urandom_range(15) == 0);
    f_midsop = (len > 2) && ($urandom_range(15) == 0);
    bad = 1'b0;
    for (int i = 0; i < len; i++) begin
      for (int k = 0; k < D; k += 32) w.data[k +: 32] = $urandom;
      w.ctrl.sop = (i == 0) ? !f_nosop : (f_midsop && i == 1);
      w.ctrl.eop = (i == len - 1);
      w.ctrl.err = ($urandom_range(9) == 0);
      if (w.ctrl.sop && i != 0) bad = 1'b0;
      bad |= w.ctrl.err;
      w.drop = w.ctrl.eop && bad;
      w.ferr = (i == 0 && f_nosop) || (i == 1 && f_midsop);
      w.inj = INJ_NONE;
      w.out_data = w.data;
      pending.push_back(w);
    end
  endtask

  // Flip bits of the stored codeword at buffer address addr.
  task automatic inject(input int addr, inout word_t w);
    int r, a, b;
    r = $urandom_range(9);
    if (r < 4) begin
      w.inj = INJ_NONE;
    end else if (r < 6) begin
      w.inj = INJ_DATA;
      a = $urandom_range(D - 1);
      dut.u_ram.mem[addr][a] = ~dut.u_ram.mem[addr][a];
    end else if (r < 8) begin
      w.inj = INJ_MARK;
      a = D + $urandom_range(C - 1);
      dut.u_ram.mem[addr][a] = ~dut.u_ram.mem[addr][a];
    end else if (r < 9) begin
      w.inj = INJ_CHK;
      a = D + C + $urandom_range(P - 1);
      dut.u_ram.mem[addr][a] = ~dut.u_ram.mem[addr][a];
    end else begin
      int syn;
      w.inj = INJ_DOUBLE;
      do begin
        a = $urandom_range(D - 1);
        b = $urandom_range(D - 1);
        syn = int'(cols[a] ^ cols[b]);
      end while (a == b || is_col.exists(syn) || $countones(syn) == 1 ||
                 is_ctrl_shared.exists(syn % (1 << PCD)));
      dut.u_ram.mem[addr][a] = ~dut.u_ram.mem[addr][a];
      dut.u_ram.mem[addr][b] = ~dut.u_ram.mem[addr][b];
      w.out_data[a] = ~w.out_data[a];
      w.out_data[b] = ~w.out_data[b];
    end
    n_inj[w.inj]++;
  endtask

  initial begin
    bit will_wr, will_rd;
    bit rpipe = 1'b0;  // a read was accepted at the previous edge
    int waddr = 0;
    word_t w, e;

    // read back the columns
    for (int i = 0; i < D + C; i++) begin
      ref_data = '0; ref_ctrl = '0;
      if (i < D) ref_data[i] = 1'b1; else ref_ctrl[i-D] = 1'b1;
      #1 cols[i] = ref_chk;
      is_col[int'(ref_chk)] = 1'b1;
      if (i >= D) is_ctrl_shared[int'(ref_chk)] = 1'b1;
    end

    pb_rst_n = 1'b0;
    pb_wr_valid = 1'b0; pb_rd_en = 1'b0; pb_wr_data = '0; pb_wr_ctrl = '0;
    repeat (3) @(posedge clk);
    #1 pb_rst_n = 1'b1;

    for (int cyc = 0; cyc < NCYC; cyc++) begin
      int rate;
      if (pending.size() < 8) gen_packet();
      rate = ((cyc / 300) % 2 != 0) ? 85 : 30;
      w = pending[0];
      pb_wr_valid = ($urandom_range(99) < 80);
      pb_wr_data  = w.data;
      pb_wr_ctrl  = w.ctrl;
      pb_rd_en    = ($urandom_range(99) < rate);
      will_wr = pb_wr_valid && pb_wr_ready;
      will_rd = pb_rd_en && !pb_empty;
      if (pb_wr_valid && !pb_wr_ready) n_full_hold++;
      if (pb_rd_en && pb_empty) n_empty_rd++;

      @(posedge clk); #1;

      if (will_wr) begin
        void'(pending.pop_front());
        inject(waddr, w);
        stored.push_back(w);
        waddr = (waddr + 1) % DEPTH;
      end
      check(pb_out_valid == rpipe, "read latency: out_valid on the second edge after rd_en");
      if (pb_out_valid) begin
        e = stored.pop_front();
        n_words++;
        check(pb_out_data == e.out_data, $sformatf("data, injection %s", e.inj.name()));
        check(pb_out_ctrl == e.ctrl, $sformatf("markers, injection %s", e.inj.name()));
        check(pb_ecc_corrected == (e.inj inside {INJ_DATA, INJ_MARK, INJ_CHK}), "ecc_corrected");
        check(pb_ecc_uncorrectable == (e.inj == INJ_DOUBLE), "ecc_uncorrectable");
        check(pb_pkt_drop == e.drop, "packet drop");
        check(pb_frame_err == e.ferr, "framing error");
        if (e.drop) n_drop++;
        if (e.ferr) n_ferr++;
      end
      rpipe = will_rd;
    end

    $display("words out %0d; injected: none %0d data %0d marker %0d check %0d double %0d",
             n_words, n_inj[0], n_inj[1], n_inj[2], n_inj[3], n_inj[4]);
    $display("buffer full (write held) %0d, read on empty %0d, drops %0d, framing errors %0d",
             n_full_hold, n_empty_rd, n_drop, n_ferr);
    check(n_words > 100, "too few words went through");
    for (int i = 0; i < 5; i++) check(n_inj[i] > 0, "an injection kind never happened");
    check(n_full_hold > 0, "buffer never full");
    check(n_empty_rd > 0, "buffer never read while empty");
    check(n_drop > 0, "no packet dropped");
    check(n_ferr > 0, "no framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
