// tb_ecc_top
//
// End-to-end test of ecc_top at its default parameters (256 data bits,
// 3 markers, 9 check bits, 16-word buffer, 4 x 64-bit correction slices).
//
// Packet buffer: a generator makes packets of 1 to 6 words with random ERR
// marks and occasional framing faults (no SOP on a first word, SOP inside a
// packet); the expected drop and framing flags of every word are worked
// out when it is generated. Words are written whenever the buffer is ready
// and read with a rate that alternates between slow and fast phases, so the
// buffer fills (writes held off) and runs empty (reads ignored). Right
// after a word is written, errors are injected into the stored codeword:
// a single error in a data bit, a marker bit or a check bit, or a double
// error in two data bits chosen so that the decoder must flag it as
// uncorrectable. The parity-check columns needed for that choice are read
// from a separate encoder instance. Every word must come out two clock
// edges after its read request (the RAM read register, then the output
// registers), with the original data and markers (for the
// uncorrectable case: the stored data with its two flipped bits and the
// original markers) and the right ECC status, drop and framing flags.
//
// Double-error corrector: every cycle a random 256-bit word is sent with
// 0 to 3 flipped bits per quarter and the result checked one edge later.
//
// Each mechanism is counted, and one that never happened is a failure.
module tb_ecc_top;
  import pkt_pkg::*;
  localparam int D = 256, PCD = 3, PD = 6, P = PCD + PD, C = 3, DEPTH = 16;
  localparam int S = 4, DW = 256;
  localparam int NCYC = 6000;

  logic clk = 1'b0;
  logic pb_rst_n, pb_wr_valid, pb_wr_ready, pb_rd_en, pb_out_valid;
  logic [D-1:0] pb_wr_data, pb_out_data;
  pkt_ctrl_t pb_wr_ctrl, pb_out_ctrl;
  logic pb_pkt_drop, pb_frame_err, pb_ecc_corrected, pb_ecc_uncorrectable, pb_empty;
  pkt_state_t pb_state;
  logic [$clog2(DEPTH):0] pb_count;
  logic dc_rst;
  logic [DW-1:0] dc_a, dc_b, dc_y;
  logic [S-1:0] dc_err, dc_cor;

  ecc_top dut (.*);

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
  int n_dc [4] = '{0, 0, 0, 0};

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
      dut.u_pb.u_ram.mem[addr][a] = ~dut.u_pb.u_ram.mem[addr][a];
    end else if (r < 8) begin
      w.inj = INJ_MARK;
      a = D + $urandom_range(C - 1);
      dut.u_pb.u_ram.mem[addr][a] = ~dut.u_pb.u_ram.mem[addr][a];
    end else if (r < 9) begin
      w.inj = INJ_CHK;
      a = D + C + $urandom_range(P - 1);
      dut.u_pb.u_ram.mem[addr][a] = ~dut.u_pb.u_ram.mem[addr][a];
    end else begin
      int syn;
      w.inj = INJ_DOUBLE;
      do begin
        a = $urandom_range(D - 1);
        b = $urandom_range(D - 1);
        syn = int'(cols[a] ^ cols[b]);
      end while (a == b || is_col.exists(syn) || $countones(syn) == 1 ||
                 is_ctrl_shared.exists(syn % (1 << PCD)));
      dut.u_pb.u_ram.mem[addr][a] = ~dut.u_pb.u_ram.mem[addr][a];
      dut.u_pb.u_ram.mem[addr][b] = ~dut.u_pb.u_ram.mem[addr][b];
      w.out_data[a] = ~w.out_data[a];
      w.out_data[b] = ~w.out_data[b];
    end
    n_inj[w.inj]++;
  endtask

  // Double-error corrector stimulus and its expected result.
  logic [DW-1:0] dc_exp;
  logic [S-1:0]  dc_exp_err, dc_exp_cor;
  bit            dc_pending = 1'b0;

  task automatic dc_drive();
    logic [DW-1:0] a, b;
    for (int i = 0; i < DW; i += 32) a[i +: 32] = $urandom;
    b = a; dc_exp = a;
    for (int s = 0; s < S; s++) begin
      int n, hi, q;
      int used [$];
      used.delete();
      n = $urandom_range(3);
      hi = -1;
      while (used.size() < n) begin
        q = $urandom_range(63);
        if (!(q inside {used})) used.push_back(q);
      end
      foreach (used[i]) begin
        b[s*64 + used[i]] = ~b[s*64 + used[i]];
        if (used[i] > hi) hi = used[i];
      end
      if (n == 1 || n == 3) dc_exp[s*64 + hi] = b[s*64 + hi];
      dc_exp_err[s] = (n > 0);
      dc_exp_cor[s] = (n >= 2);
      n_dc[n]++;
    end
    dc_a = a; dc_b = b;
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

    pb_rst_n = 1'b0; dc_rst = 1'b1;
    pb_wr_valid = 1'b0; pb_rd_en = 1'b0; pb_wr_data = '0; pb_wr_ctrl = '0;
    dc_a = '0; dc_b = '0;
    repeat (3) @(posedge clk);
    #1 pb_rst_n = 1'b1; dc_rst = 1'b0;

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
      dc_drive();

      @(posedge clk); #1;

      // double-error corrector: result of the word driven before this edge
      check(dc_y == dc_exp, "dc corrected word");
      check(dc_err == dc_exp_err && dc_cor == dc_exp_cor, "dc flags");

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
    $display("corrector slices with 0/1/2/3 flips: %0d %0d %0d %0d", n_dc[0], n_dc[1], n_dc[2], n_dc[3]);
    check(n_words > 100, "too few words went through");
    for (int i = 0; i < 5; i++) check(n_inj[i] > 0, "an injection kind never happened");
    check(n_full_hold > 0, "buffer never full");
    check(n_empty_rd > 0, "buffer never read while empty");
    check(n_drop > 0, "no packet dropped");
    check(n_ferr > 0, "no framing error");
    for (int i = 0; i < 4; i++) check(n_dc[i] > 0, "a corrector case never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
