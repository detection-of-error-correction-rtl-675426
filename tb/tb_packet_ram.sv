// tb_packet_ram
//
// Self-checking test of packet_ram at its default size (268-bit words,
// 16 entries). A queue in the testbench is the reference. Random writes
// and reads run for many cycles, with phases biased towards filling and
// draining so that both full and empty are reached. Checked every cycle:
// read data and rd_valid one cycle after a read of a non-empty queue,
// full, empty and count; writes when full and reads when empty must be
// ignored.
module tb_packet_ram;
  localparam int W = 268, DEPTH = 16;

  logic clk = 1'b0, rst_n;
  logic wr_en, rd_en, rd_valid, full, empty;
  logic [W-1:0] wr_word, rd_word;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0, n_full_wr = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] exp_word;
  logic exp_valid;

  packet_ram #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int i = 0; i < W; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_word = '0; exp_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int bias;
      bias = ((cyc / 200) % 2 != 0) ? 75 : 25;  // alternate fill and drain phases
      wr_en   = ($urandom_range(99) < 100 - bias);
      rd_en   = ($urandom_range(99) < bias);
      wr_word = rand_word();
      // state before the edge
      check(count == ($clog2(DEPTH)+1)'(model.size()), "count");
      check(full == (model.size() == DEPTH), "full");
      check(empty == (model.size() == 0), "empty");
      if (full && wr_en) n_full_wr++;
      if (empty && rd_en) n_empty_rd++;
      if (full) n_full++;
      @(posedge clk);
      // reference update at the edge
      exp_valid = 1'b0;
      if (rd_en && model.size() > 0) begin
        exp_word  = model.pop_front();
        exp_valid = 1'b1;
      end
      if (wr_en && model.size() + (exp_valid ? 1 : 0) < DEPTH) model.push_back(wr_word);
      #1;
      check(rd_valid == exp_valid, "rd_valid");
      if (exp_valid) check(rd_word == exp_word, "rd_word");
    end
    check(n_full_wr > 0, "write while full never happened");
    check(n_empty_rd > 0, "read while empty never happened");
    $display("full cycles %0d, writes refused %0d, reads refused %0d", n_full, n_full_wr, n_empty_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
