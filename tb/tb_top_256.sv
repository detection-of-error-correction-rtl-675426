// tb_top_256
//
// Self-checking test of top_256. Random 256-bit words are sent with a
// random number (0 to 3) of flipped bits in each 64-bit quarter. Expected
// per quarter, one clock edge later: the original quarter after 0 or 2
// flips, the received quarter after 1 flip, the original quarter except
// its highest flipped bit after 3 flips; err and cor per quarter.
module tb_top_256;
  localparam int S = 4, SW = 64, W = S * SW;

  logic clk = 1'b0, rst;
  logic [W-1:0] a_i, b_i, y_o;
  logic [S-1:0] err_o, cor_o;
  int checks = 0, failures = 0, n_multi = 0;

  top_256 dut (.*);

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

  initial begin
    logic [W-1:0] a, b, exp;
    logic [S-1:0] exp_err, exp_cor;
    rst = 1'b1; a_i = '0; b_i = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      int ncor;
      for (int i = 0; i < W; i += 32) a[i +: 32] = $urandom;
      b = a; exp = a; ncor = 0;
      for (int s = 0; s < S; s++) begin
        int n, hi, q;
        int used [$];
        n = $urandom_range(3);
        used.delete();
        hi = -1;
        while (used.size() < n) begin
          q = $urandom_range(SW - 1);
          if (!(q inside {used})) used.push_back(q);
        end
        foreach (used[i]) begin
          b[s*SW + used[i]] = ~b[s*SW + used[i]];
          if (used[i] > hi) hi = used[i];
        end
        if (n == 1) exp[s*SW + hi] = b[s*SW + hi];
        if (n == 3) exp[s*SW + hi] = b[s*SW + hi];
        exp_err[s] = (n > 0);
        exp_cor[s] = (n >= 2);
        if (n >= 2) ncor++;
      end
      if (ncor >= 2) n_multi++;
      a_i = a; b_i = b;
      @(posedge clk); #1;
      check(y_o == exp, "corrected word");
      check(err_o == exp_err, "err per slice");
      check(cor_o == exp_cor, "cor per slice");
    end
    check(n_multi > 0, "corrections in several slices at once never happened");
    $display("words with corrections in >= 2 slices: %0d", n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
