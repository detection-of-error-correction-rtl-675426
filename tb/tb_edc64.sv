// tb_edc64
//
// Self-checking test of edc64 (64-bit slice). For random words a, the
// received word b is a with 0, 1, 2 or 3 bits flipped at random distinct
// positions, plus exhaustive coverage of every double error position pair
// against bit 0 and bit 63. Expected, one clock edge later:
//   0 flips: y = b = a, err = 0, cor = 0
//   1 flip : y = b (no pair to correct), err = 1, cor = 0
//   2 flips: y = a, err = 1, cor = 1
//   3 flips: y = a except the highest flipped bit, err = 1, cor = 1
module tb_edc64;
  localparam int W = 64;

  logic clk = 1'b0, rst;
  logic [W-1:0] a_i, b_i, y_o;
  logic err_o, cor_o;
  int checks = 0, failures = 0;
  int n_case [4] = '{0, 0, 0, 0};

  edc64 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] a, input int pos []);
    logic [W-1:0] b, exp;
    int hi;
    b = a; hi = -1;
    foreach (pos[i]) begin
      b[pos[i]] = ~b[pos[i]];
      if (pos[i] > hi) hi = pos[i];
    end
    a_i = a; b_i = b;
    @(posedge clk); #1;
    case (pos.size())
      0: exp = a;
      1: exp = b;
      2: exp = a;
      default: begin exp = a; exp[hi] = ~exp[hi]; end
    endcase
    n_case[pos.size()]++;
    check(y_o == exp, $sformatf("y with %0d flips", pos.size()));
    check(err_o == (pos.size() > 0), "err");
    check(cor_o == (pos.size() >= 2), "cor");
    // the inputs change now: the registered outputs must not
    a_i = ~a; #1;
    check(y_o == exp, "output must hold until the next edge");
  endtask

  function automatic logic [W-1:0] rw();
    return {$urandom, $urandom};
  endfunction

  initial begin
    int p [];
    rst = 1'b1; a_i = '0; b_i = '1;
    @(posedge clk); #1;
    check(y_o == '0 && !err_o && !cor_o, "reset");
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int n;
      n = t % 4;
      p = new[n];
      for (int i = 0; i < n; i++) begin
        bit dup;
        do begin
          p[i] = $urandom_range(W - 1);
          dup = 1'b0;
          for (int j = 0; j < i; j++) if (p[j] == p[i]) dup = 1'b1;
        end while (dup);
      end
      run(rw(), p);
    end
    for (int j = 1; j < W; j++) run(rw(), '{0, j});
    for (int j = 0; j < W - 1; j++) run(rw(), '{j, W - 1});
    $display("cases: %0d clean, %0d single, %0d double, %0d triple",
             n_case[0], n_case[1], n_case[2], n_case[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
