// tb_row_tree: self-checking testbench of the row tree.
//
// A complete-binary-tree instance and a comb-tree instance, both with 8
// leaves and 6-bit sums, add random leaf values; each sum is compared with
// the arithmetic sum, and `done` must rise exactly W + DEPTH + 1 cycles after
// `start` (DEPTH = 3 for the binary tree, 7 for the comb-tree). The
// broadcast path is checked too.
module tb_row_tree;
  localparam int unsigned M = 8, W = 6, BW = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] leaf [M];
  logic [W-1:0] sum_f, sum_c;
  logic done_f, done_c;
  logic [BW-1:0] bin;
  logic [BW-1:0] bo_f [M], bo_c [M];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  row_tree #(.M(M), .W(W), .BW(BW), .COMB(1'b0)) u_full (
    .clk, .rst_n, .start, .leaf_val(leaf), .sum(sum_f), .done(done_f),
    .bcast_in(bin), .bcast_out(bo_f));
  row_tree #(.M(M), .W(W), .BW(BW), .COMB(1'b1)) u_comb (
    .clk, .rst_n, .start, .leaf_val(leaf), .sum(sum_c), .done(done_c),
    .bcast_in(bin), .bcast_out(bo_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int unsigned total;
    int cyc, cf, cc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 50; trial++) begin
      total = 0;
      for (int k = 0; k < M; k++) begin
        leaf[k] = W'($urandom_range((2**W - 1) / M));
        total += leaf[k];
      end
      if (trial == 0) begin
        total = 0;
        for (int k = 0; k < M; k++) begin
          leaf[k] = W'(k + 1);
          total += k + 1;
        end
      end
      bin = BW'($urandom);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int k = 0; k < M; k++)
        check(bo_f[k] == bin && bo_c[k] == bin, "broadcast");
      cyc = 1; cf = -1; cc = -1;
      while (cf < 0 || cc < 0) begin
        if (done_f && cf < 0) cf = cyc;
        if (done_c && cc < 0) cc = cyc;
        @(negedge clk);
        cyc++;
      end
      check(cf == W + 3 + 1, $sformatf("full latency %0d", cf));
      check(cc == W + 7 + 1, $sformatf("comb latency %0d", cc));
      check(sum_f == W'(total), $sformatf("full sum %0d expected %0d", sum_f, total));
      check(sum_c == W'(total), $sformatf("comb sum %0d expected %0d", sum_c, total));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
