// tb_combiner: self-checking testbench of the (m,t)-combiner.
//
// Two combiners with m = 4 and t = 4 are tested side by side, one with
// complete binary row trees and one with comb-trees. Each trial feeds m
// random sequences of t words, each sorted, half of the trials drawing from
// a narrow value range so that equal values occur within and across
// sequences. The output must equal the sorted multiset of the inputs, and
// `done` must come exactly LATENCY cycles after `start`.
module tb_combiner;
  localparam int unsigned MU = 2, TAU = 2, Q = 8;
  localparam int unsigned N = 2 ** (MU + TAU), T = 2 ** TAU;
  localparam int unsigned LAT_FULL = 5*TAU + 11 + (MU+TAU) + MU + 1;
  localparam int unsigned LAT_COMB = 5*TAU + 11 + (MU+TAU) + (2**MU - 1) + 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [Q-1:0] in_val [N];
  logic [Q-1:0] out_f [N], out_c [N];
  logic busy_f, done_f, busy_c, done_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  combiner #(.MU(MU), .TAU(TAU), .Q(Q), .COMB(1'b0)) u_full (
    .clk, .rst_n, .start, .in_val, .out_val(out_f), .busy(busy_f), .done(done_f));
  combiner #(.MU(MU), .TAU(TAU), .Q(Q), .COMB(1'b1)) u_comb (
    .clk, .rst_n, .start, .in_val, .out_val(out_c), .busy(busy_c), .done(done_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int unsigned exp_v [N];
    int unsigned seq [T];
    int cyc, cf, cc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      int unsigned range;
      range = (trial % 2) ? 256 : 5;
      for (int i = 0; i < 2**MU; i++) begin
        for (int l = 0; l < T; l++) seq[l] = $urandom_range(range - 1);
        seq.sort();
        for (int l = 0; l < T; l++) in_val[i*T+l] = Q'(seq[l]);
      end
      for (int k = 0; k < N; k++) exp_v[k] = in_val[k];
      exp_v.sort();
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1; cf = -1; cc = -1;
      while (cf < 0 || cc < 0) begin
        if (done_f && cf < 0) cf = cyc;
        if (done_c && cc < 0) cc = cyc;
        @(negedge clk);
        cyc++;
      end
      check(cf == LAT_FULL, $sformatf("full-tree latency %0d, expected %0d", cf, LAT_FULL));
      check(cc == LAT_COMB, $sformatf("comb-tree latency %0d, expected %0d", cc, LAT_COMB));
      for (int k = 0; k < N; k++) begin
        check(out_f[k] == Q'(exp_v[k]),
              $sformatf("trial %0d full out[%0d]=%0d expected %0d", trial, k, out_f[k], exp_v[k]));
        check(out_c[k] == Q'(exp_v[k]),
              $sformatf("trial %0d comb out[%0d]=%0d expected %0d", trial, k, out_c[k], exp_v[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
