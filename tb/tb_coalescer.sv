// tb_coalescer: self-checking testbench of the coalescer.
//
// A coalescer of NC = 4 combiners with m = 2 and t_{i-1} = 2 receives 16
// words forming eight sorted blocks of 2; each run of 2 blocks (4 words) must
// come out as one sorted block, and no word may cross into another
// combiner's block. The latency of a (2,2)-combiner with full trees is
// checked as well.
module tb_coalescer;
  localparam int unsigned MU = 1, TAU = 1, NC = 4, Q = 8;
  localparam int unsigned TI = 2 ** (MU + TAU), TP = 2 ** TAU, N = NC * TI;
  localparam int unsigned LAT = 5*TAU + 11 + (MU+TAU) + MU + 1;
  logic clk = 0, rst_n = 0, start = 0;
  logic [Q-1:0] in_val [N], out_val [N];
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coalescer #(.MU(MU), .TAU(TAU), .NC(NC), .Q(Q), .COMB(1'b0)) u_dut (
    .clk, .rst_n, .start, .in_val, .out_val, .busy, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int unsigned blk [TP];
    int unsigned grp [TI];
    int cyc, got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      for (int b = 0; b < N / TP; b++) begin
        for (int l = 0; l < TP; l++) blk[l] = $urandom_range((trial % 2) ? 255 : 3);
        blk.sort();
        for (int l = 0; l < TP; l++) in_val[b*TP+l] = Q'(blk[l]);
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1; got = -1;
      while (got < 0) begin
        if (done) got = cyc;
        @(negedge clk);
        cyc++;
      end
      check(got == LAT, $sformatf("latency %0d expected %0d", got, LAT));
      for (int c = 0; c < NC; c++) begin
        for (int k = 0; k < TI; k++) grp[k] = in_val[c*TI+k];
        grp.sort();
        for (int k = 0; k < TI; k++)
          check(out_val[c*TI+k] == Q'(grp[k]),
                $sformatf("trial %0d combiner %0d word %0d = %0d expected %0d",
                          trial, c, k, out_val[c*TI+k], grp[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
