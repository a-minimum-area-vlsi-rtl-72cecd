// tb_mccc: self-checking testbench of the mesh of CCCs.
//
// Two instances sort random words, words with many equal values, and
// reverse-sorted words: a 2 x 2 mesh of 4-word modules (n = 16) and a 4 x 4
// mesh of 2-word modules (n = 32, so that mesh steps of two hops occur).
// The output, in processor order, must be the sorted input. The number of
// cycles to `done` must match the schedule worked out here: per bitonic
// step on dimension d, 2 cycles inside a module (d < RHO), or 3 + 2^l cycles
// for a mesh dimension spanning 2^l hops, plus 1.
module tb_mccc;
  localparam int unsigned W = 10;
  localparam int unsigned SA = 1, RA = 2, NA = 2 ** (2*SA + RA);
  localparam int unsigned SB = 2, RB = 1, NB = 2 ** (2*SB + RB);

  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] in_a [NA], out_a [NA];
  logic [W-1:0] in_b [NB], out_b [NB];
  logic busy_a, done_a, busy_b, done_b;
  int checks = 0, failures = 0;
  int n_local = 0, n_mesh1 = 0, n_mesh2 = 0;

  always #5 clk = ~clk;

  mccc #(.SIGMA(SA), .RHO(RA), .W(W)) u_a (.clk, .rst_n, .start, .in_val(in_a),
                                          .out_val(out_a), .busy(busy_a), .done(done_a));
  mccc #(.SIGMA(SB), .RHO(RB), .W(W)) u_b (.clk, .rst_n, .start, .in_val(in_b),
                                          .out_val(out_b), .busy(busy_b), .done(done_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int sched(int unsigned sigma, int unsigned rho, bit count);
    int c;
    c = 1;
    for (int p = 1; p <= 2*sigma + rho; p++)
      for (int d = p - 1; d >= 0; d--)
        if (d < rho) begin
          c += 2;
          if (count) n_local++;
        end else begin
          c += 3 + 2 ** ((d - rho) / 2);
          if (count && (d - rho) / 2 == 0) n_mesh1++;
          if (count && (d - rho) / 2 > 0)  n_mesh2++;
        end
    return c;
  endfunction

  initial begin
    int unsigned ea [NA], eb [NB];
    int cyc, ga, gb;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      for (int k = 0; k < NA; k++)
        in_a[k] = (trial % 3 == 0) ? W'($urandom) : (trial % 3 == 1) ? W'($urandom_range(3)) : W'(900 - 7*k);
      for (int k = 0; k < NB; k++)
        in_b[k] = (trial % 3 == 0) ? W'($urandom) : (trial % 3 == 1) ? W'($urandom_range(3)) : W'(900 - 7*k);
      for (int k = 0; k < NA; k++) ea[k] = in_a[k];
      for (int k = 0; k < NB; k++) eb[k] = in_b[k];
      ea.sort();
      eb.sort();
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1; ga = -1; gb = -1;
      while (ga < 0 || gb < 0) begin
        if (done_a && ga < 0) ga = cyc;
        if (done_b && gb < 0) gb = cyc;
        @(negedge clk);
        cyc++;
      end
      check(ga == sched(SA, RA, 1), $sformatf("n=16 cycles %0d expected %0d", ga, sched(SA, RA, 0)));
      check(gb == sched(SB, RB, 1), $sformatf("n=32 cycles %0d expected %0d", gb, sched(SB, RB, 0)));
      for (int k = 0; k < NA; k++)
        check(out_a[k] == W'(ea[k]), $sformatf("trial %0d n=16 out[%0d]=%0d expected %0d", trial, k, out_a[k], ea[k]));
      for (int k = 0; k < NB; k++)
        check(out_b[k] == W'(eb[k]), $sformatf("trial %0d n=32 out[%0d]=%0d expected %0d", trial, k, out_b[k], eb[k]));
    end
    check(n_local > 0 && n_mesh1 > 0 && n_mesh2 > 0, "local, one-hop and two-hop steps all exercised");
    $display("steps: in-module %0d, one-hop mesh %0d, two-hop mesh %0d", n_local, n_mesh1, n_mesh2);
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
