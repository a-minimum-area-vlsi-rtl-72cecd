// tb_combination_sorter: end-to-end test of the three-stage sorter.
//
// Runs the sorter at reduced size (n = 32: m = 2, 4, 4; comb-trees in the
// last stage, as at full size) on random inputs, inputs with many equal
// values, already sorted and reverse sorted inputs. Each output must be the
// sorted input; `done` must come exactly at the latency given by the three
// combiner latencies, and each coalescer must report done once per sort.
// The mesh of CCCs beside it (s = 2, r = 8) sorts the first 32 words of
// each input and is checked the same way. Counters show that every
// situation occurred at least once.
module tb_combination_sorter;
  localparam int unsigned Q = 8, MU1 = 1, MU2 = 2, MU3 = 2;
  localparam int unsigned N = 2 ** (MU1 + MU2 + MU3);
  localparam int unsigned SIGMA = 1, RHO = 3, NM = 2 ** (2*SIGMA + RHO);

  // Mesh-of-CCCs cycles: 2 per in-module step, 3 + 2^l per mesh step, plus 1.
  function automatic int unsigned mlat();
    int unsigned c;
    c = 1;
    for (int p = 1; p <= 2*SIGMA + RHO; p++)
      for (int d = p - 1; d >= 0; d--)
        c += (d < RHO) ? 2 : 3 + 2 ** ((d - RHO) / 2);
    return c;
  endfunction

  // Combiner latency: 5*tau + 11 + (mu+tau) + depth + 1.
  function automatic int unsigned clat(int unsigned mu, int unsigned tau, bit comb);
    return 5*tau + 11 + (mu + tau) + (comb ? (2**mu - 1) : mu) + 1;
  endfunction
  localparam int unsigned LAT = clat(MU1, 0, 0) + clat(MU2, MU1, 0) + clat(MU3, MU1+MU2, 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [Q-1:0] in_val [N];
  logic [Q-1:0] out_val [N];
  logic busy, done;
  logic [2:0] stage_done;
  logic mccc_start = 0;
  logic [Q-1:0] mccc_in [NM], mccc_out [NM];
  logic mccc_busy, mccc_done;
  int n_mccc = 0;
  int checks = 0, failures = 0;
  int n_stage [3];
  int n_random = 0, n_dups = 0, n_sorted = 0, n_reverse = 0;

  always #5 clk = ~clk;

  combination_sorter #(.Q(Q), .MU1(MU1), .MU2(MU2), .MU3(MU3),
                       .COMB1(1'b0), .COMB2(1'b0), .COMB3(1'b1),
                       .SIGMA(SIGMA), .RHO(RHO)) u_dut (
    .clk, .rst_n, .start, .in_val, .out_val, .busy, .done, .stage_done,
    .mccc_start, .mccc_in, .mccc_out, .mccc_busy, .mccc_done);

  always @(posedge clk)
    for (int s = 0; s < 3; s++) if (stage_done[s]) n_stage[s]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int unsigned exp_v [N];
    int cyc, got;
    int st0 [3];
    for (int s = 0; s < 3; s++) n_stage[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 24; trial++) begin
      int kind;
      kind = trial % 4;
      for (int k = 0; k < N; k++)
        case (kind)
          0: in_val[k] = Q'($urandom);
          1: in_val[k] = Q'($urandom_range(3));
          2: in_val[k] = Q'(k * 5);
          default: in_val[k] = Q'(250 - k * 3);
        endcase
      case (kind)
        0: n_random++;
        1: n_dups++;
        2: n_sorted++;
        default: n_reverse++;
      endcase
      for (int k = 0; k < N; k++) exp_v[k] = in_val[k];
      exp_v.sort();
      for (int s = 0; s < 3; s++) st0[s] = n_stage[s];
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
      check(got == LAT, $sformatf("latency %0d, expected %0d", got, LAT));
      // The mesh of CCCs sorts the first NM words of the same input.
      begin
        int unsigned em [NM];
        for (int k = 0; k < NM; k++) begin
          mccc_in[k] = in_val[k];
          em[k] = in_val[k];
        end
        em.sort();
        @(negedge clk);
        mccc_start = 1;
        @(negedge clk);
        mccc_start = 0;
        cyc = 1; got = -1;
        while (got < 0) begin
          if (mccc_done) got = cyc;
          @(negedge clk);
          cyc++;
        end
        n_mccc++;
        check(got == mlat(), $sformatf("mesh of CCCs cycles %0d, expected %0d", got, mlat()));
        for (int k = 0; k < NM; k++)
          check(mccc_out[k] == Q'(em[k]),
                $sformatf("trial %0d mccc out[%0d]=%0d expected %0d", trial, k, mccc_out[k], em[k]));
      end
      for (int s = 0; s < 3; s++)
        check(n_stage[s] == st0[s] + 1, $sformatf("stage %0d done count", s + 1));
      for (int k = 0; k < N; k++)
        check(out_val[k] == Q'(exp_v[k]),
              $sformatf("trial %0d out[%0d]=%0d expected %0d", trial, k, out_val[k], exp_v[k]));
    end
    check(n_random > 0 && n_dups > 0 && n_sorted > 0 && n_reverse > 0, "input kinds");
    for (int s = 0; s < 3; s++) check(n_stage[s] > 0, "stage never ran");
    check(n_mccc > 0, "mesh of CCCs never ran");
    $display("sorts: random %0d, equal values %0d, sorted %0d, reversed %0d; stage runs %0d %0d %0d; mesh-of-CCC sorts %0d",
             n_random, n_dups, n_sorted, n_reverse, n_stage[0], n_stage[1], n_stage[2], n_mccc);
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
