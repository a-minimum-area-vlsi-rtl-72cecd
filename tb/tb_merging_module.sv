// tb_merging_module: self-checking testbench of one merging module.
//
// Two modules with t = 4 are driven instruction by instruction, as the
// combiner controller would: a diagonal module M_11 and an off-diagonal
// module M_21. Keys are {value, sequence index, position}. After phase B the
// partial ranks must equal the number of keys of S_j below each s_i(l)
// (C_11(l) = l for the diagonal module). Phase D is then given random,
// strictly increasing total ranks; every element whose rank lies in
// [COL*t, COL*t + t) must arrive at right column rank mod t, and no other
// right column may be valid. Routing conflicts would also fire the module's
// own assertions.
module tb_merging_module;
  import csort_pkg::*;
  localparam int unsigned MU = 2, TAU = 2, T = 4, VW = 8, KW = VW + MU + TAU;
  localparam int unsigned COL = 1;

  logic clk = 0, rst_n = 0;
  op_e op = OP_NOP;
  logic [DIM_W-1:0] dim = '0;
  logic [KW-1:0] rkey_d [T], rkey_o [T], ckey_d [T], ckey_o [T];
  logic [MU+TAU-1:0] tot [T];
  logic [TAU:0] pr_d [T], pr_o [T];
  logic [KW-1:0] rk_d [T], rk_o [T];
  logic rv_d [T], rv_o [T];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  merging_module #(.MU(MU), .TAU(TAU), .KW(KW)) u_diag (
    .clk, .rst_n, .row_idx(MU'(1)), .col_idx(MU'(COL)), .op, .dim, .row_key(rkey_d), .col_key(ckey_d), .tot,
    .prank(pr_d), .right_key(rk_d), .right_vld(rv_d));
  merging_module #(.MU(MU), .TAU(TAU), .KW(KW)) u_off (
    .clk, .rst_n, .row_idx(MU'(2)), .col_idx(MU'(COL)), .op, .dim, .row_key(rkey_o), .col_key(ckey_o), .tot,
    .prank(pr_o), .right_key(rk_o), .right_vld(rv_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step(input op_e o, input int d);
    @(negedge clk);
    op  = o;
    dim = DIM_W'(d);
    @(negedge clk);
    op  = OP_NOP;
  endtask

  function automatic logic [KW-1:0] mk(int unsigned v, int unsigned s, int unsigned p);
    return {VW'(v), MU'(s), TAU'(p)};
  endfunction

  initial begin
    int unsigned si [T], sj [T], r [T];
    int unsigned cnt;
    int unsigned range;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      range = (trial % 2) ? 256 : 4;
      for (int l = 0; l < T; l++) begin
        si[l] = $urandom_range(range - 1);
        sj[l] = $urandom_range(range - 1);
      end
      si.sort();
      sj.sort();
      for (int l = 0; l < T; l++) begin
        rkey_d[l] = mk(si[l], 1, l);   // diagonal: S_1 against itself
        rkey_o[l] = mk(si[l], 2, l);   // off-diagonal: S_2 against S_1
        ckey_o[l] = mk(sj[l], 1, l);
      end
      step(OP_LOAD_L, 0);
      step(OP_COPY_DIAG, 0);
      for (int l = 0; l < T; l++) begin
        check(rv_d[l] && !rv_o[l], "diagonal copy valid flags");
        check(rk_d[l] == rkey_d[l], "diagonal copy");
        ckey_d[l] = rk_d[l];
      end
      step(OP_LOAD_R, 0);
      for (int d = 0; d < TAU; d++) step(OP_REVERSE, d);
      for (int d = TAU; d >= 0; d--) step(OP_MERGE, d);
      step(OP_RANK_INIT, 0);
      for (int d = 0; d <= TAU; d++) step(OP_RETRACE, d);
      for (int l = 0; l < T; l++) begin
        check(pr_d[l] == (TAU+1)'(l), $sformatf("C_11(%0d)=%0d", l, pr_d[l]));
        cnt = 0;
        for (int k = 0; k < T; k++) if (ckey_o[k] < rkey_o[l]) cnt++;
        check(pr_o[l] == (TAU+1)'(cnt),
              $sformatf("trial %0d C_21(%0d)=%0d expected %0d", trial, l, pr_o[l], cnt));
      end
      // Phase D with strictly increasing total ranks.
      r[0] = $urandom_range(5);
      for (int l = 1; l < T; l++) r[l] = r[l-1] + 1 + $urandom_range(trial % 3);
      for (int l = 0; l < T; l++) tot[l] = (MU+TAU)'(r[l]);
      step(OP_LOAD_TOT, 0);
      for (int d = 0; d < TAU; d++) step(OP_CONC, d);
      for (int d = TAU - 1; d >= 0; d--) step(OP_EXP, d);
      step(OP_TRANSFER, 0);
      for (int c = 0; c < T; c++) begin
        bit want;
        int unsigned src;
        want = 0; src = 0;
        for (int l = 0; l < T; l++)
          if (r[l] < 2**(MU+TAU) && r[l] / T == COL && r[l] % T == c) begin
            want = 1; src = l;
          end
        check(rv_d[c] == want && rv_o[c] == want,
              $sformatf("trial %0d right column %0d valid", trial, c));
        if (want) begin
          check(rk_d[c] == rkey_d[src], $sformatf("trial %0d diag column %0d key", trial, c));
          check(rk_o[c] == rkey_o[src], $sformatf("trial %0d off column %0d key", trial, c));
        end
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
