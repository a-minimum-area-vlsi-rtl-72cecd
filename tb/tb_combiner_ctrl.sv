// tb_combiner_ctrl: self-checking testbench of the combiner sequencer.
//
// For t = 8 (tau = 3) the instruction stream after one start is recorded and
// compared, step by step, with the sequence worked out from the algorithm's
// phases. A model row tree answers sum_done a fixed 9 cycles after
// sum_start. The cycle of `done` and the idle `busy` are checked too.
module tb_combiner_ctrl;
  import csort_pkg::*;
  localparam int unsigned TAU = 3, SUMLAT = 9;
  logic clk = 0, rst_n = 0, start = 0, sum_done = 0;
  op_e op;
  logic [DIM_W-1:0] dim;
  logic sum_start, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  combiner_ctrl #(.TAU(TAU)) u_dut (.clk, .rst_n, .start, .sum_done, .op, .dim,
                                    .sum_start, .busy, .done);

  // Model of the row trees' latency.
  int sum_cnt = -1;
  always @(posedge clk) begin
    sum_done <= 1'b0;
    if (sum_start) sum_cnt <= 1;
    else if (sum_cnt > 0) begin
      if (sum_cnt == SUMLAT - 1) begin
        sum_done <= 1'b1;
        sum_cnt  <= -1;
      end else sum_cnt <= sum_cnt + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  op_e exp_op [$];
  int  exp_dim [$];
  task automatic push(op_e o, int d);
    exp_op.push_back(o);
    exp_dim.push_back(d);
  endtask

  initial begin
    int n, cyc;
    push(OP_LOAD_L, 0); push(OP_COPY_DIAG, 0); push(OP_LOAD_R, 0);
    for (int d = 0; d < TAU; d++) push(OP_REVERSE, d);
    for (int d = TAU; d >= 0; d--) push(OP_MERGE, d);
    push(OP_RANK_INIT, -1);
    for (int d = 0; d <= TAU; d++) push(OP_RETRACE, d);
    for (int k = 0; k < SUMLAT + 1; k++) push(OP_SUM, -1);
    push(OP_LOAD_TOT, -1);
    for (int d = 0; d < TAU; d++) push(OP_CONC, d);
    for (int d = TAU - 1; d >= 0; d--) push(OP_EXP, d);
    push(OP_TRANSFER, -1); push(OP_OUTPUT, -1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      check(!busy && op == OP_NOP, "idle");
      start = 1;
      @(negedge clk);
      start = 0;
      for (n = 0; n < exp_op.size(); n++) begin
        check(op == exp_op[n], $sformatf("step %0d op %s expected %s", n, op.name(), exp_op[n].name()));
        if (exp_dim[n] >= 0)
          check(dim == DIM_W'(exp_dim[n]), $sformatf("step %0d dim %0d expected %0d", n, dim, exp_dim[n]));
        check(busy && !done, "busy during run");
        @(negedge clk);
      end
      check(done, "done after the last step");
      @(negedge clk);
      check(!done && !busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
