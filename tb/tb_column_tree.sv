// tb_column_tree: self-checking testbench of the column tree.
//
// An 8-leaf tree gets random words with exactly one valid leaf (as in both
// of its uses in the combiner), and also with no valid leaf. The root must
// carry the valid leaf's word, or report nothing valid, and every leaf must
// receive the root by broadcast.
module tb_column_tree;
  localparam int unsigned M = 8, KW = 12;
  logic [KW-1:0] leaf_key [M];
  logic          leaf_vld [M];
  logic [KW-1:0] root_key;
  logic          root_vld;
  logic [KW-1:0] bcast [M];
  int checks = 0, failures = 0;

  column_tree #(.M(M), .KW(KW)) u_dut (.leaf_key, .leaf_vld, .root_key, .root_vld, .bcast);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int sel;
    for (int trial = 0; trial < 300; trial++) begin
      sel = (trial % 10 == 9) ? -1 : $urandom_range(M - 1);
      for (int k = 0; k < M; k++) begin
        leaf_key[k] = KW'($urandom);
        leaf_vld[k] = (k == sel);
      end
      #1;
      if (sel < 0) begin
        check(!root_vld, "no leaf valid");
      end else begin
        check(root_vld, "root valid");
        check(root_key == leaf_key[sel], $sformatf("root from leaf %0d", sel));
        for (int k = 0; k < M; k++)
          check(bcast[k] == leaf_key[sel], "broadcast");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
