// combiner: the (m,t)-COMBINER, m = 2^MU sorted sequences of t = 2^TAU words
// in, one sorted sequence of N = m*t words out.
//
// An m x m mesh of merging modules M_ij (merging_module) is joined by m*t row
// trees RT_i(l) (row_tree) and m*t column trees CT_j(l) (column_tree), the
// orthogonal-trees arrangement of the document. Module M_ij merges S_i with
// S_j and yields, for every s_i(l), how many elements of S_j precede it; the
// row tree RT_i(l) adds these partial ranks over j to give the final rank
// C_i(l) of s_i(l) and broadcasts it back; module M_ij then keeps the elements
// of S_i whose rank lies in [j*t, j*t+t), routes each to column t + (rank mod
// t), and the column tree CT_j(l) delivers s(j*t+l) at its root.
//
// Input s_i(l) is in_val[i*t+l]; output s(k) is out_val[k]. Before entering
// the mesh every word is extended with the tag {i, l} below its value bits,
// which breaks ties between equal values (see merging_module). COMB selects
// comb-trees instead of complete binary trees for the row-tree adders.
//
// Timing: pulse `start` while `busy` is low; in_val is read in the next
// cycle only. out_val is valid, and stays, from the cycle in which `done` is
// high, LATENCY = 5*TAU + 11 + (MU+TAU) + DEPTH + 1 cycles after start, with
// DEPTH = MU for full trees and 2^MU - 1 for comb-trees.
module combiner
  import csort_pkg::*;
#(
  parameter int unsigned MU   = 2,
  parameter int unsigned TAU  = 2,
  parameter int unsigned Q    = 8,     // word length
  parameter bit          COMB = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [Q-1:0] in_val  [2**(MU+TAU)],
  output logic [Q-1:0] out_val [2**(MU+TAU)],
  output logic         busy,
  output logic         done
);
  localparam int unsigned M    = 2 ** MU;
  localparam int unsigned T    = 2 ** TAU;
  localparam int unsigned N    = M * T;
  localparam int unsigned PW   = (TAU == 0) ? 1 : TAU;   // position tag bits
  localparam int unsigned KW   = Q + MU + PW;
  localparam int unsigned RWID = MU + TAU;               // total rank bits

  op_e              op;
  logic [DIM_W-1:0] dim;
  logic             sum_start, sum_done;

  // Row-side signals, indexed [i][l][j]; column side [j][l][i].
  logic [KW-1:0]   rkey     [M][T];
  logic [TAU:0]    prank    [M][M][T];      // [i][j][l]
  logic [RWID-1:0] rt_leaf  [M][T][M];      // [i][l][j]
  logic [RWID-1:0] rt_sum   [M][T];
  logic [RWID-1:0] rt_bc    [M][T][M];      // broadcast of C_i(l) to M_ij
  logic [KW-1:0]   mm_rkey  [M][M][T];      // [i][j][l]
  logic [RWID-1:0] mm_tot   [M][M][T];      // [i][j][l]
  logic [KW-1:0]   right_k  [M][M][T];      // [i][j][l]
  logic            right_v  [M][M][T];
  logic [KW-1:0]   ct_leaf_k [M][T][M];     // [j][l][i]
  logic            ct_leaf_v [M][T][M];
  logic [KW-1:0]   ct_root_k [M][T];
  logic            ct_root_v [M][T];
  logic [KW-1:0]   ct_bc     [M][T][M];     // [j][l][i]
  logic [KW-1:0]   mm_ckey   [M][M][T];     // [i][j][l]
  logic            rt_done   [M][T];

  combiner_ctrl #(.TAU(TAU)) u_ctrl (
    .clk, .rst_n, .start, .sum_done,
    .op, .dim, .sum_start, .busy, .done
  );
  assign sum_done = rt_done[0][0];

  // Input words with their tie-break tag {i, l}.
  for (genvar i = 0; i < M; i++) begin : g_in
    for (genvar l = 0; l < T; l++) begin : g_l
      assign rkey[i][l] = {in_val[i*T+l], MU'(i), PW'(l)};
    end
  end

  // Row trees: key broadcast to the row and bit-serial summation of ranks.
  for (genvar i = 0; i < M; i++) begin : g_rt_i
    for (genvar l = 0; l < T; l++) begin : g_rt_l
      logic [KW-1:0] kb [M];
      row_tree #(.M(M), .W(RWID), .BW(KW), .COMB(COMB)) u_rt (
        .clk, .rst_n, .start(sum_start),
        .leaf_val(rt_leaf[i][l]), .sum(rt_sum[i][l]), .done(rt_done[i][l]),
        .bcast_in(rkey[i][l]), .bcast_out(kb)
      );
      for (genvar j = 0; j < M; j++) begin : g_j
        assign mm_rkey[i][j][l]  = kb[j];
        assign rt_leaf[i][l][j]  = RWID'(prank[i][j][l]);
        assign rt_bc[i][l][j]    = rt_sum[i][l];
        assign mm_tot[i][j][l]   = rt_bc[i][l][j];
      end
    end
  end

  // Column trees.
  for (genvar j = 0; j < M; j++) begin : g_ct_j
    for (genvar l = 0; l < T; l++) begin : g_ct_l
      for (genvar i = 0; i < M; i++) begin : g_i
        assign ct_leaf_k[j][l][i] = right_k[i][j][l];
        assign ct_leaf_v[j][l][i] = right_v[i][j][l];
        assign mm_ckey[i][j][l]   = ct_bc[j][l][i];
      end
      column_tree #(.M(M), .KW(KW)) u_ct (
        .leaf_key(ct_leaf_k[j][l]), .leaf_vld(ct_leaf_v[j][l]),
        .root_key(ct_root_k[j][l]), .root_vld(ct_root_v[j][l]),
        .bcast(ct_bc[j][l])
      );
    end
  end

  // The mesh of merging modules.
  for (genvar i = 0; i < M; i++) begin : g_mm_i
    for (genvar j = 0; j < M; j++) begin : g_mm_j
      merging_module #(.MU(MU), .TAU(TAU), .KW(KW)) u_mm (
        .clk, .rst_n, .row_idx(MU'(i)), .col_idx(MU'(j)), .op, .dim,
        .row_key(mm_rkey[i][j]), .col_key(mm_ckey[i][j]), .tot(mm_tot[i][j]),
        .prank(prank[i][j]), .right_key(right_k[i][j]), .right_vld(right_v[i][j])
      );
    end
  end

  // Output registers at the column-tree roots.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) out_val[k] <= '0;
    end else if (op == OP_OUTPUT) begin
      for (int j = 0; j < M; j++)
        for (int l = 0; l < T; l++)
          out_val[j*T+l] <= ct_root_k[j][l][KW-1 -: Q];
    end
  end

  // Every output column receives exactly one element.
  always @(posedge clk)
    if (rst_n && op == OP_OUTPUT)
      for (int j = 0; j < M; j++)
        for (int l = 0; l < T; l++)
          assert (ct_root_v[j][l])
            else $error("combiner: no element of rank %0d", j*T+l);

endmodule
