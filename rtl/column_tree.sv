// column_tree: the column tree CT_j(l) of a combiner column.
//
// Its M leaves are the buffer registers at column t+l of the merging modules
// M_0j .. M_m-1,j. The tree is used twice, and both times at most one leaf
// holds a valid element: in phase A the diagonal module M_jj offers s_j(l),
// and in phase D the one module M_ij that received the element of rank
// j*t + l offers it. The tree passes that element up to its root (each node
// keeps whichever child is valid) and broadcasts the root back to every leaf.
//
// This design builds the tree as a word-wide binary tree of selectors without
// registers, so the root and the broadcast settle within the cycle; the
// document's trees have bandwidth one bit and are pipelined.
module column_tree #(
  parameter int unsigned M  = 4,   // leaves (m)
  parameter int unsigned KW = 8    // word width
) (
  input  logic [KW-1:0] leaf_key [M],
  input  logic          leaf_vld [M],
  output logic [KW-1:0] root_key,
  output logic          root_vld,
  output logic [KW-1:0] bcast    [M]
);
  // Heap-numbered selector tree; leaves at M..2M-1 (M a power of two).
  logic [KW-1:0] nk [2*M];
  logic          nv [2*M];

  always_comb begin
    nk[0] = '0;
    nv[0] = 1'b0;
    for (int k = 0; k < M; k++) begin
      nk[M+k] = leaf_key[k];
      nv[M+k] = leaf_vld[k];
    end
    for (int n = M - 1; n >= 1; n--) begin
      nv[n] = nv[2*n] | nv[2*n+1];
      nk[n] = nv[2*n] ? nk[2*n] : (nv[2*n+1] ? nk[2*n+1] : '0);
    end
  end

  assign root_key = (M == 1) ? nk[M] : nk[1];
  assign root_vld = (M == 1) ? nv[M] : nv[1];

  always_comb
    for (int k = 0; k < M; k++) bcast[k] = root_key;

endmodule
