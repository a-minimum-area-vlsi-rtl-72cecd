// merging_module: the merging module M_ij of an (m,t)-combiner.
//
// The module emulates a binary cube of 2t = 2^(TAU+1) nodes, one per column of
// the (TAU+1, 2^(TAU+1)) cube-connected-cycles array of the document: a step on
// cube dimension E_h pairs column k with column k xor 2^h. Each instruction
// (op, dim) from the combiner controller is one such step, applied to all
// columns at once. Keys are compared whole, one word per step, instead of bit-
// serially through the rows of the cycles; the order of steps and what each
// step does are those of the COMBINATION algorithm:
//
//  (A) OP_LOAD_L puts S_i (from the row trees) in columns 0..t-1. OP_COPY_DIAG
//      lets a diagonal module (row_idx == col_idx) copy it into columns t..2t-1, whose
//      contents then go to the column trees; OP_LOAD_R loads S_j back from the
//      column trees into columns t..2t-1 of every module.
//  (B) OP_REVERSE on dims 0..TAU-1 reverses S_j (right half only), OP_MERGE on
//      dims TAU..0 is Batcher's bitonic merge, each comparator remembering
//      whether it exchanged. OP_RANK_INIT gives column k the rank k, and
//      OP_RETRACE on dims 0..TAU replays the exchanges backwards, carrying
//      keys and ranks together, so that column l < t again holds s_i(l) and
//      its rank in MERGE(S_i, S_j). The partial
//      rank C_ij(l) = rank - l is offered to the row trees on `prank`.
//  (D) OP_LOAD_TOT takes the total ranks C_i(l) from the row trees; an element
//      is active when the top MU bits of its rank equal col_idx. OP_CONC on dims
//      0..TAU-1 concentrates the active elements into the leftmost columns,
//      OP_EXP on dims TAU-1..0 expands them to column C_i(l) mod t, and
//      OP_TRANSFER moves them across E_tau to column t + (C_i(l) mod t), where
//      the column tree CT_j(l) collects them.
//
// Keys carry a tie-break tag {sequence index, position} below the value bits,
// supplied by the combiner, so all keys differ. With it the module counts the
// elements of S_j below s_i(l) as "less than" when i < j and "less or equal"
// when i > j, as the document asks, and C_ii(l) = l, so total ranks are a
// permutation even when values repeat. In a diagonal module both halves hold
// the same keys; a side bit below the key (0 for S_i, 1 for S_j) puts each
// left copy ahead of its right copy, so that C_ii(l) = l. The concentration and expansion
// destinations are computed directly from the ranks (a prefix count of the
// active elements) rather than as precomputed switch settings.
//
// Every instruction takes one clock. Outputs are registered state, except
// `prank`, which is a subtraction on the rank registers.
module merging_module
  import csort_pkg::*;
#(
  parameter int unsigned MU  = 1,   // log2 m
  parameter int unsigned TAU = 2,   // log2 t
  parameter int unsigned KW  = 8    // key width: value + tie-break tag
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [MU-1:0]          row_idx,   // i, tied off by the combiner
  input  logic [MU-1:0]          col_idx,   // j, tied off by the combiner
  input  op_e                    op,
  input  logic [DIM_W-1:0]       dim,
  input  logic [KW-1:0]          row_key   [2**TAU],  // RT broadcast, s_i(l)
  input  logic [KW-1:0]          col_key   [2**TAU],  // CT broadcast, s_j(l)
  input  logic [MU+TAU-1:0]      tot       [2**TAU],  // RT broadcast, C_i(l)
  output logic [TAU:0]           prank     [2**TAU],  // C_ij(l) to RT leaves
  output logic [KW-1:0]          right_key [2**TAU],  // column t+l, to CT leaves
  output logic                   right_vld [2**TAU]
);
  localparam int unsigned T  = 2 ** TAU;
  localparam int unsigned C2 = 2 * T;
  localparam int unsigned DW = (TAU == 0) ? 1 : TAU;   // destination within a half
  localparam int unsigned RW = TAU + 1;                // rank in the merge, < 2t

  logic [KW-1:0] key  [C2];
  logic          sd   [C2];   // side the element came from: 0 = S_i, 1 = S_j
  logic [RW-1:0] rk   [C2];
  logic          vld  [C2];
  logic [DW-1:0] edst [C2];   // expansion destination, C_i(l) mod t
  logic [DW-1:0] cdst [C2];   // concentration destination, prefix count
  logic [C2-1:0] xchg [TAU+1];

  // Activation and prefix count of the active elements (phase D set-up).
  logic          act  [T];
  logic [DW-1:0] pre  [T];
  always_comb begin
    logic [DW:0] c;
    c = '0;
    for (int l = 0; l < T; l++) begin
      act[l] = ((tot[l] >> TAU) == (MU+TAU)'(col_idx));
      pre[l] = DW'(c);
      c      = c + (DW+1)'(act[l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < C2; k++) begin
        key[k]  <= '0;
        sd[k]   <= 1'b0;
        rk[k]   <= '0;
        vld[k]  <= 1'b0;
        edst[k] <= '0;
        cdst[k] <= '0;
      end
      for (int h = 0; h <= TAU; h++) xchg[h] <= '0;
    end else begin
      unique case (op)
        OP_LOAD_L:
          for (int l = 0; l < T; l++) begin
            key[l] <= row_key[l];
            sd[l]  <= 1'b0;
          end
        OP_COPY_DIAG:
          for (int l = 0; l < T; l++) begin
            if (row_idx == col_idx) key[T+l] <= key[l];
            vld[T+l] <= (row_idx == col_idx);
          end
        OP_LOAD_R:
          for (int l = 0; l < T; l++) begin
            key[T+l] <= col_key[l];
            sd[T+l]  <= 1'b1;
            vld[T+l] <= 1'b0;
          end
        OP_REVERSE:
          for (int k = T; k < C2; k++)
            if (!k[dim]) begin
              key[k]                <= key[k | (1 << dim)];
              key[k | (1 << dim)]   <= key[k];
              sd[k]                 <= sd[k | (1 << dim)];
              sd[k | (1 << dim)]    <= sd[k];
            end
        OP_MERGE:
          for (int k = 0; k < C2; k++)
            if (!k[dim]) begin
              if ({key[k], sd[k]} > {key[k | (1 << dim)], sd[k | (1 << dim)]}) begin
                key[k]              <= key[k | (1 << dim)];
                key[k | (1 << dim)] <= key[k];
                sd[k]               <= sd[k | (1 << dim)];
                sd[k | (1 << dim)]  <= sd[k];
                xchg[dim][k]        <= 1'b1;
              end else begin
                xchg[dim][k]        <= 1'b0;
              end
            end
        OP_RANK_INIT:
          for (int k = 0; k < C2; k++) rk[k] <= RW'(k);
        OP_RETRACE:
          for (int k = 0; k < C2; k++)
            if (!k[dim] && xchg[dim][k]) begin
              rk[k]               <= rk[k | (1 << dim)];
              rk[k | (1 << dim)]  <= rk[k];
              key[k]              <= key[k | (1 << dim)];
              key[k | (1 << dim)] <= key[k];
              sd[k]               <= sd[k | (1 << dim)];
              sd[k | (1 << dim)]  <= sd[k];
            end
        OP_LOAD_TOT:
          for (int l = 0; l < T; l++) begin
            vld[l]    <= act[l];
            edst[l]   <= DW'(tot[l]);
            cdst[l]   <= pre[l];
            vld[T+l]  <= 1'b0;
          end
        OP_CONC, OP_EXP:
          for (int k = 0; k < T; k++)
            if (!k[dim]) begin
              logic mv_lo, mv_hi;
              if (op == OP_CONC) begin
                mv_lo = vld[k] &&  cdst[k][dim];
                mv_hi = vld[k | (1 << dim)] && !cdst[k | (1 << dim)][dim];
              end else begin
                mv_lo = vld[k] &&  edst[k][dim];
                mv_hi = vld[k | (1 << dim)] && !edst[k | (1 << dim)][dim];
              end
              if (mv_lo || mv_hi) begin
                key[k]               <= key[k | (1 << dim)];
                key[k | (1 << dim)]  <= key[k];
                vld[k]               <= vld[k | (1 << dim)];
                vld[k | (1 << dim)]  <= vld[k];
                edst[k]              <= edst[k | (1 << dim)];
                edst[k | (1 << dim)] <= edst[k];
                cdst[k]              <= cdst[k | (1 << dim)];
                cdst[k | (1 << dim)] <= cdst[k];
              end
            end
        OP_TRANSFER:
          for (int l = 0; l < T; l++) begin
            key[T+l] <= key[l];
            vld[T+l] <= vld[l];
            vld[l]   <= 1'b0;
          end
        default: ;
      endcase
    end
  end

  always_comb
    for (int l = 0; l < T; l++) begin
      prank[l]     = rk[l] - RW'(l);
      right_key[l] = key[T+l];
      right_vld[l] = vld[T+l];
    end

  // Concentration and expansion are conflict-free: when both ends of a cube
  // edge hold an active element, exactly one of them belongs on the high side.
  always @(posedge clk)
    if (rst_n && (op == OP_CONC || op == OP_EXP))
      for (int k = 0; k < T; k++)
        if (!k[dim] && vld[k] && vld[k | (1 << dim)])
          if (op == OP_CONC)
            assert (cdst[k][dim] != cdst[k | (1 << dim)][dim])
              else $error("merging_module: concentration conflict on E%0d", dim);
          else
            assert (edst[k][dim] != edst[k | (1 << dim)][dim])
              else $error("merging_module: expansion conflict on E%0d", dim);

endmodule
