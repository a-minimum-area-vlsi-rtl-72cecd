// mccc: mesh of cube-connected-cycles, sorting n = s*s*r words by bitonic sort.
//
// An s x s mesh (s = 2^SIGMA) of CCC modules, each holding r = 2^RHO words,
// emulates a binary cube of n = s^2 * r processors P_t. Word k of the module
// at mesh row i, column j is processor t = t' * r + k, where t' interleaves
// the bits of i and j (bit 2l of t' is j_l, bit 2l+1 is i_l). Cube
// dimensions E_0 .. E_RHO-1 therefore stay inside a module, and the 2*SIGMA
// higher dimensions alternate between mesh rows and mesh columns, which keeps
// the mesh distances of the bitonic sorting schedule short.
//
// The module runs the whole sorting schedule: merging phases p = 1 .. log2 n,
// each using dimensions E_p-1 .. E_0; processor t keeps the smaller word of a
// pair when bit d of t equals bit p of t, so that the final phase is
// ascending. A step on a dimension inside a module is one compare clock. A
// step on a mesh dimension that spans 2^l mesh hops copies every word into an
// upward and a downward lane, shifts both lanes one hop per clock for 2^l
// clocks over the mesh links (each word plane k has its own mesh), and then
// compares (2 + 2^l clocks). Every step is followed by one sequencing clock,
// and `done` takes one more.
//
// The CCC modules, the mesh of planes and the interleaved processor numbering
// follow the mesh-of-CCCs architecture; the lanes, the step costs and the
// control are this design's own. The default, s = 4 and r = 16, makes
// n = 256, the size of the combination sorter beside it.
//
// This design compares whole words per step; the CCC modules' internal cycle
// rotation and the bit-serial word steps are not modelled. Interface: pulse
// `start` while `busy` is low; in_val is copied in that cycle; out_val (in
// processor order, ascending after a sort) is valid from the cycle `done`
// is high.
module mccc #(
  parameter int unsigned SIGMA = 2,   // s = 2^SIGMA
  parameter int unsigned RHO   = 4,   // r = 2^RHO words per CCC module
  parameter int unsigned W     = 12   // word length
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] in_val  [2**(2*SIGMA+RHO)],
  output logic [W-1:0] out_val [2**(2*SIGMA+RHO)],
  output logic         busy,
  output logic         done
);
  localparam int unsigned S  = 2 ** SIGMA;
  localparam int unsigned R  = 2 ** RHO;
  localparam int unsigned NU = 2 * SIGMA + RHO;
  localparam int unsigned CW = 8;

  typedef enum logic [2:0] {S_IDLE, S_LOCAL, S_LANE, S_SHIFT, S_MESHCMP, S_NEXT, S_DONE} state_e;

  logic [W-1:0] v  [S][S][R];    // [i][j][k]
  logic [W-1:0] up [S][S][R];    // lane moving towards higher mesh index
  logic [W-1:0] dn [S][S][R];    // lane moving towards lower mesh index
  state_e       st;
  logic [CW-1:0] p, d, hop;

  // Processor number of word k in module (i, j).
  function automatic int unsigned pnum(int unsigned i, int unsigned j, int unsigned k);
    int unsigned tp;
    tp = 0;
    for (int l = 0; l < SIGMA; l++) begin
      tp |= ((j >> l) & 1) << (2 * l);
      tp |= ((i >> l) & 1) << (2 * l + 1);
    end
    return tp * R + k;
  endfunction

  // The word processor t keeps from the pair (own, other) in phase p, dim d.
  function automatic logic [W-1:0] keep(int unsigned t, int unsigned pp, int unsigned dd,
                                        logic [W-1:0] own, logic [W-1:0] other);
    logic lower, asc;
    lower = ((t >> dd) & 1) == 0;
    asc   = ((t >> pp) & 1) == 0;
    if (lower == asc) return (own < other) ? own : other;
    else              return (own < other) ? other : own;
  endfunction

  // Mesh geometry of the current dimension (valid when d >= RHO).
  logic        on_row;     // dimension moves along the row index j
  logic [CW-1:0] lvl;      // mesh distance exponent l
  always_comb begin
    on_row = ((d - CW'(RHO)) % 2) == 0;
    lvl    = (d - CW'(RHO)) / 2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      p   <= '0;
      d   <= '0;
      hop <= '0;
      for (int i = 0; i < S; i++)
        for (int j = 0; j < S; j++)
          for (int k = 0; k < R; k++) begin
            v[i][j][k]  <= '0;
            up[i][j][k] <= '0;
            dn[i][j][k] <= '0;
          end
    end else begin
      unique case (st)
        S_IDLE:
          if (start) begin
            for (int i = 0; i < S; i++)
              for (int j = 0; j < S; j++)
                for (int k = 0; k < R; k++) v[i][j][k] <= in_val[pnum(i, j, k)];
            p  <= CW'(1);
            d  <= '0;
            st <= (RHO > 0) ? S_LOCAL : S_LANE;
          end
        S_LOCAL: begin
          // Dimension inside the CCC modules: partner is word k xor 2^d.
          for (int i = 0; i < S; i++)
            for (int j = 0; j < S; j++)
              for (int k = 0; k < R; k++)
                v[i][j][k] <= keep(pnum(i, j, k), 32'(p), 32'(d), v[i][j][k], v[i][j][k ^ (1 << d)]);
          st <= S_NEXT;
        end
        S_LANE: begin
          for (int i = 0; i < S; i++)
            for (int j = 0; j < S; j++)
              for (int k = 0; k < R; k++) begin
                up[i][j][k] <= v[i][j][k];
                dn[i][j][k] <= v[i][j][k];
              end
          hop <= '0;
          st  <= S_SHIFT;
        end
        S_SHIFT: begin
          // One hop over the mesh links per clock, all word planes at once.
          for (int i = 0; i < S; i++)
            for (int j = 0; j < S; j++)
              for (int k = 0; k < R; k++)
                if (on_row) begin
                  up[i][j][k] <= (j > 0)     ? up[i][j-1][k] : '0;
                  dn[i][j][k] <= (j < S - 1) ? dn[i][j+1][k] : '0;
                end else begin
                  up[i][j][k] <= (i > 0)     ? up[i-1][j][k] : '0;
                  dn[i][j][k] <= (i < S - 1) ? dn[i+1][j][k] : '0;
                end
          hop <= hop + 1'b1;
          if (hop == (CW'(1) << lvl) - 1'b1) st <= S_MESHCMP;
        end
        S_MESHCMP: begin
          // A node whose mesh index has bit l set received its partner on the
          // upward lane, the others on the downward lane.
          for (int i = 0; i < S; i++)
            for (int j = 0; j < S; j++)
              for (int k = 0; k < R; k++) begin
                logic hi;
                hi = on_row ? (((j >> lvl) & 1) != 0) : (((i >> lvl) & 1) != 0);
                v[i][j][k] <= keep(pnum(i, j, k), 32'(p), 32'(d), v[i][j][k],
                                   hi ? up[i][j][k] : dn[i][j][k]);
              end
          st <= S_NEXT;
        end
        S_NEXT:
          if (d != '0) begin
            d  <= d - 1'b1;
            st <= (d - 1'b1 < CW'(RHO)) ? S_LOCAL : S_LANE;
          end else if (p != CW'(NU)) begin
            p  <= p + 1'b1;
            d  <= p;
            st <= (p < CW'(RHO)) ? S_LOCAL : S_LANE;
          end else begin
            st <= S_DONE;
          end
        S_DONE:  st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb
    for (int i = 0; i < S; i++)
      for (int j = 0; j < S; j++)
        for (int k = 0; k < R; k++) out_val[pnum(i, j, k)] = v[i][j][k];

  assign busy = (st != S_IDLE);
  assign done = (st == S_DONE);

endmodule
