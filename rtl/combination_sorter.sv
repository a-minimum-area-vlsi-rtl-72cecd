// combination_sorter: a COMBINE-SORT network of three coalescers in cascade.
//
// n = m1*m2*m3 words are sorted in three stages. Stage 1 combines groups of
// m1 single words, stage 2 groups of m2 sorted blocks of m1 words, stage 3
// the m3 sorted blocks of m1*m2 words into the final sequence. Each stage is
// a coalescer of (m_k, t_{k-1})-combiners; stage k starts when stage k-1
// reports done, and reads its input in its first cycle.
//
// The default factorization follows the optimal sorter: m1 = n / log^2 n,
// m2 = m3 = log n, with complete binary row trees in the first two stages
// and comb-trees in the last, for n = 256 (m = 4, 8, 8) and words of
// Q = 12 bits (about 1.5 log n). The value of n and the word length are this
// design's choices.
//
// Beside the sorter stands a mesh of CCCs (mccc), the network meant to
// follow a smaller combination sorter when time is traded for area. It has
// its own ports (mccc_*) and sorts its own n = s^2 * r words; the cascade of
// the two is not built here.
//
// Interface: pulse `start` while `busy` is low, with in_val holding the n
// words; out_val holds them in ascending order from the cycle `done` is high
// until the next run ends. A stage starts in the cycle in which the previous
// one raises done, so the latency is the sum of the three combiner
// latencies: 16 + 30 + 52 = 98 cycles at the defaults.
module combination_sorter #(
  parameter int unsigned Q     = 12,
  parameter int unsigned MU1   = 2,
  parameter int unsigned MU2   = 3,
  parameter int unsigned MU3   = 3,
  parameter bit          COMB1 = 1'b0,
  parameter bit          COMB2 = 1'b0,
  parameter bit          COMB3 = 1'b1,
  parameter int unsigned SIGMA = 2,     // mesh of CCCs: s = 2^SIGMA
  parameter int unsigned RHO   = 4      // mesh of CCCs: r = 2^RHO words per module
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [Q-1:0] in_val  [2**(MU1+MU2+MU3)],
  output logic [Q-1:0] out_val [2**(MU1+MU2+MU3)],
  output logic         busy,
  output logic         done,
  output logic [2:0]   stage_done,   // done pulse of each coalescer
  input  logic         mccc_start,
  input  logic [Q-1:0] mccc_in  [2**(2*SIGMA+RHO)],
  output logic [Q-1:0] mccc_out [2**(2*SIGMA+RHO)],
  output logic         mccc_busy,
  output logic         mccc_done
);
  localparam int unsigned NU = MU1 + MU2 + MU3;
  localparam int unsigned N  = 2 ** NU;

  logic [Q-1:0] v1 [N];
  logic [Q-1:0] v2 [N];
  logic         b1, b2, b3, d1, d2, d3;

  coalescer #(.MU(MU1), .TAU(0), .NC(2**(NU-MU1)), .Q(Q), .COMB(COMB1)) u_stage1 (
    .clk, .rst_n, .start(start && !busy), .in_val(in_val), .out_val(v1),
    .busy(b1), .done(d1)
  );
  coalescer #(.MU(MU2), .TAU(MU1), .NC(2**MU3), .Q(Q), .COMB(COMB2)) u_stage2 (
    .clk, .rst_n, .start(d1), .in_val(v1), .out_val(v2),
    .busy(b2), .done(d2)
  );
  coalescer #(.MU(MU3), .TAU(MU1+MU2), .NC(1), .Q(Q), .COMB(COMB3)) u_stage3 (
    .clk, .rst_n, .start(d2), .in_val(v2), .out_val(out_val),
    .busy(b3), .done(d3)
  );

  mccc #(.SIGMA(SIGMA), .RHO(RHO), .W(Q)) u_mccc (
    .clk, .rst_n, .start(mccc_start && !mccc_busy), .in_val(mccc_in), .out_val(mccc_out),
    .busy(mccc_busy), .done(mccc_done)
  );

  assign busy       = b1 | b2 | b3 | d1 | d2;
  assign done       = d3;
  assign stage_done = {d3, d2, d1};

endmodule
