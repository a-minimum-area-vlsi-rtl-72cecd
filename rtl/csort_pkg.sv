// csort_pkg: shared definitions of the combination sorter.
//
// Every merging module of a combiner executes the same instruction in the same
// cycle, as the micromodules of a cube-connected-cycles machine do under one
// global control. An instruction is an operation plus the cube dimension E_h it
// uses. The operations below follow the phases of the COMBINATION algorithm:
// input and broadcast (A), merging and partial ranks (B), total ranks (C),
// sorting permutation and output (D). The encoding is this design's own.
package csort_pkg;

  typedef enum logic [3:0] {
    OP_NOP       = 4'd0,
    OP_LOAD_L    = 4'd1,   // (A) row-tree broadcast of S_i into the left half
    OP_COPY_DIAG = 4'd2,   // (A) diagonal modules copy S_i to the right half over E_tau
    OP_LOAD_R    = 4'd3,   // (A) column-tree broadcast of S_j into the right half
    OP_REVERSE   = 4'd4,   // (B) ASCEND step that reverses S_j in the right half
    OP_MERGE     = 4'd5,   // (B) DESCEND step of the bitonic merge, exchanges recorded
    OP_RANK_INIT = 4'd6,   // (B) column k of the merged row takes rank k
    OP_RETRACE   = 4'd7,   // (B) ASCEND step that undoes the recorded exchanges on ranks
    OP_SUM       = 4'd8,   // (C) row trees add the partial ranks bit-serially
    OP_LOAD_TOT  = 4'd9,   // (C) row-tree broadcast of the total rank, activation
    OP_CONC      = 4'd10,  // (D) ASCEND step of the concentration
    OP_EXP       = 4'd11,  // (D) DESCEND step of the expansion
    OP_TRANSFER  = 4'd12,  // (D) left half to right half over E_tau
    OP_OUTPUT    = 4'd13   // (D) column-tree roots deliver the sorted words
  } op_e;

  // Width of the cube-dimension field of an instruction.
  localparam int unsigned DIM_W = 5;

  // Bits needed to hold a value in [0, x].
  function automatic int unsigned bits_for(input int unsigned x);
    int unsigned b;
    b = 1;
    while ((x >> b) != 0) b++;
    return b;
  endfunction

endpackage
