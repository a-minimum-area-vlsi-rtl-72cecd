// row_tree: the summing tree RT_i(l) of a combiner row.
//
// Its m leaves sit next to the merging modules M_i0 .. M_i,m-1 and hold the
// partial ranks C_ij(l). On `start` each leaf buffer register loads its value
// and then shifts it out LSB first, one bit per clock. Internal nodes are bit-
// serial adders (serial_adder), each one register deep, so the total rank
// C_i(l) = sum_j C_ij(l) leaves the root LSB first, W bits long, and is
// collected into `sum`.
//
// Two shapes, as the document offers: COMB = 0 is a complete binary tree of
// depth log2(M); COMB = 1 is a comb-tree (a chain of M-1 adders), which has
// depth M-1 but can be laid out in constant width. In the comb-tree, leaf k
// enters the chain k-1 stages late, so its bits are issued k-1 cycles late.
// The tree also carries the word broadcasts from root to leaves (`bcast_in`
// to `bcast_out`), which in this design are single-cycle and unregistered.
//
// Timing: `done` rises for one cycle LAT = W + DEPTH + 1 cycles after the
// cycle in which `start` was sampled; `sum` then holds the total until the
// next start. M must be a power of two for COMB = 0.
module row_tree #(
  parameter int unsigned M    = 4,  // leaves (m = 2^mu)
  parameter int unsigned W    = 4,  // bits of the total rank (mu + tau)
  parameter int unsigned BW   = 8,  // width of a broadcast word
  parameter bit          COMB = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  leaf_val [M],
  output logic [W-1:0]  sum,
  output logic          done,
  input  logic [BW-1:0] bcast_in,
  output logic [BW-1:0] bcast_out [M]
);
  localparam int unsigned DEPTH = COMB ? M - 1 : $clog2(M);
  localparam int unsigned SW    = W + M;        // leaf shift register, room for skew
  localparam int unsigned LAT   = W + DEPTH + 1;
  localparam int unsigned CW    = $clog2(LAT + 1);

  logic [SW-1:0] leaf_sr [M];
  logic [M-1:0]  leaf_bit;
  logic [CW-1:0] cnt;
  logic          run;
  logic          root_bit;

  always_comb
    for (int k = 0; k < M; k++) leaf_bit[k] = leaf_sr[k][0];

  // Leaf buffer registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < M; k++) leaf_sr[k] <= '0;
    end else if (start) begin
      for (int k = 0; k < M; k++)
        if (COMB && k > 1) leaf_sr[k] <= SW'(leaf_val[k]) << (k - 1);
        else               leaf_sr[k] <= SW'(leaf_val[k]);
    end else begin
      for (int k = 0; k < M; k++) leaf_sr[k] <= leaf_sr[k] >> 1;
    end
  end

  if (COMB) begin : g_comb
    // chain[k] is the running sum of leaves 0..k, delayed k-1 cycles.
    logic [M-1:0] chain;
    assign chain[0] = leaf_bit[0];
    for (genvar k = 1; k < M; k++) begin : g_node
      serial_adder u_add (
        .clk, .rst_n, .clr(start),
        .a(chain[k-1]), .b(leaf_bit[k]), .s(chain[k])
      );
    end
    assign root_bit = chain[M-1];
  end else begin : g_full
    // Heap numbering: node n has children 2n and 2n+1; leaves are M..2M-1.
    logic [2*M-1:0] nb;
    for (genvar k = 0; k < M; k++) begin : g_leaf
      assign nb[M+k] = leaf_bit[k];
    end
    for (genvar n = 1; n < M; n++) begin : g_node
      serial_adder u_add (
        .clk, .rst_n, .clr(start),
        .a(nb[2*n]), .b(nb[2*n+1]), .s(nb[n])
      );
    end
    assign nb[0] = 1'b0;
    assign root_bit = (M == 1) ? nb[M] : nb[1];
  end

  // Collect the root stream: bit k of the sum is at the root DEPTH+k cycles
  // after the first cycle following start.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      run  <= 1'b0;
      sum  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cnt <= '0;
        run <= 1'b1;
      end else if (run) begin
        cnt <= cnt + 1'b1;
        if (cnt >= CW'(DEPTH)) sum <= W'({root_bit, sum} >> 1);
        if (cnt == CW'(DEPTH + W - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb
    for (int k = 0; k < M; k++) bcast_out[k] = bcast_in;

endmodule
