// coalescer: the (n; t_{i-1} : t_i)-COALESCER.
//
// The n input words form n / t_{i-1} sorted blocks of t_{i-1} = 2^TAU words.
// The coalescer combines each run of m_i = 2^MU consecutive blocks into one
// sorted block of t_i = m_i * t_{i-1} words, using NC = n / t_i combiners
// side by side; combiner c handles words c*t_i .. c*t_i + t_i - 1. All
// combiners start together and take the same number of cycles, so `done` and
// `busy` of the first one stand for all of them.
module coalescer #(
  parameter int unsigned MU   = 2,
  parameter int unsigned TAU  = 0,
  parameter int unsigned NC   = 4,     // number of combiners, n / t_i
  parameter int unsigned Q    = 8,
  parameter bit          COMB = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [Q-1:0] in_val  [NC * 2**(MU+TAU)],
  output logic [Q-1:0] out_val [NC * 2**(MU+TAU)],
  output logic         busy,
  output logic         done
);
  localparam int unsigned TI = 2 ** (MU + TAU);

  logic c_busy [NC];
  logic c_done [NC];

  for (genvar c = 0; c < NC; c++) begin : g_comb
    logic [Q-1:0] cin  [TI];
    logic [Q-1:0] cout [TI];
    for (genvar k = 0; k < TI; k++) begin : g_k
      assign cin[k]          = in_val[c*TI+k];
      assign out_val[c*TI+k] = cout[k];
    end
    combiner #(.MU(MU), .TAU(TAU), .Q(Q), .COMB(COMB)) u_comb (
      .clk, .rst_n, .start, .in_val(cin), .out_val(cout),
      .busy(c_busy[c]), .done(c_done[c])
    );
  end

  assign busy = c_busy[0];
  assign done = c_done[0];

  // The combiners run in lockstep.
  always @(posedge clk)
    if (rst_n) for (int c = 1; c < NC; c++)
      assert (c_done[c] == c_done[0] && c_busy[c] == c_busy[0])
        else $error("coalescer: combiner %0d out of step", c);

endmodule
