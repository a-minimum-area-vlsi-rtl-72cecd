// serial_adder: one internal node of a row tree.
//
// A full adder whose carry is fed back through a one-bit delay, so that two
// operands arriving least significant bit first, one bit per clock, leave as
// their sum, also LSB first. The sum bit is registered, which makes every node
// one pipeline stage of the tree. `clr` (synchronous) empties the carry and
// the output before a new pair of operands starts.
//
// Timing: sum bit k of the operands presented in cycle c appears on `s` in
// cycle c+1. The full adder with carry feedback is the node the row trees of
// the combiner are built from; the registered output is this design's choice.
module serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,   // start of a new addition
  input  logic a,     // operand bit, LSB first
  input  logic b,     // operand bit, LSB first
  output logic s      // sum bit, one cycle later
);
  logic carry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry <= 1'b0;
      s     <= 1'b0;
    end else if (clr) begin
      carry <= 1'b0;
      s     <= 1'b0;
    end else begin
      s     <= a ^ b ^ carry;
      carry <= (a & b) | (a & carry) | (b & carry);
    end
  end
endmodule
