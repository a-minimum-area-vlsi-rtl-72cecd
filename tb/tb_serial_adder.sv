// tb_serial_adder: self-checking testbench of the bit-serial adder node.
//
// Random pairs of 10-bit operands are fed LSB first, one bit per clock,
// after a one-cycle clear; the sum bits, which appear one cycle after their
// operand bits, are collected and compared with the arithmetic sum, the
// carry out included (operands are zero-extended by one bit).
module tb_serial_adder;
  localparam int unsigned W = 10;
  logic clk = 0, rst_n = 0, clr = 0, a = 0, b = 0, s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_adder u_dut (.clk, .rst_n, .clr, .a, .b, .s);

  initial begin
    logic [W:0] x, y, z, got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 200; trial++) begin
      x = (W+1)'($urandom_range(2**W - 1));
      y = (W+1)'($urandom_range(2**W - 1));
      if (trial == 0) begin x = '1 >> 1; y = '1 >> 1; end
      z = x + y;
      @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
      got = '0;
      for (int k = 0; k <= W + 1; k++) begin
        a = (k <= W) ? x[k] : 1'b0;
        b = (k <= W) ? y[k] : 1'b0;
        @(negedge clk);
        if (k <= W) got[k] = s;
      end
      checks++;
      if (got != z) begin
        failures++;
        $display("FAIL: %0d + %0d gave %0d", x, y, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
