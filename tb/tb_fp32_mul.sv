// tb_fp32_mul: self-checking test of the single-precision multiplier.
// Random products over a wide exponent range, negation, zeros, overflow to
// infinity, underflow to zero and NaN.  The reference is the exact product in
// double precision rounded to single precision (tb_fp_pkg), so results must
// match bit for bit.
module tb_fp32_mul;
  import tb_fp_pkg::*;
  logic clk = 1'b0;
  logic [31:0] a, b, p;
  logic neg;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fp32_mul dut (.a, .b, .neg, .p);

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic tn, input logic [31:0] exp);
    a = ta; b = tb_; neg = tn;
    @(posedge clk);
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL mul %h * %h neg=%0d: got %h want %h", ta, tb_, tn, p, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, y;
    logic n;
    real r;
    for (int i = 0; i < 5000; i++) begin
      x = rnd_f(60, 190);
      y = rnd_f(60, 190);
      n = 1'($urandom);
      r = f2r(x) * f2r(y);
      if (n) r = -r;
      check(x, y, n, r2f(r));
    end
    check(32'h3F80_0000, 32'h4000_0000, 1'b0, 32'h4000_0000);   // 1 * 2
    check(32'h3FC0_0000, 32'hC020_0000, 1'b0, 32'hC070_0000);   // 1.5 * -2.5 = -3.75
    check(32'h0000_0000, 32'h4000_0000, 1'b0, 32'h0000_0000);   // zero
    check(32'h8000_0000, 32'h4000_0000, 1'b0, 32'h8000_0000);   // -0
    check(32'h7F00_0000, 32'h7F00_0000, 1'b0, 32'h7F80_0000);   // overflow
    check(32'h0100_0000, 32'h0100_0000, 1'b0, 32'h0000_0000);   // underflow
    check(32'h7F80_0000, 32'h0000_0000, 1'b0, 32'h7FC0_0000);   // inf * 0
    check(32'h7F80_0000, 32'hBF80_0000, 1'b0, 32'hFF80_0000);   // inf * -1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
