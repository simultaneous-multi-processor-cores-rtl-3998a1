// tb_cadder: self-checking test of the three-operand C-adder.
// Sums: random triples (same and mixed signs, wide exponent spread, cancellation)
// with random enables and negates; the reference is the double-precision sum
// rounded to single, and the result must lie within one unit in the last place
// (one rounding).  A sum of three exactly representable small integers must be
// exact.  Comparisons: random triples and enable subsets for maximum and
// minimum; value and index must match a reference search exactly.
module tb_cadder;
  import smp_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 1'b0;
  logic [2:0][31:0] opd;
  logic [2:0] open, neg;
  cop_e op;
  logic [31:0] res;
  logic [1:0] idx;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cadder dut (.opd, .open, .neg, .op, .res, .idx);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, best;
    int  bi;
    logic [31:0] want;
    // sums
    for (int i = 0; i < 6000; i++) begin
      for (int j = 0; j < 3; j++)
        opd[j] = (i % 3 == 0) ? rnd_f(120, 130) : rnd_f(100, 150);
      if (i % 5 == 0) opd[1] = {~opd[0][31], opd[0][30:0] ^ 31'(($urandom % 4))};  // cancellation
      open = (i % 4 == 0) ? 3'($urandom) : 3'b111;
      neg  = 3'($urandom);
      op   = CA_ADD;
      r = 0.0;
      for (int j = 0; j < 3; j++)
        if (open[j]) r = r + (neg[j] ? -f2r(opd[j]) : f2r(opd[j]));
      want = r2f(r);
      @(posedge clk);
      checks++;
      if (ulps(res, want) > 1) begin
        failures++;
        $display("FAIL add %h %h %h en=%b ng=%b: got %h want %h", opd[0], opd[1], opd[2], open, neg, res, want);
      end
    end
    // exact small integer sums: 3 + 5 + 7 = 15, 1 + 1 - 2 = 0
    opd = {32'h40E0_0000, 32'h40A0_0000, 32'h4040_0000}; open = 3'b111; neg = 3'b000; op = CA_ADD;
    @(posedge clk); checks++;
    if (res !== 32'h4170_0000) begin failures++; $display("FAIL 3+5+7 = %h", res); end
    opd = {32'h4000_0000, 32'h3F80_0000, 32'h3F80_0000}; neg = 3'b100;
    @(posedge clk); checks++;
    if (res[30:0] !== 31'b0) begin failures++; $display("FAIL 1+1-2 = %h", res); end
    // comparisons
    for (int i = 0; i < 4000; i++) begin
      for (int j = 0; j < 3; j++) opd[j] = rnd_f(110, 140);
      if (i % 7 == 0) opd[2] = opd[0];                      // tie
      open = (i % 3 == 0) ? 3'($urandom) : 3'b111;
      neg  = (i % 2 == 0) ? 3'($urandom) : 3'b000;
      op   = (i % 2 == 0) ? CA_MAX : CA_MIN;
      bi = -1; best = 0.0;
      for (int j = 0; j < 3; j++)
        if (open[j]) begin
          r = neg[j] ? -f2r(opd[j]) : f2r(opd[j]);
          if (bi < 0 || (op == CA_MAX && r > best) || (op == CA_MIN && r < best)) begin
            bi = j; best = r;
          end
        end
      @(posedge clk);
      checks++;
      if (bi < 0) begin
        if (res[30:0] !== 31'b0 || idx !== 2'd0) begin failures++; $display("FAIL empty cmp %h %0d", res, idx); end
      end else if (res !== {opd[bi][31] ^ neg[bi], opd[bi][30:0]} || idx !== 2'(bi)) begin
        failures++;
        $display("FAIL cmp op=%0d %h %h %h en=%b ng=%b: got %h/%0d want idx %0d", op, opd[0], opd[1], opd[2], open, neg, res, idx, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
