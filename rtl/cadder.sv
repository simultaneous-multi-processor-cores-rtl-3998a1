// cadder: three-operand C-adder of the SMP core (C-adder 0 and C-adder 1, pipe 3).
//
// Combinational.  Each of the three operands a, b, c has an enable and a negate
// bit.  op = CA_ADD returns the sum of the enabled operands with a single rounding
// (round to nearest, ties to even); op = CA_MAX / CA_MIN returns the winning
// operand and its index (0 = a, 1 = b, 2 = c), the first one winning a tie.
// From the document: three operands per execution wave front, one rounding per
// level of sums, comparisons returning the winner and its index, maximum or
// minimum chosen by the program.  Own choices: operand pairs that cancel exactly
// are dropped first; the rest are aligned to the largest exponent keeping 52
// guard bits and a sticky bit, so the sum is rounded once and correctly except
// when two operands nearly cancel while the third lies more than about 50
// binary places below them; subnormals read as zero, results below the normal
// range flush to zero, overflow gives infinity; NaN inputs are not treated specially.  With
// no operand enabled the sum is +0 and a comparison returns +0 with index 0.
module cadder
  import smp_pkg::*;
(
  input  logic [2:0][31:0] opd,   // operands c, b, a (index 2, 1, 0)
  input  logic [2:0]       open,  // operand enables
  input  logic [2:0]       neg,   // operand negates
  input  cop_e             op,
  output logic [31:0]      res,
  output logic [1:0]       idx
);
  localparam int G  = 52;          // guard bits
  localparam int MW = 24 + G;      // aligned mantissa width (leading one at MW-1)

  logic [2:0][31:0] v;             // operands after negate, zero when disabled
  logic [2:0][31:0] w;             // summands: exactly cancelling pairs removed

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      v[i] = open[i] ? {opd[i][31] ^ neg[i], opd[i][30:0]} : 32'h0;
      if (v[i][30:23] == 8'h00) v[i] = {v[i][31], 31'b0};  // flush subnormals
    end
    w = v;
    for (int i = 0; i < 3; i++)
      for (int j = i + 1; j < 3; j++)
        if (w[i][30:23] != 8'h00 && w[i] == {~w[j][31], w[j][30:0]}) begin
          w[i] = 32'h0;
          w[j] = 32'h0;
        end
  end

  // ------------------------------------------------------------------- compare
  function automatic logic [31:0] okey(input logic [31:0] x);
    // monotonic unsigned key of an IEEE value (-0 and +0 compare equal)
    if (x[30:0] == 31'b0) return 32'h8000_0000;
    return x[31] ? ~x : {1'b1, x[30:0]};
  endfunction

  logic [31:0] cmp_v;
  logic [1:0]  cmp_i;
  always_comb begin
    logic found;
    found = 1'b0;
    cmp_v = 32'h0;
    cmp_i = 2'd0;
    for (int i = 0; i < 3; i++) begin
      if (open[i]) begin
        if (!found ||
            (op == CA_MAX && okey(v[i]) > okey(cmp_v)) ||
            (op == CA_MIN && okey(v[i]) < okey(cmp_v))) begin
          cmp_v = v[i];
          cmp_i = 2'(i);
        end
        found = 1'b1;
      end
    end
  end

  // ----------------------------------------------------------------------- add
  logic [31:0] sum_v;
  always_comb begin
    logic [7:0]  emax;
    logic signed [MW+2:0] acc;
    logic [MW+1:0] mag;
    logic [MW+1:0] nrm;
    logic [MW-1:0] ext, sh;
    logic [7:0]  d;
    logic        lost;
    int          lead;
    logic signed [10:0] er;
    logic [24:0] mr;
    logic        g, st, rnd;

    emax = 8'd0;
    ext = '0; sh = '0; d = '0; lost = 1'b0; mag = '0; nrm = '0; lead = -1;
    er = '0; mr = '0; g = 1'b0; st = 1'b0; rnd = 1'b0;
    for (int i = 0; i < 3; i++)
      if (w[i][30:23] > emax) emax = w[i][30:23];
    acc = '0;
    for (int i = 0; i < 3; i++) begin
      if (w[i][30:23] != 8'h00) begin
        ext  = MW'({1'b1, w[i][22:0]}) << G;
        d    = emax - w[i][30:23];
        if (d > 8'd63) d = 8'd63;
        sh   = ext >> d;
        lost = |(ext & ((MW'(1) << d) - MW'(1)));
        sh[0] = sh[0] | lost;
        if (w[i][31]) acc = acc - (MW+3)'(sh);
        else          acc = acc + (MW+3)'(sh);
      end
    end
    mag = acc[MW+2] ? (MW+2)'(-acc) : (MW+2)'(acc);
    lead = -1;
    for (int i = 0; i < MW + 2; i++) if (mag[i]) lead = i;
    sum_v = 32'h0;
    if (lead >= 0) begin
      er = 11'(emax) + 11'(lead - (MW - 1));
      if (lead > MW - 1) begin
        nrm = mag >> (lead - (MW - 1));
        if (|(mag & (((MW+2)'(1)) << (lead - (MW - 1))) - (MW+2)'(1))) nrm[0] = 1'b1;
      end else begin
        nrm = mag << ((MW - 1) - lead);
      end
      mr  = {1'b0, nrm[MW-1:G]};
      g   = nrm[G-1];
      st  = |nrm[G-2:0];
      rnd = g & (st | mr[0]);
      mr  = mr + {24'b0, rnd};
      if (mr[24]) begin
        mr = mr >> 1;
        er = er + 11'sd1;
      end
      if (er <= 0)              sum_v = {acc[MW+2], 31'b0};
      else if (er >= 11'sd255)  sum_v = {acc[MW+2], 8'hFF, 23'b0};
      else                      sum_v = {acc[MW+2], er[7:0], mr[22:0]};
    end
  end

  always_comb begin
    if (op == CA_ADD) begin
      res = sum_v;
      idx = 2'd0;
    end else begin
      res = cmp_v;
      idx = cmp_i;
    end
  end
endmodule
