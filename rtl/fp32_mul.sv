// fp32_mul: single-precision floating point multiplier of the SMP core (pipe 3).
//
// Combinational: p = a * b (optionally negated), rounded to nearest, ties to even.
// The core registers the result at the end of pipe 3.  The document asks only for
// single-precision floating point multiplication that never stalls; the number
// handling here is this design's own simplification: subnormal inputs are read as
// zero, results below the normal range flush to signed zero, overflow gives
// infinity, and an infinity or NaN input gives the canonical quiet NaN when
// multiplied by zero, infinity otherwise.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        neg,   // negate the product
  output logic [31:0] p
);
  logic        sa, sb, sp;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [24:0] mr;            // rounded mantissa with carry
  logic        g, st, rnd;
  logic signed [10:0] ep;
  logic [22:0] frac;

  always_comb begin
    sa = a[31]; sb = b[31];
    ea = a[30:23]; eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    sp = sa ^ sb ^ neg;
    prod = ma * mb;
    ep = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    // normalise: prod is in [2^46, 2^48)
    if (prod[47]) begin
      ep = ep + 11'sd1;
      mr = {1'b0, prod[47:24]};
      g  = prod[23];
      st = |prod[22:0];
    end else begin
      mr = {1'b0, prod[46:23]};
      g  = prod[22];
      st = |prod[21:0];
    end
    rnd = g & (st | mr[0]);
    mr = mr + {24'b0, rnd};
    if (mr[24]) begin
      ep = ep + 11'sd1;
      mr = mr >> 1;
    end
    frac = mr[22:0];
    if ((ea == 8'hFF) || (eb == 8'hFF)) begin
      if ((ea == 8'h00) || (eb == 8'h00) || (ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0))
        p = 32'h7FC0_0000;
      else
        p = {sp, 8'hFF, 23'b0};
    end else if ((ea == 8'h00) || (eb == 8'h00) || (ep <= 0)) begin
      p = {sp, 31'b0};
    end else if (ep >= 11'sd255) begin
      p = {sp, 8'hFF, 23'b0};
    end else begin
      p = {sp, ep[7:0], frac};
    end
  end
endmodule
