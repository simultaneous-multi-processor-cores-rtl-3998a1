// tb_fp_pkg: reference helpers for the testbenches, independent of the RTL.
// Converts between IEEE single precision bit patterns and real (double) values.
// Single precision values are read with subnormals as zero, and real values are
// rounded to single precision to nearest, ties to even, flushing results below
// the normal range to zero, the number handling the core's arithmetic uses.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] b);
    logic [63:0] d;
    if (b[30:23] == 8'h00) return 0.0;
    d = {b[31], 11'(int'(b[30:23]) - 127 + 1023), b[22:0], 29'b0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic        s, g, st;
    int          e;
    logic [24:0] m;
    d = $realtobits(x);
    s = d[63];
    if (d[62:0] == 63'b0) return {s, 31'b0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {s, 31'b0};
    if (e >= 255) return {s, 8'hFF, 23'b0};
    return {s, 8'(e), m[22:0]};
  endfunction

  // random normal value with exponent field in [elo, ehi]
  function automatic logic [31:0] rnd_f(input int elo, input int ehi);
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(elo + int'($urandom % 32'(ehi - elo + 1)));
    return r;
  endfunction

  // distance in units in the last place between two finite values
  function automatic int ulps(input logic [31:0] a, input logic [31:0] b);
    longint ka, kb;
    ka = a[31] ? -longint'(a[30:0]) : longint'(a[30:0]);
    kb = b[31] ? -longint'(b[30:0]) : longint'(b[30:0]);
    return int'((ka > kb) ? ka - kb : kb - ka);
  endfunction

endpackage
