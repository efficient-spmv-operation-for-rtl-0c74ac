// tb_fp_pkg: reference single-precision arithmetic for the testbenches.
// Values are computed in double precision and rounded once to single
// precision (round to nearest even, flush to zero below the normal range,
// infinity above it). For a sum or product of two singles the double result
// carries enough bits that this double rounding gives the correctly rounded
// single result.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // random normal single with exponent in [127-span, 127+span]
  function automatic logic [31:0] rand_f(input int span);
    logic [31:0] f;
    int          e;
    e = 127 - span + int'($urandom_range(2 * span, 0));
    f = {1'($urandom), 8'(e), 23'($urandom)};
    return f;
  endfunction

endpackage
