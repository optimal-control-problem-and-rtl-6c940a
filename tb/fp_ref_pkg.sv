// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
// Values are converted to double precision, combined there and rounded back
// to single precision, ties to even. For + - and * of single-precision
// operands this double rounding gives the correctly rounded result (53 >=
// 2*24+2), so the reference is independent of the RTL's own algorithm.
// Results below the normal range are flushed to zero, as in the RTL.
package fp_ref_pkg;
  function automatic real to_real(input logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    e = 11'(int'(f[30:23]) - 127 + 1023);
    return $bitstoreal({f[31], e, f[22:0], 29'd0});   // exact widening
  endfunction

  function automatic logic [31:0] from_real(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] k;
    logic        g, rest;
    if (r == 0.0) return 32'd0;
    d    = $realtobits(r);
    e    = int'(d[62:52]) - 1023 + 127;
    k    = {1'b0, d[51:29]};
    g    = d[28];
    rest = (d[27:0] != 0);
    if (g && (rest || k[0])) k = k + 24'd1;
    if (k[23]) e = e + 1;             // mantissa overflow: 1.111.. -> 10.000..
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), k[22:0]};
  endfunction

  // random normal number with exponent in [127-span, 127+span]
  function automatic logic [31:0] rnd_fp(input int span);
    logic [7:0] e;
    e = 8'(127 - span + int'($urandom_range(2 * span, 0)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction
endpackage
