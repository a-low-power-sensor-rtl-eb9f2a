// tb_fp_pkg: reference helpers for the testbenches. Single-precision values
// are converted to and from double precision by bit manipulation, so the
// reference arithmetic runs in double precision (exact for the products and
// for sums of operands whose exponents differ by less than 29) and is then
// truncated to single precision, which is round-toward-zero like the RTL.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  // random normal number with exponent 2^(lo..hi)
  function automatic logic [31:0] rand_f(input int lo, input int hi);
    int e;
    e = lo + int'($urandom_range(0, hi - lo));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

  // small random integer as a float (exact in all reference arithmetic)
  function automatic logic [31:0] rand_int_f(input int maxabs);
    int v;
    v = int'($urandom_range(0, 2 * maxabs)) - maxabs;
    return r2f(real'(v));
  endfunction

endpackage
