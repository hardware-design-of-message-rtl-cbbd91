// tb_fp_pkg: reference arithmetic for the testbenches.
//
// Converts between single-precision bit patterns and reals and gives
// reference results for float add and multiply: the exact double-precision
// result rounded once to single precision (for a sum or product of two floats
// this equals the correctly rounded single-precision result). Also draws
// random normal floats whose magnitudes stay well inside the normal range.
package tb_fp_pkg;
  // single-precision bits -> real (exact), via the double-precision layout
  function automatic real b2r(input logic [31:0] b);
    logic [63:0] d;
    if (b[30:23] == 0) return 0.0;
    d = {b[31], 11'(int'(b[30:23]) - 127 + 1023), b[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction
  // real -> single-precision bits, rounded to nearest even, subnormals flushed
  function automatic logic [31:0] r2b(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction
  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] r;
    r = r2b(b2r(a) + b2r(b));
    if (r[30:23] == 0) r = {r[31], 31'd0};
    if (r == 32'h8000_0000) r = 32'h0;
    return r;
  endfunction
  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return r2b(b2r(a) * b2r(b));
  endfunction
  function automatic logic [31:0] rnd_float(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction
  // |x - y| <= tol * max(1, |y|)
  function automatic bit close(input real x, input real y, input real tol);
    real d, m;
    d = (x > y) ? x - y : y - x;
    m = (y < 0) ? -y : y;
    if (m < 1.0) m = 1.0;
    return d <= tol * m;
  endfunction
endpackage
