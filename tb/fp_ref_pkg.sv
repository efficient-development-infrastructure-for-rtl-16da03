// Reference single-precision arithmetic for the testbenches, built on the
// simulator's double-precision reals: the exact double result is rounded
// to single precision (nearest even), subnormals flushed to zero, the same
// conventions as the floating-point units under test. Products of two
// singles are exact in double; sums are exact or far from a tie, so the
// double step does not change the single result.
package fp_ref_pkg;
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 0) return $bitstoreal({f[31], 63'd0});
    if (f[30:23] == 8'hff) return $bitstoreal({f[31], 11'h7ff, f[22:0] != 0, 51'd0});
    d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mr;
    int e;
    logic up;
    d = $realtobits(r);
    if (d[62:52] == 0) return {d[63], 31'd0};
    if (d[62:52] == 11'h7ff) return (d[51:0] != 0) ? 32'h7fc0_0000 : {d[63], 8'hff, 23'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    up = m[28] && ((|m[27:0]) || m[29]);
    mr = {1'b0, m[52:29]} + 25'(up);
    if (mr[24]) begin mr = mr >> 1; e++; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    real s;
    s = f2r(a) + f2r(b);
    if (s == 0.0) return (a[31] & b[31] & (a[30:0] == 0) & (b[30:0] == 0)) ? 32'h8000_0000 : 32'h0;
    return r2f(s);
  endfunction

  // random normal single with exponent in [127-span, 127+span]
  function automatic logic [31:0] rnd(input int span);
    logic [31:0] f;
    f[31]    = 1'($urandom_range(1));
    f[30:23] = 8'(127 - span + int'($urandom_range(2 * span)));
    f[22:0]  = 23'($urandom());
    return f;
  endfunction
endpackage
