// fp17_ref_pkg: reference arithmetic for the testbenches.
//
// Converts between the 17-bit float format (1 sign, 6 exponent bits with
// bias 31, 10 fraction bits, exponent 0 = zero) and real numbers, so that
// the testbenches can compute expected results in double precision,
// independently of the RTL. from_real truncates toward zero, matching the
// hardware's rounding; it returns zero below the smallest normal number and
// sets ovf above the largest.
package fp17_ref_pkg;

  function automatic real to_real(logic [16:0] f);
    real    v;
    int     e;
    if (f[15:10] == 0) return 0.0;
    v = 1.0 + real'(f[9:0]) / 1024.0;
    e = int'(f[15:10]) - 31;
    while (e > 0) begin v = v * 2.0; e--; end
    while (e < 0) begin v = v / 2.0; e++; end
    return f[16] ? -v : v;
  endfunction

  function automatic logic [16:0] from_real(real x, output bit ovf);
    logic s;
    real  a;
    int   e;
    int   m;
    ovf = 0;
    s = (x < 0.0);
    a = s ? -x : x;
    if (a == 0.0) return 17'd0;
    e = 31;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    if (e < 1) return 17'd0;
    if (e > 63) begin ovf = 1; return 17'd0; end
    m = int'($floor((a - 1.0) * 1024.0));
    return {s, 6'(e), 10'(m)};
  endfunction

  // Random operand with an exponent in [31-span, 31+span], sometimes zero.
  function automatic logic [16:0] rand_fp(int span);
    int e;
    if ($urandom_range(0, 19) == 0) return 17'd0;
    e = 31 - span + int'($urandom_range(0, 2 * span));
    return {1'($urandom), 6'(e), 10'($urandom)};
  endfunction

  // Exact sum for truncation. When one operand is below 2^-30 of the other
  // the double-precision sum would lose it; it is then replaced by a value
  // of the same sign that is still far below one unit in the last place of
  // the larger operand, which truncates to the same 17-bit result.
  function automatic real ref_sum(logic [16:0] a, logic [16:0] b);
    real x, y, t;
    x = to_real(a); y = to_real(b);
    if ((x < 0 ? -x : x) < (y < 0 ? -y : y)) begin t = x; x = y; y = t; end
    if (y != 0.0 && (y < 0 ? -y : y) < (x < 0 ? -x : x) / 1073741824.0)
      y = ((y < 0) ? -1.0 : 1.0) * (x < 0 ? -x : x) / 1073741824.0;
    return x + y;
  endfunction

  function automatic real trunc(real v);
    bit o;
    return to_real(from_real(v, o));
  endfunction

  // Expected sigmoid word: the fifth-order Taylor polynomial in Horner form,
  // each step truncated to the 17-bit format, clamped into [0, 1];
  // short = series skipped for |x| >= 4, clamp = result clamped.
  function automatic logic [16:0] ref_sig(logic [16:0] xw, output bit short, output bit clamp);
    real xv, x2, t;
    xv = to_real(xw);
    short = 0; clamp = 0;
    if (xv >= 4.0)  begin short = 1; return 17'h07C00; end
    if (xv <= -4.0) begin short = 1; return 17'd0; end
    x2 = trunc(xv * xv);
    t  = trunc(x2 * to_real(17'h05844));
    t  = trunc(t + to_real(17'h16555));
    t  = trunc(t * x2);
    t  = trunc(t + 0.25);
    t  = trunc(t * xv);
    t  = trunc(t + 0.5);
    if (t < 0.0)  begin clamp = 1; return 17'd0; end
    if (t >= 1.0) begin clamp = 1; return 17'h07C00; end
    begin bit o; return from_real(t, o); end
  endfunction

endpackage
