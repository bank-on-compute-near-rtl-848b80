// fp16_ref_pkg: reference model for half-precision arithmetic used by the
// testbenches. Operands are converted to double precision, where the
// product or sum of two half-precision numbers is exact, and the result is
// rounded back to half precision (nearest, ties to even; subnormals flush
// to zero, as in the RTL).
package fp16_ref_pkg;

  function automatic real h2r(logic [15:0] h);
    real m, r;
    int e;
    e = int'(h[14:10]);
    if (e == 0) return 0.0;
    m = 1.0 + real'(h[9:0]) / 1024.0;
    r = m * (2.0 ** (e - 15));
    return h[15] ? -r : r;
  endfunction

  // Round an exactly representable double to half precision.
  function automatic logic [15:0] r2h(real x);
    logic s;
    real ax, m, fl;
    int e, mi;
    s  = (x < 0.0);
    ax = s ? -x : x;
    if (ax == 0.0) return {s, 15'd0};
    e = 0;
    while (ax >= 2.0 ** (e + 1)) e++;
    while (ax < 2.0 ** e) e--;
    m  = ax / (2.0 ** e) * 1024.0;   // in [1024, 2048)
    fl = $floor(m);
    mi = int'(fl);
    if ((m - fl > 0.5) || ((m - fl == 0.5) && (mi % 2 == 1))) mi++;
    if (mi == 2048) begin mi = 1024; e++; end
    if (e + 15 >= 31) return {s, 5'h1f, 10'd0};
    if (e + 15 <= 0) return {s, 15'd0};
    return {s, 5'(e + 15), 10'(mi - 1024)};
  endfunction

  function automatic logic is_nan(logic [15:0] h);
    return (h[14:10] == 5'h1f) && (h[9:0] != 0);
  endfunction

  function automatic logic is_inf(logic [15:0] h);
    return (h[14:10] == 5'h1f) && (h[9:0] == 0);
  endfunction

  function automatic logic [15:0] ref_mul(logic [15:0] a, logic [15:0] b);
    if (is_nan(a) || is_nan(b)) return 16'h7e00;
    if ((is_inf(a) && b[14:10] == 0) || (is_inf(b) && a[14:10] == 0)) return 16'h7e00;
    if (is_inf(a) || is_inf(b)) return {a[15] ^ b[15], 5'h1f, 10'd0};
    if (a[14:10] == 0 || b[14:10] == 0) return {a[15] ^ b[15], 15'd0};
    return r2h(h2r(a) * h2r(b));
  endfunction

  function automatic logic [15:0] ref_add(logic [15:0] a, logic [15:0] b);
    if (is_nan(a) || is_nan(b)) return 16'h7e00;
    if (is_inf(a) && is_inf(b) && (a[15] != b[15])) return 16'h7e00;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    return r2h(h2r(a) + h2r(b));
  endfunction

  // Equality for checking: any NaN matches any NaN, zeros match regardless
  // of sign.
  function automatic logic same(logic [15:0] got, logic [15:0] exp);
    if (is_nan(exp)) return is_nan(got);
    if (exp[14:0] == 0) return got[14:0] == 0;
    return got == exp;
  endfunction

  function automatic logic [15:0] relu(logic [15:0] h);
    return h[15] ? 16'h0000 : h;
  endfunction

endpackage
