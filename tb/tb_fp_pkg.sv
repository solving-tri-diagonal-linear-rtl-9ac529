// tb_fp_pkg - testbench helpers for the generic floating-point format
// {sign, exp_w-bit biased exponent, man_w-bit mantissa with hidden one,
// exponent field 0 = zero}.  Conversions to and from SystemVerilog real give
// the testbenches a reference that does not depend on the design's arithmetic.
package tb_fp_pkg;

  // format word -> real
  function automatic real fp_to_real(logic [63:0] bits, int exp_w, int man_w);
    longint unsigned e, m;
    real v;
    e = (bits >> man_w) & ((64'd1 << exp_w) - 1);
    m = bits & ((64'd1 << man_w) - 1);
    if (e == 0) return 0.0;
    v = (1.0 + real'(m) / (2.0 ** man_w)) * (2.0 ** (real'(e) - real'((1 << (exp_w - 1)) - 1)));
    return bits[exp_w + man_w] ? -v : v;
  endfunction

  // real -> format word, mantissa truncated (the value must be in range)
  function automatic logic [63:0] real_to_fp(real r, int exp_w, int man_w);
    real a;
    int  e;
    longint unsigned m;
    logic [63:0] w;
    if (r == 0.0) return '0;
    a = (r < 0.0) ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    m = longint'($floor((a - 1.0) * (2.0 ** man_w)));
    w = (longint'(e + (1 << (exp_w - 1)) - 1) << man_w) | m;
    if (r < 0.0) w[exp_w + man_w] = 1'b1;
    return w;
  endfunction

  function automatic real rabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // uniform random real in [lo, hi)
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

endpackage
