// tb_ref_pkg: reference models used by the testbenches.
//
// These models restate the engine's arithmetic in plain integer/real code,
// without the table, the block alignment hardware or the reduction tree:
//   ref_entry : one table word, computed with real arithmetic from the
//               fixed-point coefficients and rounded half up;
//   ref_step  : one recursion step new = C_SELF*self + C_CROSS*cross as the
//               sum over K-bit magnitude blocks of ref_entry * 2^(K*j),
//               rounded to the rho format and saturated to N bits.
package tb_ref_pkg;

  localparam int COEF_FRAC = 30;

  function automatic longint ref_entry(input longint cs, input longint cc,
                                       input bit sa, input bit sb,
                                       input longint a, input longint b, input int lf);
    real v;
    v = ((sa ? -1.0 : 1.0) * real'(cs) * real'(a) + (sb ? -1.0 : 1.0) * real'(cc) * real'(b))
        / (2.0 ** (COEF_FRAC - lf));
    return longint'($floor(v + 0.5));
  endfunction

  function automatic longint ref_step(input longint self_v, input longint cross_v,
                                      input longint cs, input longint cc,
                                      input int n, input int k, input int lut_w);
    int     lf, t;
    longint ms, mc, sum, r, qmax, qmin;
    bit     ss, sc;
    lf = lut_w - k - 2;
    t  = n / k;
    ss = self_v < 0;
    sc = cross_v < 0;
    ms = ss ? -self_v : self_v;
    mc = sc ? -cross_v : cross_v;
    sum = 0;
    for (int j = 0; j < t; j++) begin
      longint a, b;
      a = (ms >> (j * k)) & ((longint'(1) << k) - 1);
      b = (mc >> (j * k)) & ((longint'(1) << k) - 1);
      sum += ref_entry(cs, cc, ss, sc, a, b, lf) * (longint'(1) << (j * k));
    end
    r    = (sum + (longint'(1) << (lf - 1))) >>> lf;
    qmax = (longint'(1) << (n - 1)) - 1;
    qmin = -(longint'(1) << (n - 1));
    if (r > qmax) r = qmax;
    if (r < qmin) r = qmin;
    return r;
  endfunction

  // Sign-extend the low n bits of v.
  function automatic longint sext(input longint v, input int n);
    return (v << (64 - n)) >>> (64 - n);
  endfunction

endpackage
