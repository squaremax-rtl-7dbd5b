// tb_sqm_ref_pkg: bit-exact reference model of the Squaremax arithmetic,
// written from the defining formulas (real arithmetic where convenient) and
// independently of the RTL, for use by the testbenches.
//   square      ReLU(x)^2
//   dshift      max(0, msb(square) - 14);  rsqr = square >> dshift
//   n, abc      D = 1.abc... x 2^n          (D = 0 gives n = 0, abc = 0)
//   S(abc)      min(32767, round(2^15 / (1 + abc/8)))
//   y           (rsqr * S) >> (n - dshift), truncated, Q1.15
package tb_sqm_ref_pkg;
  function automatic int ref_msb(longint unsigned v);
    int m = -1;
    for (int k = 0; k < 64; k++) if (((v >> k) & 64'd1) != 0) m = k;
    return m;
  endfunction

  function automatic longint unsigned ref_square(logic [15:0] x);
    longint signed xs = longint'($signed(x));
    return (xs > 0) ? longint'(xs * xs) : 64'd0;
  endfunction

  function automatic int ref_dshift(longint unsigned sq);
    int m = ref_msb(sq);
    return (m > 14) ? m - 14 : 0;
  endfunction

  function automatic int ref_rsqr(longint unsigned sq);
    return int'(sq >> ref_dshift(sq));
  endfunction

  function automatic int ref_n(longint unsigned d);
    return (d == 0) ? 0 : ref_msb(d);
  endfunction

  function automatic int ref_abc(longint unsigned d);
    real m;
    if (d == 0) return 0;
    m = real'(d) / (2.0 ** ref_n(d));      // 1 <= m < 2
    return int'($floor((m - 1.0) * 8.0));
  endfunction

  function automatic int ref_s(int abc);
    int s = int'($floor(32768.0 / (1.0 + real'(abc) / 8.0) + 0.5));
    return (s > 32767) ? 32767 : s;
  endfunction

  function automatic int ref_y(longint unsigned sq, longint unsigned d);
    longint unsigned prod = longint'(ref_rsqr(sq)) * longint'(ref_s(ref_abc(d)));
    int sh = ref_n(d) - ref_dshift(sq);
    longint unsigned v = (sh < 0) ? prod : (prod >> sh);
    return (v > 65535) ? 65535 : int'(v);
  endfunction
endpackage
