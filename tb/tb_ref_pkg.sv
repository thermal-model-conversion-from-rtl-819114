// tb_ref_pkg - reference model of the thermal estimator for the testbenches.
//
// The tables are entered here in physical units (A, V, mJ, ohm) and converted
// to per unit with the bases of the design, so a typo in the RTL tables shows
// up as a mismatch. Interpolation uses an explicit division and floor instead
// of the hardware's shift, and the per-unit arithmetic uses wide integers.
package tb_ref_pkg;

  localparam real I_NOM = 176.0, V_NOM = 16.0, E_NOM = 64.0, RG_NOM = 64.0;

  function automatic int to_pu(input real v, input real nom);
    return int'($rtoi(v / nom * 65536.0 + 0.5));
  endfunction

  // table in physical units -> per-unit integer arrays
  function automatic void mk_table(input real xp[], input real xnom,
                                   input real yp[], input real ynom,
                                   output int xs[], output int ys[]);
    xs = new[xp.size()];
    ys = new[yp.size()];
    foreach (xp[k]) xs[k] = to_pu(xp[k], xnom);
    foreach (yp[k]) ys[k] = to_pu(yp[k], ynom);
  endfunction

  function automatic int sat16(input longint v);
    if (v < 0) return 0;
    if (v > 65535) return 65535;
    return int'(v);
  endfunction

  function automatic int interp(input int xs[], input int ys[], input int x);
    real num;
    for (int k = 0; k < xs.size() - 1; k++)
      if (x >= xs[k] && x < xs[k+1]) begin
        num = real'(ys[k+1] - ys[k]) * real'(x - xs[k]);
        return sat16(longint'(ys[k]) + longint'($floor(num / real'(xs[k+1] - xs[k]))));
      end
    return -1;
  endfunction

  function automatic void vce_table(output int xs[], output int ys[]);
    mk_table('{0.0, 5.5, 11.0, 22.0, 44.0, 88.0, 176.0}, I_NOM,
             '{0.0, 0.949, 1.774, 2.216, 3.092, 4.84, 8.34}, V_NOM, xs, ys);
  endfunction
  function automatic void esw2_table(output int xs[], output int ys[]);
    mk_table('{0.0, 22.0, 66.0, 88.0, 176.0}, I_NOM,
             '{0.0, 4.655, 17.99, 25.0, 53.0}, E_NOM, xs, ys);
  endfunction
  function automatic void esw1_table(output int xs[], output int ys[]);
    mk_table('{0.0, 88.0, 176.0}, I_NOM, '{0.0, 25.0, 50.0}, E_NOM, xs, ys);
  endfunction
  function automatic void rg_table(output int xs[], output int ys[]);
    mk_table('{0.0, 8.0, 16.0, 32.0, 64.0}, RG_NOM,
             '{0.8, 1.0, 1.25, 1.7, 1.95}, 2.0, xs, ys);
  endfunction

  function automatic int mul(input int a, input int b);
    return int'((longint'(a) * longint'(b)) / 65536);
  endfunction

  function automatic int scale(input int x, input int k);
    return sat16((longint'(x) * longint'(k)) / 16384);
  endfunction

  function automatic int ad(input int code, input longint gain);
    return sat16(longint'($floor(real'(code) * real'(gain) / 16384.0)));
  endfunction

  function automatic int p_con(input int i);
    int xs[], ys[];
    vce_table(xs, ys);
    return mul(interp(xs, ys, i), i);
  endfunction

  function automatic int p_sw(input int i, input int vdc, input int fsw,
                              input int rg, input bit improved);
    int xs[], ys[], rx[], ry[];
    if (improved) esw2_table(xs, ys); else esw1_table(xs, ys);
    rg_table(rx, ry);
    return mul(mul(mul(interp(xs, ys, i), interp(rx, ry, rg)), vdc), fsw);
  endfunction

  // K factors from the per-unit bases
  function automatic int k_sw();
    return int'($rtoi((0.064 * 2.0 * (1024.0 / 600.0) * 32000.0) / (16.0 * 176.0) * 16384.0 + 0.5));
  endfunction
  function automatic int k_t();
    return int'($rtoi((16.0 * 176.0) / 1024.0 * 16384.0 + 0.5));
  endfunction

  function automatic int p_in(input int pcon, input int psw);
    int s;
    s = pcon + scale(psw, k_sw());
    if (s > 65535) s = 65535;
    return scale(s, k_t());
  endfunction

  // forward-Euler stage coefficients, Q0.24
  function automatic longint ref_coef_a(input real r_kw, input real tau);
    return longint'($rtoi(100.0e-6 * r_kw * 4.0 / tau * 16777216.0 + 0.5));
  endfunction
  function automatic longint ref_coef_b(input real tau);
    return longint'($rtoi((1.0 - 100.0e-6 / tau) * 16777216.0 + 0.5));
  endfunction

  function automatic longint integ(input longint y, input longint a,
                                   input longint b, input int x);
    longint n;
    n = (b * y + a * longint'(x) * 256) >> 24;
    return (n > 16777215) ? 16777215 : n;
  endfunction

  // ---- floating-point original model (physical units) ----
  function automatic real finterp(input real xp[], input real yp[], input real x);
    for (int k = 0; k < xp.size() - 1; k++)
      if (x <= xp[k+1])
        return yp[k] + (yp[k+1] - yp[k]) * (x - xp[k]) / (xp[k+1] - xp[k]);
    return yp[yp.size() - 1];
  endfunction

  // total loss [W] of the IGBT at current i_a [A] (negative: not conducting)
  function automatic real floss(input real i_a, input real vdc, input real fsw,
                                input real rg, input bit improved);
    real vce, esw, k;
    if (i_a <= 0.0) return 0.0;
    vce = finterp('{0.0, 5.5, 11.0, 22.0, 44.0, 88.0, 176.0},
                  '{0.0, 0.949, 1.774, 2.216, 3.092, 4.84, 8.34}, i_a);
    if (improved)
      esw = finterp('{0.0, 22.0, 66.0, 88.0, 176.0}, '{0.0, 4.655, 17.99, 25.0, 53.0}, i_a);
    else
      esw = finterp('{0.0, 88.0, 176.0}, '{0.0, 25.0, 50.0}, i_a);
    k = finterp('{0.0, 8.0, 16.0, 32.0, 64.0}, '{0.8, 1.0, 1.25, 1.7, 1.95}, rg);
    return vce * i_a + esw * 1.0e-3 * k * (vdc / 600.0) * fsw;
  endfunction

endpackage
