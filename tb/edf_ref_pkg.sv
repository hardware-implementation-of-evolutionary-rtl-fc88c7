// edf_ref_pkg: reference models used by the testbenches.
//
// Written from the arithmetic rules of the design (Q14 data, rounded and
// saturated filter output, Q14 squared error, saturating sums), not from the
// RTL: every SFM output, state and fitness that a testbench checks is
// recomputed here with plain integer arithmetic.
package edf_ref_pkg;
  import edf_pkg::*;

  function automatic longint sat(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // Runs one inner filter over nsmp samples. Returns the outputs in y, the
  // advanced individual in ind and the fitness.
  function automatic longint filter_ref(inout indiv_t ind, input longint x[], input longint d[],
                                        input int nsmp, output longint y[]);
    longint a[N_AR], b[M_MA+1], yd[N_AR], xd[M_MA];
    longint err, acc, yy, e;
    y = new[nsmp];
    for (int i = 0; i < N_AR; i++) begin a[i] = longint'(ind.w[i]); yd[i] = longint'(ind.s[i]); end
    for (int j = 0; j <= M_MA; j++) b[j] = longint'(ind.w[N_AR + j]);
    for (int j = 0; j < M_MA; j++) xd[j] = longint'(ind.s[N_AR + j]);
    err = 0;
    for (int k = 0; k < nsmp; k++) begin
      acc = b[0] * x[k];
      for (int i = 0; i < N_AR; i++) acc += a[i] * yd[i];
      for (int j = 1; j <= M_MA; j++) acc += b[j] * xd[j-1];
      yy = sat((acc + 8192) >>> 14);
      y[k] = yy;
      e = sat(d[k] - yy);
      err += (e * e) >>> 14;
      if (err > 64'h7fff_ffff) err = 64'h7fff_ffff;
      for (int i = N_AR - 1; i > 0; i--) yd[i] = yd[i-1];
      yd[0] = yy;
      for (int j = M_MA - 1; j > 0; j--) xd[j] = xd[j-1];
      if (M_MA > 0) xd[0] = x[k];
    end
    for (int i = 0; i < N_AR; i++) ind.s[i] = sample_t'(yd[i]);
    for (int j = 0; j < M_MA; j++) ind.s[N_AR + j] = sample_t'(xd[j]);
    return -err;
  endfunction

  function automatic indiv_t rand_indiv(int range);
    indiv_t r;
    for (int i = 0; i < NC; i++) r.w[i] = sample_t'($signed($urandom_range(2 * range)) - range);
    for (int i = 0; i < NS; i++) r.s[i] = sample_t'($signed($urandom_range(2 * range)) - range);
    return r;
  endfunction

endpackage
