// dwt_ref_pkg: software reference model of the 9/7 lifting transform used by
// the testbenches. It works on plain integer arrays, completely separate from
// the RTL structure (no slots, flushes or pipelines):
//   d[m] = o[m] + rnd(A*(e[m] + e[m+1]))   with e[R] = e[R-1]
//   s[m] = e[m] + rnd(B*(d[m-1] + d[m]))   with d[-1] = d[0]
// where rnd(k*x) = floor((k*x + 2^13) / 2^14) and k is the coefficient in
// 14-bit fixed point. The *_rc variants round each product separately,
//   d[m] = o[m] + rnd(A*e[m]) + rnd(A*e[m+1]),
//   s[m] = e[m] + rnd(B*d[m-1]) + rnd(B*d[m]),
// the arithmetic of a lifting step that stores recombined partial sums.
// A floating-point version of the same transform is included to show that
// the integer result is a true 9/7 transform.
package dwt_ref_pkg;

  localparam longint CA = -25987;
  localparam longint CB = -868;
  localparam longint CG = 14466;
  localparam longint CD = 7266;

  localparam real RA = -1.586134342059924;
  localparam real RB = -0.052980118572961;
  localparam real RG =  0.882911075530934;
  localparam real RD =  0.443506852043971;

  function automatic longint rmul(longint k, longint x);
    longint p;
    p = k * x + 8192;
    // floor division by 2^14
    if (p >= 0) return p / 16384;
    else        return -((-p + 16383) / 16384);
  endfunction

  // One predict/update step in place: e -> s, o -> d.
  function automatic void step(ref longint e[], ref longint o[], input longint a, input longint b);
    int r = e.size();
    longint d[] = new[r];
    longint s[] = new[r];
    for (int m = 0; m < r; m++)
      d[m] = o[m] + rmul(a, e[m] + e[(m + 1 < r) ? m + 1 : m]);
    for (int m = 0; m < r; m++)
      s[m] = e[m] + rmul(b, d[(m > 0) ? m - 1 : 0] + d[m]);
    e = s;
    o = d;
  endfunction

  // Same step with every product rounded on its own.
  function automatic void step_rc(ref longint e[], ref longint o[], input longint a, input longint b);
    int r = e.size();
    longint d[] = new[r];
    longint s[] = new[r];
    for (int m = 0; m < r; m++)
      d[m] = o[m] + rmul(a, e[m]) + rmul(a, e[(m + 1 < r) ? m + 1 : m]);
    for (int m = 0; m < r; m++)
      s[m] = e[m] + rmul(b, d[(m > 0) ? m - 1 : 0]) + rmul(b, d[m]);
    e = s;
    o = d;
  endfunction

  function automatic void dwt1d_rc(input longint x[], ref longint lo[], ref longint hi[]);
    int r = x.size() / 2;
    lo = new[r];
    hi = new[r];
    for (int m = 0; m < r; m++) begin
      lo[m] = x[2*m];
      hi[m] = x[2*m+1];
    end
    step_rc(lo, hi, CA, CB);
    step_rc(lo, hi, CG, CD);
  endfunction

  // Full 1-D 9/7 lifting of x (even length): lo = L, hi = H.
  function automatic void dwt1d(input longint x[], ref longint lo[], ref longint hi[]);
    int r = x.size() / 2;
    lo = new[r];
    hi = new[r];
    for (int m = 0; m < r; m++) begin
      lo[m] = x[2*m];
      hi[m] = x[2*m+1];
    end
    step(lo, hi, CA, CB);
    step(lo, hi, CG, CD);
  endfunction

  function automatic void fstep(ref real e[], ref real o[], input real a, input real b);
    int r = e.size();
    real d[] = new[r];
    real s[] = new[r];
    for (int m = 0; m < r; m++)
      d[m] = o[m] + a * (e[m] + e[(m + 1 < r) ? m + 1 : m]);
    for (int m = 0; m < r; m++)
      s[m] = e[m] + b * (d[(m > 0) ? m - 1 : 0] + d[m]);
    e = s;
    o = d;
  endfunction

  function automatic void fdwt1d(input real x[], ref real lo[], ref real hi[]);
    int r = x.size() / 2;
    lo = new[r];
    hi = new[r];
    for (int m = 0; m < r; m++) begin
      lo[m] = x[2*m];
      hi[m] = x[2*m+1];
    end
    fstep(lo, hi, RA, RB);
    fstep(lo, hi, RG, RD);
  endfunction

endpackage
