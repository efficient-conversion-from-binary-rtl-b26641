// mdlns_ref_pkg: reference model used by the testbenches.
//
// Computes the same conversions as the RTL, written independently of it:
// the kernel table is built with real arithmetic (a = ceil(-b*ln D/ln 2),
// x = 2^a * D^b rounded to xf fraction bits, then sorted), and the table match
// is a linear search instead of a range decoder. Values are in the converters'
// fixed-point frame: the magnitude of an input x is |x| * 2^frac_w.
package mdlns_ref_pkg;
  typedef struct {
    bit nz;
    bit neg;
    int a;
    int b;
  } digit_t;

  typedef struct {
    digit_t lo_d;
    digit_t hi_d;
    longint lo_res;
    longint hi_res;
    bit     lo_res_neg;
    bit     hi_res_neg;
  } step_t;

  longint tab_x[$];
  int     tab_a[$];
  int     tab_b[$];
  int     cfg_xf;
  int     cfg_frac;

  function automatic void build(int r, int d, int xf, int frac_w);
    real l2d;
    longint xq;
    int a;
    tab_x.delete(); tab_a.delete(); tab_b.delete();
    cfg_xf   = xf;
    cfg_frac = frac_w;
    l2d = $ln(real'(d)) / $ln(2.0);
    for (int b = -(2 ** (r - 1)); b < 2 ** (r - 1); b++) begin
      int pos;
      a  = int'($ceil(-real'(b) * l2d));
      xq = longint'($floor((2.0 ** a) * (real'(d) ** b) * (2.0 ** xf) + 0.5));
      pos = 0;
      while (pos < tab_x.size() && tab_x[pos] < xq) pos++;
      tab_x.insert(pos, xq);
      tab_a.insert(pos, a);
      tab_b.insert(pos, b);
    end
  endfunction

  function automatic int msb(longint v);
    int p = -1;
    for (int i = 0; i < 63; i++) if (v[i]) p = i;
    return p;
  endfunction

  // One NRS step on residual v with sign neg.
  function automatic step_t step(longint v, bit neg);
    step_t s;
    int p, i;
    longint mant, xl, xh, apl, aph;
    int al, bl, ah, bh;
    if (v == 0) begin
      s.lo_d = '{nz: 0, neg: neg, a: 0, b: 0};
      s.hi_d = '{nz: 0, neg: neg, a: 0, b: 0};
      s.lo_res = 0; s.hi_res = 0; s.lo_res_neg = neg; s.hi_res_neg = !neg;
      return s;
    end
    p    = msb(v);
    mant = (v << cfg_xf) >> p;
    i    = 0;
    foreach (tab_x[k]) if (tab_x[k] <= mant) i = k;
    xl = tab_x[i]; al = tab_a[i]; bl = tab_b[i];
    if (i + 1 < tab_x.size()) begin
      xh = tab_x[i+1]; ah = tab_a[i+1]; bh = tab_b[i+1];
    end else begin
      xh = 64'd2 << cfg_xf; ah = 1; bh = 0;
    end
    apl = (xl << p) >> cfg_xf;
    aph = (xh << p) >> cfg_xf;
    s.lo_d = '{nz: 1, neg: neg, a: al + p - cfg_frac, b: bl};
    s.hi_d = '{nz: 1, neg: neg, a: ah + p - cfg_frac, b: bh};
    s.lo_res = v - apl;
    s.hi_res = aph - v;
    s.lo_res_neg = neg;
    s.hi_res_neg = !neg;
    return s;
  endfunction

  // Best n-digit conversion of x: every combination of lower/higher choices
  // on the first n-1 digits, the better candidate on the last one; the first
  // of equally good leaves wins. Also reports the leaf index and whether the
  // first digit used the higher table entry.
  function automatic void convert(longint x, int n, output digit_t dg[], output longint err,
                                  output bit err_neg, output int best_leaf);
    digit_t cur[];
    longint v, best;
    bit     neg;
    step_t  s;
    bit     br;
    best = -1;
    dg   = new[n];
    cur  = new[n];
    err_neg   = 0;
    best_leaf = 0;
    for (int leaf = 0; leaf < 2 ** (n - 1); leaf++) begin
      bit lneg;
      v   = (x < 0 ? -x : x) << cfg_frac;
      neg = (x < 0);
      for (int k = 0; k < n; k++) begin
        s = step(v, neg);
        if (k < n - 1) br = leaf[n - 2 - k];
        else           br = (s.hi_res < s.lo_res);
        cur[k] = br ? s.hi_d : s.lo_d;
        v      = br ? s.hi_res : s.lo_res;
        neg    = br ? s.hi_res_neg : s.lo_res_neg;
      end
      lneg = neg && (v != 0);
      if (best < 0 || v < best) begin
        best      = v;
        dg        = cur;
        err_neg   = lneg;
        best_leaf = leaf;
        cur       = new[n];
      end
    end
    err = best;
  endfunction

  // Value of a digit list as a real number, for sanity checks.
  function automatic real value(digit_t dg[], int d);
    real acc = 0.0;
    foreach (dg[k])
      if (dg[k].nz) acc += (dg[k].neg ? -1.0 : 1.0) * (2.0 ** dg[k].a) * (real'(d) ** dg[k].b);
    return acc;
  endfunction
endpackage
