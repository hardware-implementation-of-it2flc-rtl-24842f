// it2_ref_pkg: real-valued reference model of the interval type-2 fuzzy
// system, used by the testbenches to check the fixed-point hardware.
//
// It evaluates the membership functions from the breakpoint table (in
// hundredths) with floating-point arithmetic, fires every rule on its own
// (no per-set sums), sorts the rules by consequent and computes yl and yr by
// exhaustive search over all switch points of the centre-of-sets formulas,
// i.e. without the EIASC shortcut the hardware uses.
package it2_ref_pkg;
  import it2flc_pkg::*;

  function automatic real mf_real(input int m, input int i, input bit upper, input real x);
    hpts_t p;
    real a, b, c, d, h;
    p = mf_pts(m, i, upper);
    a = p.a / 100.0; b = p.b / 100.0; c = p.c / 100.0; d = p.d / 100.0; h = p.h / 100.0;
    if (x >= b && x <= c) return h;
    if (x <= a || x >= d) return 0.0;
    if (x < b) return h * (x - a) / (b - a);
    return h * (d - x) / (d - c);
  endfunction

  // consequent of rule (i, j): nearest set to the mean index, ties toward i
  function automatic int rule_ref(input int i, input int j);
    real mean;
    mean = (i + j) / 2.0;
    if (mean == $floor(mean)) return int'(mean);
    return (i > j) ? int'($ceil(mean)) : int'($floor(mean));
  endfunction

  function automatic real cons_ref(input int m, input int k);
    return cons_hund(m, k) / 100.0;
  endfunction

  // exhaustive centre-of-sets type reduction over sorted points
  function automatic void cos_exhaustive(input int n, input real ys[], input real flo[],
                                         input real fup[], output real yl, output real yr);
    real num, den, v;
    yl = 1.0e9; yr = -1.0e9;
    for (int k = 0; k <= n; k++) begin
      // left: upper weights on the first k points, lower on the rest
      num = 0.0; den = 0.0;
      for (int q = 0; q < n; q++) begin
        num += ys[q] * ((q < k) ? fup[q] : flo[q]);
        den += (q < k) ? fup[q] : flo[q];
      end
      if (den > 0.0) begin v = num / den; if (v < yl) yl = v; end
      // right: lower weights on the first k points, upper on the rest
      num = 0.0; den = 0.0;
      for (int q = 0; q < n; q++) begin
        num += ys[q] * ((q < k) ? flo[q] : fup[q]);
        den += (q < k) ? flo[q] : fup[q];
      end
      if (den > 0.0) begin v = num / den; if (v > yr) yr = v; end
    end
  endfunction

  // full system: rule by rule, sorted by consequent
  function automatic void fis_ref(input int m, input real x1, input real x2,
                                  output real yl, output real yr, output real y);
    real ys[], flo[], fup[];
    int n, idx;
    n = m * m;
    ys = new[n]; flo = new[n]; fup = new[n];
    idx = 0;
    // emit the rules in ascending consequent order
    for (int o = 0; o < m; o++)
      for (int i = 0; i < m; i++)
        for (int j = 0; j < m; j++)
          if (rule_ref(i, j) == o) begin
            ys[idx]  = cons_ref(m, o);
            flo[idx] = mf_real(m, i, 1'b0, x1) * mf_real(m, j, 1'b0, x2);
            fup[idx] = mf_real(m, i, 1'b1, x1) * mf_real(m, j, 1'b1, x2);
            idx++;
          end
    cos_exhaustive(n, ys, flo, fup, yl, yr);
    y = (yl + yr) / 2.0;
  endfunction
endpackage
