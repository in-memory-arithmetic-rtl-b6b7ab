// tb_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: the random sequence, the stochastic
// divider (the MUX rule Q = Y ? X : previous Q), the 3x3 Gaussian and the
// count-to-pixel mapping are all recomputed here from their definitions.
package tb_ref_pkg;

  // Random numbers r_0 .. r_{N-1} of the generator: r_k is k written
  // backwards in w binary digits (van der Corput sequence).
  function automatic void rand_seq(int unsigned w, ref int unsigned seq[]);
    seq = new[1 << w];
    for (int unsigned k = 0; k < (1 << w); k++) begin
      int unsigned r = 0;
      for (int unsigned b = 0; b < w; b++) r = r * 2 + ((k >> b) & 1);
      seq[k] = r;
    end
  endfunction

  // Value of a data_w-bit number on the w-bit random scale.
  function automatic int unsigned scale_in(int unsigned v, int unsigned w, int unsigned data_w);
    if (w >= data_w) return v << (w - data_w);
    else             return v >> (data_w - w);
  endfunction

  // Number of 1s in the quotient stream of the stochastic divider.
  function automatic int unsigned sc_div_ref(int unsigned x, int unsigned y, int unsigned w,
                                              int unsigned data_w, const ref int unsigned seq[]);
    int unsigned xs, ys, cnt;
    bit xb, yb, q;
    xs = scale_in(x, w, data_w);
    ys = scale_in(y, w, data_w);
    q = 0;
    cnt = 0;
    foreach (seq[k]) begin
      xb = seq[k] < xs;
      yb = seq[k] < ys;
      if (yb) q = xb;
      cnt += q;
    end
    return cnt;
  endfunction

  // 3x3 binomial Gaussian, rounded.
  function automatic int unsigned gauss_ref(int unsigned p[9]);
    int unsigned wgt[9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
    int unsigned s = 0;
    for (int i = 0; i < 9; i++) s += wgt[i] * p[i];
    return (s + 8) / 16;
  endfunction

  // Quotient count (out of 2^w) to a data_w-bit pixel, saturating.
  function automatic int unsigned count_to_pix(int unsigned cnt, int unsigned w, int unsigned data_w);
    int unsigned v;
    v = (cnt << data_w) >> w;
    return (v > (1 << data_w) - 1) ? (1 << data_w) - 1 : v;
  endfunction

endpackage
