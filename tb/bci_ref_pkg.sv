// bci_ref_pkg: behavioural reference model of the BCI datapath for the
// testbenches. It recomputes, with plain integer arithmetic on longint and
// textbook formulas, what each block must produce:
//   - TDF-II filter: y = b0 x + s1,  s_k = b_k x - a_k y + s_{k+1}, with the
//     product difference floored to Q5.11 and the sum saturated to 16 bits;
//   - CSP: sum of w*x over the channels, floored to Q5.11 and saturated;
//   - sliding variance over WIN samples by Eq. V' = V + M^2 + n^2/400 -
//     o^2/400 - M'^2 with the x/512 + x/2048 approximation of /400, and the
//     direct (non-recursive) variance of the window for a sanity bound;
//   - linear SVM sign.
package bci_ref_pkg;

  function automatic longint fl_shift(input longint v, input int sh);
    // floor(v / 2^sh) without relying on >>> of the design
    longint d = longint'(1) << sh;
    if (v >= 0) return v / d;
    else        return -((-v + d - 1) / d);
  endfunction

  function automatic longint sat(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint tap(input longint x, input longint y, input longint num,
                                 input longint den, input longint par_in);
    return sat(fl_shift(num * x - den * y, 11) + par_in);
  endfunction

  function automatic longint d400(input longint v);
    return fl_shift(v, 9) + fl_shift(v, 11);
  endfunction

  // One eighth-order (or ORDER) TDF-II filter channel.
  class iir_ref;
    int     order;
    longint b[], a[];
    longint s[];          // s[1..order], s[order+1] = 0
    function new(int order_i, longint b_i[], longint a_i[]);
      order = order_i;
      b = b_i; a = a_i;
      s = new[order + 2];
      foreach (s[i]) s[i] = 0;
    endfunction
    function longint step(longint x);
      longint y;
      longint ns[];
      ns = new[order + 2];
      y = tap(x, 0, b[0], 0, s[1]);
      for (int k = 1; k <= order; k++)
        ns[k] = tap(x, y, b[k], a[k], (k < order) ? s[k+1] : 0);
      for (int k = 1; k <= order; k++) s[k] = ns[k];
      return y;
    endfunction
  endclass

  // Recursive sliding-window variance, as the variance unit computes it.
  class var_ref;
    int     win;
    longint q[$];
    longint sum, mean, v;
    function new(int win_i);
      win = win_i; sum = 0; mean = 0; v = 0;
    endfunction
    function void step(longint x);
      longint old, m_new;
      if (q.size() == win) old = q.pop_front();
      else                 old = 0;
      q.push_back(x);
      sum   = sum + x - old;
      m_new = d400(sum);
      if (m_new > 32767 || m_new < -32768) m_new = longint'(16'(m_new));
      v     = v + mean * mean + d400(x * x) - d400(old * old) - m_new * m_new;
      mean  = m_new;
    endfunction
    // Exact variance of the window in Q10.22 (for a plausibility bound).
    function real exact();
      real s1 = 0, s2 = 0;
      foreach (q[i]) begin s1 += real'(q[i]); s2 += real'(q[i]) * real'(q[i]); end
      return s2 / win - (s1 / win) * (s1 / win);
    endfunction
  endclass

endpackage
