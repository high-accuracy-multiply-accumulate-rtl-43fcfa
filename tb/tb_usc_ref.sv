// tb_usc_ref: reference model for the unary OR-based MAC testbenches.
//
// Worked out from the definitions, not from the RTL: v from the closed form
// with a real square root, the delays by the two nested loops of the delay
// algorithm (major step q*v*n outside, minor step p*v inside), and each
// output bit by building every delayed product bit directly from the unary
// stream definitions (ones first in each period).
package tb_usc_ref;

  localparam int MAXN = 64;
  typedef int vec_t[MAXN];

  function automatic int ref_v(input int n, input int nsum);
    real r;
    r = ($sqrt(4.0 * nsum + 1.0) - 1.0) / 2.0;
    return n / (int'($ceil(r - 1e-9)) + 1);
  endfunction

  // Delay algorithm: nested loops, in order of enumeration.
  function automatic vec_t ref_delays(input int n, input int v);
    vec_t d;
    int i, nmaj, nmin;
    nmaj = (n - 2 * v) / v;
    nmin = (n - v) / v;
    i = 0;
    d = '{default: -1};
    for (int q = 0; q <= nmaj; q++)
      for (int p = 0; p <= nmin; p++) begin
        if (i < MAXN) d[i] = q * v * n + p * v;
        i++;
      end
    return d;
  endfunction

  // Unary stream bit at time t (ones first): value ones per period.
  function automatic bit ustream(input int t, input int period, input int value);
    return (t % period) < value;
  endfunction

  // Output bit of the MAC at time t (0 before/after every product window).
  function automatic bit ref_bit(input int n, input int v, input int nsum, input int t,
                                 input vec_t xs, input vec_t ys);
    vec_t d;
    bit   z;
    int   k, tt;
    d = ref_delays(n, v);
    k = n - 1;
    z = 0;
    for (int i = 0; i < nsum; i++) begin
      tt = t - d[i];
      if (tt >= 0 && tt < n * k)
        z |= ustream(tt, n, xs[i]) && ustream(tt, k, ys[i]);
    end
    return z;
  endfunction

  function automatic int ref_count(input int n, input int v, input int nsum,
                                   input vec_t xs, input vec_t ys);
    vec_t d;
    int cnt;
    d = ref_delays(n, v);
    cnt = 0;
    for (int t = 0; t < n * (n - 1) + d[nsum - 1]; t++)
      cnt += ref_bit(n, v, nsum, t, xs, ys);
    return cnt;
  endfunction

  function automatic int exact_sum(input int nsum, input vec_t xs, input vec_t ys);
    int s;
    s = 0;
    for (int i = 0; i < nsum; i++) s += xs[i] * ys[i];
    return s;
  endfunction

endpackage
