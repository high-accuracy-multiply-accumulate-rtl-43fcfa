// usc_pkg: shared constants and elaboration-time arithmetic for the unary
// OR-based multiply-accumulate (MAC) units.
//
// A MAC of N_SUM products sums the products x_i*y_i of unary bit-streams with
// the coprime periods n (for x_i) and k = n-1 (for y_i). Each product lasts
// n*k cycles. Products are OR-ed together, and each one is shifted by its own
// relative delay so that the ones of different products never overlap while
// every input is at most v ones per period. The functions below give:
//   * v_max(n, N)     - the largest v for which N products can be summed
//                       exactly: v <= floor(n / (ceil(pronic root of N) + 1)),
//                       where ceil(pronic root of N) is the smallest x with
//                       x*(x+1) >= N.
//   * n_major, n_minor - counts of long ("major", q*v*n) and short
//                       ("minor", p*v) delay steps: floor((n-2v)/v) and
//                       floor((n-v)/v).
//   * delay_of(i)     - the delay of product i, enumerated major-outer,
//                       minor-inner: q = i / (n_minor+1), p = i mod (n_minor+1),
//                       delay = q*v*n + p*v.
//   * d_max           - the delay of the last product used, which is what a
//                       whole MAC operation adds to the n*k cycles of one
//                       product. For an N that is not pronic only the first N
//                       delays of the schedule are used.
// The same schedule is built as run-time logic in delay_schedule.sv; these
// functions are only used to size registers and to set constant delays.
package usc_pkg;

  // Smallest x with x*(x+1) >= N: the pronic root of N rounded up.
  function automatic int unsigned pronic_root_ceil(input int unsigned nsum);
    int unsigned x;
    x = 0;
    while (x * (x + 1) < nsum) x++;
    return x;
  endfunction

  // Largest number of ones per period that still gives an exact MAC.
  function automatic int unsigned v_max(input int unsigned n, input int unsigned nsum);
    return n / (pronic_root_ceil(nsum) + 1);
  endfunction

  function automatic int unsigned n_major(input int unsigned n, input int unsigned v);
    return (n >= 2 * v) ? (n - 2 * v) / v : 0;
  endfunction

  function automatic int unsigned n_minor(input int unsigned n, input int unsigned v);
    return (n >= v) ? (n - v) / v : 0;
  endfunction

  // Number of distinct delays the schedule offers for (n, v).
  function automatic int unsigned num_delays(input int unsigned n, input int unsigned v);
    return (n_major(n, v) + 1) * (n_minor(n, v) + 1);
  endfunction

  function automatic int unsigned delay_of(input int unsigned n, input int unsigned v,
                                           input int unsigned i);
    int unsigned q, p;
    q = i / (n_minor(n, v) + 1);
    p = i % (n_minor(n, v) + 1);
    return q * v * n + p * v;
  endfunction

  // Largest delay among the first nsum products.
  function automatic int unsigned d_max(input int unsigned n, input int unsigned v,
                                        input int unsigned nsum);
    return delay_of(n, v, nsum - 1);
  endfunction

  // Cycles of one complete parallel MAC operation: n*k plus the last delay.
  function automatic int unsigned total_cycles(input int unsigned n, input int unsigned v,
                                               input int unsigned nsum);
    return n * (n - 1) + d_max(n, v, nsum);
  endfunction

  function automatic int unsigned bits_for(input int unsigned value);
    return (value < 2) ? 1 : $clog2(value + 1);
  endfunction

endpackage
