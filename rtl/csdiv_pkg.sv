// csdiv_pkg: types and helpers shared by the carry-save fractional clock divider.
//
// The divider advances an accumulator e by p (or by p-q on a "modulo event")
// once per input clock, so that p modulo events occur every q input cycles.
// e is kept in carry-save form and the modulo event is raised by a
// "soft threshold" that looks only at the two MSBs of that form.  The
// threshold option t selects the rule:
//   THR_ANY  (t=0): event when at least one of the two MSBs is set
//   THR_BOTH (t=1): event when both MSBs are set
//
// min_width() gives the smallest accumulator width n that keeps the carry-save
// additions free of arithmetic overflow for a fraction p/q:
//   t=0: n >= max{ ld(p+1), 1 + ld(q-p) }
//   t=1: n >= max{ 1 + ld(p+1), 1 + ld(q-p) }
// with ld read as the ceiling of the binary logarithm.  Software uses it to
// choose n; a divider built with width N runs an n-bit setting by shifting p,
// p-q and the initial value of e left by N-n bits, which changes nothing in
// the sequence of modulo events.  DEFAULT_WIDTH is this design's choice of
// width for the hardware.
package csdiv_pkg;

  parameter int unsigned DEFAULT_WIDTH = 16;

  typedef enum logic {
    THR_ANY  = 1'b0,
    THR_BOTH = 1'b1
  } thr_e;

  // ceiling of log2(x) for x >= 1
  function automatic int unsigned ld_ceil(input longint unsigned x);
    int unsigned r;
    r = 0;
    while ((64'd1 << r) < x) r++;
    return r;
  endfunction

  function automatic int unsigned min_width(input longint unsigned p,
                                            input longint unsigned q,
                                            input thr_e t);
    int unsigned a, b;
    a = (t == THR_BOTH) ? 1 + ld_ceil(p + 1) : ld_ceil(p + 1);
    b = 1 + ld_ceil(q - p);
    return (a > b) ? a : b;
  endfunction

endpackage
