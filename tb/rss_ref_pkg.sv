// Reference model used by the smoothing filter testbenches.
//
// Works straight from the definition of the VVC reference sample smoothing:
// on the line Left[2H-1..0], corner, Top[0..2W-1] of N = 2W + 2H + 1 samples
// every position p with 0 < p < N-1 becomes (s[p-1] + 2 s[p] + s[p+1] + 2) >> 2
// and the two end samples stay as they are. Nothing here reuses the design's
// bit-level datapath or its look-up table.
package rss_ref_pkg;

  localparam int MAX_N = 2 * 64 + 2 * 64 + 1;

  typedef int line_t [MAX_N];

  function automatic int smooth3(int a, int b, int c);
    return (a + 2 * b + c + 2) >> 2;
  endfunction

  function automatic int line_len(int w, int h);
    return 2 * w + 2 * h + 1;
  endfunction

  // Number of 33-sample segments: ceil((2W + 2H - 1) / 33).
  function automatic int n_segments(int w, int h);
    return (2 * w + 2 * h - 1 + 32) / 33;
  endfunction

  function automatic int ref_out(const ref line_t s, int n, int p);
    if (p == 0 || p == n - 1) return s[p];
    return smooth3(s[p-1], s[p], s[p+1]);
  endfunction

  function automatic int size_of(int code);
    return 8 << code;
  endfunction

endpackage
