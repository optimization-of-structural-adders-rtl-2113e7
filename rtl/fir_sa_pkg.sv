// Shared constants and elaboration-time helpers for the transposed direct
// form (TDF) FIR filter with bisected structural adders.
//
// Everything here is evaluated while the design is elaborated: the filter
// has fixed coefficients, so every signal width follows from the range of
// values it can carry (conventional range estimation).  The helpers give
//   * swidth     - smallest two's complement width holding [lo, hi]
//   * ceil_log2  - ceil(log2(v)) for v >= 0, with ceil_log2(0) = 0
//   * csd_pos / csd_neg - the +1 and -1 digit masks of the canonic signed
//     digit (CSD) form of a coefficient
// and the default coefficient set.
//
// The default set is a 121-tap, 14-bit highpass with band edges 0.74*pi and
// 0.80*pi, 8-bit input: the size and word lengths of the 121-tap benchmark
// filter the method is demonstrated on.  Its values are this design's own
// (Kaiser-windowed ideal highpass, cut-off 0.77*pi, beta 7.86, scaled by
// 2^15 and rounded); the benchmark's actual coefficients are not reproduced.
package fir_sa_pkg;

  localparam int unsigned FILTER_B_TAPS = 121;
  localparam int FILTER_B_COEF [FILTER_B_TAPS] = '{
    // c[0] (output end) ... c[120] (input end)
        0,     1,    -1,     1,     1,    -2,     3,    -3,    -1,     5,    -8,
        8,    -2,    -8,    17,   -18,     9,     9,   -27,    35,   -24,    -4,
       39,   -60,    52,   -12,   -46,    91,   -96,    47,    40,  -125,   157,
     -108,   -12,   152,  -236,   205,   -53,  -159,   326,  -346,   176,   127,
     -422,   544,  -388,   -21,   513,  -834,   762,  -233,  -588,  1333, -1558,
      923,   638, -2849,  5153, -6891,  7537, -6891,  5153, -2849,   638,   923,
    -1558,  1333,  -588,  -233,   762,  -834,   513,   -21,  -388,   544,  -422,
      127,   176,  -346,   326,  -159,   -53,   205,  -236,   152,   -12,  -108,
      157,  -125,    40,    47,   -96,    91,   -46,   -12,    52,   -60,    39,
       -4,   -24,    35,   -27,     9,     9,   -18,    17,    -8,    -2,     8,
       -8,     5,    -1,    -3,     3,    -2,     1,     1,    -1,     1,     0
  };

  // Smallest two's complement width w with -2^(w-1) <= lo and hi <= 2^(w-1)-1.
  function automatic int swidth(input longint lo, input longint hi);
    int wl, wh;
    wl = (lo < 0) ? $clog2(-lo) + 1 : 1;
    wh = (hi > 0) ? $clog2(hi + 1) + 1 : 1;
    return (wl > wh) ? wl : wh;
  endfunction

  // ceil(log2(v)); 0 for v <= 1.
  function automatic int ceil_log2(input longint v);
    return (v <= 1) ? 0 : $clog2(v);
  endfunction

  // Non-adjacent (CSD) digit masks of c: c = sum(pos[k]*2^k) - sum(neg[k]*2^k).
  function automatic logic [63:0] csd_pos(input longint c);
    longint v;
    logic [63:0] m;
    v = c;
    m = '0;
    for (int k = 0; k < 63; k++) begin
      if (v[0]) begin
        if (v[1] == 1'b0) begin
          m[k] = 1'b1;
          v = v - 1;
        end else begin
          v = v + 1;
        end
      end
      v = v >>> 1;
    end
    return m;
  endfunction

  function automatic logic [63:0] csd_neg(input longint c);
    longint v;
    logic [63:0] m;
    v = c;
    m = '0;
    for (int k = 0; k < 63; k++) begin
      if (v[0]) begin
        if (v[1] == 1'b1) begin
          m[k] = 1'b1;
          v = v + 1;
        end else begin
          v = v - 1;
        end
      end
      v = v >>> 1;
    end
    return m;
  endfunction

endpackage
