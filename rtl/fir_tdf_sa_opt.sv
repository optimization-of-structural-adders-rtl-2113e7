// Fixed-coefficient FIR filter in transposed direct form (TDF) with
// bisected structural adders.
//
// y[n] = sum_{i=0}^{N-1} COEF[i] * x[n-i]
//
// Structure.  Every tap i has a coefficient multiplier q_i = x * c_i
// (csd_const_mult).  The multiplier outputs are accumulated along a tapped
// delay line: the partial sum p_i enters tap i, the structural adder a_i
// adds q_i, and a register passes the sum on to tap i-1.  Tap N-1 has no
// adder (its product goes straight into the first register); tap 0's sum
// is the output.  In a plain TDF filter the partial sums grow to the full
// output width after about half the taps, while the products near the
// output end stay short, so the tail adders are long and mostly add sign
// extension.
//
// Bisection.  From a chosen tap FIRST_BISECT on, the partial sum is carried
// as two parts, u * 2^h + l:
//   * sa_bisect_tap at tap FIRST_BISECT splits the full partial sum at
//     bit h; the upper part is only delayed, the lower h bits (zero
//     extended) are added to q;
//   * sa_reduced_tap adds q to the short lower part only;
//   * sa_merge_bisect_tap, at later split points, splits the lower part
//     again at a new h and, in parallel, folds its upper bits into the
//     upper part;
//   * sa_final_merge at tap 0 adds q_0 to the lower part and then the
//     upper part, producing y.
// The lower-part adders are a few bits wider than h instead of the full
// output width; the price is the extra register bits of the lower part and
// one short merge adder per split.
//
// Plan.  All widths and split points are computed while the design is
// elaborated, from the coefficients and the input width:
//   * every width is the minimum two's complement width of the signal's
//     value range (range estimation);
//   * a tap can be the first split only if it and every tap after it have
//     n(p_i) - n(q_i) >= MIN_DELTA;
//   * the split position at tap i is max over taps i..i-LOOKAHEAD of
//     max(ceil(log2(v+)), ceil(log2(-v-))), [v-, v+] being the product
//     range; it is additionally held non-increasing towards the output;
//   * the first split and the chain of merge/split taps are chosen by an
//     exhaustive O(N^2) dynamic program that maximises the full adder
//     saving of the segments, each segment scored as
//        sum over its non-final taps of (adder bits saved) - RHO*(extra
//        register bits)  -  (bits of the merge adder)
//     where RHO is the full adder to flip-flop area ratio.
//     If no plan saves anything, the filter is a plain TDF filter.
//
// Interface.  x is a WX-bit two's complement sample taken every clock; y is
// the WY-bit two's complement output, combinational from x (the textbook
// TDF form has no output register).  rst_n is a synchronous active-low
// reset that clears every delay register, so the first outputs after reset
// are exact for an input that was zero before it.
//
// The structure, the split rules, the look-ahead of 5, the threshold of 6
// bits and RHO = 1 follow the method; the reset, the CSD multipliers
// without shared subexpressions, the non-increasing split positions, the
// cost of taps with a zero coefficient (no adder saving, register overhead
// counted) and the exact width rule are this design's choices.
module fir_tdf_sa_opt #(
  parameter int N          = 121,
  parameter int WX         = 8,
  parameter int WY         = 25,
  parameter int RHO        = 1,
  parameter int LOOKAHEAD  = 5,
  parameter int MIN_DELTA  = 6,
  parameter int COEF [N]   = fir_sa_pkg::FILTER_B_COEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [WX-1:0] x,
  output logic signed [WY-1:0] y
);

  import fir_sa_pkg::swidth;
  import fir_sa_pkg::ceil_log2;

  typedef logic [N-1:0][7:0]         wvec_t;   // one width per tap
  typedef logic [N-1:0][63:0]        rvec_t;   // one range bound per tap

  localparam longint XMIN = -(longint'(1) << (WX - 1));
  localparam longint XMAX = (longint'(1) << (WX - 1)) - 1;

  // ------------------------------------------------ product ranges [v-, v+]
  function automatic rvec_t make_q_lo();
    rvec_t r;
    for (int i = 0; i < N; i++)
      r[i] = (COEF[i] >= 0) ? longint'(COEF[i]) * XMIN : longint'(COEF[i]) * XMAX;
    return r;
  endfunction

  function automatic rvec_t make_q_hi();
    rvec_t r;
    for (int i = 0; i < N; i++)
      r[i] = (COEF[i] >= 0) ? longint'(COEF[i]) * XMAX : longint'(COEF[i]) * XMIN;
    return r;
  endfunction

  localparam rvec_t Q_LO = make_q_lo();
  localparam rvec_t Q_HI = make_q_hi();

  // width n(q_i) of every product
  function automatic wvec_t make_nq();
    wvec_t r;
    for (int i = 0; i < N; i++)
      r[i] = 8'(swidth(signed'(Q_LO[i]), signed'(Q_HI[i])));
    return r;
  endfunction

  // width of the sum leaving tap i (taps N-1 .. i accumulated); the
  // partial sum p_i entering tap i has the width of the sum leaving i+1
  function automatic wvec_t make_ws();
    wvec_t  r;
    longint lo, hi;
    lo = 0;
    hi = 0;
    for (int i = N - 1; i >= 0; i--) begin
      lo += signed'(Q_LO[i]);
      hi += signed'(Q_HI[i]);
      r[i] = 8'(swidth(lo, hi));
    end
    return r;
  endfunction

  localparam wvec_t NQ = make_nq();
  localparam wvec_t WS = make_ws();

  function automatic int np(input int i);
    return int'(WS[i + 1]);
  endfunction

  // split position by look-ahead over the product ranges
  function automatic wvec_t make_h_look();
    wvec_t r;
    for (int i = 0; i < N; i++) begin
      int h;
      h = 1;
      for (int k = i; k >= 0 && k >= i - LOOKAHEAD; k--) begin
        if (ceil_log2(signed'(Q_HI[k])) > h)  h = ceil_log2(signed'(Q_HI[k]));
        if (ceil_log2(-signed'(Q_LO[k])) > h) h = ceil_log2(-signed'(Q_LO[k]));
      end
      r[i] = 8'(h);
    end
    return r;
  endfunction

  localparam wvec_t H_LOOK = make_h_look();

  // highest tap that may hold the first split: it and every tap after it
  // need n(p_i) - n(q_i) >= MIN_DELTA (-1: none)
  function automatic int first_limit();
    int lim;
    lim = -1;
    for (int i = 0; i <= N - 2; i++) begin
      if (np(i) - int'(NQ[i]) < MIN_DELTA) break;
      lim = i;
    end
    return (lim >= 1) ? lim : -1;
  endfunction

  localparam int I0 = first_limit();

  // split position used at tap t, held non-increasing towards the output
  function automatic wvec_t make_h_at();
    wvec_t r;
    int    h;
    r = '0;
    h = 255;
    for (int t = I0; t >= 0; t--) begin
      if (int'(H_LOOK[t]) < h) h = int'(H_LOOK[t]);
      r[t] = 8'(h);
    end
    return r;
  endfunction

  localparam wvec_t H_AT = make_h_at();

  // saving terms of one tap inside a segment: adder bits saved against the
  // plain adder (none where the coefficient is zero: there is no adder),
  // minus RHO times the extra register bits
  function automatic longint tap_gain(input int k, input int na, input int h);
    return ((COEF[k] != 0) ? longint'(int'(WS[k]) - na) : longint'(0)) - longint'(RHO * (na - h));
  endfunction

  // plan[t] = split position at every split tap (first split and
  // merge/split taps), 0 elsewhere
  function automatic wvec_t make_plan();
    longint f   [N];
    int     nxt [N];
    wvec_t  plan;
    longint best_all;
    int     start;
    plan = '0;
    for (int k = 0; k < N; k++) begin
      f[k]   = 0;
      nxt[k] = 0;
    end
    for (int t = 1; t <= I0; t++) begin
      longint lo, hi, acc, best, cand;
      int     h, na;
      h    = int'(H_AT[t]);
      lo   = signed'(Q_LO[t]);
      hi   = (longint'(1) << h) - 1 + signed'(Q_HI[t]);
      acc  = tap_gain(t, swidth(lo, hi), h);
      best = -(longint'(1) << 40);
      for (int e = t - 1; e >= 0; e--) begin
        lo  += signed'(Q_LO[e]);
        hi  += signed'(Q_HI[e]);
        na   = swidth(lo, hi);
        cand = acc - longint'(na - h) + ((e == 0) ? longint'(0) : f[e]);
        if (cand > best) begin
          best   = cand;
          nxt[t] = e;
        end
        acc += tap_gain(e, na, h);
      end
      f[t] = best;
    end
    best_all = 0;
    start    = -1;
    for (int t = 1; t <= I0; t++) begin
      if (f[t] > best_all) begin
        best_all = f[t];
        start    = t;
      end
    end
    while (start > 0) begin
      plan[start] = H_AT[start];
      start       = nxt[start];
    end
    return plan;
  endfunction

  localparam wvec_t PLAN = make_plan();

  function automatic int first_split();
    int t;
    t = -1;
    for (int k = 0; k < N; k++)
      if (PLAN[k] != 0) t = k;
    return t;
  endfunction

  // tap holding the first split; -1 for a plain TDF filter
  localparam int FIRST_BISECT = first_split();

  function automatic int count_splits();
    int c;
    c = 0;
    for (int k = 0; k < N; k++)
      if (PLAN[k] != 0) c++;
    return c;
  endfunction

  // number of merge/split taps (splits after the first one)
  localparam int NUM_MERGE_BISECT = (FIRST_BISECT < 0) ? 0 : count_splits() - 1;

  // Per tap at or after the first split: split position of its segment,
  // width of the lower part and of the upper part leaving the tap.
  function automatic wvec_t make_seg_h();
    wvec_t r;
    int    h;
    r = '0;
    h = 0;
    for (int i = FIRST_BISECT; i >= 0; i--) begin
      if (PLAN[i] != 0) h = int'(PLAN[i]);
      r[i] = 8'(h);
    end
    return r;
  endfunction

  function automatic wvec_t make_wl_out();
    wvec_t  r;
    longint lo, hi;
    r  = '0;
    lo = 0;
    hi = 0;
    for (int i = FIRST_BISECT; i >= 0; i--) begin
      if (PLAN[i] != 0) begin
        lo = 0;
        hi = (longint'(1) << PLAN[i]) - 1;
      end
      lo += signed'(Q_LO[i]);
      hi += signed'(Q_HI[i]);
      r[i] = 8'(swidth(lo, hi));
    end
    return r;
  endfunction

  function automatic wvec_t make_wu_out();
    wvec_t r;
    int    w;
    r = '0;
    w = 0;
    for (int i = FIRST_BISECT; i >= 0; i--) begin
      if (PLAN[i] != 0) w = np(i) - int'(PLAN[i]);
      r[i] = 8'(w);
    end
    return r;
  endfunction

  localparam wvec_t SEG_H  = make_seg_h();
  localparam wvec_t WL_OUT = make_wl_out();
  localparam wvec_t WU_OUT = make_wu_out();

  localparam int WB = WY;   // width of the internal signal buses

  if (N < 2) begin : g_check_n
    $error("fir_tdf_sa_opt: N must be at least 2");
  end
  if (WY < int'(WS[0])) begin : g_check_wy
    $error("fir_tdf_sa_opt: WY too small for the output range");
  end

  logic signed [WB-1:0] p_bus [N];   // p_i, plain partial sum into tap i
  logic signed [WB-1:0] u_bus [N];   // upper part into tap i
  logic signed [WB-1:0] l_bus [N];   // lower part into tap i

  assign p_bus[N-1] = '0;
  assign u_bus[N-1] = '0;
  assign l_bus[N-1] = '0;

  for (genvar i = N - 1; i >= 0; i--) begin : g_tap
    localparam int WQ = int'(NQ[i]);
    logic signed [WQ-1:0] q;

    csd_const_mult #(.WX(WX), .C(COEF[i]), .WQ(WQ)) u_mult (.x(x), .q(q));

    if (i == N - 1) begin : g_first_reg
      // no adder: the product enters the first delay register
      logic signed [WQ-1:0] r;
      always_ff @(posedge clk) begin
        if (!rst_n) r <= '0;
        else        r <= q;
      end
      assign p_bus[i-1] = WB'(r);
      assign u_bus[i-1] = '0;
      assign l_bus[i-1] = '0;
    end else if (i > FIRST_BISECT && i > 0) begin : g_plain
      localparam int WP = np(i);
      localparam int WSI = int'(WS[i]);
      logic signed [WSI-1:0] s;
      sa_tap #(.WP(WP), .WQ(WQ), .WS(WSI), .REG(1'b1)) u_sa (
        .clk, .rst_n, .p(p_bus[i][WP-1:0]), .q, .p_next(s));
      assign p_bus[i-1] = WB'(s);
      assign u_bus[i-1] = '0;
      assign l_bus[i-1] = '0;
    end else if (i == 0 && FIRST_BISECT < 0) begin : g_plain_out
      localparam int WP = np(0);
      logic signed [WY-1:0] s;
      sa_tap #(.WP(WP), .WQ(WQ), .WS(WY), .REG(1'b0)) u_sa (
        .clk, .rst_n, .p(p_bus[0][WP-1:0]), .q, .p_next(s));
      assign y = s;
    end else if (i == FIRST_BISECT) begin : g_bisect
      localparam int WP = np(i);
      localparam int H  = int'(SEG_H[i]);
      localparam int WL = int'(WL_OUT[i]);
      logic signed [WP-H-1:0] u_n;
      logic signed [WL-1:0]   l_n;
      sa_bisect_tap #(.WP(WP), .WQ(WQ), .H(H), .WL(WL)) u_sa (
        .clk, .rst_n, .p(p_bus[i][WP-1:0]), .q, .u_next(u_n), .l_next(l_n));
      assign p_bus[i-1] = '0;
      assign u_bus[i-1] = WB'(u_n);
      assign l_bus[i-1] = WB'(l_n);
    end else if (i == 0) begin : g_final
      localparam int WU  = int'(WU_OUT[1]);
      localparam int WL  = int'(WL_OUT[1]);
      localparam int H   = int'(SEG_H[1]);
      localparam int WLF = int'(WL_OUT[0]);
      sa_final_merge #(.WU(WU), .WL(WL), .H(H), .WQ(WQ), .WLF(WLF), .WY(WY)) u_sa (
        .u(u_bus[0][WU-1:0]), .l(l_bus[0][WL-1:0]), .q, .y);
    end else if (PLAN[i] != 0) begin : g_merge_bisect
      localparam int WUI = int'(WU_OUT[i + 1]);
      localparam int WLI = int'(WL_OUT[i + 1]);
      localparam int HP  = int'(SEG_H[i + 1]);
      localparam int H   = int'(SEG_H[i]);
      localparam int WUO = int'(WU_OUT[i]);
      localparam int WLO = int'(WL_OUT[i]);
      logic signed [WUO-1:0] u_n;
      logic signed [WLO-1:0] l_n;
      sa_merge_bisect_tap #(.WUI(WUI), .WLI(WLI), .HP(HP), .H(H), .WQ(WQ),
                            .WUO(WUO), .WLO(WLO)) u_sa (
        .clk, .rst_n, .u(u_bus[i][WUI-1:0]), .l(l_bus[i][WLI-1:0]), .q,
        .u_next(u_n), .l_next(l_n));
      assign p_bus[i-1] = '0;
      assign u_bus[i-1] = WB'(u_n);
      assign l_bus[i-1] = WB'(l_n);
    end else begin : g_reduced
      localparam int WU  = int'(WU_OUT[i]);
      localparam int WLI = int'(WL_OUT[i + 1]);
      localparam int WLO = int'(WL_OUT[i]);
      logic signed [WU-1:0]  u_n;
      logic signed [WLO-1:0] l_n;
      sa_reduced_tap #(.WU(WU), .WLI(WLI), .WQ(WQ), .WLO(WLO)) u_sa (
        .clk, .rst_n, .u(u_bus[i][WU-1:0]), .l(l_bus[i][WLI-1:0]), .q,
        .u_next(u_n), .l_next(l_n));
      assign p_bus[i-1] = '0;
      assign u_bus[i-1] = WB'(u_n);
      assign l_bus[i-1] = WB'(l_n);
    end
  end

endmodule
