// cordic_pkg: number formats, micro-iteration schedules and constants shared by the
// constant-factor-redundant (CFR) CORDIC processing elements of the geometrical mapper.
//
// Number formats (all two's complement):
//   coordinates  COORD_W = 16 bits, COORD_F = 4 fractional bits (12 integer bits for the
//                pixel address, 4 bits of sub-pixel position for interpolation)
//   angles       ANG_W = 20 bits, ANG_F = 17 fractional bits, radians, range [-pi, pi]
//   datapath     DW = 30 bits, DF = 12 fractional bits: the coordinate format widened by
//                8 guard bits below and 6 bits of headroom above; carry-save values must
//                stay below 2^(DW-3) in magnitude (8192 pixels)
//   scaled angle U = 2^i * Z is kept in the same DW-bit word with UF = 20 fractional bits
//   scale factor SCALE_W = 10 bits unsigned, SCALE_F = 8 fractional bits
//
// Redundant values are carry-save pairs (cs_t): the value is s + c modulo 2^DW. All
// micro-iterations add or subtract such pairs with carry-free 3:2 / 4:2 compression, so no
// stage of the pipeline holds a carry chain longer than the small sign estimate.
//
// The micro-iteration schedule of each CORDIC mode, the arctangent constants and the
// implicit-scaling factors are computed here by constant functions, so they follow the
// iteration count N and the estimate width T:
//   circular   i = 0 .. N-1, plus a correcting repetition of index j for every
//              j = k*(T-1) < N/2 and for j = N/2
//   hyperbolic i = 1 .. N, index 4 and 13 repeated (the usual convergence repetitions)
//   linear     i = -Q .. N-1 (Q extra leading steps widen the quotient range to 2^(Q+1))
// The implicit scaling is a product of factors (1 +/- 2^-k), picked greedily so that the
// product times the CORDIC gain K is 1 within 2^-(N+3).
package cordic_pkg;

  typedef enum logic [1:0] {
    CIRCULAR   = 2'd0,
    LINEAR     = 2'd1,
    HYPERBOLIC = 2'd2
  } cordic_mode_e;

  // Paper: 12 integer bits, 16-bit words, (b_i + log2 b_i) ~ 16 micro-iterations.
  localparam int N_ITER  = 16;
  // Fractional bits of the sign estimate (not given in the paper).
  localparam int T_EST   = 4;
  localparam int COORD_W = 16;
  localparam int COORD_F = 4;
  localparam int ANG_W   = 20;
  localparam int ANG_F   = 17;
  localparam int DW      = 30;
  localparam int DF      = 12;
  localparam int UF      = 20;
  localparam int SCALE_W = 10;
  localparam int SCALE_F = 8;
  // Extra leading steps of the linear (division) CORDIC: quotient range |q| < 2^(Q+1).
  localparam int LIN_Q   = 1;

  localparam int MAX_SCALE = 12;   // upper bound on implicit scaling factors
  localparam int FX        = 40;   // fractional bits of the elaboration-time arithmetic
  localparam longint PI4_FX = 64'd863554413089;   // round(pi/4 * 2^40)

  typedef logic signed [DW-1:0] word_t;

  typedef struct packed {
    word_t s;
    word_t c;
  } cs_t;

  typedef enum logic [1:0] {
    SIG_ZERO = 2'd0,
    SIG_POS  = 2'd1,
    SIG_NEG  = 2'd3
  } sigma_e;

  // ---------------------------------------------------------------- carry-save arithmetic

  // A carry-save pair whose components wrapped around (s + c overflowed as plain integers)
  // cannot be shifted component-wise. For values below 2^(DW-3) a wrap shows as both
  // components having equal sign bits and a different next bit; flipping both sign bits
  // removes the wrap without changing s + c modulo 2^DW.
  function automatic cs_t cs_unwrap(cs_t a);
    cs_t r;
    r = a;
    if ((a.s[DW-1] == a.c[DW-1]) && (a.s[DW-2] != a.s[DW-1])) begin
      r.s[DW-1] = ~a.s[DW-1];
      r.c[DW-1] = ~a.c[DW-1];
    end
    return r;
  endfunction

  function automatic word_t shift_w(word_t v, int sh);
    if (sh >= 0) return v >>> sh;
    else         return v <<< (-sh);
  endfunction

  // a + op * (b * 2^-sh), where b is itself a carry-save pair: a 4:2 compression.
  // Negation is one's complement of both components plus two carry-ins, which go into the
  // free least significant bit of each carry vector.
  function automatic cs_t cs_addsub(cs_t a, cs_t b, int sh, sigma_e op);
    word_t b1, b2, s1, c1, s2, c2;
    logic neg;
    cs_t bu;
    bu  = cs_unwrap(b);
    b1  = shift_w(bu.s, sh);
    b2  = shift_w(bu.c, sh);
    neg = (op == SIG_NEG);
    if (op == SIG_ZERO) begin
      b1 = '0;
      b2 = '0;
    end else if (neg) begin
      b1 = ~b1;
      b2 = ~b2;
    end
    s1 = a.s ^ a.c ^ b1;
    c1 = word_t'({((a.s & a.c) | (a.s & b1) | (a.c & b1)), neg});
    s2 = s1 ^ c1 ^ b2;
    c2 = word_t'({((s1 & c1) | (s1 & b2) | (c1 & b2)), neg});
    return '{s: s2, c: c2};
  endfunction

  // a + op * k for a non-redundant word k: a 3:2 compression.
  function automatic cs_t cs_addsub_w(cs_t a, word_t k, sigma_e op);
    return cs_addsub(a, '{s: k, c: '0}, 0, op);
  endfunction

  function automatic cs_t cs_shl1(cs_t a);
    return '{s: a.s <<< 1, c: a.c <<< 1};
  endfunction

  function automatic cs_t cs_from_word(word_t v);
    return '{s: v, c: '0};
  endfunction

  // Sign estimate from the top bits of a carry-save pair. The truncated components are
  // added with one extra unit at weight 2^-t, which centres the truncation error so that
  // the estimate e satisfies e - v in (-2^-t, 2^-t]. Returns the estimate's sign class.
  //   frac: fractional bits of the word; t: fractional bits kept in the estimate.
  function automatic sigma_e cs_sign_estimate(cs_t a, int frac, int t);
    word_t hs, hc, e;
    cs_t au;
    au = cs_unwrap(a);
    hs = au.s >>> (frac - t);
    hc = au.c >>> (frac - t);
    e  = hs + hc + word_t'(1);
    if (e == '0)  return SIG_ZERO;
    else if (e[DW-1]) return SIG_NEG;
    else          return SIG_POS;
  endfunction

  // Selection function of the CFR-CORDIC: +1/-1 only in the first half (constant scale
  // factor), +1/0/-1 in the second half.
  function automatic sigma_e cfr_select(sigma_e est, int i, int n);
    if (est == SIG_ZERO) return (i < n / 2) ? SIG_POS : SIG_ZERO;
    return est;
  endfunction

  // ---------------------------------------------------------------- iteration schedules

  function automatic bit circ_corrects(int i, int n, int t);
    return ((i < n / 2) && (i > 0) && (i % (t - 1) == 0)) || (i == n / 2);
  endfunction

  function automatic int num_stages(cordic_mode_e mode, int n, int t, int q);
    int cnt;
    cnt = 0;
    case (mode)
      CIRCULAR: for (int i = 0; i < n; i++) cnt += circ_corrects(i, n, t) ? 2 : 1;
      HYPERBOLIC: for (int i = 1; i <= n; i++) cnt += (i == 4 || i == 13 || i == 40) ? 2 : 1;
      default: cnt = n + q;
    endcase
    return cnt;
  endfunction

  // Index i of stage k, and whether stage k is a repetition of the previous index.
  function automatic int stage_index(cordic_mode_e mode, int n, int t, int q, int k);
    int cnt;
    cnt = 0;
    case (mode)
      CIRCULAR: for (int i = 0; i < n; i++) begin
        if (cnt == k) return i;
        cnt++;
        if (circ_corrects(i, n, t)) begin
          if (cnt == k) return i;
          cnt++;
        end
      end
      HYPERBOLIC: for (int i = 1; i <= n; i++) begin
        if (cnt == k) return i;
        cnt++;
        if (i == 4 || i == 13 || i == 40) begin
          if (cnt == k) return i;
          cnt++;
        end
      end
      default: return k - q;
    endcase
    return 0;
  endfunction

  function automatic bit stage_repeat(cordic_mode_e mode, int n, int t, int q, int k);
    if (k == 0) return 1'b0;
    if (mode == LINEAR) return 1'b0;
    return stage_index(mode, n, t, q, k) == stage_index(mode, n, t, q, k - 1);
  endfunction

  // ---------------------------------------------------------------- constants

  // 2^i * atan(2^-i) in FX fractional bits, from the series
  // sum_k (-1)^k 2^(-2ik) / (2k+1); i = 0 is pi/4.
  function automatic longint atan_scaled_fx(int i);
    longint sum, term;
    if (i == 0) return PI4_FX;
    sum = 0;
    for (int k = 0; k < 40; k++) begin
      term = (longint'(1) <<< FX) >>> (2 * i * k);
      if (term == 0) break;
      if (k % 2 == 0) sum += term / (2 * k + 1);
      else            sum -= term / (2 * k + 1);
    end
    return sum;
  endfunction

  // Same, rounded to the UF-bit format of the scaled angle U.
  function automatic word_t atan_scaled_u(int i);
    longint v;
    v = atan_scaled_fx(i);
    return word_t'((v + (longint'(1) <<< (FX - UF - 1))) >>> (FX - UF));
  endfunction

  // atan(2^-i) in the UF format (radians).
  function automatic word_t atan_u(int i);
    longint v;
    v = atan_scaled_fx(i);
    return word_t'((v + (longint'(1) <<< (FX - UF - 1 + i))) >>> (FX - UF + i));
  endfunction

  // pi/2 in the angle format ANG_F.
  function automatic longint half_pi_ang();
    return ((2 * PI4_FX) + (longint'(1) <<< (FX - ANG_F - 1))) >>> (FX - ANG_F);
  endfunction

  // Square of the CORDIC gain, K^2 = prod (1 + m 2^-2i) over all stages, FX fractional bits.
  function automatic longint gain_sq_fx(cordic_mode_e mode, int n, int t, int q);
    logic [127:0] acc;
    longint step;
    acc = 128'(longint'(1) <<< FX);
    if (mode == LINEAR) return longint'(acc);
    for (int k = 0; k < num_stages(mode, n, t, q); k++) begin
      step = (longint'(1) <<< FX) >>> (2 * stage_index(mode, n, t, q, k));
      if (mode == CIRCULAR) acc = (acc * ((128'(1) << FX) + 128'(step))) >> FX;
      else                  acc = (acc * ((128'(1) << FX) - 128'(step))) >> FX;
    end
    return longint'(acc);
  endfunction

  // |P^2 K^2 - 1| in FX fractional bits.
  function automatic longint scale_err(longint p, longint k2);
    logic [127:0] sq;
    longint v, one;
    one = longint'(1) <<< FX;
    sq  = (128'(p) * 128'(p)) >> FX;
    sq  = (sq * 128'(k2)) >> FX;
    v   = longint'(sq) - one;
    return (v < 0) ? -v : v;
  endfunction

  // Greedy implicit scaling: factor j is (1 + sign * 2^-k), returned as +k or -k.
  // Returns 0 once the product is within tolerance (no further factor).
  function automatic int scale_factor(cordic_mode_e mode, int n, int t, int q, int j);
    longint k2, p, cand, best_p, best_e, e, tol;
    int best;
    k2  = gain_sq_fx(mode, n, t, q);
    p   = longint'(1) <<< FX;
    tol = longint'(1) <<< (FX - n - 3);
    if (mode == LINEAR) return 0;
    for (int f = 0; f <= j; f++) begin
      if (scale_err(p, k2) <= tol) return 0;
      best   = 0;
      best_p = p;
      best_e = scale_err(p, k2);
      for (int k = 1; k < n + 8; k++) begin
        cand = p + (p >>> k);
        e = scale_err(cand, k2);
        if (e < best_e) begin best_e = e; best_p = cand; best = k; end
        cand = p - (p >>> k);
        e = scale_err(cand, k2);
        if (e < best_e) begin best_e = e; best_p = cand; best = -k; end
      end
      if (f == j) return best;
      p = best_p;
    end
    return 0;
  endfunction

  function automatic int num_scale(cordic_mode_e mode, int n, int t, int q);
    for (int j = 0; j < MAX_SCALE; j++)
      if (scale_factor(mode, n, t, q, j) == 0) return j;
    return MAX_SCALE;
  endfunction

  // Latency in clock cycles of a CFR-CORDIC pipeline: one register per micro-iteration,
  // one per scaling factor, one for the final carry-propagate addition.
  function automatic int cordic_latency(cordic_mode_e mode, int n, int t, int q);
    return num_stages(mode, n, t, q) + num_scale(mode, n, t, q) + 1;
  endfunction

  typedef logic signed [COORD_W-1:0] coord_t;

  // Transformation selected per pixel by the geometrical mapper.
  typedef enum logic {
    MAP_AFFINE    = 1'b0,
    MAP_SPHERICAL = 1'b1
  } map_mode_e;

  function automatic word_t coord_to_word(coord_t v);
    return word_t'(v) <<< (DF - COORD_F);
  endfunction

  // Round a datapath word to the coordinate format, saturating; o flags saturation.
  function automatic coord_t round_sat(word_t v, output logic o);
    word_t r, maxv, minv;
    r    = (v + (word_t'(1) <<< (DF - COORD_F - 1))) >>> (DF - COORD_F);
    maxv = word_t'({1'b0, {(COORD_W-1){1'b1}}});
    minv = -maxv - word_t'(1);
    o = 1'b0;
    if (r > maxv) begin o = 1'b1; return maxv[COORD_W-1:0]; end
    if (r < minv) begin o = 1'b1; return minv[COORD_W-1:0]; end
    return r[COORD_W-1:0];
  endfunction

  // Latencies of the two mapping units (see affine_transformer, spherical_transformer).
  function automatic int affine_latency(int n, int t);
    return cordic_latency(CIRCULAR, n, t, 0) + 3;
  endfunction

  function automatic int spherical_latency(int n, int t);
    return cordic_latency(CIRCULAR, n, t, 0) + cordic_latency(HYPERBOLIC, n, t, 0)
         + cordic_latency(LINEAR, n, t, LIN_Q) + 2;
  endfunction

endpackage
