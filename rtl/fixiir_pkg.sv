// fixiir_pkg: elaboration-time arithmetic shared by the last-bit accurate
// Direct Form I filter and its sum-of-products-by-constants (SOPC) datapath.
//
// Fixed-point formats follow the (m, l) convention: m is the position of the
// most significant bit (weight -2^m, two's complement) and l the position of
// the least significant bit, so a word has m - l + 1 bits. Every function here
// runs only while the design is elaborated: it sizes the datapath and fills the
// constant-multiplier tables from the real-valued coefficients. Nothing in this
// package becomes hardware by itself.
//
// Table widths and the sign-extension constants of the tables are worked out
// here too, so that the sum of products can merge every constant of the bit
// heap into a single one.
//
// Table entries are computed in IEEE double precision and held in a longint,
// which limits a table entry to 63 bits plus sign and the internal accumulator
// to 64 bits. This is this design's choice; the filter formats targeted here
// (8 to 24 bit inputs and outputs) stay well inside it.
package fixiir_pkg;

  // Widest internal word the table generator can fill.
  localparam int MAX_ACC_W = 64;

  // 2^e for a signed integer exponent.
  function automatic real pow2(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  // Round to nearest (ties up), the o() operator: floor(x + 1/2).
  function automatic longint round_nearest(real x);
    return longint'($floor(x + 0.5));
  endfunction

  // Smallest integer n with 2^n >= v, for v > 0 (v is an integer count).
  function automatic int ceil_log2(longint v);
    int n;
    n = 0;
    while ((64'(1) << n) < v) n++;
    return n;
  endfunction

  // Number of alpha-bit chunks of a w-bit input: D = ceil(w / alpha).
  function automatic int num_chunks(int w, int alpha);
    return (w + alpha - 1) / alpha;
  endfunction

  // Width of chunk k (k = 0 is the most significant one, which may be
  // narrower when alpha does not divide w).
  function automatic int chunk_width(int w, int alpha, int k);
    int d;
    d = num_chunks(w, alpha);
    if (k == 0) return w - (d - 1) * alpha;
    return alpha;
  endfunction

  // Position of the least significant bit of chunk k inside the input word.
  function automatic int chunk_lsb(int w, int alpha, int k);
    int d;
    d = num_chunks(w, alpha);
    return (d - 1 - k) * alpha;
  endfunction

  // Exponent k with |c| = 2^k exactly, searched in [-126, 126]; returns
  // NO_POW2 when c is zero or not a power of two.
  localparam int NO_POW2 = 32'h7fff_ffff;

  function automatic int pow2_exponent(real c);
    real a;
    a = (c < 0.0) ? -c : c;
    if (a == 0.0) return NO_POW2;
    for (int e = -126; e <= 126; e++)
      if (a == pow2(e)) return e;
    return NO_POW2;
  endfunction

  // Kind of constant multiplier built for a coefficient.
  typedef enum logic [1:0] {
    KCM_ZERO    = 2'd0,  // c = 0: nothing is added to the bit heap
    KCM_SHIFT   = 2'd1,  // |c| = 2^k: the shifted (possibly truncated) input
    KCM_TABLES  = 2'd2   // general real c: one table per alpha-bit chunk
  } kcm_kind_e;

  function automatic kcm_kind_e kcm_kind(real c);
    if (c == 0.0) return KCM_ZERO;
    if (pow2_exponent(c) != NO_POW2) return KCM_SHIFT;
    return KCM_TABLES;
  endfunction

  // Bound on the error of one constant multiplier, in half units of the
  // last place of the SOPC output (half-ulps of 2^lsb_r), as listed for the
  // three managed cases: 0 for c = 0; 0 or 1 ulp for a power of two,
  // depending on whether the shifted input keeps all its bits at lsb_r;
  // D/2 ulp (one half-ulp per table) otherwise.
  function automatic int kcm_err_half_ulps(real c, int msb_x, int lsb_x,
                                           int lsb_r, int alpha);
    case (kcm_kind(c))
      KCM_ZERO:  return 0;
      KCM_SHIFT: return (pow2_exponent(c) + lsb_x >= lsb_r) ? 0 : 2;
      default:   return num_chunks(msb_x - lsb_x + 1, alpha);
    endcase
  endfunction

  // Guard bits g for a total error of e_half half-ulps: the multipliers'
  // errors, worth e_half * 2^(lsb_r - g - 1), must stay within half an ulp of
  // the SOPC output, 2^(lsb_r - 1), so g = ceil(log2(e_half)). Zero errors
  // need no guard bit but one is kept for the rounding bit.
  function automatic int guard_bits(int e_half);
    if (e_half <= 1) return 1;
    return ceil_log2(longint'(e_half));
  endfunction

  // One perfectly rounded table entry: round(c * d * 2^(chunk_weight - lsb)),
  // the product of the constant by digit d, in units of the internal LSB.
  function automatic longint kcm_entry(real c, longint d, int weight_minus_lsb);
    return round_nearest(c * real'(d) * pow2(weight_minus_lsb));
  endfunction

  // Value of address a of a cw-bit chunk: two's complement if signed.
  function automatic longint digit_value(int a, int cw, bit sgn);
    if (sgn && a >= (1 << (cw - 1))) return longint'(a) - (longint'(1) << cw);
    return longint'(a);
  endfunction

  // A table whose entries all round to zero is not built.
  function automatic bit table_needed(real c, int cw, bit sgn, int weight);
    for (int a = 0; a < (1 << cw); a++)
      if (kcm_entry(c, digit_value(a, cw, sgn), weight) != 0) return 1'b1;
    return 1'b0;
  endfunction

  // Two's complement width that holds every entry of a table, at most w_max
  // (wider tables are kept modulo 2^w_max like the rest of the sum).
  function automatic int table_width(real c, int cw, bit sgn, int weight, int w_max);
    longint v;
    int     w;
    w = 1;
    for (int a = 0; a < (1 << cw); a++) begin
      v = kcm_entry(c, digit_value(a, cw, sgn), weight);
      while (w < w_max && (v < -(longint'(1) << (w - 1)) || v >= (longint'(1) << (w - 1))))
        w++;
    end
    return w;
  endfunction

  // Sign-extension constant of one multiplier's tables. A w-bit two's
  // complement table output t enters the bit heap as the non-negative
  // pattern t + 2^(w-1) (its sign bit complemented, no sign extension), so
  // -2^(w-1) must be added once for each such table; this returns the sum
  // of those corrections (modulo 2^64). With carry set, the most significant
  // table carries the SOPC's merged constant instead and is sign-extended in
  // full, so it contributes nothing here. Trivial constants contribute
  // nothing either.
  function automatic longint kcm_sign_const(real c, int msb_x, int lsb_x, int lsb_p,
                                            int alpha, int w_p, bit carry);
    longint s;
    int     w, d, cw, wt, weight;
    bit     sgn;
    s = 0;
    if (kcm_kind(c) != KCM_TABLES) return 0;
    w = msb_x - lsb_x + 1;
    d = num_chunks(w, alpha);
    for (int k = 0; k < d; k++) begin
      cw     = chunk_width(w, alpha, k);
      sgn    = (k == 0);
      weight = lsb_x + chunk_lsb(w, alpha, k) - lsb_p;
      if (!(carry && k == 0) && table_needed(c, cw, sgn, weight)) begin
        wt = table_width(c, cw, sgn, weight, w_p);
        s  = s - longint'(64'(1) << (wt - 1));
      end
    end
    return s;
  endfunction

endpackage
