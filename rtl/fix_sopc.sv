// fix_sopc: last-bit accurate sum of products by real constants,
//   r ~= sum_i C[i] * x[i],  with |r - sum_i C[i] * x[i]| < 2^LSB_R.
//
// Each input x[i] has its own format (MSB_X[i], LSB_X[i]); the result has the
// format (MSB_R, LSB_R), MSB_R being supplied by the user (for a filter it
// comes from the worst-case peak gain) and the computation wrapping modulo
// 2^(MSB_R+1) above it. How it works:
//   * each constant gets a fix_real_kcm multiplier whose error bound is known
//     before it is built: 0 for c = 0, 0 or 1 ulp for a power of two, D/2 ulp
//     for D tables (ulp = one internal LSB);
//   * these bounds are summed (E ulps) and the internal LSB is set g bits
//     below LSB_R with g the smallest integer such that E * 2^(LSB_R-g) is at
//     most 2^(LSB_R-1): the products then err by at most half an output LSB;
//   * all table outputs are added exactly by one bit heap (bitheap_sum);
//     tables enter it with their sign bit complemented instead of being
//     sign-extended, which leaves one correction constant per table;
//   * those corrections and the rounding bit 2^(LSB_R-1) are added up at
//     elaboration into a single constant, folded into a table of input 0,
//     and the final rounding to nearest is then a plain truncation of the g
//     guard bits, which errs by at most another half output LSB.
// The guard-bit rule follows the derivation of the error bound; it yields one
// guard bit more than the smallest counts reported for this method (which
// correspond to g = ceil(log2 E)), and is kept for the guaranteed bound.
//
// Interface and timing: combinational. x is an array of WX-bit words, each
// input right-aligned in its word (bits above its own width are ignored);
// WX must be at least the widest input.
module fix_sopc #(
  parameter int  N          = 4,
  parameter real C [N]      = '{0.3, -0.7, 1.2, -0.4},
  parameter int  MSB_X [N]  = '{0, 0, 2, 2},
  parameter int  LSB_X [N]  = '{-12, -12, -20, -20},
  parameter int  MSB_R      = 2,
  parameter int  LSB_R      = -20,
  parameter int  ALPHA      = 6,
  parameter int  WX         = 23,
  localparam int WR         = MSB_R - LSB_R + 1
) (
  input  logic [WX-1:0] x [N],
  output logic [WR-1:0] r
);

  import fixiir_pkg::*;

  function automatic int widest_input();
    int w;
    w = 1;
    for (int i = 0; i < N; i++)
      if (MSB_X[i] - LSB_X[i] + 1 > w) w = MSB_X[i] - LSB_X[i] + 1;
    return w;
  endfunction

  // Total error bound of all multipliers, in half internal LSBs.
  function automatic int total_err_half_ulps();
    int e;
    e = 0;
    for (int i = 0; i < N; i++)
      e += kcm_err_half_ulps(C[i], MSB_X[i], LSB_X[i], LSB_R, ALPHA);
    return e;
  endfunction

  function automatic int terms_of(int i);
    if (kcm_kind(C[i]) == KCM_TABLES)
      return num_chunks(MSB_X[i] - LSB_X[i] + 1, ALPHA);
    return 1;
  endfunction

  // Index of the first heap row fed by multiplier i.
  function automatic int term_offset(int i);
    int o;
    o = 0;
    for (int j = 0; j < i; j++) o += terms_of(j);
    return o;
  endfunction

  localparam int G       = guard_bits(total_err_half_ulps());
  localparam int LSB_INT = LSB_R - G;             // internal LSB
  localparam int W_ACC   = MSB_R - LSB_INT + 1;   // internal word
  localparam int N_TERMS = term_offset(N);

  // All constants of the heap merged: the rounding bit 2^(G-1) plus the sign
  // corrections of every sign-complemented table. Input 0's multiplier folds
  // the total into one of its tables.
  function automatic longint merged_const();
    longint s;
    s = longint'(64'(1) << (G - 1));
    for (int i = 0; i < N; i++)
      s += kcm_sign_const(C[i], MSB_X[i], LSB_X[i], LSB_INT, ALPHA, W_ACC, i == 0);
    return s;
  endfunction

  localparam longint HEAP_CONST = merged_const();

  logic [W_ACC-1:0] heap_in [N_TERMS];
  logic [W_ACC-1:0] heap_sum;

  for (genvar i = 0; i < N; i++) begin : g_mult
    localparam int WXI = MSB_X[i] - LSB_X[i] + 1;
    localparam int NT  = terms_of(i);
    localparam int OFS = term_offset(i);
    logic [W_ACC-1:0] t [NT];
    fix_real_kcm #(
      .C         (C[i]),
      .MSB_X     (MSB_X[i]),
      .LSB_X     (LSB_X[i]),
      .LSB_P     (LSB_INT),
      .W_P       (W_ACC),
      .ALPHA     (ALPHA),
      .ADD_CONST   ((i == 0) ? HEAP_CONST : 64'sd0),
      .CARRY_CONST (i == 0)
    ) u_kcm (
      .x     (x[i][WXI-1:0]),
      .terms (t)
    );
    for (genvar j = 0; j < NT; j++) begin : g_term
      assign heap_in[OFS+j] = t[j];
    end
  end

  bitheap_sum #(
    .N_TERMS (N_TERMS),
    .W       (W_ACC)
  ) u_heap (
    .terms (heap_in),
    .sum   (heap_sum)
  );

  // Rounding bit already added: truncating the guard bits rounds to nearest.
  assign r = heap_sum[W_ACC-1:G];

  initial begin
    assert (W_ACC <= MAX_ACC_W)
      else $error("fix_sopc: internal word of %0d bits exceeds %0d", W_ACC, MAX_ACC_W);
    assert (widest_input() <= WX)
      else $error("fix_sopc: an input is wider than WX = %0d", WX);
  end

endmodule
