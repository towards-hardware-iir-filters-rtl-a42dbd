// fix_real_kcm: multiplication of a fixed-point input by a real constant,
// delivered as a set of aligned terms for a bit heap (the FixRealKCM method).
//
// The input x, in format (MSB_X, LSB_X), is read as a radix-2^ALPHA number:
// it is cut into D = ceil(W_X / ALPHA) chunks, the most significant one a
// signed digit. Each chunk addresses a kcm_table that holds c times the digit,
// perfectly rounded to the internal LSB 2^LSB_P. The tables are not added
// here: their outputs leave as separate terms so that the whole sum of
// products is done by one bit heap. Each table errs by at most half an
// internal LSB, so the multiplier errs by less than D/2 of them.
//
// Trivial constants get trivial hardware, as the managed cases require:
//   c = 0       one term holding only the folded constant (zero unless
//               CARRY_CONST), nothing from x;
//   |c| = 2^k   one term, the input shifted (truncated when bits fall below
//               2^LSB_P, an error below one internal LSB) and negated if c < 0;
//   otherwise   D tables. A table whose every entry rounds to zero is not
//               built (the rounding error analysis still covers it).
//
// Signs: a table's w-bit two's complement output t is not sign-extended.
// Its sign bit is complemented instead, which gives the non-negative pattern
// t + 2^(w-1) of the same w bits, and the correction -2^(w-1) is left to the
// enclosing sum of products, which adds the corrections of all tables as one
// constant (SIGN_CONST is this multiplier's share). Each table is sized to
// its own range, so its row in the bit heap is only as wide as its entries
// need. With CARRY_CONST set, the most significant table (or the single term
// of a trivial constant) has ADD_CONST, in internal LSBs, folded into its
// contents and is sign-extended in full; this is where the sum of products
// puts its rounding bit and the merged sign corrections, at no cost.
//
// The upper bits of a sign-complemented row are constant zeros by design:
// that is the saving of the scheme, and synthesis removes them.
//
// Interface and timing: combinational. Terms are W_P bits wide, two's
// complement, weight of bit 0 equal to 2^LSB_P, and are to be added modulo
// 2^W_P together with SIGN_CONST: sum(terms) + SIGN_CONST = c * x (+ the
// folded constant), within the error bound.
//
// The chunking, the per-case error bounds, the neglected tables and the
// complemented-sign-bit scheme follow the published FixRealKCM method; how
// the signed top digit is tabulated and which table carries the constant are
// this design's choices.
module fix_real_kcm #(
  parameter real    C         = 0.7071067811865476,
  parameter int     MSB_X     = 0,
  parameter int     LSB_X     = -12,
  parameter int     LSB_P     = -20,
  parameter int     W_P       = 24,
  parameter int     ALPHA     = 6,
  parameter longint ADD_CONST = 0,
  parameter bit     CARRY_CONST = 1'b0,
  localparam int    W_X       = MSB_X - LSB_X + 1,
  localparam int    D         = fixiir_pkg::num_chunks(W_X, ALPHA),
  localparam int    NUM_TERMS = (fixiir_pkg::kcm_kind(C) == fixiir_pkg::KCM_TABLES) ? D : 1
) (
  input  logic [W_X-1:0] x,
  output logic [W_P-1:0] terms [NUM_TERMS]
);

  import fixiir_pkg::*;

  localparam kcm_kind_e KIND = kcm_kind(C);

  // Correction owed by the sign-complemented table outputs (see below); the
  // enclosing sum of products adds it, merged with its other constants.
  localparam longint SIGN_CONST =
    kcm_sign_const(C, MSB_X, LSB_X, LSB_P, ALPHA, W_P, CARRY_CONST);
  localparam longint OWN_CONST = CARRY_CONST ? ADD_CONST : 64'sd0;

  // Weight of chunk k's least significant bit, in internal LSBs (log2).
  function automatic int chunk_weight(int k);
    return LSB_X + chunk_lsb(W_X, ALPHA, k) - LSB_P;
  endfunction

  function automatic int shift_amount();
    return pow2_exponent(C) + LSB_X - LSB_P;
  endfunction

  if (KIND == KCM_ZERO) begin : g_zero
    always_comb terms[0] = W_P'(OWN_CONST);

  end else if (KIND == KCM_SHIFT) begin : g_shift
    localparam int S    = shift_amount();
    localparam int SPOS = (S > 0) ? S : 0;
    localparam int WW   = W_X + W_P + SPOS;
    logic signed [WW-1:0] wide;
    always_comb begin
      wide = WW'(signed'(x));
      if (S >= 0) wide = wide <<< SPOS;
      else        wide = wide >>> (-S);
      if (C < 0.0) wide = -wide;
      terms[0] = W_P'(wide) + W_P'(OWN_CONST);
    end

  end else begin : g_tables
    for (genvar k = 0; k < D; k++) begin : g_chunk
      localparam int CW  = chunk_width(W_X, ALPHA, k);
      localparam int CL  = chunk_lsb(W_X, ALPHA, k);
      localparam bit SGN = (k == 0);
      localparam int WGT = chunk_weight(k);
      if (CARRY_CONST && k == 0) begin : g_carry
        // Carries the merged constant: full width, plain sign extension.
        kcm_table #(
          .C (C), .CHUNK_W (CW), .SIGNED_DIGIT (SGN), .WEIGHT (WGT),
          .ADD_CONST (ADD_CONST), .W_OUT (W_P)
        ) u_table (
          .d (x[CL +: CW]),
          .t (terms[k])
        );
      end else if (table_needed(C, CW, SGN, WGT)) begin : g_table
        localparam int WT = table_width(C, CW, SGN, WGT, W_P);
        localparam logic [WT-1:0] SIGN_BIT = WT'(1) << (WT - 1);
        logic [WT-1:0] t, t_pos;
        kcm_table #(
          .C (C), .CHUNK_W (CW), .SIGNED_DIGIT (SGN), .WEIGHT (WGT),
          .ADD_CONST (64'sd0), .W_OUT (WT)
        ) u_table (
          .d (x[CL +: CW]),
          .t (t)
        );
        // Sign bit complemented, no sign extension: t + 2^(WT-1) >= 0.
        assign t_pos    = t ^ SIGN_BIT;
        assign terms[k] = W_P'(t_pos);
      end else begin : g_neglected
        always_comb terms[k] = '0;
      end
    end
  end

endmodule
