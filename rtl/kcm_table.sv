// kcm_table: one look-up table T_ik of a constant multiplier by a real
// constant c.
//
// The table is addressed by one chunk (digit) d of the input word and returns
// the product c * d * 2^WEIGHT, rounded to the nearest integer: WEIGHT is the
// weight of the chunk's least significant bit minus the internal LSB of the
// sum of products, so the output is an integer count of internal LSBs. Every
// entry is thus perfectly rounded (error at most half an internal LSB). The
// most significant chunk of a two's complement input is a signed digit
// (SIGNED_DIGIT = 1); the other chunks are unsigned. ADD_CONST is added to
// every entry, which is how the sum of products brings in its one merged
// constant (rounding bit and sign corrections) at no cost. When the whole
// input fits in one chunk, the table alone is a perfectly rounded multiplier.
//
// Interface and timing: purely combinational ROM, d -> t. The output is the
// entry modulo 2^W_OUT in two's complement; the multiplier sizes W_OUT to
// the table's own range (its MSB depends on the constant and on the chunk's
// weight), so tables for low chunks are narrower.
// A table of CHUNK_W = alpha = 6 address bits maps to one 6-input LUT per
// output bit on the FPGAs the filter targets. The contents are computed at
// elaboration in double precision (see fixiir_pkg).
module kcm_table #(
  parameter real    C            = 0.7071067811865476,
  parameter int     CHUNK_W      = 6,
  parameter bit     SIGNED_DIGIT = 1'b0,
  parameter int     WEIGHT       = 0,
  parameter longint ADD_CONST    = 0,
  parameter int     W_OUT        = 16
) (
  input  logic [CHUNK_W-1:0] d,
  output logic [W_OUT-1:0]   t
);

  localparam int DEPTH = 2 ** CHUNK_W;
  typedef logic [W_OUT-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t rom;
    for (int a = 0; a < DEPTH; a++)
      rom[a] = W_OUT'(fixiir_pkg::kcm_entry(C, fixiir_pkg::digit_value(a, CHUNK_W, SIGNED_DIGIT), WEIGHT) + ADD_CONST);
    return rom;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb t = ROM[d];

endmodule
