// bitheap_sum: exact multi-operand addition of all the table outputs of a
// sum of products (the "bit heap" summation).
//
// All N_TERMS operands share one bit alignment and are added modulo 2^W, so
// the sum is exact whenever the true result fits in W bits, and wraps like
// two's complement arithmetic otherwise. The heap is reduced by levels of
// 3:2 carry-save compressors (full adders working on every bit column in
// parallel): each level turns every group of three rows into two, until two
// rows remain, which one carry-propagate adder adds. The number of levels is
// fixed at elaboration from N_TERMS.
//
// Reducing with a plain Wallace-style schedule of full adders is this design's
// choice; the bit heap of the filter is only specified as an exact summation
// of bits of various weights, which this tree provides (constant bits are
// left for synthesis to simplify).
//
// Interface and timing: combinational, terms -> sum.
module bitheap_sum #(
  parameter int N_TERMS = 9,
  parameter int W       = 32
) (
  input  logic [W-1:0] terms [N_TERMS],
  output logic [W-1:0] sum
);

  // Rows left after l levels of 3:2 compression.
  function automatic int rows_at(int l);
    int n;
    n = N_TERMS;
    for (int i = 0; i < l; i++)
      if (n > 2) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  function automatic int num_levels();
    int l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  // Level l reads the rows_at(l) rows left by level l-1 (or the terms) and
  // leaves rows_at(l+1) rows; unused rows are zero.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int NIN  = rows_at(l);
    localparam int NGRP = NIN / 3;
    localparam int NREM = NIN % 3;
    logic [W-1:0] rin  [N_TERMS];
    logic [W-1:0] rout [N_TERMS];
    if (l == 0) begin : g_first
      assign rin = terms;
    end else begin : g_next
      assign rin = g_level[l-1].rout;
    end
    for (genvar gi = 0; gi < NGRP; gi++) begin : g_csa
      logic [W-1:0] a, b, c;
      logic [W-2:0] maj;
      assign a   = rin[3*gi];
      assign b   = rin[3*gi+1];
      assign c   = rin[3*gi+2];
      assign maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
      // Full adder per column: the sum bit stays, the carry moves one column
      // up and the carry out of the top column is dropped (modulo 2^W).
      assign rout[2*gi]   = a ^ b ^ c;
      assign rout[2*gi+1] = {maj, 1'b0};
    end
    for (genvar ri = 0; ri < NREM; ri++) begin : g_pass
      assign rout[2*NGRP+ri] = rin[3*NGRP+ri];
    end
    for (genvar zi = 2*NGRP+NREM; zi < N_TERMS; zi++) begin : g_zero
      assign rout[zi] = '0;
    end
  end

  logic [W-1:0] last [N_TERMS];
  if (LEVELS == 0) begin : g_nolevel
    assign last = terms;
  end else begin : g_lastlevel
    assign last = g_level[LEVELS-1].rout;
  end

  if (rows_at(LEVELS) == 1) begin : g_one
    assign sum = last[0];
  end else begin : g_final
    assign sum = last[0] + last[1];
  end

endmodule
