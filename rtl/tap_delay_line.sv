// tap_delay_line: the z^-1 register chain of a Direct Form I filter.
//
// On every clock edge where en is high, the chain shifts by one sample:
// taps[0] takes d and taps[i] takes taps[i-1]. Between enabled edges the
// taps hold, so while sample x(k) is on d, taps[i] holds x(k-1-i).
// The filter uses one chain on its input u and one on its fed-back value.
//
// Interface and timing: W-bit samples, DEPTH taps, one sample per enabled
// cycle. rst_n is an active-low synchronous reset that clears every tap,
// which gives the filter a zero initial state; reset behaviour is this
// design's choice.
module tap_delay_line #(
  parameter int W     = 13,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) taps[i] <= '0;
    end else if (en) begin
      taps[0] <= d;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
