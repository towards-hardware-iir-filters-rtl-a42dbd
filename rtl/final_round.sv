// final_round: rounds the filter's extended-precision value to the output
// format, round to nearest (ties up).
//
// The input y_ext has the format (MSB, LSB_IN) and the output (MSB, LSB_OUT)
// with LSB_OUT > LSB_IN. Rounding adds half an output LSB, 2^(LSB_OUT-1),
// then drops the LSB_OUT - LSB_IN low bits, so it errs by at most half an
// output LSB. Like the rest of the datapath the addition wraps modulo
// 2^(MSB+1): the MSB of the filter is sized so that the true output never
// needs the wrap.
//
// Interface and timing: combinational, y_ext -> y_out.
module final_round #(
  parameter int MSB     = 1,
  parameter int LSB_IN  = -24,
  parameter int LSB_OUT = -12,
  localparam int W_IN   = MSB - LSB_IN + 1,
  localparam int W_OUT  = MSB - LSB_OUT + 1,
  localparam int DROP   = LSB_OUT - LSB_IN
) (
  input  logic [W_IN-1:0]  y_ext,
  output logic [W_OUT-1:0] y_out
);

  logic [W_IN-1:0] biased;

  always_comb begin
    biased = y_ext + (W_IN'(1) << (DROP - 1));
    y_out  = biased[W_IN-1:DROP];
  end

  initial assert (DROP >= 1) else $error("final_round: LSB_OUT must exceed LSB_IN");

endmodule
