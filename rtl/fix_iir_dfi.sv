// fix_iir_dfi: Direct Form I IIR filter that computes "just right": its
// output is within one output LSB of the output of the same filter computed
// with infinite precision (last-bit accuracy, |y_out(k) - y(k)| < 2^LSB_OUT).
//
//   y(k) = sum_{i=0..NB} B[i] u(k-i) - sum_{i=1..NA} A[i] y(k-i)
//
// Structure: u(k) and NB delayed inputs (tap_delay_line), together with NA
// delayed values of the fed-back result, drive one sum of products by the
// real constants B and -A (fix_sopc). The sum is last-bit accurate to the
// extended format (MSB_OUT, LSB_EXT); that extended value y~(k) is what is fed
// back, so the final rounding error never enters the loop. A final rounding
// (final_round) then brings y~(k) to the output format (MSB_OUT, LSB_OUT).
// Internal overflows are harmless: everything is computed modulo
// 2^(MSB_OUT+1), and the true output fits.
//
// Format rules (done once, offline, when the filter is chosen):
//   MSB_OUT = ceil(log2(<<H>> + 2^(LSB_OUT-1)))      input MSB is 0
//   LSB_EXT = LSB_OUT - 1 - ceil(log2 <<H_eps>>)
// where <<H>> is the worst-case peak gain (l1 norm of the impulse response)
// of the filter and <<H_eps>> that of 1 / (1 + sum A[i] z^-i), the filter
// through which the rounding errors of the sum are fed back. The sum of
// products then chooses its own guard bits from its constants.
//
// Defaults: a 4th-order elliptic band-pass filter, passband [0.50, 0.51] of
// the Nyquist band with 1 dB ripple, stopbands [0, 0.49] and [0.52, 1] with
// 20 dB attenuation, 12 fractional output bits, 6-input look-up tables. The
// coefficients and the two peak gains (<<H>> = 1.574, <<H_eps>> = 1651.3)
// were obtained offline with a standard elliptic design routine and a long
// truncated impulse response; they are this design's default, not a
// prescribed set. The input format (0, -12) is this design's choice too.
//
// Interface and timing: one sample per clock cycle. A sample u(k), format
// (0, LSB_IN), is taken on a rising edge where in_valid is high; on that
// same edge y~(k) is registered, and y_out = round(y~(k)) with out_valid
// high is available right after it (latency one cycle). When in_valid is
// low the filter state holds and out_valid drops. rst_n is an active-low
// synchronous reset that clears the state (zero initial conditions).
module fix_iir_dfi #(
  parameter int  NB      = 4,
  parameter int  NA      = 4,
  parameter real B [NB+1] = '{0.09863033129198469, 0.006181957944363852,
                              0.19635974811591642, 0.0061819579443638546,
                              0.09863033129198469},
  parameter real A [NA]   = '{0.062319504707535375, 1.9680277201234577,
                              0.0613196541797436, 0.9681763868753986},
  parameter int  LSB_IN  = -12,
  parameter int  LSB_OUT = -12,
  parameter int  MSB_OUT = 1,
  parameter int  LSB_EXT = -24,
  parameter int  ALPHA   = 6,
  localparam int W_U     = 1 - LSB_IN,
  localparam int W_OUT   = MSB_OUT - LSB_OUT + 1,
  localparam int W_EXT   = MSB_OUT - LSB_EXT + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W_U-1:0]   u,
  output logic             out_valid,
  output logic [W_OUT-1:0] y_out,
  output logic [W_EXT-1:0] y_ext
);

  localparam int N  = NB + 1 + NA;
  localparam int WX = (W_U > W_EXT) ? W_U : W_EXT;

  typedef real real_arr_t [N];
  typedef int  int_arr_t  [N];

  // SOPC inputs in order: u(k), u(k-1) .. u(k-NB), y~(k-1) .. y~(k-NA).
  function automatic real_arr_t sopc_coeffs();
    real_arr_t c;
    for (int i = 0; i <= NB; i++) c[i] = B[i];
    for (int i = 0; i < NA; i++)  c[NB+1+i] = -A[i];
    return c;
  endfunction

  function automatic int_arr_t sopc_msbs();
    int_arr_t m;
    for (int i = 0; i < N; i++) m[i] = (i <= NB) ? 0 : MSB_OUT;
    return m;
  endfunction

  function automatic int_arr_t sopc_lsbs();
    int_arr_t l;
    for (int i = 0; i < N; i++) l[i] = (i <= NB) ? LSB_IN : LSB_EXT;
    return l;
  endfunction

  localparam real_arr_t C_SOPC   = sopc_coeffs();
  localparam int_arr_t  MSB_SOPC = sopc_msbs();
  localparam int_arr_t  LSB_SOPC = sopc_lsbs();

  logic [W_U-1:0]   u_taps [NB > 0 ? NB : 1];
  logic [W_EXT-1:0] y_taps [NA];
  logic [WX-1:0]    x      [N];
  logic [W_EXT-1:0] y_new;

  if (NB > 0) begin : g_u_delay
    tap_delay_line #(.W(W_U), .DEPTH(NB)) u_u_delay (
      .clk (clk), .rst_n (rst_n), .en (in_valid), .d (u), .taps (u_taps)
    );
  end else begin : g_no_u_delay
    assign u_taps[0] = '0;
  end

  tap_delay_line #(.W(W_EXT), .DEPTH(NA)) u_y_delay (
    .clk (clk), .rst_n (rst_n), .en (in_valid), .d (y_new), .taps (y_taps)
  );

  always_comb begin
    x[0] = WX'(u);
    for (int i = 1; i <= NB; i++) x[i] = WX'(u_taps[i-1]);
    for (int i = 0; i < NA; i++)  x[NB+1+i] = WX'(y_taps[i]);
  end

  fix_sopc #(
    .N     (N),
    .C     (C_SOPC),
    .MSB_X (MSB_SOPC),
    .LSB_X (LSB_SOPC),
    .MSB_R (MSB_OUT),
    .LSB_R (LSB_EXT),
    .ALPHA (ALPHA),
    .WX    (WX)
  ) u_sopc (
    .x (x),
    .r (y_new)
  );

  // The newest fed-back value y~(k) is the first tap of the feedback chain.
  assign y_ext = y_taps[0];

  final_round #(
    .MSB     (MSB_OUT),
    .LSB_IN  (LSB_EXT),
    .LSB_OUT (LSB_OUT)
  ) u_round (
    .y_ext (y_taps[0]),
    .y_out (y_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
