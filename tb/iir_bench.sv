// iir_bench: reusable self-checking bench for one fix_iir_dfi configuration.
//
// It instantiates the filter with the given coefficients and formats, runs
// its own double-precision model of the ideal filter alongside, and checks
// every output for last-bit accuracy, |y_out(k) - y(k)| < 2^LSB_OUT, and for
// the one-cycle latency. Stimulus: an impulse, N_RAND random full-range
// samples with random idle cycles, then the worst-case input
// +-umax * sign(h(K-k)) of both signs built from the model's impulse
// response. It reports its counts on its outputs and raises done at the end;
// it does not call $finish (the enclosing testbench does).
module iir_bench #(
  parameter string NAME    = "filter",
  parameter int    NB      = 2,
  parameter int    NA      = 2,
  parameter real   B [NB+1] = '{0.25, 0.5, 0.25},
  parameter real   A [NA]   = '{-0.5, 0.25},
  parameter int    MSB_OUT = 1,
  parameter int    LSB_EXT = -20,
  parameter int    N_RAND  = 2000,
  parameter int    K_WC    = 2000
) (
  output int checks,
  output int failures,
  output int max_err_ulp_x1000,
  output bit done
);

  localparam int  LSB_IN = -12, LSB_OUT = -12;
  localparam real LSB    = 1.0 / 4096.0;
  localparam int  W_OUT  = MSB_OUT - LSB_OUT + 1;
  localparam int  W_EXT  = MSB_OUT - LSB_EXT + 1;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             in_valid;
  logic [12:0]      u;
  logic             out_valid;
  logic [W_OUT-1:0] y_out;
  logic [W_EXT-1:0] y_ext;

  fix_iir_dfi #(
    .NB(NB), .NA(NA), .B(B), .A(A), .LSB_IN(LSB_IN), .LSB_OUT(LSB_OUT),
    .MSB_OUT(MSB_OUT), .LSB_EXT(LSB_EXT), .ALPHA(6)
  ) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u(u),
    .out_valid(out_valid), .y_out(y_out), .y_ext(y_ext)
  );

  always #5 clk = ~clk;

  real u_hist [NB+1];
  real y_hist [NA+1];
  real h [K_WC];
  real max_err = 0.0;
  bit  pending = 1'b0;
  real expected;

  function automatic real ideal_step(real un);
    real y;
    for (int i = NB; i > 0; i--) u_hist[i] = u_hist[i-1];
    u_hist[0] = un;
    y = 0.0;
    for (int i = 0; i <= NB; i++) y += B[i] * u_hist[i];
    for (int i = 1; i <= NA; i++) y -= A[i-1] * y_hist[i-1];
    for (int i = NA; i > 0; i--) y_hist[i] = y_hist[i-1];
    y_hist[0] = y;
    return y;
  endfunction

  function automatic void ideal_clear();
    for (int i = 0; i <= NB; i++) u_hist[i] = 0.0;
    for (int i = 0; i <= NA; i++) y_hist[i] = 0.0;
  endfunction

  task automatic check_output();
    real got, err;
    checks++;
    if (out_valid !== pending) begin
      failures++;
      if (failures < 10) $display("FAIL %s out_valid=%0b expected %0b", NAME, out_valid, pending);
    end
    if (pending && out_valid) begin
      got = real'($signed(y_out)) * LSB;
      err = got - expected;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      checks++;
      if (!(err < LSB)) begin
        failures++;
        if (failures < 10) $display("FAIL %s y_out=%f ideal=%f", NAME, got, expected);
      end
    end
  endtask

  task automatic drive(bit valid, int sample);
    @(negedge clk);
    check_output();
    in_valid = valid;
    u = 13'(sample);
    pending = valid;
    if (valid) expected = ideal_step(real'(sample) * LSB);
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0; max_err_ulp_x1000 = 0;
    ideal_clear();
    h[0] = ideal_step(1.0);
    for (int k = 1; k < K_WC; k++) h[k] = ideal_step(0.0);
    ideal_clear();
    rst_n = 1'b0; in_valid = 1'b0; u = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drive(1'b1, 4095);
    repeat (200) drive(1'b1, 0);
    repeat (N_RAND) drive($urandom_range(7) != 0, int'($urandom_range(8191)) - 4096);
    for (int sgn = 0; sgn < 2; sgn++)
      for (int k = 0; k < K_WC; k++)
        drive(1'b1, ((h[K_WC-1-k] >= 0.0) ^ sgn) ? 4095 : -4095);
    drive(1'b0, 0);
    @(negedge clk);
    check_output();
    max_err_ulp_x1000 = int'(max_err / LSB * 1000.0);
    $display("%s: checks=%0d failures=%0d max error %0.3f LSB", NAME, checks, failures, max_err / LSB);
    done = 1'b1;
  end

endmodule
