// tb_fix_iir_dfi: end-to-end test of the last-bit accurate Direct Form I
// filter at its default configuration (no parameter is overridden).
//
// The testbench runs its own infinite-precision model of the filter in
// double precision, y(k) = sum B[i] u(k-i) - sum A[i] y(k-i), using the ideal
// past outputs (not the hardware's), and checks on every output sample that
// |y_out(k) - y(k)| < 2^-12, the last-bit accuracy the filter promises. It also
// checks that each output appears exactly one cycle after its input and only
// then. Stimulus, in phases:
//   1. an impulse, then silence;
//   2. random full-range samples with random idle cycles (in_valid low);
//   3. the worst-case input u(k) = +-umax * sign(h(K-k)) built from the
//      model's own impulse response h, which drives the output toward its
//      worst-case peak (the top output bit and internal wrap-around are used);
//   4. a reset in the middle of a stream, then more random samples.
// Mechanisms counted (each must occur): idle cycles, outputs of magnitude at
// least 1 (integer bit used), final roundings that round up, products of a
// single feedback term outside the internal range [-2, 2) (modulo wrap of the
// sum), and a mid-stream reset.
module tb_fix_iir_dfi;

  localparam int  NB = 4, NA = 4;
  localparam real B [NB+1] = '{0.09863033129198469, 0.006181957944363852,
                               0.19635974811591642, 0.0061819579443638546,
                               0.09863033129198469};
  localparam real A [NA]   = '{0.062319504707535375, 1.9680277201234577,
                               0.0613196541797436, 0.9681763868753986};
  localparam real LSB = 1.0 / 4096.0;   // 2^-12, input and output LSB
  localparam int  K_WC = 3000;          // length of the worst-case sequence

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [12:0] u;
  logic        out_valid;
  logic [13:0] y_out;
  logic [25:0] y_ext;

  fix_iir_dfi dut (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .u (u),
    .out_valid (out_valid), .y_out (y_out), .y_ext (y_ext)
  );

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  n_idle = 0, n_big = 0, n_roundup = 0, n_wrap = 0, n_reset = 0;
  real max_err = 0.0;

  // Ideal model state.
  real u_hist [NB+1];
  real y_hist [NA+1];
  real h [K_WC];

  bit  pending = 1'b0;     // a sample was accepted on the last edge
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

  // Check the output of the previous edge, at the falling edge.
  task automatic check_output();
    real got, err, frac_ext;
    if (out_valid !== pending) begin
      failures++;
      $display("FAIL out_valid=%0b expected %0b at %0t", out_valid, pending, $time);
    end
    checks++;
    if (pending && out_valid) begin
      got = real'($signed(y_out)) * LSB;
      err = got - expected;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      checks++;
      if (!(err < LSB)) begin
        failures++;
        $display("FAIL y_out=%f ideal=%f err=%e at %0t", got, expected, err, $time);
      end
      if (got >= 1.0 || got <= -1.0) n_big++;
      frac_ext = real'(y_ext[11:0]);
      if (frac_ext >= 2048.0) n_roundup++;
      // A feedback product outside [-2, 2) wraps inside the sum.
      for (int i = 1; i <= NA; i++)
        if (A[i-1] * y_hist[i-1] >= 2.0 || A[i-1] * y_hist[i-1] < -2.0) begin
          n_wrap++;
          break;
        end
    end
  endtask

  task automatic drive(bit valid, int sample);
    @(negedge clk);
    check_output();
    in_valid = valid;
    u = 13'(sample);
    if (valid) begin
      expected = ideal_step(real'(sample) * LSB);
      pending = 1'b1;
    end else begin
      pending = 1'b0;
      n_idle++;
    end
  endtask

  function automatic int rand_sample();
    return int'($urandom_range(8191)) - 4096;
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ideal_clear();
    rst_n = 1'b0; in_valid = 1'b0; u = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. impulse response
    drive(1'b1, 4095);
    repeat (300) drive(1'b1, 0);

    // 2. random samples with idle cycles
    repeat (4000) begin
      if ($urandom_range(9) == 0) drive(1'b0, rand_sample());
      else                        drive(1'b1, rand_sample());
    end

    // 3. worst-case input from the model's impulse response
    begin
      real ys [NA+1];
      real us [NB+1];
      for (int i = 0; i <= NB; i++) us[i] = u_hist[i];
      for (int i = 0; i <= NA; i++) ys[i] = y_hist[i];
      ideal_clear();
      h[0] = ideal_step(1.0);
      for (int k = 1; k < K_WC; k++) h[k] = ideal_step(0.0);
      for (int i = 0; i <= NB; i++) u_hist[i] = us[i];
      for (int i = 0; i <= NA; i++) y_hist[i] = ys[i];
    end
    for (int sgn = 0; sgn < 2; sgn++) begin
      for (int k = 0; k < K_WC; k++) begin
        int s;
        s = (h[K_WC-1-k] >= 0.0) ? 4095 : -4095;
        drive(1'b1, sgn ? -s : s);
      end
      repeat (200) drive(1'b1, 0);
    end

    // 4. reset in mid-stream
    repeat (50) drive(1'b1, rand_sample());
    @(negedge clk);
    check_output();
    rst_n = 1'b0; in_valid = 1'b0; pending = 1'b0;
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0 || y_out !== '0) begin
      failures++;
      $display("FAIL state not cleared by reset");
    end
    rst_n = 1'b1;
    ideal_clear();
    n_reset++;
    repeat (500) drive(1'b1, rand_sample());
    drive(1'b0, 0);
    @(negedge clk);
    check_output();

    $display("max |y_out - y| = %e (bound %e)", max_err, LSB);
    $display("idle=%0d big=%0d roundup=%0d wrap=%0d reset=%0d",
             n_idle, n_big, n_roundup, n_wrap, n_reset);
    checks += 5;
    if (n_idle == 0)    begin failures++; $display("FAIL no idle cycle"); end
    if (n_big == 0)     begin failures++; $display("FAIL integer bit never used"); end
    if (n_roundup == 0) begin failures++; $display("FAIL final rounding never rounded up"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL no internal wrap-around"); end
    if (n_reset == 0)   begin failures++; $display("FAIL no mid-stream reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
