// tb_fix_sopc: random test of the last-bit accurate sum of products.
//
// Two instances: the module's default (four general constants, inputs of two
// formats, result (2, -20)) and one mixing every managed case (c = 0, c = 1,
// c = -1/2, a power of two that truncates, one general constant). Random
// inputs over their full ranges are applied; the testbench computes
// sum c_i x_i in double precision and checks |r - sum| < 2^LSB_R, taking the
// difference modulo 2^(MSB_R+1) as the hardware wraps there. It also checks
// the guard-bit count chosen from the constants against a count worked out
// by hand: E = 3/2 + 3/2 + 2 + 2 ulps -> g = 4 for the default, and
// E = 0 + 0 + 0 + 1 + 2 ulps -> g = 3 for the second.
module tb_fix_sopc;

  int checks = 0, failures = 0;

  logic [22:0] xa [4];
  logic [22:0] ra;
  fix_sopc u_a (.x(xa), .r(ra));

  localparam real CB [5] = '{0.0, 1.0, -0.5, 0.0000152587890625, -0.8123456789};
  localparam int MB [5] = '{0, 0, 1, 1, 2};
  localparam int LB [5] = '{-12, -12, -12, -12, -13};
  logic [15:0] xb [5];
  logic [15:0] rb;
  fix_sopc #(
    .N(5), .C(CB),
    .MSB_X(MB), .LSB_X(LB),
    .MSB_R(2), .LSB_R(-13), .ALPHA(6), .WX(16)
  ) u_b (.x(xb), .r(rb));

  function automatic real p2(int e);
    real r = 1.0;
    if (e >= 0) repeat (e) r = r * 2.0; else repeat (-e) r = r / 2.0;
    return r;
  endfunction

  // Signed value of the low w bits of v times 2^lsb.
  function automatic real fx(logic [31:0] v, int w, int lsb);
    longint s;
    s = longint'(v & ((32'd1 << w) - 1));
    if (s >= (longint'(1) << (w - 1))) s -= (longint'(1) << w);
    return real'(s) * p2(lsb);
  endfunction

  task automatic check(string name, real got, real exact, int msb, int lsb);
    real diff, range;
    range = p2(msb + 1);
    diff = got - exact;
    while (diff >= range / 2.0) diff -= range;
    while (diff < -range / 2.0) diff += range;
    if (diff < 0.0) diff = -diff;
    checks++;
    if (!(diff < p2(lsb))) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%f exact=%f err=%e", name, got, exact, diff);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sa, sb;
    checks += 2;
    if (u_a.G != 4) begin failures++; $display("FAIL default g=%0d", u_a.G); end
    if (u_b.G != 3) begin failures++; $display("FAIL mixed g=%0d", u_b.G); end
    for (int it = 0; it < 20000; it++) begin
      xa[0] = 23'($urandom); xa[1] = 23'($urandom);
      xa[2] = 23'($urandom); xa[3] = 23'($urandom);
      for (int i = 0; i < 5; i++) xb[i] = 16'($urandom);
      #1;
      sa = 0.3 * fx(32'(xa[0]), 13, -12) - 0.7 * fx(32'(xa[1]), 13, -12)
         + 1.2 * fx(32'(xa[2]), 23, -20) - 0.4 * fx(32'(xa[3]), 23, -20);
      check("default", fx(32'(ra), 23, -20), sa, 2, -20);
      sb = 0.0;
      sb += CB[0] * fx(32'(xb[0]), 13, -12);
      sb += CB[1] * fx(32'(xb[1]), 13, -12);
      sb += CB[2] * fx(32'(xb[2]), 14, -12);
      sb += CB[3] * fx(32'(xb[3]), 14, -12);
      sb += CB[4] * fx(32'(xb[4]), 16, -13);
      check("mixed", fx(32'(rb), 16, -13), sb, 2, -13);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
