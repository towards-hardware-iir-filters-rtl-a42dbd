// tb_fix_real_kcm: random test of the constant multiplier by a real.
//
// Six multipliers cover the three managed cases: general constants with a
// 13-bit input (3 tables) and a 26-bit input (5 tables), c = 0, an exact
// power of two, a power of two whose shifted input loses bits (truncation),
// and a negative power of two; one of them carries a folded-in constant.
// For each random input the testbench adds the multiplier's terms and its
// published sign correction (SIGN_CONST, the constant the enclosing sum of
// products must add for the sign-complemented tables) modulo 2^W_P and
// compares the result with c * x (double precision), expecting an
// error below D/2 internal LSBs for tables, zero for exact shifts and below
// one LSB for truncating shifts. It also checks the number of terms.
module tb_fix_real_kcm;

  localparam int LSB_P = -30;
  localparam int W_P   = 36;   // covers products up to |c x| < 32

  int checks = 0, failures = 0;

  logic [12:0] xa;   // (0, -12)
  logic [25:0] xb;   // (1, -24)

  logic [W_P-1:0] ta [3];
  logic [W_P-1:0] tb [5];
  logic [W_P-1:0] tz [1];
  logic [W_P-1:0] ts [1];
  logic [W_P-1:0] tt [1];
  logic [W_P-1:0] tn [1];

  fix_real_kcm #(.C(0.7071067811865476), .MSB_X(0), .LSB_X(-12), .LSB_P(LSB_P),
                 .W_P(W_P), .ALPHA(6), .ADD_CONST(1000), .CARRY_CONST(1'b1)) u_a (.x(xa), .terms(ta));
  fix_real_kcm #(.C(-1.9680277201234577), .MSB_X(1), .LSB_X(-24), .LSB_P(LSB_P),
                 .W_P(W_P), .ALPHA(6), .ADD_CONST(0)) u_b (.x(xb), .terms(tb));
  fix_real_kcm #(.C(0.0), .MSB_X(0), .LSB_X(-12), .LSB_P(LSB_P),
                 .W_P(W_P), .ALPHA(6), .ADD_CONST(0)) u_z (.x(xa), .terms(tz));
  fix_real_kcm #(.C(0.5), .MSB_X(1), .LSB_X(-24), .LSB_P(LSB_P),
                 .W_P(W_P), .ALPHA(6), .ADD_CONST(0)) u_s (.x(xb), .terms(ts));
  fix_real_kcm #(.C(0.0009765625), .MSB_X(1), .LSB_X(-24), .LSB_P(LSB_P),
                 .W_P(W_P), .ALPHA(6), .ADD_CONST(0)) u_t (.x(xb), .terms(tt));
  fix_real_kcm #(.C(-4.0), .MSB_X(0), .LSB_X(-12), .LSB_P(LSB_P),
                 .W_P(W_P), .ALPHA(6), .ADD_CONST(0)) u_n (.x(xa), .terms(tn));

  function automatic real p2(int e);
    real r = 1.0;
    if (e >= 0) repeat (e) r = r * 2.0; else repeat (-e) r = r / 2.0;
    return r;
  endfunction

  // Sum of terms plus the multiplier's sign correction, as a signed integer
  // (modulo 2^W_P).
  function automatic real term_sum(logic [W_P-1:0] t [], int n, longint sign_const);
    logic [W_P-1:0] s = W_P'(sign_const);
    for (int i = 0; i < n; i++) s = s + t[i];
    return real'($signed(s));
  endfunction

  task automatic check(string name, real got, real exact, real bound, bit strict_zero);
    real diff;
    diff = got - exact;
    if (diff < 0.0) diff = -diff;
    checks++;
    if (strict_zero ? (diff != 0.0) : !(diff < bound)) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%f exact=%f", name, got, exact);
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
    real va, vb;
    logic [W_P-1:0] da [], db [], dz [], ds [], dt [], dn [];
    da = new[3]; db = new[5]; dz = new[1]; ds = new[1]; dt = new[1]; dn = new[1];
    for (int it = 0; it < 20000; it++) begin
      xa = 13'($urandom);
      xb = 26'($urandom);
      if (it == 0) begin xa = 13'h1000; xb = 26'h2000000; end   // most negative
      if (it == 1) begin xa = 13'h0fff; xb = 26'h1ffffff; end   // most positive
      #1;
      va = real'($signed(xa)) * p2(-12);
      vb = real'($signed(xb)) * p2(-24);
      for (int i = 0; i < 3; i++) da[i] = ta[i];
      for (int i = 0; i < 5; i++) db[i] = tb[i];
      dz[0] = tz[0]; ds[0] = ts[0]; dt[0] = tt[0]; dn[0] = tn[0];
      check("a", term_sum(da, 3, u_a.SIGN_CONST) - 1000.0, 0.7071067811865476 * va * p2(-LSB_P), 1.5, 1'b0);
      check("b", term_sum(db, 5, u_b.SIGN_CONST), -1.9680277201234577 * vb * p2(-LSB_P), 2.5, 1'b0);
      check("zero", term_sum(dz, 1, u_z.SIGN_CONST), 0.0, 0.0, 1'b1);
      check("pow2", term_sum(ds, 1, u_s.SIGN_CONST), 0.5 * vb * p2(-LSB_P), 0.0, 1'b1);
      check("pow2-trunc", term_sum(dt, 1, u_t.SIGN_CONST), 0.0009765625 * vb * p2(-LSB_P), 1.0, 1'b0);
      check("neg-pow2", term_sum(dn, 1, u_n.SIGN_CONST), -4.0 * va * p2(-LSB_P), 0.0, 1'b1);
    end
    checks++;
    if ($size(ta) != 3 || $size(tb) != 5) begin
      failures++;
      $display("FAIL wrong number of tables");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
