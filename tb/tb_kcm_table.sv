// tb_kcm_table: exhaustive test of the perfectly rounded constant tables.
//
// Four tables (signed and unsigned digits, positive and negative constants,
// with and without a folded-in constant, narrow chunk) are read at every
// address. For each entry the testbench works out c * digit * 2^WEIGHT in
// double precision and checks that the entry, less the folded constant, is
// within half a unit of it (perfect rounding). It also checks that the
// entry is an integer nearest to the product from both sides.
module tb_kcm_table;

  int checks = 0, failures = 0;

  logic [5:0]  d0, d1, d2;
  logic [3:0]  d3;
  logic [19:0] t0, t1, t2, t3;

  kcm_table #(.C(0.7071067811865476), .CHUNK_W(6), .SIGNED_DIGIT(1'b1),
              .WEIGHT(6), .ADD_CONST(0), .W_OUT(20)) u_t0 (.d(d0), .t(t0));
  kcm_table #(.C(-1.9680277201234577), .CHUNK_W(6), .SIGNED_DIGIT(1'b0),
              .WEIGHT(-1), .ADD_CONST(0), .W_OUT(20)) u_t1 (.d(d1), .t(t1));
  kcm_table #(.C(0.09863033129198469), .CHUNK_W(6), .SIGNED_DIGIT(1'b1),
              .WEIGHT(12), .ADD_CONST(32), .W_OUT(20)) u_t2 (.d(d2), .t(t2));
  kcm_table #(.C(-0.333333333333333), .CHUNK_W(4), .SIGNED_DIGIT(1'b1),
              .WEIGHT(3), .ADD_CONST(0), .W_OUT(20)) u_t3 (.d(d3), .t(t3));

  function automatic real p2(int e);
    real r = 1.0;
    if (e >= 0) repeat (e) r = r * 2.0; else repeat (-e) r = r / 2.0;
    return r;
  endfunction

  task automatic check(string name, logic [19:0] t, real c, int dv, int w, int add);
    real exact, got, diff;
    exact = c * real'(dv) * p2(w);
    got   = real'($signed(t) - add);
    diff  = got - exact;
    checks++;
    if (diff > 0.5 || diff < -0.5) begin
      failures++;
      if (failures < 20) $display("FAIL %s d=%0d entry=%f exact=%f", name, dv, got, exact);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      d0 = 6'(a); d1 = 6'(a); d2 = 6'(a); d3 = 4'(a);
      #1;
      check("t0", t0, 0.7071067811865476, (a >= 32) ? a - 64 : a, 6, 0);
      check("t1", t1, -1.9680277201234577, a, -1, 0);
      check("t2", t2, 0.09863033129198469, (a >= 32) ? a - 64 : a, 12, 32);
      if (a < 16) check("t3", t3, -0.333333333333333, (a >= 8) ? a - 16 : a, 3, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
