// tb_final_round: test of the rounding to the output format.
//
// A small instance (MSB 1, 12-bit input with 10 fractional bits, 4 output
// fractional bits) is checked exhaustively, and the filter's default instance
// (26-bit input with 24 fractional bits, 12 output fractional bits) with
// random inputs. The reference is floor(v * 2^-LSB_OUT + 1/2) computed in
// double precision and wrapped to the output width.
module tb_final_round;

  int checks = 0, failures = 0;

  logic [11:0] ya;
  logic [5:0]  za;
  final_round #(.MSB(1), .LSB_IN(-10), .LSB_OUT(-4)) u_a (.y_ext(ya), .y_out(za));

  logic [25:0] yb;
  logic [13:0] zb;
  final_round u_b (.y_ext(yb), .y_out(zb));

  task automatic check(string name, longint v_int, int drop, int w_out, longint got);
    longint expect_v;
    real v;
    v = real'(v_int) / real'(longint'(1) << drop);
    expect_v = longint'($floor(v + 0.5));
    expect_v = expect_v & ((longint'(1) << w_out) - 1);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s in=%0d got=%0d expected=%0d", name, v_int, got, expect_v);
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
    for (int a = 0; a < 4096; a++) begin
      ya = 12'(a);
      #1;
      check("small", longint'($signed(ya)), 6, 6, longint'(za));
    end
    for (int it = 0; it < 20000; it++) begin
      yb = 26'($urandom);
      #1;
      check("default", longint'($signed(yb)), 12, 14, longint'(zb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
