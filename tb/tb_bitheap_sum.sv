// tb_bitheap_sum: random test of the carry-save bit heap adder.
//
// Heaps of 1, 2, 3, 4, 9 and 35 rows (no compression level up to six
// levels) add random 32-bit operands, including all-ones corner cases; each
// result is compared with a plain sum modulo 2^32 computed by the testbench.
module tb_bitheap_sum;

  localparam int W = 32;
  int checks = 0, failures = 0;

  logic [W-1:0] in1 [1], in2 [2], in3 [3], in4 [4], in9 [9], in35 [35];
  logic [W-1:0] s1, s2, s3, s4, s9, s35;

  bitheap_sum #(.N_TERMS(1),  .W(W)) u1  (.terms(in1),  .sum(s1));
  bitheap_sum #(.N_TERMS(2),  .W(W)) u2  (.terms(in2),  .sum(s2));
  bitheap_sum #(.N_TERMS(3),  .W(W)) u3  (.terms(in3),  .sum(s3));
  bitheap_sum #(.N_TERMS(4),  .W(W)) u4  (.terms(in4),  .sum(s4));
  bitheap_sum #(.N_TERMS(9),  .W(W)) u9  (.terms(in9),  .sum(s9));
  bitheap_sum #(.N_TERMS(35), .W(W)) u35 (.terms(in35), .sum(s35));

  logic [W-1:0] pool [35];

  task automatic check(string name, logic [W-1:0] got, int n);
    logic [W-1:0] ref_sum = '0;
    for (int i = 0; i < n; i++) ref_sum = ref_sum + pool[i];
    checks++;
    if (got !== ref_sum) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h expected=%h", name, got, ref_sum);
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
    for (int it = 0; it < 5000; it++) begin
      for (int i = 0; i < 35; i++) begin
        case (it % 4)
          0:       pool[i] = '1;
          1:       pool[i] = W'($urandom_range(255));
          default: pool[i] = $urandom;
        endcase
      end
      for (int i = 0; i < 1;  i++) in1[i]  = pool[i];
      for (int i = 0; i < 2;  i++) in2[i]  = pool[i];
      for (int i = 0; i < 3;  i++) in3[i]  = pool[i];
      for (int i = 0; i < 4;  i++) in4[i]  = pool[i];
      for (int i = 0; i < 9;  i++) in9[i]  = pool[i];
      for (int i = 0; i < 35; i++) in35[i] = pool[i];
      #1;
      check("n1", s1, 1);
      check("n2", s2, 2);
      check("n3", s3, 3);
      check("n4", s4, 4);
      check("n9", s9, 9);
      check("n35", s35, 35);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
