// tb_tap_delay_line: random test of the z^-1 register chain.
//
// Random samples are shifted in with a random enable; a reference history
// kept by the testbench (shifted only on enabled edges) is compared with
// every tap after every edge. A reset in mid-stream must clear all taps.
module tb_tap_delay_line;

  localparam int W = 13, DEPTH = 4;
  int checks = 0, failures = 0, shifts = 0, holds = 0;

  logic clk = 1'b0, rst_n, en;
  logic [W-1:0] d;
  logic [W-1:0] taps [DEPTH];
  logic [W-1:0] model [DEPTH];

  tap_delay_line #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .taps(taps));

  always #5 clk = ~clk;

  task automatic compare();
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (taps[i] !== model[i]) begin
        failures++;
        if (failures < 20) $display("FAIL tap %0d = %h expected %h", i, taps[i], model[i]);
      end
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
    rst_n = 1'b0; en = 1'b0; d = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      en = ($urandom_range(3) != 0);
      d  = W'($urandom);
      @(negedge clk);
      if (en) begin
        for (int i = DEPTH - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = d;
        shifts++;
      end else holds++;
      compare();
      if (it == 1500) begin
        rst_n = 1'b0;
        @(negedge clk);
        for (int i = 0; i < DEPTH; i++) model[i] = '0;
        compare();
        rst_n = 1'b1;
      end
    end
    checks++;
    if (shifts == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
