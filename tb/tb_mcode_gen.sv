// Testbench for mcode_gen: the 4-bit generator of the original SFQ design and a 7-bit one.
// Checks the reset/power-up state, that each step is a left shift with the
// new bit equal to XNOR of the two tap stages of x^4+x^3+1 (x^7+x^6+1), and
// that the period is 2**W - 1 with every value but all-ones visited once.
module tb_mcode_gen;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [3:0] r4;
  logic [6:0] r7;

  always #5 clk = ~clk;

  mcode_gen #(.WIDTH(4)) dut4 (.clk, .rst_n, .rnd(r4));
  mcode_gen #(.WIDTH(7), .SEED(7'd5)) dut7 (.clk, .rst_n, .rnd(r7));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen4 [16];
    bit seen7 [128];
    logic [3:0] prev4;
    logic [6:0] prev7;
    int n4, n7;
    logic [6:0] start7;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(r4 == 4'd0, "4-bit generator starts at 0");
    check(r7 == 7'd5, "7-bit generator starts at its seed");
    // 4-bit: 15 steps must visit 15 distinct values and come back.
    n4 = 0;
    for (int i = 0; i < 15; i++) begin
      prev4 = r4;
      if (seen4[r4]) n4++;
      seen4[r4] = 1;
      @(negedge clk);
      check(r4 == {prev4[2:0], ~(prev4[3] ^ prev4[2])}, $sformatf("4-bit step %0d", i));
    end
    check(n4 == 0, "4-bit: no value repeats within the period");
    check(r4 == 4'd0, "4-bit: period is 15");
    check(!seen4[15], "4-bit: all-ones never visited");
    // 7-bit: period 127.
    n7 = 0;
    start7 = r7;
    for (int i = 0; i < 127; i++) begin
      prev7 = r7;
      if (seen7[r7]) n7++;
      seen7[r7] = 1;
      @(negedge clk);
      check(r7 == {prev7[5:0], ~(prev7[6] ^ prev7[5])}, $sformatf("7-bit step %0d", i));
    end
    check(n7 == 0, "7-bit: no value repeats within the period");
    check(r7 == start7, "7-bit: period is 127");
    check(!seen7[127], "7-bit: all-ones never visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
