// Testbench for cmp_bit: random input pairs, checking X (a>b) and Y (a==b)
// one clock after the pair was applied.
module tb_cmp_bit;
  logic clk = 0, rst_n = 0;
  logic a = 0, b = 0;
  sn_pkg::cmp_res_t res;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cmp_bit dut (.clk, .rst_n, .a, .b, .res);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ea, eb;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      ea = 1'($urandom); eb = 1'($urandom);
      a = ea; b = eb;
      @(negedge clk);
      a = ~ea; b = eb;  // change the inputs: the output must not follow yet
      checks++;
      if (res.gt !== (ea && !eb) || res.eq !== (ea == eb)) begin
        failures++;
        $display("FAIL a=%0d b=%0d gt=%0d eq=%0d", ea, eb, res.gt, res.eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
