// Testbench for cmp_4in2out: all 16 combinations of the (X, Y) pairs of the
// high and low halves, in random order, against the comparison of the 2-bit
// numbers the pairs stand for, one clock after the inputs.
module tb_cmp_4in2out;
  logic clk = 0, rst_n = 0;
  sn_pkg::cmp_res_t hi, lo, res;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cmp_4in2out dut (.clk, .rst_n, .hi, .lo, .res);

  // Build a pair from an actual 1-bit comparison, so only legal pairs occur.
  function automatic sn_pkg::cmp_res_t pair(input logic a, input logic b);
    return '{gt: a & ~b, eq: a == b};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] A, B;
    hi = '0; lo = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 300; i++) begin
      A = 2'($urandom); B = 2'($urandom);
      @(negedge clk);
      hi = pair(A[1], B[1]);
      lo = pair(A[0], B[0]);
      @(negedge clk);
      checks++;
      if (res.gt !== (A > B) || res.eq !== (A == B)) begin
        failures++;
        $display("FAIL A=%0d B=%0d gt=%0d eq=%0d", A, B, res.gt, res.eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
