// Testbench for adder_cell: random input pulses on both inputs and random read
// pulses. A software bit tracks the cell; each cycle checks carry (both input
// pulses, or one pulse on a stored 1), the read-out o (the stored bit, only
// while re is high), and that re clears the bit before that cycle's pulses.
module tb_adder_cell;
  logic clk = 0, rst_n = 0;
  logic in_a = 0, in_b = 0, re = 0;
  logic carry, o, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  adder_cell dut (.clk, .rst_n, .in_a, .in_b, .re, .carry, .o, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, tot;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    s = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_a = ($urandom_range(0, 2) == 0);
      in_b = ($urandom_range(0, 2) == 0);
      re   = ($urandom_range(0, 7) == 0);
      #1;
      checks++;
      if (o !== (re && s == 1) || q !== 1'(s)) begin
        failures++;
        $display("FAIL read: s=%0d re=%0d o=%0d q=%0d", s, re, o, q);
      end
      tot = (re ? 0 : s) + int'(in_a) + int'(in_b);
      checks++;
      if (carry !== (tot >= 2)) begin
        failures++;
        $display("FAIL carry: s=%0d a=%0d b=%0d re=%0d carry=%0d", s, in_a, in_b, re, carry);
      end
      s = tot % 2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
