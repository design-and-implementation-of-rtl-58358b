// Testbench for pipelined_comparator: the original SFQ design's 4-bit comparator with all
// 256 input pairs streamed back to back, and a 9-bit one (the width used by the
// activation function, not a power of two) with random pairs. A new pair is
// applied every clock; the result must appear exactly 1 + ceil(log2(W)) clocks
// later (3 and 5), which also shows the one-comparison-per-clock throughput.
module tb_pipelined_comparator;
  localparam int L4 = 3;
  localparam int L9 = 5;
  logic clk = 0, rst_n = 0;
  logic [3:0] a4 = 0, b4 = 0;
  logic [8:0] a9 = 0, b9 = 0;
  logic gt4, eq4, gt9, eq9;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [3:0] ha4 [1024], hb4 [1024];
  logic [8:0] ha9 [1024], hb9 [1024];

  always #5 clk = ~clk;

  pipelined_comparator #(.WIDTH(4)) dut4 (.clk, .rst_n, .a(a4), .b(b4), .gt(gt4), .eq(eq4));
  pipelined_comparator #(.WIDTH(9)) dut9 (.clk, .rst_n, .a(a9), .b(b9), .gt(gt9), .eq(eq9));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive at the falling edge, record history, check against the record.
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      if (cyc >= L9) begin
        checks += 2;
        if (gt9 !== (ha9[cyc-L9] > hb9[cyc-L9]) || eq9 !== (ha9[cyc-L9] == hb9[cyc-L9])) begin
          failures++;
          $display("FAIL 9-bit a=%0d b=%0d gt=%0d eq=%0d", ha9[cyc-L9], hb9[cyc-L9], gt9, eq9);
        end
        if (gt4 !== (ha4[cyc-L4] > hb4[cyc-L4]) || eq4 !== (ha4[cyc-L4] == hb4[cyc-L4])) begin
          failures++;
          $display("FAIL 4-bit a=%0d b=%0d gt=%0d eq=%0d", ha4[cyc-L4], hb4[cyc-L4], gt4, eq4);
        end
      end
      // exhaustive 4-bit sweep first, then random; 9-bit: random with many ties
      a4 = (cyc < 256) ? 4'(cyc >> 4) : 4'($urandom);
      b4 = (cyc < 256) ? 4'(cyc)      : 4'($urandom);
      a9 = 9'($urandom);
      b9 = ($urandom_range(0, 3) == 0) ? a9 : (($urandom_range(0, 1) == 0) ? (a9 ^ 9'(1 << $urandom_range(0, 8))) : 9'($urandom));
      ha4[cyc] = a4; hb4[cyc] = b4;
      ha9[cyc] = a9; hb9[cyc] = b9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
