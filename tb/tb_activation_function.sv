// Testbench for activation_function (9-bit potential, 7-bit random number).
// Part 1, exact: for random potentials, every output bit must equal
// u(t) > rnd(t) - 64 (signed), 5 clocks later.
// Part 2, transfer curve: over one full generator period (127 clocks) with u
// held, the number of output pulses must be exactly clamp(u + 64, 0, 127), so
// the curve rises monotonically from 0 (u <= -64) to all pulses (u >= 63).
module tb_activation_function;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  logic signed [8:0] u = 0;
  logic x_pulse;
  logic [6:0] rnd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  activation_function #(.U_WIDTH(9), .R_WIDTH(7)) dut (.clk, .rst_n, .u, .x_pulse, .rnd);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_h [$];
    int cnt, want, prev_cnt;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // Part 1
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (c >= LAT) begin
        checks++;
        if (x_pulse !== exp_h[c - LAT]) begin
          failures++;
          $display("FAIL cycle %0d x=%0d exp=%0d", c, x_pulse, exp_h[c - LAT]);
        end
      end
      u = ($urandom_range(0, 1) == 1) ? 9'($urandom_range(0, 200) - 100) : 9'($urandom);
      #1;
      exp_h.push_back(int'(u) > int'(rnd) - 64);
    end
    // Part 2
    prev_cnt = -1;
    for (int uv = -256; uv <= 255; uv += 3) begin
      @(negedge clk);
      u = 9'(uv);
      repeat (LAT) @(negedge clk);
      cnt = 0;
      for (int c = 0; c < 127; c++) begin
        cnt += int'(x_pulse);
        @(negedge clk);
      end
      want = (uv + 64 < 0) ? 0 : ((uv + 64 > 127) ? 127 : uv + 64);
      checks++;
      if (cnt != want || cnt < prev_cnt) begin
        failures++;
        $display("FAIL u=%0d: %0d pulses in 127 clocks, expected %0d", uv, cnt, want);
      end
      prev_cnt = cnt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
