// Testbench for divider_multiplier (4-bit weight).
// For every weight 0..15: after 16*k input pulses, spaced by random gaps, the
// output count must be exactly w*k (rate multiplier with 2**4 internal states), no
// output may appear without an input pulse, and the output must be spread:
// with w = 8 exactly every second input pulse passes (the 1/2 stage).
module tb_divider_multiplier;
  logic clk = 0, rst_n = 0;
  logic w_load = 0;
  logic [3:0] w_in = 0;
  logic x_pulse = 0, out_pulse;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  divider_multiplier #(.WIDTH(4)) dut (.clk, .rst_n, .w_load, .w_in, .x_pulse, .out_pulse);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, stray, npulse, pattern_err;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int wv = 0; wv < 16; wv++) begin
      @(negedge clk);
      w_load = 1; w_in = 4'(wv);
      @(negedge clk);
      w_load = 0;
      cnt = 0; stray = 0; npulse = 0; pattern_err = 0;
      for (int k = 1; k <= 3; k++) begin
        while (npulse < 16 * k) begin
          x_pulse = ($urandom_range(0, 2) != 0);
          #1;
          if (out_pulse && !x_pulse) stray++;
          cnt += int'(out_pulse);
          if (wv == 8 && x_pulse && out_pulse == npulse[0]) pattern_err++;
          npulse += int'(x_pulse);
          @(negedge clk);
        end
        x_pulse = 0;
        checks++;
        if (cnt != wv * k) begin
          failures++;
          $display("FAIL w=%0d: %0d outputs after %0d inputs, expected %0d", wv, cnt, npulse, wv * k);
        end
      end
      checks++;
      if (stray != 0) begin
        failures++;
        $display("FAIL w=%0d: %0d outputs without input", wv, stray);
      end
      if (wv == 8) begin
        checks++;
        if (pattern_err != 0) begin
          failures++;
          $display("FAIL w=8 is not every second pulse (%0d errors)", pattern_err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
