// Workload: the activation-function transfer curve with a 9-bit membrane
// potential, a 7-bit random number and N_a = 50, each point repeated 10 times.
// For u from -256 to 255 (step 8) the output pulses of 10 windows of 50 clocks
// are counted; the mean output x = pulses / N_a is printed against u / 2**9.
// Checks: the mean stays within a noise band around the ideal ramp
// clamp((u + 64) / 127, 0, 1), is 0 far below the ramp and 1 far above it, and
// the curve rises monotonically when averaged over neighbouring points.
module tb_activation_curve;
  localparam int NA = 50;
  localparam int TRIALS = 10;
  logic clk = 0, rst_n = 0;
  logic signed [8:0] u = 0;
  logic x_pulse;
  logic [6:0] rnd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  activation_function #(.U_WIDTH(9), .R_WIDTH(7)) dut (.clk, .rst_n, .u, .x_pulse, .rnd);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mean [64];
    int idx;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    idx = 0;
    for (int uv = -256; uv < 256; uv += 8) begin
      int cnt;
      real ideal;
      @(negedge clk);
      u = 9'(uv);
      repeat (5) @(negedge clk);
      cnt = 0;
      for (int c = 0; c < NA * TRIALS; c++) begin
        cnt += int'(x_pulse);
        @(negedge clk);
      end
      mean[idx] = real'(cnt) / (NA * TRIALS);
      ideal = (uv + 64 < 0) ? 0.0 : ((uv + 64 > 127) ? 1.0 : real'(uv + 64) / 127.0);
      $display("u/2^9 = %7.4f   x = %.3f   ideal %.3f", real'(uv) / 512.0, mean[idx], ideal);
      checks++;
      if (mean[idx] < ideal - 0.12 || mean[idx] > ideal + 0.12) begin
        failures++;
        $display("FAIL: u=%0d mean %.3f far from %.3f", uv, mean[idx], ideal);
      end
      if (idx >= 2) begin
        checks++;
        if (mean[idx] + mean[idx-1] + 0.05 < mean[idx-1] + mean[idx-2]) begin
          failures++;
          $display("FAIL: curve falls at u=%0d", uv);
        end
      end
      idx++;
    end
    checks += 2;
    if (mean[0] != 0.0) begin failures++; $display("FAIL: output below the ramp"); end
    if (mean[63] != 1.0) begin failures++; $display("FAIL: output above the ramp not saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
