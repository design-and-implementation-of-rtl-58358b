// Workload: accumulation time needed for 8-bit precision with 8-bit weights.
// Both multipliers are built 8 bits wide (8-bit M-code random number for the
// comparator kind). For N_a = 1024 ... 16384 (doubling), 400 random trials
// each (random weight 0..255, random input probability), the RMS error of the
// output rate is measured as in tb_multiplier_rms. The smallest N_a whose error
// is below one 8-bit step (1/256) is reported for each multiplier.
// Checks: both reach 8-bit precision within the sweep, and the divider
// multiplier gets there with no more accumulation time than the comparator
// multiplier, with a lower error at every N_a.
module tb_multiplier_8bit;
  localparam int W = 8;
  localparam int LAT = 4;  // comparator latency at 8 bits
  logic clk = 0, rst_n = 0;
  logic w_load = 0;
  logic [W-1:0] w_in = 0, rnd;
  logic x_pulse = 0, out_cmp, out_div;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mcode_gen #(.WIDTH(W)) u_rng (.clk, .rst_n, .rnd);
  comparator_multiplier #(.WIDTH(W)) u_cmp (.clk, .rst_n, .w_load, .w_in, .rnd, .x_pulse, .out_pulse(out_cmp));
  divider_multiplier    #(.WIDTH(W)) u_div (.clk, .rst_n, .w_load, .w_in, .x_pulse, .out_pulse(out_div));

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int trials;
    int need_cmp, need_div;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    trials = 400;
    need_cmp = 0; need_div = 0;
    for (int na = 1024; na <= 16384; na *= 2) begin
      real se_cmp, se_div, r_cmp, r_div;
      se_cmp = 0.0; se_div = 0.0;
      for (int t = 0; t < trials; t++) begin
        int w, n_cmp, n_div;
        real p;
        w = $urandom_range(0, 255);
        p = real'($urandom_range(0, 1000)) / 1000.0;
        @(negedge clk);
        w_load = 1; w_in = W'(w); x_pulse = 0;
        @(negedge clk);
        w_load = 0;
        repeat (LAT) @(negedge clk);
        n_cmp = 0; n_div = 0;
        for (int c = 0; c < na + LAT; c++) begin
          x_pulse = (c < na) && (real'($urandom_range(0, 999_999)) < p * 1_000_000.0);
          #1;
          if (c >= LAT) n_cmp += int'(out_cmp);
          n_div += int'(out_div);
          @(negedge clk);
        end
        se_cmp += (real'(n_cmp) / na - real'(w) / 255.0 * p) ** 2;
        se_div += (real'(n_div) / na - real'(w) / 256.0 * p) ** 2;
      end
      r_cmp = $sqrt(se_cmp / trials);
      r_div = $sqrt(se_div / trials);
      $display("N_a = %6d   RMS error: comparator %.5f   divider %.5f   (1/256 = %.5f)",
               na, r_cmp, r_div, 1.0 / 256.0);
      if (need_cmp == 0 && r_cmp < 1.0 / 256.0) need_cmp = na;
      if (need_div == 0 && r_div < 1.0 / 256.0) need_div = na;
      checks++;
      if (!(r_div < r_cmp)) begin
        failures++;
        $display("FAIL: divider not more precise at N_a = %0d", na);
      end
    end
    $display("N_a for 8-bit precision: comparator %0d, divider %0d", need_cmp, need_div);
    checks += 3;
    if (need_cmp == 0) begin failures++; $display("FAIL: comparator never reached 8-bit precision"); end
    if (need_div == 0) begin failures++; $display("FAIL: divider never reached 8-bit precision"); end
    if (need_div == 0 || (need_cmp != 0 && need_div > need_cmp)) begin
      failures++;
      $display("FAIL: divider needs more accumulation time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
