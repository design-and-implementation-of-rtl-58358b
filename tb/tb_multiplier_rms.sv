// Workload: average RMS error of the two stochastic multipliers against the
// accumulation time N_a (4-bit weights).
// Each trial draws a random weight w (0..15) and a random input probability
// p, generates N_a clocks of input pulses with probability p, and counts the
// output pulses of both multipliers. The error of a trial is
// count / N_a - E[count] / N_a, with E = w/15 * p for the comparator multiplier
// (4-bit M-code random number, 15 values) and w/16 * p for the divider
// multiplier. 10000 trials per N_a, N_a = 16, 64, 256, 1024.
// Expected behaviour: the error falls as N_a grows, and the divider multiplier,
// which adds no coding noise of its own, has the smaller error at every N_a.
module tb_multiplier_rms;
  logic clk = 0, rst_n = 0;
  logic w_load = 0;
  logic [3:0] w_in = 0, rnd;
  logic x_pulse = 0, out_cmp, out_div;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mcode_gen #(.WIDTH(4)) u_rng (.clk, .rst_n, .rnd);
  comparator_multiplier #(.WIDTH(4)) u_cmp (.clk, .rst_n, .w_load, .w_in, .rnd, .x_pulse, .out_pulse(out_cmp));
  divider_multiplier    #(.WIDTH(4)) u_div (.clk, .rst_n, .w_load, .w_in, .x_pulse, .out_pulse(out_div));

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int na_list [4] = '{16, 64, 256, 1024};
    real rms_cmp [4], rms_div [4];
    int trials;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    trials = 10000;
    foreach (na_list[k]) begin
      real se_cmp, se_div;
      se_cmp = 0.0; se_div = 0.0;
      for (int t = 0; t < trials; t++) begin
        int w, n_cmp, n_div;
        real p, e_cmp, e_div;
        w = $urandom_range(0, 15);
        p = real'($urandom_range(0, 1000)) / 1000.0;
        @(negedge clk);
        w_load = 1; w_in = 4'(w); x_pulse = 0;
        @(negedge clk);
        w_load = 0;
        repeat (3) @(negedge clk);  // comparator pipeline sees the new weight
        n_cmp = 0; n_div = 0;
        for (int c = 0; c < na_list[k] + 3; c++) begin
          x_pulse = (c < na_list[k]) && (real'($urandom_range(0, 999_999)) < p * 1_000_000.0);
          #1;
          if (c >= 3) n_cmp += int'(out_cmp);   // comparator output is 3 clocks late
          n_div += int'(out_div);
          @(negedge clk);
        end
        e_cmp = real'(w) / 15.0 * p;
        e_div = real'(w) / 16.0 * p;
        se_cmp += (real'(n_cmp) / na_list[k] - e_cmp) ** 2;
        se_div += (real'(n_div) / na_list[k] - e_div) ** 2;
      end
      rms_cmp[k] = $sqrt(se_cmp / trials);
      rms_div[k] = $sqrt(se_div / trials);
      $display("N_a = %5d   RMS error: comparator %.4f   divider %.4f", na_list[k], rms_cmp[k], rms_div[k]);
      checks++;
      if (!(rms_div[k] < rms_cmp[k])) begin
        failures++;
        $display("FAIL: divider multiplier not more precise at N_a = %0d", na_list[k]);
      end
      if (k > 0) begin
        checks += 2;
        if (!(rms_cmp[k] < rms_cmp[k-1])) begin
          failures++;
          $display("FAIL: comparator error does not fall with N_a");
        end
        if (!(rms_div[k] < rms_div[k-1])) begin
          failures++;
          $display("FAIL: divider error does not fall with N_a");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
