// End-to-end testbench of stochastic_neurosystem at its default size
// (4 neurons, N_a = 50, 4-bit weights, 9-bit potentials, 7-bit random numbers,
// divider multipliers).
//
// Operation: write a fixed weight matrix with two excitatory and two
// inhibitory inputs per neuron (self-connections included), load starting
// potentials, run 12 accumulation periods.
//
// Independent reference models checked every clock:
//   * the divider multipliers: per synapse a 4-bit pulse counter and the weight;
//     the predicted Up/Down lines (OR of the synapse products) must match;
//   * the activation: a model M-code generator per neuron; x_pulse must equal
//     u > rnd - 64 of five clocks earlier;
//   * the counters: each read-out must equal the net number of Up minus Down
//     pulses seen in that period (modulo 512);
//   * the controller: read-outs come exactly N_a = 50 clocks apart.
// Every mechanism must occur at least once: weight write, potential load,
// period read-out, Up and Down pulses, Up and Down in the same clock, merged
// Up and merged Down pulses, output pulses, negative and positive read-outs.
module tb_stochastic_neurosystem;
  localparam int N = 4;
  localparam int NA = 50;
  localparam int LAT = 5;

  logic clk = 0, rst_n = 0;
  logic run = 0, w_we = 0, u_load = 0;
  logic [2:0] w_row = 0, w_col = 0;
  logic [4:0] w_data = 0;
  logic signed [8:0] u_init [N];
  logic signed [8:0] u [N];
  logic [N-1:0] x_pulse, up, down, up_merge, down_merge;
  logic step;
  logic [15:0] step_count;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stochastic_neurosystem dut (
    .clk, .rst_n, .run, .w_we, .w_row, .w_col, .w_data, .u_load, .u_init,
    .u, .x_pulse, .step, .step_count, .up, .down, .up_merge, .down_merge
  );

  // ---------------- reference models ----------------
  int w_model [N][N];
  int tff_model [N][N];
  logic [6:0] rng_model [N];
  int acc [N];
  logic signed [8:0] hist_u [N][$];
  logic [6:0] hist_r [N][$];
  int cyc = 0;
  int last_step = 0;
  bit pending_read = 0;
  int pending_val [N];

  // mechanism counters
  int n_wwrite = 0, n_load = 0, n_step = 0, n_up = 0, n_down = 0, n_updown = 0;
  int n_upmerge = 0, n_downmerge = 0, n_x = 0, n_neg = 0, n_pos = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (cycle %0d): %s", cyc, what);
    end
  endtask

  function automatic logic [6:0] rng_next(input logic [6:0] s);
    return {s[5:0], ~(s[6] ^ s[5])};
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++)
      rng_model[i] <= !rst_n ? 7'(sn_pkg::mcode_seed(i, 7)) : rng_next(rng_model[i]);
  end

  // Evaluate at every falling edge, when all outputs are settled.
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      #1;
      // counter read-out of the previous clock is now visible in u
      if (pending_read) begin
        for (int i = 0; i < N; i++) begin
          check(u[i] == 9'(pending_val[i]),
                $sformatf("neuron %0d read-out %0d, lines gave %0d", i, u[i], 9'(pending_val[i])));
          if (u[i] < 0) n_neg++;
          if (u[i] > 0) n_pos++;
        end
        pending_read = 0;
        $display("period %0d: u = %0d %0d %0d %0d", n_step, u[0], u[1], u[2], u[3]);
      end
      for (int i = 0; i < N; i++) begin
        logic eu, ed;
        // divider-multiplier model
        eu = 0; ed = 0;
        for (int j = 0; j < N; j++) begin
          if (x_pulse[j]) begin
            int stage, mag;
            stage = 0;
            while (stage < 4 && tff_model[i][j][stage]) stage++;
            mag = w_model[i][j] < 0 ? -w_model[i][j] : w_model[i][j];
            if (stage < 4 && mag[3 - stage]) begin
              if (w_model[i][j] < 0) ed = 1; else eu = 1;
            end
          end
        end
        check(up[i] == eu && down[i] == ed,
              $sformatf("neuron %0d lines up=%0d down=%0d expected %0d %0d", i, up[i], down[i], eu, ed));
        // activation model
        hist_u[i].push_back(u[i]);
        hist_r[i].push_back(rng_model[i]);
        if (cyc >= LAT) begin
          check(x_pulse[i] == (int'(hist_u[i][cyc - LAT]) > int'(hist_r[i][cyc - LAT]) - 64),
                $sformatf("neuron %0d activation", i));
        end
        // counter model: pulses of a read-out clock go to the next period
        if (step || u_load) begin
          pending_val[i] = acc[i];
          acc[i] = int'(up[i]) - int'(down[i]);
        end else begin
          acc[i] += int'(up[i]) - int'(down[i]);
        end
        n_up += int'(up[i]);
        n_down += int'(down[i]);
        n_updown += int'(up[i] && down[i]);
        n_upmerge += int'(up_merge[i]);
        n_downmerge += int'(down_merge[i]);
        n_x += int'(x_pulse[i]);
      end
      if (step) begin
        if (n_load > 0)
          check(cyc - last_step == NA, $sformatf("period of %0d clocks, expected %0d", cyc - last_step, NA));
        last_step = cyc;
        pending_read = 1;
        n_step++;
      end
      if (u_load) begin
        n_load++;
        last_step = cyc;
      end
      // advance the divider models
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (x_pulse[j]) tff_model[i][j] = (tff_model[i][j] + 1) % 16;
      cyc++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int w_table [N][N] = '{'{-5, 12, -9, 7}, '{10, -4, 6, -13}, '{-11, 5, -7, 14}, '{8, -6, 15, -3}};

  initial begin
    int steps_before;
    for (int i = 0; i < N; i++) begin
      u_init[i] = 0;
      acc[i] = 0;
      for (int j = 0; j < N; j++) begin
        w_model[i][j] = 0;
        tff_model[i][j] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // store the pattern
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int wv;
        wv = w_table[i][j];
        @(negedge clk);
        w_we = 1; w_row = 3'(i); w_col = 3'(j);
        w_data = {wv < 0, 4'(wv < 0 ? -wv : wv)};
        n_wwrite++;
        @(posedge clk);
        w_model[i][j] = wv;
      end
    @(negedge clk);
    w_we = 0;
    u_init[0] = 9'sd60;  u_init[1] = -9'sd60;
    u_init[2] = 9'sd10;  u_init[3] = -9'sd20;
    u_load = 1;
    @(negedge clk);
    u_load = 0;
    run = 1;
    steps_before = int'(step_count);
    wait (int'(step_count) == steps_before + 12);
    @(negedge clk);
    @(negedge clk);
    run = 0;
    check(int'(step_count) == steps_before + 12, "period counter");
    // mechanisms
    check(n_wwrite > 0, "weight write never happened");
    check(n_load > 0, "potential load never happened");
    check(n_step == 12, $sformatf("%0d read-outs, expected 12", n_step));
    check(n_up > 0, "no Up pulse");
    check(n_down > 0, "no Down pulse");
    check(n_updown > 0, "Up and Down never in the same clock");
    check(n_upmerge > 0, "no merged Up pulses");
    check(n_downmerge > 0, "no merged Down pulses");
    check(n_x > 0, "no output pulse");
    check(n_neg > 0, "no negative read-out");
    check(n_pos > 0, "no positive read-out");
    $display("mechanisms: writes=%0d loads=%0d periods=%0d up=%0d down=%0d up+down=%0d up_merge=%0d down_merge=%0d x=%0d neg=%0d pos=%0d",
             n_wwrite, n_load, n_step, n_up, n_down, n_updown, n_upmerge, n_downmerge, n_x, n_neg, n_pos);
    $display("final u = %0d %0d %0d %0d", u[0], u[1], u[2], u[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
