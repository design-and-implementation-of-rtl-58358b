// Testbench for neuron (4 synapses, divider multipliers, 9-bit potential).
// 1. Weights +5, -3, +7, -15; the inputs pulse one at a time, 16 pulses each,
//    so no pulses collide: after the read-out u must be 5-3+7-15 = -6.
// 2. All inputs pulse together: pulses on the same line merge; u must equal
//    the net number of pulses seen on the Up and Down lines, merges must be
//    flagged, and u must be smaller than the collision-free sum.
// 3. u_load sets u; the output stream over one 127-clock generator period must
//    carry exactly clamp(u + 64, 0, 127) pulses.
// 4. u_load wins over a simultaneous read-out.
module tb_neuron;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] x_in = 0, w_load = 0;
  logic [4:0] w_in = 0;
  logic re = 0, u_load = 0;
  logic signed [8:0] u_init = 0, u;
  logic x_pulse, up, down, up_merge, down_merge;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  neuron #(.N(N)) dut (
    .clk, .rst_n, .x_in, .w_load, .w_in, .re, .u_load, .u_init,
    .u, .x_pulse, .up, .down, .up_merge, .down_merge
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic set_w(input int j, input int wv);
    @(negedge clk);
    w_load = 4'(1 << j);
    w_in = {wv < 0, 4'(wv < 0 ? -wv : wv)};
    @(negedge clk);
    w_load = 0;
  endtask

  task automatic readout();
    @(negedge clk);
    x_in = 0; re = 1;
    @(negedge clk);
    re = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int net, merges, cnt;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    set_w(0, 5); set_w(1, -3); set_w(2, 7); set_w(3, -15);
    readout();
    // 1
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      x_in = 4'(1 << (c % 4));
    end
    readout();
    check(u == -9'sd6, $sformatf("sum of products: u=%0d expected -6", u));
    // 2
    set_w(0, 5); set_w(1, 3); set_w(2, 7); set_w(3, -15);
    readout();
    net = 0; merges = 0;
    for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      x_in = '1;
      #1;
      net += int'(up) - int'(down);
      merges += int'(up_merge);
    end
    readout();
    check(u == 9'(net), $sformatf("merged count: u=%0d, lines gave %0d", u, net));
    check(merges > 0, "no merge of coincident Up pulses");
    check(int'(u) > -15 + 0 && int'(u) < 5 + 3 + 7 - 15 + 15, "merge range");
    check(int'(u) != 0, "merged result differs from the collision-free sum 0");
    // 3
    foreach (u_init_vals[k]) begin
      @(negedge clk);
      u_load = 1; u_init = 9'(u_init_vals[k]);
      @(negedge clk);
      u_load = 0;
      check(u == 9'(u_init_vals[k]), "u_load");
      repeat (6) @(negedge clk);
      cnt = 0;
      for (int c = 0; c < 127; c++) begin
        cnt += int'(x_pulse);
        @(negedge clk);
      end
      check(cnt == ((u_init_vals[k] + 64 < 0) ? 0 : (u_init_vals[k] + 64 > 127) ? 127 : u_init_vals[k] + 64),
            $sformatf("activation u=%0d gave %0d pulses", u_init_vals[k], cnt));
    end
    // 4
    @(negedge clk);
    u_load = 1; re = 1; u_init = 9'sd77;
    @(negedge clk);
    u_load = 0; re = 0;
    check(u == 9'sd77, "u_load has priority over the read-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int u_init_vals [5] = '{20, -100, 200, -64, 62};
endmodule
