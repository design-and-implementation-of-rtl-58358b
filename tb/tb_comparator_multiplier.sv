// Testbench for comparator_multiplier (4-bit weight).
// Part 1, exact: random weights, random numbers and input pulses; every output
// pulse must equal (w > rnd(t)) AND x(t) of the inputs 3 clocks earlier.
// Part 2, probability (P = w/15 * P(x)): with rnd from a 4-bit M-code generator and
// x = 1 every cycle, 15 cycles (one generator period) must give exactly w
// output pulses, i.e. P = w / 15.
module tb_comparator_multiplier;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 0;
  logic w_load = 0;
  logic [3:0] w_in = 0, rnd_tb = 0, rnd_gen, rnd;
  logic x_pulse = 0, out_pulse;
  logic use_gen = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mcode_gen #(.WIDTH(4)) u_rng (.clk, .rst_n, .rnd(rnd_gen));
  assign rnd = use_gen ? rnd_gen : rnd_tb;

  comparator_multiplier #(.WIDTH(4)) dut (
    .clk, .rst_n, .w_load, .w_in, .rnd, .x_pulse, .out_pulse
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] w;
    logic exp_q [$];
    int cnt;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // Part 1
    for (int blk = 0; blk < 40; blk++) begin
      @(negedge clk);
      w = 4'($urandom);
      w_load = 1; w_in = w;
      @(negedge clk);
      w_load = 0;
      exp_q.delete();
      for (int c = 0; c < 30; c++) begin
        rnd_tb  = 4'($urandom);
        x_pulse = 1'($urandom);
        exp_q.push_back((w > rnd_tb) && x_pulse);
        if (c >= LAT) begin
          checks++;
          if (out_pulse !== exp_q[c - LAT]) begin
            failures++;
            $display("FAIL w=%0d cycle %0d out=%0d exp=%0d", w, c, out_pulse, exp_q[c - LAT]);
          end
        end
        @(negedge clk);
      end
    end
    // Part 2
    use_gen = 1;
    for (int wv = 0; wv < 16; wv++) begin
      @(negedge clk);
      w_load = 1; w_in = 4'(wv); x_pulse = 1;
      @(negedge clk);
      w_load = 0;
      repeat (LAT) @(negedge clk);
      cnt = 0;
      for (int c = 0; c < 15; c++) begin
        cnt += int'(out_pulse);
        @(negedge clk);
      end
      checks++;
      if (cnt != wv) begin
        failures++;
        $display("FAIL w=%0d: %0d pulses in 15 cycles, expected %0d", wv, cnt, wv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
