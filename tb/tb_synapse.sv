// Testbench for synapse, both multiplier kinds side by side.
// Divider kind: for signed weights -15..15, 32 input pulses must give exactly
// 2*|w| pulses, all on Up for w >= 0 and all on Down for w < 0.
// Comparator kind: every output must equal (|w| > rnd) AND x from 3 clocks
// earlier, on the line selected by the sign; never on both lines.
module tb_synapse;
  logic clk = 0, rst_n = 0;
  logic w_load = 0;
  logic [4:0] w_in = 0;
  logic [3:0] rnd = 0;
  logic x_pulse = 0;
  logic up_d, down_d, up_c, down_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  synapse #(.KIND(sn_pkg::MULT_DIVIDER), .W_WIDTH(4)) dut_div (
    .clk, .rst_n, .w_load, .w_in, .rnd, .x_pulse, .up(up_d), .down(down_d));
  synapse #(.KIND(sn_pkg::MULT_COMPARATOR), .W_WIDTH(4)) dut_cmp (
    .clk, .rst_n, .w_load, .w_in, .rnd, .x_pulse, .up(up_c), .down(down_c));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_up, n_down, mag, np;
    logic neg;
    logic exp_h [$];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int wv = -15; wv <= 15; wv++) begin
      neg = (wv < 0);
      mag = neg ? -wv : wv;
      @(negedge clk);
      x_pulse = 0;
      w_load = 1; w_in = {neg, 4'(mag)};
      @(negedge clk);
      w_load = 0;
      repeat (4) @(negedge clk);  // drain the comparator pipeline
      exp_h.delete();
      n_up = 0; n_down = 0; np = 0;
      for (int c = 0; np < 32 || c < 40; c++) begin
        x_pulse = (np < 32) && ($urandom_range(0, 3) != 0);
        rnd = 4'($urandom);
        np += int'(x_pulse);
        #1;
        n_up += int'(up_d); n_down += int'(down_d);
        exp_h.push_back((4'(mag) > rnd) && x_pulse);
        if (c >= 3) begin
          checks++;
          if (up_c !== (exp_h[c-3] && !neg) || down_c !== (exp_h[c-3] && neg)) begin
            failures++;
            $display("FAIL comparator kind w=%0d cycle %0d up=%0d down=%0d", wv, c, up_c, down_c);
          end
        end
        @(negedge clk);
      end
      checks++;
      if (n_up != (neg ? 0 : 2 * mag) || n_down != (neg ? 2 * mag : 0)) begin
        failures++;
        $display("FAIL divider kind w=%0d up=%0d down=%0d", wv, n_up, n_down);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
