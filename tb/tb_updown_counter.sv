// Testbench for updown_counter at the original SFQ design's 4-bit size.
// Part 1 replays the kind of sequence shown for the designed 4-bit counter:
// pulse trains on Up and Down whose read-outs must give +5, +1, -2 and -5.
// Part 2 drives random Up/Down/Re pulses (Up and Down together included) and
// compares every read-out and the running count with a modulo-16 model,
// including wrap-around, and checks that pulses arriving with Re are counted
// in the next period.
module tb_updown_counter;
  logic clk = 0, rst_n = 0;
  logic up = 0, down = 0, re = 0;
  logic [3:0] o, count;
  logic o_valid;
  int checks = 0, failures = 0;
  int model = 0;

  always #5 clk = ~clk;
  updown_counter #(.WIDTH(4)) dut (.clk, .rst_n, .up, .down, .re, .o, .o_valid, .count);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock with the given pulses; checks read-out and model before the edge.
  task automatic cycle(input logic u, input logic d, input logic r);
    @(negedge clk);
    up = u; down = d; re = r;
    #1;
    checks++;
    if (count !== 4'(model)) begin
      failures++;
      $display("FAIL count=%0d model=%0d", count, 4'(model));
    end
    if (r) begin
      checks++;
      if (o !== 4'(model) || !o_valid) begin
        failures++;
        $display("FAIL read-out o=%0d expected %0d", $signed(o), $signed(4'(model)));
      end
      model = 0;
    end else begin
      checks++;
      if (o !== 4'd0 || o_valid) begin
        failures++;
        $display("FAIL output without Re");
      end
    end
    model = (model + int'(u) - int'(d)) & 15;
  endtask

  task automatic train(input int n_up, input int n_down, input int expect_val);
    for (int i = 0; i < n_up; i++) cycle(1, 0, 0);
    for (int i = 0; i < n_down; i++) cycle(0, 1, 0);
    cycle(0, 0, 0);
    checks++;
    if ($signed(count) != expect_val) begin
      failures++;
      $display("FAIL train: got %0d expected %0d", $signed(count), expect_val);
    end
    cycle(0, 0, 1);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    train(6, 1, 5);
    train(3, 2, 1);
    train(1, 3, -2);
    train(0, 5, -5);
    for (int i = 0; i < 3000; i++)
      cycle(($urandom_range(0, 1) == 1), ($urandom_range(0, 2) == 0), ($urandom_range(0, 19) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
