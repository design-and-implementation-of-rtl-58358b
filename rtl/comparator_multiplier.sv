// Stochastic multiplier using a comparator (synaptic weight times neuron output).
//
// The weight magnitude w (WIDTH bits, held in a register loaded by w_load) is
// compared every clock with a random number rnd from an M-code generator. The
// comparator turns w into a pulse stream of probability P(w > rnd); ANDing that
// stream with the input pulse stream x_pulse multiplies the two probabilities:
//   P(out) = P(w > rnd) * P(x_pulse)   (= w / (2**WIDTH - 1) * P(x) with an
//                                       M-code rnd that never takes all-ones).
// The comparator is pipelined, so x_pulse is delayed by the same LATENCY before
// the AND: out_pulse at cycle t+LATENCY is (w > rnd(t)) & x_pulse(t).
// Structure after the original SFQ design; the weight register and the alignment delay of
// x_pulse are this design's choices (the original SFQ design does not say where the
// weight is held).
module comparator_multiplier #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             w_load,
  input  logic [WIDTH-1:0] w_in,
  input  logic [WIDTH-1:0] rnd,
  input  logic             x_pulse,
  output logic             out_pulse
);
  localparam int unsigned LATENCY = 1 + $clog2(WIDTH);

  logic [WIDTH-1:0]   w;
  logic [LATENCY-1:0] x_dly;
  logic               w_gt, w_eq;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w     <= '0;
      x_dly <= '0;
    end else begin
      if (w_load) w <= w_in;
      x_dly <= {x_dly[LATENCY-2:0], x_pulse};
    end
  end

  pipelined_comparator #(.WIDTH(WIDTH)) u_cmp (
    .clk, .rst_n, .a(w), .b(rnd), .gt(w_gt), .eq(w_eq)
  );

  // Only the "greater" pulse is used; the "equal" pulse is left unconnected on
  // purpose, P(w > rnd) is what encodes the weight.
  assign out_pulse = w_gt & x_dly[LATENCY-1];
endmodule
