// Stochastic activation function.
//
// Turns the membrane potential u (U_WIDTH-bit two's complement) into the
// neuron's output pulse stream: every clock a pipelined comparator checks
// u > t, where t is an R_WIDTH-bit M-code random number moved to be centred on
// zero, t = rnd - 2**(R_WIDTH-1). Because the random number is shorter than the
// potential it only spans a band of thresholds, and the pulse probability is a
// monotonically increasing ramp (a piecewise-linear sigmoid):
//   P(x) = 0                                  for u <= -2**(R_WIDTH-1)
//        = (u + 2**(R_WIDTH-1)) / (2**R_WIDTH - 1)  in between
//        = 1                                  for u >= 2**(R_WIDTH-1) - 1
// (the M-code never takes the all-ones value, hence 2**R_WIDTH - 1 values).
// Both operands are converted to offset binary so that the unsigned comparator
// orders them as signed numbers. x_pulse at cycle t+LATENCY answers for u and
// rnd at cycle t, LATENCY = 1 + ceil(log2(U_WIDTH)).
// The comparator, the 9-bit potential and the 7-bit random number follow the
// original SFQ design; centring the random band on zero and the offset-binary conversion
// are this design's choices.
module activation_function #(
  parameter int unsigned U_WIDTH = 9,
  parameter int unsigned R_WIDTH = 7,
  parameter logic [R_WIDTH-1:0] SEED = '0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [U_WIDTH-1:0] u,
  output logic                      x_pulse,
  output logic [R_WIDTH-1:0]        rnd
);
  logic signed [U_WIDTH-1:0] thr;
  logic [U_WIDTH-1:0]        a_off, b_off;
  logic                      x_eq;

  mcode_gen #(.WIDTH(R_WIDTH), .SEED(SEED)) u_rng (.clk, .rst_n, .rnd);

  assign thr   = U_WIDTH'(signed'({1'b0, rnd})) - U_WIDTH'(1 << (R_WIDTH - 1));
  assign a_off = u   ^ (U_WIDTH'(1) << (U_WIDTH - 1));
  assign b_off = thr ^ (U_WIDTH'(1) << (U_WIDTH - 1));

  pipelined_comparator #(.WIDTH(U_WIDTH)) u_cmp (
    .clk, .rst_n, .a(a_off), .b(b_off), .gt(x_pulse), .eq(x_eq)
  );

  initial assert (R_WIDTH < U_WIDTH)
    else $fatal(1, "activation_function: random number must be shorter than u");
endmodule
