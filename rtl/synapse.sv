// Synapse: multiplies an input pulse stream by a signed weight.
//
// The weight is held as sign and magnitude (w_in = {sign, magnitude}, loaded by
// w_load). The magnitude goes to one of the two multipliers, chosen by KIND:
//   MULT_DIVIDER    - TFF divider chain with NDRO weight bits (same cycle);
//   MULT_COMPARATOR - comparator against the random number rnd, AND with the
//                     input (LATENCY cycles; rnd is shared by the neuron).
// The product pulses are routed by the sign to the up (w >= 0) or down (w < 0)
// input of the neuron's up/down counter.
// The two multipliers and the routing by sign follow the original SFQ design; the
// sign-magnitude weight format is this design's choice.
module synapse #(
  parameter sn_pkg::mult_kind_e KIND = sn_pkg::MULT_DIVIDER,
  parameter int unsigned W_WIDTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               w_load,
  input  logic [W_WIDTH:0]   w_in,
  input  logic [W_WIDTH-1:0] rnd,
  input  logic               x_pulse,
  output logic               up,
  output logic               down
);
  logic sign;
  logic prod;

  always_ff @(posedge clk) begin
    if (!rst_n)      sign <= 1'b0;
    else if (w_load) sign <= w_in[W_WIDTH];
  end

  if (KIND == sn_pkg::MULT_COMPARATOR) begin : g_cmp
    comparator_multiplier #(.WIDTH(W_WIDTH)) u_mul (
      .clk, .rst_n, .w_load, .w_in(w_in[W_WIDTH-1:0]), .rnd, .x_pulse,
      .out_pulse(prod)
    );
  end else begin : g_div
    divider_multiplier #(.WIDTH(W_WIDTH)) u_mul (
      .clk, .rst_n, .w_load, .w_in(w_in[W_WIDTH-1:0]), .x_pulse,
      .out_pulse(prod)
    );
  end

  assign up   = prod & ~sign;
  assign down = prod &  sign;
endmodule
