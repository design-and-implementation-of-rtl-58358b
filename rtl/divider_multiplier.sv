// Stochastic multiplier using a divider (binary rate multiplier).
//
// A chain of WIDTH toggle flip-flops (tff) counts the input pulses x_pulse. An
// input pulse ripples through the chain and stops at the first TFF that was 0,
// so TFF stage k receives the end of the ripple for exactly 1/2**(k+1) of the
// input pulses (1/2, 1/4, ...), and no two stages share a pulse. Non-destructive
// read-out cells (ndro) hold the weight bits; the stage-k stream is passed to
// the output when weight bit WIDTH-1-k is set. Hence
//   P(out) = (w[WIDTH-1]/2 + w[WIDTH-2]/4 + ...) * P(x_pulse),
// and over any 2**WIDTH consecutive input pulses exactly w output pulses leave.
// The only coding noise is that of x_pulse itself.
// In SFQ the chain is asynchronous; here an input pulse is one clock with
// x_pulse = 1, out_pulse follows in the same cycle (combinational) and the TFF
// states update at the clock edge. The weight is loaded into the NDROs with
// w_load; loading does not clear the TFF chain.
// Function after the original SFQ design; the synchronous timing, reset and load port are
// this design's choices.
module divider_multiplier #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             w_load,
  input  logic [WIDTH-1:0] w_in,
  input  logic             x_pulse,
  output logic             out_pulse
);
  logic [WIDTH-1:0] ndro;   // weight bits
  logic [WIDTH-1:0] tff;    // divider chain state
  logic [WIDTH-1:0] stage;  // one-hot: stage at which the current ripple ends

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ndro <= '0;
      tff  <= '0;
    end else begin
      if (w_load)  ndro <= w_in;
      if (x_pulse) tff  <= tff + 1'b1;
    end
  end

  // The ripple ends at the lowest TFF that holds 0.
  always_comb begin
    logic ones_below;
    stage      = '0;
    ones_below = 1'b1;
    for (int k = 0; k < WIDTH; k++) begin
      stage[k]   = ones_below & ~tff[k];
      ones_below = ones_below & tff[k];
    end
  end

  always_comb begin
    out_pulse = 1'b0;
    for (int k = 0; k < WIDTH; k++) begin
      if (stage[k] && ndro[WIDTH-1-k]) out_pulse = x_pulse;
    end
  end
endmodule
