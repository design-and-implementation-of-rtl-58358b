// Stochastic neurosystem: a fully connected network of N stochastic neurons.
//
// Every neuron's output pulse stream x_pulse[j] feeds synapse j of every
// neuron i (N*N synapses, self-connections included; a zero weight removes a
// connection). Time is divided into accumulation periods of NA clock cycles.
// During a period each neuron's up/down counter integrates sum_j w_ij x_j as
// pulses; in the last cycle of the period the controller pulses re, every
// counter is read out into its neuron's membrane potential u[i] and cleared,
// and all neurons update together (synchronous dynamics, u(t+1) = W x(t)).
//
// Interface
//   run          : the period counter advances only while run is high.
//   w_we         : writes w_data = {sign, magnitude} as weight w[w_row][w_col]
//                  (from neuron w_col to neuron w_row).
//   u_load       : sets every u[i] to u_init[i], clears the counters and
//                  restarts the period.
//   u, x_pulse   : membrane potentials and output pulse streams.
//   step         : high in the cycle a period ends (the read-out pulse);
//                  u holds the new values from the next cycle on.
//   step_count   : number of completed periods since reset (wraps).
//   up, down     : per neuron, the merged pulse lines into its counter.
//   up_merge, down_merge : per neuron, pulses merged on the Up/Down line.
// Defaults: NA = 50, 9-bit potential and 7-bit random number, as in the
// original SFQ design's activation-function example; 4-bit weight magnitudes as its 4-bit
// comparator and counter; N = 4 neurons and the divider multiplier are this
// design's choices (the original SFQ design fixes neither). KIND selects the multiplier.
module stochastic_neurosystem #(
  parameter int unsigned N       = 4,
  parameter int unsigned NA      = 50,
  parameter sn_pkg::mult_kind_e KIND = sn_pkg::MULT_DIVIDER,
  parameter int unsigned W_WIDTH = 4,
  parameter int unsigned U_WIDTH = 9,
  parameter int unsigned R_WIDTH = 7
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      run,
  input  logic                      w_we,
  input  logic [$clog2(N+1)-1:0]    w_row,
  input  logic [$clog2(N+1)-1:0]    w_col,
  input  logic [W_WIDTH:0]          w_data,
  input  logic                      u_load,
  input  logic signed [U_WIDTH-1:0] u_init [N],
  output logic signed [U_WIDTH-1:0] u [N],
  output logic [N-1:0]              x_pulse,
  output logic                      step,
  output logic [15:0]               step_count,
  output logic [N-1:0]              up,
  output logic [N-1:0]              down,
  output logic [N-1:0]              up_merge,
  output logic [N-1:0]              down_merge
);
  localparam int unsigned PW = $clog2(NA + 1);

  logic [PW-1:0] phase;

  // Accumulation-period controller.
  always_ff @(posedge clk) begin
    if (!rst_n || u_load) begin
      phase <= '0;
      if (!rst_n) step_count <= '0;
    end else if (run) begin
      if (phase == PW'(NA - 1)) begin
        phase      <= '0;
        step_count <= step_count + 16'd1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  assign step = run && !u_load && (phase == PW'(NA - 1));

  for (genvar i = 0; i < N; i++) begin : g_neuron
    logic [N-1:0] w_load;
    for (genvar j = 0; j < N; j++) begin : g_wl
      assign w_load[j] = w_we && (w_row == i) && (w_col == j);
    end

    neuron #(
      .N       (N),
      .KIND    (KIND),
      .W_WIDTH (W_WIDTH),
      .U_WIDTH (U_WIDTH),
      .R_WIDTH (R_WIDTH),
      .ACT_SEED(R_WIDTH'(sn_pkg::mcode_seed(i, R_WIDTH))),
      .MUL_SEED(W_WIDTH'(sn_pkg::mcode_seed(i + N, W_WIDTH)))
    ) u_neuron (
      .clk, .rst_n,
      .x_in      (x_pulse),
      .w_load,
      .w_in      (w_data),
      .re        (step | u_load),
      .u_load,
      .u_init    (u_init[i]),
      .u         (u[i]),
      .x_pulse   (x_pulse[i]),
      .up        (up[i]),
      .down      (down[i]),
      .up_merge  (up_merge[i]),
      .down_merge(down_merge[i])
    );
  end

  initial assert (NA >= 1) else $fatal(1, "stochastic_neurosystem: NA must be at least 1");
endmodule
