// Stochastic neuron.
//
// Implements one neuron of the discrete-time network
//   u_i(t+1) = sum_j w_ij x_j(t),   x_i(t) = f(u_i(t))
// with pulse streams. N synapses multiply the input streams x_in[j] by the
// weights w_ij and route the product pulses to Up or Down by the sign of the
// weight. The Up pulses of all synapses are merged into one line, the Down
// pulses into another, and drive an up/down counter of U_WIDTH adder cells.
// After N_a cycles the network controller pulses re: the counter is read out
// (and cleared) into the membrane-potential register u, which the activation
// function turns into the output stream x_pulse for the next period.
// Timing: u changes in the cycle after re; x_pulse follows the new u after the
// activation comparator's latency. u_load/u_init set u directly (start state
// of the network); u_load wins over re.
// Merging: like an SFQ confluence buffer, pulses that arrive on the same line
// in the same cycle merge into one. up_merge/down_merge flag a cycle where this
// happened (a count was lost). With MULT_COMPARATOR a single M-code generator
// per neuron supplies the random number of all its synapses.
// Follows the original SFQ design in its synapse multipliers, routing by sign, up/down counter
// of adder cells, read-out after N_a, comparator activation. This design's
// choices: the merge of several synapses into one counter, the u register,
// shared random numbers and the load port.
module neuron #(
  parameter int unsigned N       = 4,
  parameter sn_pkg::mult_kind_e KIND = sn_pkg::MULT_DIVIDER,
  parameter int unsigned W_WIDTH = 4,
  parameter int unsigned U_WIDTH = 9,
  parameter int unsigned R_WIDTH = 7,
  parameter logic [R_WIDTH-1:0] ACT_SEED = '0,
  parameter logic [W_WIDTH-1:0] MUL_SEED = '0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0]              x_in,
  input  logic [N-1:0]              w_load,
  input  logic [W_WIDTH:0]          w_in,
  input  logic                      re,
  input  logic                      u_load,
  input  logic signed [U_WIDTH-1:0] u_init,
  output logic signed [U_WIDTH-1:0] u,
  output logic                      x_pulse,
  output logic                      up,
  output logic                      down,
  output logic                      up_merge,
  output logic                      down_merge
);
  logic [N-1:0]         syn_up, syn_down;
  logic [W_WIDTH-1:0]   mul_rnd;
  logic [U_WIDTH-1:0]   cnt_o, cnt_count;
  logic                 cnt_valid;
  logic [R_WIDTH-1:0]   act_rnd;

  if (KIND == sn_pkg::MULT_COMPARATOR) begin : g_mul_rng
    mcode_gen #(.WIDTH(W_WIDTH), .SEED(MUL_SEED)) u_rng (.clk, .rst_n, .rnd(mul_rnd));
  end else begin : g_no_rng
    assign mul_rnd = '0;
  end

  for (genvar j = 0; j < N; j++) begin : g_syn
    synapse #(.KIND(KIND), .W_WIDTH(W_WIDTH)) u_syn (
      .clk, .rst_n,
      .w_load (w_load[j]),
      .w_in,
      .rnd    (mul_rnd),
      .x_pulse(x_in[j]),
      .up     (syn_up[j]),
      .down   (syn_down[j])
    );
  end

  assign up         = |syn_up;
  assign down       = |syn_down;
  assign up_merge   = (syn_up & (syn_up - 1'b1)) != '0;
  assign down_merge = (syn_down & (syn_down - 1'b1)) != '0;

  updown_counter #(.WIDTH(U_WIDTH)) u_cnt (
    .clk, .rst_n, .up, .down, .re,
    .o(cnt_o), .o_valid(cnt_valid), .count(cnt_count)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         u <= '0;
    else if (u_load)    u <= u_init;
    else if (cnt_valid) u <= signed'(cnt_o);
  end

  activation_function #(.U_WIDTH(U_WIDTH), .R_WIDTH(R_WIDTH), .SEED(ACT_SEED)) u_act (
    .clk, .rst_n, .u, .x_pulse, .rnd(act_rnd)
  );
endmodule
