// Up/down counter built from a chain of adder cells.
//
// WIDTH adder cells are connected in series, each cell's carry driving the
// next cell. A pulse on up enters only the least significant cell (+1). A pulse
// on down enters every cell at once, i.e. the binary word 111...1 is added,
// which is -1 in two's complement; the carry out of the top cell is dropped, so
// the count wraps modulo 2**WIDTH. Up and down in the same cycle cancel.
// A pulse on re reads the count out of all cells in parallel (o, two's
// complement, valid in the cycle re is high, o_valid = re) and clears them;
// pulses arriving in that cycle count towards the next period.
// Interface: one up and one down pulse per clock at most. The count is also
// visible as count (not a read-out, for observation only).
// Structure after the original SFQ design (4 bits there, 9 bits inside the neuron); the
// synchronous form is this design's choice.
module updown_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             up,
  input  logic             down,
  input  logic             re,
  output logic [WIDTH-1:0] o,
  output logic             o_valid,
  output logic [WIDTH-1:0] count
);
  logic [WIDTH-1:0] carry;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    logic in_a, in_b;
    if (i == 0) begin : g_lsb
      assign in_a = up;
      assign in_b = down;
    end else begin : g_upper
      assign in_a = down;
      assign in_b = carry[i-1];
    end
    adder_cell u_cell (
      .clk, .rst_n, .in_a, .in_b, .re,
      .carry(carry[i]),
      .o    (o[i]),
      .q    (count[i])
    );
  end

  assign o_valid = re;
endmodule
