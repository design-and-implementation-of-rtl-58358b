// Multi-bit pipelined comparator.
//
// Compares two unsigned WIDTH-bit numbers A and B every clock. Stage 0 is a row
// of 1-bit comparators, one per bit; the stages after it form a binary tree of
// 4in-2out cells, each merging the (X, Y) pair of a more significant half with
// that of a less significant half. The root gives
//   gt (pulse X) : A >  B
//   eq (pulse Y) : A == B
//   neither      : A <  B
// Every cell is registered, so a new comparison enters every cycle (the
// throughput does not depend on WIDTH) and the result appears LATENCY =
// 1 + ceil(log2(WIDTH)) cycles after A and B were applied: 3 cycles for the
// original SFQ design's 4-bit comparator. When WIDTH is not a power of two the missing
// top bits are treated as equal (0 against 0) and need no cell.
// The structure follows the original SFQ design; the padding rule and the reset are this
// design's choices.
module pipelined_comparator #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             gt,
  output logic             eq
);
  localparam int unsigned LEVELS  = $clog2(WIDTH);
  localparam int unsigned PADDED  = 1 << LEVELS;

  // node[l][k]: result of level l, node k (node 0 is the least significant).
  sn_pkg::cmp_res_t node [LEVELS+1][PADDED];

  for (genvar k = 0; k < PADDED; k++) begin : g_bits
    if (k < WIDTH) begin : g_cell
      cmp_bit u_bit (.clk, .rst_n, .a(a[k]), .b(b[k]), .res(node[0][k]));
    end else begin : g_pad
      assign node[0][k] = '{gt: 1'b0, eq: 1'b1};
    end
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    for (genvar k = 0; k < (PADDED >> l); k++) begin : g_node
      if ((k << l) >= WIDTH) begin : g_pad
        // Both halves are padding only: always equal, no cell needed.
        assign node[l][k] = '{gt: 1'b0, eq: 1'b1};
      end else begin : g_cell
        cmp_4in2out u_merge (
          .clk, .rst_n,
          .hi (node[l-1][2*k+1]),
          .lo (node[l-1][2*k]),
          .res(node[l][k])
        );
      end
    end
  end

  assign gt = node[LEVELS][0].gt;
  assign eq = node[LEVELS][0].eq;
endmodule
