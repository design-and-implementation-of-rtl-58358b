// M-code (maximal-length pseudo-random) number generator.
//
// A WIDTH-stage shift register whose new bit is the inverted XOR (XNOR) of its
// tap stages, as in the original SFQ design's 4-bit generator built from an XOR, an
// inverter and D flip-flops. With the inverter in the loop the all-zero state
// lies on the maximal cycle, so the generator runs from the state its flip-flops
// power up in and needs no start signal; it visits every WIDTH-bit value except
// all-ones, with period 2**WIDTH - 1.
//
// Interface: rnd is the whole register, read in parallel as a WIDTH-bit random
// number that changes every clock. rst_n (synchronous, active low) loads SEED;
// the SFQ circuit has no reset, SEED = 0 matches its power-up state. The other
// widths and the seed are this design's additions.
module mcode_gen #(
  parameter int unsigned WIDTH = 4,
  parameter logic [WIDTH-1:0] SEED = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] rnd
);
  localparam logic [15:0] TAPS16 = sn_pkg::mcode_taps(WIDTH);
  localparam logic [WIDTH-1:0] TAPS = TAPS16[WIDTH-1:0];

  logic fb;
  assign fb = ~(^(rnd & TAPS));

  always_ff @(posedge clk) begin
    if (!rst_n) rnd <= SEED;
    else        rnd <= {rnd[WIDTH-2:0], fb};
  end

  initial begin
    assert (WIDTH >= 2 && WIDTH <= 16) else $fatal(1, "mcode_gen: WIDTH out of range");
    assert (SEED != '1) else $fatal(1, "mcode_gen: SEED is the lock-up state");
  end
endmodule
