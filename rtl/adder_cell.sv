// Adder cell: one bit of the up/down counter.
//
// A serial-input adder that stores one bit. Every input pulse adds one to the
// stored bit; when the bit was already 1 it returns to 0 and a carry pulse
// leaves for the next cell. A read pulse re sends the stored bit out as pulse o
// and clears the cell (destructive read-out, as the counter is cleared at the
// end of each accumulation period). q shows the stored bit for observation.
// In the SFQ cell pulses arrive one after another. Here two pulses (in_a and
// in_b) may arrive in the same clock, so one cycle adds s + in_a + in_b: the new
// bit is the sum bit and carry is the carry bit of a full adder. carry is
// combinational (the ripple of the counter settles within the cycle); s
// changes at the clock edge. Pulses that arrive together with re are added to
// the cleared cell, so they count towards the next period; o reports the bit
// held before them.
// Function after the original SFQ design; the two-pulse input and the timing of re are
// this design's choices.
module adder_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic in_a,
  input  logic in_b,
  input  logic re,
  output logic carry,
  output logic o,
  output logic q
);
  logic       s;
  logic       s_eff;
  logic [1:0] total;

  assign s_eff = s & ~re;
  assign total = 2'(s_eff) + 2'(in_a) + 2'(in_b);
  assign carry = total[1];
  assign o     = re & s;
  assign q     = s;

  always_ff @(posedge clk) begin
    if (!rst_n) s <= 1'b0;
    else        s <= total[0];
  end
endmodule
