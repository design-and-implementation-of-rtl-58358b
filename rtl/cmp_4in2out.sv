// 4-input / 2-output comparator cell of the pipelined comparator tree.
//
// Takes the X (greater) and Y (equal) pulses of the comparison of a more
// significant part (hi) and of a less significant part (lo) and produces X and
// Y for the two parts taken together: greater if hi is greater, or hi is equal
// and lo is greater; equal only if both are equal. The result is registered
// (one cycle). Function as in the original SFQ design; insides and reset are this
// design's choice.
module cmp_4in2out (
  input  logic             clk,
  input  logic             rst_n,
  input  sn_pkg::cmp_res_t hi,
  input  sn_pkg::cmp_res_t lo,
  output sn_pkg::cmp_res_t res
);
  always_ff @(posedge clk) begin
    if (!rst_n) res <= '0;
    else begin
      res.gt <= hi.gt | (hi.eq & lo.gt);
      res.eq <= hi.eq & lo.eq;
    end
  end
endmodule
