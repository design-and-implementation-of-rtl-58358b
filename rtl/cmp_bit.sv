// 1-bit comparator, the first stage of the pipelined comparator.
//
// Compares one bit of A with the same bit of B and, one clock later, emits
// pulse X when a > b (a=1, b=0) or pulse Y when a == b; nothing when a < b.
// Like the clocked SFQ gate it stands for, the result is registered, so the
// block adds one cycle of latency. The gate function follows the original SFQ design; the
// synchronous reset that clears the outputs is this design's addition.
module cmp_bit (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             a,
  input  logic             b,
  output sn_pkg::cmp_res_t res
);
  always_ff @(posedge clk) begin
    if (!rst_n) res <= '0;
    else begin
      res.gt <= a & ~b;
      res.eq <= ~(a ^ b);
    end
  end
endmodule
