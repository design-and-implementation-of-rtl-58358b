// Shared types and constants of the stochastic SFQ neurosystem.
//
// The neurosystem works on pulse streams: one bit per clock cycle that is 1
// when a single-flux-quantum pulse is present in that cycle. This package holds
// what several modules share:
//   * mult_kind_e  - which of the two synaptic multipliers a synapse uses;
//   * cmp_res_t    - the two pulse outputs of a comparator stage (X: greater,
//                    Y: equal);
//   * mcode_taps() - feedback taps of a maximal-length (M-code) shift register;
//   * mcode_seed() - a per-instance start state so that generators of
//                    different neurons do not run in lock step.
// The tap table is the standard maximal-length table for an XNOR-feedback
// shift register; the original SFQ design only names a 4-bit M-code generator, the other
// widths are there so that the same generator serves the 7-bit random numbers
// of the activation function.
package sn_pkg;

  typedef enum logic [0:0] {
    MULT_DIVIDER    = 1'b0,  // TFF divider chain + NDRO weight bits
    MULT_COMPARATOR = 1'b1   // comparator against a random number + AND
  } mult_kind_e;

  // Result of one comparator stage: gt = output pulse X, eq = output pulse Y.
  typedef struct packed {
    logic gt;
    logic eq;
  } cmp_res_t;

  // Feedback mask of a maximal-length shift register of the given width.
  // Bit p-1 set means stage p (1 = newest) is fed back. XNOR feedback is used,
  // so the all-zero state is legal and the all-ones state is the lock-up state.
  function automatic logic [15:0] mcode_taps(input int unsigned width);
    case (width)
      2:       return 16'h0003;  // 2,1
      3:       return 16'h0006;  // 3,2
      4:       return 16'h000C;  // 4,3
      5:       return 16'h0014;  // 5,3
      6:       return 16'h0030;  // 6,5
      7:       return 16'h0060;  // 7,6
      8:       return 16'h00B8;  // 8,6,5,4
      9:       return 16'h0110;  // 9,5
      10:      return 16'h0240;  // 10,7
      11:      return 16'h0500;  // 11,9
      12:      return 16'h0829;  // 12,6,4,1
      13:      return 16'h100D;  // 13,4,3,1
      14:      return 16'h2015;  // 14,5,3,1
      15:      return 16'h6000;  // 15,14
      16:      return 16'hD008;  // 16,15,13,4
      default: return 16'h0000;
    endcase
  endfunction

  // A start state for generator number idx that is never the lock-up state.
  function automatic logic [15:0] mcode_seed(input int unsigned idx,
                                             input int unsigned width);
    logic [15:0] full;
    full = 16'((32'd1 << width) - 1);
    return 16'(((idx * 32'd37) + 32'd5) % (32'(full)));
  endfunction

endpackage
