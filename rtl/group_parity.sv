// group_parity: parity generator of the countermeasure.
//
// Reduces a 128-bit register to one parity bit per parity group: p[g] is the
// XOR of the bits aes_pkg::group_bit(g, m) for m = 0..GROUP_SIZE-1. With the
// FM grouping each group is the same bit of two diagonal cells, whose logic
// cones do not intersect, so one laser shot flips at most one bit of a group
// and the flip shows as an odd parity change. Purely combinational. Used for
// the flip-flops of the original design (calculated parity P_i) and for the
// duplicated next-state logic in the predictor (predicted parity).
module group_parity
  import aes_pkg::*;
(
  input  block_t v,   // protected register (or its predicted next value)
  output gpar_t  p    // one parity bit per group
);
  always_comb begin
    for (int g = 0; g < NGROUPS; g++) begin
      p[g] = 1'b0;
      for (int m = 0; m < GROUP_SIZE; m++) p[g] = p[g] ^ v[group_bit(g, m)];
    end
  end
endmodule
