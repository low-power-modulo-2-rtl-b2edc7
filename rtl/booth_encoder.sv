// Radix-4 Booth encoder (BE) for one digit of the weighted multiplier B.
//
// It examines an overlapping triplet (b_hi, b_mid, b_lo) = (b[2i+1], b[2i],
// b[2i-1]) and encodes the digit -2*b_hi + b_mid + b_lo, an element of
// {-2,-1,0,+1,+2}, as the three wires sign / x2 / x1 of mdm_pkg::booth_t.
// a_zero is the zero flag of the diminished-1 multiplicand: when it is set the
// multiplicand is 0, so x1 and x2 are forced low and every row becomes a zero
// row. Purely combinational.
//
// The triplet scan, the three output wires and the gating by the multiplicand's
// zero flag follow the published design. Setting `sign` for a zero digit (the
// triplets 000 and 111, and any digit under a_zero) is this design's choice:
// it makes every zero row the same pattern, 2^n - 4^i, which the correction
// term then cancels exactly (see ctg.sv).
module booth_encoder
  import mdm_pkg::*;
(
  input  logic   b_hi,    // b[2i+1]
  input  logic   b_mid,   // b[2i]
  input  logic   b_lo,    // b[2i-1]
  input  logic   a_zero,  // multiplicand is zero (diminished-1 zero flag)
  output booth_t code
);

  logic one_x, two_x;

  always_comb begin
    one_x     = b_mid ^ b_lo;
    two_x     = (b_hi & ~b_mid & ~b_lo) | (~b_hi & b_mid & b_lo);
    code.x1   = one_x & ~a_zero;
    code.x2   = two_x & ~a_zero;
    code.sign = b_hi | ~(b_mid | b_lo) | a_zero;
  end

endmodule
