// Adder unit of a data-aware stage: one row of W full adders (a 3:2 carry-save
// row). Bit j gives the sum s[j] = x^y^z and the carry c[j] = maj(x,y,z); c[j]
// has weight 2^(j+1). The carry vector is returned unshifted so that bit
// restoration can work on it before the inverted end-around wrap (done in
// da_iecsa). Every bit depends only on the input bits in the same position,
// so groups whose inputs are held do not disturb the others.
// Purely combinational; the published design builds this row from full adders.
module csa_row #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end

endmodule
