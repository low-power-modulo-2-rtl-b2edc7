// Correction term generator (CTG).
//
// Produces the n-bit correction vector C = (... 0 x_1 0 x_0), with x_i in bit
// 2i. x_i is set when Booth encoder i encodes a zero digit, detected as the
// XNOR of that encoder's x1 and x2 wires (they are never both high, so the
// XNOR is high exactly when both are low). Purely combinational.
//
// Why it works: a zero row leaves the selectors as the fixed pattern 2^n - 4^i,
// which is 4^i less (mod 2^n+1) than the diminished-1 image of zero that the
// rest of the arithmetic expects; adding x_i * 4^i puts it back. The vector
// form and the XNOR follow the published design.
module ctg
  import mdm_pkg::*;
#(
  parameter int unsigned N = 8             // modulus is 2^N + 1, N even
) (
  input  booth_t           code [N/2],
  output logic   [N-1:0]   corr
);

  always_comb begin
    corr = '0;
    for (int i = 0; i < N / 2; i++) corr[2*i] = ~(code[i].x1 ^ code[i].x2);
  end

endmodule
