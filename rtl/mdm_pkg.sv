// Shared types and helpers for the data-aware modulo 2^n+1 multiplier.
//
// booth_t is the three-wire radix-4 Booth code that travels from a Booth
// encoder to its row of Booth selectors: `sign` asks for the one's complement
// of the selected multiple, `x1` selects the multiplicand, `x2` selects the
// multiplicand doubled. x1 and x2 are never both set; with both clear the
// digit is zero. The sign wire is set for a zero digit as well, which is this
// design's convention (see booth_encoder.sv): it turns an all-zero row into a
// fixed pattern that the correction term cancels.
package mdm_pkg;

  typedef struct packed {
    logic sign;
    logic x2;
    logic x1;
  } booth_t;

  // Number of 3:2 reduction levels needed to bring `ops` operands down to two.
  function automatic int csa_levels(input int ops);
    int cnt, lv;
    cnt = ops;
    lv  = 0;
    while (cnt > 2) begin
      cnt = 2 * (cnt / 3) + (cnt % 3);
      lv++;
    end
    return lv;
  endfunction

  // Operand count at reduction level `lv` of a tree that starts with `ops`.
  function automatic int csa_count(input int ops, input int lv);
    int cnt;
    cnt = ops;
    for (int i = 0; i < lv; i++) cnt = 2 * (cnt / 3) + (cnt % 3);
    return cnt;
  endfunction

endpackage
