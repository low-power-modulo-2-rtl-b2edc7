// Booth selector (BS) cell: one bit of one partial-product row.
//
// It picks bit m of the multiplicand (x1) or bit m-1 (x2, the doubled
// multiplicand) and XORs it with the row's sign wire. A row is the multiplicand
// multiple circularly shifted left by 2i places, and the bits that wrap around
// from the top to the bottom are complemented (the inverted circular shift of
// diminished-1 arithmetic). Cells in those wrapped positions are the BS- type:
// INVERT = 1 complements the output. Cells in unwrapped positions are BS+
// (INVERT = 0). Purely combinational.
//
// The split into BS+ and BS- cells that take two neighbouring multiplicand bits
// follows the published design; the exact gate structure is this design's own.
module booth_selector
  import mdm_pkg::*;
#(
  parameter bit INVERT = 1'b0     // 0: BS+ cell, 1: BS- cell
) (
  input  booth_t code,
  input  logic   a_m,             // multiplicand bit m
  input  logic   a_m1,            // multiplicand bit m-1 (doubled multiple)
  output logic   pp               // partial-product bit
);

  always_comb pp = INVERT ^ code.sign ^ ((code.x1 & a_m) | (code.x2 & a_m1));

endmodule
