// Dynamic range detection unit (DRD) of a data-aware adder stage.
//
// The W-bit operands are split into G = W/GW groups of GW bits. For every
// group g >= 1 and every operand, a comparator checks that the GW+1 bits from
// the top of group g down to the top bit of group g-1 are all equal
// (precontrol: the group is only a sign extension of the bits below it). For
// W = 16, GW = 4 these windows are bits [15:11], [11:7] and [7:3].
// Group g can be left out of the addition when its precontrol and those of
// every group above it hold for all operands: hold[g] is the AND of those
// precontrols. hold is therefore nested: hold[g] implies hold[g+1].
// Group 0 is always added, so hold[0] is always 0. Purely combinational.
//
// The overlapping comparator windows and the AND of the operands' precontrols
// follow the published figures. Making each group's control the AND over all
// groups above it (so that a group is never skipped under a live one) is this
// design's reading of those figures.
module range_detect #(
  parameter int unsigned W   = 16,         // word width (16 as in the published drawing)
  parameter int unsigned GW  = 4,          // group width
  parameter int unsigned NIN = 2,          // operands (A and B in the drawing)
  localparam int unsigned G  = W / GW
) (
  input  logic [W-1:0]   ops  [NIN],
  output logic [G-1:0]   hold               // 1: group is sign extension only
);

  if (G < 2 || W % GW != 0) begin : g_bad_size
    $error("range_detect: W must be a multiple of GW with at least two groups");
  end

  logic [G-1:0] pre;                         // precontrol, all operands ANDed

  always_comb begin
    pre = '0;
    for (int g = 1; g < G; g++) begin
      pre[g] = 1'b1;
      for (int k = 0; k < NIN; k++) begin
        // comparator: window bits all ones or all zeros
        logic [GW:0] win;
        win    = ops[k][g*GW-1 +: GW+1];
        pre[g] = pre[g] & ((&win) | ~(|win));
      end
    end
    hold        = '0;
    hold[G-1]   = pre[G-1];
    for (int g = G - 2; g >= 1; g--) hold[g] = pre[g] & hold[g+1];
  end

endmodule
