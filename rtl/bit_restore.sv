// Bit (word length) restoration unit.
//
// Rebuilds the full-width result of a data-aware stage: every group g >= 1
// whose hold bit is set is replaced by GW copies of the restored sign; the
// other groups, and group 0 always, pass through. For W = 16, GW = 4 this is
// the three 2:1 multiplexers on Sum[15:12], Sum[11:8], Sum[7:4] of the
// published figure, with Sum[3:0] wired straight through. Combinational.
module bit_restore #(
  parameter int unsigned W  = 16,          // word width (16 as drawn)
  parameter int unsigned GW = 4,
  localparam int unsigned G = W / GW
) (
  input  logic [W-1:0] vec,
  input  logic [G-1:0] hold,
  input  logic         sign,
  output logic [W-1:0] out
);

  always_comb begin
    out = vec;
    for (int g = 1; g < G; g++)
      if (hold[g]) out[g*GW +: GW] = {GW{sign}};
  end

endmodule
