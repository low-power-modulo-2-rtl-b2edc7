// Sign signal control generator.
//
// From the nested hold vector of the dynamic range detection unit it makes a
// one-hot select, sctrl[g] = 1 for the highest group g that is still added.
// The restored sign is taken from that group's top bit:
//   sctrl[G-1] = ~hold[G-1]                  (nothing held: top bit of word)
//   sctrl[g]   =  hold[g+1] & ~hold[g]       (1 <= g < G-1)
//   sctrl[0]   =  hold[1]                    (only group 0 added)
// For G = 4 these are the four s_control signals of the published figure,
// built there with two 2:1 multiplexers. Combinational.
module sign_ctrl #(
  parameter int unsigned G = 4              // number of groups, >= 2 (4 as drawn)
) (
  input  logic [G-1:0] hold,                // hold[0] is ignored
  output logic [G-1:0] sctrl
);

  always_comb begin
    sctrl        = '0;
    sctrl[G-1]   = ~hold[G-1];
    for (int g = 1; g < G - 1; g++) sctrl[g] = hold[g+1] & ~hold[g];
    sctrl[0]     = hold[1];
  end

endmodule
