// Sign signal generator.
//
// Selects, with the one-hot sctrl from sign_ctrl, the top bit of the highest
// group of `vec` that was really computed. That bit is the value every held
// group above it must take. The published figure draws one latch per group
// top bit, S[15], S[11], S[7], S[3] for a 16-bit word, enabled by its
// s_control; here the selection is a combinational AND-OR because the slave
// latch already holds the controls steady for the whole cycle.
module sign_gen #(
  parameter int unsigned W  = 16,          // word width (16 as drawn)
  parameter int unsigned GW = 4,
  localparam int unsigned G = W / GW
) (
  input  logic [W-1:0] vec,
  input  logic [G-1:0] sctrl,
  output logic         sign
);

  always_comb begin
    sign = 1'b0;
    for (int g = 0; g < G; g++) sign = sign | (sctrl[g] & vec[g*GW + GW - 1]);
  end

endmodule
