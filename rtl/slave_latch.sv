// Slave latch of a data-aware adder stage.
//
// Copies the master latch's operands group by group. When `load` is high,
// group 0 is always copied, and group g >= 1 is copied only if the dynamic
// range detection unit does not mark it as sign extension (hold[g] = 0); a
// held group keeps its previous contents, so the adder bits behind it do not
// switch. The hold vector itself is captured alongside, because the bit
// restoration unit needs the controls that belong to the operands now in the
// slave latch. Timing: one clock edge after the master latch.
//
// Group-wise hold and pass follow the published design; the edge-triggered
// register with a per-group enable stands in for its level-sensitive latches.
// Reset clears `valid` and the captured hold vector only.
module slave_latch #(
  parameter int unsigned W   = 8,
  parameter int unsigned GW  = 4,
  parameter int unsigned NIN = 3,
  localparam int unsigned G  = W / GW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [G-1:0]     hold,
  input  logic [W-1:0]     d       [NIN],
  output logic [W-1:0]     q       [NIN],
  output logic [G-1:0]     hold_q,
  output logic             valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      hold_q <= '0;
    end else begin
      valid <= load;
      if (load) hold_q <= hold;
    end
  end

  for (genvar g = 0; g < G; g++) begin : g_grp
    always_ff @(posedge clk) begin
      if (load && !(g > 0 && hold[g])) begin
        for (int k = 0; k < NIN; k++) q[k][g*GW +: GW] <= d[k][g*GW +: GW];
      end
    end
  end

endmodule
