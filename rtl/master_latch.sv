// Master latch of a data-aware adder stage.
//
// Captures the stage's NIN operands, W bits each, on the rising clock edge
// when `load` is high and keeps them otherwise; `valid` tracks whether the
// captured operands belong to a real operation. The dynamic range detection
// unit and the slave latch both read from here.
//
// The published design uses level-sensitive latches; this design uses an
// edge-triggered register so the whole multiplier stays a single-clock
// synchronous circuit. Reset clears `valid` only.
module master_latch #(
  parameter int unsigned W   = 8,          // operand width
  parameter int unsigned NIN = 3           // number of operands
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [W-1:0]     d     [NIN],
  output logic [W-1:0]     q     [NIN],
  output logic             valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= 1'b0;
    else        valid <= load;
  end

  always_ff @(posedge clk) begin
    if (load) q <= d;
  end

endmodule
