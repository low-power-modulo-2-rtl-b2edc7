// Data-aware IECSA tree: reduces OPS residues modulo 2^N+1 to a sum/carry
// pair with data-aware IECSA stages (da_iecsa).
//
// The tree is built level by level. At each level the operands are taken in
// order in threes, each three feeding one da_iecsa; the one or two operands
// left over are delayed by the same two cycles and placed first in the next
// level's list, followed by the sum and carry of each stage. For the default
// N = 8 (rows PP0..PP3 and the correction term C) this gives three levels:
// (PP0,PP1,PP2), then (PP3, C, sum), then (carry of the first stage and the
// sum and carry of the second). Each stage adds 1 modulo 2^N+1, so the output
// pair satisfies sum + carry = (sum of operands) + OPS - 2 (mod 2^N+1).
//
// Timing: two cycles per level; in_valid travels alongside as out_valid.
// lv_skip[l] reports, for the result now leaving level l, whether any stage
// of that level held a group: an observation port for the data-aware saving.
//
// The published drawing for N = 8 has the same data flow but draws a fourth,
// two-input stage that first combines C and PP3; here that pair enters a
// three-input stage directly, so the tree uses the minimum of OPS-2 stages
// and the constant bookkeeping of the multiplier balances exactly.
module iecsa_tree
  import mdm_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned GW  = 4,
  parameter int unsigned OPS = N / 2 + 1,
  localparam int unsigned L  = csa_levels(OPS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   ops [OPS],
  output logic           out_valid,
  output logic [N-1:0]   sum,
  output logic [N-1:0]   carry,
  output logic [L-1:0]   lv_skip        // level l skipped at least one group
);

  if (OPS < 3) begin : g_bad_ops
    $error("iecsa_tree: needs at least three operands");
  end

  logic [N-1:0] lv_ops   [L+1][OPS];
  logic         lv_valid [L+1];

  assign lv_ops[0]   = ops;
  assign lv_valid[0] = in_valid;

  for (genvar l = 0; l < L; l++) begin : g_lv
    localparam int unsigned CNT = csa_count(OPS, l);
    localparam int unsigned NFA = CNT / 3;
    localparam int unsigned REM = CNT % 3;
    logic [NFA-1:0] fa_valid;
    logic [NFA-1:0] fa_skip;

    for (genvar j = 0; j < NFA; j++) begin : g_fa
      logic [N/GW-1:0] hold_q;
      da_iecsa #(.W(N), .GW(GW)) u_da (
        .clk, .rst_n,
        .in_valid (lv_valid[l]),
        .x        (lv_ops[l][3*j]),
        .y        (lv_ops[l][3*j+1]),
        .z        (lv_ops[l][3*j+2]),
        .out_valid(fa_valid[j]),
        .sum      (lv_ops[l+1][REM+2*j]),
        .carry    (lv_ops[l+1][REM+2*j+1]),
        .hold_q   (hold_q)
      );
      assign fa_skip[j] = |hold_q;
    end

    // Leftover operands wait the two cycles of a stage.
    for (genvar r = 0; r < REM; r++) begin : g_pass
      logic [N-1:0] d1, d2;
      always_ff @(posedge clk) begin
        if (lv_valid[l]) d1 <= lv_ops[l][3*NFA+r];
        d2 <= d1;
      end
      assign lv_ops[l+1][r] = d2;
    end

    // Unused tail entries of the next level's list.
    for (genvar u = REM + 2 * NFA; u < OPS; u++) begin : g_tie
      assign lv_ops[l+1][u] = '0;
    end

    assign lv_valid[l+1] = fa_valid[0];
    assign lv_skip[l]    = |fa_skip;
  end

  assign sum       = lv_ops[L][0];
  assign carry     = lv_ops[L][1];
  assign out_valid = lv_valid[L];

endmodule
