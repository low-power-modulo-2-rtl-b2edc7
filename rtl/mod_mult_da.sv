// Low-power modulo 2^N+1 multiplier with a data-aware adder tree (top level).
//
// Computes P = A*B mod 2^N+1. A is given in diminished-1 form (a_dim = A-1 on
// N bits, a_zero = 1 when A = 0); B and the product P are ordinary weighted
// numbers on N+1 bits, 0..2^N. Inputs with b[N] = 1 must have b[N-1:0] = 0.
//
// Datapath:
//   1. ppg: N/2 radix-4 Booth encoders on B and rows of Booth selectors on A
//      give N/2 partial products, each the diminished-1 image of
//      D_i * 4^i * A (inverted circular shift by 2i places).
//   2. ctg: the correction vector C with a 1 in bit 2i for every zero digit.
//      Rows plus C add up to A*B - N/2 (mod 2^N+1).
//   3. iecsa_tree: N/2 - 1 data-aware inverted end-around carry-save stages
//      reduce the N/2 + 1 vectors to a sum/carry pair; each stage adds 1, so
//      the pair adds up to A*B - 1.
//   4. dm1_adder: the diminished-1 modulo adder adds the pair plus 1 and
//      returns the weighted residue, registered into p.
// In every tree stage the dynamic range detection unit finds upper bit groups
// that are pure sign extension in all three operands; the slave latches hold
// them, and the bit restoration unit rebuilds them, so the product is exact
// while fewer adder bits switch.
//
// lv_skip[l] is a combinational observation output: tree level l held at
// least one bit group for the result it is passing on (the power-saving event).
//
// Timing: one operation per cycle; p and out_valid appear 2*L+1 cycles after
// in_valid, where L is the number of tree levels (L = 3 and 7 cycles for
// N = 8). Reset (active low, asynchronous) clears the valid pipeline only.
//
// The Booth encoding with its modular fix-ups, the BS+/BS- rows, the
// correction term, the tree topology for N = 8, the data-aware stage and the
// final diminished-1 adder follow the published design. The pipeline
// registers standing in for its latches, the latency, the zero-digit sign
// convention and the minimal three-input tree are this design's choices.
module mod_mult_da
  import mdm_pkg::*;
#(
  parameter int unsigned N  = 8,           // modulus 2^N+1; even, >= 4
  parameter int unsigned GW = 4            // data-aware group width, N % GW == 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a_dim,              // A - 1 (diminished-1)
  input  logic         a_zero,             // A == 0
  input  logic [N:0]   b,                  // B, weighted, 0..2^N
  output logic         out_valid,
  output logic [N:0]   p,                  // A*B mod 2^N+1, weighted
  output logic [mdm_pkg::csa_levels(N/2+1)-1:0] lv_skip  // tree level held a group
);

  localparam int unsigned K   = N / 2;
  localparam int unsigned OPS = K + 1;

  if (N < 4 || N % 2 != 0) begin : g_bad_n
    $error("mod_mult_da: N must be even and at least 4");
  end

  logic [N-1:0] rows [K];
  booth_t       code [K];
  logic [N-1:0] corr;
  logic [N-1:0] ops  [OPS];

  ppg #(.N(N)) u_ppg (
    .a_dim(a_dim), .a_zero(a_zero), .b(b), .pp(rows), .code(code)
  );

  ctg #(.N(N)) u_ctg (.code(code), .corr(corr));

  always_comb begin
    for (int i = 0; i < K; i++) ops[i] = rows[i];
    ops[K] = corr;
  end

  logic         t_valid;
  logic [N-1:0] t_sum, t_carry;
  logic [N:0]   r;

  iecsa_tree #(.N(N), .GW(GW), .OPS(OPS)) u_tree (
    .clk, .rst_n, .in_valid(in_valid), .ops(ops),
    .out_valid(t_valid), .sum(t_sum), .carry(t_carry), .lv_skip(lv_skip)
  );

  dm1_adder #(.N(N)) u_dma (.s(t_sum), .c(t_carry), .r(r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= t_valid;
  end

  always_ff @(posedge clk) begin
    if (t_valid) p <= r;
  end

endmodule
