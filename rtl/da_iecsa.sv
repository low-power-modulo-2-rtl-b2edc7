// Data-aware inverted end-around carry-save adder (IECSA) stage.
//
// Reduces three W-bit residues modulo 2^W+1 to two: sum + carry = x + y + z + 1
// (mod 2^W+1). A row of full adders forms s and c; the carry out of the top
// bit has weight 2^W = -1, so it is fed back complemented into bit 0 of the
// shifted carry vector, carry = {c[W-2:0], ~c[W-1]}, which costs the constant
// +1 that the multiplier accounts for.
//
// Data awareness: the operands go through a master latch; the dynamic range
// detection unit looks for upper groups of GW bits that are pure sign
// extension in all three operands; the slave latch passes only the other
// groups to the full adders and holds the rest, so those adder bits do not
// switch. Because a full-adder row has no carries between bit positions, the
// held groups of s and c must equal the top bit of the highest live group;
// the sign generator and the bit restoration unit rebuild them from it before
// the end-around wrap. The result is therefore always exactly that of a
// plain IECSA; only the switching activity changes.
//
// Timing: in_valid with x/y/z is captured by the master latch on one edge and
// by the slave latch on the next; out_valid, sum and carry are valid from then
// on (two cycles of latency, one operation per cycle). hold_q shows which
// groups the current result skipped; its bit 0 is always 0, since group 0 is
// always added.
//
// The block structure (master latch, detection, slave latch, adder, sign
// control, sign generator, restoration) follows the published design.
// Clocked registers in place of latches and the two-cycle timing are this
// design's own.
module da_iecsa #(
  parameter int unsigned W  = 8,
  parameter int unsigned GW = 4,
  localparam int unsigned G = W / GW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  input  logic [W-1:0]   z,
  output logic           out_valid,
  output logic [W-1:0]   sum,
  output logic [W-1:0]   carry,
  output logic [G-1:0]   hold_q          // groups skipped by the current result
);

  logic [W-1:0] d_in [3];
  logic [W-1:0] m_q  [3];
  logic [W-1:0] s_q  [3];
  logic         m_valid;
  logic [G-1:0] hold;

  assign d_in[0] = x;
  assign d_in[1] = y;
  assign d_in[2] = z;

  master_latch #(.W(W), .NIN(3)) u_master (
    .clk, .rst_n, .load(in_valid), .d(d_in), .q(m_q), .valid(m_valid)
  );

  range_detect #(.W(W), .GW(GW), .NIN(3)) u_drd (
    .ops(m_q), .hold(hold)
  );

  slave_latch #(.W(W), .GW(GW), .NIN(3)) u_slave (
    .clk, .rst_n, .load(m_valid), .hold(hold), .d(m_q), .q(s_q),
    .hold_q(hold_q), .valid(out_valid)
  );

  logic [W-1:0] s_raw, c_raw, s_rest, c_rest;
  logic [G-1:0] sctrl;
  logic         s_sign, c_sign;

  csa_row #(.W(W)) u_add (
    .x(s_q[0]), .y(s_q[1]), .z(s_q[2]), .s(s_raw), .c(c_raw)
  );

  sign_ctrl #(.G(G)) u_sctrl (.hold(hold_q), .sctrl(sctrl));

  sign_gen #(.W(W), .GW(GW)) u_sgen_s (.vec(s_raw), .sctrl(sctrl), .sign(s_sign));
  sign_gen #(.W(W), .GW(GW)) u_sgen_c (.vec(c_raw), .sctrl(sctrl), .sign(c_sign));

  bit_restore #(.W(W), .GW(GW)) u_rest_s (
    .vec(s_raw), .hold(hold_q), .sign(s_sign), .out(s_rest)
  );
  bit_restore #(.W(W), .GW(GW)) u_rest_c (
    .vec(c_raw), .hold(hold_q), .sign(c_sign), .out(c_rest)
  );

  assign sum   = s_rest;
  assign carry = {c_rest[W-2:0], ~c_rest[W-1]};

endmodule
