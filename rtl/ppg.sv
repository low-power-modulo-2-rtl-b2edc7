// Partial product generator (PPG): radix-4 Booth encoders and selectors that
// turn A*B mod 2^N+1 into N/2 partial-product rows.
//
// Operands: A arrives in diminished-1 form (a_dim = A-1, a_zero set when A = 0)
// and B in ordinary weighted form on N+1 bits (b[N] is set only for B = 2^N,
// and the other bits are then zero). Row i holds, in diminished-1 form, the
// value D_i * 4^i * A where D_i is Booth digit i of B: the selected multiple
// (A, 2A, or their negatives through one's complement) is circularly shifted
// left by 2i places with the wrapped bits complemented.
//
// The digits are made modular at the two ends of B. Because 2^N = -1 mod
// 2^N+1, the carry-out weight of the top digit folds back into digit 0: encoder
// 0 reads the triplet (b[1]^b[N-1], b[0], b[N-1]), and encoder 1 reads
// (b[3], b[2], b[1] & ~b[N-1]) so that the case b[1] = b[N-1] = 1 borrows from
// digit 1 instead of needing the digit -3. For B = 2^N (b[N] set) encoder 0
// produces the digit -1. All other encoders read the plain triplet
// (b[2i+1], b[2i], b[2i-1]). With these inputs sum(D_i * 4^i) = B mod 2^N+1.
// That encoder 0 reads b[1], b[N-1] and b[N], that encoder 1 reads b[1] with
// the inverted b[N-1], and the BS+/BS- row layout follow the published
// drawings; the logic combining them was derived for this design, and how
// b[N] enters encoder 0 is this design's own choice.
//
// Purely combinational. code[] is exported for the correction term generator.
module ppg
  import mdm_pkg::*;
#(
  parameter int unsigned N = 8             // modulus is 2^N + 1, N even, >= 4
) (
  input  logic [N-1:0]     a_dim,          // diminished-1 multiplicand A-1
  input  logic             a_zero,         // A == 0
  input  logic [N:0]       b,              // weighted multiplier, 0..2^N
  output logic [N-1:0]     pp   [N/2],     // partial-product rows
  output booth_t           code [N/2]      // Booth codes, one per row
);

  localparam int unsigned K = N / 2;

  // Triplets after the modular fix-ups at digit 0 and digit 1.
  logic [K-1:0] t_hi, t_mid, t_lo;

  always_comb begin
    t_hi[0]  = (b[1] ^ b[N-1]) | b[N];
    t_mid[0] = b[0];
    t_lo[0]  = b[N-1] | b[N];
    for (int i = 1; i < K; i++) begin
      t_hi[i]  = b[2*i+1];
      t_mid[i] = b[2*i];
      t_lo[i]  = b[2*i-1];
    end
    t_lo[1] = b[1] & ~b[N-1];
  end

  // The doubled multiplicand in diminished-1 form is the inverted circular
  // shift by one: bit m-1 for m > 0, and the complemented top bit for m = 0.
  logic [N-1:0] a_dbl;
  assign a_dbl = {a_dim[N-2:0], ~a_dim[N-1]};

  for (genvar i = 0; i < K; i++) begin : g_row
    booth_encoder u_be (
      .b_hi  (t_hi[i]),
      .b_mid (t_mid[i]),
      .b_lo  (t_lo[i]),
      .a_zero(a_zero),
      .code  (code[i])
    );
    for (genvar j = 0; j < N; j++) begin : g_bit
      // Output bit j of row i takes multiplicand bit m of the unshifted
      // multiple; positions below 2i hold the wrapped, complemented bits.
      localparam int unsigned M   = (j >= 2 * i) ? (j - 2 * i) : (N - 2 * i + j);
      localparam bit          INV = (j < 2 * i);
      booth_selector #(.INVERT(INV)) u_bs (
        .code(code[i]),
        .a_m (a_dim[M]),
        .a_m1(a_dbl[M]),
        .pp  (pp[i][j])
      );
    end
  end

endmodule
