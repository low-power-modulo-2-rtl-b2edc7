// Diminished-1 modulo 2^N+1 adder (final adder of the multiplier).
//
// Adds the two N-bit carry-save vectors with an inverted end-around carry:
// r = s + c + ~cout, where cout is the carry out of the N-bit sum s + c. This
// yields r = (s + c + 1) mod 2^N+1 as an (N+1)-bit weighted number in
// 0..2^N: if s + c >= 2^N the carry is dropped (-2^N = +1 mod 2^N+1),
// otherwise 1 is added and r may reach 2^N. Purely combinational.
//
// The published design uses a fast parallel-prefix diminished-1 adder taken
// from earlier work; this design writes the same function as a behavioural
// addition and leaves the carry structure to synthesis.
module dm1_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] s,
  input  logic [N-1:0] c,
  output logic [N:0]   r
);

  logic [N:0] raw;

  always_comb begin
    raw = {1'b0, s} + {1'b0, c};
    r   = {1'b0, raw[N-1:0]} + {{N{1'b0}}, ~raw[N]};
  end

endmodule
