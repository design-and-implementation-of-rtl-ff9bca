// cska_incrementer: incrementation block of stage j of the CI-CSKA.
//
// Adds the true carry out of the previous stage, CO,j-1, to the stage's
// intermediate results Z (the sum of its zero-carry-in RCA) with a chain of
// half adders: bit i sums Z[i] with the carry rippling from bit i-1. The
// top bit needs only the XOR, since the block's own carry out is never used:
// the stage carry comes from the skip logic instead, which keeps the
// increment off the carry path.
//
// Ports: z (M bits), cin (CO,j-1, true polarity); s (M bits, final sum S).
// Combinational, delay of M-1 AND steps plus one XOR.
// Follows the half-adder chain of the source; M is a parameter.
module cska_incrementer #(
  parameter int unsigned M = 2
) (
  input  logic [M-1:0] z,
  input  logic         cin,
  output logic [M-1:0] s
);
  logic [M-1:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < M - 1; i++) begin : g_ha
    half_adder u_ha (
      .a  (z[i]),
      .b  (carry[i]),
      .sum(s[i]),
      .co (carry[i+1])
    );
  end

  assign s[M-1] = z[M-1] ^ carry[M-1];
endmodule
