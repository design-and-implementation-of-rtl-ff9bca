// cska_rca: M-bit ripple carry adder of one stage of the concatenation-
// incrementation carry-skip adder (CI-CSKA).
//
// A chain of M full adders adds the stage's operand slices. In the CI-CSKA
// only the first stage's RCA sees the adder's carry-in; every other stage
// ties ci to 0 ("concatenation"), so all RCAs work in parallel and their
// sum bits are the stage's intermediate results Z. The carry out of the last
// full adder is C_j, used by the stage's skip logic.
//
// Ports: a, b (M bits), ci; z (M bits, intermediate sum), c (carry out C_j).
// Combinational, delay of M full-adder carry steps.
// Structure follows the source; M's default (2) is this design's choice.
module cska_rca #(
  parameter int unsigned M = 2
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci,
  output logic [M-1:0] z,
  output logic         c
);
  logic [M:0] carry;
  assign carry[0] = ci;

  for (genvar i = 0; i < M; i++) begin : g_fa
    full_adder u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (carry[i]),
      .sum(z[i]),
      .co (carry[i+1])
    );
  end

  assign c = carry[M];
endmodule
