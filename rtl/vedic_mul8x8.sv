// vedic_mul8x8: 8x8 unsigned multiplier built from four 4x4 Vedic
// multipliers and three 8-bit CI-CSKA adders (top of the design).
//
// The operands are split into nibbles, and the four nibble products are
//   m1 = a[3:0]*b[3:0]   m2 = a[7:4]*b[3:0]
//   m3 = a[3:0]*b[7:4]   m4 = a[7:4]*b[7:4]
// They are combined by overlapping addition:
//   ADDER-1  m5 = m2 + m3,             carry C1 (weight 2^12)
//   ADDER-2  m6 = m5 + m1[7:4],        carry C2 (weight 2^12)
//   ADDER-3  p[15:8] = m4 + m7,  m7 = {3'b0, C1|C2, m6[7:4]}
//   p[7:4] = m6[3:0],  p[3:0] = m1[3:0]
// C1 and C2 are never both 1 (m2 + m3 + m1[7:4] <= 464 < 512), so their OR
// is their sum. ADDER-3 never carries out (the product fits 16 bits).
//
// Ports: a, b (8 bits); p (16-bit product). Combinational: one 4x4 product
// then three chained 8-bit adders; no clock, one result per input change.
// The nibble split, the four 4x4 multipliers and the three adders follow
// the source's block diagram. That diagram brings only ADDER-1's carry to
// ADDER-3; this design also brings in ADDER-2's carry, without which some
// products (for example 242*255, where m5 = 255 and m1[7:4] = 1) would
// come out wrong.
module vedic_mul8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] m1, m2, m3, m4, m5, m6, m7;
  logic       c1, c2, c3_unused;

  vedic_mul4x4 u_mul_hh (.a(a[7:4]), .b(b[7:4]), .p(m4));
  vedic_mul4x4 u_mul_lh (.a(a[3:0]), .b(b[7:4]), .p(m3));
  vedic_mul4x4 u_mul_hl (.a(a[7:4]), .b(b[3:0]), .p(m2));
  vedic_mul4x4 u_mul_ll (.a(a[3:0]), .b(b[3:0]), .p(m1));

  // ADDER-1: cross products.
  ci_cska #(.N(8)) u_adder1 (
    .a (m3),
    .b (m2),
    .ci(1'b0),
    .s (m5),
    .co(c1)
  );

  // ADDER-2: upper nibble of the low product.
  ci_cska #(.N(8)) u_adder2 (
    .a (m5),
    .b ({4'b0000, m1[7:4]}),
    .ci(1'b0),
    .s (m6),
    .co(c2)
  );

  // ADDER-3: high product plus the carried-over middle bits.
  assign m7 = {3'b000, c1 | c2, m6[7:4]};

  ci_cska #(.N(8)) u_adder3 (
    .a (m4),
    .b (m7),
    .ci(1'b0),
    .s (p[15:8]),
    .co(c3_unused)
  );

  assign p[7:4] = m6[3:0];
  assign p[3:0] = m1[3:0];
endmodule
