// full_adder: one-bit full adder, the cell of the ripple carry adders inside
// each carry-skip stage.
//   sum  = a ^ b ^ ci
//   co   = a&b | ci&(a^b)
// Purely combinational. Gate-level form is this design's own choice; the
// source only names "RCA" blocks.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  logic p;
  assign p   = a ^ b;
  assign sum = p ^ ci;
  assign co  = (a & b) | (ci & p);
endmodule
