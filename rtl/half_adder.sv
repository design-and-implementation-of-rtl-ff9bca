// half_adder: one-bit half adder (AND for the carry, XOR for the sum), the
// cell chained inside the incrementation block of a carry-skip stage.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic co
);
  assign sum = a ^ b;
  assign co  = a & b;
endmodule
