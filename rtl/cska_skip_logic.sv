// cska_skip_logic: skip logic of stage j (j >= 2) of the CI-CSKA.
//
// The stage carry out is
//   CO,j = C_j | (&Z & CO,j-1)
// i.e. 1 when the stage's own RCA carried; otherwise, if every intermediate
// result bit is 1 (the "product" of Z), the incoming carry skips the stage,
// and if not, the carry is 0.
//
// To avoid inverters the gate is a compound AOI or OAI gate, and the two
// kinds alternate along the chain, so the carry polarity alternates:
//   OAI = 0 (AOI, even stages): co_in is CO,j-1 true, co_out is ~CO,j
//        co_out = ~((&z & co_in) | c)
//   OAI = 1 (OAI, odd stages):  co_in is ~CO,j-1, co_out is CO,j true
//        co_out = ~((~&z | co_in) & ~c)
// In the OAI stage the Z product is taken through a NAND and the RCA carry
// is used complemented, as in the source's stage drawing.
//
// Ports: z (M bits), c (C_j, true), co_in, co_out (polarity as above).
// Combinational, one compound gate from co_in to co_out.
// The function and the AOI/OAI alternation follow the source; the module
// boundary is this design's choice.
module cska_skip_logic #(
  parameter int unsigned M   = 2,
  parameter bit          OAI = 1'b0
) (
  input  logic [M-1:0] z,
  input  logic         c,
  input  logic         co_in,
  output logic         co_out
);
  logic p;
  assign p = &z;

  if (OAI) begin : g_oai
    logic p_n, c_n;
    assign p_n    = ~p;
    assign c_n    = ~c;
    assign co_out = ~((p_n | co_in) & c_n);
  end else begin : g_aoi
    assign co_out = ~((p & co_in) | c);
  end
endmodule
