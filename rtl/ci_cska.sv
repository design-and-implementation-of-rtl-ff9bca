// ci_cska: N-bit concatenation-incrementation carry-skip adder (CI-CSKA).
//
// The adder is cut into Q = ceil(N/M) stages of M bits (the last stage takes
// what is left). Stage 1 is a plain RCA that adds a[M-1:0] + b[M-1:0] + ci
// and gives the true carry CO,1. Every later stage j has
//   - an RCA with carry-in 0 (concatenation), giving intermediate results Z
//     and its own carry C_j, all stages in parallel;
//   - an incrementation block that adds CO,j-1 to Z to give the stage's sum;
//   - skip logic giving CO,j = C_j | (&Z & CO,j-1) from C_j, Z and CO,j-1,
//     never from the incrementer's carry.
// Skip gates alternate AOI (stages 2, 4, ...) and OAI (stages 3, 5, ...), so
// the carry chain holds the complement of the carry after every even stage.
// Each incrementer and the final carry out get the true polarity back.
//
// Ports: a, b (N bits), ci; s (N bits), co (carry out, true polarity).
// Combinational. Critical path: stage 1 RCA, Q-2 skip gates, last
// incrementer.
// Stage sizes: with SIZES left all zero every stage is M bits wide (fixed
// stage size). Giving SIZES (stage 1 first, ending with zeros, at most
// MAXQ stages, summing to N) selects a variable-stage-size adder instead.
//
// The stage structure and the AOI/OAI alternation follow the source. It
// allows fixed or variable stage sizes but gives none for 8 bits; this
// design defaults to a fixed stage size M = 2 (four stages for N = 8).
module ci_cska #(
  parameter int unsigned N            = 8,
  parameter int unsigned M            = 2,
  parameter int unsigned MAXQ         = 16,
  parameter int unsigned SIZES [MAXQ] = '{default: 0}
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co
);
  localparam bit VARIABLE = (SIZES[0] != 0);

  // Width of stage q (0 = stage 1).
  function automatic int unsigned stage_w(int unsigned q);
    int unsigned lo;
    if (VARIABLE) return SIZES[q];
    lo = q * M;
    return (N - lo < M) ? (N - lo) : M;
  endfunction

  // Number of stages.
  function automatic int unsigned num_stages();
    int unsigned total, n;
    if (!VARIABLE) return (N + M - 1) / M;
    total = 0;
    n     = 0;
    while (n < MAXQ && SIZES[n] != 0 && total < N) begin
      total += SIZES[n];
      n++;
    end
    return n;
  endfunction

  // Index of the lowest bit of stage q.
  function automatic int unsigned stage_lo(int unsigned q);
    int unsigned lo = 0;
    for (int unsigned i = 0; i < q; i++) lo += stage_w(i);
    return lo;
  endfunction

  localparam int unsigned Q = num_stages();

  if (stage_lo(Q) != N) begin : g_bad_sizes
    $error("ci_cska: stage sizes must add up to N");
  end

  // Carry chain as it leaves each stage's skip logic: true after odd stage
  // numbers (index 0, 2, ...), complemented after even stage numbers.
  logic [Q-1:0] chain;

  for (genvar q = 0; q < Q; q++) begin : g_stage
    localparam int unsigned LO = stage_lo(q);
    localparam int unsigned W  = stage_w(q);

    if (q == 0) begin : g_first
      // Stage 1: RCA only, its carry is CO,1.
      cska_rca #(.M(W)) u_rca (
        .a (a[LO +: W]),
        .b (b[LO +: W]),
        .ci(ci),
        .z (s[LO +: W]),
        .c (chain[0])
      );
    end else begin : g_rest
      logic [W-1:0] z;  // intermediate results Z
      logic         c;  // C_j, carry of the zero-carry-in RCA
      // The previous stage's carry in true polarity for the incrementer.
      logic co_prev;
      assign co_prev = (q % 2 == 1) ? chain[q-1] : ~chain[q-1];

      cska_rca #(.M(W)) u_rca (
        .a (a[LO +: W]),
        .b (b[LO +: W]),
        .ci(1'b0),
        .z (z),
        .c (c)
      );

      cska_incrementer #(.M(W)) u_inc (
        .z  (z),
        .cin(co_prev),
        .s  (s[LO +: W])
      );

      cska_skip_logic #(.M(W), .OAI(q % 2 == 0)) u_skip (
        .z     (z),
        .c     (c),
        .co_in (chain[q-1]),
        .co_out(chain[q])
      );
    end
  end

  assign co = (Q % 2 == 1) ? chain[Q-1] : ~chain[Q-1];
endmodule
