// vedic_mul4x4: 4x4 unsigned multiplier by the Urdhva Tiryagbhyam
// ("vertically and crosswise") method.
//
// Step k (k = 0..6) of the method takes the vertical/crosswise products
// a[i] & b[k-i] of one column and counts them: s_k, at most 4. Instead of
// rippling each step's carry into the next step, the seven column counts
// are packed into three 8-bit words whose fields do not overlap,
//   w0 = s0 @0 | s2 @2 | s4 @4 | s6 @6   (s0, s6 <= 1; s2, s4 <= 3)
//   w1 = s1 @1 | s5 @5                   (s1, s5 <= 2)
//   w2 = s3 @3                           (s3 <= 4)
// and added with two 8-bit carry-skip adders (ci_cska): p = w0 + w1 + w2.
// The product is at most 225, so both adders' carry outs are always 0.
//
// Ports: a, b (4 bits); p (8-bit product). Combinational.
// The vertical-and-crosswise columns and the use of carry-skip adders for
// the partial-product addition follow the source; how the column counts are
// grouped into adder operands is this design's own choice.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  // Column counts s_k = number of ones among a[i] & b[k-i].
  logic [2:0] s [7];

  always_comb begin
    for (int k = 0; k < 7; k++) begin
      s[k] = '0;
      for (int i = 0; i < 4; i++) begin
        if (k - i >= 0 && k - i < 4) begin
          s[k] = s[k] + 3'(a[i] & b[k-i]);
        end
      end
    end
  end

  logic [7:0] w0, w1, w2, t;
  assign w0 = {1'b0, s[6][0], s[4][1:0], s[2][1:0], 1'b0, s[0][0]};
  assign w1 = {1'b0, s[5][1:0], 2'b00, s[1][1:0], 1'b0};
  assign w2 = {2'b00, s[3][2:0], 3'b000};

  logic co_unused0, co_unused1;

  ci_cska #(.N(8)) u_add0 (
    .a (w0),
    .b (w1),
    .ci(1'b0),
    .s (t),
    .co(co_unused0)
  );

  ci_cska #(.N(8)) u_add1 (
    .a (t),
    .b (w2),
    .ci(1'b0),
    .s (p),
    .co(co_unused1)
  );
endmodule
