// tb_vedic_mul8x8: end-to-end self-checking test of the 8x8 multiplier at
// its default (and only) configuration.
//   1. The published example a = 50, b = 77: product 3850, and the nibble
//      products and adder results m1..m6 = 26, 39, 8, 12, 47, 48.
//   2. All 65536 operand pairs against the integer product.
// It counts how often each mechanism of the design is exercised and fails
// if one never is:
//   - ADDER-1 carry (C1) carried into ADDER-3;
//   - ADDER-2 carry (C2) carried into ADDER-3;
//   - a carry skipping a stage in each of the three CI-CSKA adders.
// The multiplier is combinational; each vector is checked one clock later.
module tb_vedic_mul8x8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c1_events = 0, c2_events = 0;
  int skips [3] = '{0, 0, 0};

  logic [7:0]  a, b;
  logic [15:0] p;

  vedic_mul8x8 dut (.a(a), .b(b), .p(p));

  // Number of stages a carry skips in a 4-stage, 2-bit-per-stage adder.
  function automatic int skip_count(logic [7:0] x, logic [7:0] y);
    int   n = 0;
    logic cy;
    cy = 1'((x[1:0] + y[1:0]) >> 2);
    for (int j = 1; j < 4; j++) begin
      logic [2:0] t;
      t = 3'(x[2*j +: 2]) + 3'(y[2*j +: 2]);
      if (!t[2] && t[1:0] == 2'b11 && cy) n++;
      cy = t[2] | (t[1:0] == 2'b11 && cy);
    end
    return n;
  endfunction

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d, expected %0d (a=%0d b=%0d)", what, got, want, a, b);
    end
  endtask

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published simulation example.
    a = 8'd50;
    b = 8'd77;
    @(posedge clk);
    expect_eq("example p",  int'(p),      3850);
    expect_eq("example m1", int'(dut.m1), 26);
    expect_eq("example m2", int'(dut.m2), 39);
    expect_eq("example m3", int'(dut.m3), 8);
    expect_eq("example m4", int'(dut.m4), 12);
    expect_eq("example m5", int'(dut.m5), 47);
    expect_eq("example m6", int'(dut.m6), 48);

    // Exhaustive sweep.
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      @(posedge clk);
      expect_eq("product", int'(p), int'(a) * int'(b));
      if (dut.c1) c1_events++;
      if (dut.c2) c2_events++;
      skips[0] += skip_count(dut.m3, dut.m2);
      skips[1] += skip_count(dut.m5, {4'b0000, dut.m1[7:4]});
      skips[2] += skip_count(dut.m4, dut.m7);
    end

    $display("ADDER-1 carries=%0d ADDER-2 carries=%0d", c1_events, c2_events);
    $display("stage skips: ADDER-1=%0d ADDER-2=%0d ADDER-3=%0d", skips[0], skips[1], skips[2]);
    checks += 5;
    if (c1_events == 0) failures++;
    if (c2_events == 0) failures++;
    foreach (skips[i]) if (skips[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
