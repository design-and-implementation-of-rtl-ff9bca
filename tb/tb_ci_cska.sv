// tb_ci_cska: self-checking test of the CI-CSKA adder.
//   - default size (N = 8, M = 2, four stages): all 2^17 inputs;
//   - N = 8, M = 3 (uneven last stage) and N = 9, M = 2 (odd number of
//     stages, so the final carry leaves an OAI gate): all inputs;
//   - variable stage sizes 1-2-3-2 (N = 8): all inputs;
//   - N = 16, M = 4 and variable sizes 2-3-4-4-3: 20000 random inputs.
// {co, s} is compared with the integer a + b + ci. The test also counts,
// for the default adder, the inputs where a carry skips a stage (that
// stage's RCA does not carry, all its intermediate bits are 1 and the
// incoming carry is 1), and where a stage's own RCA produces the carry;
// each must happen at least once.
module tb_ci_cska;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int skips = 0, generates = 0;

  logic [7:0]  a8, b8, s8, s8m3;
  logic [8:0]  a9, b9, s9;
  logic [15:0] a16, b16, s16;
  logic        ci, co8, co8m3, co9, co16;

  ci_cska                   dut8   (.a(a8),  .b(b8),  .ci(ci), .s(s8),   .co(co8));
  ci_cska #(.N(8),  .M(3))  dut8m3 (.a(a8),  .b(b8),  .ci(ci), .s(s8m3), .co(co8m3));
  ci_cska #(.N(9),  .M(2))  dut9   (.a(a9),  .b(b9),  .ci(ci), .s(s9),   .co(co9));
  ci_cska #(.N(16), .M(4))  dut16  (.a(a16), .b(b16), .ci(ci), .s(s16),  .co(co16));

  // Variable stage sizes 1-2-3-2 (8 bits) and 2-3-4-4-3 (16 bits).
  localparam int unsigned V8  [16] = '{0: 1, 1: 2, 2: 3, 3: 2, default: 0};
  localparam int unsigned V16 [16] = '{0: 2, 1: 3, 2: 4, 3: 4, 4: 3, default: 0};
  logic [7:0]  s8v;
  logic [15:0] s16v;
  logic        co8v, co16v;
  ci_cska #(.N(8),  .SIZES(V8))  dut8v  (.a(a8),  .b(b8),  .ci(ci), .s(s8v),  .co(co8v));
  ci_cska #(.N(16), .SIZES(V16)) dut16v (.a(a16), .b(b16), .ci(ci), .s(s16v), .co(co16v));

  // Count skip and generate events of the 4-stage, 2-bit-per-stage adder.
  task automatic count_events(logic [7:0] x, logic [7:0] y, logic cin);
    logic cy;
    cy = 1'((x[1:0] + y[1:0] + cin) >> 2);
    for (int j = 1; j < 4; j++) begin
      logic [2:0] t;
      t = 3'(x[2*j +: 2]) + 3'(y[2*j +: 2]);
      if (t[2]) generates++;
      else if (t[1:0] == 2'b11 && cy) skips++;
      cy = t[2] | (t[1:0] == 2'b11 && cy);
    end
  endtask

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a9 = '0; b9 = '0; a16 = '0; b16 = '0;
    for (int v = 0; v < (1 << 17); v++) begin
      {ci, a8, b8} = 17'(v);
      @(posedge clk);
      checks += 2;
      if ({co8, s8} !== 9'(a8 + b8 + ci)) begin
        failures++;
        if (failures < 20) $display("N=8 M=2: %0d+%0d+%0d -> %0d", a8, b8, ci, {co8, s8});
      end
      if ({co8m3, s8m3} !== 9'(a8 + b8 + ci)) begin
        failures++;
        if (failures < 20) $display("N=8 M=3: %0d+%0d+%0d -> %0d", a8, b8, ci, {co8m3, s8m3});
      end
      checks++;
      if ({co8v, s8v} !== 9'(a8 + b8 + ci)) begin
        failures++;
        if (failures < 20) $display("N=8 1-2-3-2: %0d+%0d+%0d -> %0d", a8, b8, ci, {co8v, s8v});
      end
      count_events(a8, b8, ci);
    end
    for (int v = 0; v < (1 << 19); v++) begin
      {ci, a9, b9} = 19'(v);
      #1;
      checks++;
      if ({co9, s9} !== 10'(a9 + b9 + ci)) begin
        failures++;
        if (failures < 10) $display("N=9 M=2: %0d+%0d+%0d -> %0d", a9, b9, ci, {co9, s9});
      end
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      ci  = 1'($urandom);
      @(posedge clk);
      checks++;
      if ({co16, s16} !== 17'(a16 + b16 + ci)) begin
        failures++;
        if (failures < 20) $display("N=16 M=4: %0d+%0d+%0d -> %0d", a16, b16, ci, {co16, s16});
      end
      checks++;
      if ({co16v, s16v} !== 17'(a16 + b16 + ci)) begin
        failures++;
        if (failures < 20) $display("N=16 2-3-4-4-3: %0d+%0d+%0d -> %0d", a16, b16, ci, {co16v, s16v});
      end
    end
    $display("skip events=%0d generate events=%0d", skips, generates);
    checks += 2;
    if (skips == 0) failures++;
    if (generates == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
