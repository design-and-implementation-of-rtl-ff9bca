// tb_cska_rca: exhaustive self-checking test of the stage ripple carry
// adder at M = 2 (default) and M = 4. Every a, b and carry-in is applied
// and {c, z} is compared with the integer sum a + b + ci.
module tb_cska_rca;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0] a2, b2, z2;
  logic       ci2, c2;
  logic [3:0] a4, b4, z4;
  logic       ci4, c4;

  cska_rca dut2 (.a(a2), .b(b2), .ci(ci2), .z(z2), .c(c2));
  cska_rca #(.M(4)) dut4 (.a(a4), .b(b4), .ci(ci4), .z(z4), .c(c4));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {ci2, a2, b2} = 5'(v);
      @(posedge clk);
      checks++;
      if ({c2, z2} !== 3'(a2 + b2 + ci2)) begin
        failures++;
        $display("M=2 %0d+%0d+%0d -> %0d", a2, b2, ci2, {c2, z2});
      end
    end
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      @(posedge clk);
      checks++;
      if ({c4, z4} !== 5'(a4 + b4 + ci4)) begin
        failures++;
        $display("M=4 %0d+%0d+%0d -> %0d", a4, b4, ci4, {c4, z4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
