// tb_vedic_mul4x4: exhaustive self-checking test of the 4x4 Vedic
// multiplier: all 256 operand pairs against the integer product.
module tb_vedic_mul4x4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] a, b;
  logic [7:0] p;

  vedic_mul4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      @(posedge clk);
      checks++;
      if (p !== 8'(a * b)) begin
        failures++;
        $display("%0d*%0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
