// tb_cska_incrementer: exhaustive self-checking test of the half-adder
// incrementation block at M = 2 (default) and M = 4. The output must be
// (z + cin) modulo 2^M: the block's own carry out is dropped by design.
module tb_cska_incrementer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0] z2, s2;
  logic       c2;
  logic [3:0] z4, s4;
  logic       c4;

  cska_incrementer dut2 (.z(z2), .cin(c2), .s(s2));
  cska_incrementer #(.M(4)) dut4 (.z(z4), .cin(c4), .s(s4));

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c2, z2} = 3'(v);
      @(posedge clk);
      checks++;
      if (s2 !== 2'((v & 3) + (v >> 2))) begin
        failures++;
        $display("M=2 z=%0d cin=%0d -> %0d", z2, c2, s2);
      end
    end
    for (int v = 0; v < 32; v++) begin
      {c4, z4} = 5'(v);
      @(posedge clk);
      checks++;
      if (s4 !== 4'((v & 15) + (v >> 4))) begin
        failures++;
        $display("M=4 z=%0d cin=%0d -> %0d", z4, c4, s4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
