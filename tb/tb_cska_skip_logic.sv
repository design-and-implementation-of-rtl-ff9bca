// tb_cska_skip_logic: exhaustive self-checking test of the skip gate in
// both forms. The AOI form takes the true incoming carry and gives the
// complemented stage carry; the OAI form takes the complemented incoming
// carry and gives the true one. Both must realise
//   CO,j = C_j | (all Z bits 1 & CO,j-1).
module tb_cska_skip_logic;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0] z;
  logic       c, co_prev;
  logic       aoi_out, oai_out;

  cska_skip_logic #(.OAI(1'b0)) dut_aoi (.z(z), .c(c), .co_in(co_prev),  .co_out(aoi_out));
  cska_skip_logic #(.OAI(1'b1)) dut_oai (.z(z), .c(c), .co_in(~co_prev), .co_out(oai_out));

  function automatic logic ref_co(logic [1:0] zz, logic cc, logic cp);
    if (cc) return 1'b1;
    if (zz == 2'b11) return cp;
    return 1'b0;
  endfunction

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {c, co_prev, z} = 4'(v);
      @(posedge clk);
      checks += 2;
      if (aoi_out !== ~ref_co(z, c, co_prev)) begin
        failures++;
        $display("AOI z=%b c=%b cp=%b -> %b", z, c, co_prev, aoi_out);
      end
      if (oai_out !== ref_co(z, c, co_prev)) begin
        failures++;
        $display("OAI z=%b c=%b cp=%b -> %b", z, c, co_prev, oai_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
