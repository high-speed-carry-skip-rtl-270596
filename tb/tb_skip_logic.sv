// Self-checking testbench of the AOI/OAI skip logic.
// For every block carry, propagate and incoming carry value, the reference
// carry out g | (p & ci) is computed on true signals; the AOI instance gets
// true inputs and must return it complemented, the OAI instance gets
// complemented inputs and must return it true.
module tb_skip_logic;
  int checks = 0, failures = 0;
  logic g, p, ci, co_aoi, co_oai, ref_co;

  skip_logic #(.OAI(1'b0)) dut_aoi (.g(g),  .p(p),  .ci(ci),  .co(co_aoi));
  skip_logic #(.OAI(1'b1)) dut_oai (.g(~g), .p(~p), .ci(~ci), .co(co_oai));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {g, p, ci} = 3'(i);
      ref_co = (i >= 4) || (i == 3);   // generate, or propagate with carry in
      #1;
      checks += 2;
      if (co_aoi !== ~ref_co) begin
        failures++;
        $display("AOI mismatch g=%b p=%b ci=%b co=%b", g, p, ci, co_aoi);
      end
      if (co_oai !== ref_co) begin
        failures++;
        $display("OAI mismatch g=%b p=%b ci=%b co=%b", g, p, ci, co_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
