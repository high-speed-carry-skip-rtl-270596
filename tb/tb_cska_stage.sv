// Self-checking testbench of an ordinary carry skip stage.
// An AOI stage (true carry in, complemented carry out) and an OAI stage
// (complemented carry in, true carry out) of 4 bits are driven with every
// operand and carry value. Both must give s = (a + b + c) mod 16 and the
// carry out of a + b + c in their output polarity. The number of times the
// incoming carry was skipped through (all bits propagate, carry 1) is
// counted and must be non-zero.
module tb_cska_stage;
  int checks = 0, failures = 0, skips = 0;
  logic [3:0] a, b, s_aoi, s_oai;
  logic c, co_aoi, co_oai;
  logic [4:0] ref_sum;

  cska_stage #(.WIDTH(4), .OAI(1'b0)) dut_aoi (.a(a), .b(b), .ci(c),  .s(s_aoi), .co(co_aoi));
  cska_stage #(.WIDTH(4), .OAI(1'b1)) dut_oai (.a(a), .b(b), .ci(~c), .s(s_oai), .co(co_oai));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c, a, b} = 9'(i);
      ref_sum = 5'(a + b + c);
      if (((a ^ b) == 4'hf) && c) skips++;
      #1;
      checks += 4;
      if (s_aoi !== ref_sum[3:0]) begin failures++; $display("AOI sum a=%h b=%h c=%b", a, b, c); end
      if (co_aoi !== ~ref_sum[4]) begin failures++; $display("AOI co a=%h b=%h c=%b", a, b, c); end
      if (s_oai !== ref_sum[3:0]) begin failures++; $display("OAI sum a=%h b=%h c=%b", a, b, c); end
      if (co_oai !== ref_sum[4])  begin failures++; $display("OAI co a=%h b=%h c=%b", a, b, c); end
    end
    checks++;
    if (skips == 0) failures++;
    $display("skips=%0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
