// Self-checking testbench of the incrementation block.
// Every intermediate result z of a 4-bit block with inc = 0 and 1 must give
// (z + inc) mod 16; a 16-bit block is checked on random values and on the
// all-ones wrap-around.
module tb_incrementation_block;
  int checks = 0, failures = 0;
  logic [3:0]  z4, s4;   logic inc4;
  logic [15:0] z16, s16; logic inc16;

  incrementation_block #(.WIDTH(4))  dut4  (.z(z4),  .inc(inc4),  .s(s4));
  incrementation_block #(.WIDTH(16)) dut16 (.z(z16), .inc(inc16), .s(s16));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {inc4, z4} = 5'(i);
      #1;
      checks++;
      if (s4 !== 4'(z4 + inc4)) begin
        failures++;
        $display("inc4 mismatch z=%h inc=%b s=%h", z4, inc4, s4);
      end
    end
    for (int i = 0; i < 1000; i++) begin
      z16 = (i == 0) ? 16'hffff : 16'($urandom);
      inc16 = (i < 2) ? 1'b1 : 1'($urandom);
      #1;
      checks++;
      if (s16 !== 16'(z16 + inc16)) begin
        failures++;
        $display("inc16 mismatch z=%h inc=%b s=%h", z16, inc16, s16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
