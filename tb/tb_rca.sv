// Self-checking testbench of the ripple carry block.
// Applies every operand and carry combination of a 4-bit block and of a
// 1-bit block, plus random vectors to a 16-bit block, and compares
// {cout, s} with the integer sum a + b + cin.
module tb_rca;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;   logic c4, co4;
  logic [0:0]  a1, b1, s1;   logic c1, co1;
  logic [15:0] a16, b16, s16; logic c16, co16;

  rca #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .cin(c4),  .s(s4),  .cout(co4));
  rca #(.WIDTH(1))  dut1  (.a(a1),  .b(b1),  .cin(c1),  .s(s1),  .cout(co1));
  rca #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4 + b4 + c4)) begin
        failures++;
        $display("rca4 mismatch a=%h b=%h cin=%b -> %b%h", a4, b4, c4, co4, s4);
      end
    end
    for (int i = 0; i < 8; i++) begin
      {c1, a1, b1} = 3'(i);
      #1;
      checks++;
      if ({co1, s1} !== 2'(a1 + b1 + c1)) failures++;
    end
    for (int i = 0; i < 2000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      if (i == 0) begin a16 = 16'hffff; b16 = 16'h0000; c16 = 1'b1; end
      #1;
      checks++;
      if ({co16, s16} !== 17'(a16 + b16 + c16)) begin
        failures++;
        $display("rca16 mismatch a=%h b=%h cin=%b", a16, b16, c16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
