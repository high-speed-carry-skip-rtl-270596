// Self-checking testbench of the Kogge-Stone prefix adder.
// 4-bit and 8-bit instances are checked exhaustively, a 32-bit one on
// random vectors. For each, the sum must equal (a + b + cin) mod 2**W, the
// group generate must equal the carry out of a + b alone, and the group
// propagate the AND of all a ^ b bits. The 8-bit worked example
// a = 8'hAA, b = 8'h24, cin = 0 must give sum 8'hCE and carry out 0, with
// the carry out formed outside as g_grp | p_grp & cin.
module tb_kogge_stone_ppa;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;    logic c4, g4, p4;
  logic [7:0]  a8, b8, s8;    logic c8, g8, p8;
  logic [31:0] a32, b32, s32; logic c32, g32, p32;

  kogge_stone_ppa #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .cin(c4),  .s(s4),  .g_grp(g4),  .p_grp(p4));
  kogge_stone_ppa #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(c8),  .s(s8),  .g_grp(g8),  .p_grp(p8));
  kogge_stone_ppa #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(c32), .s(s32), .g_grp(g32), .p_grp(p32));

  task automatic check(input string tag, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s mismatch", tag);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] full8;
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      check("ksa4 sum", s4 === 4'(a4 + b4 + c4));
      check("ksa4 g", g4 === 1'(5'(a4 + b4) >> 4));
      check("ksa4 p", p4 === &(a4 ^ b4));
    end
    for (int i = 0; i < 131072; i++) begin
      {c8, a8, b8} = 17'(i);
      #1;
      check("ksa8 sum", s8 === 8'(a8 + b8 + c8));
      check("ksa8 g", g8 === 1'(9'(a8 + b8) >> 8));
      check("ksa8 p", p8 === &(a8 ^ b8));
    end
    // Worked 8-bit example.
    a8 = 8'hAA; b8 = 8'h24; c8 = 1'b0;
    #1;
    full8 = {g8 | (p8 & c8), s8};
    check("example", full8 === 9'h0CE);
    for (int i = 0; i < 20000; i++) begin
      a32 = $urandom; b32 = $urandom; c32 = 1'($urandom);
      if (i == 0) begin a32 = 32'hffff_ffff; b32 = 32'h0; c32 = 1'b1; end
      #1;
      check("ksa32 sum", s32 === 32'(a32 + b32 + c32));
      check("ksa32 g", g32 === 1'(33'(a32 + b32) >> 32));
      check("ksa32 p", p32 === &(a32 ^ b32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
