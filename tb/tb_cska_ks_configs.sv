// Checks the carry skip adder in other configurations than the default:
//   12 bits, 4-bit stages, nucleus at stage 2 (odd stage count: the skip
//       chain ends on an OAI gate and cout needs no final inverter);
//   24 bits, 4-bit stages, nucleus in the last stage;
//   32 bits, 8-bit stages, nucleus at stage 2.
// The 12-bit adder is additionally checked exhaustively over the lowest 8
// bits of both operands with random upper bits. Every result is compared
// with a + b + cin.
module tb_cska_ks_configs;
  int checks = 0, failures = 0;

  logic [11:0] a12, b12, s12; logic c12, co12, g12, p12;
  logic [23:0] a24, b24, s24; logic c24, co24, g24, p24;
  logic [31:0] a32, b32, s32; logic c32, co32, g32, p32;

  cska_ks_top #(.WIDTH(12), .STAGE(4), .NUCLEUS(2)) dut12 (
    .a(a12), .b(b12), .cin(c12), .s(s12), .cout(co12), .nucleus_g(g12), .nucleus_p(p12));
  cska_ks_top #(.WIDTH(24), .STAGE(4), .NUCLEUS(6)) dut24 (
    .a(a24), .b(b24), .cin(c24), .s(s24), .cout(co24), .nucleus_g(g24), .nucleus_p(p24));
  cska_ks_top #(.WIDTH(32), .STAGE(8), .NUCLEUS(2)) dut32 (
    .a(a32), .b(b32), .cin(c32), .s(s32), .cout(co32), .nucleus_g(g32), .nucleus_p(p32));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s mismatch", tag);
    end
  endtask

  initial begin
    for (int i = 0; i < 131072; i++) begin
      a12 = {4'($urandom), 8'(i)};
      b12 = {4'($urandom), 8'(i >> 8)};
      c12 = 1'(i >> 16);
      #1;
      check("w12", {co12, s12} === 13'(a12 + b12 + c12));
      check("w12 nucleus", g12 === 1'((5'(a12[7:4]) + 5'(b12[7:4])) >> 4) && p12 === &(a12[7:4] ^ b12[7:4]));
    end
    for (int i = 0; i < 50000; i++) begin
      a24 = 24'($urandom); b24 = 24'($urandom); c24 = 1'($urandom);
      a32 = $urandom;      b32 = $urandom;      c32 = 1'($urandom);
      if (i % 3 == 0) begin b24 = ~a24; b32 = ~a32; end
      #1;
      check("w24", {co24, s24} === 25'(a24 + b24 + c24));
      check("w24 nucleus", p24 === &(a24[23:20] ^ b24[23:20]) &&
                           g24 === 1'((5'(a24[23:20]) + 5'(b24[23:20])) >> 4));
      check("w32", {co32, s32} === 33'(a32 + b32 + c32));
      check("w32 nucleus", p32 === &(a32[15:8] ^ b32[15:8]) &&
                           g32 === 1'((9'(a32[15:8]) + 9'(b32[15:8])) >> 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
