// Self-checking testbench of the nucleus stage.
// AOI and OAI forms of a 4-bit nucleus are driven with every operand and
// carry value, an 8-bit AOI form with random values. Each must give
// s = (a + b + c) mod 2**W, the carry out in its output polarity, the group
// generate of a + b and the group propagate AND(a ^ b).
module tb_nucleus_stage;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s_aoi, s_oai;
  logic c, co_aoi, co_oai, g_aoi, p_aoi, g_oai, p_oai;
  logic [4:0] ref_sum;
  logic [7:0] a8, b8, s8;
  logic c8, co8, g8, p8;
  logic [8:0] ref8;

  nucleus_stage #(.WIDTH(4), .OAI(1'b0)) dut_aoi (.a(a), .b(b), .ci(c),  .s(s_aoi), .co(co_aoi), .g_grp(g_aoi), .p_grp(p_aoi));
  nucleus_stage #(.WIDTH(4), .OAI(1'b1)) dut_oai (.a(a), .b(b), .ci(~c), .s(s_oai), .co(co_oai), .g_grp(g_oai), .p_grp(p_oai));
  nucleus_stage #(.WIDTH(8), .OAI(1'b0)) dut8 (.a(a8), .b(b8), .ci(c8), .s(s8), .co(co8), .g_grp(g8), .p_grp(p8));

  task automatic check(input string tag, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s mismatch a=%h b=%h c=%b", tag, a, b, c);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c, a, b} = 9'(i);
      ref_sum = 5'(a + b + c);
      #1;
      check("AOI sum", s_aoi === ref_sum[3:0]);
      check("AOI co",  co_aoi === ~ref_sum[4]);
      check("OAI sum", s_oai === ref_sum[3:0]);
      check("OAI co",  co_oai === ref_sum[4]);
      check("g", g_aoi === 1'(5'(a + b) >> 4) && g_oai === g_aoi);
      check("p", p_aoi === &(a ^ b) && p_oai === p_aoi);
    end
    for (int i = 0; i < 5000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); c8 = 1'($urandom);
      ref8 = 9'(a8 + b8 + c8);
      #1;
      check("w8 sum", s8 === ref8[7:0]);
      check("w8 co", co8 === ~ref8[8]);
      check("w8 p", p8 === &(a8 ^ b8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
