// Carry skip adder with a Kogge-Stone nucleus stage (top level).
//
// WIDTH-bit adder, s + cout = a + b + cin, cut into STAGES = WIDTH/STAGE
// equal stages numbered 1 (least significant) to STAGES:
//  * stage 1: a plain ripple carry block with the external carry input;
//  * stage NUCLEUS: a Kogge-Stone prefix adder whose group generate and
//    propagate drive the skip gate (nucleus_stage);
//  * every other stage: ripple carry block with zero carry input, AOI/OAI
//    skip logic and incrementation block (cska_stage).
// The skip chain alternates AOI and OAI gates starting with AOI at stage 2,
// so the carry between stages k and k+1 is true for odd k and complemented
// for even k. When the last stage ends complemented (STAGES even) one
// inverter restores cout.
// nucleus_g / nucleus_p are the nucleus stage's group generate and
// propagate, brought out for a one-cycle/two-cycle latency predictor, which
// is not part of this RTL: when nucleus_p is 0 no carry path crosses the
// nucleus stage. Defaults: 32 bits, 4-bit stages, nucleus at stage 3.
// The stage size, width and nucleus position are this design's reading of
// the reference; the structure of the stages follows it.
// Purely combinational: no clock, no reset.
module cska_ks_top
  import cska_pkg::*;
#(
  parameter int unsigned WIDTH   = ADDER_WIDTH,
  parameter int unsigned STAGE   = STAGE_WIDTH,
  parameter int unsigned NUCLEUS = NUCLEUS_STAGE
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic             nucleus_g,
  output logic             nucleus_p
);
  localparam int unsigned STAGES = WIDTH / STAGE;

  initial begin
    assert (STAGES * STAGE == WIDTH && NUCLEUS >= 2 && NUCLEUS <= STAGES)
      else $error("cska_ks_top: WIDTH must be a multiple of STAGE, 2 <= NUCLEUS <= STAGES");
  end

  // chain[k] is the carry out of stage k, in the polarity pol(k).
  logic [STAGES:1] chain;

  function automatic carry_pol_e pol(input int unsigned k);
    return (k % 2 == 0) ? CARRY_INVERTED : CARRY_TRUE;
  endfunction

  rca #(.WIDTH(STAGE)) u_stage1 (
    .a(a[STAGE-1:0]), .b(b[STAGE-1:0]), .cin(cin), .s(s[STAGE-1:0]), .cout(chain[1])
  );

  for (genvar k = 2; k <= STAGES; k++) begin : g_stage
    localparam bit OAI = (pol(k - 1) == CARRY_INVERTED);
    localparam int unsigned LO = (k - 1) * STAGE;
    if (k == NUCLEUS) begin : g_nucleus
      nucleus_stage #(.WIDTH(STAGE), .OAI(OAI)) u_stage (
        .a(a[LO +: STAGE]), .b(b[LO +: STAGE]), .ci(chain[k-1]),
        .s(s[LO +: STAGE]), .co(chain[k]), .g_grp(nucleus_g), .p_grp(nucleus_p)
      );
    end else begin : g_plain
      cska_stage #(.WIDTH(STAGE), .OAI(OAI)) u_stage (
        .a(a[LO +: STAGE]), .b(b[LO +: STAGE]), .ci(chain[k-1]),
        .s(s[LO +: STAGE]), .co(chain[k])
      );
    end
  end

  assign cout = (pol(STAGES) == CARRY_INVERTED) ? ~chain[STAGES] : chain[STAGES];
endmodule
