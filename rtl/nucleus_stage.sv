// Nucleus stage of the carry skip adder: a Kogge-Stone parallel prefix
// adder in place of the ripple carry block, followed by skip logic.
//
// The prefix adder takes the true incoming carry as its carry input and
// delivers the stage's sum directly from its postprocessing, so this stage
// has no incrementation block. Its group generate and group propagate over
// the stage's bits drive the AOI/OAI skip gate that forms the carry out,
// exactly as the block carry and all-ones test do in an ordinary stage.
// g_grp and p_grp are also brought out: a carry that enters this stage
// reaches the stages above it only when p_grp is 1, which is what decides
// whether the long path through the adder is exercised.
// OAI has the same meaning as in cska_stage. Combinational.
module nucleus_stage #(
  parameter int unsigned WIDTH = 4,
  parameter bit          OAI   = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co,
  output logic             g_grp,
  output logic             p_grp
);
  logic c_in_true;

  assign c_in_true = OAI ? ~ci : ci;

  kogge_stone_ppa #(.WIDTH(WIDTH)) u_ppa (
    .a(a), .b(b), .cin(c_in_true), .s(s), .g_grp(g_grp), .p_grp(p_grp)
  );

  skip_logic #(.OAI(OAI)) u_skip (
    .g  (OAI ? ~g_grp : g_grp),
    .p  (OAI ? ~p_grp : p_grp),
    .ci (ci),
    .co (co)
  );
endmodule
