// One ordinary stage of the carry skip adder: ripple carry block, skip
// logic and incrementation block (concatenation/incrementation scheme).
//
// The ripple carry block adds a and b with a zero carry input, giving the
// intermediate result z and the block carry. The skip logic forms the
// stage's carry out from the block carry, the all-ones test of z (the
// stage propagates an incoming carry exactly when z is all ones) and the
// incoming carry ci. The incrementation block then adds the true incoming
// carry to z. Because the block does not wait for ci, the ripple and the
// skip chain work in parallel, and ci only passes one compound gate.
//
// OAI selects the skip gate and with it the carry polarity:
//   OAI = 0: ci is a true carry, co is complemented (AOI gate);
//   OAI = 1: ci is complemented, co is a true carry (OAI gate).
// The block carry and the all-ones test are inverted for an OAI stage.
// Combinational.
module cska_stage #(
  parameter int unsigned WIDTH = 4,
  parameter bit          OAI   = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH-1:0] z;
  logic             c_blk;
  logic             z_ones;
  logic             c_in_true;

  rca #(.WIDTH(WIDTH)) u_rca (.a(a), .b(b), .cin(1'b0), .s(z), .cout(c_blk));

  assign z_ones = &z;

  skip_logic #(.OAI(OAI)) u_skip (
    .g  (OAI ? ~c_blk  : c_blk),
    .p  (OAI ? ~z_ones : z_ones),
    .ci (ci),
    .co (co)
  );

  assign c_in_true = OAI ? ~ci : ci;

  incrementation_block #(.WIDTH(WIDTH)) u_inc (.z(z), .inc(c_in_true), .s(s));
endmodule
