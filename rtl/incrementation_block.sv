// Incrementation block of one carry skip stage.
// The stage's ripple carry block adds its operands with a zero carry input
// and produces the intermediate result z. Once the true carry into the
// stage (inc) is known from the skip chain, this block adds it: s = z + inc.
// The carry out of the increment is not needed, because the skip logic
// already produces the stage's carry out from the block carry and the
// all-ones test on z. Built as a half-adder chain (the simplest
// incrementer); the structure is this design's choice, the function is the
// described one. Combinational, WIDTH half-adder delays worst case.
module incrementation_block #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] z,
  input  logic             inc,
  output logic [WIDTH-1:0] s
);
  // c[i] is the carry into bit i; the top bit needs no carry out.
  logic [WIDTH-1:0] c;

  assign c[0] = inc;

  for (genvar i = 0; i < WIDTH - 1; i++) begin : g_bit
    half_adder ha (.a(z[i]), .b(c[i]), .s(s[i]), .c(c[i+1]));
  end

  assign s[WIDTH-1] = z[WIDTH-1] ^ c[WIDTH-1];
endmodule
