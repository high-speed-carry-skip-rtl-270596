// Ripple carry adder block of WIDTH bits.
// A chain of full adders: bit i adds a[i], b[i] and the carry of bit i-1;
// the first bit takes cin and the last carry is cout. In the carry skip
// adder the first stage uses it with the external carry input, and the
// later stages with cin tied to 0, so that their sum is the intermediate
// result Z that the incrementation block corrects later.
// Combinational; the worst-case delay is WIDTH full-adder carry delays.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end

  assign cout = c[WIDTH];
endmodule
