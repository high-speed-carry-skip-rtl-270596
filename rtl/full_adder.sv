// Full adder made of two half adders and an OR of their carries.
// The first half adder adds a and b, the second adds its sum to the carry
// input; the carry output is set when either half adder carries. The
// two-half-adder structure follows the signal hierarchy of the reference
// simulation (a full adder holding two half adders and two internal
// carries). Combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic s1, c1, c2;

  half_adder ha1 (.a(a),  .b(b),   .s(s1), .c(c1));
  half_adder ha2 (.a(s1), .b(cin), .s(s),  .c(c2));

  assign cout = c1 | c2;
endmodule
