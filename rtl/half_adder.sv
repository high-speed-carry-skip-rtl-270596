// Half adder: sum = a XOR b, carry = a AND b.
// Purely combinational building block of the full adder and of the ripple
// carry blocks. No clock, no reset; outputs settle one gate delay after the
// inputs.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
