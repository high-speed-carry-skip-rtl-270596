// Grey cell of the Kogge-Stone prefix network.
// Used where the less significant group already reaches the carry input:
// only the generate is needed, g = gi | (pi & gk), and it is the final
// carry of that bit position. Combinational.
module grey_cell (
  input  logic gi,
  input  logic pi,
  input  logic gk,
  output logic g
);
  assign g = gi | (pi & gk);
endmodule
