// Black cell of the Kogge-Stone prefix network.
// Merges a more significant group (gi, pi) with the adjacent less
// significant group (gk, pk): g = gi | (pi & gk), p = pi & pk.
// Combinational.
module black_cell (
  input  logic gi,
  input  logic pi,
  input  logic gk,
  input  logic pk,
  output logic g,
  output logic p
);
  assign g = gi | (pi & gk);
  assign p = pi & pk;
endmodule
