// Skip logic of one carry skip stage, as an AOI or an OAI compound gate.
//
// A stage passes the carry it receives (ci) on when all its bits propagate
// (p), and otherwise delivers the carry its own block generates (g):
// carry_out = g | (p & carry_in). The gate inverts, so the carry changes
// polarity at every stage and the stages alternate between the two forms:
//   OAI = 0 (AOI): g, p, ci are true signals,     co = ~(g | (p & ci))
//   OAI = 1 (OAI): g, p, ci are complemented,     co = ~(g & (p | ci))
// In both cases co is the stage's carry out in the opposite polarity to its
// inputs. Using inverting compound gates instead of a 2:1 multiplexer and
// alternating AOI and OAI follow the described skip scheme; the port
// polarity convention is this design's. Combinational, one gate delay.
module skip_logic #(
  parameter bit OAI = 1'b0
) (
  input  logic g,
  input  logic p,
  input  logic ci,
  output logic co
);
  if (OAI) begin : g_oai
    assign co = ~(g & (p | ci));
  end else begin : g_aoi
    assign co = ~(g | (p & ci));
  end
endmodule
