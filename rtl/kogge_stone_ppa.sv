// Kogge-Stone parallel prefix adder used as the nucleus of the carry skip
// adder.
//
// Three parts, as in every prefix adder:
//  * preprocessing: per bit, generate g = a & b and propagate p = a ^ b;
//  * prefix network: the carry input sits at position 0 of the network as a
//    generate-only entry, operand bit i at position i+1. Level l (distance
//    2**l) combines each position with the one 2**l below it: a grey cell
//    where the lower group already reaches the carry input (its result is a
//    final carry), a black cell otherwise; positions below the distance are
//    passed on. After log2(WIDTH) levels every position below WIDTH holds
//    its carry, and the top position holds the group generate and group
//    propagate of all WIDTH operand bits (g_grp, p_grp);
//  * postprocessing: s[i] = p[i] ^ carry into bit i.
// The last merge of the top position with the carry input, which would give
// the carry out, is not done here: in the carry skip adder the stage's skip
// logic does it (carry_out = g_grp | p_grp & cin). With the carry input in
// the first row and one more grey cell at the top, this is the 8-bit
// network of the reference example. WIDTH must be a power of two.
// Combinational; log2(WIDTH) cell levels plus one XOR.
module kogge_stone_ppa #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             g_grp,
  output logic             p_grp
);
  localparam int unsigned LEVELS = $clog2(WIDTH);

  // Group generate/propagate of each network position after each level.
  logic [WIDTH:0] g [LEVELS+1];
  logic [WIDTH:0] p [LEVELS+1];
  logic [WIDTH-1:0] p_bit;

  initial begin
    assert (WIDTH >= 1 && (1 << LEVELS) == WIDTH)
      else $error("kogge_stone_ppa: WIDTH must be a power of two");
  end

  // Preprocessing.
  assign p_bit = a ^ b;
  assign g[0]  = {a & b, cin};
  assign p[0]  = {p_bit, 1'b0};

  // Prefix network.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i <= WIDTH; i++) begin : g_pos
      if (i < D) begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end else if (i - D < D) begin : g_grey
        // The lower group already covers the carry input.
        grey_cell u_cell (.gi(g[l][i]), .pi(p[l][i]), .gk(g[l][i-D]), .g(g[l+1][i]));
        assign p[l+1][i] = 1'b0;
      end else begin : g_black
        black_cell u_cell (.gi(g[l][i]), .pi(p[l][i]), .gk(g[l][i-D]), .pk(p[l][i-D]),
                         .g(g[l+1][i]), .p(p[l+1][i]));
      end
    end
  end

  // Postprocessing: carry into bit i is the final generate at position i.
  assign s     = p_bit ^ g[LEVELS][WIDTH-1:0];
  assign g_grp = g[LEVELS][WIDTH];
  assign p_grp = p[LEVELS][WIDTH];
endmodule
