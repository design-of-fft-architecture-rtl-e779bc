// ks_adder: Kogge-Stone parallel prefix adder, s = a + b + cin.
//
// Three parts, as in the usual prefix-adder picture. Pre-processing forms a
// propagate bit p_i = a_i ^ b_i and a generate bit g_i = a_i & b_i for every
// position (the carry-in is folded into the generate of bit 0). The prefix
// tree has log2(WIDTH) levels; at level k every position i >= 2^k combines
// its group (G, P) with the group 2^k places to its right:
//   G = G_i | (P_i & G_{i-2^k}),  P = P_i & P_{i-2^k}.
// Post-processing XORs each propagate bit with the carry into that bit.
// Purely combinational; WIDTH defaults to the 16-bit adder of the design.
// The carry-in port is this design's choice; it lets the same adder
// subtract (a + ~b + 1) in the complex multiplier.
module ks_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int LEVELS = $clog2(WIDTH) > 0 ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p;              // bit propagate
  logic [WIDTH-1:0] gg [LEVELS+1];  // group generate per level
  logic [WIDTH-1:0] pp [LEVELS+1];  // group propagate per level
  logic [WIDTH:0]   c;              // carry into each bit

  // pre-processing
  assign p     = a ^ b;
  assign pp[0] = p;
  assign gg[0] = {a[WIDTH-1:1] & b[WIDTH-1:1], (a[0] & b[0]) | (p[0] & cin)};

  // prefix tree
  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int D = 1 << k;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= D) begin : g_cell
        assign gg[k+1][i] = gg[k][i] | (pp[k][i] & gg[k][i-D]);
        assign pp[k+1][i] = pp[k][i] & pp[k][i-D];
      end else begin : g_pass
        assign gg[k+1][i] = gg[k][i];
        assign pp[k+1][i] = pp[k][i];
      end
    end
  end

  // post-processing
  assign c[0]          = cin;
  assign c[WIDTH:1]    = gg[LEVELS];
  assign s             = p ^ c[WIDTH-1:0];
  assign cout          = c[WIDTH];
endmodule
