// ks_adder: W-bit Kogge-Stone parallel-prefix adder.
//
// sum = a + b + cin, cout is the carry out of bit W-1. Every adder of the
// multiplier (A1, A2, the middle-term adder A3 and the final adder) is this
// adder; subtraction is done by the caller as a + ~b + 1.
//
// How it works: bit-level generate g = a & b and propagate p = a ^ b are
// formed, the carry-in is folded in as the generate of a virtual bit -1, and
// ceil(log2(W+1)) prefix levels combine (G, P) pairs at distances 1, 2, 4, ...
// with the usual operator (G, P) o (G', P') = (G | P & G', P & P'). After the
// last level G[i] is the carry into bit i+1. The adder type is named by the
// multiplier's description; the prefix structure is the textbook
// Kogge-Stone one (every node at every level, fan-out of two).
//
// Purely combinational; no clock.
module ks_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  // position 0 is the carry-in, positions 1..W are bits 0..W-1
  localparam int unsigned NP     = W + 1;
  localparam int unsigned LEVELS = $clog2(NP);

  logic [NP-1:0] g_lvl [LEVELS+1];
  logic [NP-1:0] p_lvl [LEVELS+1];
  logic [W-1:0]  p_bit;

  assign p_bit    = a ^ b;
  assign g_lvl[0] = {a & b, cin};
  assign p_lvl[0] = {p_bit, 1'b0};

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;   // prefix distance at this level
    for (genvar i = 0; i < NP; i++) begin : g_node
      if (i >= D) begin : g_black
        assign g_lvl[l+1][i] = g_lvl[l][i] | (p_lvl[l][i] & g_lvl[l][i-D]);
        assign p_lvl[l+1][i] = p_lvl[l][i] & p_lvl[l][i-D];
      end else begin : g_pass
        assign g_lvl[l+1][i] = g_lvl[l][i];
        assign p_lvl[l+1][i] = p_lvl[l][i];
      end
    end
  end

  // carry into bit i is the group generate of positions [i:0] (i.e. bits i-1..-1)
  assign sum  = p_bit ^ g_lvl[LEVELS][W-1:0];
  assign cout = g_lvl[LEVELS][W];

endmodule
