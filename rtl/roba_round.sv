// roba_round: rounds a W-bit unsigned operand to a power of two.
//
// This is the rounding stage of a rounding-based approximate multiplier
// (RoBA). With the leading one of x at bit m:
//   ROUND_NEAREST: pow2 = 2^(m+1) when x[m-1] is 1 (x >= 1.5 * 2^m, so the
//                  halfway value 3 * 2^(m-1) rounds up), else 2^m.
//   ROUND_DOWN:    pow2 = 2^m.
// x = 0 gives pow2 = 0, exp = 0 and zero = 1, so that every product term
// formed with it is 0.
//
// Outputs: pow2 (W+1 bits, one-hot or 0; 2^W is reachable when rounding up),
// exp = log2(pow2), which drives the barrel shifters of roba_mult, and up,
// set when the operand was rounded up. The description names the rounding
// (to the nearest power of two); the leading-one search and the rounding
// rule written here are this design's own. Combinational.
module roba_round
  import rbkm_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter round_mode_e RMODE = ROUND_NEAREST,
  localparam int unsigned EW   = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  output logic [W:0]    pow2,
  output logic [EW-1:0] exp,
  output logic          up,
  output logic          zero
);

  logic [EW-1:0] lead;   // position of the leading one
  logic          below;  // the bit just below the leading one

  always_comb begin
    lead  = '0;
    below = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (x[i]) begin
        lead  = EW'(i);
        below = (i > 0) ? x[(i > 0) ? i - 1 : 0] : 1'b0;
      end
    end
  end

  always_comb begin
    zero = (x == '0);
    up   = (RMODE == ROUND_NEAREST) && below;
    exp  = lead + EW'(up);
    pow2 = zero ? '0 : ((W+1)'(1) << exp);
  end

endmodule
