// km_middle: Karatsuba middle term, adder A3 of the multiplier.
//
// From the three approximate products of an N-bit multiplication,
//   p1 = AL*BL (N bits), p2 = AH*BH (N bits), p3 = (AH+AL)*(BH+BL) (N+2 bits),
// it forms the term that is later shifted left by N/2:
//   MMODE = MID_KARATSUBA: mid = p3 - p1 - p2   (Karatsuba identity)
//   MMODE = MID_SUB_DIFF:  mid = p3 - (p1 - p2) (the combination the published
//                                                8-bit simulation shows)
// The first Kogge-Stone adder forms t = p1 + p2 or p1 - p2, the second one
// subtracts t from p3 (adds ~t with carry-in 1).
//
// With exact products the Karatsuba middle term AH*BL + AL*BH is never
// negative; with approximate products it can be, so mid is a two's-complement
// value of mid_width(N, MMODE) bits: N+3 for MID_KARATSUBA, N+4 for
// MID_SUB_DIFF (the block diagram gives the adder N+2 bits; the extra bits
// are this design's choice, needed to hold every signed result). neg is its
// sign. Combinational.
module km_middle
  import rbkm_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter mid_mode_e   MMODE = MID_KARATSUBA,
  localparam int unsigned MW   = mid_width(N, MMODE)
) (
  input  logic [N-1:0]   p1,
  input  logic [N-1:0]   p2,
  input  logic [N+1:0]   p3,
  output logic [MW-1:0]  mid,
  output logic           neg
);

  logic [MW-1:0] t;
  logic          c_t, c_mid;

  // t = p1 + p2, or p1 - p2 = p1 + ~p2 + 1
  ks_adder #(.W(MW)) u_a3_t (
    .a   (MW'(p1)),
    .b   ((MMODE == MID_KARATSUBA) ? MW'(p2) : ~MW'(p2)),
    .cin ((MMODE == MID_KARATSUBA) ? 1'b0 : 1'b1),
    .sum (t),
    .cout(c_t)
  );

  // mid = p3 - t
  ks_adder #(.W(MW)) u_a3_mid (
    .a   (MW'(p3)),
    .b   (~t),
    .cin (1'b1),
    .sum (mid),
    .cout(c_mid)
  );

  assign neg = mid[MW-1];

endmodule
