// roba_mult: W x W-bit rounding-based approximate multiplier (RoBA).
//
// Both operands are rounded to powers of two, Ar and Br (roba_round), and the
// product is approximated by
//     a * b  ~  Ar*b + Br*a - Ar*Br
// which equals a*b - (a - Ar)*(b - Br): the term dropped is the product of the
// two rounding errors. Since Ar and Br are powers of two, the three terms are
// shifts: Ar*b = b << log2(Ar), Br*a = a << log2(Br), Ar*Br = 1 << (sum of the
// exponents). A Kogge-Stone adder adds the first two and a second one
// subtracts the third (adds its complement with carry-in 1). An operand of 0
// clears every term it appears in, so 0 * b = 0.
//
// The multiplier is taken by the design from the rounding-based approximate
// multiplier it cites; the formula is that multiplier's, while the
// shifter-and-adder structure, the operand widths and the 2W-bit result are
// this design's choices. The result never exceeds 2W bits: the dropped error
// term is at most about a*b/9 in size.
//
// Ports: a, b (W bits), p (2W bits), a_up / b_up tell whether the operand was
// rounded up. Combinational.
module roba_mult
  import rbkm_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter round_mode_e RMODE = ROUND_NEAREST
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p,
  output logic           a_up,
  output logic           b_up
);

  localparam int unsigned EW = $clog2(W + 1);
  localparam int unsigned IW = 2 * W + 1;   // width of the partial sums

  logic [W:0]    ar, br;
  logic [EW-1:0] ea, eb;
  logic          za, zb;

  roba_round #(.W(W), .RMODE(RMODE)) u_round_a (
    .x(a), .pow2(ar), .exp(ea), .up(a_up), .zero(za)
  );
  roba_round #(.W(W), .RMODE(RMODE)) u_round_b (
    .x(b), .pow2(br), .exp(eb), .up(b_up), .zero(zb)
  );

  logic [IW-1:0] ar_b, br_a, ar_br;   // Ar*b, Br*a, Ar*Br
  always_comb begin
    ar_b  = za ? '0 : (IW'(b) << ea);
    br_a  = zb ? '0 : (IW'(a) << eb);
    ar_br = (za || zb) ? '0 : (IW'(1) << (IW'(ea) + IW'(eb)));
  end

  logic [IW-1:0] sum1, diff;
  logic          c1, c2;

  ks_adder #(.W(IW)) u_add (
    .a(ar_b), .b(br_a), .cin(1'b0), .sum(sum1), .cout(c1)
  );
  ks_adder #(.W(IW)) u_sub (
    .a(sum1), .b(~ar_br), .cin(1'b1), .sum(diff), .cout(c2)
  );

  assign p = diff[2*W-1:0];

endmodule
