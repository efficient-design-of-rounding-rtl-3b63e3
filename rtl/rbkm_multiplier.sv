// rbkm_multiplier: N x N-bit rounding-based approximate Karatsuba multiplier.
//
// One level of Karatsuba decomposition whose three sub-multiplications are
// rounding-based approximate multipliers (roba_mult):
//   A = AH*2^(N/2) + AL,  B = BH*2^(N/2) + BL
//   p2 = AH*BH, p1 = AL*BL           (N/2 x N/2-bit RoBA multipliers)
//   c = AH + AL (adder A1), d = BH + BL (adder A2), N/2+1 bits each
//   p3 = c*d                         ((N/2+1) x (N/2+1)-bit RoBA multiplier)
//   mid = p3 - p1 - p2               (adder A3, km_middle)
//   P  = p2 << N  +  mid << N/2  +  p1   (final adder)
// The operand selectors and the two shifters are wiring. AH*BH << N and AL*BL
// occupy disjoint bit ranges of the 2N-bit result, so they are concatenated
// and the final Kogge-Stone adder adds only the sign-extended, shifted middle
// term to them; the block diagram draws one adder with three inputs.
//
// Following the description: the split into halves, Kogge-Stone adders for
// A1, A2, A3 and the final sum, three RoBA multipliers and the shifts by N and
// N/2. This design's choices: the 2N-bit product (wrapped modulo 2^(2N)),
// the signed N+3-bit (N+4 in MID_SUB_DIFF mode) middle term, and the two mode parameters (rbkm_pkg):
// RMODE picks nearest or downward rounding, MMODE the Karatsuba combination
// or the one in the published 8-bit simulation. RMODE = ROUND_DOWN with
// MMODE = MID_SUB_DIFF reproduces the published 8- and 16-bit waveforms
// (55*50 -> 2734, 500*10 -> 4256).
//
// Ports: a, b (N-bit unsigned operands), p (2N-bit approximate product).
// Purely combinational, no clock or reset; a result is valid one
// propagation delay after the operands settle. N must be even.
module rbkm_multiplier
  import rbkm_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter round_mode_e RMODE = ROUND_NEAREST,
  parameter mid_mode_e   MMODE = MID_KARATSUBA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned H  = N / 2;   // half width
  localparam int unsigned MW = mid_width(N, MMODE);   // middle-term width

  if (N % 2 != 0 || N < 4) begin : g_bad_n
    $error("rbkm_multiplier: N must be even and at least 4");
  end

  // operand selectors
  logic [H-1:0] ah, al, bh, bl;
  assign {ah, al} = a;
  assign {bh, bl} = b;

  // A1, A2: half sums
  logic [H:0] c, d;
  ks_adder #(.W(H)) u_a1 (.a(ah), .b(al), .cin(1'b0), .sum(c[H-1:0]), .cout(c[H]));
  ks_adder #(.W(H)) u_a2 (.a(bh), .b(bl), .cin(1'b0), .sum(d[H-1:0]), .cout(d[H]));

  // three rounding-based multipliers
  logic [N-1:0] p1, p2;
  logic [N+1:0] p3;
  logic         up_al, up_bl, up_ah, up_bh, up_c, up_d;

  roba_mult #(.W(H), .RMODE(RMODE)) u_m_high (
    .a(ah), .b(bh), .p(p2), .a_up(up_ah), .b_up(up_bh)
  );
  roba_mult #(.W(H), .RMODE(RMODE)) u_m_low (
    .a(al), .b(bl), .p(p1), .a_up(up_al), .b_up(up_bl)
  );
  roba_mult #(.W(H+1), .RMODE(RMODE)) u_m_sum (
    .a(c), .b(d), .p(p3), .a_up(up_c), .b_up(up_d)
  );

  // A3: middle term
  logic [MW-1:0] mid;
  logic          mid_neg;
  km_middle #(.N(N), .MMODE(MMODE)) u_a3 (
    .p1(p1), .p2(p2), .p3(p3), .mid(mid), .neg(mid_neg)
  );

  // shifters: p2 << N joined with p1, and mid << N/2 sign-extended to 2N bits
  logic [2*N-1:0] sh_outer, sh_mid;
  logic [2*N+MW-1:0] mid_ext;
  always_comb begin
    sh_outer = {p2, p1};
    mid_ext  = {{(2*N){mid[MW-1]}}, mid};
    sh_mid   = (2*N)'(mid_ext << H);
  end

  // final adder
  logic c_final;
  ks_adder #(.W(2*N)) u_a4 (
    .a(sh_outer), .b(sh_mid), .cin(1'b0), .sum(p), .cout(c_final)
  );

endmodule
