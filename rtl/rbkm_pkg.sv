// rbkm_pkg: shared types of the rounding-based approximate Karatsuba multiplier.
//
// round_mode_e selects how a rounding-based (RoBA) multiplier turns an operand
// into a power of two:
//   ROUND_NEAREST - nearest power of two; an operand exactly halfway between
//                   two powers (3 * 2^(k-1)) goes up. This is what the rounding
//                   approach is described as doing.
//   ROUND_DOWN    - the power of two of the leading one (truncation). This is
//                   what reproduces the intermediate values of the published
//                   16-bit simulation (244 is taken as 128).
// mid_mode_e selects how adder A3 forms the Karatsuba middle term from the
// three products p1 = AL*BL, p2 = AH*BH, p3 = (AH+AL)*(BH+BL):
//   MID_KARATSUBA  - p3 - p1 - p2, the Karatsuba identity.
//   MID_SUB_DIFF   - p3 - (p1 - p2), the combination the published 8-bit
//                    simulation shows (s3 = p1 - p2, s4 = p3 - s3).
package rbkm_pkg;

  typedef enum logic {
    ROUND_NEAREST = 1'b0,
    ROUND_DOWN    = 1'b1
  } round_mode_e;

  typedef enum logic {
    MID_KARATSUBA = 1'b0,
    MID_SUB_DIFF  = 1'b1
  } mid_mode_e;

  // Width of the two's-complement middle term for an N-bit multiplier.
  // p3 < 2^(N+2), p1, p2 < 2^N, so p3 - p1 - p2 lies in (-2^(N+1), 2^(N+2))
  // and needs N+3 bits; p3 - (p1 - p2) can reach 2^(N+2) + 2^N and needs N+4.
  function automatic int unsigned mid_width(int unsigned n, mid_mode_e mode);
    return (mode == MID_KARATSUBA) ? n + 3 : n + 4;
  endfunction

endpackage
