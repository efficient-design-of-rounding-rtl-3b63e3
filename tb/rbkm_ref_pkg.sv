// rbkm_ref_pkg: arithmetic reference model used by the testbenches.
//
// Written with plain integer arithmetic, independently of the gate-level
// structure of the RTL (no prefix adders, no shifter tricks):
//   ref_round - nearest power of two found by comparing distances to the
//               powers below and above (ties go up), or the power below
//   ref_roba  - Ar*b + Br*a - Ar*Br
//   ref_rbkm  - one Karatsuba level with three ref_roba products, result
//               taken modulo 2^(2N)
package rbkm_ref_pkg;
  import rbkm_pkg::*;

  function automatic longint ref_round(longint x, round_mode_e mode);
    longint lo, hi;
    if (x <= 0) return 0;
    lo = 1;
    while (lo * 2 <= x) lo = lo * 2;
    hi = (lo == x) ? lo : lo * 2;
    if (mode == ROUND_DOWN) return lo;
    return ((x - lo) < (hi - x)) ? lo : hi;
  endfunction

  function automatic longint ref_roba(longint a, longint b, round_mode_e mode);
    longint ar, br;
    ar = ref_round(a, mode);
    br = ref_round(b, mode);
    return ar * b + br * a - ar * br;
  endfunction

  function automatic longint ref_mid(longint a, longint b, int n,
                                     round_mode_e rmode, mid_mode_e mmode);
    longint h, ah, al, bh, bl, p1, p2, p3;
    h  = longint'(1) << (n / 2);
    ah = a / h;  al = a % h;
    bh = b / h;  bl = b % h;
    p1 = ref_roba(al, bl, rmode);
    p2 = ref_roba(ah, bh, rmode);
    p3 = ref_roba(ah + al, bh + bl, rmode);
    return (mmode == MID_KARATSUBA) ? (p3 - p1 - p2) : (p3 - (p1 - p2));
  endfunction

  // full approximate product, not yet wrapped
  function automatic longint ref_rbkm_raw(longint a, longint b, int n,
                                          round_mode_e rmode, mid_mode_e mmode);
    longint h, ah, al, bh, bl, p1, p2;
    h  = longint'(1) << (n / 2);
    ah = a / h;  al = a % h;
    bh = b / h;  bl = b % h;
    p1 = ref_roba(al, bl, rmode);
    p2 = ref_roba(ah, bh, rmode);
    return p2 * h * h + ref_mid(a, b, n, rmode, mmode) * h + p1;
  endfunction

  function automatic longint ref_rbkm(longint a, longint b, int n,
                                      round_mode_e rmode, mid_mode_e mmode);
    longint r, m;
    m = longint'(1) << (2 * n);
    r = ref_rbkm_raw(a, b, n, rmode, mmode) % m;
    if (r < 0) r += m;
    return r;
  endfunction

endpackage
