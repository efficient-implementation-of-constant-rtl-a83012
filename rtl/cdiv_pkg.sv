// cdiv_pkg -- shared types and elaboration-time functions of the constant
// coefficient dividers.
//
// A division by a constant d (or a multiplication by a constant fraction n/d)
// is replaced by one multiplication by an integer constant A followed by a
// K-bit right shift:  y = floor(x * A / 2^K),  with A close to n * 2^K / d.
// The functions below pick A for a given K under one of three criteria (A just
// below, nearest to, or just above the ideal value n*2^K/d), pair each
// criterion with the output rounding it compensates, compute the range of
// inputs for which the quotient is provably identical to the ideal one, and
// search for the smallest K whose coefficient covers a whole input word.
//
// The package also gives the canonical signed digit (CSD) recoding used by
// the full-precision constant multiplier: the number of adders is reduced by
// representing A with digits in {-1, 0, +1} and no two adjacent non-zeros.
//
// Everything here is evaluated while the design is elaborated; nothing in it
// becomes hardware by itself.  The limit of 62 bits for 2^K keeps all
// arithmetic inside a 64-bit longint.
package cdiv_pkg;

  // How A is chosen around the ideal value n*2^K/d.
  typedef enum logic [1:0] {
    CRIT_LOWER   = 2'd0,  // largest A with A/2^K <= n/d  (floor)
    CRIT_NEAREST = 2'd1,  // A/2^K nearest to n/d         (round half up)
    CRIT_UPPER   = 2'd2   // smallest A with A/2^K >= n/d (ceiling)
  } crit_e;

  // How the final shift disposes of the dropped bits (underflow strategy).
  typedef enum logic [1:0] {
    RND_TRUNC = 2'd0,  // floor
    RND_ROUND = 2'd1,  // round half up
    RND_CEIL  = 2'd2   // ceiling
  } rnd_e;

  localparam int unsigned MAX_K = 62;

  // Criterion that compensates an underflow strategy: truncation pulls
  // results down, so A is taken above the ideal value; ceiling pushes them up,
  // so A is taken below; rounding is unbiased, so A is the nearest value.
  function automatic crit_e crit_for(input rnd_e rnd);
    case (rnd)
      RND_ROUND: return CRIT_NEAREST;
      RND_CEIL:  return CRIT_LOWER;
      default:   return CRIT_UPPER;
    endcase
  endfunction

  // Multiplying constant for a given K and criterion.
  function automatic longint unsigned coef_a(input longint unsigned n,
                                             input longint unsigned d,
                                             input int unsigned     k,
                                             input crit_e           crit);
    longint unsigned num;
    num = n << k;
    case (crit)
      CRIT_LOWER:   return num / d;
      CRIT_NEAREST: return (2 * num + d) / (2 * d);
      default:      return (num + d - 1) / d;
    endcase
  endfunction

  // Exclusive upper limit of the range of exactitude: every x with
  // 0 <= x < limit gives the same quotient from x*A/2^K as from x*n/d, when
  // the quotient is truncated (A upper-nearest), taken by ceiling (A
  // lower-nearest) or rounded (A nearest; the bound assumes an odd d, for
  // which x*n/d never lies on a rounding boundary).  With e = |A*d - n*2^K|
  // the error of x*A/2^K is x*e/(d*2^K); it must stay below 1/d (1/(2d) when
  // rounding), so limit = floor(2^K/e) (floor(2^K/(2e))).  For truncation this
  // is the exactness theorem's bound floor(A*d/(A*d - 2^K)) - 1.  Returns all
  // ones when A/2^K equals n/d, and 0 when A lies on the wrong side of n*2^K/d
  // for the criterion (no guarantee then).
  function automatic longint unsigned exact_limit(input longint unsigned n,
                                                  input longint unsigned d,
                                                  input longint unsigned a,
                                                  input int unsigned     k,
                                                  input crit_e           crit = CRIT_UPPER);
    longint unsigned ad, n2k, e;
    ad  = a * d;
    n2k = n << k;
    if (ad == n2k) return '1;
    case (crit)
      CRIT_UPPER: begin
        if (ad < n2k) return 0;
        return (64'd1 << k) / (ad - n2k);
      end
      CRIT_LOWER: begin
        if (ad > n2k) return 0;
        return (64'd1 << k) / (n2k - ad);
      end
      default: begin
        e = (ad > n2k) ? ad - n2k : n2k - ad;
        return (64'd1 << k) / (2 * e);
      end
    endcase
  endfunction

  // Smallest K for which the coefficient chosen by crit is exact over every
  // XW-bit unsigned input.
  function automatic int unsigned min_k_exact(input longint unsigned n,
                                              input longint unsigned d,
                                              input int unsigned     xw,
                                              input crit_e           crit = CRIT_UPPER);
    for (int unsigned k = 1; k <= MAX_K; k++) begin
      if (exact_limit(n, d, coef_a(n, d, k, crit), k, crit) >= (64'd1 << xw))
        return k;
    end
    return MAX_K;
  endfunction

  // Number of bits needed to hold v (at least 1).
  function automatic int unsigned bits_of(input longint unsigned v);
    int unsigned b;
    b = 1;
    while (b < 64 && (v >> b) != 0) b++;
    return b;
  endfunction

  // Canonical signed digit form of a, as two masks: bit i of csd_pos(a) is
  // set where the digit is +1, bit i of csd_neg(a) where it is -1, so that
  // a = csd_pos(a) - csd_neg(a) and no two adjacent digits are non-zero.
  function automatic logic [63:0] csd_mask(input longint unsigned a, input bit neg);
    logic [63:0]     pos_m, neg_m;
    longint unsigned rem;
    pos_m = '0;
    neg_m = '0;
    rem   = a;
    for (int unsigned i = 0; i < 63; i++) begin
      if (rem[0]) begin
        if (rem[1]) begin       // ...11: digit -1, carry into the next bits
          neg_m[i] = 1'b1;
          rem      = rem + 1;
        end else begin          // ...01: digit +1
          pos_m[i] = 1'b1;
          rem      = rem - 1;
        end
      end
      rem = rem >> 1;
    end
    return neg ? neg_m : pos_m;
  endfunction

  function automatic logic [63:0] csd_pos(input longint unsigned a);
    return csd_mask(a, 1'b0);
  endfunction

  function automatic logic [63:0] csd_neg(input longint unsigned a);
    return csd_mask(a, 1'b1);
  endfunction

endpackage
