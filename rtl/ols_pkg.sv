// ols_pkg: sizes and parity-check structure of an Orthogonal Latin Squares
// (OLS) code, shared by every module of the design.
//
// An OLS code protects k = m*m data bits with 2*t*m check bits and corrects
// up to t errors by one-step majority-logic decoding. The data bits are laid
// out as an m x m square, data bit d(i*m + j + 1) sitting at row i, column j.
// The check bits form 2t groups of m bits each:
//   group 0 (c1 .. cm)        : check a covers row a          (d1..d4 -> c1)
//   group 1 (cm+1 .. c2m)     : check a covers column a       (d1,d5,d9,d13 -> c5)
//   group g >= 2              : check a covers the cells where the Latin square
//                               L_(g-1)(i,j) = (g-1)*i + j equals a
// The first two groups are the ones of the original encoder and syndrome circuits
// of the design for k = 16, t = 1. The Latin squares of the higher groups are
// this package's own choice: for m a power of two the arithmetic is done in
// GF(m), otherwise modulo m, which gives mutually orthogonal squares when m is
// prime or a power of two and 2t - 2 <= m - 1. Every data bit then lies in
// exactly 2t checks and two data bits share at most one check, the two
// properties majority-logic decoding relies on.
//
// The membership function is evaluated only on constants (parameters and
// loop indices), so it turns into fixed XOR wiring after elaboration.
package ols_pkg;

  // Default code of the design: k = 16 data bits, t = 1, 8 check bits.
  parameter int unsigned M_DEFAULT = 4;
  parameter int unsigned T_DEFAULT = 1;

  // Primitive polynomial (with its x^p term) of GF(m) for m = 2^p.
  function automatic int unsigned gf_poly(input int unsigned m);
    case (m)
      4:       return 'h7;
      8:       return 'hB;
      16:      return 'h13;
      32:      return 'h25;
      64:      return 'h43;
      128:     return 'h89;
      256:     return 'h11D;
      default: return 0;
    endcase
  endfunction

  function automatic bit is_pow2(input int unsigned m);
    return (m != 0) && ((m & (m - 1)) == 0);
  endfunction

  // Product a*b in GF(m), m = 2^p, shift-and-add with reduction.
  function automatic int unsigned gf_mul(input int unsigned a, input int unsigned b,
                                         input int unsigned m);
    int unsigned acc;
    acc = 0;
    for (int k = 30; k >= 0; k--) begin
      if ((1 << k) < m) begin
        acc = acc << 1;
        if ((acc & m) != 0) acc = acc ^ gf_poly(m);
        if (((b >> k) & 1) != 0) acc = acc ^ a;
      end
    end
    return acc;
  endfunction

  // Entry (i, j) of Latin square number s (s >= 1).
  function automatic int unsigned latin(input int unsigned s, input int unsigned i,
                                        input int unsigned j, input int unsigned m);
    if (is_pow2(m) && m >= 4) return gf_mul(s, i, m) ^ j;
    else                      return (s * i + j) % m;
  endfunction

  // 1 when data bit dat (1-based, 1 .. m*m) takes part in check bit chk
  // (1-based, 1 .. 2tm), i.e. H(chk, dat) = 1.
  function automatic bit in_check(input int unsigned m, input int unsigned chk,
                                  input int unsigned dat);
    int unsigned g, a, i, j;
    g = (chk - 1) / m;
    a = (chk - 1) % m;
    i = (dat - 1) / m;
    j = (dat - 1) % m;
    if (g == 0)      return i == a;
    else if (g == 1) return j == a;
    else             return latin(g - 1, i, j, m) == a;
  endfunction

endpackage
