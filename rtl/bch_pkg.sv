// bch_pkg: constants and GF(2^4) arithmetic for the BCH(15,7) code.
//
// The code is the primitive narrow-sense binary BCH code of length 15 with
// 7 data bits and 8 check bits, minimum distance 5, correcting t = 2 errors.
// Field GF(16) is built on p(x) = x^4 + x + 1 with primitive element alpha;
// the generator is g(x) = m1(x) m3(x) = x^8 + x^7 + x^6 + x^4 + 1.
// A codeword c[14:0] holds the coefficient of x^i in c[i]: data in c[14:8],
// check bits in c[7:0] (systematic).
//
// The document leaves the BCH code open (length 2^m-1, at most m*t check
// bits); these values are this design's choice.
package bch_pkg;

  localparam int unsigned BCH_N = 15;
  localparam int unsigned BCH_K = 7;
  localparam int unsigned BCH_P = BCH_N - BCH_K;   // check bits
  localparam int unsigned BCH_T = 2;
  localparam int unsigned GF_M  = 4;

  localparam logic [BCH_P:0]  BCH_GEN = 9'b1_1101_0001;   // x^8+x^7+x^6+x^4+1
  localparam logic [GF_M-1:0] GF_RED  = 4'b0011;          // x^4 = x + 1

  typedef logic [GF_M-1:0] gf_t;

  // Product of two field elements: shift-and-add with reduction by p(x).
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t r, s;
    r = '0;
    s = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) r ^= s;
      s = {s[GF_M-2:0], 1'b0} ^ (s[GF_M-1] ? GF_RED : '0);
    end
    return r;
  endfunction

  // alpha^e for a constant exponent e >= 0.
  function automatic gf_t gf_alpha(input int unsigned e);
    gf_t r;
    r = 4'b0001;
    for (int unsigned i = 0; i < e % 15; i++) r = gf_mul(r, 4'b0010);
    return r;
  endfunction

  // Multiplicative inverse: a^14 = a^8 * a^4 * a^2 (0 maps to 0).
  function automatic gf_t gf_inv(input gf_t a);
    gf_t a2, a4, a8;
    a2 = gf_mul(a, a);
    a4 = gf_mul(a2, a2);
    a8 = gf_mul(a4, a4);
    return gf_mul(gf_mul(a8, a4), a2);
  endfunction

endpackage
