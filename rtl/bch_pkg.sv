// bch_pkg: constants and GF(2^7) arithmetic shared by the BCH(127,64,10)
// encoder and decoder of the PUF key generator.
//
// The field is GF(2^7) built on the primitive polynomial p(x) = x^7 + x^3 + 1,
// alpha being a root of p(x). A codeword bit at index i is the coefficient of
// x^i in the codeword polynomial. The generator polynomial g(x) is the least
// common multiple of the minimal polynomials of alpha^1 .. alpha^20 (nine
// distinct minimal polynomials of degree 7, hence degree 63 = n - k); bit j of
// BCH_GEN is the coefficient of x^j. The code sizes (n = 127, k = 64, t = 10)
// are those of the key generator; the field polynomial and bit order are this
// design's choice.
package bch_pkg;

  localparam int unsigned BCH_M = 7;                 // field degree, n = 2^m - 1
  localparam int unsigned BCH_N = 127;               // codeword length
  localparam int unsigned BCH_K = 64;                // information bits per codeword
  localparam int unsigned BCH_T = 10;                // correctable errors per codeword
  localparam int unsigned BCH_R = BCH_N - BCH_K;     // parity bits (degree of g)

  localparam logic [BCH_M:0] GF_POLY = 8'h89;        // x^7 + x^3 + 1

  // g(x) = lcm(m_1, m_3, m_5, m_7, m_9, m_11, m_13, m_15, m_19), x^63 term included
  localparam logic [BCH_R:0] BCH_GEN = 64'hA1AB_815B_C7EC_8025;

  typedef logic [BCH_M-1:0] gf_t;

  // Product of two field elements: carry-less multiply, then reduce by p(x).
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [2*BCH_M-2:0] p;
    p = '0;
    for (int i = 0; i < BCH_M; i++)
      if (b[i]) p = p ^ ((2*BCH_M-1)'(a) << i);
    for (int i = 2*BCH_M-2; i >= BCH_M; i--)
      if (p[i]) p = p ^ ((2*BCH_M-1)'(GF_POLY) << (i - BCH_M));
    return p[BCH_M-1:0];
  endfunction

  // Table of alpha^0 .. alpha^(N-1), entry e at bits [7e +: 7]; each entry is
  // the previous one multiplied by alpha (shift left, reduce by p(x)).
  function automatic logic [BCH_N*BCH_M-1:0] gf_exp_table();
    logic [BCH_N*BCH_M-1:0] tab;
    gf_t r;
    r = gf_t'(1);
    for (int e = 0; e < int'(BCH_N); e++) begin
      tab[e*BCH_M +: BCH_M] = r;
      r = r[BCH_M-1] ? ((r << 1) ^ GF_POLY[BCH_M-1:0]) : (r << 1);
    end
    return tab;
  endfunction

  localparam logic [BCH_N*BCH_M-1:0] GF_EXP = gf_exp_table();

  // alpha^e for any integer exponent, negative ones included.
  function automatic gf_t gf_alpha_pow(input int e);
    int ee;
    ee = e % int'(BCH_N);
    if (ee < 0) ee = ee + int'(BCH_N);
    return GF_EXP[ee*BCH_M +: BCH_M];
  endfunction

endpackage
