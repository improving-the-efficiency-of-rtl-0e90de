// bch_tb_pkg: reference models for the BCH(127,64,10) testbenches, written
// independently of the RTL. GF(2^7) uses x^7 + x^3 + 1. The encoder reference
// divides by g(x) in one step over the whole word; the syndrome reference
// evaluates r(alpha^j) as a plain sum of powers of alpha.
package bch_tb_pkg;

  // g(x) = lcm of the minimal polynomials of alpha^1..alpha^20
  localparam logic [63:0] REF_GEN = 64'hA1AB_815B_C7EC_8025;

  // multiply in GF(2^7), reducing after every shift
  function automatic logic [6:0] ref_mul(input logic [6:0] a, input logic [6:0] b);
    logic [6:0] acc, aa;
    acc = '0;
    aa  = a;
    for (int i = 0; i < 7; i++) begin
      if (b[i]) acc ^= aa;
      aa = aa[6] ? ((aa << 1) ^ 7'h09) : (aa << 1);
    end
    return acc;
  endfunction

  function automatic logic [6:0] ref_apow(input int e);
    logic [6:0] r;
    r = 7'd1;
    for (int i = 0; i < ((e % 127) + 127) % 127; i++) r = ref_mul(r, 7'd2);
    return r;
  endfunction

  // systematic codeword: msg * x^63 + remainder
  function automatic logic [126:0] ref_encode(input logic [63:0] m);
    logic [126:0] r;
    r = {m, 63'd0};
    for (int i = 126; i >= 63; i--)
      if (r[i]) r ^= (127'(REF_GEN) << (i - 63));
    return {m, r[62:0]};
  endfunction

  // S_j = sum over set bits i of alpha^(i*j)
  function automatic logic [6:0] ref_synd(input logic [126:0] w, input int j);
    logic [6:0] s;
    s = '0;
    for (int i = 0; i < 127; i++) if (w[i]) s ^= ref_apow(i * j);
    return s;
  endfunction

  // random 64-bit value
  function automatic logic [63:0] rand64();
    return {$urandom, $urandom};
  endfunction

  // word with exactly ne distinct random bits set
  function automatic logic [126:0] rand_errors(input int ne);
    logic [126:0] e;
    int p;
    e = '0;
    for (int k = 0; k < ne; k++) begin
      do p = $urandom_range(126, 0); while (e[p]);
      e[p] = 1'b1;
    end
    return e;
  endfunction

endpackage
