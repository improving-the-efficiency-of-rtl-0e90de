// puf_tb_pkg: reference for the per-site delay skew of the Anderson PUF model,
// written separately from the model, used to predict which sites are stable
// and what bit they give.
package puf_tb_pkg;

  function automatic int unsigned mix(input int unsigned x);
    int unsigned h;
    h = x;
    h ^= h >> 16;  h *= 32'h7feb352d;
    h ^= h >> 15;  h *= 32'h846ca68b;
    h ^= h >> 16;
    return h;
  endfunction

  // sum of (stages) per-stage delay differences in [-512, 511]
  function automatic int ref_skew(input int unsigned seed, input int unsigned loc, input int stages);
    int s = 0;
    for (int k = 0; k < stages; k++)
      s += int'(mix(seed ^ (loc * 8 + k)) % 1024) - 512;
    return s;
  endfunction

endpackage
