// Word-level reference model of Montgomery multiplication over GF(2^l) for the testbenches.
//
// Polynomials are bit vectors of width W (bit k = coefficient of v^k); l <= W-2.
//   mulmod(a, b, f, l) : a*b mod f by shift-and-add (MSB of b first)
//   vinv(x, f, l)      : x * v^{-1} mod f  ((x + x_0 f) / v, needs f_0 = 1)
//   mont(c, d, f, l)   : c*d*v^{-(l-1)/2} mod f, computed as c*d mod f followed by
//                        (l-1)/2 divisions by v
//   a_part / b_part    : the two halves A and B of the Montgomery product, evaluated with
//                        word-wide shifts (A by Horner in v, B by Horner in v^{-1})
// None of this shares structure with the bit-serial array.
package mmm_ref_pkg;

  localparam int W = 260;
  typedef logic [W-1:0] poly_t;

  function automatic poly_t mulmod(poly_t a, poly_t b, poly_t f, int l);
    poly_t r = '0;
    for (int i = l - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[l]) r ^= f;
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic poly_t vinv(poly_t x, poly_t f, int l);
    poly_t r = x;
    if (r[0]) r ^= f;
    return r >> 1;
  endfunction

  function automatic poly_t mont(poly_t c, poly_t d, poly_t f, int l);
    poly_t r = mulmod(c, d, f, l);
    for (int k = 0; k < (l - 1) / 2; k++) r = vinv(r, f, l);
    return r;
  endfunction

  // A = sum_{k=(l-1)/2}^{l-1} C d_k v^{k-(l-1)/2} mod F
  function automatic poly_t a_part(poly_t c, poly_t d, poly_t f, int l);
    poly_t r = '0;
    for (int k = l - 1; k >= (l - 1) / 2; k--) begin
      r = r << 1;
      if (r[l]) r ^= f;
      if (d[k]) r ^= c;
    end
    return r;
  endfunction

  // B = sum_{k=0}^{(l-3)/2} C d_k v^{k-(l-1)/2} mod F
  function automatic poly_t b_part(poly_t c, poly_t d, poly_t f, int l);
    poly_t r = '0;
    for (int k = 0; k <= (l - 3) / 2; k++) begin
      if (d[k]) r ^= c;
      r = vinv(r, f, l);
    end
    return r;
  endfunction

  // Random polynomial of degree < l
  function automatic poly_t rand_poly(int l);
    poly_t r = '0;
    for (int k = 0; k < l; k++) r[k] = 1'($urandom);
    return r;
  endfunction

  // Random modulus of degree l with f_l = f_0 = 1
  function automatic poly_t rand_mod(int l);
    poly_t r = rand_poly(l);
    r[l] = 1'b1;
    r[0] = 1'b1;
    return r;
  endfunction

endpackage
