// Reference arithmetic for the testbenches, written independently of the
// RTL: schoolbook polynomial products over GF(2) and reduction by long
// division, on vectors of up to MAXW bits.
package gf_ref_pkg;

  localparam int MAXW = 320;
  typedef logic [MAXW-1:0] vec_t;

  // Remainder of d (degree < 2m) divided by Q(z) = 1 + z + ... + z^m.
  function automatic vec_t aop_mod(vec_t d, int m);
    vec_t r;
    r = d;
    for (int deg = MAXW - 1; deg >= m; deg--) begin
      if (r[deg]) begin
        for (int i = 0; i <= m; i++) r[deg - m + i] ^= 1'b1;
      end
    end
    return r;
  endfunction

  // A * B mod Q(z) for m-bit operands.
  function automatic vec_t aop_mul(vec_t a, vec_t b, int m);
    vec_t prod;
    prod = '0;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < m; j++)
        prod[i + j] ^= a[i] & b[j];
    return aop_mod(prod, m);
  endfunction

  // x * z^k modulo z^w + 1, bit by bit.
  function automatic vec_t cyc_mul(vec_t x, int k, int w);
    vec_t r;
    r = '0;
    for (int i = 0; i < w; i++) r[(i + k) % w] = x[i];
    return r;
  endfunction

  // Random vector with the low w bits random, the rest zero.
  function automatic vec_t rand_vec(int w);
    vec_t r;
    for (int i = 0; i < MAXW; i += 32) r[i +: 32] = $urandom();
    for (int i = w; i < MAXW; i++) r[i] = 1'b0;
    return r;
  endfunction

endpackage
