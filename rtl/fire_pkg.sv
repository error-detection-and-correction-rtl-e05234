// fire_pkg: shared types and elaboration-time polynomial arithmetic over GF(2)
// for the Fire-code encoders and decoders.
//
// A polynomial is held in a poly_t with bit i the coefficient of X^i, so
// X^14 + X^11 + X^9 + X^5 + X^2 + 1 is 64'h4A25. The functions below are
// meant for parameter calculation only (constant functions): they form the
// generator g(X) = p(X)(X^c + 1) of a Fire code, its degree, the order e of
// p(X), the code length n = lcm(e, c), and the residue X^j mod g(X) that a
// shortened-code decoder uses as its input pre-multiplier. Degrees up to 63
// are supported, which covers every code in the design (degree 14 at most).
package fire_pkg;

  localparam int unsigned POLY_W = 64;
  typedef logic [POLY_W-1:0] poly_t;

  // Degree of a non-zero polynomial (0 for the constant 1 and for 0).
  function automatic int unsigned poly_degree(input poly_t a);
    int unsigned d;
    d = 0;
    for (int unsigned i = 0; i < POLY_W; i++)
      if (a[i]) d = i;
    return d;
  endfunction

  // Product a(X) * b(X); the caller keeps deg a + deg b below POLY_W.
  function automatic poly_t poly_mul(input poly_t a, input poly_t b);
    poly_t r;
    r = '0;
    for (int unsigned i = 0; i < POLY_W; i++)
      if (b[i]) r ^= (a << i);
    return r;
  endfunction

  // Remainder of X^j divided by g(X), computed one power at a time so that
  // j may exceed the polynomial width.
  function automatic poly_t xpow_mod(input int unsigned j, input poly_t g);
    poly_t r;
    logic [5:0] dg;
    dg = 6'(poly_degree(g));
    r  = poly_t'(1);
    for (int unsigned i = 0; i < j; i++) begin
      r = r << 1;
      if (r[dg]) r ^= g;
    end
    return r;
  endfunction

  // Generator of a Fire code, g(X) = p(X) (X^c + 1).
  function automatic poly_t fire_generator(input poly_t p, input int unsigned c);
    return poly_mul(p, (poly_t'(1) << c) | poly_t'(1));
  endfunction

  // Order e of p(X): the least e > 0 with X^e = 1 mod p(X). For an
  // irreducible p of degree m it divides 2^m - 1.
  function automatic int unsigned poly_order(input poly_t p);
    int unsigned m, e;
    poly_t r;
    m = poly_degree(p);
    r = poly_t'(1);
    e = 0;
    for (int unsigned i = 1; i < (1 << m); i++) begin
      r = r << 1;
      if (r[m]) r ^= p;
      if (e == 0 && r == poly_t'(1)) e = i;
    end
    return e;
  endfunction

  function automatic int unsigned gcd(input int unsigned a, input int unsigned b);
    int unsigned x, y, t;
    x = a;
    y = b;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // Natural length of the Fire code with parameters p(X) and c: lcm(e, c).
  function automatic int unsigned fire_length(input poly_t p, input int unsigned c);
    int unsigned e;
    e = poly_order(p);
    return (e / gcd(e, c)) * c;
  endfunction

  // Decoder status reported with the last corrected symbol of a block.
  typedef struct packed {
    logic detected;       // syndrome was non-zero
    logic corrected;      // a burst was trapped and added to the output
    logic uncorrectable;  // syndrome non-zero and never trapped
  } dec_status_t;

endpackage
