// fire_ref_pkg: reference arithmetic for the Fire-code testbenches, written
// from the code's definition rather than from the shift-register circuits.
//
// A code block is held as a vec_t with bit i the coefficient of X^i; the
// block is sent highest degree first. rem() is plain polynomial long
// division, encode() forms X^R q(X) + (X^R q(X) mod g(X)), and ref_decode()
// finds the burst a burst-trapping decoder must correct by searching every
// burst of length <= B whose top lies in the information part, from the
// highest position down, for one with the received block's remainder.
// A burst counts when it fits in a window of B positions whose top is an
// information position: that is when it passes the last stages of the
// trapping register while information symbols are still leaving.
package fire_ref_pkg;

  localparam int MAXN = 512;
  typedef bit [MAXN-1:0] vec_t;
  typedef bit [63:0]     gpoly_t;

  function automatic int deg(input gpoly_t g);
    int d = 0;
    for (int i = 0; i < 64; i++) if (g[i]) d = i;
    return d;
  endfunction

  // v(X) mod g(X) for a v of at most nbits coefficients.
  function automatic gpoly_t rem(input vec_t v, input int nbits, input gpoly_t g);
    int r = deg(g);
    vec_t gv = vec_t'(g);
    for (int i = nbits - 1; i >= r; i--)
      if (v[i]) v ^= gv << (i - r);
    return gpoly_t'(v) & ((gpoly_t'(1) << r) - 1);
  endfunction

  // Systematic code block for information bits info[K-1:0] (info[K-1] sent first).
  function automatic vec_t encode(input vec_t info, input int k, input gpoly_t g);
    int r = deg(g);
    vec_t c = info << r;
    return c | vec_t'(rem(c, k + r, g));
  endfunction

  // A random burst of exact length len (both end bits set) starting at pos.
  function automatic vec_t burst(input int pos, input int len);
    vec_t e = '0;
    e[pos] = 1'b1;
    e[pos + len - 1] = 1'b1;
    for (int i = 1; i < len - 1; i++) e[pos + i] = 1'($urandom);
    return e;
  endfunction

  typedef struct {
    vec_t info;        // expected decoder output bits, info[K-1] first
    bit   detected;
    bit   corrected;
    bit   uncorrectable;
  } ref_result_t;

  function automatic ref_result_t ref_decode(input vec_t rx, input int n, input int k,
                                             input int b, input gpoly_t g);
    ref_result_t res;
    int r = n - k;
    gpoly_t syn = rem(rx, n, g);
    vec_t fixed = rx;
    bit found = 0;
    if (syn != 0) begin
      for (int p = n - 1; p >= r && !found; p--)
        for (int pat = 1; pat < (1 << b) && !found; pat++) begin
          vec_t e = vec_t'(pat) << (p - b + 1);
          if (rem(e, n, g) == syn) begin
            found = 1;
            fixed = rx ^ e;
          end
        end
    end
    res.info          = fixed >> r;
    res.detected      = (syn != 0);
    res.corrected     = found;
    res.uncorrectable = (syn != 0) && !found;
    return res;
  endfunction

endpackage
