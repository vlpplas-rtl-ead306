// vlppla_ref_pkg: reference model for the VLPPLA testbenches.
//
// Everything here is computed bit by bit from the definitions, without any
// prefix network: ordinary carries by rippling, exact Ling carries as
// H_i = c_i + c_(i-1), speculated Ling carries by OR-ing the Ling terms of a
// truncated window, and block error signals as "some carry of the block is
// speculated wrongly". Vectors are 64 bits wide; only the low n bits are used.
package vlppla_ref_pkg;

  typedef logic [63:0] vec_t;

  function automatic vec_t mask(int n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 64'd1);
  endfunction

  function automatic vec_t carries(vec_t a, vec_t b, int n);
    vec_t c = '0;
    logic cy = 1'b0;
    for (int i = 0; i < n; i++) begin
      cy   = (a[i] & b[i]) | (a[i] & cy) | (b[i] & cy);
      c[i] = cy;
    end
    return c;
  endfunction

  function automatic vec_t h_exact(vec_t a, vec_t b, int n);
    vec_t c = carries(a, b, n);
    vec_t h = '0;
    for (int i = 0; i < n; i++) h[i] = c[i] | ((i > 0) ? c[i-1] : 1'b0);
    return h;
  endfunction

  function automatic logic alpha_of(vec_t a, vec_t b, int i);
    if (i < 0) return 1'b0;
    return (a[i] & b[i]) | ((i > 0) ? (a[i-1] & b[i-1]) : 1'b0);
  endfunction

  function automatic logic beta_of(vec_t a, vec_t b, int i);
    if (i < 1) return 1'b0;
    return (a[i] | b[i]) & (a[i-1] | b[i-1]);
  endfunction

  // Ling prefix of chain elements lo..k for bit i = 2k+q (G part and P part).
  function automatic logic span_g(vec_t a, vec_t b, int i, int lo);
    int q = i % 2, k = i / 2;
    logic acc = 1'b0;
    logic pr = 1'b1;
    for (int j = k; j >= lo; j--) begin
      acc = acc | (pr & alpha_of(a, b, 2*j+q));
      pr  = pr & beta_of(a, b, 2*j+q-1);
    end
    return acc;
  endfunction

  function automatic logic span_p(vec_t a, vec_t b, int i, int lo);
    int q = i % 2, k = i / 2;
    logic pr = 1'b1;
    for (int j = k; j >= lo; j--) pr = pr & beta_of(a, b, 2*j+q-1);
    return pr;
  endfunction

  // First chain element of the speculation window of chain element k.
  function automatic int win_start(int k, int l);
    int g = (l + 1) / 2;
    if (k < l) return 0;
    return g * ((k - (g - 1)) / g);
  endfunction

  function automatic vec_t h_spec(vec_t a, vec_t b, int n, int l);
    vec_t h = '0;
    for (int i = 0; i < n; i++) h[i] = span_g(a, b, i, win_start(i / 2, l));
    return h;
  endfunction

  // {cout, sum} from Ling carries h.
  function automatic logic [64:0] sum_from_h(vec_t a, vec_t b, vec_t h, int n);
    logic [64:0] r = '0;
    for (int i = 0; i < n; i++)
      r[i] = (a[i] ^ b[i]) ^ ((i > 0) ? ((a[i-1] | b[i-1]) & h[i-1]) : 1'b0);
    r[n] = (a[n-1] | b[n-1]) & h[n-1];
    return r;
  endfunction

  function automatic logic [64:0] exact_sum(vec_t a, vec_t b, int n);
    logic [64:0] r;
    vec_t m = mask(n);
    r = {1'b0, a & m} + {1'b0, b & m};
    return r;
  endfunction

  // Block error signal of block blk (1-based): some ordinary carry c_i whose
  // chain element lies in the block is speculated wrongly.
  function automatic logic beds_of(vec_t a, vec_t b, int n, int l, int blk);
    int g = (l + 1) / 2;
    vec_t he = h_exact(a, b, n);
    vec_t hs = h_spec(a, b, n, l);
    logic e = 1'b0;
    if (blk == 1) return 1'b0;
    for (int i = 0; i < n; i++) begin
      int k = i / 2;
      if (k >= g * (blk - 1) + g - 1 && k <= g * (blk - 1) + 2 * g - 2)
        e = e | ((a[i] | b[i]) & (he[i] ^ hs[i]));
    end
    return e;
  endfunction

  // Operands with a long run of half-sums (a xor b = 1) starting at a random
  // position, and often a generate just below it, so that speculation fails.
  // Runs are mostly 8-17 bits, a quarter of them up to the full width.
  function automatic void long_chain(int n, output vec_t a, output vec_t b);
    int s, len;
    a = {$urandom, $urandom};
    b = {$urandom, $urandom};
    len = ($urandom % 4 == 0) ? 8 + ($urandom % n) : 8 + ($urandom % 10);
    s = 1 + ($urandom % (n - 1));
    for (int i = s; i < s + len && i < n; i++) b[i] = ~a[i];
    if ($urandom % 4 != 0) begin
      a[s-1] = 1'b1;
      b[s-1] = 1'b1;
    end
    a &= mask(n);
    b &= mask(n);
  endfunction

  function automatic void random_ops(int n, output vec_t a, output vec_t b);
    a = {$urandom, $urandom};
    b = {$urandom, $urandom};
    a &= mask(n);
    b &= mask(n);
  endfunction

endpackage
