// dft_pkg: number theory, coefficient and CSD helpers shared by the prime-length DFT.
//
// The DFT of prime length N is rewritten as a cyclic convolution by indexing the non-zero
// samples and frequencies with powers of a primitive root g of N: a_k = g^k mod N,
// k = 0 .. N-2. Because g^M = -1 (mod N) with M = (N-1)/2, a_{k+M} = N - a_k, which lets
// one pass produce the outputs for index a_k and N - a_k together.
//
// All functions here are constant functions evaluated at elaboration. Coefficients are the
// cosines and sines of 2*pi*a_k/N, scaled by 2^(CW-1) and rounded to the nearest integer
// (ties away from zero, so the table stays odd/even symmetric). A coefficient is split into
// canonical-signed-digit (CSD) digits and then into "terms": two non-zero digits that lie
// at most SUBEXPR_MAXD positions apart form one shared two-digit subexpression, any other
// digit is a term of its own. The choice of two-digit subexpressions is this design's own
// simple sharing rule; the document leaves the sharing algorithm to the cited literature.
package dft_pkg;

  localparam real PI = 3.14159265358979323846;

  // Largest distance between the two digits of a shared subexpression (x<<d +- x).
  localparam int SUBEXPR_MAXD = 3;

  // Term of a constant multiplication: kind, digit distance, shift and sign.
  typedef enum logic [1:0] {
    TERM_NONE  = 2'd0,  // unused term slot
    TERM_X     = 2'd1,  // +-(x << shift)
    TERM_PLUS  = 2'd2,  // +-(((x << gap) + x) << shift)
    TERM_MINUS = 2'd3   // +-(((x << gap) - x) << shift)
  } term_kind_e;

  typedef struct packed {
    term_kind_e  kind;
    logic [3:0]  gap;
    logic [7:0]  shift;
    logic        neg;
  } term_t;

  // Coefficient families of the two filter stage kinds.
  typedef enum logic {
    KIND_COS = 1'b0,    // h_k =  cos(2*pi*a_k/N)
    KIND_NSIN = 1'b1    // h_k = -sin(2*pi*a_k/N)
  } coef_kind_e;

  function automatic int pow_mod(int base, int e, int n);
    int r;
    r = 1 % n;
    for (int i = 0; i < e; i++) r = (r * base) % n;
    return r;
  endfunction

  function automatic bit is_prime(int n);
    if (n < 3) return 1'b0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  // Smallest primitive root of a prime n (order of g is n-1).
  function automatic int prim_root(int n);
    for (int g = 2; g < n; g++) begin
      int r;
      int ord;
      r = g;
      ord = 1;
      while (r != 1 && ord < n) begin
        r = (r * g) % n;
        ord++;
      end
      if (ord == n - 1) return g;
    end
    return 0;
  endfunction

  // a_k = g^k mod n, k taken modulo n-1.
  function automatic int perm_index(int n, int k);
    return pow_mod(prim_root(n), k % (n - 1), n);
  endfunction

  // Discrete logarithm: the k in 0..n-2 with g^k = m (mod n), m in 1..n-1.
  function automatic int dlog(int n, int m);
    int r;
    r = 1;
    for (int k = 0; k < n - 1; k++) begin
      if (r == m) return k;
      r = (r * prim_root(n)) % n;
    end
    return 0;
  endfunction

  function automatic int round_away(real v);
    if (v >= 0.0) return int'($floor(v + 0.5));
    return -int'($floor(-v + 0.5));
  endfunction

  // Filter stage coefficient h_k, k = 0..(n-3)/2, scaled by 2^(cw-1).
  function automatic int coef(int n, int cw, coef_kind_e kind, int k);
    real ang;
    real scale;
    ang = 2.0 * PI * real'(perm_index(n, k)) / real'(n);
    scale = 2.0 ** (cw - 1);
    if (kind == KIND_COS) return round_away($cos(ang) * scale);
    return -round_away($sin(ang) * scale);
  endfunction

  localparam int CSD_DIGITS = 40;

  // The idx-th term of the shared-subexpression decomposition of v, most significant first.
  function automatic term_t get_term(int v, int idx);
    int dig [CSD_DIGITS];
    int i;
    int cnt;
    term_t t;
    begin
      int x;
      x = v;
      for (int p = 0; p < CSD_DIGITS; p++) begin
        int m4;
        m4 = ((x % 4) + 4) % 4;
        dig[p] = (m4 == 1) ? 1 : ((m4 == 3) ? -1 : 0);
        x = (x - dig[p]) / 2;
      end
    end
    t = '{kind: TERM_NONE, gap: '0, shift: '0, neg: 1'b0};
    cnt = 0;
    i = CSD_DIGITS - 1;
    while (i >= 0) begin
      if (dig[i] != 0) begin
        int j;
        term_t cur;
        j = -1;
        for (int d = 2; d <= SUBEXPR_MAXD; d++)
          if (j < 0 && i - d >= 0 && dig[i-d] != 0) j = i - d;
        // digits between i and j are zero by construction (CSD has no adjacent non-zeros)
        if (j >= 0) begin
          cur.kind  = (dig[i] == dig[j]) ? TERM_PLUS : TERM_MINUS;
          cur.gap  = 4'(i - j);
          cur.shift = 8'(j);
          cur.neg   = (dig[i] < 0);
          i = j - 1;
        end else begin
          cur.kind  = TERM_X;
          cur.gap  = '0;
          cur.shift = 8'(i);
          cur.neg   = (dig[i] < 0);
          i = i - 1;
        end
        if (cnt == idx) t = cur;
        cnt++;
      end else begin
        i = i - 1;
      end
    end
    return t;
  endfunction

  // Number of terms (so number of additions + 1) of v.
  function automatic int num_terms(int v);
    int n;
    n = 0;
    for (int k = 0; k < CSD_DIGITS; k++)
      if (get_term(v, k).kind != TERM_NONE) n++;
    return n;
  endfunction

endpackage
