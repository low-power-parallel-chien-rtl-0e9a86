// cs_pkg: shared constants and elaboration-time Galois-field helpers for the
// two-step parallel Chien search.
//
// Field elements of GF(2^m) are stored in polynomial basis, bit k holding the
// coefficient of alpha^k, so the multiplicative identity is 0...01 (bit 0 set).
// The functions below are evaluated only while parameters are elaborated: they
// build the constant binary matrices of the constant multipliers. They are
// written for any field width up to GF_MAX_M bits.
//
// Defaults: m = 14 follows from the BCH (8752, 8192, 40) code (n = k + m*t
// gives m = 14, and 2^14 - 1 >= 8752). The primitive polynomial is not given
// for that code, so this package defaults to x^14 + x^5 + x^3 + x + 1, a
// common primitive polynomial for GF(2^14).
package cs_pkg;

  localparam int GF_MAX_M = 32;
  typedef logic [GF_MAX_M-1:0] gf_word_t;

  // Default code and architecture parameters.
  localparam int          DEF_M    = 14;       // field dimension
  localparam int          DEF_T    = 40;       // error-correction capability
  localparam int          DEF_N    = 8752;     // code length
  localparam int          DEF_P    = 16;       // parallel factor (own choice)
  localparam int          DEF_L    = 3;        // MSBs tested in step one (own choice)
  localparam logic [31:0] DEF_POLY = 32'h402B; // x^14+x^5+x^3+x+1 (own choice)

  // Multiply a field element by alpha (one shift, reduce by the polynomial).
  function automatic gf_word_t gf_mul_alpha(gf_word_t x, int m, logic [31:0] poly);
    gf_word_t r;
    r = x << 1;
    if (r[m]) r = r ^ gf_word_t'(poly);
    return r;
  endfunction

  // General field multiplication, shift-and-add.
  function automatic gf_word_t gf_mul(gf_word_t a, gf_word_t b, int m, logic [31:0] poly);
    gf_word_t acc;
    gf_word_t sh;
    acc = '0;
    sh  = a;
    for (int k = 0; k < m; k++) begin
      if (b[k]) acc = acc ^ sh;
      sh = gf_mul_alpha(sh, m, poly);
    end
    return acc;
  endfunction

  // alpha^e for e >= 0, by square and multiply.
  function automatic gf_word_t gf_alpha_pow(longint e, int m, logic [31:0] poly);
    gf_word_t r;
    gf_word_t b;
    longint   k;
    r = gf_word_t'(1);
    b = gf_word_t'(2);
    k = e;
    while (k > 0) begin
      if (k[0]) r = gf_mul(r, b, m, poly);
      b = gf_mul(b, b, m, poly);
      k = k >> 1;
    end
    return r;
  endfunction

  // Reduce an exponent, possibly negative, into 0 .. 2^m-2.
  function automatic longint gf_exp_mod(longint e, int m);
    longint q;
    longint r;
    q = (longint'(1) << m) - 1;
    r = e % q;
    if (r < 0) r = r + q;
    return r;
  endfunction

endpackage
