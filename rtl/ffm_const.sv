// ffm_const: constant finite-field multiplier, y = (a * alpha^EXP)(HI:LO).
//
// A multiplication by a constant in GF(2^m) is a product with a fixed m x m
// binary matrix whose k-th row is alpha^(EXP+k). Taking only output bits HI..LO
// keeps only those matrix columns, which gives the "partial" multipliers of the
// two-step search: the first step computes only the top L bits of a product,
// the second step only the remaining M-L bits. With HI = M-1 and LO = 0 the
// block is an ordinary full constant multiplier.
//
// Interface: a is an M-bit field element in polynomial basis, y is HI-LO+1
// bits. Purely combinational. EXP may be any integer; it is reduced modulo
// 2^M-1, so alpha^(2^M-1) is the identity.
//
// The binary-matrix view of the multipliers and the partial (bit-slice)
// multipliers follow the published design; deriving the matrix at elaboration time from
// the primitive polynomial POLY is this design's own choice.
module ffm_const
  import cs_pkg::*;
#(
  parameter int          M    = DEF_M,
  parameter logic [31:0] POLY = DEF_POLY,
  parameter longint      EXP  = 1,
  parameter int          HI   = M - 1,
  parameter int          LO   = 0
) (
  input  logic [M-1:0]     a,
  output logic [HI-LO:0]   y
);

  typedef logic [HI-LO:0] col_t;
  typedef col_t           mat_t [M];

  // Row k of the binary matrix: bits HI..LO of alpha^(EXP+k).
  function automatic mat_t build_matrix();
    mat_t     mt;
    gf_word_t c;
    c = gf_alpha_pow(gf_exp_mod(EXP, M), M, POLY);
    for (int k = 0; k < M; k++) begin
      mt[k] = col_t'(c >> LO);
      c     = gf_mul_alpha(c, M, POLY);
    end
    return mt;
  endfunction

  localparam mat_t MAT = build_matrix();

  always_comb begin
    y = '0;
    for (int k = 0; k < M; k++)
      if (a[k]) y = y ^ MAT[k];
  end

endmodule
