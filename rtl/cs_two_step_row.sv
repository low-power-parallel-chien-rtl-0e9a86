// cs_two_step_row: one of the rows i = 1..p-1 of the two-step parallel Chien
// search.
//
// Step one, every cycle: t partial multipliers form only the top L bits of
// omega_j(w) * alpha^(i*j); their sum is the top L bits of Y(alpha^(wp+i)). If
// any of those bits is 1, Y cannot be the identity 0...01 and no error is
// possible, so the second step is skipped. The zero test is stored in a
// one-bit delay register (en).
//
// Step two, one cycle later: the registers already hold omega_j(w+1) =
// omega_j(w) * alpha^(j*p). Multiplying them by alpha^((2^m-1) + j*(i-p)) gives
// back omega_j(w) * alpha^(i*j), so only the one-bit enable has to be
// pipelined, not the t register values. t partial multipliers form the low
// M-L bits from omega_j(w+1), and an error at position wp+i is reported when
// those bits equal 0...01. The multiplier inputs are forced to zero while en
// is 0, so the second-step logic does not toggle and the sum then is 0, which
// can never signal an error.
//
// What follows the published design: the split into L MSBs and M-L LSBs, the
// zero test, the delay element on the enable and the exponent trick. Own
// choices: the published schematic draws the input gate as an unlabelled symbol, realised
// here as an AND of each input bit with en; the delay register is cleared when
// step one is not running (valid = 0) and by the synchronous reset.
//
// Timing: err for window w is valid in the cycle after omega(w) was presented,
// while omega(w+1) is presented.
module cs_two_step_row
  import cs_pkg::*;
#(
  parameter int          M    = DEF_M,
  parameter int          T    = DEF_T,
  parameter int          P    = DEF_P,
  parameter int          L    = DEF_L,
  parameter int          I    = 1,        // row index i, 1..p-1
  parameter logic [31:0] POLY = DEF_POLY
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,  // omega holds a window being searched
  input  logic [T-1:0][M-1:0] omega,  // omega_j, j = 1..t at index j-1
  output logic                en,     // step two enabled this cycle
  output logic                err     // error at position (w-1)p+i
);

  logic [T-1:0][L-1:0]   msb_term;
  logic [L-1:0]          msb_sum;
  logic [T-1:0][M-1:0]   omega_g;
  logic [T-1:0][M-L-1:0] lsb_term;
  logic [M-L-1:0]        lsb_sum;

  for (genvar j = 0; j < T; j++) begin : g_col
    // Step one: bits M-1..M-L of omega_j * alpha^(i*j).
    ffm_const #(.M(M), .POLY(POLY), .EXP(longint'(I) * longint'(j + 1)),
                .HI(M-1), .LO(M-L))
      u_msb (.a(omega[j]), .y(msb_term[j]));

    // Step two: bits M-L-1..0 of omega_j * alpha^((2^m-1) + j*(i-p)).
    assign omega_g[j] = omega[j] & {M{en}};
    ffm_const #(.M(M), .POLY(POLY),
                .EXP(((longint'(1) << M) - 1) + longint'(j + 1) * (longint'(I) - longint'(P))),
                .HI(M-L-1), .LO(0))
      u_lsb (.a(omega_g[j]), .y(lsb_term[j]));
  end

  gf_adder #(.W(L),   .T(T)) u_add_msb (.in(msb_term), .sum(msb_sum));
  gf_adder #(.W(M-L), .T(T)) u_add_lsb (.in(lsb_term), .sum(lsb_sum));

  always_ff @(posedge clk) begin
    if (!rst_n) en <= 1'b0;
    else        en <= valid && (msb_sum == '0);
  end

  assign err = (lsb_sum == (M-L)'(1));

endmodule
