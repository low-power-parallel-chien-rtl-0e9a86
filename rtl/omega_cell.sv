// omega_cell: one column register of the parallel Chien search.
//
// Holds the intermediate value omega_j(w) = lambda_j * alpha^(j*p*w) of
// locator coefficient j. A multiplexer selects the coefficient lambda_j when a
// new locator polynomial is loaded; otherwise, while the search runs, the
// register takes its own product with alpha^(j*p). That product is also the
// j-th term of the last row, Y(alpha^(wp+p)), so it is brought out as prod.
// Both follow the published design: one register, one multiplexer and one constant
// multiplier per coefficient, with the last row's multiplier shared with the
// register update. Holding the value while neither load nor update is set, and
// the synchronous active-low reset, are this design's own choices.
//
// Timing: load and update act at the rising clock edge; prod is combinational
// from the register.
module omega_cell
  import cs_pkg::*;
#(
  parameter int          M    = DEF_M,
  parameter logic [31:0] POLY = DEF_POLY,
  parameter int          J    = 1,      // coefficient index j, 1..t
  parameter int          P    = DEF_P   // parallel factor p
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,    // take lambda_j
  input  logic         update,  // take omega_j * alpha^(j*p)
  input  logic [M-1:0] lambda,
  output logic [M-1:0] omega,   // omega_j(w)
  output logic [M-1:0] prod     // omega_j(w) * alpha^(j*p) = omega_j(w+1)
);

  ffm_const #(.M(M), .POLY(POLY), .EXP(longint'(J) * longint'(P)), .HI(M-1), .LO(0))
    u_ffm (.a(omega), .y(prod));

  always_ff @(posedge clk) begin
    if (!rst_n)      omega <= '0;
    else if (load)   omega <= lambda;
    else if (update) omega <= prod;
  end

endmodule
