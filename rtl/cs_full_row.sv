// cs_full_row: last row (i = p) of the parallel Chien search.
//
// The t products omega_j(w) * alpha^(j*p), already formed by the register
// update multipliers, are added (XOR) into Y(alpha^(wp+p)). An error sits at
// position wp+p when that sum equals the identity 0...01. As in the published design
// this row is not split into two steps, because its multipliers are needed in
// full every cycle to update the registers. Purely combinational.
module cs_full_row #(
  parameter int M = 14,
  parameter int T = 40
) (
  input  logic [T-1:0][M-1:0] prod,  // omega_j(w) * alpha^(j*p), j = 1..t
  output logic [M-1:0]        y,     // Y(alpha^(wp+p))
  output logic                err    // y == 1
);

  gf_adder #(.W(M), .T(T)) u_add (.in(prod), .sum(y));

  assign err = (y == M'(1));

endmodule
