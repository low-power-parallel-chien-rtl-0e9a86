// gf_adder: T-input finite-field adder. Addition in GF(2^m) is a bitwise XOR,
// so the sum of T words of W bits is the XOR of all of them. Used both as the
// full m-bit adder of the last row and as the L-bit and (M-L)-bit adders of the
// two step rows. Purely combinational. The published design names these adders; the
// XOR tree is the standard GF(2^m) addition.
module gf_adder #(
  parameter int W = 14,
  parameter int T = 40
) (
  input  logic [T-1:0][W-1:0] in,
  output logic [W-1:0]        sum
);

  always_comb begin
    sum = '0;
    for (int j = 0; j < T; j++)
      sum = sum ^ in[j];
  end

endmodule
