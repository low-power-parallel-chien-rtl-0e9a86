// tb_gf_adder: checks the T-input field adder against an XOR accumulated
// word by word, for random words and for single-word inputs.
module tb_gf_adder;
  localparam int W = 14;
  localparam int T = 40;

  logic [T-1:0][W-1:0] in;
  logic [W-1:0]        sum;

  gf_adder #(.W(W), .T(T)) dut (.in, .sum);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ref_sum;
    for (int n = 0; n < 1000; n++) begin
      ref_sum = '0;
      for (int j = 0; j < T; j++) begin
        in[j] = (n < T) ? ((j == n) ? W'(n + 1) : '0) : W'($urandom);
        ref_sum = ref_sum ^ in[j];
      end
      #1;
      checks++;
      if (sum != ref_sum) begin
        failures++;
        $display("FAIL n=%0d got=%h exp=%h", n, sum, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
