// tb_cs_two_step_row: checks one two-step row (i = 5, p = 16, L = 3, t = 8,
// GF(2^14)). Each test is two cycles: omega(w) is presented with valid = 1,
// then omega(w+1) = omega_j(w) * alpha^(j*p) with valid = 0. The second cycle
// must raise en exactly when the top L bits of Y(alpha^(wp+i)) are zero and
// err exactly when Y = 1. Half of the omega(w) sets are built with a solved
// first coefficient so that Y = 1, a quarter so that only the top L bits are
// zero, the rest at random. It also checks that en stays low when valid is 0.
module tb_cs_two_step_row;
  import tb_gf_pkg::*;

  localparam int          M    = 14;
  localparam int          T    = 8;
  localparam int          P    = 16;
  localparam int          L    = 3;
  localparam int          I    = 5;
  localparam logic [31:0] POLY = 32'h402B;

  logic                clk = 0;
  logic                rst_n;
  logic                valid;
  logic [T-1:0][M-1:0] omega;
  logic                en, err;

  cs_two_step_row #(.M(M), .T(T), .P(P), .L(L), .I(I), .POLY(POLY)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_err = 0, n_en_only = 0, n_skip = 0;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned om [T];
    int unsigned acc, target, y;
    logic        exp_en, exp_err;
    tb_gf_init(M, POLY);
    rst_n = 0; valid = 0; omega = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      acc = 0;
      for (int j = 1; j < T; j++) begin
        om[j] = $urandom_range((1 << M) - 1, 0);
        acc = acc ^ tb_mul(om[j], tb_pow(longint'(I) * (j + 1)));
      end
      case (n % 4)
        0, 1: target = 1;
        2:    target = $urandom_range((1 << (M - L)) - 1, 0);
        default: target = $urandom_range((1 << M) - 1, 0);
      endcase
      // solve omega_1 * alpha^i = target + rest
      om[0] = tb_mul(acc ^ target, tb_inv(tb_pow(I)));
      y = tb_eval_y(om, I);
      for (int j = 0; j < T; j++) omega[j] = M'(om[j]);
      valid = 1;
      @(posedge clk); #1;
      for (int j = 0; j < T; j++) omega[j] = M'(tb_mul(om[j], tb_pow(longint'(j + 1) * P)));
      valid = 0;
      exp_en  = (y >> (M - L)) == 0;
      exp_err = (y == 1);
      #1;
      checks++;
      if (en != exp_en || err != exp_err) begin
        failures++;
        $display("FAIL n=%0d y=%h en=%b/%b err=%b/%b", n, y, en, exp_en, err, exp_err);
      end
      if (exp_err) n_err++;
      else if (exp_en) n_en_only++;
      else n_skip++;
      @(posedge clk); #1;
      checks++;
      if (en || err) begin
        failures++;
        $display("FAIL n=%0d en/err not cleared after valid=0", n);
      end
    end
    checks++;
    if (n_err == 0 || n_en_only == 0 || n_skip == 0) begin
      failures++;
      $display("FAIL coverage err=%0d en_only=%0d skip=%0d", n_err, n_en_only, n_skip);
    end
    $display("errors=%0d step-two-only=%0d skipped=%0d", n_err, n_en_only, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
