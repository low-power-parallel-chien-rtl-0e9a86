// tb_ffm_const: checks full and partial constant multipliers in GF(2^14)
// against log/antilog reference products, for random and corner inputs and a
// spread of exponents, including negative ones and ones beyond 2^m-1.
module tb_ffm_const;
  import tb_gf_pkg::*;

  localparam int          M    = 14;
  localparam logic [31:0] POLY = 32'h402B;
  localparam int          L    = 3;

  logic [M-1:0]   a;
  logic [M-1:0]   y_full0, y_full1, y_full2;
  logic [L-1:0]   y_msb;
  logic [M-L-1:0] y_lsb;

  localparam longint E0 = 0;
  localparam longint E1 = 37;
  localparam longint E2 = 16383 + 40 * (3 - 16);   // as used by a second-step multiplier
  localparam longint E3 = 600;
  localparam longint E4 = -5;

  ffm_const #(.M(M), .POLY(POLY), .EXP(E0))                    u0 (.a, .y(y_full0));
  ffm_const #(.M(M), .POLY(POLY), .EXP(E1))                    u1 (.a, .y(y_full1));
  ffm_const #(.M(M), .POLY(POLY), .EXP(E4))                    u2 (.a, .y(y_full2));
  ffm_const #(.M(M), .POLY(POLY), .EXP(E3), .HI(M-1), .LO(M-L)) u3 (.a, .y(y_msb));
  ffm_const #(.M(M), .POLY(POLY), .EXP(E2), .HI(M-L-1), .LO(0)) u4 (.a, .y(y_lsb));

  int checks = 0, failures = 0;

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%h got=%h exp=%h", what, a, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned av;
    tb_gf_init(M, POLY);
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: av = 0;
        1: av = 1;
        2: av = (1 << M) - 1;
        default: av = $urandom_range((1 << M) - 1, 0);
      endcase
      a = M'(av);
      #1;
      check("E0",  y_full0, tb_mul(av, tb_pow(E0)));
      check("E1",  y_full1, tb_mul(av, tb_pow(E1)));
      check("E4",  y_full2, tb_mul(av, tb_pow(E4)));
      check("msb", y_msb,  tb_mul(av, tb_pow(E3)) >> (M - L));
      check("lsb", y_lsb,  tb_mul(av, tb_pow(E2)) & ((1 << (M - L)) - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
