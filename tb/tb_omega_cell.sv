// tb_omega_cell: loads random coefficients into a register cell (j = 5,
// p = 16, GF(2^14)), runs random update/hold sequences and compares the
// register and its product with lambda * alpha^(j*p*w) from the reference,
// where w counts the updates since the last load. Also checks reset.
module tb_omega_cell;
  import tb_gf_pkg::*;

  localparam int          M    = 14;
  localparam logic [31:0] POLY = 32'h402B;
  localparam int          J    = 5;
  localparam int          P    = 16;

  logic         clk = 0;
  logic         rst_n;
  logic         load, update;
  logic [M-1:0] lambda;
  logic [M-1:0] omega, prod;

  omega_cell #(.M(M), .POLY(POLY), .J(J), .P(P)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    int unsigned lam;
    longint      w;
    tb_gf_init(M, POLY);
    rst_n = 0; load = 0; update = 0; lambda = '0;
    repeat (2) @(posedge clk);
    #1 check("reset", omega, 0);
    rst_n = 1;
    for (int cw = 0; cw < 20; cw++) begin
      lam = (cw == 0) ? 1 : $urandom_range((1 << M) - 1, 1);
      lambda = M'(lam);
      load = 1; update = (cw % 2 == 1);   // load has priority over update
      @(posedge clk); #1;
      load = 0; w = 0;
      check("load", omega, lam);
      for (int c = 0; c < 100; c++) begin
        update = ($urandom_range(3, 0) != 0);
        lambda = M'($urandom);            // must be ignored without load
        check("prod", prod, tb_mul(lam, tb_pow(longint'(J * P) * (w + 1))));
        @(posedge clk); #1;
        if (update) w++;
        check("omega", omega, tb_mul(lam, tb_pow(longint'(J * P) * w)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
