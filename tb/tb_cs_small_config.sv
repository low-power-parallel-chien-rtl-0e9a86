// tb_cs_small_config: end-to-end test of the two-step Chien search at a small
// configuration, BCH (15, 7, 2) over GF(2^4) with x^4 + x + 1, p = 4, L = 2.
// Here p does not divide n, so the last window holds one position (16) that
// lies outside the code word and must be masked.
//
// Every error pattern of weight 0, 1 and 2 (121 locator polynomials) is
// searched, back to back, and the reported positions must equal the pattern.
// Then 200 random coefficient pairs are compared position by position with
// the reference Y(alpha^k) = 1, k = 1..15. The mask must have suppressed a
// raw flag at position 16 at least once, and done must follow each load after
// ceil(15/4) + 1 = 5 cycles.
module tb_cs_small_config;
  import tb_gf_pkg::*;

  localparam int          M    = 4;
  localparam int          T    = 2;
  localparam int          N    = 15;
  localparam int          P    = 4;
  localparam int          L    = 2;
  localparam logic [31:0] POLY = 32'h13;
  localparam int          NW   = (N + P - 1) / P;
  localparam int          WW   = $clog2(NW + 1);
  localparam int          NCW  = 121 + 200;

  logic                clk = 0;
  logic                rst_n;
  logic                start;
  logic                ready;
  logic [T-1:0][M-1:0] lambda;
  logic                err_valid;
  logic [WW-1:0]       err_window;
  logic [P-1:0]        err;
  logic [P-2:0]        step2_en;
  logic                done;

  chien_search_two_step #(.M(M), .T(T), .N(N), .P(P), .L(L), .POLY(POLY)) dut (.*);

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [N:1] exp_mask [NCW];
  longint     load_cycle [$];
  int         cw_out = 0;
  int         n_masked = 0, n_step2 = 0, n_skip = 0, n_b2b = 0;

  initial begin
    #(10 * (NW + 3) * NCW * 2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          idx;
    int unsigned c1, c2, x1, x2;
    rst_n = 0; start = 0; lambda = '0;
    tb_gf_init(M, POLY);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    idx = 0;
    for (int a = 0; a <= N; a++) begin
      for (int b = a + 1; b <= N + 1; b++) begin
        // a = 0: no first error; b = N+1: no second error
        if (a == 0 && b != N + 1) continue;
        x1 = (a == 0) ? 0 : tb_pow(-a);
        x2 = (b == N + 1) ? 0 : tb_pow(-b);
        // (1 + x1 z)(1 + x2 z) = 1 + (x1 + x2) z + x1 x2 z^2
        c1 = x1 ^ x2;
        c2 = tb_mul(x1, x2);
        exp_mask[idx] = '0;
        if (a != 0)     exp_mask[idx][a] = 1'b1;
        if (b != N + 1) exp_mask[idx][b] = 1'b1;
        lambda[0] = M'(c1);
        lambda[1] = M'(c2);
        present();
        idx++;
      end
    end
    for (int r = 0; r < 200; r++) begin
      int unsigned lam [];
      lam = new[T];
      foreach (lam[j]) lam[j] = $urandom_range((1 << M) - 1, 0);
      exp_mask[idx] = '0;
      for (int k = 1; k <= N; k++) exp_mask[idx][k] = (tb_eval_y(lam, k) == 1);
      for (int j = 0; j < T; j++) lambda[j] = M'(lam[j]);
      present();
      idx++;
    end
    checks++;
    if (idx != NCW) begin
      failures++;
      $display("FAIL generated %0d polynomials, expected %0d", idx, NCW);
    end
  end

  task automatic present();
    #1 start = 1;
    @(posedge clk);
    while (!ready) @(posedge clk);
    load_cycle.push_back(cycle);
    if (err_valid) n_b2b++;
    #1 start = 0;
  endtask

  logic [N:1] got;

  always @(posedge clk) begin
    if (rst_n && err_valid) begin
      if (err_window == WW'(NW - 1) && dut.err_raw[N % P] && !err[N % P]) n_masked++;
      for (int i = 0; i < P; i++) begin
        if (int'(err_window) * P + i + 1 <= N) got[int'(err_window) * P + i + 1] = err[i];
        else begin
          checks++;
          if (err[i]) begin
            failures++;
            $display("FAIL flag beyond n at window %0d bit %0d", err_window, i);
          end
        end
        if (i < P - 1) begin
          if (step2_en[i]) n_step2++;
          else             n_skip++;
        end
      end
      if (done) begin
        checks++;
        if (got != exp_mask[cw_out]) begin
          failures++;
          $display("FAIL polynomial %0d: got %b expected %b", cw_out, got, exp_mask[cw_out]);
        end
        checks++;
        if (cycle - load_cycle[cw_out] != NW + 1) begin
          failures++;
          $display("FAIL polynomial %0d: done after %0d cycles", cw_out, cycle - load_cycle[cw_out]);
        end
        got = '0;
        cw_out++;
        if (cw_out == NCW) begin
          $display("masked flags beyond n: %0d, back-to-back loads: %0d, step two runs/skips: %0d/%0d",
                   n_masked, n_b2b, n_step2, n_skip);
          checks++;
          if (n_masked == 0 || n_b2b == 0 || n_step2 == 0 || n_skip == 0) begin
            failures++;
            $display("FAIL a mechanism never occurred");
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

endmodule
