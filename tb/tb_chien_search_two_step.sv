// tb_chien_search_two_step: end-to-end test of the two-step parallel Chien
// search at its default size: BCH (8752, 8192, 40) over GF(2^14), p = 16,
// L = 3 (547 windows per code word).
//
// Locator polynomials are built from chosen error positions e as
// Lambda(x) = prod (1 + alpha^(-e) x), so the search must report exactly those
// positions. The runs cover no errors, the full t = 40 errors (with positions
// 1, n and positions handled by the last row), random error counts, and random
// coefficient sets compared position by position with Y(alpha^k) = 1 from the
// reference arithmetic. Some polynomials are started in the drain cycle of
// the previous one. Checks: the reported positions, the number of cycles from
// load to done (n/p + 1), and that every mechanism occurred: load, back-to-back
// load, step one passing with and without a real error, step two skipped,
// errors found in the two-step rows and in the last row.
module tb_chien_search_two_step;
  import tb_gf_pkg::*;

  localparam int          M    = 14;
  localparam int          T    = 40;
  localparam int          N    = 8752;
  localparam int          P    = 16;
  localparam int          L    = 3;
  localparam logic [31:0] POLY = 32'h402B;
  localparam int          NW   = (N + P - 1) / P;
  localparam int          WW   = $clog2(NW + 1);
  localparam int          NCW  = 10;

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

  chien_search_two_step dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results per code word, in load order
  bit     exp_pos [NCW][int];
  longint load_cycle [$];
  int     cw_out = 0;

  // mechanism counters
  int n_load = 0, n_b2b = 0, n_step2 = 0, n_step2_false = 0, n_skip = 0;
  int n_err_rows = 0, n_err_last = 0;
  // per code word: second-step runs and windows, for the activity estimate
  int cw_step2 = 0, cw_windows = 0;

  initial begin
    #(10 * 12 * (NW + 2) * NCW);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --- stimulus -----------------------------------------------------------
  function automatic void lambda_from_roots(int pos [$], ref int unsigned lam []);
    int unsigned c [];
    c = new[T + 1];
    foreach (c[j]) c[j] = 0;
    c[0] = 1;
    foreach (pos[k]) begin
      int unsigned x;
      x = tb_pow(-longint'(pos[k]));
      for (int j = T; j >= 1; j--) c[j] = c[j] ^ tb_mul(x, c[j - 1]);
    end
    lam = new[T];
    for (int j = 1; j <= T; j++) lam[j - 1] = c[j];
  endfunction

  task automatic pick_positions(int cnt, bit special, ref int pos [$]);
    bit used [int];
    pos.delete();
    if (special) begin
      pos.push_back(1); pos.push_back(N); pos.push_back(P); pos.push_back(5 * P);
      pos.push_back(P + 1); pos.push_back(2 * P - 1);
      foreach (pos[k]) used[pos[k]] = 1;
    end
    while (pos.size() < cnt) begin
      int e;
      e = $urandom_range(N, 1);
      if (!used.exists(e)) begin
        used[e] = 1;
        pos.push_back(e);
      end
    end
  endtask

  initial begin
    int          pos [$];
    int unsigned lam [];
    rst_n = 0; start = 0; lambda = '0;
    tb_gf_init(M, POLY);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cw = 0; cw < NCW; cw++) begin
      case (cw)
        0: pick_positions(0, 0, pos);
        1: pick_positions(T, 1, pos);
        2, 3, 4, 5, 6: pick_positions($urandom_range(T, 1), cw == 3, pos);
        default: pos.delete();
      endcase
      if (cw < 7) begin
        lambda_from_roots(pos, lam);
        foreach (pos[k]) exp_pos[cw][pos[k]] = 1;
      end else begin
        // random coefficients: expected positions from direct evaluation
        lam = new[T];
        foreach (lam[j]) lam[j] = $urandom_range((1 << M) - 1, 0);
        for (int k = 1; k <= N; k++)
          if (tb_eval_y(lam, k) == 1) exp_pos[cw][k] = 1;
      end
      for (int j = 0; j < T; j++) lambda[j] = M'(lam[j]);
      // code words 2..5 and 8 wait for done (idle gap); the others are
      // presented right away and so load in the previous one's drain cycle
      if (cw inside {2, 3, 4, 5, 8}) begin
        while (!ready || err_valid) @(posedge clk);
        #1;
      end
      start = 1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      // load happened at this edge
      load_cycle.push_back(cycle);
      n_load++;
      if (err_valid) n_b2b++;
      #1 start = 0;
      lambda = '0;
    end
  end

  // --- monitor ------------------------------------------------------------
  bit got_pos [int];

  always @(posedge clk) begin
    if (rst_n && err_valid) begin
      cw_windows++;
      for (int i = 0; i < P; i++) begin
        if (err[i]) begin
          got_pos[int'(err_window) * P + i + 1] = 1;
          if (i == P - 1) n_err_last++;
          else            n_err_rows++;
        end
        if (i < P - 1) begin
          if (step2_en[i]) begin
            n_step2++;
            cw_step2++;
            if (!err[i]) n_step2_false++;
          end else begin
            n_skip++;
            checks++;
            if (err[i]) begin
              failures++;
              $display("FAIL error reported with step two off, window %0d row %0d", err_window, i + 1);
            end
          end
        end
      end
      if (done) begin
        // compare the code word's positions
        int missing = 0, extra = 0;
        foreach (exp_pos[cw_out][k]) if (!got_pos.exists(k)) missing++;
        foreach (got_pos[k]) if (!exp_pos[cw_out].exists(k)) extra++;
        checks++;
        if (missing != 0 || extra != 0) begin
          failures++;
          $display("FAIL code word %0d: %0d expected, %0d missing, %0d extra",
                   cw_out, exp_pos[cw_out].size(), missing, extra);
        end else
          $display("code word %0d: %0d error positions found", cw_out, got_pos.size());
        // Product bits evaluated, relative to a search that computes all
        // p*t*m bits every cycle: row p in full, L bits in each other row,
        // and M-L more bits for each second-step run.
        $display("  step two ran in %0.1f%% of row tests; product bits evaluated: %0.1f%% of a full search",
                 100.0 * cw_step2 / (cw_windows * (P - 1)),
                 100.0 * (real'(cw_windows) * T * (M + (P - 1) * L) + real'(cw_step2) * T * (M - L))
                       / (real'(cw_windows) * P * T * M));
        cw_step2 = 0;
        cw_windows = 0;
        checks++;
        if (cycle - load_cycle[cw_out] != NW + 1) begin
          failures++;
          $display("FAIL code word %0d: done %0d cycles after load, expected %0d",
                   cw_out, cycle - load_cycle[cw_out], NW + 1);
        end
        got_pos.delete();
        cw_out++;
        if (cw_out == NCW) finish_test();
      end
    end
  end

  task automatic count_mech(string name, int n);
    checks++;
    $display("  %-34s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", name);
    end
  endtask

  task automatic finish_test();
    $display("mechanisms:");
    count_mech("loads", n_load);
    count_mech("back-to-back loads", n_b2b);
    count_mech("step two runs", n_step2);
    count_mech("step two runs without error", n_step2_false);
    count_mech("step two skipped", n_skip);
    count_mech("errors found in two-step rows", n_err_rows);
    count_mech("errors found in last row", n_err_last);
    $display("step-two activity: %0d of %0d row tests (%0.2f%%)", n_step2,
             n_step2 + n_skip, 100.0 * n_step2 / (n_step2 + n_skip));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
