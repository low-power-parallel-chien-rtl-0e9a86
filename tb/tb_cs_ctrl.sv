// tb_cs_ctrl: checks the sequencer with NW = 7 windows: load only when ready,
// NW active cycles with window = 0..NW-1, results one cycle behind, done on
// the last window, a start ignored while active, a start accepted in the
// drain cycle (back-to-back polynomials), and the NW+1 cycle period.
module tb_cs_ctrl;
  localparam int NW = 7;
  localparam int WW = $clog2(NW + 1);

  logic          clk = 0;
  logic          rst_n;
  logic          start;
  logic          ready, load, active, out_valid, done;
  logic [WW-1:0] window, out_window;

  cs_ctrl #(.NW(NW), .WW(WW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(string what, logic e_act, int e_win, logic e_ov, int e_ow, logic e_done);
    checks++;
    if (active != e_act || (e_act && window != WW'(e_win)) || out_valid != e_ov ||
        (e_ov && out_window != WW'(e_ow)) || done != e_done || ready != !e_act) begin
      failures++;
      $display("FAIL %s act=%b win=%0d ov=%b ow=%0d done=%b", what, active, window,
               out_valid, out_window, done);
    end
  endtask

  initial begin
    int t_start, t_done;
    rst_n = 0; start = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_state("idle", 0, 0, 0, 0, 0);
    // first polynomial
    start = 1; #1;
    checks++; if (!load) begin failures++; $display("FAIL no load"); end
    @(posedge clk); #1;
    t_start = 0;
    for (int c = 0; c < NW; c++) begin
      start = (c == 3);          // must be ignored: busy
      #1;
      checks++; if (load) begin failures++; $display("FAIL load while active"); end
      expect_state("run", 1, c, c > 0, c - 1, 0);
      @(posedge clk); #1;
    end
    // drain cycle: last window's results, ready again; start back to back
    start = 1; #1;
    expect_state("drain", 0, 0, 1, NW - 1, 1);
    checks++; if (!load) begin failures++; $display("FAIL no back-to-back load"); end
    @(posedge clk); #1;
    start = 0;
    t_done = 0;
    for (int c = 0; c < 3 * NW; c++) begin
      if (done) begin t_done = c; break; end
      @(posedge clk); #1;
    end
    checks++;
    if (t_done != NW) begin
      failures++;
      $display("FAIL second polynomial done after %0d cycles, expected %0d", t_done, NW);
    end
    @(posedge clk); #1;
    expect_state("idle2", 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
