// tb_cs_full_row: checks the last-row adder and identity comparator with
// random product words and with words built so that their sum is exactly 1
// (an error) or differs from 1 in a single bit.
module tb_cs_full_row;
  localparam int M = 14;
  localparam int T = 40;

  logic [T-1:0][M-1:0] prod;
  logic [M-1:0]        y;
  logic                err;

  cs_full_row #(.M(M), .T(T)) dut (.prod, .y, .err);

  int checks = 0, failures = 0, hits = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] acc;
    logic [M-1:0] target;
    for (int n = 0; n < 1500; n++) begin
      acc = '0;
      for (int j = 1; j < T; j++) begin
        prod[j] = M'($urandom);
        acc = acc ^ prod[j];
      end
      case (n % 3)
        0: target = M'(1);
        1: target = M'(1) ^ (M'(1) << $urandom_range(M - 1, 0));
        default: target = M'($urandom);
      endcase
      prod[0] = acc ^ target;
      #1;
      checks++;
      if (y != target || err != (target == M'(1))) begin
        failures++;
        $display("FAIL n=%0d y=%h target=%h err=%b", n, y, target, err);
      end
      if (err) hits++;
    end
    checks++;
    if (hits < 400) begin
      failures++;
      $display("FAIL too few error detections: %0d", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
