// chien_search_two_step: low-power p-parallel Chien search for binary BCH
// codes, using a two-step test.
//
// Given the error locator polynomial Lambda(x) = 1 + sum_j lambda_j x^j from
// the key-equation solver, the search tests the positions x = alpha^k,
// k = 1..n, p at a time: in cycle w it evaluates Y(alpha^(wp+i)) =
// sum_j omega_j(w) alpha^(i*j), i = 1..p, with omega_j(w) = lambda_j
// alpha^(j*p*w) held in t registers. An error is at position wp+i when Y is the
// identity 0...01.
//
// Structure (after the published two-step architecture):
//   * t omega_cell blocks: register, load multiplexer and the alpha^(j*p)
//     multiplier that both updates the register and feeds the last row;
//   * cs_full_row for i = p, tested in full every cycle;
//   * p-1 cs_two_step_row blocks for i = 1..p-1: step one tests only the top
//     L bits of Y and, only when they are all zero, step two computes and tests
//     the other M-L bits in the next cycle from the updated registers;
//   * cs_ctrl sequencing load, the n/p iterations and output valid.
// The row-p result is delayed by one flip-flop so that all p results of a
// window leave together (own choice), and bits of the last window beyond
// position n are masked when p does not divide n (own choice).
//
// Interface: lambda[j-1] = lambda_j. Assert start with lambda valid while
// ready is high. NW = ceil(n/p) cycles later the first results come out:
// err_valid is high for NW cycles, err_window = w, and err[i-1] flags an
// error at position w*p+i. done marks the last window. Per-row step-two
// enables are brought out as step2_en for power and activity measurement.
// Latency from start to the first result: 2 cycles; a new start is taken
// every NW+1 cycles at most.
module chien_search_two_step
  import cs_pkg::*;
#(
  parameter int          M    = DEF_M,
  parameter int          T    = DEF_T,
  parameter int          N    = DEF_N,
  parameter int          P    = DEF_P,
  parameter int          L    = DEF_L,
  parameter logic [31:0] POLY = DEF_POLY,
  localparam int         NW   = (N + P - 1) / P,
  localparam int         WW   = $clog2(NW + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                ready,
  input  logic [T-1:0][M-1:0] lambda,
  output logic                err_valid,
  output logic [WW-1:0]       err_window,
  output logic [P-1:0]        err,
  output logic [P-2:0]        step2_en,
  output logic                done
);

  logic                load;
  logic                active;
  logic [T-1:0][M-1:0] omega;
  logic [T-1:0][M-1:0] prod;
  logic                err_p;
  logic                err_p_d;
  logic [P-1:0]        err_raw;
  logic [P-1:0]        pos_ok;

  cs_ctrl #(.NW(NW), .WW(WW)) u_ctrl (
    .clk, .rst_n, .start, .ready, .load, .active, .window(),
    .out_valid(err_valid), .out_window(err_window), .done
  );

  for (genvar j = 0; j < T; j++) begin : g_omega
    omega_cell #(.M(M), .POLY(POLY), .J(j + 1), .P(P)) u_cell (
      .clk, .rst_n, .load, .update(active),
      .lambda(lambda[j]), .omega(omega[j]), .prod(prod[j])
    );
  end

  for (genvar i = 1; i < P; i++) begin : g_row
    cs_two_step_row #(.M(M), .T(T), .P(P), .L(L), .I(i), .POLY(POLY)) u_row (
      .clk, .rst_n, .valid(active), .omega,
      .en(step2_en[i-1]), .err(err_raw[i-1])
    );
  end

  cs_full_row #(.M(M), .T(T)) u_row_p (.prod, .y(), .err(err_p));

  always_ff @(posedge clk) begin
    if (!rst_n) err_p_d <= 1'b0;
    else        err_p_d <= active && err_p;
  end
  assign err_raw[P-1] = err_p_d;

  // Positions beyond n in the last window are not part of the code word.
  always_comb begin
    for (int i = 0; i < P; i++)
      pos_ok[i] = (int'(err_window) * P + i + 1) <= N;
  end

  assign err = err_valid ? (err_raw & pos_ok) : '0;

endmodule
