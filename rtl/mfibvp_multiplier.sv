// mfibvp_multiplier - MSB-first, interval-bounded, variable-precision
// (MFIBVP) real-time unsigned multiplier.
//
// The product A*B (N-bit unsigned operands) is built as in an array
// multiplier: an AND array generates the N partial products (pp_gen), a
// Wallace tree of 3:2 carry-save adders reduces them to a sum and a carry
// vector (wallace_tree), and a final adder adds those two. The final adder
// (mfibvp_adder) works most-significant digit first, K bits per phase, and
// after every phase presents a lower and an upper bound that are guaranteed
// to enclose the exact product, with err = upper - lower as its own error
// estimate. Because the leading digits come first, the bounds are tight
// early: with N=64, K=4 the interval is 12.5% of the largest product after
// phase 1 and under 0.8% after phase 2, i.e. the accuracy
// 1 - err/(2**N-1)**2 exceeds 99% from the second phase on. A controller
// (vp_controller) lets the caller stop the computation early: after a phase
// budget, once err falls to an error limit, or at once on abort_req; otherwise it
// runs all 2N/K phases and lower == upper == A*B.
//
// The structure (partial products, Wallace reduction, MSB-first interval
// adder, variable-precision stopping) and the sizes N=64, K=4 follow the
// MFIBVP design; the clocking (one cycle for the reduction, one cycle per
// phase), the handshake and the stop-reason encoding are this design's own.
//
// Interface and timing (rising edge, synchronous active-low reset):
//   start with a, b, max_phases (0 = no budget), err_limit (0 = exact)
//   sampled: cycle t. The reduction tree's result is loaded into the adder
//   at the edge ending cycle t+1; bounds for phase p are visible from cycle
//   t+2+p (phase output = p). A full run ends with done high at cycle
//   t+3+2N/K (t+35 for the defaults). lower, upper, err and phase can be read
//   at any time while busy: they are the intermediate results. done and
//   stop_reason hold until the next start. lower is 2N bits since it never
//   exceeds the product; upper may exceed 2**(2N)-1 early on, so it and err
//   are 2N+1 bits.
module mfibvp_multiplier
  import mfibvp_pkg::*;
#(
  parameter int N = 64,   // operand width
  parameter int K = 4,    // digit width: product bits resolved per phase
  localparam int W   = 2 * N,
  localparam int NPH = num_phases(N, K),
  localparam int PW  = phase_bits(N, K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic [PW-1:0] max_phases,
  input  logic [W:0]    err_limit,
  input  logic          abort_req,
  output logic          busy,
  output logic          done,
  output stop_reason_e  stop_reason,
  output logic [PW-1:0] phase,
  output logic [W-1:0]  lower,
  output logic [W:0]    upper,
  output logic [W:0]    err
);

  logic [N-1:0] a_q, b_q;
  logic         capture, load, step, complete;
  logic [W-1:0] pp [N];
  logic [W-1:0] red_sum, red_carry;
  logic [W:0]   lower_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (capture) begin
      a_q <= a;
      b_q <= b;
    end
  end

  pp_gen #(.N(N)) u_pp (
    .a (a_q),
    .b (b_q),
    .pp(pp)
  );

  wallace_tree #(.N(N)) u_tree (
    .pp   (pp),
    .sum  (red_sum),
    .carry(red_carry)
  );

  mfibvp_adder #(.W(W), .K(K)) u_adder (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (load),
    .x_in    (red_sum),
    .y_in    (red_carry),
    .step    (step),
    .lower   (lower_full),
    .upper   (upper),
    .err     (err),
    .phase   (phase),
    .complete(complete)
  );

  vp_controller #(.NPH(NPH), .EW(W + 1)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .max_phases (max_phases),
    .err_limit  (err_limit),
    .abort_req      (abort_req),
    .phase      (phase),
    .err        (err),
    .complete   (complete),
    .capture    (capture),
    .load       (load),
    .step       (step),
    .busy       (busy),
    .done       (done),
    .stop_reason(stop_reason)
  );

  // The sum and carry of the reduction tree add up to the product, which is
  // below 2**(2N), so the lower bound never reaches bit 2N.
  assign lower = lower_full[W-1:0];

  a_lower_fits: assert property (@(posedge clk) disable iff (!rst_n)
    lower_full[W] == 1'b0);

endmodule
