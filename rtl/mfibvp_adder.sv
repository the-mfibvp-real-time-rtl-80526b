// mfibvp_adder - MSB-first, interval-bounded, digit-serial two-operand adder.
//
// The adder forms X + Y (W-bit unsigned operands, W+1-bit sum) one K-bit
// digit per phase, starting at the most significant digit. After phase p
// the top p digits of both operands have been added in:
//
//   lower = top_p(X) + top_p(Y)          (the digits not yet seen taken as 0)
//   upper = 2*(2**W - 1) - (top_p(~X) + top_p(~Y))
//
// The upper bound is obtained, as the design proposes, by running the same
// lower-bound accumulation on the complemented operands in parallel and
// subtracting it from the largest possible sum; it equals the sum with every
// unseen bit taken as 1. The exact sum always lies in [lower, upper], the
// width upper - lower = 2*(2**r - 1) with r = W - K*p unseen bits, and after
// the last phase (W/K phases) lower == upper == X + Y. A one-hot digit mask
// register walks from the top digit down, so each phase adds only the masked
// digit into two accumulators; no barrel shifter is needed.
//
// The accumulator organisation (digit mask, two running sums) is this
// design's own; the MSB-first order and the complement-based upper bound
// follow the MFIBVP method.
//
// Interface and timing (all on the rising clock edge, synchronous active-low
// reset):
//   load   : captures x_in, y_in, clears both sums, phase <= 0. After a load
//            lower = 0 and upper = 2*(2**W - 1).
//   step   : adds the next digit; phase increments. The new bounds appear
//            the cycle after the step. A step after the last phase is
//            ignored (and flagged by an assertion). load wins over step.
//   lower, upper, err (= upper - lower), phase, complete (phase == W/K)
//   are registered-state outputs, readable at any time: they are the
//   intermediate results.
module mfibvp_adder #(
  parameter int W = 128,   // operand width (2N for an N x N multiplier)
  parameter int K = 4,     // digit width: bits resolved per phase
  localparam int NPH = W / K,
  localparam int PW  = $clog2(NPH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [W-1:0]  x_in,
  input  logic [W-1:0]  y_in,
  input  logic          step,
  output logic [W:0]    lower,
  output logic [W:0]    upper,
  output logic [W:0]    err,
  output logic [PW-1:0] phase,
  output logic          complete
);

  initial assert (W % K == 0 && K >= 1 && K <= W)
    else $error("mfibvp_adder: W must be a multiple of K");

  localparam logic [W:0] MAX_SUM = {1'b1, {(W-1){1'b1}}, 1'b0};  // 2*(2**W - 1)

  logic [W-1:0] x_q, y_q;
  logic [W-1:0] dmask;       // ones over the digit the next step adds
  logic [W:0]   lo_acc;      // sum of the digits of x and y seen so far
  logic [W:0]   cm_acc;      // same for ~x and ~y

  logic [W:0]   lo_inc, cm_inc;

  always_comb begin
    lo_inc = {1'b0, x_q & dmask} + {1'b0, y_q & dmask};
    cm_inc = {1'b0, ~x_q & dmask} + {1'b0, ~y_q & dmask};
  end

  assign complete = (phase == PW'(NPH));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q    <= '0;
      y_q    <= '0;
      dmask  <= '0;
      lo_acc <= '0;
      cm_acc <= '0;
      phase  <= '0;
    end else if (load) begin
      x_q    <= x_in;
      y_q    <= y_in;
      dmask  <= {{K{1'b1}}, {(W-K){1'b0}}};
      lo_acc <= '0;
      cm_acc <= '0;
      phase  <= '0;
    end else if (step && !complete) begin
      lo_acc <= lo_acc + lo_inc;
      cm_acc <= cm_acc + cm_inc;
      dmask  <= dmask >> K;
      phase  <= phase + 1'b1;
    end
  end

  always_comb begin
    lower = lo_acc;
    upper = MAX_SUM - cm_acc;
    err   = upper - lower;
  end

  // The interval never inverts.
  a_bounds_ordered: assert property (@(posedge clk) disable iff (!rst_n)
    lower <= upper);
  // No digit is left to add once every phase has run.
  a_no_step_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    (step && !load) |-> !complete);

endmodule
