// vp_controller - variable-precision sequencer of the MFIBVP multiplier.
//
// A multiplication has an obligatory part, which must always run, and an
// optional part that may be cut short. Here the obligatory part is the
// capture of the operands and one cycle for partial-product generation and
// Wallace reduction, ending with the load of the MSB-first adder. The
// optional part is the sequence of adder phases, one result digit each.
// Before every phase the controller checks, in this order:
//   1. all phases done           -> stop, reason STOP_COMPLETE
//   2. abort_req (deadline) asserted -> stop, reason STOP_ABORT
//   3. phase budget reached      -> stop, reason STOP_BUDGET   (budget 0 = none)
//   4. upper-lower <= err limit  -> stop, reason STOP_ACCURACY
// and otherwise issues a step. Stopping on accuracy or on time follows the
// variable-precision method; the check order, the encodings and the
// handshake are this design's own.
//
// Timing: start is accepted when the controller is idle or done; the
// budget and the error limit are sampled with it. Cycle 0: start seen,
// capture=1. Cycle 1: load=1. Cycles 2.. : step=1 while running. done rises
// the cycle after the last step is decided against and stays high, with
// stop_reason, until the next start. busy is high from the cycle after start
// until done. A start while busy is ignored.
module vp_controller
  import mfibvp_pkg::*;
#(
  parameter int NPH = 32,                 // phases of a full computation
  parameter int EW  = 129,                // width of the error value
  localparam int PW = $clog2(NPH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PW-1:0] max_phases,      // phase budget, 0 = unlimited
  input  logic [EW-1:0] err_limit,       // accuracy target on upper - lower
  input  logic          abort_req,
  input  logic [PW-1:0] phase,           // from the adder
  input  logic [EW-1:0] err,             // from the adder
  input  logic          complete,        // from the adder
  output logic          capture,         // register the operands
  output logic          load,            // load the adder from the reduction tree
  output logic          step,            // run one adder phase
  output logic          busy,
  output logic          done,
  output stop_reason_e  stop_reason
);

  typedef enum logic [1:0] {S_IDLE, S_MAND, S_RUN, S_DONE} state_e;

  state_e        state, state_n;
  logic [PW-1:0] budget_q;
  logic [EW-1:0] limit_q;
  stop_reason_e  reason_n;
  logic          stop_now;

  always_comb begin
    capture  = 1'b0;
    load     = 1'b0;
    step     = 1'b0;
    stop_now = 1'b0;
    reason_n = stop_reason;
    state_n  = state;
    unique case (state)
      S_IDLE, S_DONE: begin
        if (start) begin
          capture = 1'b1;
          state_n = S_MAND;
        end
      end
      S_MAND: begin
        load    = 1'b1;
        state_n = S_RUN;
      end
      S_RUN: begin
        stop_now = 1'b1;
        if (complete)                                  reason_n = STOP_COMPLETE;
        else if (abort_req)                                reason_n = STOP_ABORT;
        else if (budget_q != '0 && phase >= budget_q)  reason_n = STOP_BUDGET;
        else if (err <= limit_q)                       reason_n = STOP_ACCURACY;
        else                                           stop_now = 1'b0;
        if (stop_now) state_n = S_DONE;
        else          step    = 1'b1;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      budget_q    <= '0;
      limit_q     <= '0;
      stop_reason <= STOP_COMPLETE;
    end else begin
      state <= state_n;
      if (capture) begin
        budget_q <= max_phases;
        limit_q  <= err_limit;
      end
      if (stop_now) stop_reason <= reason_n;
    end
  end

  assign busy = (state == S_MAND) || (state == S_RUN);
  assign done = (state == S_DONE);

  a_one_action: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({capture, load, step}));

endmodule
