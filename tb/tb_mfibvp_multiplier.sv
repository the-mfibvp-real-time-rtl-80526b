// tb_mfibvp_multiplier - end-to-end test of the MFIBVP multiplier at its
// default size (64 x 64 bits, 4-bit digits, 32 phases).
//
// Workload: 50 random operand pairs plus corner cases, each run to
// completion. After every phase p the test checks, against the product
// computed here by the simulator's multiply:
//   lower <= A*B <= upper; err == upper - lower == 2*(2**r - 1) with
//   r = 128 - 4p unseen bits; lower is a multiple of 2**r;
//   phase == p exactly p+2 cycles after the start cycle;
// that the accuracy 1 - err/(2**64-1)**2 is at least 99% from phase 2 on,
// that lower == upper == A*B at the end, and that done rises 2N/K + 3
// cycles after the start cycle. The mean accuracy per phase over the random
// pairs is printed.
// It then exercises every way a run can end - all phases, phase budget,
// error limit, abort - and a start while busy, counts how often each
// happened, and counts a failure for any that never did.
module tb_mfibvp_multiplier;
  import mfibvp_pkg::*;
  localparam int N   = 64;
  localparam int K   = 4;
  localparam int W   = 2 * N;
  localparam int NPH = W / K;
  localparam int PW  = $clog2(NPH + 1);

  logic          clk = 0, rst_n = 0, start = 0, abort_req = 0;
  logic [N-1:0]  a = '0, b = '0;
  logic [PW-1:0] max_phases = '0;
  logic [W:0]    err_limit = '0;
  logic          busy, done;
  stop_reason_e  stop_reason;
  logic [PW-1:0] phase;
  logic [W-1:0]  lower;
  logic [W:0]    upper, err;

  int checks = 0, failures = 0;
  int n_complete = 0, n_budget = 0, n_accuracy = 0, n_abort = 0;
  int n_restart_ignored = 0, n_early_reads = 0;
  real acc_sum [NPH+1];
  int  acc_cnt = 0;

  mfibvp_multiplier dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
    .max_phases(max_phases), .err_limit(err_limit), .abort_req(abort_req),
    .busy(busy), .done(done), .stop_reason(stop_reason), .phase(phase),
    .lower(lower), .upper(upper), .err(err));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [W:0] DMAX = {1'b0, {N{1'b1}}} * {1'b0, {N{1'b1}}};

  function automatic real accuracy(logic [W:0] e);
    // 1 - e/DMAX, computed on the top bits (enough for a percentage)
    return 1.0 - real'(e >> 64) / real'(DMAX >> 64);
  endfunction

  task automatic check_bounds(logic [W-1:0] prod, int p, bit record);
    int r;
    logic [W:0] span;
    r    = W - K * p;
    span = 2 * (((W+1)'(1) << r) - 1);
    checks++;
    if (!({1'b0, lower} <= {1'b0, prod} && {1'b0, prod} <= upper) ||
        err !== upper - {1'b0, lower} || err !== span ||
        (r > 0 && (lower & ((W'(1) << r) - 1)) != '0)) begin
      failures++;
      if (failures < 10)
        $display("phase %0d: lower=%h upper=%h prod=%h err=%h", p, lower, upper, prod, err);
    end
    if (p >= 2) begin
      checks++;
      // accuracy >= 99%  <=>  100*err <= DMAX
      if ((W+8)'(err) * 100 > (W+8)'(DMAX)) begin
        failures++;
        $display("phase %0d: accuracy %f below 99%%", p, accuracy(err) * 100.0);
      end
    end
    if (record) acc_sum[p] += accuracy(err);
  endtask

  // One multiplication. abort_at >= 0 raises abort_req when phase reaches it.
  task automatic run_op(logic [N-1:0] av, logic [N-1:0] bv, int budget,
                        logic [W:0] limit, int abort_at, bit restart,
                        stop_reason_e exp_reason, int exp_phases, bit record);
    logic [W-1:0] prod;
    int cyc;
    prod = {{N{1'b0}}, av} * {{N{1'b0}}, bv};
    a = av; b = bv; max_phases = PW'(budget); err_limit = limit;
    start = 1;
    @(posedge clk); #1;                 // end of start cycle
    start = 0;
    a = ~av; b = ~bv;                   // operands are only sampled with start
    cyc = 1;
    while (!done) begin
      if (cyc >= 2) begin
        checks++;
        if (int'(phase) != cyc - 2 || !busy) begin
          failures++;
          if (failures < 10) $display("cycle %0d: phase=%0d busy=%b", cyc, phase, busy);
        end
        check_bounds(prod, int'(phase), record);
        if (phase != '0 && phase != PW'(NPH)) n_early_reads++;
      end
      if (cyc >= 2 && abort_at >= 0 && int'(phase) >= abort_at) abort_req = 1;
      if (restart && cyc == 5) begin
        start = 1;                      // ignored: the unit is busy
        a = '1; b = '1;
      end
      @(posedge clk); #1;
      if (start) n_restart_ignored++;
      start = 0;
      cyc++;
      if (cyc > NPH + 10) break;
    end
    abort_req = 0;
    checks++;
    if (!done || stop_reason !== exp_reason || int'(phase) != exp_phases ||
        cyc != exp_phases + 3) begin
      failures++;
      $display("end: done=%b reason=%s phase=%0d cycles=%0d (exp %s %0d %0d)",
               done, stop_reason.name(), phase, cyc, exp_reason.name(), exp_phases,
               exp_phases + 3);
    end
    check_bounds(prod, int'(phase), 1'b0);
    if (exp_phases == NPH) begin
      checks++;
      if (lower !== prod || upper !== {1'b0, prod}) begin
        failures++;
        $display("final product wrong: %h * %h = %h, got %h", av, bv, prod, lower);
      end
    end
    case (stop_reason)
      STOP_COMPLETE: n_complete++;
      STOP_BUDGET:   n_budget++;
      STOP_ACCURACY: n_accuracy++;
      STOP_ABORT:    n_abort++;
      default: ;
    endcase
  endtask

  initial begin
    logic [N-1:0] av, bv;
    for (int p = 0; p <= NPH; p++) acc_sum[p] = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // corner cases
    run_op('0, '0, 0, '0, -1, 0, STOP_COMPLETE, NPH, 0);
    run_op('1, '1, 0, '0, -1, 0, STOP_COMPLETE, NPH, 0);
    run_op('1, 64'd1, 0, '0, -1, 0, STOP_COMPLETE, NPH, 0);
    run_op(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 0, '0, -1, 0,
           STOP_COMPLETE, NPH, 0);

    // workload: 50 random 64-bit pairs, run to completion
    for (int t = 0; t < 50; t++) begin
      av = {$urandom, $urandom};
      bv = {$urandom, $urandom};
      run_op(av, bv, 0, '0, -1, 0, STOP_COMPLETE, NPH, 1);
      acc_cnt++;
    end

    // variable precision: phase budget, error limit, abort, start while busy
    for (int t = 0; t < 4; t++) begin
      av = {$urandom, $urandom};
      bv = {$urandom, $urandom};
      run_op(av, bv, 2 + t, '0, -1, 0, STOP_BUDGET, 2 + t, 0);
      // err(p) = 2*(2**(128-4p)-1) <= 2**100 first at p = 8
      run_op(av, bv, 0, (W+1)'(1) << 100, -1, 0, STOP_ACCURACY, 8, 0);
      run_op(av, bv, 0, '0, 3 + t, 0, STOP_ABORT, 3 + t, 0);
      run_op(av, bv, 0, '0, -1, 1, STOP_COMPLETE, NPH, 0);
    end
    // a budget equal to the full phase count ends as a complete run
    run_op('1, 64'd12345, NPH, '0, -1, 0, STOP_COMPLETE, NPH, 0);

    $display("mean accuracy over %0d random pairs:", acc_cnt);
    for (int p = 0; p <= 4; p++)
      $display("  phase %0d: %f %%", p, 100.0 * acc_sum[p] / real'(acc_cnt));
    $display("runs ended: complete=%0d budget=%0d accuracy=%0d abort=%0d; starts ignored while busy=%0d; intermediate reads=%0d",
             n_complete, n_budget, n_accuracy, n_abort, n_restart_ignored, n_early_reads);
    checks++;
    if (n_complete == 0 || n_budget == 0 || n_accuracy == 0 || n_abort == 0 ||
        n_restart_ignored == 0 || n_early_reads == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
