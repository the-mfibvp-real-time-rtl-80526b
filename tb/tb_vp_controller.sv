// tb_vp_controller - self-checking test of the variable-precision sequencer.
//
// A small model of the MSB-first adder (phase counter cleared by load,
// advanced by step; error 2**(NPH-phase) - 1; complete at phase NPH) closes
// the loop around the controller. Five runs cover every way a computation
// ends: all phases (STOP_COMPLETE), a phase budget (STOP_BUDGET), an error
// limit (STOP_ACCURACY) and an abort (STOP_ABORT), plus a start issued while
// busy, which must be ignored. For each run the test checks the stop reason,
// the number of steps issued, the order capture -> load -> steps, and the
// number of clock edges from the start edge to done (steps + 2).
module tb_vp_controller;
  import mfibvp_pkg::*;
  localparam int NPH = 8;
  localparam int EW  = NPH + 1;
  localparam int PW  = $clog2(NPH + 1);

  logic          clk = 0, rst_n = 0, start = 0, abort_req = 0;
  logic [PW-1:0] max_phases = '0;
  logic [EW-1:0] err_limit = '0;
  logic [PW-1:0] phase;
  logic [EW-1:0] err;
  logic          complete, capture, load, step, busy, done;
  stop_reason_e  stop_reason;
  int checks = 0, failures = 0;
  int steps, loads, captures;

  vp_controller #(.NPH(NPH), .EW(EW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .max_phases(max_phases),
    .err_limit(err_limit), .abort_req(abort_req), .phase(phase), .err(err),
    .complete(complete), .capture(capture), .load(load), .step(step),
    .busy(busy), .done(done), .stop_reason(stop_reason));

  always #5 clk = ~clk;

  // adder model
  always_ff @(posedge clk) begin
    if (!rst_n)      phase <= '0;
    else if (load)   phase <= '0;
    else if (step)   phase <= phase + 1'b1;
  end
  assign err      = EW'((1 << (NPH - int'(phase))) - 1);
  assign complete = (phase == PW'(NPH));

  always_ff @(posedge clk) begin
    if (capture) captures <= captures + 1;
    if (load)    loads    <= loads + 1;
    if (step) begin
      steps <= steps + 1;
      if (loads == 0) begin
        failures++;
        $display("step before load");
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int budget, int limit, int abort_after, bit restart_busy,
                     stop_reason_e exp_reason, int exp_steps);
    int edges = 0;
    max_phases = PW'(budget);
    err_limit  = EW'(limit);
    steps = 0; loads = 0; captures = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    while (!done) begin
      if (abort_after >= 0 && steps >= abort_after) abort_req = 1;
      if (restart_busy && edges == 3) start = 1;
      @(posedge clk); #1;
      start = 0;
      edges++;
    end
    abort_req = 0;
    checks++;
    if (stop_reason !== exp_reason || steps != exp_steps || loads != 1 ||
        captures != 1 || edges != exp_steps + 2 || busy) begin
      failures++;
      $display("run budget=%0d limit=%0d: reason=%s steps=%0d loads=%0d edges=%0d",
               budget, limit, stop_reason.name(), steps, loads, edges);
    end
    // done and the reason hold until the next start
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!done || stop_reason !== exp_reason) begin
      failures++;
      $display("done not held");
    end
  endtask

  initial begin
    steps = 0; loads = 0; captures = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (busy || done || capture || load || step) begin
      failures++;
      $display("not idle after reset");
    end
    run(0, 0, -1, 1'b0, STOP_COMPLETE, NPH);
    run(3, 0, -1, 1'b0, STOP_BUDGET, 3);
    run(0, (1 << (NPH - 5)) - 1, -1, 1'b0, STOP_ACCURACY, 5);
    run(0, 0, 2, 1'b0, STOP_ABORT, 2);
    run(0, 0, -1, 1'b1, STOP_COMPLETE, NPH);
    run(NPH, 0, -1, 1'b0, STOP_COMPLETE, NPH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
