// tb_mfibvp_adder - self-checking test of the MSB-first interval adder.
//
// For random and corner-case 128-bit operand pairs the test loads the adder,
// then steps it through all 32 four-bit phases. After every phase it checks,
// against values computed here from the operands:
//   lower == top_p(x) + top_p(y)     (unseen low bits taken as 0)
//   upper == lower + 2*(2**r - 1)    (unseen low bits taken as 1, r unseen)
//   err == upper - lower, lower <= x+y <= upper, phase == p
// and that the bounds meet at x+y after the last phase. It also checks that
// each step's result appears one cycle after the step and that an idle
// cycle holds the state.
module tb_mfibvp_adder;
  localparam int W   = 128;
  localparam int K   = 4;
  localparam int NPH = W / K;
  localparam int PW  = $clog2(NPH + 1);

  logic          clk = 0, rst_n = 0, load = 0, step = 0;
  logic [W-1:0]  x, y;
  logic [W:0]    lower, upper, err;
  logic [PW-1:0] phase;
  logic          complete;
  int checks = 0, failures = 0;

  mfibvp_adder #(.W(W), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .x_in(x), .y_in(y), .step(step),
    .lower(lower), .upper(upper), .err(err), .phase(phase), .complete(complete));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_phase(int p, logic [W-1:0] xv, logic [W-1:0] yv);
    int r;
    logic [W:0] m, lo_e, up_e, exact;
    r     = W - K * p;
    m     = ~(((W+1)'(1) << r) - 1);
    lo_e  = ({1'b0, xv} & m) + ({1'b0, yv} & m);
    up_e  = lo_e + 2 * (((W+1)'(1) << r) - 1);
    exact = {1'b0, xv} + {1'b0, yv};
    checks++;
    if (lower !== lo_e || upper !== up_e || err !== up_e - lo_e ||
        phase !== PW'(p) || complete !== (p == NPH) ||
        exact < lower || exact > upper) begin
      failures++;
      if (failures < 10)
        $display("phase %0d: lower=%h (exp %h) upper=%h (exp %h) phase=%0d",
                 p, lower, lo_e, upper, up_e, phase);
    end
  endtask

  task automatic run_pair(logic [W-1:0] xv, logic [W-1:0] yv, bit with_gaps);
    x = xv; y = yv;
    load = 1;
    @(posedge clk); #1;
    load = 0;
    x = ~xv; y = ~yv;   // inputs are only sampled at load
    expect_phase(0, xv, yv);
    for (int p = 1; p <= NPH; p++) begin
      step = 1;
      @(posedge clk); #1;
      step = 0;
      expect_phase(p, xv, yv);
      if (with_gaps && (p % 5 == 0)) begin
        @(posedge clk); #1;
        expect_phase(p, xv, yv);   // no step: nothing moves
      end
    end
    checks++;
    if (lower !== upper || lower !== ({1'b0, xv} + {1'b0, yv})) begin
      failures++;
      $display("final sum wrong: %h vs %h", lower, {1'b0, xv} + {1'b0, yv});
    end
  endtask

  initial begin
    x = '0; y = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_pair('0, '0, 1'b0);
    run_pair('1, '1, 1'b1);
    run_pair('1, 128'd1, 1'b0);
    run_pair({64'h0, 64'hFFFF_FFFF_FFFF_FFFF}, {64'h0, 64'h1}, 1'b0);
    for (int t = 0; t < 40; t++)
      run_pair({$urandom, $urandom, $urandom, $urandom},
               {$urandom, $urandom, $urandom, $urandom}, t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
