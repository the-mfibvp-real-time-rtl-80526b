// tb_wallace_tree - self-checking test of the carry-save reduction tree.
//
// Feeds the tree the shifted partial products of random operands (built here
// from the operands, not by the design's generator) and checks that the sum
// and carry outputs add up to the exact product. A 64-row instance (the
// default size) and a 5-row instance (leftover rows at every layer) are
// checked side by side. A second set of checks feeds arbitrary random rows
// and compares the two outputs' sum with the sum of the rows modulo 2**(2N).
module tb_wallace_tree;
  localparam int N  = 64;
  localparam int NS = 5;
  logic [2*N-1:0]  pp  [N];
  logic [2*N-1:0]  s, c;
  logic [2*NS-1:0] pps [NS];
  logic [2*NS-1:0] ss, cs;
  int checks = 0, failures = 0;

  wallace_tree #(.N(N))  dut   (.pp(pp),  .sum(s),  .carry(c));
  wallace_tree #(.N(NS)) dut_s (.pp(pps), .sum(ss), .carry(cs));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0]    a, b;
    logic [2*N:0]    total, prod;
    logic [NS-1:0]   as, bs;
    logic [2*NS:0]   totals;
    logic [2*N-1:0]  rowsum;
    for (int t = 0; t < 300; t++) begin
      case (t)
        0:       begin a = '1; b = '1; end
        1:       begin a = '0; b = '1; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      for (int i = 0; i < N; i++) pp[i] = b[i] ? ({{N{1'b0}}, a} << i) : '0;
      as = NS'($urandom);
      bs = NS'($urandom);
      if (t == 0) begin as = '1; bs = '1; end
      for (int i = 0; i < NS; i++) pps[i] = bs[i] ? ({{NS{1'b0}}, as} << i) : '0;
      #1;
      total = {1'b0, s} + {1'b0, c};
      prod  = {1'b0, {{N{1'b0}}, a} * {{N{1'b0}}, b}};
      checks++;
      if (total !== prod) begin
        failures++;
        if (failures < 10) $display("N=64 sum+carry %h != product %h", total, prod);
      end
      totals = {1'b0, ss} + {1'b0, cs};
      checks++;
      if (totals !== (2*NS+1)'(as * bs)) begin
        failures++;
        if (failures < 10) $display("N=5 sum+carry %h != product %h", totals, as * bs);
      end
    end
    // arbitrary rows: the tree preserves the sum modulo 2**(2N)
    for (int t = 0; t < 50; t++) begin
      rowsum = '0;
      for (int i = 0; i < N; i++) begin
        pp[i]  = {$urandom, $urandom, $urandom, $urandom};
        rowsum = rowsum + pp[i];
      end
      #1;
      checks++;
      if ((s + c) !== rowsum) begin
        failures++;
        if (failures < 10) $display("random rows: sum not preserved");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
