// tb_pp_gen - self-checking test of the partial-product generator.
//
// Drives random and corner-case 64-bit operands and compares every row with
// the multiplicand times the single multiplier bit, shifted into place, and
// the sum of all rows with the full product computed by the simulator's own
// multiply.
module tb_pp_gen;
  localparam int N = 64;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_once();
    logic [2*N-1:0] exp_row, total, prod;
    total = '0;
    #1;
    for (int i = 0; i < N; i++) begin
      exp_row = b[i] ? ({{N{1'b0}}, a} * (128'd1 << i)) : '0;
      total   = total + pp[i];
      checks++;
      if (pp[i] !== exp_row) begin
        failures++;
        if (failures < 10) $display("row %0d mismatch a=%h b=%h", i, a, b);
      end
    end
    prod = {{N{1'b0}}, a} * {{N{1'b0}}, b};
    checks++;
    if (total !== prod) begin
      failures++;
      $display("row sum mismatch a=%h b=%h", a, b);
    end
  endtask

  initial begin
    a = '0; b = '0;             check_once();
    a = '1; b = '1;             check_once();
    a = '1; b = 64'h1;          check_once();
    a = 64'h1; b = 64'h8000_0000_0000_0000; check_once();
    for (int t = 0; t < 200; t++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
