`timescale 1ps/1ps
// fa_cell_tb: applies all eight input combinations to one full-adder cell.
// Each time it checks that sum and cout have not yet moved 1 ps before their
// delays end, and that they hold a + b + cin from 1 ps after.
module fa_cell_tb;
  localparam int unsigned TS = 100, TC = 140;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  fa_cell #(.T_SUM_PS(TS), .T_CARRY_PS(TC)) dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout)
  );

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    logic [1:0] full, prev;
    {a, b, cin} = 3'b000;
    #1000;
    prev = 2'b00;
    for (int v = 1; v < 9; v++) begin
      {a, b, cin} = 3'(v % 8);
      full = 2'(a) + 2'(b) + 2'(cin);
      #(TS - 1) check(sum, prev[0], "sum before its delay");
      #2        check(sum, full[0], "sum after its delay");
      #(TC - TS - 2) check(cout, prev[1], "cout before its delay");
      #2             check(cout, full[1], "cout after its delay");
      #500;
      prev = full;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
