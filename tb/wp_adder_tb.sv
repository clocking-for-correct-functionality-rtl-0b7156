`timescale 1ps/1ps
// wp_adder_tb: runs the 8-bit adder as a wave pipeline.
//  1. One launch in an idle adder. The sum output of the balancing network
//     must not move before TMIN = 50 + 7*80 + 100 = 710 ps and must be final
//     by TMAX = 50 + 7*100 + 100 = 850 ps. The test picks a carry that ripples
//     through all bits.
//  2. wp_clock and outclk are one 600 ps clock. Random operands are launched
//     on every edge, so two waves are in the adder at once. Every registered
//     sum must equal a + b of the operands launched two edges earlier
//     (latency 2 cycles).
//  3. A second adder with 160 ps carry cells (slow corner, TMAX = 1270 ps)
//     gets the same full-rate clock. At least one of its sums must be wrong,
//     because the spread no longer fits a 600 ps cycle.
//  4. The slow adder is then launched every 1200 ps, and its output register
//     is clocked 330 ps after each launch, which is the skew the clock circuit
//     would apply. Every sum must equal that of the previous launch.
module wp_adder_tb;
  localparam int unsigned W = 8, T = 600;
  localparam int unsigned TMIN = 710, TMAX = 850, TCQ = 50;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] a = '0, b = '0, sum, sum_s;
  logic wclk_s = 1'b0, oclk_s = 1'b0;
  int bad_full = 0;
  // Reset is asserted by a falling edge shortly after start.
  initial #10 rst_n = 1'b0;

  int checks = 0, failures = 0;

  wp_adder #(.W(W)) dut (
    .wp_clock(clk), .outclk(clk), .rst_n(rst_n), .a(a), .b(b), .sum(sum)
  );

  wp_adder #(.W(W), .T_CARRY_PS(160)) dut_slow (
    .wp_clock(wclk_s), .outclk(oclk_s), .rst_n(rst_n), .a(a), .b(b), .sum(sum_s)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  logic [W-1:0] qa[$], qb[$];

  initial begin
    #5000 rst_n = 1'b1;
    // Part 1: one launch, all-ones plus one ripples a carry through every bit.
    a = '1; b = 8'd1;
    #1000 clk = 1'b1;
    #(TMIN - 1) check(dut.s_d == '0, "balanced sum moved before TMIN");
    #(TMAX - TMIN + 2) check(dut.s_d == W'(a + b), "balanced sum not final at TMAX");
    #2000 clk = 1'b0;
    #1000;
    // Part 2: full-rate wave pipelining with two waves in flight.
    // Every other pair ripples a carry from bit 0 through every bit (bit 0
    // generates, all others propagate), so the longest path is exercised.
    for (int k = 0; k < 200; k++) begin
      a = W'($urandom); b = W'($urandom);
      if (k % 2 == 1) begin
        a[0] = 1'b1;
        b = ~a | W'(1);
      end
      qa.push_back(a); qb.push_back(b);
      clk = 1'b1; wclk_s = 1'b1; oclk_s = 1'b1;
      #(TCQ + 1);
      if (qa.size() > 3) begin
        void'(qa.pop_front()); void'(qb.pop_front());
      end
      if (k >= 2) check(sum == W'(qa[0] + qb[0]), $sformatf("sum %0d != %0d + %0d", sum, qa[0], qb[0]));
      if (k >= 2 && sum_s != W'(qa[0] + qb[0])) bad_full++;
      #(T / 2 - TCQ - 1) clk = 1'b0; wclk_s = 1'b0; oclk_s = 1'b0;
      #(T / 2);
    end
    check(bad_full > 0, "slow adder ran correctly at full rate");
    // Part 4: half rate with a 330 ps skewed capture clock.
    qa.delete(); qb.delete();
    #3000;
    for (int k = 0; k < 100; k++) begin
      a = W'($urandom); b = W'($urandom);
      qa.push_back(a); qb.push_back(b);
      wclk_s = 1'b1;
      #330 oclk_s = 1'b1;
      #(TCQ + 1);
      if (qa.size() > 2) begin
        void'(qa.pop_front()); void'(qb.pop_front());
      end
      if (k >= 1) check(sum_s == W'(qa[0] + qb[0]), $sformatf("half-rate sum %0d != %0d + %0d", sum_s, qa[0], qb[0]));
      #(T - 330 - TCQ - 1) wclk_s = 1'b0;
      #(T / 2) oclk_s = 1'b0;
      #(T / 2);
    end
    $display("slow adder: %0d wrong sums at full rate", bad_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
