`timescale 1ps/1ps
// wp_clocking_full_tb: the top at its default parameters (nominal delays)
// with a 600 ps system clock. The adder runs at full rate with two waves in
// flight for 300 cycles. Random operands alternate with operands that ripple
// a carry through all bits. The test checks:
//  * every captured sum equals a + b of the launch two cycles earlier;
//  * wp_clock pulses on every cycle, and the skew never engages;
//  * the total latency from the first launch to the last checked sum.
module wp_clocking_full_tb;
  localparam int unsigned T = 600, W = wp_timing_pkg::ADD_W, N = 300;

  logic sclk = 1'b0, rst_n = 1'b1, wp_enable = 1'b0;
  logic [W-1:0] a = '0, b = '0, sum;
  logic wp_clock, lclk, outclk, xor_o, wp_check, l_enable, skew_on;
  // Reset is asserted by a falling edge shortly after start.
  initial #10 rst_n = 1'b0;

  int checks = 0, failures = 0, n_launch = 0;
  logic [W-1:0] qa[$], qb[$];

  wp_clocking_top dut (
    .sclk(sclk), .rst_n(rst_n), .wp_enable(wp_enable), .a(a), .b(b),
    .sum(sum), .wp_clock(wp_clock), .lclk(lclk), .outclk(outclk),
    .xor_o(xor_o), .wp_check(wp_check), .l_enable(l_enable),
    .skew_on(skew_on)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  always #(T / 2) sclk = ~sclk;

  always @(posedge wp_clock) begin
    qa.push_back(a);
    qb.push_back(b);
    n_launch++;
  end

  always @(negedge sclk) begin
    logic [W-1:0] ra, rb;
    ra = W'($urandom);
    rb = W'($urandom);
    if (n_launch % 2 == 1) begin
      ra[0] = 1'b1;
      rb    = ~ra | W'(1);
    end
    a <= ra;
    b <= rb;
  end

  initial begin
    int cycles;
    repeat (6) @(posedge sclk);
    #150 rst_n = 1'b1;
    @(posedge sclk);
    #150 wp_enable = 1'b1;
    // The first launch happens at the second rising edge after enabling.
    cycles = 0;
    while (cycles < N) begin
      @(posedge sclk);
      #(2 * wp_timing_pkg::T_GATE_PS + wp_timing_pkg::T_CLKQ_PS + 1);
      if (n_launch > 0) begin
        cycles++;
        check(wp_clock, "no wp_clock pulse on an enabled cycle");
        check(!skew_on && !wp_check, "self check fired at the nominal corner");
        // Output register holds the launch two cycles before this edge.
        if (n_launch > 3) begin
          check(sum == W'(qa[n_launch - 3] + qb[n_launch - 3]),
                $sformatf("sum %0d != %0d + %0d", sum, qa[n_launch - 3], qb[n_launch - 3]));
        end
      end
    end
    check(n_launch == N, $sformatf("%0d launches in %0d cycles", n_launch, N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * (N + 100));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
