`timescale 1ps/1ps
// wp_top_harness: drives one wp_clocking_top at one delay corner, and checks
// every sum it captures against a reference model in the testbench.
//
// Operands are random, and every other pair ripples a carry through all
// bits to exercise the longest path. They are recorded at each rising edge of wp_clock and
// replaced at the next falling edge of sclk. At each rising edge of outclk
// the sum is read T_CLKQ_PS + 1 ps later. The expected value is the sum of the
// latest launch at least 1.5 sclk periods before the capture edge. That is
// the launch two cycles back at full rate, and the previous launch at half
// rate. Sums are checked only while the clocking mode is settled: after
// SETTLE launches at full rate, and from SETTLE launches after the skew was
// engaged. Rate checks:
//  * before the skew engages, wp_clock pulses on every sclk cycle while
//    wp_enable is high;
//  * after it engages, consecutive wp_clock pulses are exactly two sclk
//    periods apart;
//  * after it engages, wp_check toggles on every lclk edge.
module wp_top_harness #(
  parameter int unsigned T_CARRY_PS = wp_timing_pkg::T_CARRY_PS,
  parameter int unsigned T_SCLK_PS  = 600,
  parameter int unsigned SETTLE     = 4
) (
  input  logic sclk,
  input  logic rst_n,
  input  logic wp_enable,
  output int   checks,
  output int   failures,
  output int   n_launch,        // wp_clock pulses
  output int   n_half_rate,     // launch gaps of 2 periods after skew
  output int   n_check_toggle,  // wp_check changes after skew
  output int   n_gated_idle,    // sclk cycles withheld while wp_enable = 0
  output int   n_sum_skew,      // sums checked after the skew engaged
  output logic skew_seen
);
  localparam int unsigned W = wp_timing_pkg::ADD_W;

  logic [W-1:0] a, b, sum;
  logic wp_clock, lclk, outclk, xor_o, wp_check, l_enable, skew_on;

  wp_clocking_top #(.T_CARRY_PS(T_CARRY_PS)) dut (
    .sclk(sclk), .rst_n(rst_n), .wp_enable(wp_enable), .a(a), .b(b),
    .sum(sum), .wp_clock(wp_clock), .lclk(lclk), .outclk(outclk),
    .xor_o(xor_o), .wp_check(wp_check), .l_enable(l_enable),
    .skew_on(skew_on)
  );

  typedef struct {
    longint       t;
    logic [W-1:0] a;
    logic [W-1:0] b;
    logic         skew;
  } launch_t;

  launch_t hist[$];
  longint  last_launch_t;
  int      launches_since_skew;
  int      launches_full;

  initial begin
    checks = 0; failures = 0; n_launch = 0; n_half_rate = 0;
    n_check_toggle = 0; n_gated_idle = 0; n_sum_skew = 0; skew_seen = 1'b0;
    a = '0; b = '0; last_launch_t = -1;
    launches_since_skew = 0; launches_full = 0;
  end

  // Record launches.
  always @(posedge wp_clock) begin
    launch_t l;
    l.t = longint'($time); l.a = a; l.b = b; l.skew = skew_on;
    hist.push_back(l);
    if (hist.size() > 16) void'(hist.pop_front());
    n_launch++;
    if (skew_on) begin
      launches_since_skew++;
      if (last_launch_t >= 0 && launches_since_skew > 1) begin
        checks++;
        if (longint'($time) - last_launch_t == 2 * longint'(T_SCLK_PS))
          n_half_rate++;
        else begin
          failures++;
          $display("FAIL t=%0t: launch gap %0d ps in half-rate mode", $time,
                   longint'($time) - last_launch_t);
        end
      end
    end else begin
      launches_full++;
    end
    last_launch_t = longint'($time);
  end

  // New operands after each launch, while sclk is low.
  always @(negedge sclk) begin
    if (last_launch_t >= 0 && longint'($time) - last_launch_t < longint'(T_SCLK_PS)) begin
      logic [W-1:0] ra, rb;
      ra = W'($urandom);
      rb = W'($urandom);
      // Every other pair sends a carry from bit 0 through all bits.
      if (n_launch % 2 == 1) begin
        ra[0] = 1'b1;
        rb    = ~ra | W'(1);
      end
      a <= ra;
      b <= rb;
    end
  end

  // Full-rate check: every sclk cycle with l_enable high launches.
  always @(posedge sclk) begin
    #(2 * wp_timing_pkg::T_GATE_PS);
    if (rst_n && !skew_on && launches_full > 0) begin
      if (wp_enable && dut.u_clkgen.and_en && l_enable) begin
        checks++;
        if (!wp_clock) begin
          failures++;
          $display("FAIL t=%0t: enabled full-rate cycle without wp_clock", $time);
        end
      end
      if (!l_enable && !wp_enable) begin
        checks++;
        n_gated_idle++;
        if (wp_clock) begin
          failures++;
          $display("FAIL t=%0t: wp_clock while disabled", $time);
        end
      end
    end
  end

  // Once skewed, wp_check must change on every lclk edge.
  logic prev_check;
  int   lclk_after_skew;
  initial lclk_after_skew = 0;
  always @(posedge lclk) begin
    #(wp_timing_pkg::T_CLKQ_PS + 1);
    if (skew_on && wp_enable) begin
      lclk_after_skew++;
      if (lclk_after_skew > 2 * SETTLE) begin
        checks++;
        if (wp_check != prev_check) n_check_toggle++;
        else begin
          failures++;
          $display("FAIL t=%0t: wp_check did not toggle", $time);
        end
      end
    end
    prev_check = wp_check;
  end

  always @(posedge skew_on) if (rst_n) skew_seen = 1'b1;

  // A pause of wp_enable restarts the settling of the half-rate checks.
  always @(posedge sclk)
    if (!wp_enable) begin
      launches_since_skew = 0;
      lclk_after_skew     = 0;
    end

  // Sum capture check.
  always @(posedge outclk) begin
    longint tc;
    tc = longint'($time);
    #(wp_timing_pkg::T_CLKQ_PS + 1);
    if (rst_n) begin
      bit found;
      launch_t exp;
      found = 1'b0;
      foreach (hist[i])
        if (hist[i].t <= tc - (3 * longint'(T_SCLK_PS)) / 2) begin
          exp = hist[i];
          found = 1'b1;
        end
      if (found && ((!skew_on && launches_full > SETTLE) ||
                    (skew_on && exp.skew && launches_since_skew > SETTLE))) begin
        checks++;
        if (skew_on) n_sum_skew++;
        if (sum !== W'(exp.a + exp.b)) begin
          failures++;
          $display("FAIL t=%0t: sum %0d, expected %0d + %0d = %0d (launched %0t)",
                   $time, sum, exp.a, exp.b, W'(exp.a + exp.b), exp.t);
        end
      end
    end
  end
endmodule
