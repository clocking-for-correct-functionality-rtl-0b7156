`timescale 1ps/1ps
// wp_clocking_top_tb: end-to-end test of the wave-pipelined adder and its
// clocking circuit at two delay corners driven by one 600 ps system clock.
//
//  * Nominal corner (default delays): min path 710 ps, max path 850 ps. Two
//    waves are in the adder at once at full rate. The check must never fire,
//    and every sum must be right.
//  * Slow corner (carry cells 160 ps instead of 100 ps): max path 1270 ps.
//    The spread, 560 ps plus the detection margin, no longer fits a 600 ps
//    cycle at two waves. The check must fire, the skew must engage, the adder
//    must then be clocked on every other cycle, WP_CHECK must toggle every
//    cycle, and every sum captured after that must be right.
// In the middle of the run wp_enable is dropped for a while, and no wp_clock
// pulse may then appear. The mechanisms counted: skew engaged, half-rate
// launches, WP_CHECK toggles, cycles withheld by wp_enable. Each must happen
// at least once.
module wp_clocking_top_tb;
  localparam int unsigned T_SCLK_PS = 600;
  localparam int unsigned CYCLES    = 400;

  logic sclk = 1'b0;
  logic rst_n = 1'b1;
  logic wp_enable = 1'b0;

  always #(T_SCLK_PS / 2) sclk = ~sclk;

  int c_nom, f_nom, l_nom, h_nom, t_nom, g_nom, s_nom;
  int c_slw, f_slw, l_slw, h_slw, t_slw, g_slw, s_slw;
  logic skew_nom, skew_slw;

  wp_top_harness #(.T_SCLK_PS(T_SCLK_PS)) u_nom (
    .sclk(sclk), .rst_n(rst_n), .wp_enable(wp_enable),
    .checks(c_nom), .failures(f_nom), .n_launch(l_nom), .n_half_rate(h_nom),
    .n_check_toggle(t_nom), .n_gated_idle(g_nom), .n_sum_skew(s_nom), .skew_seen(skew_nom)
  );
  wp_top_harness #(.T_CARRY_PS(160), .T_SCLK_PS(T_SCLK_PS)) u_slow (
    .sclk(sclk), .rst_n(rst_n), .wp_enable(wp_enable),
    .checks(c_slw), .failures(f_slw), .n_launch(l_slw), .n_half_rate(h_slw),
    .n_check_toggle(t_slw), .n_gated_idle(g_slw), .n_sum_skew(s_slw), .skew_seen(skew_slw)
  );

  // Reset is asserted by a falling edge shortly after start.
  initial #10 rst_n = 1'b0;

  int checks = 0, failures = 0;

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (6) @(posedge sclk);
    #(T_SCLK_PS / 4) rst_n = 1'b1;
    repeat (2) @(posedge sclk);
    #(T_SCLK_PS / 4) wp_enable = 1'b1;
    repeat (CYCLES / 2) @(posedge sclk);
    #(T_SCLK_PS / 4) wp_enable = 1'b0;
    repeat (10) @(posedge sclk);
    #(T_SCLK_PS / 4) wp_enable = 1'b1;
    repeat (CYCLES / 2) @(posedge sclk);
    #(T_SCLK_PS / 4);

    checks   += c_nom + c_slw;
    failures += f_nom + f_slw;
    expect_true(!skew_nom, "nominal corner engaged the skew");
    expect_true(skew_slw, "slow corner never engaged the skew");
    expect_true(h_slw > 0, "no half-rate launch at the slow corner");
    expect_true(t_slw > 0, "wp_check never toggled at the slow corner");
    expect_true(s_slw > 0, "no sum checked after the skew engaged");
    expect_true(g_nom > 0, "wp_enable never withheld a clock");
    // Rate: the nominal adder runs at full rate, the slow one near half rate.
    expect_true(l_nom >= CYCLES - 4, "nominal corner lost launches");
    expect_true(l_slw <= CYCLES / 2 + 8 && l_slw >= CYCLES / 2 - 8,
                "slow corner not at half rate");
    $display("nominal: launches=%0d checks=%0d  slow: launches=%0d half_rate=%0d check_toggles=%0d  idle=%0d sums_after_skew=%0d",
             l_nom, c_nom, l_slw, h_slw, t_slw, g_nom, s_slw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_SCLK_PS * (CYCLES + 100));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
