`timescale 1ps/1ps
// self_check_tb: two self-check circuits, one at the nominal corner and one
// with 160 ps carry cells (slow corner).
//  1. A single wp_clock edge at t0. XOR must rise at
//     t0 + T_CLKQ + TMIN_PATH + T_GATE = t0 + 50 + 660 + 20 = t0 + 730 and
//     fall at t0 + 50 + TMAX_PATH + 20. TMAX_PATH is 800 ps nominal and
//     1220 ps slow. It is checked 1 ps either side.
//  2. wp_clock and lclk run together at 600 ps. Launches then come every
//     600 ps, and each XOR window spans [730, 870) or [730, 1290) ps after its
//     launch. The nominal window never contains a sampling edge, so WP_CHECK
//     must stay 0. The slow window always contains the edge 1200 ps after its
//     launch, so from the third edge on WP_CHECK must be 1. wp_check_n must
//     always be the complement.
module self_check_tb;
  localparam int unsigned T = 600;
  logic wp_clock = 1'b0, rst_n = 1'b1;
  logic max_n, min_n, xor_n, chk_n, chkb_n;
  logic max_s, min_s, xor_s, chk_s, chkb_s;
  // Reset is asserted by a falling edge shortly after start.
  initial #10 rst_n = 1'b0;

  int checks = 0, failures = 0;

  self_check u_nom (
    .wp_clock(wp_clock), .lclk(wp_clock), .rst_n(rst_n),
    .max_o(max_n), .min_o(min_n), .xor_o(xor_n),
    .wp_check(chk_n), .wp_check_n(chkb_n)
  );
  self_check #(.T_CARRY_PS(160)) u_slow (
    .wp_clock(wp_clock), .lclk(wp_clock), .rst_n(rst_n),
    .max_o(max_s), .min_o(min_s), .xor_o(xor_s),
    .wp_check(chk_s), .wp_check_n(chkb_s)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #3000 rst_n = 1'b1;
    #1000;
    // Part 1: one launch.
    wp_clock = 1'b1;
    #(729)  check(!xor_n && !xor_s, "XOR rose before 730 ps");
    #2      check(xor_n && xor_s, "XOR not high at 731 ps");
    #(138)  check(xor_n, "nominal XOR fell before 870 ps");
    #2      check(!xor_n, "nominal XOR still high at 871 ps");
    #(418)  check(xor_s, "slow XOR fell before 1290 ps");
    #2      check(!xor_s, "slow XOR still high at 1291 ps");
    check(!chk_n && !chk_s, "WP_CHECK set without an lclk edge");
    wp_clock = 1'b0;
    #3000;
    // Part 2: continuous clock.
    for (int k = 0; k < 60; k++) begin
      wp_clock = 1'b1;
      #(T / 2) wp_clock = 1'b0;
      check(chk_n == 1'b0, "nominal WP_CHECK fired");
      if (k >= 2) check(chk_s == 1'b1, "slow WP_CHECK not set");
      check(chkb_n == ~chk_n && chkb_s == ~chk_s, "wp_check_n not the complement");
      #(T / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
