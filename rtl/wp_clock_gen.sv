`timescale 1ps/1ps
// wp_clock_gen: produces WP_CLOCK, the gated local clock of the
// wave-pipelined logic.
//
// AND_EN = WP_ENABLE & !WP_CHECK is registered into L_ENABLE, and
// WP_CLOCK = SCLK & L_ENABLE. While the logic fits the system clock, WP_CHECK
// stays low and WP_CLOCK follows SCLK. When the self-check register catches
// an unstable wave, L_ENABLE drops and the next SCLK pulse is withheld.
//
// Two choices here are this model's own.
//  * The L_ENABLE register is clocked on the falling edge of SCLK, so that
//    L_ENABLE only changes while SCLK is low and the AND gate never cuts a
//    clock pulse short. Before the skew is engaged LCLK equals SCLK, so this
//    is the falling edge of LCLK.
//  * Once skew_on is set, the enable is also blocked in the cycle after every
//    WP_CLOCK pulse (AND_EN includes !(skew_on & L_ENABLE)). The logic is then
//    clocked on exactly every other system-clock cycle. Without this term the
//    one-cycle latency of the check would let pairs of pulses through.
// Timing: L_ENABLE changes T_CLKQ_PS after the falling edge of SCLK. WP_CLOCK
// follows SCLK by T_GATE_PS.
module wp_clock_gen #(
  parameter int unsigned T_CLKQ_PS = wp_timing_pkg::T_CLKQ_PS,
  parameter int unsigned T_GATE_PS = wp_timing_pkg::T_GATE_PS
) (
  input  logic sclk,
  input  logic rst_n,
  input  logic wp_enable,   // from the rest of the chip: run the logic
  input  logic wp_check_n,  // !WP_CHECK from self_check
  input  logic skew_on,     // from skew_gen
  output logic and_en,
  output logic l_enable,
  output logic wp_clock
);
  logic unused_l_enable_n;

  logic and_en_now, wp_clock_now, sclk_n;

  assign and_en_now = wp_enable & wp_check_n & ~(skew_on & l_enable);
  tdelay #(.T_PS(T_GATE_PS)) u_and_en (.a(and_en_now), .y(and_en));

  dff_d #(.T_CLKQ_PS(T_CLKQ_PS), .RST_VAL(1'b0)) u_len (
    .clk(sclk_n), .rst_n(rst_n), .d(and_en), .q(l_enable), .qn(unused_l_enable_n)
  );

  assign sclk_n = ~sclk;

  assign wp_clock_now = sclk & l_enable;
  tdelay #(.T_PS(T_GATE_PS)) u_gate (.a(wp_clock_now), .y(wp_clock));
endmodule
