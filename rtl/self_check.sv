`timescale 1ps/1ps
// self_check: detects whether the wave-pipelined logic still fits the clock.
// It produces WP_CHECK.
//
// Two toggle registers, both clocked by wp_clock like the logic's own input
// register, send a transition into the mirrored MAX path and the mirrored MIN
// path on every launch. After each launch the MIN copy flips first and the MAX
// copy flips later. Between the two arrivals the data of the real logic is
// unstable, and there XOR = MAX ^ MIN is 1. Since both toggle registers start
// equal, XOR is 0 whenever both copies have seen the same number of launches.
// A register clocked by lclk, which stands for the output register's clock,
// samples XOR. WP_CHECK = 1 therefore means that an output register clocked
// at that edge would have caught a wave in transition. The register's inverted
// output is !WP_CHECK, and the enable logic (wp_clock_gen) uses it.
//
// The structure is the one of the self-check circuit: toggle registers, MIN and
// MAX copies, an XOR, and a register on LCLK. Reset and the gate delays are
// this model's own. Timing: XOR settles T_GATE_PS after a path output
// changes. WP_CHECK changes T_CLKQ_PS after the rising edge of lclk.
module self_check #(
  parameter int unsigned W          = wp_timing_pkg::ADD_W,
  parameter int unsigned T_CLKQ_PS  = wp_timing_pkg::T_CLKQ_PS,
  parameter int unsigned T_SUM_PS   = wp_timing_pkg::T_SUM_PS,
  parameter int unsigned T_CARRY_PS = wp_timing_pkg::T_CARRY_PS,
  parameter int unsigned T_BAL_PS   = wp_timing_pkg::T_BAL_PS,
  parameter int unsigned T_GATE_PS  = wp_timing_pkg::T_GATE_PS
) (
  input  logic wp_clock,    // local clock of the wave-pipelined logic
  input  logic lclk,        // sampling clock (SCLK or its skewed version)
  input  logic rst_n,
  output logic max_o,       // end of the mirrored MAX path
  output logic min_o,       // end of the mirrored MIN path
  output logic xor_o,       // MAX ^ MIN
  output logic wp_check,    // XOR sampled on the rising edge of lclk
  output logic wp_check_n   // !WP_CHECK, to the enable logic
);
  logic launch_max, launch_min;
  logic unused_tap_max, unused_tap_min;

  toggle_ff #(.T_CLKQ_PS(T_CLKQ_PS)) u_tgl_max (
    .clk(wp_clock), .rst_n(rst_n), .q(launch_max)
  );
  toggle_ff #(.T_CLKQ_PS(T_CLKQ_PS)) u_tgl_min (
    .clk(wp_clock), .rst_n(rst_n), .q(launch_min)
  );

  mirror_path #(
    .KIND(wp_timing_pkg::PATH_MAX), .W(W), .T_SUM_PS(T_SUM_PS),
    .T_CARRY_PS(T_CARRY_PS), .T_BAL_PS(T_BAL_PS)
  ) u_max (
    .x(launch_max), .tap(unused_tap_max), .y(max_o)
  );
  mirror_path #(
    .KIND(wp_timing_pkg::PATH_MIN), .W(W), .T_SUM_PS(T_SUM_PS),
    .T_CARRY_PS(T_CARRY_PS), .T_BAL_PS(T_BAL_PS)
  ) u_min (
    .x(launch_min), .tap(unused_tap_min), .y(min_o)
  );

  logic xor_now;
  assign xor_now = max_o ^ min_o;
  tdelay #(.T_PS(T_GATE_PS)) u_xor (.a(xor_now), .y(xor_o));

  dff_d #(.T_CLKQ_PS(T_CLKQ_PS), .RST_VAL(1'b0)) u_check (
    .clk(lclk), .rst_n(rst_n), .d(xor_o), .q(wp_check), .qn(wp_check_n)
  );
endmodule
