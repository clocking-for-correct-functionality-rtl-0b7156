`timescale 1ps/1ps
// skew_gen: skew generator. It produces LCLK, the sampling clock of the
// self-check register, and OUTCLK, the clock of the wave-pipelined logic's
// output register.
//
// How it works. A register with D tied high and WP_CHECK as its clock sets
// skew_on the first time WP_CHECK rises. It stays set until reset. Before
// that, LCLK and OUTCLK are both SCLK. After it, each multiplexer selects a
// skewed clock. The skewed clock is built like this. A toggle register sends a
// transition into a mirrored MIN path. An XOR compares the "earlier version"
// (the path's tap, TAP balancing buffers in) with the path's end. The result
// is a pulse that rises T_CLKQ + TAP*T_BAL + T_GATE after the clock edge and
// falls T_CLKQ + TMIN_PATH + T_GATE after it. Its rising edge is the skewed
// sampling point, which is later than the launching edge but earlier than the
// moment the next wave reaches the output.
//   LCLK   is derived from SCLK and has the system clock's frequency.
//   OUTCLK is derived from WP_CLOCK and pulses only in cycles where the logic
//          was clocked.
// Because the skew comes from a copy of the real MIN path, it follows the real
// logic across process, voltage and temperature.
//
// Following the skew-generator drawing: the sticky register, the two toggle
// registers, the two MIN copies, the two XORs and the two multiplexers. This
// model's own choices: where the tap sits (TAP), and the reset of the sticky
// register. The multiplexers add T_GATE_PS.
module skew_gen #(
  parameter int unsigned W          = wp_timing_pkg::ADD_W,
  parameter int unsigned TAP        = wp_timing_pkg::SKEW_TAP,
  parameter int unsigned T_CLKQ_PS  = wp_timing_pkg::T_CLKQ_PS,
  parameter int unsigned T_SUM_PS   = wp_timing_pkg::T_SUM_PS,
  parameter int unsigned T_CARRY_PS = wp_timing_pkg::T_CARRY_PS,
  parameter int unsigned T_BAL_PS   = wp_timing_pkg::T_BAL_PS,
  parameter int unsigned T_GATE_PS  = wp_timing_pkg::T_GATE_PS
) (
  input  logic sclk,      // system clock
  input  logic wp_clock,  // gated clock of the wave-pipelined logic
  input  logic wp_check,  // from self_check
  input  logic rst_n,
  output logic skew_on,   // 1 once WP_CHECK has risen: skewed clocks selected
  output logic lclk,
  output logic outclk
);
  logic unused_skew_n;
  logic s_launch, s_tap, s_min, s_xor;
  logic w_launch, w_tap, w_min, w_xor;

  // Sticky select: D = VDD, clocked by WP_CHECK.
  dff_d #(.T_CLKQ_PS(T_CLKQ_PS), .RST_VAL(1'b0)) u_sel (
    .clk(wp_check), .rst_n(rst_n), .d(1'b1), .q(skew_on), .qn(unused_skew_n)
  );

  // Skewed version of SCLK.
  toggle_ff #(.T_CLKQ_PS(T_CLKQ_PS)) u_tgl_s (
    .clk(sclk), .rst_n(rst_n), .q(s_launch)
  );
  mirror_path #(
    .KIND(wp_timing_pkg::PATH_MIN), .W(W), .TAP(TAP), .T_SUM_PS(T_SUM_PS),
    .T_CARRY_PS(T_CARRY_PS), .T_BAL_PS(T_BAL_PS)
  ) u_min_s (
    .x(s_launch), .tap(s_tap), .y(s_min)
  );
  logic s_xor_now;
  assign s_xor_now = s_tap ^ s_min;
  tdelay #(.T_PS(T_GATE_PS)) u_sxor (.a(s_xor_now), .y(s_xor));

  // Skewed version of WP_CLOCK (WPXOR).
  toggle_ff #(.T_CLKQ_PS(T_CLKQ_PS)) u_tgl_w (
    .clk(wp_clock), .rst_n(rst_n), .q(w_launch)
  );
  mirror_path #(
    .KIND(wp_timing_pkg::PATH_MIN), .W(W), .TAP(TAP), .T_SUM_PS(T_SUM_PS),
    .T_CARRY_PS(T_CARRY_PS), .T_BAL_PS(T_BAL_PS)
  ) u_min_w (
    .x(w_launch), .tap(w_tap), .y(w_min)
  );
  logic w_xor_now;
  assign w_xor_now = w_tap ^ w_min;
  tdelay #(.T_PS(T_GATE_PS)) u_wxor (.a(w_xor_now), .y(w_xor));

  // Clock multiplexers.
  logic lclk_now, outclk_now;
  assign lclk_now   = skew_on ? s_xor : sclk;
  assign outclk_now = skew_on ? w_xor : sclk;
  tdelay #(.T_PS(T_GATE_PS)) u_lmux (.a(lclk_now),   .y(lclk));
  tdelay #(.T_PS(T_GATE_PS)) u_omux (.a(outclk_now), .y(outclk));
endmodule
