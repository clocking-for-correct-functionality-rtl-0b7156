`timescale 1ps/1ps
// wp_clocking_top: a wave-pipelined adder with its self-delay-checking clock
// circuit.
//
// The adder (wp_adder) has no internal registers. Several operand pairs travel
// through it at once. It is correct only while the spread between its longest
// and shortest path fits the clock period. The circuit around it watches
// mirrored copies of those two paths (self_check). When they show that the
// output register would catch a wave in transition, it does two things. It
// moves the output register's and its own sampling clock later, by a delay
// taken from a copy of the MIN path (skew_gen). It also clocks the adder only
// on every other system-clock cycle (wp_clock_gen). Both changes are sticky
// until reset.
//
// Interface: sclk is the system clock. Operands a and b are taken at each
// rising edge of wp_clock. The caller must present the next pair before the
// next such edge. sum appears at the output register. Before the slow-down it
// holds the sum of the operands launched two sclk cycles before the capturing
// sclk edge. After it, it holds the sum of the previous launch, captured
// shortly after the next launching edge. wp_enable gates the whole logic
// clock. The internal clocks and check signals are brought out for
// observation. All timing comes from the delay parameters (picoseconds).
module wp_clocking_top #(
  parameter int unsigned W          = wp_timing_pkg::ADD_W,
  parameter int unsigned TAP        = wp_timing_pkg::SKEW_TAP,
  parameter int unsigned T_CLKQ_PS  = wp_timing_pkg::T_CLKQ_PS,
  parameter int unsigned T_SUM_PS   = wp_timing_pkg::T_SUM_PS,
  parameter int unsigned T_CARRY_PS = wp_timing_pkg::T_CARRY_PS,
  parameter int unsigned T_BAL_PS   = wp_timing_pkg::T_BAL_PS,
  parameter int unsigned T_GATE_PS  = wp_timing_pkg::T_GATE_PS
) (
  input  logic         sclk,
  input  logic         rst_n,
  input  logic         wp_enable,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         wp_clock,
  output logic         lclk,
  output logic         outclk,
  output logic         xor_o,
  output logic         wp_check,
  output logic         l_enable,
  output logic         skew_on
);
  logic wp_check_n, and_en, max_o, min_o;
  logic unused;

  wp_adder #(
    .W(W), .T_CLKQ_PS(T_CLKQ_PS), .T_SUM_PS(T_SUM_PS),
    .T_CARRY_PS(T_CARRY_PS), .T_BAL_PS(T_BAL_PS)
  ) u_adder (
    .wp_clock(wp_clock), .outclk(outclk), .rst_n(rst_n),
    .a(a), .b(b), .sum(sum)
  );

  self_check #(
    .W(W), .T_CLKQ_PS(T_CLKQ_PS), .T_SUM_PS(T_SUM_PS),
    .T_CARRY_PS(T_CARRY_PS), .T_BAL_PS(T_BAL_PS), .T_GATE_PS(T_GATE_PS)
  ) u_check (
    .wp_clock(wp_clock), .lclk(lclk), .rst_n(rst_n),
    .max_o(max_o), .min_o(min_o), .xor_o(xor_o),
    .wp_check(wp_check), .wp_check_n(wp_check_n)
  );

  skew_gen #(
    .W(W), .TAP(TAP), .T_CLKQ_PS(T_CLKQ_PS), .T_SUM_PS(T_SUM_PS),
    .T_CARRY_PS(T_CARRY_PS), .T_BAL_PS(T_BAL_PS), .T_GATE_PS(T_GATE_PS)
  ) u_skew (
    .sclk(sclk), .wp_clock(wp_clock), .wp_check(wp_check), .rst_n(rst_n),
    .skew_on(skew_on), .lclk(lclk), .outclk(outclk)
  );

  wp_clock_gen #(.T_CLKQ_PS(T_CLKQ_PS), .T_GATE_PS(T_GATE_PS)) u_clkgen (
    .sclk(sclk), .rst_n(rst_n), .wp_enable(wp_enable),
    .wp_check_n(wp_check_n), .skew_on(skew_on),
    .and_en(and_en), .l_enable(l_enable), .wp_clock(wp_clock)
  );

  assign unused = and_en ^ max_o ^ min_o;
endmodule
