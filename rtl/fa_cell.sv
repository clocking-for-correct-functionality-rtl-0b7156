`timescale 1ps/1ps
// fa_cell: one-bit full adder with separate sum and carry delays.
//
// sum  = a ^ b ^ cin, valid T_SUM_PS after the last input change.
// cout = majority(a, b, cin), valid T_CARRY_PS after the last input change.
// The same cell is used in the wave-pipelined adder and in the mirrored copies
// of its MIN and MAX paths. In the mirrored copies the pins that do not carry
// the path are tied to non-controlling values. Both therefore see the same
// delays. The two delays are parameters, so that a testbench can model a
// process, voltage or temperature corner by changing them.
module fa_cell #(
  parameter int unsigned T_SUM_PS   = wp_timing_pkg::T_SUM_PS,
  parameter int unsigned T_CARRY_PS = wp_timing_pkg::T_CARRY_PS
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic sum_now, cout_now;

  assign sum_now  = a ^ b ^ cin;
  assign cout_now = (a & b) | (cin & (a ^ b));

  tdelay #(.T_PS(T_SUM_PS))   u_dsum  (.a(sum_now),  .y(sum));
  tdelay #(.T_PS(T_CARRY_PS)) u_dcout (.a(cout_now), .y(cout));
endmodule
