`timescale 1ps/1ps
// dff_d: rising-edge D register with asynchronous active-low reset and a
// clock-to-output delay.
//
// This is the register primitive of the clocking circuit. D, CK, Q and QN
// follow the register symbols of the circuit drawings. The reset value is a
// parameter, and it reaches Q without delay. After a clock edge Q changes
// T_CLKQ_PS later. QN is the complement of Q. The reset pin is this model's
// own addition so that a simulation starts from a known state.
module dff_d #(
  parameter int unsigned T_CLKQ_PS = wp_timing_pkg::T_CLKQ_PS,
  parameter logic        RST_VAL   = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qn
);
  logic q_r;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q_r <= RST_VAL;
    else        q_r <= d;

  tdelay #(.T_PS(T_CLKQ_PS)) u_clkq (.a(q_r), .y(q));
  assign qn = ~q;
endmodule
