`timescale 1ps/1ps
// wp_adder: the wave-pipelined logic. It is a W-bit ripple-carry adder
// (sum modulo 2^W) between an input register and an output register. There is
// no register inside it.
//
// Operands are registered on the rising edge of wp_clock. The sum is
// registered on the rising edge of outclk. Several operand pairs ("waves") may
// be inside the adder at once. Each output bit is stable from TMAX after the
// launching wp_clock edge until TMIN after the next one. The output register
// must sample inside that window.
//
// To make the delays close enough for wave pipelining, the adder is
// balanced. Operand bit i is delayed by i buffers before its full adder, and
// sum bit i by W-1-i buffers after it. Every direct a/b -> sum path is then
// T_CLKQ + (W-1)*T_BAL + T_SUM long, which is TMIN. The carry chain from bit 0
// to sum bit W-1, T_CLKQ + (W-1)*T_CARRY + T_SUM, is TMAX. With the default
// delays these are 710 ps and 850 ps. The adder's function (an adder) is the
// one the clocking circuit was demonstrated on. Its width, structure and
// balancing are this model's own choices. mirror_path copies its two
// determining paths.
module wp_adder #(
  parameter int unsigned W          = wp_timing_pkg::ADD_W,
  parameter int unsigned T_CLKQ_PS  = wp_timing_pkg::T_CLKQ_PS,
  parameter int unsigned T_SUM_PS   = wp_timing_pkg::T_SUM_PS,
  parameter int unsigned T_CARRY_PS = wp_timing_pkg::T_CARRY_PS,
  parameter int unsigned T_BAL_PS   = wp_timing_pkg::T_BAL_PS
) (
  input  logic         wp_clock,  // input-register clock (launch)
  input  logic         outclk,    // output-register clock (capture)
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  logic [W-1:0] a_r, b_r;     // register contents
  logic [W-1:0] a_q, b_q;     // register outputs after clock-to-q
  logic [W-1:0] a_d, b_d;     // operands after input balancing
  logic [W-1:0] s_raw, s_d;   // sum before and after output balancing
  logic [W-1:0] c;            // c[i]: carry into bit i
  logic         unused_cout;  // carry out of the top bit (sum is modulo 2^W)
  logic [W-1:0] sum_r;

  always_ff @(posedge wp_clock or negedge rst_n)
    if (!rst_n) begin
      a_r <= '0;
      b_r <= '0;
    end else begin
      a_r <= a;
      b_r <= b;
    end

  tdelay #(.W(W), .T_PS(T_CLKQ_PS)) u_aq (.a(a_r), .y(a_q));
  tdelay #(.W(W), .T_PS(T_CLKQ_PS)) u_bq (.a(b_r), .y(b_q));
  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic [i:0]     a_taps, b_taps;
    logic [W-1-i:0] s_taps;
    logic           cout;
    buf_chain #(.N(i), .T_BUF_PS(T_BAL_PS)) u_abal (
      .a(a_q[i]), .taps(a_taps)
    );
    buf_chain #(.N(i), .T_BUF_PS(T_BAL_PS)) u_bbal (
      .a(b_q[i]), .taps(b_taps)
    );
    assign a_d[i] = a_taps[i];
    assign b_d[i] = b_taps[i];
    fa_cell #(.T_SUM_PS(T_SUM_PS), .T_CARRY_PS(T_CARRY_PS)) u_fa (
      .a(a_d[i]), .b(b_d[i]), .cin(c[i]), .sum(s_raw[i]), .cout(cout)
    );
    if (i < W - 1) begin : g_carry
      assign c[i+1] = cout;
    end else begin : g_top
      assign unused_cout = cout;
    end
    buf_chain #(.N(W-1-i), .T_BUF_PS(T_BAL_PS)) u_sbal (
      .a(s_raw[i]), .taps(s_taps)
    );
    assign s_d[i] = s_taps[W-1-i];
    // Intermediate taps of the balancing chains are not needed here.
    logic unused_taps;
    assign unused_taps = ^{a_taps, b_taps, s_taps};
  end

  always_ff @(posedge outclk or negedge rst_n)
    if (!rst_n) sum_r <= '0;
    else        sum_r <= s_d;

  tdelay #(.W(W), .T_PS(T_CLKQ_PS)) u_sq (.a(sum_r), .y(sum));
endmodule
