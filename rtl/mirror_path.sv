`timescale 1ps/1ps
// mirror_path: a copy of the shortest (MIN) or the longest (MAX) path of the
// wave-pipelined adder. The copy is built from the same cells as the original.
//
// The cells along the path are wired as in the original. Every other input pin
// is tied to a constant that does not control the gate. The input transition
// therefore passes through with exactly the original path's delay, and the
// output equals the input (non-inverting). In layout the copy is placed next
// to its original, so both see the same process, voltage and temperature.
//
// In this model the adder (wp_adder) balances its delays with buffers: operand
// bit i passes i buffers before its full adder, and sum bit i passes W-1-i
// buffers after it. Its two determining paths are then:
//   PATH_MIN: operand bit W-1 -> W-1 buffers -> sum of the top cell
//             (b = 0, cin = 0).
//   PATH_MAX: operand bit 0 -> carry of cell 0 (b = 1, cin = 0) -> carry of
//             cells 1..W-2 (a = 1, b = 0) -> sum of cell W-1 (a = 0, b = 0).
// `tap` is an earlier point of the same path. For PATH_MIN it is taken after
// TAP buffers, for PATH_MAX after TAP carry cells. The skew generator uses it
// as the "earlier version" of the path output.
module mirror_path #(
  parameter wp_timing_pkg::path_kind_e KIND = wp_timing_pkg::PATH_MIN,
  parameter int unsigned W          = wp_timing_pkg::ADD_W,
  parameter int unsigned TAP        = wp_timing_pkg::SKEW_TAP,
  parameter int unsigned T_SUM_PS   = wp_timing_pkg::T_SUM_PS,
  parameter int unsigned T_CARRY_PS = wp_timing_pkg::T_CARRY_PS,
  parameter int unsigned T_BAL_PS   = wp_timing_pkg::T_BAL_PS
) (
  input  logic x,     // launch point, driven by a toggle register
  output logic tap,   // earlier point on the same path
  output logic y      // path end, equal to x after the path delay
);
  initial begin
    assert (W >= 2) else $fatal(1, "mirror_path: W must be at least 2");
    assert (TAP < W) else $fatal(1, "mirror_path: TAP must be below W");
  end

  if (KIND == wp_timing_pkg::PATH_MIN) begin : g_min
    logic [W-1:0] bal;
    logic         unused_cout;
    buf_chain #(.N(W-1), .T_BUF_PS(T_BAL_PS)) u_bal (
      .a(x), .taps(bal)
    );
    fa_cell #(.T_SUM_PS(T_SUM_PS), .T_CARRY_PS(T_CARRY_PS)) u_fa (
      .a(bal[W-1]), .b(1'b0), .cin(1'b0), .sum(y), .cout(unused_cout)
    );
    assign tap = bal[TAP];
  end else begin : g_max
    logic [W-1:0] c;          // c[k]: carry into cell k
    logic [W-1:0] unused_sum;
    logic         unused_cout;
    // Cell 0: a carries the path, b = 1 and cin = 0 make cout follow a.
    fa_cell #(.T_SUM_PS(T_SUM_PS), .T_CARRY_PS(T_CARRY_PS)) u_fa0 (
      .a(x), .b(1'b1), .cin(1'b0), .sum(unused_sum[0]), .cout(c[1])
    );
    // Cells 1..W-2: a = 1, b = 0 make cout follow cin.
    for (genvar k = 1; k < W - 1; k++) begin : g_prop
      fa_cell #(.T_SUM_PS(T_SUM_PS), .T_CARRY_PS(T_CARRY_PS)) u_fa (
        .a(1'b1), .b(1'b0), .cin(c[k]), .sum(unused_sum[k]), .cout(c[k+1])
      );
    end
    // Cell W-1: a = b = 0 make sum follow cin.
    fa_cell #(.T_SUM_PS(T_SUM_PS), .T_CARRY_PS(T_CARRY_PS)) u_fal (
      .a(1'b0), .b(1'b0), .cin(c[W-1]), .sum(y), .cout(unused_cout)
    );
    assign c[0]          = x;
    assign unused_sum[W-1] = 1'b0;
    assign tap           = c[TAP];
  end
endmodule
