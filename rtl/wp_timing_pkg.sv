// wp_timing_pkg: delays and types shared by the wave-pipeline clocking model.
//
// All delays are in picoseconds (every file uses `timescale 1ps/1ps). They
// give the circuit its timing behaviour in simulation. A synthesis tool
// ignores them. None of these numbers is published for the circuit, so all are
// assumptions of this model. Together they give an 8-bit adder whose shortest
// path is 710 ps and whose longest path is 850 ps at the nominal corner.
`timescale 1ps/1ps
package wp_timing_pkg;

  // Register clock-to-output delay.
  localparam int unsigned T_CLKQ_PS  = 50;
  // Full-adder a/b/cin to sum delay.
  localparam int unsigned T_SUM_PS   = 100;
  // Full-adder a/b/cin to carry-out delay.
  localparam int unsigned T_CARRY_PS = 100;
  // One delay-balancing buffer.
  localparam int unsigned T_BAL_PS   = 80;
  // One simple gate: XOR, AND or 2:1 clock multiplexer.
  localparam int unsigned T_GATE_PS  = 20;

  // Adder width.
  localparam int unsigned ADD_W      = 8;
  // Number of balancing buffers ahead of the tap on the skew generator's
  // MIN path ("earlier version of MIN").
  localparam int unsigned SKEW_TAP   = 3;

  // Which of the two determining paths a mirror copy reproduces.
  typedef enum logic {PATH_MIN = 1'b0, PATH_MAX = 1'b1} path_kind_e;

endpackage
