`timescale 1ps/1ps
// toggle_ff: register whose D input takes its own QN output. Q therefore
// inverts on every rising clock edge.
//
// The circuit uses it to launch a transition into each mirrored delay path
// once per clock. Reset clears Q. The circuit only needs all toggle registers
// that feed one XOR to start from the same value, and a clear reset gives
// that. Q changes T_CLKQ_PS after the clock edge.
module toggle_ff #(
  parameter int unsigned T_CLKQ_PS = wp_timing_pkg::T_CLKQ_PS
) (
  input  logic clk,
  input  logic rst_n,
  output logic q
);
  logic qn;

  dff_d #(.T_CLKQ_PS(T_CLKQ_PS), .RST_VAL(1'b0)) u_ff (
    .clk(clk), .rst_n(rst_n), .d(qn), .q(q), .qn(qn)
  );
endmodule
