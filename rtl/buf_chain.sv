`timescale 1ps/1ps
// buf_chain: N non-inverting buffers in series, each T_BUF_PS long.
//
// These are the delay-balancing buffers of the wave-pipelined adder and of
// its mirrored MIN path. With N = 0 the chain is a plain wire. Output
// `taps[k]` is the signal after k buffers, so taps[0] is the input and
// taps[N] is the output of the chain.
module buf_chain #(
  parameter int unsigned N        = 1,
  parameter int unsigned T_BUF_PS = wp_timing_pkg::T_BAL_PS
) (
  input  logic       a,
  output logic [N:0] taps
);
  assign taps[0] = a;
  for (genvar k = 0; k < N; k++) begin : g_buf
    tdelay #(.T_PS(T_BUF_PS)) u_buf (.a(taps[k]), .y(taps[k+1]));
  end
endmodule
