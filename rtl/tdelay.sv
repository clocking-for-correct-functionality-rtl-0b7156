`timescale 1ps/1ps
// tdelay: transport delay of T_PS picoseconds on a W-bit signal. This is the
// single timing element of the model (a behavioural model, not logic).
//
// Each change of `a` is copied to `y` exactly T_PS later. The value is taken
// at the time of the change, and no pulse is swallowed, however short. Every
// gate, buffer and register delay in the design goes through this cell. A
// pure-delay process of this kind is what a wave-pipelined circuit needs: a
// new wave may enter a path before the previous one has left it. At time 0 the
// current input is scheduled as well, so the output is defined one delay after
// start-up. Synthesis tools take this cell as a wire.
module tdelay #(
  parameter int unsigned W    = 1,
  parameter int unsigned T_PS = 0
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  if (T_PS == 0) begin : g_wire
    assign y = a;
  end else begin : g_delay
    always begin
      fork
        begin
          automatic logic [W-1:0] v = a;
          #(T_PS) y = v;
        end
      join_none
      @(a);
    end
  end
endmodule
