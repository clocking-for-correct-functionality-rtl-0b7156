`timescale 1ps/1ps
// mirror_path_tb: sends transitions into a MIN copy and a MAX copy of the
// default 8-bit adder. It checks that each output follows the input without
// inversion, and that the output and the tap arrive exactly at the delays
// worked out from the cell delays:
//   MIN: (W-1)*T_BAL + T_SUM = 7*80 + 100 = 660 ps, tap TAP*T_BAL = 240 ps.
//   MAX: (W-1)*T_CARRY + T_SUM = 7*100 + 100 = 800 ps, tap TAP*T_CARRY = 300 ps.
module mirror_path_tb;
  localparam int unsigned W = 8, TAP = 3;
  localparam int unsigned T_MIN = 660, T_MAX = 800;
  localparam int unsigned TAP_MIN = 240, TAP_MAX = 300;

  logic x;
  logic tap_min, y_min, tap_max, y_max;
  int checks = 0, failures = 0;

  mirror_path #(.KIND(wp_timing_pkg::PATH_MIN), .W(W), .TAP(TAP)) u_min (
    .x(x), .tap(tap_min), .y(y_min)
  );
  mirror_path #(.KIND(wp_timing_pkg::PATH_MAX), .W(W), .TAP(TAP)) u_max (
    .x(x), .tap(tap_max), .y(y_max)
  );

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  task automatic probe(input longint at, input logic old_v, input logic new_v);
    // Run from the input edge and look 1 ps either side of each arrival.
    fork
      begin #(TAP_MIN - 1) check(tap_min, old_v, "MIN tap early");
            #2 check(tap_min, new_v, "MIN tap on time"); end
      begin #(TAP_MAX - 1) check(tap_max, old_v, "MAX tap early");
            #2 check(tap_max, new_v, "MAX tap on time"); end
      begin #(T_MIN - 1) check(y_min, old_v, "MIN end early");
            #2 check(y_min, new_v, "MIN end on time"); end
      begin #(T_MAX - 1) check(y_max, old_v, "MAX end early");
            #2 check(y_max, new_v, "MAX end on time"); end
    join
    if (at < 0) $display("unreachable");
  endtask

  initial begin
    x = 1'b0;
    #3000;
    for (int k = 0; k < 6; k++) begin
      logic old_v;
      old_v = x;
      x = ~x;
      probe(longint'($time), old_v, x);
      #2000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
