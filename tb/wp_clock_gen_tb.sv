`timescale 1ps/1ps
// wp_clock_gen_tb: drives wp_enable, wp_check_n and skew_on at random, away
// from the sclk edges. It checks wp_clock against a reference model of the
// gating. At each falling sclk edge l = wp_enable & wp_check_n &
// !(skew_on & l), and wp_clock must be high 21 ps after the next rising edge
// exactly when l is 1. It must be low 21 ps after every falling edge. A final
// phase holds all three inputs on and checks that the clock runs at half rate.
module wp_clock_gen_tb;
  localparam int unsigned T = 600;
  logic sclk = 1'b0, rst_n = 1'b1;
  logic wp_enable = 1'b0, wp_check_n = 1'b1, skew_on = 1'b0;
  logic and_en, l_enable, wp_clock;
  logic l_ref = 1'b0;
  // Reset is asserted by a falling edge shortly after start.
  initial #10 rst_n = 1'b0;

  int checks = 0, failures = 0, n_pulses = 0;

  wp_clock_gen dut (
    .sclk(sclk), .rst_n(rst_n), .wp_enable(wp_enable), .wp_check_n(wp_check_n),
    .skew_on(skew_on), .and_en(and_en), .l_enable(l_enable), .wp_clock(wp_clock)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  always #(T / 2) sclk = ~sclk;

  always @(negedge sclk)
    if (rst_n) l_ref = wp_enable & wp_check_n & ~(skew_on & l_ref);

  always @(posedge sclk) begin
    #21;
    if (rst_n) begin
      check(wp_clock == l_ref, "wp_clock differs from the gating model");
      if (wp_clock) n_pulses++;
    end
  end
  always @(negedge sclk) begin
    #21 check(!wp_clock, "wp_clock high while sclk low");
  end

  initial begin
    #(T * 3 + 100) rst_n = 1'b1;
    repeat (300) begin
      @(posedge sclk);
      #100;
      wp_enable  = ($urandom % 8) != 0;
      wp_check_n = ($urandom % 4) != 0;
      skew_on    = ($urandom % 2) != 0;
    end
    @(posedge sclk);
    #100 wp_enable = 1'b1; wp_check_n = 1'b1; skew_on = 1'b1;
    @(posedge sclk);
    n_pulses = 0;
    repeat (40) @(posedge sclk);
    #10 check(n_pulses == 20, $sformatf("%0d pulses in 40 cycles at half rate", n_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
