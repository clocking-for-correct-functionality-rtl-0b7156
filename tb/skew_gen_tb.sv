`timescale 1ps/1ps
// skew_gen_tb: checks the skew generator with a 600 ps sclk, a wp_clock that
// pulses on every other sclk cycle, and a WP_CHECK pulse from the testbench.
//  1. Before WP_CHECK: lclk and outclk are sclk delayed by the multiplexer
//     (20 ps). They are checked at 21 ps after each sclk edge.
//  2. A WP_CHECK pulse sets skew_on 50 ps later, and skew_on stays set after
//     WP_CHECK falls.
//  3. After that, each lclk rising edge comes
//     T_CLKQ + TAP*T_BAL + 2*T_GATE = 50 + 240 + 40 = 330 ps after its sclk
//     edge. Its falling edge comes 50 + 660 + 40 = 750 ps after it. outclk
//     rises 330 ps after each wp_clock edge and nowhere else.
module skew_gen_tb;
  localparam int unsigned T = 600, SKEW = 330, FALL = 750;
  logic sclk = 1'b0, wp_clock = 1'b0, wp_check = 1'b0, rst_n = 1'b1;
  logic skew_on, lclk, outclk;
  // Reset is asserted by a falling edge shortly after start.
  initial #10 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int n_out = 0, n_wp = 0;
  longint t_sclk = 0, t_wp = 0;

  skew_gen dut (
    .sclk(sclk), .wp_clock(wp_clock), .wp_check(wp_check), .rst_n(rst_n),
    .skew_on(skew_on), .lclk(lclk), .outclk(outclk)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  always #(T / 2) sclk = ~sclk;

  // wp_clock: every other sclk pulse, 20 ps late as through the gating AND.
  bit wp_phase = 1'b0;
  always @(posedge sclk) begin
    wp_phase = ~wp_phase;
    if (wp_phase && rst_n) begin
      #20 wp_clock = 1'b1;
      #(T / 2) wp_clock = 1'b0;
    end
  end

  always @(posedge sclk) t_sclk = longint'($time);
  always @(posedge wp_clock) begin
    t_wp = longint'($time);
    if (skew_on && $time > 20000) n_wp++;
  end

  always @(posedge lclk)
    if (skew_on && $time > 20000)
      check(longint'($time) - t_sclk == longint'(SKEW), $sformatf("lclk rose %0d ps after sclk", longint'($time) - t_sclk));
  always @(negedge lclk)
    if (skew_on && $time > 20000)
      check(longint'($time) - t_sclk + longint'(T) == longint'(FALL), $sformatf("lclk fell %0d ps after sclk", longint'($time) - t_sclk + longint'(T)));
  always @(posedge outclk)
    if (skew_on && $time > 20000) begin
      n_out++;
      check(longint'($time) - t_wp == longint'(SKEW), $sformatf("outclk rose %0d ps after wp_clock", longint'($time) - t_wp));
    end

  initial begin
    #(T * 4 + 100) rst_n = 1'b1;
    // Part 1.
    repeat (10) begin
      @(posedge sclk);
      #21 check(lclk && outclk, "clocks not following sclk high");
      @(negedge sclk);
      #21 check(!lclk && !outclk, "clocks not following sclk low");
    end
    check(!skew_on, "skew engaged without WP_CHECK");
    // Part 2.
    @(posedge sclk);
    #100 wp_check = 1'b1;
    #49 check(!skew_on, "skew_on before clock-to-q");
    #2  check(skew_on, "skew_on not set by WP_CHECK");
    #200 wp_check = 1'b0;
    // Part 3: run until well past 20 ns, then count.
    repeat (100) @(posedge sclk);
    check(skew_on, "skew_on not sticky");
    check(n_out > 20, "too few outclk pulses");
    check(n_out >= n_wp - 1 && n_out <= n_wp + 1, "outclk pulses do not match wp_clock pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
