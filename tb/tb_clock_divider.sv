// Testbench for clock_divider: the system clock must toggle on every rising
// carrier edge, i.e. run at exactly half the carrier frequency with a 50 %
// duty cycle, whatever its starting value.
module tb_clock_divider;
  timeunit 1ns; timeprecision 1ps;
  logic carrier = 1'b0, sys_clk;
  int checks = 0, failures = 0;

  clock_divider dut (.carrier, .sys_clk);

  always #181 carrier = ~carrier;   // ~2.765 MHz, 362 ns period

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    int rises;
    realtime t_rise, t_fall;
    @(posedge carrier); #1;
    prev = sys_clk;
    for (int i = 0; i < 40; i++) begin
      @(posedge carrier); #1;
      checks++;
      if (sys_clk !== ~prev) begin failures++; $display("FAIL edge %0d", i); end
      prev = sys_clk;
      @(negedge carrier); #1;
      checks++;
      if (sys_clk !== prev) begin failures++; $display("FAIL changed on falling edge %0d", i); end
    end
    // Count system clock rising edges over 64 carrier cycles: must be 32.
    rises = 0;
    fork
      begin repeat (64) @(posedge carrier); #1; end
      forever @(posedge sys_clk) rises++;
    join_any
    disable fork;
    checks++; if (rises != 32) begin failures++; $display("FAIL rises=%0d", rises); end
    // High and low times are one carrier period each.
    @(posedge sys_clk); t_rise = $realtime;
    @(negedge sys_clk); t_fall = $realtime;
    checks++; if (t_fall - t_rise != 362.0) begin failures++; $display("FAIL high time"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
