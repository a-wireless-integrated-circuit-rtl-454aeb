// Testbench for site_counter: a loaded phase lasts exactly max(value, 2)
// cycles (phase_last in its final cycle), the interval count starts
// saturated, restarts on restart and makes due true exactly
// period * TICK_CYCLES cycles later (TICK_CYCLES reduced to 4 here).
module tb_site_counter;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, restart = 1'b0;
  logic [TIME_W-1:0] load_value = '0;
  logic [7:0] period = 8'd3;
  logic phase_last, due;
  int checks = 0, failures = 0;

  site_counter #(.TICK_CYCLES(4)) dut (.clk, .rst_n, .load, .load_value, .restart, .period, .phase_last, .due);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Load a value and measure how many cycles pass until phase_last has been seen.
  task automatic phase_len(input int value);
    int n;
    @(negedge clk); load = 1'b1; load_value = TIME_W'(value);
    @(negedge clk); load = 1'b0;
    n = 1;
    while (!phase_last && n < 600) begin @(negedge clk); n++; end
    chk(n == ((value < 2) ? 2 : value), $sformatf("phase length for %0d: %0d", value, n));
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1; chk(due, "due after reset (interval saturated)");
    phase_len(0); phase_len(1); phase_len(2); phase_len(3); phase_len(40);
    phase_len(511); phase_len(int'($urandom_range(2, 511)));
    // Interval: after restart, due comes exactly max(period,1) * 4 cycles later.
    for (int p = 0; p < 6; p++) begin
      int n;
      period = 8'(p);
      @(negedge clk); restart = 1'b1;
      @(negedge clk); restart = 1'b0;
      n = 0;   // clock edges since the restart edge
      while (!due && n < 100) begin @(negedge clk); n++; end
      chk(n == ((p == 0) ? 1 : p) * 4, $sformatf("due after %0d cycles at period %0d", n, p));
    end
    // Saturation: period 255 is due after 1020 cycles and stays due.
    period = 8'd255;
    @(negedge clk); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    repeat (1018) @(negedge clk);
    chk(!due, "not due before 255 steps");
    repeat (2) @(negedge clk);
    chk(due, "due after 255 steps");
    repeat (100) @(negedge clk);
    chk(due, "stays due when saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
