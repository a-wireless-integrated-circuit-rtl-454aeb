// Testbench for global_fsm. A responder in the testbench plays the addressed
// site, acknowledging after a random delay. Every command with a valid
// address must reach the bus exactly once, unchanged and held until ack;
// addresses of 100 and above must be rejected; a command arriving during an
// open write is dropped and flagged. With a one-cycle acknowledge a write
// takes four cycles from cmd_valid to idle.
module tb_global_fsm;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0;
  command_t cmd = '0;
  logic wr_req, wr_ack = 1'b0, addr_err, overrun, busy;
  command_t wr_cmd;
  int checks = 0, failures = 0;
  int ack_delay = 0;
  int n_writes = 0, n_addr_err = 0, n_overrun = 0;
  command_t last_write;

  global_fsm #(.N_SITES(100)) dut (.clk, .rst_n, .cmd_valid, .cmd, .wr_req, .wr_cmd, .wr_ack,
                                   .addr_err, .overrun, .busy);

  always #5 clk = ~clk;

  // Site responder: store on the first request cycle, ack after ack_delay cycles.
  initial begin
    forever begin
      @(posedge clk);
      if (wr_req && !wr_ack) begin
        n_writes++; last_write = wr_cmd;
        repeat (ack_delay) begin
          @(posedge clk);
          checks++;
          if (!wr_req || wr_cmd != last_write) begin failures++; $display("FAIL bus not held"); end
        end
        wr_ack <= 1'b1;
        do @(posedge clk); while (wr_req);
        wr_ack <= 1'b0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (addr_err) n_addr_err++;
    if (overrun)  n_overrun++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic issue(input command_t c);
    @(negedge clk); cmd = c; cmd_valid = 1'b1;
    @(negedge clk); cmd_valid = 1'b0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    command_t c;
    int n_prev, cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      c = command_t'($urandom);
      ack_delay = $urandom_range(0, 5);
      n_prev = n_writes;
      issue(c);
      cyc = 0;   // cycles the FSM stays busy
      while (busy && cyc < 100) begin cyc++; @(negedge clk); end
      repeat (2) @(negedge clk);
      if (c.addr < 100) begin
        chk(n_writes == n_prev + 1 && last_write == c, $sformatf("write %0d delivered", n));
        if (ack_delay == 0) chk(cyc == 4, $sformatf("write took %0d cycles", cyc));
      end else begin
        chk(n_writes == n_prev, "out-of-range address not written");
      end
    end
    chk(n_addr_err > 0, "some addresses were rejected");
    // Overrun: a second command while the first is still unacknowledged.
    ack_delay = 6;
    n_prev = n_writes;
    issue('{addr: 7'd5, sel: REG_DURATION, data: 9'd100});
    @(negedge clk);
    issue('{addr: 7'd6, sel: REG_DURATION, data: 9'd101});
    repeat (20) @(negedge clk);
    chk(n_overrun == 1, "overrun flagged");
    chk(n_writes == n_prev + 1 && last_write.addr == 7'd5, "only the first command written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
