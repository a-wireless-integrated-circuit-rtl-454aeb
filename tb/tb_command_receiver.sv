// Testbench for command_receiver at the default 69 cycles per bit: random
// frames sent as a 20 kb/s serial stream must come out unchanged, a frame
// with a low stop bit must raise frame_err, and a short low glitch must be
// ignored. The strobe must come 0.5 to 1.5 bit times after the stop bit starts.
module tb_command_receiver;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;
  localparam int BITC = 69;
  logic clk = 1'b0, rst_n = 1'b0, ask_bit = 1'b1;
  logic cmd_valid, frame_err;
  command_t cmd;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  command_t last_cmd;
  longint t_valid;

  command_receiver #(.BIT_CYCLES(BITC)) dut (.clk, .rst_n, .ask_bit, .cmd_valid, .cmd, .frame_err);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (cmd_valid) begin n_valid++; last_cmd = cmd; t_valid = $time; end
    if (frame_err) n_err++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input command_t c, input bit stop);
    logic [FRAME_BITS-1:0] bits;
    bits = c;
    ask_bit = 1'b0; repeat (BITC) @(negedge clk);
    for (int i = FRAME_BITS - 1; i >= 0; i--) begin
      ask_bit = bits[i]; repeat (BITC) @(negedge clk);
    end
    ask_bit = stop; repeat (BITC) @(negedge clk);
    ask_bit = 1'b1; repeat (BITC) @(negedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    command_t c;
    int n_prev;
    longint t_stop;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      c = command_t'($urandom);
      n_prev = n_valid;
      fork
        send(c, 1'b1);
        begin
          repeat ((1 + FRAME_BITS) * BITC) @(negedge clk);
          t_stop = $time;
        end
      join
      chk(n_valid == n_prev + 1, "one command per frame");
      chk(last_cmd == c, $sformatf("frame %0d content %h exp %h", n, last_cmd, c));
      chk(t_valid - t_stop >= 10 * BITC / 2 && t_valid - t_stop <= 10 * 3 * BITC / 2,
          $sformatf("strobe timing %0d ns after stop bit start", t_valid - t_stop));
    end
    n_prev = n_valid;
    send(command_t'($urandom), 1'b0);
    repeat (2 * BITC) @(negedge clk);
    chk(n_err == 1, "bad stop bit flagged");
    chk(n_valid == n_prev, "bad frame not delivered");
    // Glitch shorter than half a bit.
    ask_bit = 1'b0; repeat (5) @(negedge clk); ask_bit = 1'b1;
    repeat (30 * BITC) @(negedge clk);
    chk(n_valid == n_prev && n_err == 1, "glitch ignored");
    c = command_t'($urandom);
    send(c, 1'b1);
    chk(n_valid == n_prev + 1 && last_cmd == c, "receiver recovers after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
