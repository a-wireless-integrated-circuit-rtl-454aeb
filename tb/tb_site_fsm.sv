// Testbench for site_fsm, run together with the site's register bank,
// counter and token cell. It checks the write handshake (one write strobe,
// ack the next cycle, held until the request drops), that an inactive or not
// yet due site passes the token the cycle after it arrives, that a due site
// produces cathodic / interphase / anodic phases of exactly duration,
// interphase and duration cycles and passes the token in the last anodic
// cycle, and that a register written during a pulse takes effect only at the
// next pulse.
module tb_site_fsm;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic selected = 1'b0, write, ack;
  reg_sel_e sel = REG_AMPLITUDE;
  logic [DATA_W-1:0] data = '0;
  logic token_in = 1'b0, token_out, has_token, pass, latch;
  logic load, restart, phase_last, due;
  logic [TIME_W-1:0] load_value;
  site_params_t live, work;
  phase_e phase;
  int checks = 0, failures = 0;

  site_register_bank u_regs (.clk, .rst_n, .write, .sel, .data, .latch, .live, .work);
  site_counter #(.TICK_CYCLES(64)) u_count (.clk, .rst_n, .load, .load_value, .restart,
                        .period(live.repetition[7:0]), .phase_last, .due);
  token_cell u_token (.clk, .rst_n, .token_in, .pass, .has_token, .token_out);
  site_fsm dut (.clk, .rst_n, .selected, .write, .ack, .has_token, .pass, .live, .work, .latch,
                .load, .load_value, .restart, .phase_last, .due, .phase);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write_reg(input reg_sel_e s, input int value);
    int n;
    @(negedge clk); sel = s; data = DATA_W'(value); selected = 1'b1;
    #1 chk(write && !ack, "write strobe on first request cycle");
    @(negedge clk);
    chk(ack && !write, "ack one cycle later, single write");
    @(negedge clk);
    chk(ack, "ack held while request stays");
    selected = 1'b0;
    @(negedge clk);
    chk(!ack, "ack drops after request");
  endtask

  // Hand the token in and record the pulse it produces.
  task automatic visit(output int cath, output int ipd, output int anod, output int hold,
                       output int amp_seen);
    int n;
    @(negedge clk); token_in = 1'b1;
    @(negedge clk); token_in = 1'b0;
    cath = 0; ipd = 0; anod = 0; hold = 0; amp_seen = -1;
    n = 0;
    while (n < 3000) begin
      hold++;
      #1;
      if (token_out) break;
      @(negedge clk);
      case (phase)
        PH_CATHODIC:   begin cath++; amp_seen = int'(work.amplitude); end
        PH_INTERPHASE: ipd++;
        PH_ANODIC:     anod++;
        default: ;
      endcase
      n++;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, i, a, h, amp;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Inactive site (repetition bit 8 clear): token passes straight on.
    visit(c, i, a, h, amp);
    chk(c == 0 && i == 0 && a == 0 && h == 1, $sformatf("inactive site: pulse %0d/%0d/%0d hold %0d", c, i, a, h));
    write_reg(REG_AMPLITUDE, 75);
    write_reg(REG_DURATION, 20);
    write_reg(REG_INTERPHASE, 7);
    write_reg(REG_REPETITION, 9'h100 | 2);
    // Newly active site is due at once.
    visit(c, i, a, h, amp);
    chk(c == 20 && i == 7 && a == 20, $sformatf("pulse phases %0d/%0d/%0d", c, i, a));
    chk(h == 48, $sformatf("token held %0d cycles", h));
    chk(amp == 75, "amplitude during pulse");
    // Not due yet (no repetition tick since the pulse): token passes on.
    visit(c, i, a, h, amp);
    chk(c == 0 && h == 1, "not due: token passed after one cycle");
    // Period 2 at 64 cycles per step: not due after 100 cycles, due after 128.
    repeat (40) @(negedge clk);
    visit(c, i, a, h, amp);
    chk(c == 0, "not due before the period has passed");
    repeat (40) @(negedge clk);
    // Rewrite the amplitude and duration while this pulse runs.
    fork
      visit(c, i, a, h, amp);
      begin
        repeat (5) @(negedge clk);
        write_reg(REG_AMPLITUDE, 150);
        write_reg(REG_DURATION, 3);
      end
    join
    chk(c == 20 && a == 20 && amp == 75, "write during pulse does not change it");
    repeat (130) @(negedge clk);
    visit(c, i, a, h, amp);
    chk(c == 3 && i == 7 && a == 3 && amp == 150, $sformatf("next pulse uses new values %0d/%0d/%0d amp %0d", c, i, a, amp));
    // Shortest phases are two cycles.
    write_reg(REG_DURATION, 0);
    write_reg(REG_INTERPHASE, 1);
    repeat (130) @(negedge clk);
    visit(c, i, a, h, amp);
    chk(c == 2 && i == 2 && a == 2, $sformatf("minimum phases %0d/%0d/%0d", c, i, a));
    // Switching the site off.
    write_reg(REG_REPETITION, 2);
    repeat (300) @(negedge clk);
    visit(c, i, a, h, amp);
    chk(c == 0 && h == 1, "deactivated site does not fire");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
