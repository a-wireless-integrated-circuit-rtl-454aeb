// Testbench for stim_cell, one site closed on itself as a one-site token
// ring. It programs the site over the shared write bus (also checking that a
// write to another address is ignored), then checks the electrode current
// cycle by cycle: -amplitude uA in the cathodic phase, zero in the
// interphasic delay, +amplitude uA in the anodic phase, with the recovery
// current (-2 nA per mV, limited to 235 nA) added at all times.
module tb_stim_cell;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;
  localparam int ID = 37;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_req = 1'b0, wr_ack;
  command_t wr_cmd = '0;
  logic tok;
  logic signed [15:0] v_mv = '0;
  logic signed [19:0] i_na;
  phase_e phase;
  int checks = 0, failures = 0;
  int cyc = 0, start_cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  stim_cell #(.SITE_ID(ID), .START_WITH_TOKEN(1'b1), .TICK_CYCLES(100)) dut (
    .clk, .rst_n, .wr_req, .wr_cmd, .wr_ack, .token_in(tok), .token_out(tok),
    .v_electrode_mv(v_mv), .i_electrode_na(i_na), .phase);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bus_write(input int addr, input reg_sel_e s, input int value, input bit expect_ack);
    int n;
    @(negedge clk); wr_cmd = '{addr: ADDR_W'(addr), sel: s, data: DATA_W'(value)}; wr_req = 1'b1;
    n = 0;
    while (!wr_ack && n < 10) begin @(negedge clk); n++; end
    chk(wr_ack == expect_ack, $sformatf("ack for address %0d", addr));
    wr_req = 1'b0;
    @(negedge clk); @(negedge clk);
  endtask

  function automatic int rec(input int mv);
    int r = -2 * mv;
    if (r > 235) r = 235;
    if (r < -235) r = -235;
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cath, ipd, anod;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bus_write(ID + 1, REG_REPETITION, 9'h101, 1'b0);
    repeat (20) @(negedge clk);
    chk(phase == PH_IDLE, "write to another site ignored");
    v_mv = 16'sd40;
    #1 chk(int'(i_na) == rec(40), "recovery current while idle");
    bus_write(ID, REG_AMPLITUDE, 123, 1'b1);
    bus_write(ID, REG_DURATION, 12, 1'b1);
    bus_write(ID, REG_INTERPHASE, 5, 1'b1);
    // Arm the site last, then watch one pulse with a varying electrode voltage.
    fork
      bus_write(ID, REG_REPETITION, 9'h101, 1'b1);
      begin
        while (phase == PH_IDLE) @(negedge clk);
        start_cyc = cyc;
        cath = 0; ipd = 0; anod = 0;
        while (phase != PH_IDLE) begin
          v_mv = 16'($urandom_range(0, 400)) - 16'sd200;
          #1;
          case (phase)
            PH_CATHODIC:   begin cath++; chk(int'(i_na) == -123000 + rec(int'(v_mv)), "cathodic current"); end
            PH_INTERPHASE: begin ipd++;  chk(int'(i_na) == rec(int'(v_mv)), "no current in interphase"); end
            PH_ANODIC:     begin anod++; chk(int'(i_na) ==  123000 + rec(int'(v_mv)), "anodic current"); end
            default: ;
          endcase
          @(negedge clk);
        end
        chk(cath == 12 && ipd == 5 && anod == 12, $sformatf("phase lengths %0d/%0d/%0d", cath, ipd, anod));
      end
    join
    // Next pulse exactly one period (100 cycles) after the start of this one.
    while (cyc < start_cyc + 99) @(negedge clk);
    chk(phase == PH_IDLE, "waits for the repetition period");
    while (cyc < start_cyc + 102) @(negedge clk);
    chk(phase == PH_CATHODIC, "fires again after one period");
    // Global reset shuts the site down.
    rst_n = 1'b0; #1;
    chk(phase == PH_IDLE, "reset stops the pulse");
    @(negedge clk); rst_n = 1'b1;
    repeat (20) @(negedge clk);
    chk(phase == PH_IDLE, "site inactive after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
