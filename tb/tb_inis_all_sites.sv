// Worst-case workload for inis_top at its default size: all 100 sites armed
// at the fastest repetition setting (period 1 = 8192 cycles) with the
// longest pulse (duration 511 and interphasic delay 511 cycles, 370 us
// each) and full-scale amplitude. The token then serialises the array: every
// site holds it for 3 x 511 cycles plus one cycle of hand-over, so each
// electrode fires once per 100 x 1534 = 153 400 cycles (111 ms), about
// 9 pulses/s, far below the 168 Hz it was asked for. The test programs all
// sites over the serial command link, then checks over two full rounds that
// the sites fire strictly in ring order, one at a time, each pulse with
// the programmed shape, and that every site's start-to-start period is
// exactly one round.
module tb_inis_all_sites;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;
  localparam int N    = 100;
  localparam int BITC = 69;
  localparam int D    = 511;
  localparam int ROUND = N * (3 * D + 1);

  logic carrier = 1'b0, rst_n = 1'b0, ask_bit = 1'b1;
  logic signed [15:0] v_mv [N];
  logic signed [19:0] i_na [N];
  logic [N-1:0] firing, token_at;
  logic sys_clk, cmd_accepted, cmd_addr_err, cmd_frame_err, cmd_overrun, cmd_busy;

  inis_top dut (
    .carrier, .rst_n, .ask_bit, .v_electrode_mv(v_mv), .i_electrode_na(i_na),
    .firing, .token_at, .sys_clk, .cmd_accepted, .cmd_addr_err, .cmd_frame_err,
    .cmd_overrun, .cmd_busy);

  always #181 carrier = ~carrier;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge sys_clk) cyc <= cyc + 1;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic clocks(input int n);
    repeat (n) @(negedge sys_clk);
  endtask

  int accepted = 0;
  always @(posedge sys_clk) if (rst_n && cmd_accepted) accepted++;

  task automatic send(input int addr, input reg_sel_e sel, input logic [DATA_W-1:0] data);
    logic [FRAME_BITS-1:0] bits;
    bits = command_t'{addr: ADDR_W'(addr), sel: sel, data: data};
    ask_bit = 1'b0; clocks(BITC);
    for (int i = FRAME_BITS - 1; i >= 0; i--) begin ask_bit = bits[i]; clocks(BITC); end
    ask_bit = 1'b1; clocks(2 * BITC);
  endtask

  // Pulse observer: start cycle of each cathodic phase, per site and globally.
  logic [N-1:0] cath_q = '0;
  longint last_start [N];
  int     starts_of [N];
  int     last_site = -1;
  int     in_order = 0, exact_period = 0;
  bit     measuring = 1'b0;

  always @(negedge sys_clk) if (rst_n) begin
    int active;
    active = 0;
    for (int k = 0; k < N; k++) begin
      logic cath;
      cath = (int'(i_na[k]) == -255000);
      if (i_na[k] != 0) active++;
      if (measuring && cath && !cath_q[k]) begin
        if (last_site >= 0) begin
          chk(k == (last_site + 1) % N, $sformatf("site %0d fired after site %0d", k, last_site));
          if (k == (last_site + 1) % N) in_order++;
        end
        if (starts_of[k] > 0) begin
          chk(cyc - last_start[k] == longint'(ROUND),
              $sformatf("site %0d period %0d, expected %0d", k, cyc - last_start[k], ROUND));
          if (cyc - last_start[k] == longint'(ROUND)) exact_period++;
        end
        last_start[k] = cyc;
        starts_of[k]++;
        last_site = k;
      end
      cath_q[k] = cath;
    end
    chk(active <= 1, "two electrodes stimulating at once");
  end

  // Shape of one pulse on one site, from its current alone.
  task automatic check_shape(input int k);
    int nc, ni, na;
    while (int'(i_na[k]) != -255000) @(negedge sys_clk);
    nc = 0; ni = 0; na = 0;
    while (int'(i_na[k]) == -255000) begin nc++; @(negedge sys_clk); end
    while (i_na[k] == 0)             begin ni++; @(negedge sys_clk); end
    while (int'(i_na[k]) == 255000)  begin na++; @(negedge sys_clk); end
    chk(nc == D && ni == D && na == D, $sformatf("site %0d pulse %0d/%0d/%0d", k, nc, ni, na));
  endtask

  initial begin
    #1500ms;   // about 2.07 million system clock cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real hz;
    for (int k = 0; k < N; k++) begin v_mv[k] = '0; starts_of[k] = 0; last_start[k] = 0; end
    repeat (10) @(posedge carrier);
    rst_n = 1'b1;
    clocks(10);
    // Program every site while all are still inactive, then arm them all.
    for (int k = 0; k < N; k++) begin
      send(k, REG_AMPLITUDE, 9'd255);
      send(k, REG_DURATION, 9'(D));
      send(k, REG_INTERPHASE, 9'(D));
    end
    for (int k = 0; k < N; k++) send(k, REG_REPETITION, 9'h101);
    chk(accepted == 4 * N, $sformatf("%0d of %0d commands accepted", accepted, 4 * N));
    // Let the ring settle into its round-robin pattern, then measure two rounds.
    clocks(ROUND + 5000);
    measuring = 1'b1;
    check_shape(37);
    clocks(2 * ROUND + 2000);
    measuring = 1'b0;
    for (int k = 0; k < N; k++) chk(starts_of[k] >= 2, $sformatf("site %0d fired %0d times", k, starts_of[k]));
    chk(in_order >= 2 * N, $sformatf("%0d pulses in ring order", in_order));
    chk(exact_period >= N, $sformatf("%0d exact periods", exact_period));
    hz = 1.0e9 / (real'(ROUND) * 723.3);
    $display("round = %0d cycles = %.1f ms, %.2f pulses/s per electrode", ROUND, real'(ROUND) * 723.3e-6, hz);
    chk(hz > 8.9 && hz < 9.2, "per-electrode rate about 9 pulses/s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
