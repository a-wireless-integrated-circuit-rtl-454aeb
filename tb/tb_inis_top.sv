// End-to-end testbench for inis_top at its default size (100 sites,
// 69 clocks per command bit, 8192-clock repetition step), clocked from a
// 2.765 MHz carrier.
//
// Commands are sent as serial frames on ask_bit. Each electrode current is
// decoded on its own, from the current alone, into pulses (cathodic run,
// zero-current interphase, anodic run). Each pulse is checked against a
// reference copy of the site registers: amplitude, both phase lengths, the
// interphasic delay, charge balance, and a start-to-start period of at least
// period * 8192 clocks. Two electrodes must never carry stimulation current
// at the same time. The test takes the design through: token laps with no
// site active, a bad frame, an out-of-range address, the two programmed
// electrodes of the benchtop example (75 uA / 370 us / 30 us at period 2
// and 150 uA / 200 us / 200 us at period 1) plus a short pulse on the last
// site, a site armed while another one holds the token (it fires right after
// it), a register write that lands during a pulse, switching a site off, and
// a global reset in the middle of a pulse. Each mechanism is counted and
// one that never happens is a failure.
module tb_inis_top;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;
  localparam int N    = 100;
  localparam int BITC = 69;
  localparam int STEP = 8192;

  logic carrier = 1'b0, rst_n = 1'b0, ask_bit = 1'b1;
  logic signed [15:0] v_mv [N];
  logic signed [19:0] i_na [N];
  logic [N-1:0] firing, token_at;
  logic sys_clk, cmd_accepted, cmd_addr_err, cmd_frame_err, cmd_overrun, cmd_busy;

  inis_top dut (
    .carrier, .rst_n, .ask_bit, .v_electrode_mv(v_mv), .i_electrode_na(i_na),
    .firing, .token_at, .sys_clk, .cmd_accepted, .cmd_addr_err, .cmd_frame_err,
    .cmd_overrun, .cmd_busy);

  always #181 carrier = ~carrier;   // 362 ns period: 2.765 MHz

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge sys_clk) cyc <= cyc + 1;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // ---- reference copy of the site registers ------------------------------
  site_params_t shadow [N];
  command_t     pending [$];

  // ---- mechanism counters ---------------------------------------------------
  int m_laps = 0, m_pulses = 0, m_back_to_back = 0, m_write_in_pulse = 0;
  int m_addr_err = 0, m_frame_err = 0, m_waited = 0, m_wrap_after_fire = 0;
  int m_recovery = 0, m_reset_in_pulse = 0, m_switched_off = 0, m_balanced = 0;

  // ---- per-site pulse decoder -------------------------------------------
  int     st [N];           // 0 idle, 1 cathodic, 2 interphase, 3 anodic
  int     n_c [N], n_i [N], n_a [N], amp [N];
  longint start [N], last_start [N];
  int     last_rep [N];
  site_params_t snap [N];
  longint last_end = -100;
  int     last_end_site = -1;
  int     pulses_of [N];
  longint site_off_cycle [N];
  longint armed_at [N];     // activation accepted while another site held the token

  function automatic int rec(input int mv);
    int r = -2 * mv;
    if (r > 235) r = 235;
    if (r < -235) r = -235;
    return r;
  endfunction

  function automatic int phase_len(input int v);
    return (v < MIN_PHASE_CYCLES) ? MIN_PHASE_CYCLES : v;
  endfunction

  task automatic end_pulse(input int k);
    int per;
    m_pulses++;
    pulses_of[k]++;
    chk(n_c[k] == phase_len(int'(snap[k].duration)),
        $sformatf("site %0d cathodic %0d cycles, exp %0d", k, n_c[k], phase_len(int'(snap[k].duration))));
    chk(n_i[k] == phase_len(int'(snap[k].interphase)),
        $sformatf("site %0d interphase %0d cycles", k, n_i[k]));
    chk(n_a[k] == phase_len(int'(snap[k].duration)),
        $sformatf("site %0d anodic %0d cycles", k, n_a[k]));
    if (n_c[k] == n_a[k]) m_balanced++;
    per = (snap[k].repetition[7:0] == 0) ? 1 : int'(snap[k].repetition[7:0]);
    if (last_start[k] >= 0 && last_rep[k] == per) begin
      chk(start[k] - last_start[k] >= longint'(per) * STEP,
          $sformatf("site %0d period %0d below %0d steps", k, start[k] - last_start[k], per));
      chk(start[k] - last_start[k] <= longint'(per) * STEP + 4000,
          $sformatf("site %0d period %0d too long", k, start[k] - last_start[k]));
    end
    last_start[k] = start[k];
    last_rep[k]   = per;
    last_end      = cyc;
    last_end_site = k;
  endtask

  always @(negedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin st[k] = 0; last_start[k] = -1; last_rep[k] = -1; end
    end else begin
      int active;
      active = 0;
      for (int k = 0; k < N; k++) begin
        int stim;
        stim = int'(i_na[k]) - rec(int'(v_mv[k]));
        if (stim != 0) active++;
        if (rec(int'(v_mv[k])) != 0 && st[k] == 0) m_recovery++;
        case (st[k])
          0: if (stim < 0) begin
               st[k] = 1; n_c[k] = 1; amp[k] = -stim; start[k] = cyc; snap[k] = shadow[k];
               chk(amp[k] == 1000 * int'(shadow[k].amplitude),
                   $sformatf("site %0d amplitude %0d nA", k, amp[k]));
               chk(shadow[k].repetition[REP_W-1], $sformatf("site %0d fires while inactive", k));
               chk(cyc > site_off_cycle[k], $sformatf("site %0d fires after switch-off", k));
               if (cyc - last_end <= 2 && last_end_site != k) m_back_to_back++;
               if (armed_at[k] >= 0 && cyc - armed_at[k] > 150) m_waited++;
               armed_at[k] = -1;
             end else if (stim > 0) chk(0, $sformatf("site %0d anodic current without cathodic", k));
          1: if (stim < 0) begin n_c[k]++; chk(-stim == amp[k], "cathodic amplitude steady"); end
             else if (stim == 0) begin st[k] = 2; n_i[k] = 1; end
             else chk(0, "no interphase between phases");
          2: if (stim == 0) n_i[k]++;
             else if (stim > 0) begin
               st[k] = 3; n_a[k] = 1;
               chk(stim == amp[k], $sformatf("site %0d anodic %0d matches cathodic %0d", k, stim, amp[k]));
             end else chk(0, "cathodic current in interphase");
          3: if (stim > 0) begin n_a[k]++; chk(stim == amp[k], "anodic amplitude steady"); end
             else if (stim == 0) begin st[k] = 0; end_pulse(k); end
             else chk(0, "cathodic current right after anodic");
          default: ;
        endcase
      end
      chk(active <= 1, "two electrodes stimulating at once");
      chk($onehot0(firing), "two sites in a pulse at once");
      chk($onehot(token_at), $sformatf("exactly one token: %0d", $countones(token_at)));
    end
  end

  // ---- command side ---------------------------------------------------------
  always @(posedge sys_clk) if (rst_n) begin
    if (cmd_accepted) begin
      command_t c;
      if (pending.size() == 0) chk(0, "unexpected command accepted");
      else begin
        c = pending.pop_front();
        if (st[c.addr] != 0) m_write_in_pulse++;
        case (c.sel)
          REG_AMPLITUDE:  shadow[c.addr].amplitude  = c.data[AMP_W-1:0];
          REG_DURATION:   shadow[c.addr].duration   = c.data;
          REG_INTERPHASE: shadow[c.addr].interphase = c.data;
          REG_REPETITION: shadow[c.addr].repetition = c.data;
          default: ;
        endcase
        if (c.sel == REG_REPETITION && !c.data[REP_W-1]) site_off_cycle[c.addr] = cyc;
        if (c.sel == REG_REPETITION && c.data[REP_W-1] && firing != '0) armed_at[c.addr] = cyc;
      end
    end
    if (cmd_addr_err)  m_addr_err++;
    if (cmd_frame_err) m_frame_err++;
    if (cmd_overrun)   chk(0, "command overrun");
  end

  // Token laps: the token reaching site 0; after a pulse on the last site.
  logic tok0_q = 1'b0;
  always @(posedge sys_clk) if (rst_n) begin
    tok0_q <= token_at[0];
    if (token_at[0] && !tok0_q) begin
      m_laps++;
      if (last_end_site == N - 1 && cyc - last_end <= 2) m_wrap_after_fire++;
    end
  end

  task automatic clocks(input int n);
    repeat (n) @(negedge sys_clk);
  endtask

  task automatic send(input int addr, input reg_sel_e sel, input logic [DATA_W-1:0] data, input bit stop = 1'b1);
    command_t c;
    logic [FRAME_BITS-1:0] bits;
    c = '{addr: ADDR_W'(addr), sel: sel, data: DATA_W'(data)};
    bits = c;
    if (addr < N && stop) pending.push_back(c);
    ask_bit = 1'b0; clocks(BITC);
    for (int i = FRAME_BITS - 1; i >= 0; i--) begin ask_bit = bits[i]; clocks(BITC); end
    ask_bit = stop; clocks(BITC);
    ask_bit = 1'b1; clocks(2 * BITC);
  endtask

  task automatic wait_pulse_start(input int k);
    longint t0 = cyc;
    while (st[k] != 1 && cyc - t0 < 10 * STEP) @(negedge sys_clk);
    #1;
    chk(st[k] == 1, $sformatf("site %0d pulse started", k));
  endtask

  // ---- watchdog -------------------------------------------------------------
  initial begin
    #400ms;   // about 550k system clock cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    int p2;
    for (int k = 0; k < N; k++) begin
      shadow[k] = '0; site_off_cycle[k] = -1; pulses_of[k] = 0; armed_at[k] = -1;
      v_mv[k] = 16'((k % 9) * 40 - 160);   // a spread of residual electrode voltages
    end
    repeat (10) @(posedge carrier);
    rst_n = 1'b1;
    // Idle ring: the token must lap the 100 sites in exactly 100 cycles.
    clocks(5);
    while (!token_at[0]) @(negedge sys_clk);
    t0 = cyc;
    clocks(1);
    while (!token_at[0]) @(negedge sys_clk);
    chk(cyc - t0 == longint'(N), $sformatf("idle token lap %0d cycles", cyc - t0));
    clocks(300);
    chk(m_pulses == 0, "nothing fires before programming");

    // Bad frame and out-of-range address.
    send(1, REG_AMPLITUDE, 99, 1'b0);
    send(120, REG_REPETITION, 9'h101);
    chk(m_frame_err == 1 && m_addr_err == 1, "bad frame and bad address flagged");

    // Benchtop example: electrode 1 and electrode 2, plus the last site.
    send(1, REG_AMPLITUDE, 75);
    send(1, REG_DURATION, 510);      // 370 us
    send(1, REG_INTERPHASE, 41);     // 30 us
    send(2, REG_AMPLITUDE, 150);
    send(2, REG_DURATION, 276);      // 200 us
    send(2, REG_INTERPHASE, 276);    // 200 us
    send(99, REG_AMPLITUDE, 12);
    send(99, REG_DURATION, 5);
    send(99, REG_INTERPHASE, 3);
    send(1, REG_REPETITION, 9'h102); // active, 2 steps: 84 Hz
    send(99, REG_REPETITION, 9'h101);
    // Arm electrode 2 so that its command lands about 300 cycles into a pulse
    // of electrode 1: it is due at once but must wait for the token, then
    // fires as soon as electrode 1 has finished.
    wait_pulse_start(1);
    clocks(2 * STEP + 300 - (FRAME_BITS + 2) * BITC - 40);
    send(2, REG_REPETITION, 9'h101); // active, 1 step: 168 Hz
    chk(pending.size() == 0, "all valid commands accepted");
    clocks(6 * STEP);
    chk(pulses_of[1] >= 2 && pulses_of[2] >= 4 && pulses_of[99] >= 4,
        $sformatf("pulse counts %0d/%0d/%0d", pulses_of[1], pulses_of[2], pulses_of[99]));

    // A write that lands in the middle of a pulse takes effect next time.
    send(1, REG_DURATION, 511);
    send(1, REG_INTERPHASE, 511);
    wait_pulse_start(1);
    wait_pulse_start(1);             // first pulse with the long phases
    send(1, REG_AMPLITUDE, 200);     // a frame (1380 cycles) ends inside the 1533-cycle pulse
    clocks(3 * STEP);
    chk(m_write_in_pulse >= 1, "write landed during a pulse");

    // Switch electrode 2 off.
    p2 = pulses_of[2];
    send(2, REG_REPETITION, 9'h001);
    p2 = pulses_of[2];
    clocks(4 * STEP);
    chk(pulses_of[2] == p2, "switched-off site stays silent");
    if (pulses_of[2] == p2 && p2 > 0) m_switched_off++;

    // Global reset in the middle of a pulse shuts everything down.
    wait_pulse_start(1);
    clocks(100);
    rst_n = 1'b0;
    repeat (4) @(posedge carrier);
    #1;
    chk(firing == '0 && token_at == N'(1), "reset stops the pulse and returns the token");
    for (int k = 0; k < N; k++) chk(int'(i_na[k]) == rec(int'(v_mv[k])), "only recovery current in reset");
    m_reset_in_pulse++;
    for (int k = 0; k < N; k++) shadow[k] = '0;
    rst_n = 1'b1;
    p2 = m_pulses;
    clocks(3 * STEP);
    chk(m_pulses == p2, "no site fires after reset");

    // Every mechanism must have happened.
    chk(m_laps > 10,             $sformatf("token laps %0d", m_laps));
    chk(m_pulses > 0,            $sformatf("pulses %0d", m_pulses));
    chk(m_balanced == m_pulses,  "every pulse charge balanced");
    chk(m_back_to_back > 0,      $sformatf("back-to-back pulses %0d", m_back_to_back));
    chk(m_waited > 0,            $sformatf("pulses delayed by the token %0d", m_waited));
    chk(m_wrap_after_fire > 0,   $sformatf("token wrap after last-site pulse %0d", m_wrap_after_fire));
    chk(m_write_in_pulse > 0,    $sformatf("writes during pulse %0d", m_write_in_pulse));
    chk(m_addr_err > 0,          "address rejected");
    chk(m_frame_err > 0,         "frame error");
    chk(m_recovery > 0,          "recovery current");
    chk(m_switched_off > 0,      "site switched off");
    chk(m_reset_in_pulse > 0,    "reset during pulse");
    $display("mechanisms: laps=%0d pulses=%0d back_to_back=%0d waited=%0d wrap=%0d write_in_pulse=%0d addr_err=%0d frame_err=%0d switched_off=%0d reset_in_pulse=%0d",
             m_laps, m_pulses, m_back_to_back, m_waited, m_wrap_after_fire, m_write_in_pulse,
             m_addr_err, m_frame_err, m_switched_off, m_reset_in_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
