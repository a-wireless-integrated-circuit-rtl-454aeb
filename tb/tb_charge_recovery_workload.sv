// Charge-recovery workload: one stimulation site driving a capacitive
// electrode, with the output stage's anodic current 1.4 % too strong
// (3.6 uA of mismatch at the 255 uA full scale). The site fires its longest
// pulse (370 us phases) at the fastest rate (period 1, 5.93 ms). Each pulse
// then leaves about 1.3 nC on the electrode. The electrode is modelled here
// as 152 nF, which with the 500 kOhm recovery resistance gives the 76 ms
// recovery time constant. Without recovery the electrode voltage would climb
// by about 9 mV per pulse without bound. With it, the residual voltage
// sampled just before each pulse must converge: over 400 pulses (2.4 s) its
// rise per 40 pulses must shrink to a quarter of the first, and it must end
// far below the unrecovered build-up. The recovery current must never exceed
// the +-235 nA limit and must run near it. At this extreme setting (full
// scale, longest pulse, fastest rate) the residual settles at a few hundred
// mV rather than below 117 mV: the amplifier also works during the pulse,
// when the electrode swings the other way, so it removes less than the
// 235 nA x 5.93 ms its limit would allow.
module tb_charge_recovery_workload;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;
  localparam real TCLK_NS = 723.3;
  localparam real C_NF    = 152.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_req = 1'b0, wr_ack, tok;
  command_t wr_cmd = '0;
  logic signed [15:0] v_mv;
  logic signed [19:0] i_na;
  phase_e phase;
  real v_el = 0.0;          // electrode voltage, mV
  int checks = 0, failures = 0;

  stim_cell #(.SITE_ID(0), .START_WITH_TOKEN(1'b1), .ANODIC_ERR_PPM(14000)) dut (
    .clk, .rst_n, .wr_req, .wr_cmd, .wr_ack, .token_in(tok), .token_out(tok),
    .v_electrode_mv(v_mv), .i_electrode_na(i_na), .phase);

  always #(TCLK_NS / 2.0) clk = ~clk;

  // Electrode: a capacitor integrating the site's current each cycle.
  assign v_mv = 16'($rtoi(v_el));
  // nA * ns / nF = 1e-6 mV
  always @(posedge clk) v_el <= v_el + real'(i_na) * TCLK_NS * 1.0e-6 / C_NF;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bus_write(input reg_sel_e s, input int value);
    @(negedge clk); wr_cmd = '{addr: '0, sel: s, data: DATA_W'(value)}; wr_req = 1'b1;
    while (!wr_ack) @(negedge clk);
    wr_req = 1'b0;
    @(negedge clk); @(negedge clk);
  endtask

  initial begin
    #3000ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pre [$];            // electrode voltage just before each pulse
  int  max_rec = 0;
  always @(negedge clk) if (rst_n) begin
    if (phase == PH_IDLE && $rtoi(v_el) != 0) begin
      int r;
      r = int'(i_na);
      if (r < 0) r = -r;
      if (r > max_rec) max_rec = r;
    end
  end

  initial begin
    phase_e prev;
    real growth_early, growth_late;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bus_write(REG_AMPLITUDE, 255);
    bus_write(REG_DURATION, 511);
    bus_write(REG_INTERPHASE, 2);
    bus_write(REG_REPETITION, 9'h101);
    prev = PH_IDLE;
    while (pre.size() < 400) begin
      @(negedge clk);
      if (prev == PH_IDLE && phase == PH_CATHODIC) pre.push_back(v_el);
      prev = phase;
    end
    for (int q = 0; q < 400; q += 40) $display("residual before pulse %0d: %.1f mV", q + 1, pre[q]);
    $display("residual before pulse 400: %.1f mV; peak recovery current between pulses %0d nA",
             pre[399], max_rec);
    growth_early = pre[40] - pre[0];
    growth_late  = pre[399] - pre[359];
    chk(pre[1] - pre[0] > 5.0, "residual charge is left by the mismatch");
    chk(growth_early > 30.0, "residual builds up at first");
    chk(growth_late < 0.25 * growth_early, "recovery slows the build-up to a standstill");
    chk(pre[399] < 0.2 * 400.0 * (pre[1] - pre[0]), "residual far below the unrecovered build-up");
    chk(max_rec <= 235, "recovery current within +-235 nA");
    chk(max_rec >= 200, "recovery runs near the needed 220 nA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
