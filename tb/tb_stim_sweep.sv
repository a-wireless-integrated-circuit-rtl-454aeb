// Stimulus-strength sweeps on one stimulation site at its default parameters,
// the two ways a nerve is recruited in practice: a duration sweep at full
// scale (code 255, which is 255 uA by design; on silicon the weaker bias
// current made full scale about 216 uA) and an amplitude sweep at a fixed 370 us
// (510 cycles of the 1.38 MHz clock). For each setting the test rewrites the
// site's registers over the write bus, waits for the first pulse that starts
// after the write (the site copies its registers at pulse start), and
// measures that pulse from the electrode current: the cathodic and anodic
// phase lengths, the interphase length (41 cycles, 30 us), a current that is
// flat at exactly code x 1 uA in each phase and zero in between, and the
// charge of each phase, which must be code x 1 uA x duration and must cancel
// across the pulse. The electrode is held at the reference so the recovery
// path adds nothing. The setting lists are this test's own choice, spread
// over the programmable range; one clock cycle is 725 ns.
module tb_stim_sweep;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_req = 1'b0, wr_ack, tok;
  command_t wr_cmd = '0;
  logic signed [15:0] v_mv = '0;
  logic signed [19:0] i_na;
  phase_e phase;
  int checks = 0, failures = 0;

  localparam int IPD = 41;
  localparam int DURS [10] = '{14, 28, 55, 83, 138, 207, 276, 345, 414, 511};
  localparam int AMPS [12] = '{0, 5, 10, 15, 20, 33, 50, 75, 100, 150, 200, 255};

  stim_cell #(.SITE_ID(0), .START_WITH_TOKEN(1'b1)) dut (
    .clk, .rst_n, .wr_req, .wr_cmd, .wr_ack, .token_in(tok), .token_out(tok),
    .v_electrode_mv(v_mv), .i_electrode_na(i_na), .phase);

  always #362 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bus_write(input reg_sel_e s, input int value);
    @(negedge clk); wr_cmd = '{addr: '0, sel: s, data: DATA_W'(value)}; wr_req = 1'b1;
    while (!wr_ack) @(negedge clk);
    wr_req = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    #2000ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measures one whole pulse that starts after the call, sampling each cycle.
  task automatic measure(input int amp, input int dur, input string tag);
    int n_cat = 0, n_ipd = 0, n_ano = 0, bad_i = 0;
    longint q_cat = 0, q_ano = 0;
    while (phase != PH_IDLE) @(negedge clk);
    while (phase == PH_IDLE) @(negedge clk);
    while (phase != PH_IDLE) begin
      case (phase)
        PH_CATHODIC:  begin n_cat++; q_cat += longint'(i_na); if (int'(i_na) != -amp * 1000) bad_i++; end
        PH_INTERPHASE: begin n_ipd++; if (i_na != 0) bad_i++; end
        PH_ANODIC:    begin n_ano++; q_ano += longint'(i_na); if (int'(i_na) != amp * 1000) bad_i++; end
        default: ;
      endcase
      @(negedge clk);
    end
    chk(n_cat == dur, {tag, ": cathodic length"});
    chk(n_ipd == IPD, {tag, ": interphase length"});
    chk(n_ano == dur, {tag, ": anodic length"});
    chk(bad_i == 0, {tag, ": current flat at the programmed value"});
    chk(q_cat == -longint'(amp) * 1000 * dur, {tag, ": cathodic charge"});
    chk(q_cat + q_ano == 0, {tag, ": charge balance"});
    $display("%s: %0d uA x %0d cycles = %.1f nC per phase", tag, amp, dur,
             real'(q_ano) * 0.7233e-3 / 1000.0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bus_write(REG_INTERPHASE, IPD);
    bus_write(REG_AMPLITUDE, 255);
    bus_write(REG_DURATION, DURS[0]);
    bus_write(REG_REPETITION, 9'h101);
    foreach (DURS[k]) begin
      bus_write(REG_DURATION, DURS[k]);
      measure(255, DURS[k], $sformatf("duration sweep %0d", k));
    end
    bus_write(REG_DURATION, 510);
    foreach (AMPS[k]) begin
      bus_write(REG_AMPLITUDE, AMPS[k]);
      measure(AMPS[k], 510, $sformatf("amplitude sweep %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
