// One stimulation site of the 10x10 array.
//
// Each of the 100 sites is self-contained, as published: a register bank with
// its own amplitude, duration, interphasic-delay and repetition values, an
// internal FSM, a counter and a token cell form the digital part; an R-2R
// DAC, a x10 output stage and an always-on charge-recovery amplifier form the
// analog part (here behavioural models working in nanoamps). Once programmed
// the site keeps firing at its own rate whenever the token visits it and a
// pulse is due. The electrode current is the sum of the stimulation current
// and the recovery current.
//
// Parameters: SITE_ID (address on the write bus), START_WITH_TOKEN (the site
// holding the token after reset), TICK_CYCLES (repetition period step),
// ANODIC_ERR_PPM (source/sink mismatch of the output stage model, 0 = ideal).
//
// Ports: clk, rst_n (async, active low); wr_req,
// wr_cmd and wr_ack, the shared write bus of the global FSM (ack is high only
// from the addressed site); token_in, token_out (token ring);
// v_electrode_mv (electrode voltage relative to the reference, mV);
// i_electrode_na (current into the electrode, nA, positive = anodic);
// phase (pulse phase, for observation).
module stim_cell
  import inis_pkg::*;
#(
  parameter int unsigned SITE_ID          = 0,
  parameter bit          START_WITH_TOKEN = 1'b0,
  parameter int unsigned TICK_CYCLES      = 8192,
  parameter int          ANODIC_ERR_PPM   = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_req,
  input  command_t           wr_cmd,
  output logic               wr_ack,
  input  logic               token_in,
  output logic               token_out,
  input  logic signed [15:0] v_electrode_mv,
  output logic signed [19:0] i_electrode_na,
  output phase_e             phase
);

  logic              selected, write, latch;
  logic              has_token, pass;
  logic              load, restart, phase_last, due;
  logic [TIME_W-1:0] load_value;
  site_params_t      live, work;
  logic [15:0]       i_dac_na;
  logic signed [19:0] i_stim_na;
  logic signed [9:0]  i_rec_na;

  assign selected = wr_req && (wr_cmd.addr == ADDR_W'(SITE_ID));

  site_register_bank u_regs (
    .clk, .rst_n, .write, .sel(wr_cmd.sel), .data(wr_cmd.data), .latch, .live, .work
  );

  site_counter #(.TICK_CYCLES(TICK_CYCLES)) u_count (
    .clk, .rst_n, .load, .load_value, .restart,
    .period(live.repetition[7:0]), .phase_last, .due
  );

  token_cell #(.START_WITH_TOKEN(START_WITH_TOKEN)) u_token (
    .clk, .rst_n, .token_in, .pass, .has_token, .token_out
  );

  site_fsm u_fsm (
    .clk, .rst_n, .selected, .write, .ack(wr_ack), .has_token, .pass,
    .live, .work, .latch, .load, .load_value, .restart, .phase_last, .due, .phase
  );

  r2r_dac u_dac (
    .code(work.amplitude),
    .enable(phase == PH_CATHODIC || phase == PH_ANODIC),
    .i_out_na(i_dac_na)
  );

  output_stage #(.ANODIC_ERR_PPM(ANODIC_ERR_PPM)) u_out (
    .i_dac_na, .source(phase == PH_ANODIC), .sink(phase == PH_CATHODIC), .i_out_na(i_stim_na)
  );

  charge_recovery u_rec (.v_electrode_mv, .i_rec_na);

  assign i_electrode_na = i_stim_na + 20'(i_rec_na);

endmodule
