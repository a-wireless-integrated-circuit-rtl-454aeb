// Wireless 100-site biphasic constant-current neural stimulator.
//
// The chip is powered, clocked and programmed over one 2.765 MHz inductive
// link. The squared carrier is halved into the 1.38 MHz system clock; the
// ASK-demodulated command stream (20 kb/s) is deframed by the command
// receiver, and the global FSM writes each command into the addressed site's
// registers over a shared bus with a request/acknowledge handshake. The
// N_SITES stimulation sites (a 10x10 array) then run on their own: a single
// token circulates through them, site 0 to N_SITES-1 and back, and a site
// fires its cathodic / interphase / anodic pulse only while it holds the
// token, so no two electrodes ever stimulate together. Each site times its
// own repetition period in steps of TICK_CYCLES = 8192 clocks (5.93 ms).
// Rectifier, regulator, bias generator, ASK envelope detector and pads are
// analog and outside this module: the demodulated bit stream, the electrode
// voltages and currents are ports.
//
// Ports: carrier (squared coil voltage), rst_n (global reset, active low,
// asynchronous to the sites), ask_bit (demodulated command bits);
// v_electrode_mv[N_SITES] (electrode voltages, mV); i_electrode_na[N_SITES]
// (electrode currents, nA, positive = anodic); firing[N_SITES] (site is in
// its pulse sequence); token_at[N_SITES] (token position); sys_clk; and the
// strobes cmd_accepted, cmd_addr_err, cmd_frame_err, cmd_overrun, and
// cmd_busy while a register write is open.
module inis_top
  import inis_pkg::*;
#(
  parameter int unsigned N_SITES     = 100,
  parameter int unsigned BIT_CYCLES  = 69,
  parameter int unsigned TICK_CYCLES = 8192,
  parameter int          ANODIC_ERR_PPM = 0   // output-stage mismatch model, 0 = ideal
) (
  input  logic                      carrier,
  input  logic                      rst_n,
  input  logic                      ask_bit,
  input  logic signed [15:0]        v_electrode_mv [N_SITES],
  output logic signed [19:0]        i_electrode_na [N_SITES],
  output logic [N_SITES-1:0]        firing,
  output logic [N_SITES-1:0]        token_at,
  output logic                      sys_clk,
  output logic                      cmd_accepted,
  output logic                      cmd_addr_err,
  output logic                      cmd_frame_err,
  output logic                      cmd_overrun,
  output logic                      cmd_busy
);

  logic               cmd_valid;
  command_t           cmd;
  logic               wr_req;
  command_t           wr_cmd;
  logic [N_SITES-1:0] ack;
  logic [N_SITES-1:0] token;   // token[k] leaves site k
  phase_e             phase [N_SITES];

  clock_divider u_clk (.carrier, .sys_clk);

  command_receiver #(.BIT_CYCLES(BIT_CYCLES)) u_rx (
    .clk(sys_clk), .rst_n, .ask_bit, .cmd_valid, .cmd, .frame_err(cmd_frame_err)
  );

  global_fsm #(.N_SITES(N_SITES)) u_gfsm (
    .clk(sys_clk), .rst_n, .cmd_valid, .cmd, .wr_req, .wr_cmd, .wr_ack(|ack),
    .addr_err(cmd_addr_err), .overrun(cmd_overrun), .busy(cmd_busy)
  );

  for (genvar k = 0; k < N_SITES; k++) begin : g_site
    stim_cell #(.SITE_ID(k), .START_WITH_TOKEN(k == 0), .TICK_CYCLES(TICK_CYCLES),
                .ANODIC_ERR_PPM(ANODIC_ERR_PPM)) u_cell (
      .clk(sys_clk), .rst_n, .wr_req, .wr_cmd, .wr_ack(ack[k]),
      .token_in(token[(k + N_SITES - 1) % N_SITES]), .token_out(token[k]),
      .v_electrode_mv(v_electrode_mv[k]), .i_electrode_na(i_electrode_na[k]),
      .phase(phase[k])
    );
    assign firing[k]   = (phase[k] != PH_IDLE);
    assign token_at[k] = g_site[k].u_cell.has_token;
  end

  // A command is accepted when its write is acknowledged.
  assign cmd_accepted = wr_req && (|ack);

  // The token makes stimulation mutually exclusive across the array.
  a_one_firing: assert property (@(posedge sys_clk) disable iff (!rst_n) $onehot0(firing));

endmodule
