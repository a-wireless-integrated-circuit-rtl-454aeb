// Internal FSM of one stimulation site.
//
// It has two jobs, as published. First, it stores data sent by the global
// FSM into the site's registers and acknowledges it: when the shared bus
// carries a request for this site (selected), it writes the register once and
// raises ack the next cycle, holding it until the request drops. Second, it
// sequences the biphasic pulse with the site counter. When the token arrives
// it checks whether the site is active (repetition bit 8) and a pulse is due;
// if so it latches the working parameters, restarts the interval count and
// runs the cathodic phase (duration), the interphasic delay and the anodic
// phase (duration), then passes the token in the last anodic cycle. If no
// pulse is due it passes the token at once. The DAC is enabled only during the
// two current phases. Cathodic-first order follows the published pulse shape;
// the exact cycle on which the token moves is this design's choice.
//
// Ports: clk, rst_n (async, active low); selected (bus request addressed to
// this site), write (register write enable), ack; has_token and pass to the
// token cell; live (stored registers) and work (working copy) from the
// register bank, latch to it; load, load_value, restart to the counter and
// phase_last, due from it; phase (current phase) for the analog stage.
// Timing: a due site starts its cathodic phase the cycle after the token
// arrives and holds the token for 2*duration + interphase cycles.
module site_fsm
  import inis_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register write handshake
  input  logic              selected,
  output logic              write,
  output logic              ack,
  // token
  input  logic              has_token,
  output logic              pass,
  // register bank
  input  site_params_t      live,
  input  site_params_t      work,
  output logic              latch,
  // counter
  output logic              load,
  output logic [TIME_W-1:0] load_value,
  output logic              restart,
  input  logic              phase_last,
  input  logic              due,
  // analog control
  output phase_e            phase
);

  phase_e next;
  logic   fire;

  // ---- register write handshake -------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack <= 1'b0;
    else        ack <= selected;
  end

  assign write = selected && !ack;

  // ---- pulse sequencer -----------------------------------------------------
  assign fire = has_token && live.repetition[REP_W-1] && due;

  always_comb begin
    next       = phase;
    pass       = 1'b0;
    latch      = 1'b0;
    restart    = 1'b0;
    load       = 1'b0;
    load_value = work.duration;
    unique case (phase)
      PH_IDLE: if (fire) begin
        next       = PH_CATHODIC;
        latch      = 1'b1;
        restart    = 1'b1;
        load       = 1'b1;
        load_value = live.duration;      // the working copy is taken this cycle
      end else if (has_token) begin
        pass = 1'b1;
      end
      PH_CATHODIC: if (phase_last) begin
        next       = PH_INTERPHASE;
        load       = 1'b1;
        load_value = work.interphase;
      end
      PH_INTERPHASE: if (phase_last) begin
        next       = PH_ANODIC;
        load       = 1'b1;
        load_value = work.duration;
      end
      PH_ANODIC: if (phase_last) begin
        next = PH_IDLE;
        pass = 1'b1;
      end
      default: next = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= PH_IDLE;
    else        phase <= next;
  end

  // A pulse is only ever produced while this site holds the token.
  a_token_while_firing: assert property (@(posedge clk) disable iff (!rst_n)
    phase != PH_IDLE |-> has_token);

endmodule
