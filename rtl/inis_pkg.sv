// Shared types and constants of the 100-site wireless biphasic stimulator.
//
// The field widths follow the published register sizes: an 8-bit amplitude,
// 9-bit duration and interphasic-delay registers counted in system clock
// cycles (725 ns), and a 9-bit repetition register whose top bit enables the
// site and whose low 8 bits give the pulse period in repetition ticks.
// The command frame layout (7-bit site address, 2-bit register select, 9-bit
// data) is this design's own choice: the command format is not published.
package inis_pkg;

  localparam int AMP_W  = 8;   // amplitude register, 1 uA per step after the x10 output stage
  localparam int TIME_W = 9;   // duration and interphasic delay, in clock cycles
  localparam int REP_W  = 9;   // repetition: [8] = active, [7:0] = period in ticks
  localparam int ADDR_W = 7;   // enough for 100 sites
  localparam int DATA_W = 9;   // widest register
  localparam int SEL_W  = 2;

  // Payload bits of one command frame, sent MSB first between a start and a stop bit.
  localparam int FRAME_BITS = ADDR_W + SEL_W + DATA_W;

  // Which of the four site registers a command writes.
  typedef enum logic [SEL_W-1:0] {
    REG_AMPLITUDE  = 2'd0,
    REG_DURATION   = 2'd1,
    REG_INTERPHASE = 2'd2,
    REG_REPETITION = 2'd3
  } reg_sel_e;

  // One decoded register write.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    reg_sel_e          sel;
    logic [DATA_W-1:0] data;
  } command_t;

  // The stored parameters of one site.
  typedef struct packed {
    logic [AMP_W-1:0]  amplitude;
    logic [TIME_W-1:0] duration;
    logic [TIME_W-1:0] interphase;
    logic [REP_W-1:0]  repetition;
  } site_params_t;

  // Phases of the biphasic pulse (cathodic first, then anodic).
  typedef enum logic [1:0] {
    PH_IDLE       = 2'd0,
    PH_CATHODIC   = 2'd1,
    PH_INTERPHASE = 2'd2,
    PH_ANODIC     = 2'd3
  } phase_e;

  // Shortest phase the sequencer produces: 2 cycles = 1.45 us at 1.38 MHz.
  localparam int MIN_PHASE_CYCLES = 2;

endpackage
