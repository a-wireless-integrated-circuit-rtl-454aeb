// Timing counter of one stimulation site.
//
// Two counts share this block. The phase count times the cathodic phase,
// the interphasic delay and the anodic phase in system clock cycles (725 ns
// each): load sets it to a register value and it counts down to 1, so a phase
// lasts that many cycles; values below MIN_PHASE_CYCLES are raised to it,
// matching the published 1.45 us minimum. The interval count measures the
// time since the site last started a pulse in steps of TICK_CYCLES clocks
// (a prescaler that restarts with the pulse, then a step count saturating at
// 255); a pulse is due once the step count reaches the programmed period (a
// period of 0 is treated as 1). The published period step is about 6 ms; at
// the 1.38 MHz clock a 2^13 = 8192-cycle step (5.93 ms) gives exactly the
// published 168 Hz (period 1) to 0.66 Hz (period 255) range, so TICK_CYCLES
// defaults to 8192. Because the prescaler restarts with each pulse, the time
// from one pulse start to the next is never below period * TICK_CYCLES.
// Reset sets the step count to 255, so a newly enabled site fires at the next
// token visit. The split into two counts, the rounding of short phases and
// the reset value are this design's choices.
//
// Ports: clk, rst_n (async, active low), load and
// load_value (start a phase), restart (clear the interval count, as a pulse
// starts), period (repetition register, low 8 bits), phase_last (this is the
// last cycle of the phase), due (a pulse is due).
module site_counter
  import inis_pkg::*;
#(
  parameter int unsigned TICK_CYCLES = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [TIME_W-1:0] load_value,
  input  logic              restart,
  input  logic [7:0]        period,
  output logic              phase_last,
  output logic              due
);

  localparam int PW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;

  logic [TIME_W-1:0] phase_count;
  logic [PW-1:0]     prescale;
  logic [7:0]        interval;
  logic              tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_count <= '0;
    end else if (load) begin
      phase_count <= (load_value < TIME_W'(MIN_PHASE_CYCLES)) ? TIME_W'(MIN_PHASE_CYCLES)
                                                               : load_value;
    end else if (phase_count != 0) begin
      phase_count <= phase_count - 1'b1;
    end
  end

  // Prescaler: tick marks the end of each TICK_CYCLES step since restart.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                prescale <= '0;
    else if (restart || tick)                  prescale <= '0;
    else                                       prescale <= prescale + 1'b1;
  end

  assign tick = (prescale == PW'(TICK_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      interval <= 8'hFF;
    end else if (restart) begin
      interval <= '0;
    end else if (tick && interval != 8'hFF) begin
      interval <= interval + 1'b1;
    end
  end

  assign phase_last = (phase_count == TIME_W'(1));
  assign due        = (interval >= ((period == 0) ? 8'd1 : period));

endmodule
