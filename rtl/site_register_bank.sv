// Register bank of one stimulation site.
//
// Holds the four published per-site registers: amplitude (8 b), duration
// (9 b), interphasic delay (9 b) and repetition (9 b, top bit = site active,
// low 8 bits = period). They can be rewritten at any time; as published, a
// change takes effect the next time the site fires. This is done with a
// working copy of amplitude, duration and interphasic delay that the site FSM
// takes at the start of each firing (latch), so a write during a pulse cannot
// change that pulse. The working copy is this design's way of meeting the
// published rule. Reset clears everything, which leaves the site inactive.
//
// Ports: clk, rst_n (async, active low); write/sel/data store one register
// (write enable from the site FSM); latch copies the live values into the
// working copy; live shows the stored registers, work the working copy.
// Timing: a write or latch shows on the outputs the next cycle.
module site_register_bank
  import inis_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              write,
  input  reg_sel_e          sel,
  input  logic [DATA_W-1:0] data,
  input  logic              latch,
  output site_params_t      live,
  output site_params_t      work
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      live <= '0;
    end else if (write) begin
      unique case (sel)
        REG_AMPLITUDE:  live.amplitude  <= data[AMP_W-1:0];
        REG_DURATION:   live.duration   <= data[TIME_W-1:0];
        REG_INTERPHASE: live.interphase <= data[TIME_W-1:0];
        REG_REPETITION: live.repetition <= data[REP_W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      work <= '0;
    end else if (latch) begin
      work <= live;
    end
  end

endmodule
