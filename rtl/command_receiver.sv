// Command receiver: turns the demodulated ASK bit stream into command frames.
//
// Commands reach the chip at 20 kb/s as amplitude-shift keying of the power
// carrier. An analog envelope detector (not modelled) slices the carrier
// amplitude into ask_bit; this block recovers the bits with the system clock,
// which is derived from the same carrier, so one bit lasts BIT_CYCLES clocks
// (1.38 MHz / 20 kb/s = 69). The frame is this design's own choice, since the
// command format is not published: the line idles high, a low start bit is
// followed by FRAME_BITS payload bits MSB first (site address, register
// select, data) and a high stop bit. Each bit is sampled in its middle. A
// frame whose stop bit is low is dropped and flagged.
//
// Ports: clk, rst_n (async, active low), ask_bit (asynchronous input,
// synchronised here), cmd_valid (one-cycle strobe with cmd), cmd (decoded
// frame), frame_err (one-cycle strobe for a bad stop bit).
// Timing: cmd_valid rises about half a bit time after the stop bit begins.
module command_receiver
  import inis_pkg::*;
#(
  parameter int unsigned BIT_CYCLES = 69
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ask_bit,
  output logic     cmd_valid,
  output command_t cmd,
  output logic     frame_err
);

  localparam int CW = $clog2(BIT_CYCLES + 1);
  localparam int NW = $clog2(FRAME_BITS + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e             state;
  logic [1:0]            sync;
  logic [CW-1:0]         timer;
  logic [NW-1:0]         nbits;
  logic [FRAME_BITS-1:0] shift;

  wire line = sync[1];

  // Two-flop synchroniser: the demodulator output is not aligned to clk.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], ask_bit};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= RX_IDLE;
      timer     <= '0;
      nbits     <= '0;
      shift     <= '0;
      cmd_valid <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      cmd_valid <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        RX_IDLE: if (!line) begin
          // Falling edge of the start bit: wait half a bit to reach its middle.
          state <= RX_START;
          timer <= CW'(BIT_CYCLES / 2 - 1);
        end
        RX_START: if (timer != 0) timer <= timer - 1'b1;
        else if (line) begin
          state <= RX_IDLE;          // glitch, not a start bit
        end else begin
          state <= RX_DATA;
          timer <= CW'(BIT_CYCLES - 1);
          nbits <= '0;
        end
        RX_DATA: if (timer != 0) timer <= timer - 1'b1;
        else begin
          shift <= {shift[FRAME_BITS-2:0], line};
          timer <= CW'(BIT_CYCLES - 1);
          if (nbits == NW'(FRAME_BITS - 1)) state <= RX_STOP;
          nbits <= nbits + 1'b1;
        end
        RX_STOP: if (timer != 0) timer <= timer - 1'b1;
        else begin
          state     <= RX_IDLE;
          cmd_valid <= line;
          frame_err <= !line;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  assign cmd = command_t'(shift);

endmodule
