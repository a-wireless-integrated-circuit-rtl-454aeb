// Clock recovery: divides the squared 2.765 MHz power-link carrier by two.
//
// The chip takes its system clock from the coil voltage of the inductive
// link; a comparator (analog, not modelled here) squares the coil voltage and
// this toggle flip-flop halves it, giving the 1.38 MHz system clock with a 50 %
// duty cycle. The divide-by-two is the published scheme. The divider has no
// reset on purpose: the system clock keeps running while the global reset is
// held, so every register of the chip sees reset with a running clock, and
// the phase of the divided clock relative to the carrier does not matter.
//
// Ports: carrier (squared carrier), sys_clk (carrier / 2, changes on each
// rising carrier edge).
module clock_divider (
  input  logic carrier,
  output logic sys_clk
);

  always_ff @(posedge carrier) sys_clk <= ~sys_clk;

endmodule
