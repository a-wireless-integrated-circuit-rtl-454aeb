// Behavioural model of the 8-bit MOSFET R-2R current DAC of a stimulation site.
//
// The real block is analog: a ladder of equal 4 um/4 um transistors fed with
// a reference current I_in from the chip-wide bias generator. Each branch
// halves the current, so branch i carries I_in / 2^i and the bits steer the
// branches to the output or to ground: Iout = I_in * sum(s_i / 2^i), with s_1
// the most significant bit. This model computes that sum in whole nanoamps,
// branch by branch. With the design value I_in = 25.6 uA (one tenth of the
// 256 uA full scale) the step is 100 nA and the range 0.1 to 25.5 uA; the
// DAC is switched off (zero output) when enable is low, as the real DAC is
// between pulses. Mismatch, nonlinearity and settling are not modelled.
//
// Ports: code (amplitude register), enable, i_out_na (output current, nA).
// Purely combinational.
module r2r_dac #(
  parameter int unsigned BITS     = 8,
  parameter int unsigned I_IN_NA  = 25600
) (
  input  logic [BITS-1:0] code,
  input  logic            enable,
  output logic [15:0]     i_out_na
);

  always_comb begin
    i_out_na = '0;
    if (enable) begin
      for (int i = 1; i <= int'(BITS); i++) begin
        // branch i is steered by bit BITS-i and carries I_in / 2^i
        if (code[BITS-i]) i_out_na = i_out_na + 16'(I_IN_NA >> i);
      end
    end
  end

endmodule
