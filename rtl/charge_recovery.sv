// Behavioural model of the active charge-recovery amplifier of a site.
//
// The real block is an operational transconductance amplifier, biased in
// subthreshold and wired as a buffer to a reference voltage, that runs all the
// time in every site. It pulls the electrode back towards the reference and so
// bleeds off the residual charge left by source/sink mismatch: for small
// deviations it acts like a 500 kOhm resistor, and for large excursions its
// current saturates at +-235 nA. This model gives that characteristic in
// whole nanoamps: i = -(v_electrode / R_EFF), clipped to +-I_MAX_NA, with the
// electrode voltage in millivolts relative to the reference. The smooth
// transition of the real amplifier is replaced by a hard limit.
//
// Ports: v_electrode_mv (signed, mV), i_rec_na (signed current into the
// electrode, nA). Purely combinational.
module charge_recovery #(
  parameter int unsigned R_EFF_KOHM = 500,
  parameter int unsigned I_MAX_NA   = 235
) (
  input  logic signed [15:0] v_electrode_mv,
  output logic signed [9:0]  i_rec_na
);

  logic signed [31:0] linear;

  always_comb begin
    // mV / kOhm = uA, so scale by 1000 for nA
    linear = -((32'(v_electrode_mv) * 32'sd1000) / $signed(32'(R_EFF_KOHM)));
    if (linear > $signed(32'(I_MAX_NA)))       i_rec_na = 10'(I_MAX_NA);
    else if (linear < -$signed(32'(I_MAX_NA))) i_rec_na = -10'(I_MAX_NA);
    else                                        i_rec_na = 10'(linear);
  end

endmodule
