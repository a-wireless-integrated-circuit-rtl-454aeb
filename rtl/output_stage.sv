// Behavioural model of the wide-swing cascoded output stage of a site.
//
// The real block is analog: cascoded current mirrors whose output devices
// are ten times wider than their inputs amplify the DAC current by GAIN = 10,
// and two switch transistors controlled by the site FSM choose whether the
// stage sources current into the electrode (anodic phase) or sinks it from
// the electrode (cathodic phase). This model gives the resulting electrode
// current in nanoamps, positive when sourcing. ANODIC_ERR_PPM scales the
// sourced current to mimic the small source/sink mismatch seen in silicon
// (0 by default: ideal matching). Compliance limits are not modelled.
//
// Ports: i_dac_na (DAC current, nA), source, sink (from the site FSM; at most
// one high), i_out_na (signed electrode current, nA). Purely combinational.
module output_stage #(
  parameter int unsigned GAIN           = 10,
  parameter int          ANODIC_ERR_PPM = 0
) (
  input  logic [15:0]        i_dac_na,
  input  logic               source,
  input  logic               sink,
  output logic signed [19:0] i_out_na
);

  logic signed [63:0] amplified;
  logic signed [63:0] sourced;

  always_comb begin
    amplified = 64'(i_dac_na) * 64'(GAIN);
    sourced   = amplified + (amplified * 64'(ANODIC_ERR_PPM)) / 64'sd1000000;
    if (source && !sink)      i_out_na = 20'(sourced);
    else if (sink && !source) i_out_na = -20'(amplified);
    else                      i_out_na = '0;
  end

endmodule
