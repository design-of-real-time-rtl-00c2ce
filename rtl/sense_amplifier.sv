// sense_amplifier: behavioural model of the current-mirror sense amplifier
// between a half of the photodiode array and the ADC. It stands in for an
// analog circuit and is not meant for synthesis.
//
// The model is a static gain with output saturation: out = min(GAIN * in,
// 2^LEVEL_W-1), evaluated combinationally. The document characterises the
// real amplifier only in the frequency domain (unity-gain frequency 335 MHz,
// about 2.6 dB gain margin at 406 MHz) and gives no DC gain, so GAIN is this
// model's choice; its default of 16 maps the sensor's charge range onto the
// ADC input range used in this design.
module sense_amplifier
  import mv_pkg::*;
#(
  parameter int unsigned GAIN = 16
) (
  input  logic [LEVEL_W-1:0] in,
  output logic [LEVEL_W-1:0] out
);
  localparam int unsigned PW = LEVEL_W + $clog2(GAIN + 1) + 1;
  logic [PW-1:0] prod;

  assign prod = PW'(in) * PW'(GAIN);
  assign out  = (prod > PW'({LEVEL_W{1'b1}})) ? {LEVEL_W{1'b1}} : prod[LEVEL_W-1:0];
endmodule
