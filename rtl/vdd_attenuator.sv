`timescale 1ns/1ps
// vdd_attenuator: behavioural model (real-valued, not synthesizable) of the
// R-C divider that maps the supply VDD into the ADC input range.
//
// A resistive divider scales the DC level of VDD by DC_GAIN = 0.8 / 3.3 and a
// capacitive divider scales the fast noise riding on it by AC_GAIN = 1 / 2.5.
// The model splits vdd into the known DC level VDD_DC and the deviation from
// it: vdd_att = VDD_DC * DC_GAIN + (vdd - VDD_DC) * AC_GAIN. With a 3.8 V
// supply the output rests at 0.921 V, and 4.8 V on VDD reaches the top of the
// ADC range (about 1.3 V). The output follows the input without delay.
//
// From the design: the two ratios and the 3.8 V supply. This model's choice:
// a fixed DC level instead of the divider's low-pass behaviour.
module vdd_attenuator #(
  parameter real VDD_DC  = 3.8,
  parameter real DC_GAIN = 0.8 / 3.3,
  parameter real AC_GAIN = 1.0 / 2.5
) (
  input  real vdd,
  output real vdd_att
);
  assign vdd_att = VDD_DC * DC_GAIN + (vdd - VDD_DC) * AC_GAIN;
endmodule
