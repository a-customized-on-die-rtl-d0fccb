`timescale 1ns/1ps
// esd_detector: behavioural model (real-valued, not synthesizable) of the ESD
// detector that freezes the oscilloscope.
//
// Hold starts low. As soon as the supply vdd departs from its nominal level
// VDD_NOM by SENSE_LEVEL or more, in either direction, Hold goes high and
// stays high until the active-low reset; a high Hold stops the capture
// register and starts the readout.
//
// From the design: Hold is initially low and goes high when noise is sensed on
// VDD; the measured sensing limit is a noise amplitude of 0.89 V on a 3.8 V
// supply. This model's choices: the deviation test against the nominal level,
// sensing in both directions, no detection delay, and the sticky output
// cleared only by reset.
module esd_detector #(
  parameter real VDD_NOM     = 3.8,
  parameter real SENSE_LEVEL = 0.89
) (
  input  real  vdd,
  input  logic rst_n,
  output logic hold
);
  initial hold = 1'b0;

  always @(vdd or rst_n) begin
    if (!rst_n)
      hold <= 1'b0;
    else if (vdd - VDD_NOM >= SENSE_LEVEL || VDD_NOM - vdd >= SENSE_LEVEL)
      hold <= 1'b1;
  end
endmodule
