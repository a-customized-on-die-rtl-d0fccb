`timescale 1ns/1ps
// flash_comparator_bank: behavioural model (real-valued, not synthesizable) of
// the reference ladder and the clocked comparators of one flash ADC.
//
// The resistor ladder divides the span VREFN..VREFP (0.3 V to 1.3 V) into
// NUM_COMP equal steps of (VREFP - VREFN) / NUM_COMP = 31.25 mV. Comparator
// i (i = 1..NUM_COMP) compares the attenuated supply vin with VREFN + i * step
// and its decision is captured on the rising edge of inclk, so therm is a
// thermometer code that holds the sample taken at the last inclk edge.
// Comparator NUM_COMP sits at VREFP and flags over-range. The result is a
// 5-bit code floor((vin - VREFN) / step), limited to 0..31.
//
// From the design: 32 comparators, VREFN = 0.3 V, VREFP = 1.3 V, a ladder of
// equal steps, sampling on INCLK. This model's choice: which ladder tap each
// comparator uses (the lowest at VREFN + step, the highest at VREFP).
module flash_comparator_bank #(
  parameter int unsigned NUM_COMP = 32,
  parameter real         VREFN    = 0.3,
  parameter real         VREFP    = 1.3
) (
  input  real                 vin,
  input  logic                inclk,
  output logic [NUM_COMP-1:0] therm
);
  localparam real STEP = (VREFP - VREFN) / NUM_COMP;

  initial therm = '0;

  always @(posedge inclk)
    for (int i = 0; i < int'(NUM_COMP); i++)
      therm[i] <= (vin >= VREFN + STEP * (i + 1));
endmodule
