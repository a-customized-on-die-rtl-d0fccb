`timescale 1ns/1ps
// flash_adc: one complete 5-bit flash ADC lane (simulation model, because its
// analog front end is real-valued).
//
// The comparator bank (reference ladder VREFN..VREFP and 32 comparators)
// samples the attenuated supply on the rising edge of inclk; the digital block
// (gray encoder, gray-to-binary converter, deskew latch) turns the thermometer
// code into a binary word that is captured on the rising edge of clk_latch.
// With clk_latch half a period after inclk, as the DLL supplies them, dout is
// the code of the sample taken half a period earlier:
// dout = floor((vin - VREFN) * 32 / (VREFP - VREFN)), limited to 0..31.
// The partition into ladder, comparators and digital block, the 32 references
// and the 0.3 V / 1.3 V range follow the design; the edge timing is this
// implementation's choice.
module flash_adc
  import odo_pkg::*;
#(
  parameter int unsigned BITS  = ADC_BITS,
  parameter int unsigned NCOMP = NUM_COMP,
  parameter real         VREFN = 0.3,
  parameter real         VREFP = 1.3
) (
  input  real             vin,
  input  logic            inclk,
  input  logic            clk_latch,
  input  logic            rst_n,
  output logic [BITS-1:0] dout
);
  logic [NCOMP-1:0] therm;

  flash_comparator_bank #(.NUM_COMP(NCOMP), .VREFN(VREFN), .VREFP(VREFP)) u_cmp (
    .vin(vin), .inclk(inclk), .therm(therm));

  flash_adc_digital #(.BITS(BITS), .NCOMP(NCOMP)) u_dig (
    .clk_latch(clk_latch), .rst_n(rst_n), .therm(therm), .dout(dout));
endmodule
