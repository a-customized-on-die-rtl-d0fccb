`timescale 1ns/1ps
// flash_adc_digital: the digital block of one 5-bit flash ADC.
//
// The 32 comparator outputs (a thermometer code, sampled by the comparators on
// the lane's INCLK) pass through a gray encoder and a gray-to-binary converter,
// and the binary code is captured by the deskew latch on the lane's CLKLATCH.
// This chain is the one drawn for the ADC's digital block in the design.
// Timing: dout holds the code of the thermometer word present at the last
// rising edge of clk_latch.
module flash_adc_digital
  import odo_pkg::*;
#(
  parameter int unsigned BITS     = ADC_BITS,
  parameter int unsigned NCOMP    = NUM_COMP
) (
  input  logic                clk_latch,
  input  logic                rst_n,
  input  logic [NCOMP-1:0]    therm,
  output logic [BITS-1:0]     dout
);
  logic [BITS-1:0] gray, bin;

  therm_gray_encoder #(.BITS(BITS), .NUM_COMP(NCOMP)) u_enc (
    .therm(therm), .gray(gray));
  gray_to_binary #(.BITS(BITS)) u_g2b (.gray(gray), .bin(bin));
  deskew_latch #(.BITS(BITS)) u_latch (
    .clk_latch(clk_latch), .rst_n(rst_n), .d(bin), .q(dout));
endmodule
