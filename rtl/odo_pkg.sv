`timescale 1ns/1ps
// odo_pkg: constants and types shared by the on-die oscilloscope.
//
// The capture path has eight time-interleaved 5-bit flash ADC lanes, each
// built from 32 comparators, feeding a 128-word capture register that is read
// back through a 7-bit address. All of these numbers come from the design
// description; the per-lane depth (128 / 8 = 16) follows from them.
package odo_pkg;
  localparam int unsigned NUM_LANES  = 8;    // ADC lanes / DLL clock phases
  localparam int unsigned ADC_BITS   = 5;    // flash ADC resolution
  localparam int unsigned NUM_COMP   = 32;   // comparators per flash ADC
  localparam int unsigned REG_WORDS  = 128;  // 5-bit words in the capture register
  localparam int unsigned ADDR_BITS  = 7;    // read counter width
  localparam int unsigned LANE_DEPTH = REG_WORDS / NUM_LANES;

  typedef logic [ADC_BITS-1:0] sample_t;
endpackage
