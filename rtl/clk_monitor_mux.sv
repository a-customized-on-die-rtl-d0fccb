`timescale 1ns/1ps
// clk_monitor_mux: brings the DLL clocks out for measurement.
//
// clk_latch_out carries one of the eight CLKLATCH phases, chosen by a 3-bit
// select driven from switches on the board (sel = 0 picks CLKLATCH1), and
// mux_out carries the input clock of the first ADC, which serves as the
// common reference when the delay of each phase is measured. Purely
// combinational. The two outputs and the 3-bit selection follow the design;
// the select encoding is this implementation's choice.
module clk_monitor_mux
  import odo_pkg::*;
#(
  parameter int unsigned LANES = NUM_LANES
) (
  input  logic                     adc1_inclk,
  input  logic [LANES-1:0]         clklatch,
  input  logic [$clog2(LANES)-1:0] sel,
  output logic                     clk_latch_out,
  output logic                     mux_out
);
  always_comb begin
    clk_latch_out = clklatch[sel];
    mux_out       = adc1_inclk;
  end
endmodule
