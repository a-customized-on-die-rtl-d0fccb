`timescale 1ns/1ps
// odo_shift_register: the 128 x 5-bit capture register of the oscilloscope.
//
// The 128 words are organised as NUM_LANES lanes of LANE_DEPTH words, one lane
// beside each ADC. Lane k shifts on every rising edge of its own clock
// lane_clk[k] (the ADC's CLKLATCH phase): the newest ADC word enters word 0
// and the oldest word drops out of the last position. Because the lane clocks
// are spaced by one eighth of the sampling period, the eight lanes together
// hold the last 128 samples of the interleaved stream.
//
// Hold (asynchronous, from the ESD detector) freezes all lanes. It is
// synchronized by two flops on lane 0's clock and every lane stops at its
// first edge that sees the synchronized level. Lane 0 therefore shifts once
// more than lanes 1..7, and the frozen contents are 128 consecutive samples,
// the newest in lane 0. The read port is combinational: read address 0 is the
// newest sample and 127 the oldest, so address p selects word p / NUM_LANES of
// lane (NUM_LANES - p % NUM_LANES) % NUM_LANES. Reading is meant to happen
// only while frozen, so the read clock domain sees static data.
//
// From the design: 128 words of 5 bits, one register column per ADC, shifting
// continuously, stopped by Hold, read from the first word to the 128th.
// This implementation's choices: the hold synchronizer and its clock, the
// address-to-word mapping, and reset of all words to zero.
module odo_shift_register
  import odo_pkg::*;
#(
  parameter int unsigned LANES  = NUM_LANES,
  parameter int unsigned DEPTH  = LANE_DEPTH,
  parameter int unsigned BITS   = ADC_BITS,
  parameter int unsigned AW     = ADDR_BITS
) (
  input  logic [LANES-1:0]           lane_clk,
  input  logic                       rst_n,
  input  logic                       hold,
  input  logic [LANES-1:0][BITS-1:0] din,
  input  logic [AW-1:0]              rd_addr,
  output logic [BITS-1:0]            rd_data,
  output logic                       frozen
);
  logic [1:0] hold_sync;
  logic [LANES-1:0][DEPTH-1:0][BITS-1:0] words;

  initial assert (LANES * DEPTH == (1 << AW))
    else $error("odo_shift_register: LANES*DEPTH must equal 2**AW");

  always_ff @(posedge lane_clk[0] or negedge rst_n)
    if (!rst_n) hold_sync <= '0;
    else        hold_sync <= {hold_sync[0], hold};

  assign frozen = hold_sync[1];

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    logic [DEPTH-1:0][BITS-1:0] column;   // column[0] is the newest word

    always_ff @(posedge lane_clk[k] or negedge rst_n)
      if (!rst_n)
        column <= '0;
      else if (!frozen)
        column <= {column[DEPTH-2:0], din[k]};

    assign words[k] = column;
  end

  // read address -> (lane, word)
  localparam int unsigned LW = $clog2(LANES);
  logic [LW-1:0] rd_lane, rd_phase;
  logic [AW-LW-1:0] rd_word;

  always_comb begin
    rd_phase = rd_addr[LW-1:0];
    rd_word  = rd_addr[AW-1:LW];
    rd_lane  = LW'(LANES) - rd_phase;   // wraps to 0 for phase 0
    rd_data  = words[rd_lane][rd_word];
  end
endmodule
