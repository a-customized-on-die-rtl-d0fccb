`timescale 1ns/1ps
// odo_binary_counter: read address counter of the capture register.
//
// While Hold is low the counter is held at address 0. Once Hold (coming from
// the ESD detector, asynchronous to Read_CLK) has passed a two-flop
// synchronizer, the counter advances by one on every rising edge of read_clk,
// so one 5-bit word is presented per Read_CLK cycle and all 128 words take 128
// cycles. After address 127 it wraps to 0 and the readout repeats for as long
// as Hold stays high. a7 is the least significant address bit, brought out to
// trigger an external instrument.
// From the design: the 7-bit width, counting on the external read clock after
// Hold, one word per cycle, A7 as LSB. This implementation's choices: the
// synchronizer, hold-at-zero while idle, wrap-around, and the active-low
// asynchronous reset.
module odo_binary_counter
  import odo_pkg::*;
#(
  parameter int unsigned WIDTH = ADDR_BITS
) (
  input  logic             read_clk,
  input  logic             rst_n,
  input  logic             hold,
  output logic [WIDTH-1:0] addr,
  output logic             a7,
  output logic             reading
);
  logic [1:0] hold_sync;

  always_ff @(posedge read_clk or negedge rst_n)
    if (!rst_n) hold_sync <= '0;
    else        hold_sync <= {hold_sync[0], hold};

  assign reading = hold_sync[1];

  always_ff @(posedge read_clk or negedge rst_n)
    if (!rst_n)        addr <= '0;
    else if (!reading) addr <= '0;
    else               addr <= addr + 1'b1;

  assign a7 = addr[0];
endmodule
