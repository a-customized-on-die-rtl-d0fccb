`timescale 1ns/1ps
// deskew_latch: re-times the converted ADC code on the lane's CLKLATCH clock.
//
// The gray encoder and gray-to-binary ripple settle at different times for
// different bits; capturing all bits together on one clock edge removes that
// skew so that the five output bits change at the same instant. It is a
// BITS-wide register loaded on every rising edge of clk_latch; the output
// therefore follows d with one clk_latch cycle of latency. The asynchronous
// active-low reset to zero is this implementation's choice.
module deskew_latch #(
  parameter int unsigned BITS = 5
) (
  input  logic            clk_latch,
  input  logic            rst_n,
  input  logic [BITS-1:0] d,
  output logic [BITS-1:0] q
);
  always_ff @(posedge clk_latch or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= d;
endmodule
