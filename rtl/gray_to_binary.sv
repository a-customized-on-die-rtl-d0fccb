`timescale 1ns/1ps
// gray_to_binary: converts the flash ADC's gray code to a binary code.
//
// The most significant bit is copied; every lower binary bit is the XOR of
// the binary bit above it and the gray bit at its own position, so the
// conversion is a ripple of BITS-1 XOR gates. Purely combinational.
// The block and its place after the gray encoder follow the design; the
// ripple structure is the standard one.
module gray_to_binary #(
  parameter int unsigned BITS = 5
) (
  input  logic [BITS-1:0] gray,
  output logic [BITS-1:0] bin
);
  always_comb begin
    bin[BITS-1] = gray[BITS-1];
    for (int i = int'(BITS) - 2; i >= 0; i--)
      bin[i] = bin[i+1] ^ gray[i];
  end
endmodule
