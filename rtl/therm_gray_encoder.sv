`timescale 1ns/1ps
// therm_gray_encoder: thermometer code of a flash ADC's comparator row to a
// gray code.
//
// therm[i] is the output of comparator i+1, counted from the lowest reference.
// With a clean thermometer code the number of comparators that tripped is the
// conversion result c, and gray bit b of c toggles exactly at the values
// c = 2^b * (2m+1). Each gray bit is therefore the XOR of the comparators at
// those thresholds (the top bit is a single comparator), which is how a flash
// ADC's gray encoder is usually wired: an isolated bubble disturbs only one
// gray bit. The top comparator (reference VREFP) marks over-range; when it is
// set the output is forced to the gray code of full scale.
//
// Purely combinational. Interface: therm[NUM_COMP-1:0] in, gray[BITS-1:0] out.
// The comparator count and width follow the design (32 comparators, 5 bits);
// the XOR wiring and the over-range rule are this implementation's choices.
module therm_gray_encoder #(
  parameter int unsigned BITS     = 5,
  parameter int unsigned NUM_COMP = 32
) (
  input  logic [NUM_COMP-1:0] therm,
  output logic [BITS-1:0]     gray
);
  localparam int unsigned FULL = (1 << BITS) - 1;

  initial assert (NUM_COMP == (1 << BITS))
    else $error("therm_gray_encoder: NUM_COMP must be 2**BITS");

  always_comb begin
    gray = '0;
    for (int unsigned b = 0; b < BITS; b++) begin
      for (int unsigned c = 1; c <= FULL; c++) begin
        // threshold c toggles gray bit b when c is an odd multiple of 2^b
        if (((c >> b) & 1) == 1 && (c & ((1 << b) - 1)) == 0)
          gray[b] = gray[b] ^ therm[c-1];
      end
    end
    if (therm[NUM_COMP-1])
      gray = BITS'(FULL ^ (FULL >> 1));
  end
endmodule
