`timescale 1ns/1ps
// tb_therm_gray_encoder: applies every clean thermometer code (0..32 comparators
// tripped) and a set of single-bubble codes to the 32-input gray encoder and
// compares with c ^ (c >> 1), c being the tripped count limited to 31.
module tb_therm_gray_encoder;
  logic [31:0] therm;
  logic [4:0]  gray;
  int checks = 0, failures = 0;

  therm_gray_encoder #(.BITS(5), .NUM_COMP(32)) dut (.therm(therm), .gray(gray));

  function automatic logic [4:0] ref_gray(int c);
    int cl = (c > 31) ? 31 : c;
    return 5'(cl ^ (cl >> 1));
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= 32; c++) begin
      therm = (c == 32) ? '1 : 32'((64'(1) << c) - 1);
      #1;
      checks++;
      if (gray !== ref_gray(c)) begin
        failures++;
        $display("FAIL count=%0d gray=%b expected=%b", c, gray, ref_gray(c));
      end
    end
    // a bubble below the top of the code disturbs at most one gray bit
    for (int c = 3; c < 31; c++) begin
      therm = 32'((64'(1) << c) - 1);
      therm[c-2] = 1'b0;
      #1;
      checks++;
      if ($countones(gray ^ ref_gray(c)) > 1) begin
        failures++;
        $display("FAIL bubble count=%0d gray=%b expected near %b", c, gray, ref_gray(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
