`timescale 1ns/1ps
// tb_gray_to_binary: converts all 32 five-bit gray codes and compares each with
// the binary value the code was generated from.
module tb_gray_to_binary;
  logic [4:0] gray, bin;
  int checks = 0, failures = 0;

  gray_to_binary #(.BITS(5)) dut (.gray(gray), .bin(bin));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      gray = 5'(i ^ (i >> 1));
      #1;
      checks++;
      if (bin !== 5'(i)) begin
        failures++;
        $display("FAIL gray=%b bin=%b expected=%0d", gray, bin, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
