`timescale 1ns/1ps
// tb_flash_comparator_bank: steps the input through the middle of every ladder
// interval from below 0.3 V to above 1.3 V and checks, after each sampling
// edge, that the output is a thermometer code with
// floor((vin - 0.3 V) / 31.25 mV) comparators set (0..32), and that changing
// the input between edges does not change the output.
module tb_flash_comparator_bank;
  real vin = 0.0;
  logic inclk = 1'b0;
  logic [31:0] therm;
  int checks = 0, failures = 0;

  flash_comparator_bank dut (.vin(vin), .inclk(inclk), .therm(therm));

  always #1 inclk = ~inclk;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = -2; c <= 34; c++) begin
      int expect_n;
      logic [31:0] expect_t;
      @(negedge inclk);
      vin = 0.3 + (c + 0.5) * 0.03125;
      expect_n = (c < 0) ? 0 : (c > 32) ? 32 : c;
      expect_t = (expect_n == 32) ? '1 : 32'((64'(1) << expect_n) - 1);
      @(posedge inclk);
      #0.1;
      checks++;
      if (therm !== expect_t) begin
        failures++;
        $display("FAIL vin=%f therm=%b expected %0d ones", vin, therm, expect_n);
      end
      vin = 2.0;
      #0.5;
      checks++;
      if (therm !== expect_t) begin failures++; $display("FAIL output moved between edges"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
