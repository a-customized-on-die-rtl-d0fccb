`timescale 1ns/1ps
// tb_flash_adc_digital: drives random thermometer codes into the ADC digital
// block and checks that, one clk_latch edge later, the output is the number of
// tripped comparators (limited to 31), and that it holds between edges.
module tb_flash_adc_digital;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] therm = '0;
  logic [4:0]  dout;
  int checks = 0, failures = 0;

  flash_adc_digital dut (.clk_latch(clk), .rst_n(rst_n), .therm(therm), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev = 0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      int c;
      @(negedge clk);
      c = (i < 33) ? i : int'($urandom_range(32));
      therm = (c == 32) ? '1 : 32'((64'(1) << c) - 1);
      #1;
      checks++;
      if (dout !== 5'(prev)) begin
        failures++;
        $display("FAIL output changed before the latch edge: %0d vs %0d", dout, prev);
      end
      @(posedge clk);
      #1;
      prev = (c > 31) ? 31 : c;
      checks++;
      if (dout !== 5'(prev)) begin
        failures++;
        $display("FAIL count=%0d dout=%0d", c, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
