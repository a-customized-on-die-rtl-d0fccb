`timescale 1ns/1ps
// tb_flash_adc: one ADC lane with a 2 ns sampling clock and its latch clock
// half a period later. The input changes 0.5 ns after every sampling edge,
// through the whole range and beyond; half a period after each sampling edge
// the output must be floor((vin - 0.3 V) / 31.25 mV), limited to 0..31, of
// the value present at that sampling edge. A second change 0.5 ns after each
// latch edge makes a sample taken on the wrong edge visible.
module tb_flash_adc;
  real  vin = 0.9;
  logic inclk = 1'b0, rst_n = 1'b0;
  logic clk_latch;
  logic [4:0] dout;
  int checks = 0, failures = 0;

  flash_adc dut (.vin(vin), .inclk(inclk), .clk_latch(clk_latch), .rst_n(rst_n), .dout(dout));

  assign clk_latch = ~inclk;
  always #1 inclk = ~inclk;

  function automatic int ideal_code(real v);
    int c = int'($floor((v - 0.3) * 32.0));
    return (c < 0) ? 0 : (c > 31) ? 31 : c;
  endfunction

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    #3.2 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(posedge inclk);
      expected = ideal_code(vin);
      #0.5;
      vin = 0.2 + 1.2 * ($urandom_range(10000) / 10000.0);
      @(posedge clk_latch);
      #0.1;
      fork
        begin
          #0.4 vin = 0.2 + 1.2 * ($urandom_range(10000) / 10000.0);
        end
      join_none
      checks++;
      if (int'(dout) != expected) begin
        failures++;
        $display("FAIL dout=%0d expected=%0d", dout, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
