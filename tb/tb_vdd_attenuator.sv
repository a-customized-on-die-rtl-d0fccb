`timescale 1ns/1ps
// tb_vdd_attenuator: the DC level of 3.8 V must map to 3.8 * 0.8 / 3.3 and any
// deviation from it must be scaled by 1 / 2.5.
module tb_vdd_attenuator;
  real vdd = 3.8, vdd_att;
  int checks = 0, failures = 0;

  vdd_attenuator dut (.vdd(vdd), .vdd_att(vdd_att));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vals[5] = '{3.8, 4.8, 3.3, 2.8, 4.25};
    foreach (vals[i]) begin
      real expected;
      vdd = vals[i];
      #1;
      expected = 3.04 / 3.3 + (vals[i] - 3.8) * 0.4;
      checks++;
      if (vdd_att > expected + 1e-9 || vdd_att < expected - 1e-9) begin
        failures++;
        $display("FAIL vdd=%f att=%f expected=%f", vdd, vdd_att, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
