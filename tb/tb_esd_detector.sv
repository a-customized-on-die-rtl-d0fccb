`timescale 1ns/1ps
// tb_esd_detector: Hold must stay low for noise below 0.89 V on a 3.8 V supply,
// go high for an overshoot or undershoot of 0.89 V or more, stay high after
// the noise has gone, and clear only with reset.
module tb_esd_detector;
  real vdd = 3.8;
  logic rst_n = 1'b0, hold;
  int checks = 0, failures = 0;

  esd_detector dut (.vdd(vdd), .rst_n(rst_n), .hold(hold));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(real v, logic exp_hold, string what);
    vdd = v;
    #1;
    checks++;
    if (hold !== exp_hold) begin
      failures++;
      $display("FAIL %s: vdd=%f hold=%b expected %b", what, v, hold, exp_hold);
    end
  endtask

  initial begin
    #1 rst_n = 1'b1;
    apply(3.8,  1'b0, "nominal");
    apply(4.5,  1'b0, "small overshoot");
    apply(4.68, 1'b0, "just below sensing level");
    apply(3.0,  1'b0, "small undershoot");
    apply(4.70, 1'b1, "overshoot");
    apply(3.8,  1'b1, "sticky");
    apply(4.0,  1'b1, "sticky");
    rst_n = 1'b0; #1;
    rst_n = 1'b1;
    apply(3.8,  1'b0, "after reset");
    apply(2.85, 1'b1, "undershoot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
