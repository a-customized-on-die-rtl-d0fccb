`timescale 1ns/1ps
// tb_clk_monitor_mux: applies random clock-phase patterns and every select
// value and checks both observation outputs.
module tb_clk_monitor_mux;
  logic [7:0] clklatch;
  logic       inclk1;
  logic [2:0] sel;
  logic       clk_latch_out, mux_out;
  int checks = 0, failures = 0;

  clk_monitor_mux dut (.adc1_inclk(inclk1), .clklatch(clklatch), .sel(sel),
                       .clk_latch_out(clk_latch_out), .mux_out(mux_out));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      clklatch = 8'($urandom);
      inclk1   = 1'($urandom);
      sel      = 3'(i);
      #1;
      checks++;
      if (clk_latch_out !== ((clklatch >> (i % 8)) & 1) || mux_out !== inclk1) begin
        failures++;
        $display("FAIL sel=%0d clklatch=%b out=%b mux=%b", sel, clklatch, clk_latch_out, mux_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
