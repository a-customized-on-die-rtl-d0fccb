`timescale 1ns/100fs
// tb_odo_tlp: transmission-line-pulse workload on the complete oscilloscope.
//
// With a 1.608 ns reference (about 620 MHz), a 5 ns pulse with 0.5 ns edges is
// put on top of the 3.8 V supply. A pulse of 0.80 V must not trip the ESD
// detector: Hold stays low and the capture register keeps rolling. A pulse of
// 0.90 V (above the 0.89 V sensing level) must trip it. The frozen register is
// then read out at 10 MHz and must equal 128 consecutive ideal samples of the
// attenuated supply, newest first, holding both the quiet baseline (3.8 V,
// code 19) and the pulse plateau (4.7 V, code 31).
module tb_odo_tlp;
  import odo_pkg::*;

  real vdd = 3.8;
  logic ref_clk = 1'b0, read_clk = 1'b0, rst_n = 1'b0;
  logic [2:0] clk_sel = 3'd0;
  logic hold, a7, mux_out, clk_latch;
  logic [ADDR_BITS-1:0] read_addr;
  logic [ADC_BITS-1:0]  out;

  odo_top dut (.vdd(vdd), .ref_clk(ref_clk), .read_clk(read_clk), .rst_n(rst_n),
               .clk_sel(clk_sel), .hold(hold), .a7(a7), .read_addr(read_addr),
               .out(out), .mux_out(mux_out), .clk_latch(clk_latch));

  int checks = 0, failures = 0;

  always #0.804 ref_clk = ~ref_clk;
  always #50 read_clk = ~read_clk;

  // trapezoidal pulse: 0.5 ns rise, 5 ns wide, 0.5 ns fall
  real amp = 0.0, t0 = -1.0;
  initial begin
    real dt;
    #0.0005;
    forever begin
      dt = $realtime - t0;
      if (t0 < 0.0 || dt < 0.0 || dt > 6.0) vdd = 3.8;
      else if (dt < 0.5)                    vdd = 3.8 + amp * dt / 0.5;
      else if (dt < 5.5)                    vdd = 3.8 + amp;
      else                                  vdd = 3.8 + amp * (6.0 - dt) / 0.5;
      #0.01;
    end
  end

  function automatic int ideal_code(real v);
    real att = 3.8 * 0.8 / 3.3 + (v - 3.8) / 2.5;
    int  c = int'($floor((att - 0.3) * 32.0));
    return (c < 0) ? 0 : (c > 31) ? 31 : c;
  endfunction

  int hist[$];
  bit recording = 1'b0;
  for (genvar k = 0; k < NUM_LANES; k++) begin : g_rec
    always @(posedge dut.inclk[k])
      if (recording) hist.push_back(ideal_code(vdd));
  end

  initial begin
    #60000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words[128];
    int n_match, n_base, n_top, first_one;
    bit counting;
    #20 rst_n = 1'b1;
    wait (dut.dll_locked);
    recording = 1'b1;
    #100;
    // pulse below the sensing level
    amp = 0.80; t0 = $realtime;
    #200;
    checks++;
    if (hold || dut.frozen) begin failures++; $display("FAIL 0.80 V pulse tripped the detector"); end
    // pulse above the sensing level
    amp = 0.90; t0 = $realtime;
    #20;
    checks++;
    if (!hold) begin failures++; $display("FAIL 0.90 V pulse not detected"); end
    counting = 1'b0; first_one = -1;
    for (int i = 0; i < 200; i++) begin
      @(negedge read_clk);
      if (!counting && read_addr == 7'd1) begin
        counting = 1'b1; first_one = i; recording = 1'b0;
      end
      if (counting) begin
        words[read_addr] = int'(out);
        if (i == first_one + 128) break;
      end
    end
    checks++;
    if (!counting) begin failures++; $display("FAIL no readout"); end
    n_match = 0;
    for (int o = 0; o + 128 <= hist.size(); o++) begin
      bit ok;
      ok = 1'b1;
      for (int p = 0; p < 128 && ok; p++)
        if (words[p] != hist[hist.size() - 1 - o - p]) ok = 1'b0;
      if (ok) n_match++;
    end
    checks++;
    if (n_match != 1) begin failures++; $display("FAIL readout matches the record at %0d offsets", n_match); end
    n_base = 0; n_top = 0;
    foreach (words[p]) begin
      if (words[p] == 19) n_base++;
      if (words[p] == 31) n_top++;
    end
    $display("TLP capture: %0d baseline words, %0d plateau words", n_base, n_top);
    checks++;
    if (n_base == 0 || n_top == 0) begin failures++; $display("FAIL pulse edge not in the window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
