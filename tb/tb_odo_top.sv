`timescale 1ns/100fs
// tb_odo_top: end-to-end run of the on-die oscilloscope at its default size.
//
// Two captures are made, one with a 1.608 ns reference clock (about 620 MHz,
// 5 GS/s) and one, after a reset, with a 5 ns reference (200 MHz, 1.6 GS/s).
// In each, VDD carries a growing sinusoidal ringing around 3.8 V until the ESD
// detector trips; the testbench then follows the 10 MHz readout on out /
// read_addr / a7. Independently of the design, the testbench records for every
// rising edge of each ADC sampling clock the code that an ideal 5-bit
// converter gives for the attenuated VDD at that instant (DC gain 0.8/3.3, AC
// gain 1/2.5, 0.3 V to 1.3 V in 32 steps). The 128 words read out must equal
// 128 consecutive entries of that record, newest first, ending within a few
// sampling periods of the freeze. VDD is updated on a grid offset by half a
// picosecond from the clock edges so that no sample coincides with a change.
//
// Mechanisms counted (each must occur): DLL lock, ESD trigger, register
// freeze, complete 128-word readout, address wrap, full-scale ADC code in a
// capture, sampling-rate switch, clock-monitor selection.
module tb_odo_top;
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
  int n_lock = 0, n_trigger = 0, n_freeze = 0, n_readout = 0, n_wrap = 0;
  int n_fullscale = 0, n_rate_switch = 0, n_clk_sel = 0;

  // ---------------- stimulus: clocks and VDD waveform ----------------
  real ref_half = 0.804;
  always #(ref_half) ref_clk = ~ref_clk;
  always #50 read_clk = ~read_clk;          // 10 MHz Read_CLK

  bit  noise_on = 1'b0;
  real t_start = 0.0, ramp = 0.0, f_ghz = 0.0;

  initial begin
    real a;
    #0.0005;
    forever begin
      if (noise_on) begin
        a = ramp * ($realtime - t_start);
        if (a > 1.0) a = 1.0;
        vdd = 3.8 + a * $sin(6.283185307179586 * f_ghz * ($realtime - t_start));
      end else
        vdd = 3.8;
      #0.01;
    end
  end

  // ---------------- independent reference record ----------------
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

  int freeze_idx;
  always @(posedge dut.frozen) begin
    freeze_idx = hist.size();
    n_freeze++;
  end
  always @(posedge dut.dll_locked) n_lock++;
  always @(posedge hold) n_trigger++;

  // ---------------- watchdog ----------------
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real phase_of(realtime d, real period);
    real r = d - period * $floor(d / period);
    return (r > period - 0.002) ? r - period : r;
  endfunction

  task automatic check_clock_monitor(real period);
    realtime t_ref, t_lat;
    real want;
    for (int s = 0; s < 8; s += 3) begin
      clk_sel = 3'(s);
      @(posedge mux_out);
      t_ref = $realtime;
      @(posedge clk_latch);
      t_lat = $realtime;
      want = period * ((s + 4) % 8) / 8.0;
      checks++;
      if (phase_of(t_lat - t_ref, period) > want + 0.002 ||
          phase_of(t_lat - t_ref, period) < want - 0.002) begin
        failures++;
        $display("FAIL clk_sel=%0d: CLK_LATCH lags MUX_OUT by %f ns, expected %f", s,
                 phase_of(t_lat - t_ref, period), want);
      end else n_clk_sel++;
    end
    clk_sel = 3'd0;
  endtask

  task automatic capture(real half, real ramp_per_ns, real f, string name);
    int words[128];
    int prev_addr, cycles, first_one, n_match, best;
    bit counting;
    ref_half = half;
    rst_n = 1'b0;
    noise_on = 1'b0;
    recording = 1'b0;
    hist.delete();
    #20;
    rst_n = 1'b1;
    wait (dut.dll_locked);
    $display("%t %s: locked", $realtime, name);
    check_clock_monitor(2.0 * half);
    recording = 1'b1;
    #(2.0 * half * 40.0);                  // fill the register with quiet samples
    ramp = ramp_per_ns; f_ghz = f; t_start = $realtime;
    noise_on = 1'b1;
    wait (hold);
    $display("%t %s: hold", $realtime, name);
    #(2.0 * half * 10.0);
    noise_on = 1'b0;
    // follow the readout at the middle of each Read_CLK cycle
    counting = 1'b0; prev_addr = 0; cycles = 0; first_one = -1;
    for (int i = 0; i < 300; i++) begin
      @(negedge read_clk);
      checks++;
      if (a7 !== read_addr[0]) begin failures++; $display("FAIL a7 is not the address LSB"); end
      if (!counting && read_addr == 7'd1) begin
        counting = 1'b1;
        first_one = i;
        recording = 1'b0;
      end
      if (counting) begin
        if (i != first_one) begin
          checks++;
          if (int'(read_addr) != (prev_addr + 1) % 128) begin
            failures++;
            $display("FAIL %s: address %0d follows %0d", name, read_addr, prev_addr);
          end
          if (read_addr == 7'd0) n_wrap++;
        end
        words[read_addr] = int'(out);
        prev_addr = int'(read_addr);
        if (i == first_one + 128) begin
          checks++;
          if (read_addr != 7'd1) begin failures++; $display("FAIL readout is not 128 cycles"); end
          break;
        end
      end
    end
    // address 0 was on the pins before counting started; take it from the wrap
    checks++;
    if (!counting) begin
      failures++;
      $display("FAIL %s: readout never started", name);
    end else n_readout++;
    // the 128 words must be 128 consecutive ideal samples, newest first
    n_match = 0; best = -1;
    for (int o = 0; o + 128 <= hist.size(); o++) begin
      bit ok;
      ok = 1'b1;
      for (int p = 0; p < 128 && ok; p++)
        if (words[p] != hist[hist.size() - 1 - o - p]) ok = 1'b0;
      if (ok) begin n_match++; if (best < 0) best = o; end
    end
    checks++;
    if (n_match != 1) begin
      failures++;
      $display("FAIL %s: readout matches the reference record at %0d offsets", name, n_match);
      for (int p = 0; p < 8; p++) $display("  word %0d = %0d", p, words[p]);
    end else begin
      int newest = hist.size() - 1 - best;
      checks++;
      if (newest > freeze_idx || newest < freeze_idx - 32) begin
        failures++;
        $display("FAIL %s: newest word is sample %0d, freeze at %0d", name, newest, freeze_idx);
      end
      $display("%s: 128 words match samples %0d..%0d (freeze seen at %0d)", name,
               newest - 127, newest, freeze_idx);
    end
    foreach (words[p]) if (words[p] == 31) begin n_fullscale++; break; end
  endtask

  initial begin
    capture(0.804, 1.0 / 30.0, 0.37, "620 MHz");
    n_rate_switch++;
    capture(2.5, 1.0 / 90.0, 0.11, "200 MHz");

    $display("mechanisms: lock=%0d trigger=%0d freeze=%0d readout=%0d wrap=%0d fullscale=%0d rate_switch=%0d clk_sel=%0d",
             n_lock, n_trigger, n_freeze, n_readout, n_wrap, n_fullscale, n_rate_switch, n_clk_sel);
    checks++; if (n_lock < 2)        begin failures++; $display("FAIL no DLL lock"); end
    checks++; if (n_trigger < 2)     begin failures++; $display("FAIL no ESD trigger"); end
    checks++; if (n_freeze < 2)      begin failures++; $display("FAIL no freeze"); end
    checks++; if (n_readout < 2)     begin failures++; $display("FAIL no readout"); end
    checks++; if (n_wrap < 2)        begin failures++; $display("FAIL no address wrap"); end
    checks++; if (n_fullscale < 1)   begin failures++; $display("FAIL no full-scale code"); end
    checks++; if (n_rate_switch < 1) begin failures++; $display("FAIL no rate switch"); end
    checks++; if (n_clk_sel < 2)     begin failures++; $display("FAIL no clock selection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
