`timescale 1ns/1ps
// tb_dll_model: at a 1.608 ns reference (about 620 MHz) the DLL must lock, and
// then every inclk phase must rise one eighth of a period (201 ps) after the
// previous one, each clklatch[k] half a period after inclk[k], all at the
// reference period. The reference is then switched to 5 ns (200 MHz): the lock
// must drop, return, and the phase step become 625 ps.
module tb_dll_model;
  logic ref_clk = 1'b0, rst_n = 1'b0;
  logic [7:0] inclk, clklatch;
  logic locked;
  real half = 0.804;
  int checks = 0, failures = 0;
  realtime t_in[8], t_lat[8];

  dll_model dut (.ref_clk(ref_clk), .rst_n(rst_n), .inclk(inclk),
                 .clklatch(clklatch), .locked(locked));

  always #(half) ref_clk = ~ref_clk;

  for (genvar k = 0; k < 8; k++) begin : g_t
    always @(posedge inclk[k])    t_in[k]  = $realtime;
    always @(posedge clklatch[k]) t_lat[k] = $realtime;
  end

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.0015) && (b - a < 0.0015);
  endfunction

  // phase of time difference d within one period, in [0, period)
  function automatic real phase_of(realtime d, real period);
    real r = d - period * $floor(d / period);
    return (r > period - 0.0015) ? r - period : r;
  endfunction

  task automatic check_phases(real period);
    realtime t0;
    @(posedge inclk[0]);
    t0 = $realtime;
    #(2.0 * period);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (!near(phase_of(t_in[k] - t0, period), period * k / 8.0)) begin
        failures++;
        $display("FAIL inclk[%0d] phase %f ns, expected %f", k,
                 phase_of(t_in[k] - t0, period), period * k / 8.0);
      end
      checks++;
      if (!near(phase_of(t_lat[k] - t_in[k], period), period / 2.0)) begin
        failures++;
        $display("FAIL clklatch[%0d] lags inclk by %f ns", k, phase_of(t_lat[k] - t_in[k], period));
      end
    end
    @(posedge inclk[3]);
    t0 = $realtime;
    @(posedge inclk[3]);
    checks++;
    if (!near($realtime - t0, period)) begin failures++; $display("FAIL period %f", $realtime - t0); end
  endtask

  initial begin
    int lock_events = 0;
    #3 rst_n = 1'b1;
    wait (locked);
    lock_events++;
    repeat (2) @(posedge ref_clk);
    check_phases(1.608);
    // switch to 200 MHz
    @(posedge ref_clk);
    half = 2.5;
    repeat (2) @(posedge ref_clk);
    #0.1;
    checks++;
    if (locked) begin failures++; $display("FAIL lock kept across a frequency switch"); end
    wait (locked);
    lock_events++;
    repeat (2) @(posedge ref_clk);
    check_phases(5.0);
    checks++;
    if (lock_events != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
