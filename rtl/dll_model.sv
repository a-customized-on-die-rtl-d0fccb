`timescale 1ns/1ps
// dll_model: behavioural model of the delay locked loop (not synthesizable).
//
// The DLL turns the external reference clock into PHASES clock phases of the
// same frequency, spaced by one PHASES-th of the reference period: at 620 MHz
// the step is about 200 ps, so eight ADCs clocked by the eight phases sample at
// about 5 GS/s. Each ADC lane k receives two of them: inclk[k], which clocks the
// lane's comparators, and clklatch[k], which clocks its deskew latch and its
// capture register column.
//
// The model measures the reference period between rising edges. After
// LOCK_CYCLES consecutive periods that agree within LOCK_TOL, `locked` rises
// and from then on every reference rising edge launches, for each k, a pulse
// of half a period on inclk[k] after k/PHASES of the period, and one on
// clklatch[k] after (k + LATCH_SHIFT)/PHASES of the period. A change of the
// reference frequency drops the lock until the period is stable again, so the
// model follows a switch between, for example, 620 MHz and 200 MHz.
//
// From the design: eight phases, one eighth of the reference period apart, at
// the reference frequency. This model's choices: the lock criterion, the 50 %
// duty cycle, and CLKLATCH lagging INCLK by half a period (LATCH_SHIFT = 4),
// which gives the encoder half a sampling period to settle before the latch.
module dll_model #(
  parameter int unsigned PHASES      = 8,
  parameter int unsigned LATCH_SHIFT = PHASES / 2,
  parameter int unsigned LOCK_CYCLES = 4,
  parameter real         LOCK_TOL    = 0.01
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  output logic [PHASES-1:0] inclk,
  output logic [PHASES-1:0] clklatch,
  output logic              locked
);
  realtime     t_prev;
  realtime     period;
  bit          seen;
  int unsigned stable;

  initial begin
    inclk    = '0;
    clklatch = '0;
    locked   = 1'b0;
    period   = 0.0;
    t_prev   = 0.0;
    seen     = 1'b0;
    stable   = 0;
  end

  // period measurement and lock detection
  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      seen   <= 1'b0;
      stable <= 0;
      locked <= 1'b0;
      period <= 0.0;
    end else begin
      if (seen) begin
        if (period > 0.0 &&
            ($realtime - t_prev) < period * (1.0 + LOCK_TOL) &&
            ($realtime - t_prev) > period * (1.0 - LOCK_TOL)) begin
          if (stable < LOCK_CYCLES) stable <= stable + 1;
          locked <= (stable + 1 >= LOCK_CYCLES);
        end else begin
          stable <= 0;
          locked <= 1'b0;
        end
        period <= $realtime - t_prev;
      end
      seen   <= 1'b1;
      t_prev <= $realtime;
    end
  end

  // phase generation: one forked pulse per phase per reference edge
  for (genvar k = 0; k < PHASES; k++) begin : g_phase
    always @(posedge ref_clk) begin
      if (locked) begin
        fork
          begin
            #(period * k / PHASES) inclk[k] <= 1'b1;
            #(period / 2.0)        inclk[k] <= 1'b0;
          end
          begin
            #(period * (k + LATCH_SHIFT) / PHASES) clklatch[k] <= 1'b1;
            #(period / 2.0)                        clklatch[k] <= 1'b0;
          end
        join_none
      end
    end
  end
endmodule
