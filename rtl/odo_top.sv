`timescale 1ns/1ps
// odo_top: on-die oscilloscope that records the noise waveform on a chip's
// supply VDD around an ESD event.
//
// Capture: VDD is scaled into the ADC range by the R-C attenuator (VDD_ATT).
// A DLL derives eight phases of the reference clock, one eighth of a period
// apart, and each phase clocks one 5-bit flash ADC lane (comparator bank,
// gray encoder, gray-to-binary converter, deskew latch). The eight lanes
// together sample VDD_ATT eight times per reference period (about 5 GS/s at
// 620 MHz, 1.6 GS/s at 200 MHz) and shift their codes into the 128-word
// capture register, which therefore always holds the most recent 128 samples
// (about 26 ns at 5 GS/s, 80 ns at 1.6 GS/s).
//
// Freeze and readout: when the ESD detector sees VDD depart from its nominal
// level, Hold rises and stays high until reset. The capture register stops
// shifting, and the binary counter then steps through the 128 words, one per
// read_clk cycle (10 MHz in the intended use). out shows the addressed word
// (OUT1 = out[4], the MSB, to OUT5 = out[0]); address 0 is the newest sample,
// address 127 the oldest. a7, the counter's least significant bit, marks each
// word for an external instrument; read_addr carries the whole address.
//
// Clock observation: clk_latch shows the CLKLATCH phase chosen by clk_sel
// (0 = CLKLATCH1), mux_out shows the first ADC's sampling clock.
//
// The linear regulator that supplies the analog blocks and the pad buffers
// are not modelled. The analog parts (attenuator, ESD detector, DLL,
// comparators) are behavioural models with real-valued signals, so this top
// level is for simulation; the digital blocks beneath it are synthesizable.
// Block structure, lane count, sizes and pin functions follow the design;
// reset, synchronizers, read address order and the OUT bit order are this
// implementation's choices.
module odo_top
  import odo_pkg::*;
(
  input  real                  vdd,
  input  logic                 ref_clk,
  input  logic                 read_clk,
  input  logic                 rst_n,
  input  logic [2:0]           clk_sel,
  output logic                 hold,
  output logic                 a7,
  output logic [ADDR_BITS-1:0] read_addr,
  output logic [ADC_BITS-1:0]  out,
  output logic                 mux_out,
  output logic                 clk_latch
);
  real                                vdd_att;
  logic [NUM_LANES-1:0]               inclk, clklatch;
  logic                               dll_locked;
  logic [NUM_LANES-1:0][ADC_BITS-1:0] adc_code;
  logic                               frozen, reading;

  vdd_attenuator u_att (.vdd(vdd), .vdd_att(vdd_att));

  esd_detector u_esd (.vdd(vdd), .rst_n(rst_n), .hold(hold));

  dll_model #(.PHASES(NUM_LANES)) u_dll (
    .ref_clk(ref_clk), .rst_n(rst_n),
    .inclk(inclk), .clklatch(clklatch), .locked(dll_locked));

  for (genvar k = 0; k < NUM_LANES; k++) begin : g_adc
    flash_adc u_adc (
      .vin(vdd_att), .inclk(inclk[k]), .clk_latch(clklatch[k]), .rst_n(rst_n),
      .dout(adc_code[k]));
  end

  odo_shift_register u_sreg (
    .lane_clk(clklatch), .rst_n(rst_n), .hold(hold),
    .din(adc_code), .rd_addr(read_addr), .rd_data(out), .frozen(frozen));

  odo_binary_counter u_cnt (
    .read_clk(read_clk), .rst_n(rst_n), .hold(hold),
    .addr(read_addr), .a7(a7), .reading(reading));

  clk_monitor_mux u_mon (
    .adc1_inclk(inclk[0]), .clklatch(clklatch), .sel(clk_sel),
    .clk_latch_out(clk_latch), .mux_out(mux_out));
endmodule
