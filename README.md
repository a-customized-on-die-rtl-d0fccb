# On-die oscilloscope for ESD supply noise

When an electrostatic discharge hits a product, the interesting waveform is the
noise it causes on a chip's supply, and measuring it with probes and cables
distorts it: the cables pick up the ESD gun's radiation and add their own
parasitics. This design moves the oscilloscope onto a small companion die that
sits on the same supply net. It samples the supply continuously at about
5 GS/s into a rolling 128-sample buffer. An ESD detector freezes the buffer the
moment the supply jumps. The frozen samples are then read out slowly (10 MHz,
one 5-bit word per cycle) and turned back into a voltage waveform off chip.

This repository holds SystemVerilog for the digital capture and readout logic.
The analog parts (the supply attenuator, the DLL, the comparator ladders and the
ESD detector) are behavioural models with real-valued signals. Together they
make a simulatable model of the whole instrument.

## Signal path

```
 VDD ──► vdd_attenuator ──VDD_ATT──► 8 x [flash_comparator_bank ─► flash_adc_digital] ──► odo_shift_register ──► out[4:0]
  │                                        ▲ INCLK1..8            ▲ CLKLATCH1..8          ▲ CLKLATCH1..8   ▲ read_addr
  │                                        └────────── dll_model ◄── ref_clk ─────────────┘                │
  └──► esd_detector ──► hold ───────────────────────────────────────► (freeze) ──────────► odo_binary_counter ◄── read_clk
```

| Stage | Module | Behaviour |
|---|---|---|
| Attenuator | `vdd_attenuator` (model) | DC level × 0.8/3.3, deviations × 1/2.5. 3.8 V maps to 0.921 V, 4.8 V to 1.32 V. |
| Clocking | `dll_model` (model) | 8 phases of the reference, T/8 apart: about 200 ps at 620 MHz, 625 ps at 200 MHz. |
| ADC lane | `flash_adc` (model) | One converter: `flash_comparator_bank` plus `flash_adc_digital`; eight instances. |
| Comparators | `flash_comparator_bank` (model) | 32 clocked comparators over 0.3–1.3 V in 31.25 mV steps, sampling on INCLK. |
| ADC digital block | `flash_adc_digital` = `therm_gray_encoder` → `gray_to_binary` → `deskew_latch` | Thermometer code to a 5-bit binary code, latched on CLKLATCH. |
| Capture register | `odo_shift_register` | 128 × 5 bits as 8 lanes × 16 words. Each lane shifts on its own CLKLATCH; the register freezes on Hold. |
| Trigger | `esd_detector` (model) | Hold goes high once VDD departs 0.89 V or more from 3.8 V, and stays high until reset. |
| Readout | `odo_binary_counter` | 7-bit address, one step per Read_CLK cycle after Hold; `a7` is its LSB. |
| Clock observation | `clk_monitor_mux` | `clk_latch` is the CLKLATCH phase picked by `clk_sel`; `mux_out` is ADC 1's sampling clock. |
| Top | `odo_top` | Wires the above together. Shared constants are in `odo_pkg`. |

## Eight lanes, one sample stream

The effective rate comes from time interleaving. Lane k (k = 0..7, ADC k+1 in
pin naming) samples VDD_ATT on the rising edge of INCLK k. That edge comes k/8
of a reference period after lane 0's edge. Reading the lanes in order 0,1,…,7,0,1,…
therefore gives a single stream with a step of T/8.

Each lane keeps its own 16-word column of the capture register, clocked by that
lane's CLKLATCH. So no word ever crosses from one clock phase to another while
shifting. Per lane the pipeline is:

1. The comparators sample on the INCLK k edge.
2. The encoder has half a period to settle.
3. The deskew latch captures on CLKLATCH k, which is INCLK k delayed by T/2.
4. On the same CLKLATCH edge, the register column takes the latch's previous
   word.

Every lane has the same latency, so the interleaved order is kept in the
register.

**Freezing consistently.** Hold is asynchronous, so it passes through a
two-flop synchronizer on lane 0's clock. The synchronized level reaches lanes
1..7 a fraction of a period before their next edges, and reaches lane 0 only
after its current edge. As a result, lane 0 shifts exactly once more than the
other lanes. The frozen contents are then 128 consecutive samples of the
stream, with the newest one in lane 0:

```
oldest ... L1(n-16) L2(n-16) … L7(n-16) L0(n-15) L1(n-15) … L7(n-1) L0(n)  newest
```

**Read address mapping.** Address 0 is the newest sample and address 127 the
oldest. Address p reads word ⌊p/8⌋ of lane (8 − p mod 8) mod 8. Address 0 is
the first register position, where data enter; address 127 is the last, where
data fall out.

**Capture window.** The newest stored sample was taken about 1.5 reference
periods before the freeze edge, and the freeze comes 1–2 periods after Hold.
The window therefore holds mostly the time before the trigger plus a few
nanoseconds after it. That is about 26 ns in total at 5 GS/s and 80 ns at
1.6 GS/s.

## Flash ADC encoding

- **Comparator thresholds.** The ladder divides 0.3–1.3 V into 32 steps of
  31.25 mV. Comparator i (i = 1..32) uses the threshold 0.3 V + i·31.25 mV.
  With a clean thermometer code, the count of comparators that fired is the
  result c = ⌊(V − 0.3 V)/31.25 mV⌋.
- **Over-range.** The 32nd comparator sits at VREFP. When it fires, the output
  is forced to full scale (31).
- **Gray encoder.** Gray bit b changes exactly where c is an odd multiple of
  2^b, so the encoder XORs the comparators at those thresholds. Bit 4 comes
  from comparator 16 alone; bit 0 is the XOR of all odd-numbered comparators.
  A single bubble in the thermometer code upsets at most one gray bit.
- **Gray to binary.** A plain XOR ripple converts the gray code to binary.
- **Deskew latch.** The binary code is re-timed on CLKLATCH, so all five bits
  change together.

## Trigger and readout

`odo_binary_counter` waits at address 0 until Hold arrives through a two-flop
synchronizer on Read_CLK. It then steps by one on every Read_CLK edge. A full
pass takes 128 cycles (12.8 µs at 10 MHz), then the counter wraps and the
readout repeats while Hold stays high.

`out` is driven combinationally from the frozen register at the current
address. Sample it in the second half of each Read_CLK cycle. `a7` toggles
every word, so it can serve as the trigger for an external instrument.

Pin bit order:

| Pins | Bits |
|---|---|
| OUT1..OUT5 | `out[4]`..`out[0]` (OUT1 is the MSB) |
| A1..A7 | `read_addr[6]`..`read_addr[0]` |

Reset (`rst_n`, active low) clears the following:

- Hold
- the capture register
- the counters
- the DLL lock

## Reconstructing the waveform

Read address p holds the sample taken p·T/8 before the newest one, where T is
the reference period. To convert a code c to a supply voltage:

```
V_att  = 0.3 V + (c + 0.5) · 31.25 mV         (mid-step)
V_DD   = 3.8 V + (V_att − 3.8 V · 0.8/3.3) · 2.5
```

- Codes 0 and 31 are clipped: the range ends near 2.3 V and 4.8 V on VDD.
- At 620 MHz, 128 samples span about 26 ns.
- With a 200 MHz reference the same register spans 80 ns at 1.6 GS/s.

## What is modelled, and the choices made here

**Synthesizable RTL.** These blocks are ordinary single-edge logic with
asynchronous active-low reset:

- `therm_gray_encoder`, `gray_to_binary`, `deskew_latch`, `flash_adc_digital`
- `odo_shift_register`, `odo_binary_counter`, `clk_monitor_mux`

`odo_shift_register` uses eight clocks, the eight DLL phases. It needs a
multi-clock timing setup.

**Behavioural models.** The following use `real` signals and delays. They
exist for simulation only:

| Model | Limitation |
|---|---|
| `dll_model` | Measures the reference period. After four stable periods it declares lock and launches the phases. It relocks after a frequency change. Its jitter and lock time say nothing about a real DLL. |
| `flash_comparator_bank` | Ideal comparators with no offset and no metastability. |
| `esd_detector` | Ideal threshold with no delay. A real detector reacts nanoseconds later, which moves the capture window later. |
| `vdd_attenuator` | Treats the DC level as a fixed 3.8 V rather than modelling the R-C divider's frequency response. |

`odo_top` instantiates the models, so the top level is itself a simulation
model.

**Not modelled:**

- the linear regulator that supplies the analog blocks
- the output pad buffers
- the "data alignment" stage after the ADC
- the VDDA observation pin, which belongs to the regulator

**Values that come from the design:**

- 8 lanes, 5 bits, 32 comparators, 0.3/1.3 V references
- a 128-word register with one column per ADC, frozen by Hold
- a 7-bit read counter with A7 as its LSB
- the attenuation ratios, the 0.89 V sensing level
- the 620 MHz / 200 MHz / 10 MHz clocks

**Choices made in this implementation:**

- the synchronizers
- CLKLATCH lagging INCLK by half a period
- the comparator tap assignment and over-range rule
- the XOR gray encoder
- newest-first addressing
- readout wrap-around
- OUT1 as MSB
- sticky Hold cleared by reset
- the DLL lock rule
- a single-ended reference clock

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that ends with a
`TB_RESULT checks=… failures=…` line. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/odo_pkg.sv tb/tb_odo_top.sv --top-module tb_odo_top -o sim
./obj_dir/sim
```

`tb_odo_top` runs the whole instrument at its default size. The steps are:

1. Make one capture with a 1.608 ns reference (about 620 MHz).
2. Reset and switch to a 5 ns reference (200 MHz).
3. Make a second capture.

In each capture, VDD carries a growing ringing that eventually trips the ESD
detector, and the testbench follows the 10 MHz readout. Independently of the
design, the testbench records the ideal 5-bit code of the attenuated supply at
every sampling edge. It requires the 128 words read out to match exactly one
run of 128 consecutive recorded samples, newest first, ending just before the
freeze.

It also counts each mechanism and fails if any never happens:

- DLL lock
- trigger
- freeze
- full readout
- address wrap
- full-scale code
- rate switch
- clock-monitor selection

The run takes about a second.

`tb_odo_tlp` applies the pulse test used to characterise the trigger. It puts
a 5 ns pulse on the 3.8 V supply:

- A 0.80 V pulse must leave Hold low, with the register still rolling.
- A 0.90 V pulse must freeze it.

The readout must then show the baseline code 19 together with the rising
edge and the plateau code 31 of the pulse.

The block testbenches check the following:

| Testbench | What it checks |
|---|---|
| `tb_therm_gray_encoder` | Every thermometer code, plus single bubbles. |
| `tb_gray_to_binary` | Every gray code. |
| `tb_flash_adc_digital` | Codes and latency. |
| `tb_flash_adc` | Random inputs across and beyond the range, sampled on INCLK and output on CLKLATCH. |
| `tb_odo_shift_register` | Freeze timing (second lane-0 edge after Hold), 128 consecutive words newest first, contents stable after the freeze. |
| `tb_odo_binary_counter` | Synchronizer latency, one step per cycle, 128-cycle pass, wrap, A7. |
| `tb_dll_model` | Phase spacing T/8, CLKLATCH lag T/2, and relock at 200 MHz. |
| `tb_flash_comparator_bank`, `tb_esd_detector`, `tb_vdd_attenuator`, `tb_clk_monitor_mux` | Their transfer functions. |

The testbench of the whole design uses a 100 fs time precision and changes VDD
half a picosecond away from the clock grid. No sample then coincides with a
change of the input. Keep that in mind when changing the reference periods:
they should be whole picoseconds, divisible by 8.
