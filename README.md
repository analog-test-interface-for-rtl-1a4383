# Split-SAR analog test interface for IEEE 1687

Analog embedded instruments (temperature sensors, current monitors, voltage monitors) need an
ADC before an IEEE 1687 (IJTAG) network can read them. Routing their analog outputs over an
analog test bus to one central ADC is costly: long sensitive wires, settling time, kick-back
between instruments. Giving every instrument a full ADC costs area, mostly in the DAC.

This design splits a successive-approximation (SAR) ADC in two:

* **In each instrument:** the sample-and-hold (S/H) and the comparator stay next to the analog
  front-end. The monitored voltage never leaves the instrument. The instrument receives one
  analog voltage, the DAC output, and returns one digital bit, the comparator decision.
* **Shared by all instruments:** the SAR logic and one 8-bit capacitor DAC. A multiplexer
  connects them to the selected instrument.

The SAR logic's resolution can be set for each conversion, from 1 to 8 bits. The selected
comparator's output is also the result as a serial bit stream, so a monitoring client can
follow the conversions on one extra wire. That wire runs at the conversion clock and needs no
scan access per sample. The IEEE 1687 side consists of ordinary test data registers (TDRs):

* one register per instrument holds its configuration;
* one shared reconfiguration TDR (RTDR) holds the instrument select SEL and the resolution RES.

```
                 IEEE 1687 segment (TCK)                          conversion clock (CLK)
 scan_in -> [EI 0 TDR] -> [EI 1 TDR] -> [RTDR: RES,SEL] -> scan_out
               |ei_cfg[0]    |ei_cfg[1]     | sel,res,upd_toggle
               v             v              v
         (front-ends)               [sar_en_gen] --sar_en, sel, res--+
                                                                      |
   v_afe[0] -> [analog_ei 0: S/H + comparator] --com--+               v
   v_afe[1] -> [analog_ei 1: S/H + comparator] --com--+--[ei_mux]--com_serial--> [sar_logic]
                      ^ sample/comp_en (selected EI only) <-- sample, comp_en ----|
                      ^ v_dac <------------------------ [cap_dac] <-- dac_code ---|
                                                                     dout, eoc ---+
```

## One conversion, clock by clock

`sar_logic` runs the state sequence `SAR_RESET -> SAR_SAMPLE -> SAR_BITCYCLE -> SAR_EOC`, then
returns to `SAR_SAMPLE`. Each state lasts whole CLK cycles. Let N_EI = RES + 1 be the selected
resolution.

| clock | state | `sample` | DAC code | `com_serial` |
|---|---|---|---|---|
| 0 | SAMPLE | 1 | 0 | 0 |
| 1 … N_EI | BITCYCLE, bit k = 0 … N_EI-1 | 0 | bits decided so far, plus a trial 1 at bit 7-k | decision for bit k (MSB first) |
| N_EI + 1 | EOC | 0 | final code (the DAC output has converged) | 0 |

* **Sampling.** The selected instrument's S/H follows its input while `sample` is high. It
  holds the voltage from the falling edge of `sample`, which is the clock edge that ends the
  SAMPLE state.
* **Bit cycling.** In each bit-cycling clock the comparator compares the held voltage with the
  DAC output. `com = 1` means the held voltage is higher, so the trial bit is kept. The
  decision is registered at the clock edge that ends that cycle.
* **Resolution.** Only the N_EI most significant DAC bits are tried. A 5-bit conversion
  therefore uses DAC steps of 0.8 V / 32 = 25 mV.
* **Result.** `dout` is the N_EI-bit result, right-aligned, so one LSB is VREF / 2^N_EI. It is
  written at the edge that enters EOC. It stays valid from the rising edge of `eoc` until the
  next EOC.
* **Period and rate.** A conversion takes N_EI + 2 clocks. At the reference clock of 50 kHz and
  5 bits, that is a 140 µs period, or a sample rate of 7.14 kHz. At 8 bits the period is
  200 µs. A result becomes available one conversion period after its sample.
* **Serial stream.** The comparator is held at 0 outside bit cycling. So `com_serial` carries
  N_EI + 2 bits per conversion: a 0, the result MSB first, and another 0. The result bits equal
  `dout` bit for bit. (With a comparator of the opposite polarity they would be its
  complement.) No parallel-to-serial converter is needed.

The quantisation rule follows from the strict `>` in the comparator. The result is the largest
code c below 2^N_EI for which c · VREF / 2^N_EI is below the held voltage. The testbenches
compute the expected codes with this rule.

## Switching instruments: RTDR, SAR_EN and the two clocks

Writing the RTDR selects another instrument and resolution in a single scan access. The other
TDRs need no rewrite: they hold one-time configuration.

**RTDR layout.** The register is `{RES, SEL}`, with SEL nearest `scan_out`. With the default
two instruments, SEL is 1 bit and RES is 3 bits. RES holds N_EI − 1, so every code is legal
(`3'd7` = 8 bits, `3'd4` = 5 bits). After reset the RTDR selects EI 0 at 8 bits.

**The daisy chain.** One segment select covers the whole chain:
`scan_in -> EI 0 TDR -> … -> EI NUM-1 TDR -> RTDR -> scan_out`. At the defaults that is
2 × 8 + 4 = 20 bits. Shift the vector `{cfg0, cfg1, RES, SEL}` LSB first. A Capture-DR before
the shift returns the current contents in the same layout.

**Every TDR (`ijtag_tdr`)** has two stages:

* a shift stage, which captures and shifts on rising TCK;
* an update stage, which loads on the falling TCK edge of Update-DR and is reset
  asynchronously by `ijtag.reset`.

The update stage drives the register's outputs, so they do not move while data is shifted.

**Crossing into the conversion clock.** The RTDR outputs change in the TCK domain, while the
SAR logic runs on CLK, a different clock. Each RTDR update toggles `upd_toggle`. `sar_en_gen`
synchronises the toggle with two flops and detects its edge. It then holds `sar_en` low for
exactly two CLK cycles and copies SEL and RES into CLK-domain registers during those cycles.
SEL and RES have been stable since the update.

`sar_en` is registered, so the SAR logic spends the two clocks after it falls in
`SAR_RESET`. That clears the SAR register and `dout` and aborts any conversion in progress.
The sample of the newly selected instrument comes on the next clock. From the TCK update edge
to that sample takes about 5 to 6 CLK cycles, three of them for synchronisation. The same
two-clock reset phase follows `rst_n`.

A conversion that is running when the update arrives is lost. The two-clock reset phase is the
price of switching, which keeps switching between instruments fast.

## The analog half: behavioural models

`cap_dac`, `sample_hold`, `comparator` and `analog_ei` model analog circuits. They are not
synthesizable logic. Voltages are SystemVerilog `real` values in volts. The models are ideal:

| model | behaviour |
|---|---|
| `cap_dac` | `vout = vref · code / 2^N`, settles instantly, no capacitor mismatch |
| `sample_hold` | tracks while `sample` is high, holds from its falling edge, no kT/C noise or droop |
| `comparator` | decides instantly, with an optional fixed `OFFSET_V`; output 0 while not enabled |
| `analog_ei` | one S/H plus one comparator; the front-end is outside, and its output is the `v_afe` input. With `HAS_SH = 0` the instrument is a DC-node monitor: `v_afe` goes straight to the comparator |

The instrument front-ends are not part of this RTL. Neither is whatever drives the IEEE 1687
network (a dependability processor, a TAP, segment-insertion bits). These appear at the top as
ports: `v_afe[]` for the front-end voltages, `ijtag`/`scan_in`/`scan_out`/`tck` for the
network, and `ei_cfg[]` for the configuration bits that go to the front-ends.

Because of the `real` ports, `split_sar_top` is a mixed-signal simulation model. The
synthesizable part is everything except the four models above: `sar_logic`, `sar_en_gen`,
`ei_mux`, `rtdr` and `ijtag_tdr`. In silicon, the DAC output is an analog net running from the
shared DAC to every instrument's comparator.

## Files

| file | contents |
|---|---|
| `rtl/split_sar_pkg.sv` | constants (8-bit DAC, 2 EIs, 0.8 V), SAR state enum, `ijtag_ctrl_t` struct of segment controls |
| `rtl/sar_logic.sv` | resolution-configurable SAR controller |
| `rtl/ijtag_tdr.sv` | two-stage IEEE 1687 TDR (per-instrument configuration) |
| `rtl/rtdr.sv` | reconfiguration TDR: SEL, RES, update toggle |
| `rtl/sar_en_gen.sv` | TCK-to-CLK update synchroniser, 2-clock SAR_EN reset phase |
| `rtl/ei_mux.sv` | instrument selection: comparator output back, strobes out to the selected EI only |
| `rtl/cap_dac.sv`, `rtl/sample_hold.sv`, `rtl/comparator.sv`, `rtl/analog_ei.sv` | behavioural analog models |
| `rtl/split_sar_top.sv` | the complete interface |
| `tb/*_tb.sv` | self-checking testbenches, one per module, plus `temperature_cycle_tb` |

### Parameters of `split_sar_top`

| parameter | default | meaning |
|---|---|---|
| `NUM` | 2 | number of analog instruments |
| `N` | 8 | DAC resolution, which is also the maximum conversion resolution |
| `CFG_W` | 8 | configuration bits per instrument TDR (this design's choice) |
| `SEL_W` | clog2(NUM) | width of the SEL field |
| `RES_W` | clog2(N) | width of the RES field (holds N_EI − 1) |
| `EI_HAS_SH` | all ones | per instrument: 1 = sampled through its S/H, 0 = DC node voltage wired straight to the comparator |

The DAC reference is the `vref` port, 0.8 V in the reference operating point.

## Simulating

Every testbench is self-contained and prints `TB_RESULT checks=<n> failures=<m>`. To build and
run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    --top-module split_sar_top_tb -y rtl -y tb +libext+.sv \
    rtl/split_sar_pkg.sv tb/split_sar_top_tb.sv -o sim
./obj_dir/sim
```

`sar_logic` and `sar_en_gen` carry concurrent assertions for the conversion sequence: one
phase at a time, bit cycling after each sample, a new sample after each EOC, the reset phase
while SAR_EN is low, and SEL/RES changing only in that phase. Keep `--assert` on so they are
checked.

To lint a module: `verilator --lint-only -Wall -y rtl rtl/split_sar_pkg.sv rtl/<module>.sv`.

### What the testbenches establish

* **`split_sar_top_tb`** runs the full interface at its default sizes, with a 50 kHz CLK and a
  1 MHz TCK. It converts EI 0 at 8 bits, then writes the RTDR to select EI 1 at 5 bits, then
  makes 30 random reconfigurations. EI 0's input changes on every clock, so a wrong hold edge
  shows up at once. A monitor checks every conversion against the rule above:
  * `dout`;
  * the serial bits;
  * the N_EI bit cycles and the N_EI + 2 clock period;
  * the zero bits around the result;
  * the DAC voltage at EOC;
  * the two-clock SAR_EN phase after every update;
  * configuration read-back through the chain.

  It also counts how often each mechanism occurred and fails if one never did: conversions on
  each EI, 8-bit and 5-bit conversions, reset phases, EI switches and read-backs.
* **`temperature_cycle_tb`** runs the temperature instrument at 5 bits for three 100 Hz
  temperature cycles between 25 °C and 125 °C (30 ms, 1500 clocks). It checks:
  * every code;
  * the 140 µs conversion period;
  * the 214 conversions in 30 ms;
  * that the temperature read back never trails the true one by more than one 5-bit step plus
    the change within one sampling interval.

  The front-end transfer function is not given, so this testbench assumes a linear one,
  V = 0.8 V · T / 160 °C.
* The unit testbenches cover each module on its own. `sar_logic_tb` runs 400 conversions at
  random resolutions and inputs, with reset phases in between. The TDR benches check shift,
  capture, update, reset and deselection. `sar_en_gen_tb` changes the update toggle at times
  unrelated to CLK. `ei_mux_tb` is exhaustive.

## Choices of this design, and what is not included

The following follow the reference architecture:

* the split between the instrument side and the shared side;
* one shared 8-bit binary-weighted DAC with a 0.8 V reference;
* the SAR state sequence with a configurable resolution;
* the N_EI + 2 bit serial stream with zero bits in the sample and EOC phases;
* per-instrument TDRs plus a shared RTDR holding SEL and RES;
* the SAR logic placed in a reset phase for two clocks on every RTDR update;
* two instruments;
* the choice, per instrument, between a sampled input and a DC node wired straight to the
  comparator.

The following are this design's own choices:

* TDR widths, bit order and read-back capture;
* the minus-one RES encoding and the RTDR reset value;
* right-aligned `dout`;
* a DAC code of 0 during sampling;
* the toggle synchroniser between TCK and CLK;
* sending the strobes only to the selected instrument, so unselected comparators stay idle;
* one daisy chain under one segment select.

Not included:

* **Clock-selection bits for the instruments.** The architecture foresees them in the RTDR but
  does not define them: neither the clock sources nor the encoding. Here every instrument
  converts on the single CLK.
* **Analog non-idealities:** noise, offset sizing, settling, capacitor mismatch. The analog
  models are ideal, apart from the comparator offset parameter.
* **The instrument front-ends and the network controller.** These are external; see above.
