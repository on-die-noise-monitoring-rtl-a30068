# On-die noise monitor for system-level ESD

An electrostatic discharge into a product (an ESD gun on the ground plane of a
phone, say) produces a fast transient between the chip's VDD and VSS. Measuring
it with a probe and an oscilloscope is unreliable: the cable picks up radiated
and common-mode noise. The alternative is to record the waveform **inside the
chip**. A small monitor sits on the die. It samples the supply, or a chosen
signal net, continuously into a circular record. When a detector sees the net
cross a threshold, the monitor freezes the record. The stored samples are then
read out slowly through a 5-bit port and turned back into a waveform offline.

This repository holds SystemVerilog for that monitor. The digital parts are
synthesizable RTL. The analog parts (DLL, ADCs, threshold detectors) are
behavioural models, so the whole thing can be simulated end to end.

```
               ref_clk
                  |
              +-------+   ph_clk[0..7] (T/8 apart)
              |  DLL  |-------------------------------+------------------+
              +-------+                               |                  |
                  |                                   |            clk_sel|
 adc_vin_mv  +----v-----+ adc_out  +-----------+ aligned  +--------------v-+
 ----------->| 8 x ADC  |--------->| adc_align |--------->| shift_register |
             | (5 bit)  |          | ADC1..3   |          | 32 frames x    |<- dff_clk
             +----------+          | +T/2      |          | 8 x 5 bit      |   (gated)
                                   +-----------+          +-------+--------+
 vdd_mv --> [VDD detector ]--+                                    | frames
 sig_mv --> [Signal detect]--+-> trigger_ctrl --hold--> dff_clk_gen|
                    det_sel, trig_dly   |                         v
                                        +--hold--------------> readout --> out[4:0]
                                                         rd_clk --^        (OUT1..OUT5)
```

## Time-interleaved sampling: eight slow ADCs make one fast one

The reference clock has period T (3.125 ns, 320 MHz, in the reference
configuration). The DLL produces eight copies of it. Phase *k* (`ph_clk[k]`,
called ADC_INCLK*k+1*) is delayed by *k*·T/8. ADC *k+1* samples the input on
the rising edge of phase *k*. One reference period therefore yields eight
samples spaced T/8 apart. The aggregate rate is 8/T = 2.56 GS/s, although each
converter runs at only 320 MS/s. A group of eight samples taken in the same
period is a **frame**: `frame_t` in `omc_pkg`, where lane *k* = ADC *k+1*.

The eight ADC outputs change at eight different instants. No single clock edge
finds all of them stable, so this design retimes some of them:

* The outputs of ADC1..ADC3 are registered again on the **falling edge of
  their own sampling clock**, which is half a period later (`adc_align`).
* After that, every lane of frame *n* changes within the second half of
  period *n* (roughly 3T/8 to 7T/8, plus the ADC output delay).
* Every lane stays stable for the other half period. That stable half period
  is the timing margin for DFF_CLK, the clock that loads the frame into the
  shift register.

DFF_CLK is one of the eight DLL phases, chosen by `clk_sel`. The DFF_CLK edge
in period *n+1* loads the complete frame *n*. With the ADC model's 200 ps output
delay, phases 0 to 3 land inside the stable window. Phase 1 is the usual
choice. Phases 4 to 7 race the retiming registers and must not be used. With a
real converter the usable phases depend on its output delay. This is the
subtle part of the design. `tb_omc_top` checks it: every sample read back must
carry the step number of the input staircase at its sampling instant.

## Capture and trigger

`shift_register` holds the latest `DEPTH` = 32 frames (256 samples, 100 ns at
320 MHz). It shifts one frame per DFF_CLK edge, so it acts as a moving window
over the input.

Two event detectors each compare one net against a threshold: VDD, and a chosen
signal net. `det_sel` picks which one may trigger a capture. Detector plus gate
delay is about 2 ns. `trigger_ctrl` turns the first rising edge of the selected
detector into a sticky **hold**. `trig_dly` sets when hold rises:

| `trig_dly` | hold rises | use |
|---|---|---|
| 0 | about 2 ns after the net crosses the threshold | record ends right after the event |
| n > 0 | on the (n+2)-th edge of the selected clock after the event (2-flop synchroniser, then n cycles) | record moves later, keeping more of what follows the event |

`dff_clk_gen` ANDs the selected phase with "not hold" to make DFF_CLK. The
enable is latched while the clock is low, as in a standard clock gate, so a hold
that arrives during a high phase cannot shorten that pulse. When DFF_CLK stops,
the record is frozen. It stays frozen until `rst_n` re-arms the monitor, which
also clears the record and the read counter.

## Readout

While hold is high, each rising edge of the external `rd_clk` advances an 8-bit
binary counter (`rd_addr`). `out[4:0]` (pins OUT1..OUT5) presents sample
`rd_addr`. Samples come out in time order, oldest first: frame 31, lanes 0..7,
then frame 30, and so on. Sample *i* was therefore taken *i*·T/8 after
sample 0. The last sample was taken just before the last DFF_CLK edge. The
readout is combinational from the counter. Sample 0 is on `out` as soon as hold
rises, and each new sample appears one mux delay after an `rd_clk` edge. After
256 reads the counter wraps to 0. The counter does not move while hold is low.

To rebuild the waveform, multiply each code by the ADC step and scale by the
input attenuation. Sample *i* sits at time *i*·T/8.

## Files

| file | what it is |
|---|---|
| `rtl/omc_pkg.sv` | shared constants (8 phases, 5 bits, 3 retimed lanes, 32 frames) and types |
| `rtl/omc_top.sv` | the monitor, all blocks wired together |
| `rtl/dll_model.sv` | behavioural DLL: measures the reference period, outputs 8 phases, lock flag |
| `rtl/adc_model.sv` | behavioural 5-bit ADC: 0..1800 mV, 200 ps output delay |
| `rtl/event_detector_model.sv` | behavioural threshold comparator with 2 ns transport delay |
| `rtl/adc_align.sv` | half-period retiming of ADC1..ADC3 |
| `rtl/dff_clk_gen.sv` | phase select and latch-based hold gate, producing DFF_CLK |
| `rtl/shift_register.sv` | 32-frame capture memory |
| `rtl/trigger_ctrl.sv` | detector select, trigger delay, sticky hold |
| `rtl/readout.sv` | read counter and sample multiplexer |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Top-level ports of `omc_top`:

* `ref_clk`, `rst_n`, `rd_clk`: clocks and reset.
* `adc_vin_mv`: the attenuated sensing input. `vdd_mv` and `sig_mv`: the nets
  watched by the two detectors. All three are signed 16-bit values in
  millivolts.
* `det_sel`, `clk_sel`, `trig_dly`: static configuration (switches on a board).
* Outputs `out`, `rd_addr`, `hold` and `dll_locked`.

Parameters: `DEPTH` (32), and `VDD_THRESH_MV` and `SIG_THRESH_MV` (2000 each).
`NUM_PH`, `ADC_BITS` and `NUM_LATE` are package constants. The modules take
them as parameters too.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
one also has a watchdog. The behavioural models use delays, so simulate with
timing enabled. For example, the full design at its default size:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
          rtl/omc_pkg.sv tb/tb_omc_top.sv --top-module tb_omc_top
./obj_dir/Vtb_omc_top
```

`tb_omc_top` runs five captures at the default parameters. The input is a
staircase that steps every T/8, so every sample reads back as its own step
number. From the time of the injected spike alone, the testbench works out when
hold must rise and which step must be the newest one stored. It then checks all
256 samples read back, and the timing of hold to the picosecond. It exercises:

* both detectors, and a spike on the unselected net that must be ignored;
* zero and non-zero trigger delay;
* four DFF_CLK phases;
* a re-read after a pause, which must match the first read (the record stays
  frozen);
* the read counter wrapping.

It reports how often each of these happened, and fails if one never did. It
takes about a second. The block testbenches check the individual timing rules.
For example, `tb_dff_clk_gen` checks that a hold arriving mid-pulse leaves that
pulse at full width. `tb_trigger_ctrl` checks the (n+2)-edge trigger delay.

## What is modelled, and what was chosen here

These parts follow the original circuit:

* eight ADCs on eight DLL phases spaced T/8;
* 5-bit samples;
* ADC1..ADC3 delayed by half a period;
* DFF_CLK chosen from the DLL phases and stopped by hold through an AND gate;
* a hold from a VDD or Signal threshold detector with about 2 ns delay, plus an
  optional further delay;
* readout by an external read clock and a binary counter;
* 320 MHz, 2.56 GS/s and a 100 ns record, which give the 32-frame depth.

These are choices made for this RTL, where the description gives no detail:

* Analog values are integers in millivolts.
* The ADC range is 0..1800 mV (the 1.8 V internal supply), with straight-binary
  codes and a 200 ps output delay.
* The detector thresholds are 2000 mV.
* The DLL locks after 8 equal periods and keeps its outputs low until then.
* The clock gate is latch based.
* Hold is sticky until `rst_n`, and `rst_n` also resets the DLL.
* The trigger delay counts whole clock cycles (5-bit field) after a two-flop
  synchroniser.
* Readout is oldest-first, and the counter wraps.
* Using falling-edge registers for the half-period delay is also a choice here.

Not included:

* The low-dropout regulator (3–5 V in, 1.8 V out) and the C1/C2 capacitive
  attenuator between the sensing input and the ADCs. Both are passive or analog
  with no logic function. The attenuator's ratio is unknown, so the top takes
  the already-attenuated voltage.
* The 2.8 Vpp input limit of the original circuit depends on that ratio. It
  cannot be checked here.
* The board-level clock source and switches. The clock is a port, and the
  switches are the configuration inputs.
* A direct hold input. `hold` is brought out as a pin so it can be observed.

How far to trust it: the digital blocks are small, and each is checked against
independently computed expectations. The end-to-end sample timing depends on the
ADC model's output delay and on the chosen DFF_CLK phase. Those are exactly the
numbers a real converter would change, so re-check the `clk_sel` window
(described above) before relying on a particular phase. The lint tools note two
intentional constructs: the enable latch in `dff_clk_gen`, and `trigger_ctrl`'s
event flop, which is clocked by the detector output. A synthesis flow needs
both constrained as what they are, a clock gate and an asynchronous capture.
