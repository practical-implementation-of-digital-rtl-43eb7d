# Synchronous multi-channel digital down converter for a wideband direction finder

A direction finder measures the bearing of a radio emitter by comparing the
phase and amplitude of one signal as it arrives at several antennas. To catch
short or frequency-hopping transmissions it should watch a wide band at once,
here 20 MHz, and every antenna channel must be processed so exactly alike that
the only phase differences left at the output are the ones the antennas saw.

This RTL is the digital down converter (DDC) front end of such a receiver. Each
antenna channel is sampled as a real signal at 120 MS/s. Four numerically
controlled oscillators (NCOs) cut the 20 MHz band into four adjacent sub-bands.
Each channel is mixed with all four, and each of the resulting complex signals
is filtered and decimated by 20 down to 6 MS/s. Five channels are spread over
two FPGA modules: three on module A and two on module B, so 20 complex outputs
in all. The modules share one sample clock and one start trigger, so all 20
outputs are written on the same clock tick, sample after sample. A filter bank
(polyphase or DFT) and the direction-finding algorithms would read them from
per-output FIFOs. Those later stages are not part of this design.

## Signal path

```
            +--------------------- one FPGA module (ddc_module) ----------------------+
 ADC ch c --+--> mixer --> CIC /5..40 --> coarse gain --> CFIR /2 --> PFIR /2 --> FIFO --> filter bank
 16 bit     |      ^        (6 stages)      (x gain)       (384 taps)  (64 taps)           (outside)
 120 MS/s   |      |
            |   NCO n (n = 0..3, shared by all channels of the module)
            +--> ... same for the other three NCOs
 start trigger + PLL lock --> acq_ctrl --> sync (clears every NCO and decimator), run
```

| point                  | rate at CIC rate 5 | format                            |
|------------------------|--------------------|-----------------------------------|
| ADC input              | 120 MS/s real      | 16 bit signed                     |
| NCO cos/sin            | 120 MS/s           | 16 bit, amplitude 32766           |
| mixer output (I, Q)    | 120 MS/s complex   | 24 bit                            |
| CIC output             | 24 MS/s            | top 32 of 62 bits                 |
| coarse gain output     | 24 MS/s            | 24 bit, saturated                 |
| CFIR output            | 12 MS/s            | 24 bit, rounded and saturated     |
| PFIR output / FIFO     | 6 MS/s             | 24 bit I + 24 bit Q (`iq_t`)      |

The CIC rate can be changed at run time to 10, 20 or 40. The output then drops
to 3, 1.5 or 0.75 MS/s, which narrows the bandwidth of each sub-band.

## Keeping twenty outputs coherent

This is the part of the design that the direction-finding stage depends on
most, and it lives in the control logic rather than the filters.

* **One phase reference per module.** The four NCOs of a module are shared by
  all its channels. So channels of the same sub-band are mixed by exactly the
  same oscillator samples.
* **One start for everything.** `acq_ctrl` waits for the module's PLL to lock.
  It then waits for a rising edge of the shared start trigger, passed through a
  two-flop synchroniser. It then emits a single-clock `sync` pulse, three clocks
  after the edge, and raises `run`. `sync` clears:
  * every NCO phase accumulator;
  * every CIC integrator, comb and decimation counter;
  * the pairing phase of both FIRs.

  Both modules get the same clock and the same trigger. So all NCOs in the
  system start from phase zero on the same tick, and all decimators pick the
  same input samples.
* **Deterministic pipeline.** No stage has a data-dependent delay. From the
  sync on, every chain writes its FIFO on the same clocks, one write every
  20 clocks at rate 5. The end-to-end test feeds the same signal to one channel
  of each module and gets bit-identical outputs.
* **Restart rules.** If a module loses PLL lock it stops (`run` low) and waits
  for lock and a new trigger edge. A module restarted alone is not in phase
  with one that kept running. To keep the system coherent, restart both
  modules together: drop both locks, or reset both, then trigger again.

## Number formats and the coarse gain

The CIC is a six-stage Hogenauer filter with differential delay M = 2, and it
needs no multipliers. Its DC gain is (R·M)^6:
* 10^6 at R = 5;
* 80^6 ≈ 2^37.9 at R = 40.

The registers are 24 + 38 = 62 bits, so no rate overflows. Wrap-around in the
integrators cancels in the combs. Only the top 32 bits go on, which fits full
scale at R = 40. At R = 5 the signal therefore comes out about 2^18 times
smaller. This is the loss that the **coarse gain** stage makes up for. It
multiplies both rails by an unsigned 20-bit word with 8 fractional bits
(256 = ×1), rounds, and saturates to 24 bits. `gain_sat` pulses on clipping.

The table gives gain words that bring the CIC output back to the mixer's scale
(overall DC gain 1 from mixer to FIFO, if the FIR coefficients sum to 1.0). The
formula is `gain_word = 256 · 2^30 / (2R)^6`:

| CIC rate | (2R)^6 / 2^30 | gain word for ×1 overall |
|---------:|--------------:|-------------------------:|
| 5        | 0.000931      | 274878                   |
| 10       | 0.0596        | 4295                     |
| 20       | 3.81          | 67                       |
| 40       | 244           | 1 (coarse: ×0.0039)      |

Larger words boost weak signals. That is the point of the stage, since the
band is already narrow after the CIC.

The mixer computes I = x·cos and Q = −x·sin. A positive tuning word therefore
moves the component at +f_NCO to 0 Hz. The 32-bit product is truncated to
24 bits (one redundant sign bit and 7 LSBs are dropped).

## The decimate-by-two FIR engine (`fir_decim2`)

The CFIR and PFIR are the same module with different sizes. Each computes
y = Σ h[k]·x[n−k] on both rails with one shared coefficient set, once for
every second input sample. The multipliers are time-shared, because at a
120 MHz clock many clocks pass between two output samples:

* New samples go into a circular buffer of at least TAPS + 2 entries.
* On the second sample of each pair a computation starts. It runs through the
  taps LANES at a time, taking `NCYC = ceil(TAPS/LANES)` clocks, then rounds
  (+2^16, shift right 17) and saturates.
* Samples older than the last `sync` count as zero, so the filter starts clean.
* The defaults:
  * CFIR: 384 taps / 48 lanes, so 8 clocks of the 10 available per 12 MS/s output;
  * PFIR: 64 taps / 4 lanes, so 16 of 20.
* If a new computation is due while one is still running, the new one is
  dropped and `overrun` pulses. This cannot happen at CIC rate ≥ 5 with the
  default sizes.

**Coefficients** are not built in: the filter responses are chosen when the
system is configured. They are signed 18-bit values with 17 fractional bits
(2^17 = 1.0). They are written one per clock over the broadcast bus
`coef_we / coef_sel / coef_addr / coef_data`. `coef_sel` picks the CFIR or the
PFIR bank, and one write reaches every chain of both modules. A write
takes effect on the next clock. Load the banks before triggering, or between
outputs: a write during a computation can mix old and new values in that one
output.

What the banks are meant to hold:
* The CFIR should be a low-pass that also compensates the CIC droop. The
  intended mask is flat to about 2.6 MHz and −100 dB from 3 MHz at 24 MS/s;
  the 384-tap default is sized for that (Kaiser estimate).
* The PFIR sets the channel shape: flat to about 2.6 MHz, about −40 dB from
  3 MHz at 12 MS/s. A root-raised-cosine is another typical choice.

The testbenches use plain windowed-sinc designs (CFIR: Blackman, cut-off
3 MHz; PFIR: Hamming, cut-off 2.8 MHz). These are computed in SystemVerilog
in the testbench and are good enough to show about −67 dB rejection between
sub-bands.

## Tuning the sub-bands

NCO n runs at `f = ftw[n] / 2^32 · 120 MHz`, and `poff[n]` adds a fixed phase
in units of 2^-32 turn. Four sub-bands of 6 MS/s, each with about ±2.6 MHz of
usable passband, tile 20 MHz when their centres are 5 MHz apart. The tests put
the centres at 22.5, 27.5, 32.5 and 37.5 MHz around a 30 MHz signal. For
example, ftw = round(32.5/120 · 2^32) = 1163220309.

The oscillator is a 16-iteration pipelined CORDIC:
* The 32-bit accumulator's top 24 bits are folded into ±90°, rotated, and
  unfolded.
* It needs no sine table, only 16 arctangent constants: atan(2^-i)/(2π) · 2^24.
* Its output lies within 2 LSB of the ideal 32766·cos/sin (measured over
  about 14 000 samples).

## Interfaces

`wdf_ddc_top` (all plain ports):

* `clk`, `rst_n`: the 120 MHz sample clock and an asynchronous active-low reset.
* `pll_locked_a`, `pll_locked_b`: the PLL lock flags of the two modules.
* `start_trig`: the shared start trigger.
* `cfg` (`ddc_pkg::ddc_cfg_t`):
  * four `{ftw, poff}` pairs;
  * `cic_rate` (`CIC_R5`, `CIC_R10`, `CIC_R20`, `CIC_R40`);
  * `gain`.
* The coefficient bus: `coef_we`, `coef_sel` (`SEL_CFIR`/`SEL_PFIR`), 9-bit
  `coef_addr` and 18-bit `coef_data`.
* Per module (`_a` with 3 channels and 12 DDCs, `_b` with 2 channels and 8 DDCs):
  * inputs: `adc_*[ch]` and `adc_valid_*`;
  * FIFO reads: `out_rd_*[d]` in, `out_iq_*[d]` (head word) and `out_empty_*[d]` out;
  * per-DDC flags: `out_full`, `out_wr` (a chain wrote this clock),
    `fifo_overflow`, `gain_sat`, `fir_overrun`;
  * `running_*` (acquiring) and `armed_*` (locked, waiting for the trigger).

DDC `d` of a module carries channel `d / 4`, sub-band `d % 4`. The FIFOs are
first-word-fall-through, 16 deep. A write into a full FIFO is dropped and
flagged.

Latencies in clocks:

| stage       | latency                                               |
|-------------|-------------------------------------------------------|
| `acq_ctrl`  | 3 from trigger edge to `sync`/`run`                   |
| NCO         | 18 (ITER + 2) from accumulator to cos/sin             |
| mixer       | 1                                                     |
| CIC         | 7 (N + 1) after the input that completes a group of R |
| coarse gain | 1                                                     |
| CFIR        | 10 (NCYC + 2) after the second input of a pair        |
| PFIR        | 18 (NCYC + 2) after the second input of a pair        |
| FIFO        | 1 from write to `empty` low                           |

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_nco`: several tuning words, offsets and enable gaps, checked against
  floating-point cos/sin at the stated latency.
* `tb_iq_mixer`: random and extreme values, checked against exact products.
* `tb_cic_decimator`: rates 5/10/20/40 bit-exact against direct convolution
  with the CIC impulse response, plus the DC gain and one output per R inputs.
* `tb_coarse_gain`: exact rounding and saturation, and the `sat` flag.
* `tb_cfir`, `tb_pfir`: the FIR engine in both sizes, bit-exact against dot
  products. Also checked:
  * latency;
  * coefficient reload;
  * restart after `sync`;
  * forced overrun.
* `tb_out_fifo`: random traffic checked against a queue model, including
  overflow.
* `tb_acq_ctrl`: trigger before lock, one sync per start, lock loss, and
  restart needing a new edge.
* `tb_ddc_chain`: the whole chain at default sizes.
  * DC is exact against a stage-by-stage calculation.
  * DC is also exact at rates 10, 20 and 40, using the gain words from the
    table above.
  * Spacing is 20, 40, 80 and 160 clocks at rates 5, 10, 20 and 40.
  * A 1 MHz tone comes out within 0.2 % of the predicted CIC droop.
  * A 5 MHz tone is about 68 dB down.
* `tb_ddc_module`: one 3-channel module.
  * A 31 MHz tone with a different phase per channel lands in sub-band 2, with
    the other sub-bands ≥ 40 dB down.
  * Between channels, phase agrees within 0.05° and amplitude within 0.09 %.
  * Nothing is written before the trigger, and all chains write on the same
    ticks.
* `tb_wdf_ddc_top`: the whole system at default parameters.
  * An AM signal is split to channel 0 of both modules and a tone to channel 1.
  * Module B's outputs must equal module A's sample for sample and tick for
    tick.
  * It also exercises and counts the trigger start, the coefficient loads,
    rates 5 and 10, gain clipping, FIFO overflow, lock loss and restart.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_wdf_ddc_top rtl/ddc_pkg.sv tb/tb_wdf_ddc_top.sv
./obj_dir/Vtb_wdf_ddc_top
```

Any other testbench builds the same way with its own name. The full system
test runs in well under a second of CPU time.

## Choices made here, and what is outside

The published design built the mixer, NCO, CIC and FIRs from vendor IP cores
inside a graphical FPGA tool. All of those are written out here, and the
following are this design's own choices:

* **CIC shape.** N = 6 and M = 2 are inferred from the reported CIC response:
  nulls every 12 MHz at 120 MS/s and sidelobes near −78, −102 and −114 dB.
* **Filter sizes.** The CFIR and PFIR tap counts (384, 64) are Kaiser
  estimates from the reported passband and stopband edges and attenuation.
  The lane counts come from the clocks available per output.
* **Oscillator.** The NCO is a CORDIC rather than a table-based synthesiser.
* **Formats.** All word widths, rounding and saturation rules are this
  design's, as are the gain format and the FIFO depth and behaviour.
* **Control.** So are the trigger synchroniser, the single `sync` pulse that
  resets the datapath, and the restart rule.
* **Run-time interface.** The configuration is plain ports, and coefficients
  go over a simple write bus, instead of the vendor host interface.
* **Coefficients.** No coefficient values are provided as defaults.

Not included, because they are analog, vendor parts or only named:
* antennas and RF front end;
* ADC modules;
* the PLLs (only their lock flags enter);
* the chassis DMA and host software;
* the polyphase/DFT filter bank;
* the direction-finding algorithms;
* the operator display.

The reported resource use of the original (on one module) cannot be compared
with this RTL, because it counted vendor cores.

## Files

* `rtl/ddc_pkg.sv`: widths, `iq_t`, `ddc_cfg_t`, rate and select enums.
* `rtl/wdf_ddc_top.sv`: the two-module system.
* `rtl/ddc_module.sv`: one module (NCOs, mixers, chains, FIFOs, control).
* `rtl/acq_ctrl.sv`: the start controller.
* `rtl/nco.sv`: the NCO.
* `rtl/iq_mixer.sv`: the mixer.
* `rtl/ddc_chain.sv`: the CIC → gain → CFIR → PFIR chain.
* `rtl/cic_decimator.sv`: the CIC decimator.
* `rtl/coarse_gain.sv`: the coarse gain.
* `rtl/fir_decim2.sv`: the CFIR/PFIR engine.
* `rtl/out_fifo.sv`: the output FIFO.
* `tb/tb_*.sv`: the testbenches described above.
