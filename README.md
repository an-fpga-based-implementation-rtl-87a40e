# BPSK transmitter with ROM-based raised-cosine pulse shaping

This is a small digital transmitter for an FPGA. It takes a stored bit stream and produces a
BPSK-modulated 10 MHz carrier, sampled at 100 MHz. A channel-impairment stage after the
transmitter delays the wave, shifts its carrier phase and frequency, and adds noise. With it, a
receiver can be tried against a realistic signal on the same chip.

The main idea is in the pulse shaper. A 65-tap raised-cosine FIR filter with 16× oversampling
would need multipliers and adders. Here it needs neither: the filter input can only be ±1, so
every possible output is computed in advance and stored in a 512 × 8 ROM. The last five data bits
and the sample phase together form the ROM address.

The architecture (memory, counter, 5-bit shift register, 4-bit sample counter, 512 × 8 filter ROM,
DDS carrier, multiplier, and a channel chain of fractional delay, phase/frequency offset and AWGN)
follows a published FPGA transmitter design for a Spartan-3E. The published description leaves
many details open. All word widths outside the ROM, the roll-off, the scaling, the pipeline, the
DDS sizes and the inner workings of the channel blocks are this implementation's own choices. They
are listed under "Departures and choices" below.

## Signal chain

```
            mem_* load port
                  |
 data_addr_counter -> input_data_mem -> shift_reg5 --(5 MSBs)--+
        ^ sym_tick                          ^ sym_tick            |--> rc_filter_rom --> bb (8 bit)
 sample_counter (mod 16) ---------------------------(4 LSBs)------+                       |
                                                                                          v
 dds (10 MHz) --- cos, sin -----------------------------------------------> bpsk_modulator --> pb (16 bit, to a DAC)
                                                                                  | pb_q
                                                                                  v
                                    channel_model: frac_delay (3.8 samples, on pb and pb_q)
                                                   -> phase_freq_offset -> awgn_channel --> ch (16 bit)
```

| module | role |
|---|---|
| `tx_top` | the whole transmitter plus channel model |
| `baseband_modulator` | memory, counters, shift register, address concatenation, ROM |
| `sample_counter` | 4-bit counter of the 16 samples per bit; its terminal count is the symbol-rate enable |
| `data_addr_counter` | input memory address, one step per bit, wraps around |
| `input_data_mem` | 2^AW × 1 bit block RAM with a load port and registered read |
| `shift_reg5` | the last five bits (bit 0 newest) |
| `rc_filter_rom` | 512 × 8 table of filter outputs (NRZ mapping built in) |
| `dds`, `sincos_lut` | phase-increment register, 32-bit accumulator, truncation to 10 bits, 1024-entry sine table read at θ and θ + 90° |
| `bpsk_modulator` | bb × cos (the transmitted wave) and bb × sin (used only by the channel model) |
| `channel_model` | `frac_delay` → `phase_freq_offset` → `awgn_channel` |
| `tx_pkg` | widths, constants, sample types, saturation function |

### One clock, two rates

Everything runs on one 100 MHz clock. The bit rate is 100 MHz / 16 = 6.25 Mbit/s. The published
design produced 6.25 MHz and 100 MHz from a 50 MHz board clock with a clock manager. Here the
6.25 MHz rate is a clock enable instead: `sym_tick`, the cycle in which the 4-bit sample counter
reads 15. On that cycle the address counter steps, the memory is read and the shift register
shifts. The clock manager itself (a vendor primitive) is not part of the RTL. Feed `clk` with
100 MHz from whatever clock source the target has.

`en` starts and pauses the bit stream and the channel model. When `en` is low, every counter,
the delay line and the noise generator hold. The carrier DDS runs from reset regardless.

## The ROM-based pulse shaper

The ROM address is `{hist[4:0], k[3:0]}`:

- `hist` is the shift register, with `hist[0]` the newest bit;
- `k` is the sample phase within the current bit, 0 to 15.

The word at that address is the output of a 65-tap raised-cosine filter, driven by the five
NRZ-mapped bits (1 → +1, 0 → −1), at phase `k`:

```
ROM[{b,k}] = round( 64 * sum_{j=0..4} (2*b[j] - 1) * h[16*j + k] )
h[n]       = rc((n - 32) / 16)   for n = 0..64, 0 otherwise
rc(t)      = sinc(t) * cos(pi*beta*t) / (1 - (2*beta*t)^2),   beta = 0.5
             (at t = ±1/(2*beta) the limit (pi/4)*sinc(1/(2*beta)) is used)
```

The 65 taps span 4 bits plus one sample, so five bits of history are enough. Bit `hist[j]`
meets tap `16j + k`. The centre tap (32) lines up with `hist[2]` at `k = 0`, so the filter's group
delay is 32 samples, or two bits. The output is 8-bit two's complement with 1.0 = 64. The largest
magnitude in the table is 92, reached by an all-equal history. The table is stored in
`rtl/rc_filter_rom.hex`: 512 lines, generated from the formula above.

With roll-off 0.5, the raised cosine is zero at every whole number of bits away from its centre.
At k = 0, the words therefore carry no intersymbol interference: every one is exactly +64 or −64,
set by `hist[2]` alone. The eye is fully open at the bit centres.

Because the NRZ mapping lives in the table, the address is unipolar but the output is bipolar.
There is no separate NRZ encoder in the hardware.

**Timing.** The memory read and the ROM read each take one clock. Take the first clock edge at
which `en` is high as edge 0. Right after edge n, `bb` holds sample n, with m = n / 16 and
k = n mod 16. During bit period m the shift register holds the memory bits d[m−2−j] at position
j, and bits before the start read as 0. So memory bit d[0] first appears in samples 32–47, and
reaches the peak of its pulse (hist[2]) in samples 64–79. `sym_tick` is high in the last clock of
every bit (k = 15 during that clock). `wrap` is high for one clock when the address counter goes
from its last address back to 0. The stream then repeats.

## Carrier: direct digital synthesis

A 32-bit phase accumulator adds the registered increment every clock:
f_out = inc × f_clk / 2^32. For 10 MHz at 100 MHz, inc = 429 496 730 (10.00000002 MHz). The top
10 bits of the phase (truncation) address a 1024-entry table of round(127 · sin(2πi/1024)),
stored in `rtl/sine_lut.hex`. The cosine is the same table read 256 entries (90°) ahead. Both
outputs are registered. A `phase_off` input is added to the phase before truncation. The carrier
ties it to 0; the channel model uses it.

Latency from reset: after the n-th edge with reset released (n ≥ 2), the outputs reflect phase
(n − 2) · inc.

## BPSK modulation

`pb = bb × cos` (8 × 8 → 16 bits, registered). A positive pulse (bit 1) gives the carrier at
phase 0, and a negative pulse (bit 0) gives it inverted, 180° apart. Between bits, the shaped
envelope passes smoothly through zero. The published text assigns phase 0 to a 0 bit, which is
the opposite labelling. To get that, invert the data or the ROM sign; nothing else changes.

`pb_q = bb × sin` is not transmitted. It is the quadrature partner of `pb`, and the channel model
needs it to rotate the carrier phase.

## Channel impairment model

The three stages follow each other in this order, and the wave takes `delay` + 3 clocks to pass.

1. **Fractional delay** (`frac_delay`). `delay` is unsigned 4.8 fixed point, 0 to 15.996 samples.
   The top uses 973, which is 3.80078 samples (38 ns at 100 MHz), as its propagation delay. The
   output is a linear interpolation over a 16-register delay line:
   `y[n] = x[n−Di] + f·(x[n−Di−1] − x[n−Di])`, plus one clock for the output register. `pb` and
   `pb_q` go through identical copies.
2. **Phase/frequency offset** (`phase_freq_offset`). For a wave s·cos(ωt), the identity
   s·cos(ωt + φ) = pb·cos φ − pb_q·sin φ turns a phase shift into two multiplies. φ[n] =
   `phase_off` + n·`freq_off` comes from a second `dds` instance (units of 2π/2^32). The result is
   divided by 128, so zero offset gives a gain of 127/128. It is then saturated to 16 bits.
3. **AWGN** (`awgn_channel`). A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5)
   gives four fresh random bytes every clock. Their sum minus 510 is close to Gaussian (σ = 147.8,
   range ±510, lag-1 correlation near 0). This value is multiplied by `noise_gain / 4` and added
   with saturation. The noise added is also output as `ch_noise`. For comparison, a clean wave
   peaks near 11 700: gain 32 gives σ ≈ 1180, and gain 255 gives σ ≈ 9420.

The channel controls `ch_freq_off`, `ch_phase_off` and `ch_noise_gain` are top-level inputs. The
published design gives no values for them.

## Number formats

| signal | format |
|---|---|
| `bb` | signed 8 bit, 1.0 = 64 |
| carrier | signed 8 bit, amplitude 127 |
| `pb`, `ch`, `ch_noise` | signed 16 bit |
| `delay` | unsigned 4.8 |
| phases | unsigned 32 bit, full scale = one turn |

## Departures and choices

Taken from the published design:
- the ROM-based filter, 512 × 8, with 5 + 4 address bits;
- 16× oversampling, 6.25 Mbit/s at 100 MHz;
- 65 taps with a group delay of 32;
- NRZ levels ±1;
- a DDS carrier at 10 MHz, multiplied with the shaped baseband;
- a channel chain of fractional delay (3.8 samples), phase/frequency offset and AWGN.

Choices made here:
- **Raised cosine, roll-off 0.5.** The published text mostly says "raised cosine" and names no
  roll-off. The 1.0 = 64 scaling is also a choice.
- **One clock domain** with a symbol-rate enable, instead of separate 6.25 MHz and 100 MHz clocks.
- **Input memory:** 1 bit wide and 16 384 bits deep (`AW` = 14), with a load port. The original
  was preloaded by the FPGA tools, and its size is not known.
- **Reset:** synchronous and active-low on every register. Memory arrays are not reset.
- **DDS widths:** a 32-bit phase and a 1024 × 8 table.
- **Channel offsets** work through the quadrature product and a second DDS.
- **Fractional delay** uses linear interpolation.
- **Noise** comes from a sum of four uniform bytes from a xorshift generator.
- **Outside the RTL:** the clock manager, the DAC after `pb`, and the analog sampling and
  quantization that produce the bit stream. `pb` is the DAC input, and the `mem_*` port takes the
  bits.

Resource estimate for a Spartan-3E class part (counted from the RTL, not synthesized with vendor tools):
- block RAM: 4 RAMB16 (data memory, filter ROM and two sine tables);
- multipliers: 7 (2 in the modulator, 2 in the rotation, 2 in the delay interpolation and 1 in
  the noise scaling).

## Tables

The two `.hex` files are plain `$readmemh` tables, read by the relative paths
`rtl/rc_filter_rom.hex` and `rtl/sine_lut.hex`. Run simulators and synthesis from the repository
root. Their formulas are given above and in the module headers. To change the roll-off, the
scaling or the table sizes, regenerate the files from those formulas. The testbenches recompute
the expected values independently in floating point (`tb/tb_ref_pkg.sv`). A table that does not
match its formula therefore shows up as a failure.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. From the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tx_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_tx_top.sv --top-module tb_tx_top -o sim
./obj_dir/sim
```

Replace `tx_top` with any module name to test that block.

`tb_tx_top` runs the design at its default size. It loads all 16 384 bits, sends them once and
wraps, which is about 280 000 clocks and under a second of wall time. It checks every sample of
`bb`, `pb` and `ch` against floating-point models. It then confirms that each mechanism happened:
- symbol steps;
- bit transitions (phase inversions);
- the address wrap;
- the 3.8-sample delay;
- the 180° phase offset;
- a 100 kHz frequency offset (the output sign turns against the unrotated model);
- the added noise.

The block testbenches override only the memory depth (`AW`) to stay short.
