# Upstream channel receiver front end for cable TV return paths

In a cable network, modems and set-top boxes send bursts to the headend in many
narrow channels anywhere between 5 and 65 MHz. Rather than building a tuned
analog receiver for each channel, this receiver digitizes the whole band at once
with one 10-bit ADC running at 153.6 MHz. A set of identical digital front ends
then picks channels out of the digitized band. Each front end:

1. tunes to the channel's carrier with a numerically controlled oscillator (NCO),
2. mixes the channel down to 0 Hz as complex I/Q baseband,
3. decimates with a multiplier-free CIC filter, by one of eight factors, and
4. shapes the result with a square-root raised-cosine (SRRC) matched filter
   whose taps are loaded by software.

A signal processor downstream does everything that depends on the modulation:
burst detection, timing and carrier recovery, equalization, symbol decisions,
derandomization and Reed-Solomon decoding. That processor is not part of this
RTL. The RTL is the front end it programs and reads.

The top level, `return_path_receiver`, is the single-chip arrangement: 4 ADC
input ports, a software-controlled crossbar switch, and 16 front ends. Any input
port can feed any front end, and each front end tunes on its own. With
`N_IN = N_CH = 1` it reduces to the plain one-channel receiver.

```
              +--------------------------- digital_front_end (x N_CH) ----------------------------+
adc_data[0..3]|            +------------+                                                         |
 ---->[input_switch]--x--->| quad_mixer |--I--> cic_decimator --> srrc_filter --> ch_i[j]          |
   (4 -> 16, registered)   |  x*cos     |                                                         |
              |            | -x*sin     |--Q--> cic_decimator --> srrc_filter --> ch_q[j], ch_valid |
              |            +------------+          ^ dec_sel           ^ taps                      |
              |                 ^ sin/cos          |                   |                           |
              |               [nco] <- phase_word  |                   |                           |
              +-----------------^------------------+-------------------+---------------------------+
                                |                  |                   |
   cfg_we/cfg_ch/cfg_addr/cfg_wdata ---> dfe_cfg_regs (per-channel registers, tap writes)
```

Everything runs on one clock at the ADC sample rate, and every input port gives
one sample per clock. After the CIC filter, samples travel with valid strobes;
there are no divided clocks.

## Tuning: the NCO

`nco` has a phase register, which takes the 32-bit tuning word every clock, and
a phase accumulator, which adds that word once per clock. The top 10 bits of the
accumulator address two 1024-entry, 12-bit tables: a sine table, and a cosine
table that is the same sine table read a quarter period ahead. The output
frequency and the tuning step are

    f_NCO = f_clk * phase_word / 2^32        step = 153.6 MHz / 2^32 = 0.036 Hz

For example, 30.72 MHz is `phase_word = 858993459`. The table holds
`round(2047 * sin(2*pi*n/1024))` for n = 0..1023, one 12-bit two's-complement
hex word per line, in `rtl/nco_sine_lut.hex`. The file is read with
`$readmemh`, by a path relative to the directory that contains `rtl/`. Phase
truncation (10 of 32 bits) limits spurs to roughly -60 dBc.

## Mixing

`quad_mixer` forms `I = x*cos` and `Q = -x*sin`. With the minus sign, a tone at
+f_NCO lands at 0 Hz as `x * exp(-j*2*pi*f_NCO*n)`. A 10-bit sample times a
12-bit table value has 21 significant bits. These are cut to 16 by an arithmetic
right shift of 5 (truncation), then registered. A full-scale tone of amplitude
A gives a baseband magnitude of A*2047/64 at the mixer output. The other half of
the tone's power goes to 2*f_NCO, and the CIC filter removes it.

## Decimation: the CIC filter, which needs the most care

`cic_decimator` has three sections:

- `STAGES` integrators at the full rate;
- a rate change that keeps every D-th result;
- `STAGES` combs with a delay of one decimated sample.

Its response is `H(z) = ((1 - z^-D)/(1 - z^-1))^STAGES`, with `STAGES = 4`. Four
things need attention:

- **Eight factors.** `dec_sel` (0..7) selects
  `D_k = 15 * 2^(k-1) = 15, 30, 60, 120, 240, 480, 960, 1920`.
  153.6 MHz / 15 = 10.24 MHz, which is 2 samples per symbol at 5.12 Msym/s, the
  widest DOCSIS upstream channel (6.4 MHz). Each further factor halves the rate:
  - k = 1..6 serve the DOCSIS channels from 6.4 MHz down to 200 kHz, at 2 samples
    per symbol.
  - k = 1, 2, 3 give 10.24, 5.12 and 2.56 MHz, which cover the 4, 2 and 1 MHz
    DVB channels.
  - The DSP's resampler does any exact rate conversion that is still needed.

  The table lives in `dfe_pkg::DEC_TABLE`. Changing it is safe: the register
  widths and output shifts are derived from it.
- **Word length.** All registers are `IN_W + ceil(4*log2(max D)) = 16 + 44 = 60`
  bits wide. The integrators are allowed to wrap around. Two's-complement
  wrap-around cancels in the combs, as long as the width covers the full
  growth.
- **Per-factor scaling.** The DC gain is D^4. The comb output is shifted right by
  `ceil(4*log2 D_k)` for the selected factor. This keeps the gain
  `D_k^4 / 2^shift` within (0.5, 1] and the output within 16 bits. With the
  default table every factor is 15 times a power of two, so every factor has the
  same gain, 50625/65536 = 0.7725. Another table would give gains that vary from
  factor to factor; the matched-filter taps or the DSP can correct for that.
- **Pipelining and switching.**
  - Each integrator adds one register, which delays the response by 3 input
    samples but does not change it.
  - The output strobe comes once every D accepted inputs. The first strobe comes
    at the D-th sample after reset.
  - Writing a new `dec_sel` restarts the counter. The sample in the clock of the
    change is integrated but not counted, so the first new output comes D+1
    clocks later.
  - The comb delays keep their old contents, so the first few outputs after a
    change are a transient.

Aliasing: the filter's nulls sit at multiples of 153.6 MHz / D. A tone whose
mixing image 2*f_NCO falls on a null (any carrier that is a multiple of
5.12 MHz) is removed completely. Elsewhere the 4-stage sidelobes are at least
about 50 dB down.

## Matched filtering: the SRRC filter

`srrc_filter` is a 33-tap direct-form FIR at the decimated rate and does not
change the rate. The taps are Q1.15 (32768 = 1.0) and are written one at a time.
The output is the sum of products, rounded half-up, shifted right by 15 and
saturated to 16 bits. Because the taps are programmable, the processor chooses
the roll-off (0.25 for DOCSIS, 0.3 for DVB) and the bandwidth relative to the
CIC output rate. The testbenches use 2 samples per symbol and normalize the
taps to unit DC gain. They compute the taps from the standard SRRC impulse
response:

    h(t) = [sin(pi t (1-a)) + 4 a t cos(pi t (1+a))] / [pi t (1 - (4 a t)^2)],   t in symbols
    h(0) = 1 - a + 4a/pi,   h(+-1/(4a)) = a/sqrt2 * [(1+2/pi) sin(pi/(4a)) + (1-2/pi) cos(pi/(4a))]

The taps reset to zero. A front end outputs nothing useful until its taps have
been loaded.

## Programming a channel

The processor writes through `cfg_we / cfg_ch / cfg_addr / cfg_wdata`, one
32-bit word per clock. `cfg_ch` selects the front end.

| cfg_addr        | register                                 | reset               |
|-----------------|------------------------------------------|---------------------|
| `0x000`         | NCO tuning word, 32 bits                 | 0                   |
| `0x001`         | decimation index k-1, 3 bits             | 0 (D = 15)          |
| `0x002`         | input port for this front end, 2 bits    | channel number mod 4 |
| `0x100 + i`     | SRRC tap i (i < 33), low 16 bits         | 0                   |

Register writes take effect on the next clock. A tap write reaches that
channel's I and Q filters one clock later. The two filters share one tap set.
Writes to other addresses are ignored.

A typical setup:

1. Write the 33 taps.
2. Select the input port.
3. Write the decimation index.
4. Write the tuning word, `round(f_carrier / 153.6 MHz * 2^32)`.

About 45 output samples later (CIC and FIR fill time) the channel has settled.

## Gain and timing, end to end

For a tone of amplitude A (in ADC LSBs) on the tuned carrier, the output
magnitude `|I + jQ|` is

    A * 2047/64 * D^4 / 2^ceil(4 log2 D) * (sum of taps)/32768 * droop(f_offset)

`droop` is the CIC passband droop at the tone's offset from the carrier:
`(sin(pi f D/fs) / (D sin(pi f/fs)))^4`. For example, with A = 150, D = 15 and
unit-gain taps the magnitude is about 3700. The testbenches check this formula
within a few percent.

Latency:

- input switch: 1 clock;
- ADC-to-NCO alignment register: 1 clock;
- mixer: 1 clock;
- CIC: 3 samples of pipeline plus the decimation itself;
- SRRC: 2 clocks after the CIC strobe.

`ch_valid[j]` pulses once every D_k clocks.

## Size

The default top, with 16 front ends, synthesizes to about 4,100 word-level cells
and 52,000 flip-flops. Most of the flip-flops are the two 33-entry delay lines
and tap sets per front end, plus the 60-bit CIC registers. Each front end has 66
tap multipliers and two 1024x12 tables. Sharing one table between the sine and
cosine readouts, exploiting the symmetry of the SRRC taps, or time-sharing the
FIR multipliers (there are at least 15 clocks per output) would all reduce this
a lot. None of these is done here.

## Where this RTL makes its own choices

Taken from the receiver description:

- the 153.6 MHz sampling rate and 10-bit ADC;
- the chain NCO -> two multipliers -> CIC -> SRRC, with cos feeding I and sin
  feeding Q;
- the NCO structure (phase register, accumulator, sine and cosine tables) and
  its frequency law;
- the three-section CIC and its transfer function;
- eight programmable decimation factors;
- DSP-programmable roll-off and bandwidth;
- 4 inputs, 16 front ends and a software-controlled switch.

Chosen here, because the description does not give them:

- the 32-bit tuning word, the 1024 x 12 table and the phase truncation;
- the sign of Q and the mixer's word lengths;
- four CIC stages and the eight factor values;
- the CIC output scaling;
- the FIR length, tap format, rounding and saturation;
- the register bus and address map;
- reset behaviour (asynchronous, active low, everything cleared);
- a single clock with valid strobes.

Outside this RTL:

- the analog band-pass filter, variable-gain amplifier and ADC;
- the signal processor and everything it runs (demodulation, differential
  decoding, derandomization with 1+x^14+x^15 or 1+x^5+x^6, Reed-Solomon
  decoding);
- the downstream modulators and MAC functions of the single-chip version.

How far to trust it:

- Every block has a self-checking testbench against an independent model:
  - NCO: a real-arithmetic sine;
  - CIC: a non-recursive boxcar-convolution reference;
  - FIR: a direct convolution with rounding and saturation;
  - mixer, switch and registers: exact models.
- The whole receiver is simulated at its default size. All 16 front ends run on
  four ports, with every decimation factor, a switch change, a factor change and
  a tap reload.
- The front-end checks are on signal magnitudes within a few percent. They are
  not bit-exact.
- No RF-level performance has been measured (spur levels, selectivity across
  all channels, behaviour with real modulated bursts).

## Files

| file | contents |
|------|----------|
| `rtl/dfe_pkg.sv` | widths, decimation table, address map, CIC growth function |
| `rtl/return_path_receiver.sv` | top: registers, switch, N_CH front ends |
| `rtl/dfe_cfg_regs.sv` | processor-written per-channel registers |
| `rtl/input_switch.sv` | N_IN-to-N_CH registered crossbar |
| `rtl/digital_front_end.sv` | one channel: NCO, mixer, 2 CIC, 2 SRRC |
| `rtl/nco.sv`, `rtl/nco_lut.sv`, `rtl/nco_sine_lut.hex` | oscillator and its table |
| `rtl/quad_mixer.sv` | the two multipliers |
| `rtl/cic_decimator.sv` | programmable-factor CIC decimator |
| `rtl/srrc_filter.sv` | programmable FIR matched filter |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_util_pkg.sv` computes SRRC taps |

## Simulating

Run from the directory that holds `rtl/` and `tb/`, because the NCO table is
read by the relative path `rtl/nco_sine_lut.hex`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/dfe_pkg.sv tb/tb_util_pkg.sv tb/tb_return_path_receiver.sv \
        --top-module tb_return_path_receiver -o sim
    ./obj_dir/sim

Each testbench ends with `TB_RESULT checks=N failures=M`. The full receiver test
runs about 109,000 clocks in well under a second. To run a block's testbench,
substitute `tb_nco`, `tb_quad_mixer`, `tb_cic_decimator`, `tb_srrc_filter`,
`tb_input_switch`, `tb_dfe_cfg_regs` or `tb_digital_front_end`.

`tb_channel_widths` runs one front end through every channel width of the two
standards:

- DOCSIS 6.4 MHz down to 0.2 MHz, roll-off 0.25, at 2 samples per symbol;
- DVB 4, 2 and 1 MHz, roll-off 0.3, at 3.088, 1.544 and 0.772 Msym/s.

For each width it checks the in-band gain, and checks that a tone one channel
width away is rejected. Measured in-band gains are within 0.2 % of the formula
above. The neighbouring-channel tone comes out more than 60 dB down.

To lint a module:

    verilator --lint-only -Wall -y rtl rtl/dfe_pkg.sv rtl/return_path_receiver.sv

The widths, tap count and factor table are in `dfe_pkg`. `N_IN` and `N_CH` are
parameters of the top. If you change `LUT_AW` or `LUT_W`, regenerate the table
with the formula above.
