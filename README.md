# Wide-band real-time mobile channel emulator

A mobile radio channel is a time-varying multipath channel. The transmitted signal reaches the receiver
over several paths. Each path has its own delay τᵢ and its own complex gain Eᵢ(t), and the gain changes
as the vehicle moves. At base band this is a complex FIR filter with unequally spaced taps:

    y(t) = Σᵢ Eᵢ(t) · x(t − τᵢ)

This RTL builds that filter in real time for a signal 20 MHz wide. It is a fixed array of **twenty
identical tap circuits**. Each tap does four things:

- picks one of **three inputs**;
- delays it by up to 1600 samples (80 µs at 50 ns per sample);
- multiplies it by a complex coefficient that is replayed from memory and interpolated on the fly;
- adds the result onto one of **two output sums**.

The (input, output) choice of each tap decides which taps belong to which channel. So the same hardware
can act as one 20-tap channel, or as several smaller channels at once, up to six (3 inputs × 2 outputs).
Soft-handover tests need this: one mobile connected to several base stations.

Around the taps are:

- an I/Q detector per input, which makes complex base-band samples from a real IF signal sampled at
  40 MHz;
- an I/Q modulator per output, which does the reverse;
- a control card that plays back the coefficient memories.

All of it is written in plain SystemVerilog in `rtl/`. One self-checking testbench per module is in `tb/`.

## Clocking and sample rates

| Rate | Where it comes from | What runs at it |
|---|---|---|
| 40 MHz `clk` | the converter clock | A/D and D/A codes, one per clock |
| 20 MHz `ce` | divide-by-two in the top | all base-band processing, as a clock enable that is high on every second `clk` |
| f2 = 20 MHz / N | `f2_tick` from the control card; N = 2^k, 8 ≤ N ≤ 8192 | coefficient interpolation filters |
| f1 = f2 / 32 | `f1_tick` | coefficient RAM reads |

There is only one clock. Everything slower is a single-cycle enable.

## Input interface: real IF to complex base band (`iq_detector`)

The analog front end brings each input to an IF where the band is centred at a quarter of the 40 MHz
sampling rate. After sampling, demodulation is just a sign sequence.

- Even samples give I and odd samples give Q:
  `I[k] = (−1)^k x[2k]` and `Q[k] = −(−1)^k x[2k+1]`.
- I and Q are therefore sampled half a 40 MHz period apart.
- Two 16-tap programmable FIR filters, one per branch, line them up. Both are all-pass fractional-delay
  filters; the original uses 3/4- and 1/4-sample delays.

The DSP loads the filter coefficients. Their values are not built in.

The 10-bit A/D code enters the 16-bit filter multiplied by 32. The filter output is shifted right by 10,
because a coefficient of 1024 is unity gain. A filter whose only coefficient is 1024 at index 0 therefore
passes the signal unchanged, with a gain of 32.

## Output interface (`iq_modulator`)

This is the mirror image of the input interface.

- The 24-bit bus sums are saturated to 16 bits.
- Each branch goes through a 16-tap filter.
- The `(−1)^k` and `−(−1)^k` signs are applied.
- I and Q are interleaved into the 40 MHz D/A stream: the I sample on the `ce` clock, the Q sample on the
  next clock.
- The D/A code is the filter output shifted right by 10 and then by 4, saturated to 12 bits.

With unity filters, an input tone therefore leaves at the gain of the tap coefficients times 2.

## The tap circuit (`tap_circuit`)

    x_in[0..2] ─► input mux ─► delay FIFO ─► complex ×  ─┐
                                              ▲          ▼
       RAM(re) ─► zero pad ─► 128-tap FIR ────┤    sum_in[b] + product ─► sum_out[b]
       RAM(im) ─► zero pad ─► 128-tap FIR ────┘    sum_in[other] ───reg─► sum_out[other]

### Signal path

1. **Input mux.** It picks input 0, 1 or 2. Value 3 gives zero, which is the reset value, so an unused
   tap adds nothing.
2. **Delay FIFO** (`delay_fifo`). A 2048-entry circular buffer: the read pointer is the write pointer
   minus the delay.
   - Until as many samples as the delay have been written since reset, it outputs zero. This means no
     uninitialised memory ever reaches the sum.
   - Delay 0 bypasses the memory.
3. **Complex multiplier** (`cmult`). It is registered. The coefficient format is 2.14 (16384 = 1.0), and
   the product is rounded down and saturated to 16 bits.
4. **Adder.** Two partial-sum buses run through all twenty taps, one for each output. Each tap adds its
   product to the bus it was told to, and passes the other bus through a register. Both buses then see
   the same latency at every tap.

The multiplexers and adders are spread along this chain. No central crossbar is needed.

### Latency compensation

A sample that is added at tap i still has to pass 19 − i chain registers before it reaches the output.
So taps early in the chain would look longer than programmed. Tap i therefore adds its own index to the
programmed delay (`TAP_IDX`). The delay register then holds τᵢ directly, whatever the tap's position.

The latency from the input mux to the end of the chain is the same for every tap:

    τᵢ + NTAPS + 2 sample periods

From an A/D sample to the D/A stream, with unity interface filters, it is **τᵢ + NTAPS + 7 sample
periods**. For NTAPS = 20 that is 2τ + 55 clocks of 40 MHz.

## Coefficient playback: the hardest part

The coefficients Eᵢ(t) change slowly: at most about 1000 Hz of Doppler spread. The signal, by contrast,
runs at 20 Ms/s. Storing Eᵢ at the signal rate would need impossible amounts of memory. So each tap
stores a **sparse** sequence of samples and interpolates it in real time, in two hardware stages.

- **Stage 1: interpolate by p = 32** (`coef_interp`). A RAM word is read on every f1 tick. The word goes
  into the filter once, followed by 31 zeros (zero padding). A 128-coefficient low-pass FIR, clocked at f2,
  smooths the result. The filter is a `pdsp_fir` instance in eight-phase mode; see the next section.
- **Stage 2: hold for N samples.** The filter output register changes only once per f2 period. So each
  value is held for N = 8…8192 signal samples (a zero-order hold).
  - With N ≥ 8 the hold adds only negligible spectral images.
  - N is a power of two, so it is set by a 4-bit `log2n` register (3…13; values outside are clamped).

The real and imaginary parts each have their own 256 Kword RAM and their own filter. A tap therefore
holds 512 Kwords in all.

### Doppler frequency

The simulated Doppler frequency follows from the rates. Let:

- n be the number of stored coefficient samples per wavelength travelled;
- m·l be the interpolation already done in software before loading.

Then:

    f_d = f_s / (n · m·l · p · N),   f_s = 20 MHz, p = 32

Software picks m·l from 9 to 17. Hardware picks N from 8 upwards. Together they cover 1085 Hz (m·l = 9,
N = 8) down to a few hertz. Example: one stored set of 15 420 samples with m·l = 17 fills 262 140 of the
262 144 RAM words.

### Scanning the RAM (`scan_ctrl`)

The RAM is read in one of two modes:

- **Single:** addresses 0 … LAST, then stop. `running` falls.
- **Continuous:** up to LAST and back down, the turning address not repeated, until a stop command.
  Playing the record back and forth turns a finite measured or simulated record into an endless one
  without a jump.

A full scan of 256 Kwords at N = 8 takes 262 144 × 32 × 8 × 50 ns ≈ 3.36 s. One global scan address and
one N serve all taps, so all coefficients advance in step.

## One programmable FIR for both jobs (`pdsp_fir`)

The same FIR block serves two jobs: the 16-tap interface filters and the 128-tap coefficient filters.

- 16-bit data, 12-bit coefficients, 32-bit wrapping accumulator.
- `MACS` multipliers are reused over `TAPS/MACS` phases.
- With 16 taps and 16 multipliers it takes one sample per `ce`, with a latency of two `ce`.
- With 128 taps it needs 8 `ce` per input. That is the reason N cannot go below 8: the coefficient filter
  is clocked at most at 20 MHz / 8 = 2.5 MHz.

`dout` is updated `TAPS/MACS` `ce` cycles after `in_valid`. It holds its value in between; the
coefficient path relies on this hold.

## Control card and register map (`control_card`)

The control card holds the global registers and produces the f2/f1 enables and the scan address. It also
forwards writes to the interface-filter coefficients. Each tap decodes its own addresses.

The DSP writes over a simple synchronous bus `bus_t = {we, addr[23:0], wdata[31:0]}`, one write per `clk`.
There is no read-back and no handshake.

| addr[23:18] | Contents | Lower address bits | Data |
|---|---|---|---|
| 0 … 39 | tap RAM, bank = 2·tap + part (0 re, 1 im) | [17:0] word | [15:0] 2.14 coefficient |
| 60 | interface filter coefficients | [7:4] filter: 0..5 = input j I/Q as 2j, 2j+1; 6..9 = output j I/Q as 6+2j, 7+2j. [3:0] index | [11:0] |
| 61 | tap interpolation filter coefficients | [12:8] tap, [7] part, [6:0] index | [11:0] |
| 62 | tap registers | [12:8] tap, [1:0]: 0 input select (3 = none), 1 output bus, 2 delay | |
| 63 | control | [1:0]: 0 CMD (bit0 1 = start / 0 = stop, bit1 continuous), 1 log2 N, 2 LAST | |

Reset values:

- Taps have no input, bus 0 and delay 0.
- All filter coefficients are 0.
- N = 8, LAST = 262 143, stopped.

At start the scan address goes to 0. The first RAM word is read on the first f2 tick.

## How far this follows the original emulator

**Taken from the original:**

- the architecture: 3 inputs, 20 taps on 5 cards of 4, 2 outputs;
- the distributed multiplexers and adders;
- FIFO delays up to 80 µs;
- the converter rates;
- double-Nyquist I/Q detection and modulation by sign sequences and fractional-delay filters;
- 16/12/32-bit FIR precision;
- two-stage coefficient interpolation with p = 32, a 128-tap filter and N = 8…8192;
- 256 Kwords per RAM bank;
- single and continuous scan modes.

**This design's own choices:**

- One clock with enables instead of separate 40 / 20 MHz and variable clocks.
- The DSP bus, register map and reset values.
- Sample (16-bit), sum (24-bit) and coefficient (2.14) formats and all scaling shifts.
- The sign sequences are explicit sign stages. The original's filter device instead used two coefficient
  sets, one for even and one for odd samples. The result is identical.
- FIFO depth 2048 and the zero-until-filled rule.
- The TAP_IDX latency compensation.
- The programmable scan end (LAST) and no repeat at a turn.
- The internals of the programmable FIR: the original used a commercial part.

**Not in the RTL:**

- RF down/up converters, PLL reference, A/D and D/A converters;
- the programmable RF attenuators at the outputs, used for slow shadowing and power patterns;
- the DSP card, VME backplane and PC software that compute and load coefficients.

Those parts appear here only as ports: `adc`, `dac` and `bus`.

## Files

| File | Contents |
|---|---|
| `rtl/ce_pkg.sv` | widths, sizes, types, address map |
| `rtl/pdsp_fir.sv` | time-multiplexed programmable FIR |
| `rtl/iq_detector.sv`, `rtl/iq_modulator.sv` | input / output interfaces |
| `rtl/delay_fifo.sv`, `rtl/cmult.sv`, `rtl/coef_ram.sv`, `rtl/coef_interp.sv` | tap parts |
| `rtl/tap_circuit.sv`, `rtl/tap_card.sv` | one tap, four chained taps |
| `rtl/scan_ctrl.sv`, `rtl/control_card.sv` | rate generation, scan, registers |
| `rtl/channel_emulator.sv` | top |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_workloads.sv` | reference channel profiles on the full design |

Each testbench prints `TB_RESULT checks=… failures=…` and has a watchdog.

## End-to-end test

`tb_channel_emulator` runs the top with all parameters at their defaults. It checks:

- every input and both outputs, through taps at five chain positions (0, 3, 5, 10, 19), with impulses
  checked at the exact latency given above;
- a maximum-delay tap (τ = 1600);
- two taps adding on one bus;
- time-varying coefficients played back from RAM through the interpolator in continuous mode, including
  scan turns;
- a change of N;
- a single scan that stops by itself.

## Channel-profile test

`tb_workloads` runs reference channel profiles on the full design. The taps hold constant coefficients.

- **Two two-ray channels at the same time**, input 0 → output 0 and input 1 → output 1. Each has rays at
  0 and 10 µs. The second ray is 0.94·e^{j60°} of the first in one channel (minimum phase) and
  1.06·e^{−j45°} in the other (non-minimum phase).
- **A six-ray suburban profile** on input 2 → output 1, with rays at 0, 0.5, 5.25, 5.75, 6.75 and 9.1 µs.

Every D/A sample is compared with the exact signed response. A ray of delay τ and gain (re + j·im)/16384
gives, for an impulse of size A:

- an even D/A sample of s·re·A/8192;
- an odd D/A sample of −s·im·A/8192.

Here s = (−1)^(τ + NTAPS + 7). It is the sign the 10 MHz carrier picks up over the channel delay plus the
fixed pipeline latency. Each 50 ns sample of delay is half a period of the 10 MHz carrier, so each one
flips the sign.

## Simulating

With Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/ce_pkg.sv \
        rtl/channel_emulator.sv tb/tb_channel_emulator.sv \
        --top-module tb_channel_emulator -Mdir obj -o sim
    obj/sim

Replace the module names to run a unit testbench. `tb_tap_circuit` and `tb_tap_card` override the tap or
card index to test a position other than 0.

The full design holds 40 RAMs of 256 Kwords each. The simulator allocates about 20 MB for them.
