# Back-to-back OFDM transceiver: 8 subcarriers, QPSK, single-precision FFT

This design is a complete OFDM link on one chip, with the transmitter's output
wired straight into the receiver. Each frame carries one 16-bit data word:

1. The word is split into eight 2-bit groups.
2. Each group is mapped onto one of eight subcarriers as a QPSK symbol.
3. The frame is taken to the time domain by an 8-point inverse FFT.
4. It is sent as eight serial I/Q samples.
5. The receiver collects the eight samples again and brings them back to
   the frequency domain with an 8-point FFT.
6. It decides each symbol back into two bits.

The received word must equal the sent one. A counter provides the data:
frame k carries the word k. The eight most significant bits of the
received word drive eight LEDs. All arithmetic in the two transforms is
IEEE 754 single-precision floating point.

This is the test setup of an FPGA prototype. The radios that would sit
between the serial output and the serial input are left out. Three frame
rates, chosen by switches, give 8, 16 and 32 Mbit/s.

## Data path

```
 rate_sw ─► clock_divider ──tick──┬──────────────────────────────┐
                                  ▼                              ▼ load
            data_counter ─16b─► qpsk_framer ─8×cplx─► ifft8 ─► piso_frame ─┐
                                                                           │ ser_i, ser_q,
            led ◄─[15:8]── qpsk_deframer ◄─8×cplx─ fft8 ◄─ sipo_frame ◄───┘ ser_valid
```

| module | job |
|---|---|
| `clock_divider` | Divides the 33 MHz board clock by 2^n, with n = 4, 5 or 6. Gives a one-cycle `tick` per frame. |
| `data_counter` | 32-bit counter that advances on `tick`. Its low 16 bits are the data word. |
| `qpsk_framer` | Maps bits [2k+1:2k] to subcarrier k: 00 → 1, 01 → j, 10 → −1, 11 → −j. |
| `ifft8` | 8-point radix-2 inverse FFT with 1/8 scaling. |
| `piso_frame` | Parallel-in serial-out register: one complex sample per clock, sample 0 first. |
| `sipo_frame` | Serial-in parallel-out register: gathers eight samples into a frame. |
| `fft8` | 8-point radix-2 forward FFT, no scaling. |
| `qpsk_deframer` | Nearest-point decision of each subcarrier, then registers the 16-bit word. |
| `fp_butterfly`, `fp_add`, `fp_mul` | Radix-2 butterfly and single-precision adder and multiplier. |
| `ofdm_pkg` | Shared types: `fp32_t`, complex `cplx_t`, twiddle selection. Shared constants. |
| `ofdm_transceiver` | Top level, wiring the blocks above. |

## Rates and timing

The whole design runs on the board clock. The published design describes a
divided clock, `f = 33 MHz / 2^n`. Here that becomes a clock enable: `tick`
is high for one cycle every 2^n cycles. The square wave itself is also
available, on `frame_clk`. One 16-bit word is sent per period:

| `rate_sw` | n | frame rate | data rate |
|---|---|---|---|
| `1??` (32 Mbit switch) | 4 | 2.06 MHz | 33 Mbit/s |
| `01?` (16 Mbit switch) | 5 | 1.03 MHz | 16.5 Mbit/s |
| `001` or `000` (8 Mbit switch or none) | 6 | 0.52 MHz | 8.25 Mbit/s |

The nominal rates of 8, 16 and 32 Mbit/s assume an exact 0.5, 1 or 2 MHz.

On a tick, two things happen at the same clock edge:

- The IFFT of the counter's current word is loaded into `piso_frame`.
- The counter advances, and `tx_data` takes the word just loaded.

The eight samples then appear on `ser_i`/`ser_q` in the next eight cycles,
with `ser_valid` high. `sipo_frame` pulses `frame_valid` after the eighth
sample. `qpsk_deframer` registers the decision one cycle later. `rx_valid`
therefore pulses with the new `rx_data` **10 board cycles after the tick**.

The serial link is busy for 8 of the at least 16 cycles in a frame. Because
of this, a rate switch made at any time never makes frames overlap: every
tick falls where the low four counter bits are all ones.
`piso_frame` holds an assertion that a load never cuts off a frame that is
still being sent.

The IFFT, FFT, framer and decision logic are combinational. Between the
`tick` edge and the PS register there is the framer plus a full IFFT. A
single-cycle path therefore runs through three stages of floating-point
butterflies plus a scaling multiply. The FFT path is as long: from the SP
register, through the FFT and the decision logic, to the deframer register.
The design has no pipeline registers inside the transforms.

## The floating-point transforms

This is the part most worth understanding before changing anything.

**Structure.** Both transforms are radix-2 decimation-in-time networks:

- The inputs are taken in bit-reversed order (0, 4, 2, 6, 1, 5, 3, 7).
- Three stages of four butterflies each compute `p = a + W·b` and
  `q = a − W·b`.
- The twiddle of stage s (span 2^s) for butterfly k is `W_8^(4k/2^s)`. It is
  W^-k in the inverse transform.
- `ifft8` finally multiplies every output by 0.125, which is exact.

A butterfly with W = 1 uses no multiplier. One with W = ±j swaps the real
and imaginary parts and changes one sign, which is exact. Any other W
takes four multiplies and two adds:
`t.re = b.re·W.re − b.im·W.im` and `t.im = b.re·W.im + b.im·W.re`. Only
stage 3 has such general twiddles, W^1 and W^3.

**The twiddle is 0.707, not 1/√2.** The default `TWIDDLE` is
`32'h3F34FDF4`, the single-precision value of 0.707. The exact value
would be `32'h3F3504F3`. The published sample values can only come from
0.707. For example, −0.125·1.414 = `BE34FDF4` is printed in the transmitter
output for word 4. With this twiddle, the order of operations above and
correct rounding, the RTL reproduces bit for bit every published value that
was checked:

| word | signal | value |
|---|---|---|
| 4 | IFFT x(1), x(5) real | `BE34FDF4`, `3E34FDF4` |
| 9 | IFFT x(1) | `BE9A7EFA` + j`BD53F7D0` |
| 9 | IFFT x(0), x(6) | `3F200000` + j`3E000000`, 0 + j`3EC00000` |
| 4 | FFT X(1) | `391E5000` + j`3F7FF61B` |
| 9 | FFT X(1), X(5) real | `BF7FEC36`, `3F7FEC36` |

Because 2·0.707² = 0.999698 rather than 1, the twiddle is slightly off. A
subcarrier that passed through a general twiddle in both transforms comes
back at 0.9997 or 0.99985 in size. It also leaks about 1.5·10^-4 into a
neighbouring subcarrier. The decision logic does not care. Set
`TWIDDLE = 32'h3F3504F3` on `ofdm_transceiver` for exact twiddles.

**Arithmetic.** `fp_add` and `fp_mul` are combinational single-precision
units:

- They round to nearest, ties to even.
- Subnormal inputs count as zero, and results below the normal range are
  flushed to a signed zero.
- An overflow gives ±infinity.
- NaN inputs, inf − inf and 0·inf give `7FC00000`.
- An exact cancellation gives +0. The sign of zero is kept otherwise, as
  IEEE 754 requires.

The transceiver only ever sees zeros and magnitudes between about 10^-4
and 1. The special cases are therefore there for completeness, not for the
link.

## Symbol mapping and decision

The framer's table is fixed: 00 → 1 + j0, 01 → 0 + j1, 10 → −1 + j0,
11 → 0 − j1. Bits [1:0] go to subcarrier 0, so word 1 puts j on
subcarrier 0 and 1 on all others.

The deframer picks the nearest of the four points:

- If |re| ≥ |im|, the symbol is 1 or −1, by the sign of re.
- Otherwise it is j or −j, by the sign of im.

It compares magnitudes as the integers held in bits [30:0]. For IEEE 754
numbers these order exactly like the magnitudes. The test drives symbols
with up to ±0.4 of noise on each component.

## Where this RTL makes its own choices

The published design fixes these points:

- the chain of blocks
- 8 subcarriers, QPSK with the table above, and 16 bits per frame
- the 32-bit counter feeding 16 bits to the framer
- single-precision arithmetic
- the IDFT with 1/N scaling and the DFT without
- the divider formula and its three frequencies
- the LED connection

The following are this implementation's own choices:

- **Clocking.** One clock plus an enable, instead of clocking logic from a
  divider bit.
- **Serial format.** One whole complex sample, 2 × 32 bits, per board
  clock.
- **Latency.** 10 cycles; the transforms have no pipeline registers.
- **Handshakes.** `load`, `out_valid`, `in_valid` and `frame_valid`, with
  frame alignment counted from reset in `sipo_frame`.
- **Switch encoding.** The highest selected rate wins; no switch means
  8 Mbit/s.
- **Data bits.** The low 16 counter bits are the data word. The
  `DATA_LSB` parameter moves this window.
- **Decision rule.** The nearest-point rule and the output register in
  the deframer.
- **Reset.** Synchronous, active high, on every register.
- **Arithmetic.** Rounding mode, flush-to-zero and the handling of special
  values.
- **Transform order.** The decimation-in-time ordering. It is the order
  that reproduces the published values.

Not built:

- **Serial data ports of the general system.** In the full system the
  transmitter takes serial data and the receiver returns it serially. The
  test setup built here has the counter feed whole 16-bit words and takes
  the received words in parallel.
- **Radio transmitter and receiver.** They are analog, and the test setup
  leaves them out. The serial I/Q link is brought out as ports instead.
- **LED "display".** It is only a wire: `led = rx_data[15:8]`.

## Changing the design

- `TWIDDLE` on `ofdm_transceiver`, `ifft8` and `fft8` sets the size of the
  diagonal twiddles. The default 0.707 matches the published values;
  `32'h3F3504F3` gives exact twiddles.
- `DATA_LSB` selects which 16 of the 32 counter bits are sent. With 16,
  the LEDs show counter bits 31..24 and change slowly enough to watch.
- `N_32M`, `N_16M` and `N_8M` on `clock_divider` set the three division
  exponents. Keep n ≥ 3, because the serial link needs 8 cycles per frame;
  the assertion in `piso_frame` flags a violation.
- The transforms are combinational. To reach clocks well above 33 MHz, put
  pipeline registers between butterfly stages in `ifft8` and `fft8`. The
  latency in `tb_ofdm_transceiver` then has to change with them.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_fp_add`, `tb_fp_mul`: 20,000 random operands plus exact and
  special cases. The reference is the operation in double precision,
  rounded once to single. For +, − and × of single operands this gives the
  correctly rounded result (`tb/fp_ref_pkg.sv`).
- `tb_fp_butterfly`: all four twiddle kinds against the same reference
  arithmetic.
- `tb_qpsk_framer`: all 65,536 words.
- `tb_ifft8`: all 65,536 word frames, three checks each:
  - bit-exact against a reference model with the same order of operations
  - within 10^-3 of a direct inverse DFT in double precision with exact
    twiddles
  - the published values for words 4 and 9
- `tb_fft8`: random frames and IFFT frames, checked bit-exactly, against a
  direct DFT, and on the published receiver values.
- `tb_qpsk_deframer`: noisy symbols, valid timing and the hold of the word
  between frames.
- `tb_piso_frame`, `tb_sipo_frame`: order and timing of the samples, and
  frames back to back and with gaps.
- `tb_clock_divider`: tick period, square wave and switch encoding for
  every setting.
- `tb_data_counter`: counting against a model, and reset.
- `tb_ofdm_transceiver`: the whole design end to end, with every
  parameter at its default. It sends:
  1. all 65,536 words at 32 Mbit/s, until the 16-bit word wraps around
  2. 200 frames at 16 Mbit/s
  3. 200 frames at 8 Mbit/s
  4. 20 frames with no switch set

  For every frame it checks the received word, the 10-cycle latency, the
  2^n frame spacing, the eight-sample serial frames and the LEDs. It
  counts each rate, the rate switches and the word wrap-around, and fails
  if any of them never happened. It runs in a few seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_ofdm_transceiver \
  -y rtl -y tb +libext+.sv rtl/ofdm_pkg.sv tb/fp_ref_pkg.sv \
  tb/tb_ofdm_transceiver.sv -o sim
./obj_dir/sim
```

Any other testbench builds the same way with its own `--top-module` and
file. The RTL is plain SystemVerilog-2017. `ofdm_pkg.sv` has to be read
before the modules, and the testbenches also need `tb/fp_ref_pkg.sv`.
