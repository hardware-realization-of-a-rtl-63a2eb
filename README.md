# A sequential 1024-point FFT processor on a shared system bus

This is SystemVerilog for a small spectrum-analysis system built around a
*sequential* FFT processor: one multiplier-accumulator computes every
butterfly of a 1024-point radix-2 transform, one butterfly every 64 clocks,
working in place on a data memory that it shares with the rest of the system.
At the 12.5 MHz clock of the published design a full transform takes
10 × 512 × 64 = 327 680 clocks, which is 26.2 ms. The rest of the system feeds the
processor and reads its results over one common bus: a data acquisition
unit writes samples into memory, the processor transforms them, and a
magnitude unit reads the spectrum out for display.

The architecture follows a published design (a TTL/PROM processor next
to an 8086 host). The block structure, the sizes (1024 points, 12-bit data
path, 16-bit memory words, 8-bit twiddle factors, 64 clocks per butterfly),
the butterfly equations, the latch and control-signal names, and the
magnitude approximation come from that design. Many details were never
published, so they are this implementation's own choices. They are marked
below and in the opening comment of each file: the cycle-by-cycle control
program, the number format, the scaling and all interfaces.

## The system and its three phases

```
 smp_* ──► io_port ──► dau ─┐                       ┌─► mag_unit ──► io_port ──► disp_*
                            │   system_bus ──► data_memory (2 pages × 1024 × 16)
 host_* ────────────────────┤                       │
                            └── fft_processor ◄─────┘
                 bus_scheduler hands the bus to one master at a time
```

`fft_system` (the top) runs one *processing cycle* per `start` pulse. The
`bus_scheduler` gives the bus to each unit in turn:

1. **Acquisition.** Sample pairs `{smp_re, smp_im}` arrive with `smp_valid`
   and go into a one-word I/O port. The `dau` takes each pair and writes it
   to the word address `bitrev(n)`. The real part goes to page 0 and the
   imaginary part to page 1 at the same address. The two channels can be
   two independent real signals, which are then transformed together. Each
   sample takes three clocks. A sample that arrives while the port is still
   full is lost and sets `overrun`, which stays set until the next `start`.
2. **Transform.** `fft_processor` runs for exactly 327 680 clocks. The
   transform phase lasts two clocks more, for the start and done pulses.
3. **Display.** `mag_unit` reads bins 0 to 1023 in natural order. For each
   bin it computes |X| ≈ L + 3/8·S, where L is the larger and S the smaller
   of |Re| and |Im|. It passes `{bin, magnitude}` to the display port, which
   appears as `disp_valid/disp_index/disp_mag`, and it waits while
   `disp_ready` is low.

Between cycles the host owns the bus through `host_addr/host_we/host_wdata`.
It can read the result through `host_rdata`, which is the memory's
asynchronous read data. Address bit 10 selects the imaginary page. `phase`
shows the bus owner: 0 host, 1 acquisition, 2 transform, 3 display.

In the published system the host CPU did the scheduling and the magnitude
computation in software, and it also did the bit reversal. Here small
hardware units do these jobs, so the design runs without a CPU model. The
CPU, the A/D converter and the monitor are outside the RTL.

## Inside the processor

```
counter_chain ─► cyc ─► bfly_ctrl_gen (64-word control PROM) ─► control word
      │
      └► stage, bfly ─► mem_addr_gen ─► node addresses k, k+2^s
                     └► twiddle_addr_gen ─► p ─► sincos_lut ─► cos, sin (8 bit)

memory data (12 bits) ─► input_latches (X2 Y2 X1 Y1) ─► arithmetic_unit ─► memory
                                                        (X latch, Y latch, MAC,
                                                         scaled/saturated output)
```

The `counter_chain` has three cascaded counters. They count the clock
within the butterfly (0–63), the butterfly within the stage (0–511) and the
stage (0–9). The published design stored its addresses, twiddles and
controls in bipolar PROMs addressed by these counters. Here the address
tables are computed with shift-and-mask logic, which gives the same
contents. The sin/cos table and the control PROM are constant ROMs that are
computed when the design is elaborated.

### Ordering: bit-reversed in, natural out

The DAU stores samples in bit-reversed order. The transform is a
decimation-in-time transform done in place. At stage `s` (counting from 0),
butterfly `b` pairs word `k` with word `k + 2^s`, where

    j = b mod 2^s,   k = (b >> s)·2^(s+1) + j,   twiddle W^p with p = j·2^(9−s)

The spectrum therefore ends up in natural order. The published butterfly
equation writes the partner as `k + N/2^m`. That is the same pairing with
the stages counted from the other end. The order used here is the one that
matches bit-reversed input.

### One butterfly = one 64-clock program

With W^p = cos θ − j sin θ, each butterfly computes:

    X1' = (X1 + X2 cos θ + Y2 sin θ)/2      Y1' = (Y1 − X2 sin θ + Y2 cos θ)/2
    X2' = (X1 − X2 cos θ − Y2 sin θ)/2      Y2' = (Y1 + X2 sin θ − Y2 cos θ)/2

The control word (`fft_pkg::bfly_ctrl_t`) uses the published signal names.
REG1–4 load the latches of X2, Y2, X1 and Y1. OD1–4 put one latch on the
multiplier's operand bus. CLK IN loads the X and Y latches. ACC and SUB
select accumulate or load, and add or subtract. CLK OUT updates the
accumulator. Which signal is active in which clock is this design's own
choice:

| clocks | action |
|---|---|
| 0–3 | read X1, Y1 (word k) and X2, Y2 (word k+2^s) into latches 3, 4, 1, 2 |
| 4–7 | X1' : three CLK IN (operand and coefficient), each followed one clock later by a CLK OUT with ACC/SUB |
| 8 | write X1' to page 0, word k |
| 9–13, 14–18, 19–23 | the same for Y1', X2', Y2' |
| 24–63 | idle (keeps the published 64-clock frame) |

The result is written over the operands, which stay in the latches until
the whole butterfly is done. This is why the computation can be in place.

### The Y-latch coefficient and the scaling

This is the least obvious part. The published diagram builds the 12-bit
multiplier coefficient from bit fields. Bits are numbered 1 (MSB) to 12:
bit 1 is the twiddle sign, bits 2–3 come from a multiplexer, bits 4–10 are
the twiddle bits through an AND gate, and bits 11–12 are tied to 0. The
multiplexer has three inputs: the constant `01`, the constant `10`, and the
sign bit. This design places the binary point after bit 2, so the
coefficient value is `Y / 1024`:

| `coef_sel` | bits 1..12 | value |
|---|---|---|
| `COEF_ONE` (`01`) | `0 01 0000000 00` | 0.5 |
| `COEF_TWO` (`10`) | `0 10 0000000 00` | 1.0 |
| `COEF_TW`, code t | `s ss t6..t0 00` | t/256 = (t/128)/2 |

The operand X1 or Y1 is multiplied by 0.5, and the twiddle t/128 appears
halved. As a result every butterfly output is divided by 2, so ten stages
of 12-bit data cannot grow out of range. The output is DFT/1024. The
accumulator is divided by 1024, truncated toward −∞ and saturated to 12 bits.
Saturation can still happen, because the real part of X1 + W·X2 can reach
(1+√2)/2 of full scale. `sat_event` flags it. The `10` (1.0) input is built
and tested, but the FFT program does not use it.

### Twiddle table and the unity substitution

`sincos_lut` returns round(128·cos θ) and round(128·sin θ) as 8-bit two's
complement values, for θ = 2πp/1024 and p = 0 to 511. The value +1.0 (code
128) does not fit in 8 bits. The table returns a flag for it instead, and
the processor then selects the `01` constant. That constant is exactly the
halved +1, because 128/256 = 0.5. This happens for W^0 in every stage, for
the sine of W^256, and for values next to them that round to 1.

### Accuracy

With 8-bit twiddles and truncation in ten stages, the outputs agree with a
double-precision DFT/1024 to within about 5 LSB for full-range inputs. The
testbenches check this at 8 LSB. They also compare every output bit for bit
against an independent fixed-point model of the equations above.

## Timing summary

| quantity | clocks | at 12.5 MHz |
|---|---|---|
| butterfly | 64 | 5.12 µs |
| 1024-point transform | 327 680 | 26.2 ms |
| acquisition, per sample (internal) | 3 | 0.24 µs |
| display, per bin (port always ready) | 4 | 0.32 µs |

The published design reports 26.3 ms per transform and real-time operation
up to 20 kHz sampling. 1024 samples at 20 kHz take 51.2 ms. In this system
acquisition and transform run one after the other on the shared bus. Any
overlap across cycles is up to whatever drives `start`.

## Departures from the published design

* Bit reversal, bus scheduling and the magnitude computation were host
  software in the published design. Here they are hardware: the bit-reversed
  counter in `dau`, `bus_scheduler` and `mag_unit`.
* Tri-state buses (latch outputs, output latch, system bus) are
  multiplexers. An assertion in `input_latches` checks the one-driver rule
  that the tri-state bus relied on.
* The twiddle exponent is formed from the stage and butterfly counters
  directly. The published block diagram draws the twiddle address generator
  behind the memory address generator. The exponent is the same either way.
* The published 16-bit memory words carry 12-bit data, stored
  sign-extended. Bits 15–12 are ignored when read.
* The control-program slots, the coefficient number format, the per-stage
  halving, the truncation and saturation, the accumulator width (27 bits),
  and all handshakes and reset behaviour are this design's own choices.
* Not built: the separation of the two real spectra after a joint
  transform. The published design mentions this step but does not describe
  it. The display shows the magnitude of the joint spectrum, so a real
  signal in the real channel appears at bins f and 1024−f.

## Files

Each file holds one module or package, named after the file.

| file | role |
|---|---|
| `rtl/fft_pkg.sv` | sizes, control-word struct, coefficient and bus-owner enums, control program builder, `bitrev` |
| `rtl/fft_system.sv` | top: scheduler, bus, memory, DAU, processor, magnitude unit, two I/O ports |
| `rtl/fft_processor.sv` | the processor |
| `rtl/counter_chain.sv` | clock/butterfly/stage counters, start/busy/done |
| `rtl/bfly_ctrl_gen.sv` | 64-word control PROM |
| `rtl/mem_addr_gen.sv`, `rtl/twiddle_addr_gen.sv` | node addresses, twiddle exponent |
| `rtl/sincos_lut.sv` | 8-bit cos/sin ROM with unity flags |
| `rtl/input_latches.sv` | the four operand latches |
| `rtl/arithmetic_unit.sv`, `rtl/mac_unit.sv` | X/Y latches, coefficient multiplexer, 12×12 multiplier-accumulator, output scaling |
| `rtl/data_memory.sv` | two-page memory, asynchronous read |
| `rtl/system_bus.sv`, `rtl/bus_scheduler.sv` | bus multiplexer and phase sequencer |
| `rtl/dau.sv`, `rtl/io_port.sv`, `rtl/mag_unit.sv` | acquisition, one-word ports, magnitude |

Parameters `LOG2N`, `DW`, `MW`, `CYC_W`, `TW_W` and `ACC_W` default to the
values above. The processor and its generators accept a smaller `LOG2N`,
which the block testbenches use. The arithmetic unit's bit-field layout
assumes `DW = 12` and `TW_W = 8`.

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv rtl/*.sv \
          tb/tb_fft_system.sv --top-module tb_fft_system -Mdir obj
./obj/Vtb_fft_system
```

Replace `tb_fft_system` with another testbench name to run it.
`tb_fft_system` runs the whole system at full size, without changing any
parameter, through three processing cycles. It takes about 2 s of wall
time:

1. A 1 kHz sine and a 3.3 kHz sine, one per channel, sampled in real time
   at 10 kHz (one sample every 1250 clocks).
2. A 200 Hz square wave and a noisy linear-FM sweep around 3.5 kHz, with a
   burst that overruns the acquisition port.
3. A record that makes the processor saturate.

It compares every displayed magnitude with a bit-exact model and checks the
tone peaks and the transform length. It also checks that host access,
overrun, unity twiddles, saturation, display stalls and all four bus phases
occurred. `tb_fft_processor` tests the processor alone at full size against
the bit-exact model and a floating-point DFT. The other testbenches cover
one block each.
