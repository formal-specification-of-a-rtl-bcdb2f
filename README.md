# A 32-lag, 2-bit digital correlator

This correlator was designed for a spectrometer. It takes two streams of 2-bit samples, A and B,
one sample pair per clock (the target rate is 25 MHz). For each of 32 lags it sums the product of
a delayed A sample and the current B sample over an integration period. When the period ends, the
32 sums move into a bank of result registers and a `datardy` flag rises. The next period starts
on the following clock. While it runs, an external reader pulls the previous results off a 16-bit
port, either one word or one byte per strobe. The Fourier transform of these lag sums gives the
cross-power spectrum of the two signals. That step happens off chip.

The RTL is written as two small interpreters that share one register bank:

```
   a, b, rn, intg                         rn, byte_mode, outck
        |                                         |
  +-----v------+      dump, counts      +-----------------+      start_read / end_read
  |   INT      |----------------------->|    sr_link      |<-----------------------+
  | interpreter|                        | sr[32] datardy  |                        |
  | delay line |                        | begin_rd        |---sr, flags--> +-------+------+
  | 32 channels|                        +-----------------+                | IO           |--> out[15:0]
  +------------+                                                           | interpreter  |
                                                                           +--------------+
```

* **INT** is the producer. It owns the delay line, the accumulators and the counters.
* **IO** is the consumer. It owns the output counter, the output register and the byte/word flag.
* **sr_link** holds what the two share: the result registers and the `datardy` and `begin_rd` flags.

## Sample format and the biased product (`bmult`)

A sample is `{sign, magnitude}`. Sign 1 is negative. Magnitude 0 is level 1 and magnitude 1 is
level 3, so a sample takes one of the values -3, -1, +1 and +3. The product of two samples is
±1, ±3 or ±9. Adding a bias of 9 makes every product non-negative, so unsigned adders can sum
it. The biased product is one of 0, 6, 8, 10, 12 or 18 (5 bits).

The architecture only needs the product to be biased. The levels, the bias and the encoding are
this implementation's own choice: it uses the common four-level scheme. All three are set in
`corr_pkg` (`HI_LEVEL`, `BIAS`). To get the true correlation of a lag from its sum S over
L clocks, compute S - 9·L and apply the usual four-level correction.

## Integration: delay line, accumulator and counter

* `delay_line` is a chain of 32 two-bit registers fed by stream A. Tap n holds A from n+1 clocks
  ago, so channel n (counted from 0) correlates A(t-n-1) with B(t). That makes the lags 1 to 32.
  The line shifts on every clock, including the clock that ends a period. The lag history is
  therefore correct from the first clock of the next period.
* `corr_channel` adds each biased product to a **4-bit accumulator**. The carry out of that
  addition (0, 1 or 2) goes into a **24-bit counter**. Together, `{count, acc}` is the exact
  running sum. The counter alone is that sum divided by 16, and it is the counter that becomes
  the result. The counter wraps at 2^24. In the worst case (every product 18) that takes about
  14.9 million clocks, or 0.6 s at 25 MHz. Keep integration periods shorter than that, or accept
  the wrap.
* `int_interp` picks one instruction per clock, in this priority order:

| instruction | condition | effect |
|---|---|---|
| reset | `rn` | clear the delay line, the accumulators and the counters |
| dump | `intg` | `dump` pulse: the counters go to `sr`; then clear the accumulators and counters |
| integrate | otherwise | every channel adds its biased product |

The counters are registered. A dump on clock t therefore hands over the sums of every clock up
to t-1. The products formed on the dump clock itself are dropped.

## The shared state (`sr_link`) and how the interpreters hand over

The two interpreters never talk directly. They only read and write these three shared items:

* `sr[32]`: the 24-bit result registers. INT's dump loads all 32 in parallel.
* `datardy` is set by the dump and cleared by IO's `end_read`. It is the chip's output.
* `begin_rd` is also set by the dump. IO's `start_read` clears it. It marks results that are
  new and not yet read.

Priority per clock: `rn`, then dump, then `start_read`/`end_read`. The flag priorities decide
what happens in the two cases where the producer and the consumer collide:

* **A dump while a read is in progress.** The new results overwrite `sr` and `begin_rd` rises
  again. IO then restarts its read from the top, on the new data. Whatever was left of the old
  read is lost. Only the values already transferred are from the old period. To avoid this, make
  the integration period longer than a read.
* **A dump on the same clock as `end_read`.** The dump wins and `datardy` stays high, so a set of
  results is never reported as read before it has been read.

`datardy` rises on the clock after `intg`. A real implementation of this chip might add
pipeline delay here (several clocks between the end of a period and data being readable). This
RTL models the architectural one-clock behaviour only.

## Read-out (`io_interp`)

IO picks one of six instructions per clock, in this priority order:

| instruction | condition | effect |
|---|---|---|
| reset | `rn` | `counter`, `out` and `borw` to 0 |
| start_read | `datardy & begin_rd` | `borw <= byte_mode`; `counter <=` 32 (words) or 64 (bytes) |
| end_read | `datardy & counter == 0` | `datardy` falls |
| dump_byte | `datardy & borw & outck` | one byte on `out`, `counter--` |
| dump_word | `datardy & ~borw & outck` | one word on `out`, `counter--` |
| noop | otherwise | hold |

Number the result registers 1 to 32. A word transfer with counter value i puts bits 23:8 of
register i on `out`. The 8 least significant bits of each result are not read out. Channels
therefore leave in the order 32, 31, …, 1. In byte mode the counter runs from 64 to 1. Counter
value c reads register (c+1)/2: an even c gives bits 23:16 and an odd c gives bits 15:8. That
sends the high byte of each register first. The byte appears on `out[7:0]` and `out[15:8]` is
zero. `byte_mode` is only sampled at `start_read`, so it can change during a read without effect.

`outck` is a level sampled on the system clock: every clock with `outck` high moves one value.
A word read therefore takes at least 34 clocks after `datardy` rises. That is one start clock,
32 transfers and one end clock. A byte read takes at least 66.

## Interface of the top (`correlator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock (25 MHz target) |
| `rn` | in | 1 | synchronous reset, active high |
| `intg` | in | 1 | high for one clock to end the integration period |
| `a`, `b` | in | 2 each | sample streams; `a` is delayed, `b` is not |
| `byte_mode` | in | 1 | 1 = byte serial read, 0 = word serial |
| `outck` | in | 1 | transfer strobe |
| `out` | out | 16 | output register, updated the clock after each transfer |
| `datardy` | out | 1 | results waiting to be read |

Typical sequence: hold `rn` for one clock, then stream samples. Pulse `intg` to end the period.
On the next clock `datardy` is high and IO executes `start_read`. Raise `outck` for 32 (or 64)
clocks and take `out` one clock after each. `datardy` falls one clock after the last transfer.

## What follows the architecture and what is chosen here

These parts follow the design description:

* the sizes: 32 channels, 2-bit samples, 4-bit accumulators, 24-bit counters and result
  registers, a 7-bit output counter and a 16-bit output register;
* the two interpreters that share the result registers and `datardy`;
* INT's integrate and dump, and IO's six instructions with their priority order;
* the word transfer of bits 23:8 of register i, counting down;
* `datardy` set by the dump, cleared at the end of a read, rising one clock after `intg`.

These parts are this implementation's own choices:

* the sample levels and the bias;
* the counter taking the accumulator's carries;
* A as the delayed stream, and the lags 1 to 32;
* the `begin_rd` flag;
* the transfer counts and the byte order and lane;
* the reset values;
* a single clock shared by both interpreters, with `outck` as a strobe;
* the dump winning over a simultaneous `end_read`.

The design also leaves out two things:

* The result registers are loaded and read in parallel. They are never shifted.
* There is no extra delay between the end of a period and `datardy`.

Each file's header comment lists the choices that apply to it.

## Files

* `rtl/corr_pkg.sv`: sizes, sample and product types, instruction enums.
* `rtl/bmult.sv`, `rtl/delay_line.sv`, `rtl/corr_channel.sv`, `rtl/int_interp.sv`: the producer.
* `rtl/sr_link.sv`: the shared state, with assertions on the handshake.
* `rtl/io_interp.sv`: the consumer.
* `rtl/correlator.sv`: the top.
* `tb/<module>_tb.sv`: one self-checking testbench per module. Each ends by printing
  `TB_RESULT checks=N failures=M`.

## Simulating

Each testbench builds with plain Verilator 5. The package must come first:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/corr_pkg.sv tb/correlator_tb.sv --top-module correlator_tb
./obj_dir/Vcorrelator_tb
```

For another module, use `tb/<module>_tb.sv` and `--top-module <module>_tb`.

The testbenches check against independent models, not against the RTL's own structure:

* `correlator_tb` runs the top at full size. It uses 17 integration periods, one of them
  200,000 clocks long so that the upper counter bits are reached, and alternates word and byte
  reads. It also causes a dump in the middle of a read and a reset in the middle of a read. It
  keeps a lag-by-lag integer model and checks every transfer on `out` and `datardy` on every
  clock. It counts each interpreter instruction and fails if any never happened. It runs in
  about 15 s.
* `int_interp_tb` checks all 32 offered counters at every dump.
* `io_interp_tb` checks word and byte order, the transfer count, the end-of-read timing, a
  restart and a reset.
* `sr_link_tb`, `corr_channel_tb`, `delay_line_tb` and `bmult_tb` (exhaustive) cover the
  smaller blocks.

## Changing it

* The sizes live in `corr_pkg`. The modules below the top also take `N`, `AW` and `CW` as
  parameters.
* `io_interp` assumes results at least 16 bits wide (`CNT_W >= OUT_W`). It also needs a counter
  wide enough for `2*N`.
* Different quantiser levels only need `HI_LEVEL` changed. `BIAS` and the product width follow
  from it. The carry into the counter widens on its own.
