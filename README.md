# Sensor node processor with adaptive hardware compression

A battery-powered wireless sensor node spends most of its energy on the
radio: sending one bit costs far more than computing on it. Neighbouring
sensor readings are strongly correlated, so compressing them before
transmission saves radio time and energy. On a small 8051-class
microcontroller, however, software compression is slow and costly. It can
even cost more energy, or add more latency, than it saves on air.

This RTL implements the on-chip part of a sensor node processor built around
that trade-off:

* a **compression accelerator (CA)**, a hardwired wavelet + run-length coder
  that works directly on the shared data memory while the processor sleeps
  or does other work;
* a small **CA bus** and **arbiter** through which the processor starts
  accelerators and shares the memory with them;
* an **online compression-ratio (CR) sensor** that measures how well the
  data are compressing;
* an **adaptive controller** that compares the measured CR with a reference
  CR0 and decides whether compressing pays off. It also adapts how often it
  re-checks: often while the answer is changing, rarely while it is stable;
* the processor's peripherals on a Wishbone bus: **SPI** to the radio
  transceiver, **I2C** to the sensor and a **UART** for debug output.

The 8051-compatible processor core, with its 32 KB code memory and 256 B
internal RAM, is not part of this RTL. The top level brings out its three
ports instead: a Wishbone master, a data-memory port and the CA bus.

## Block diagram

```
             processor (8051-class, external to this RTL)
      Wishbone master        data-memory port         CA bus (sel, ctrl, cfg / state)
            |                       |                         |
    +-------v--------+      +-------v-------------------------v------+
    | wb_interconnect|      |              ca_arbiter                |
    +--+-----+----+--+      |  normal mode: processor -> SRAM        |
       |     |    |         |  compression mode: active CA -> SRAM   |
     spi   i2c  uart        +---+------------------+------------+----+
   master master            |   | start/cfg/on     | mem port   |
       |     |    |         |   v                  v            v
   radio sensor  PC      sram_sp (8 KB)      ca_wavelet x N_CA --> cr_sensor x N_CA
                                                                      | CR
                                                adaptive_ctrl <-------+
                                                 (comp_en, sample interval, sample pulse)
```

All blocks share one clock (10 MHz in the original chip) and an active-low
asynchronous reset.

## The compression accelerator (`ca_wavelet`)

### Algorithm

The CA compresses a block of `len` one-byte readings `D(0..len-1)` in two
phases.

**Wavelet transform.** The integer 5/3 biorthogonal wavelet is computed with
the lifting scheme. For each pair of readings:

```
d(2n+1) = D(2n+1) - floor((D(2n) + D(2n+2)) / 2)      high-pass (detail)
s(2n)   = D(2n)   + floor((d(2n-1) + d(2n+1)) / 4)    low-pass (average)
```

Both divisions are arithmetic right shifts with no rounding offset. At the
ends the sequence is mirrored: `D(len) = D(len-2)` and `d(-1) = d(1)`. For
correlated data the high-pass values are small and often zero. With
`two_level` set, the low-pass half is transformed once more, giving a
coarser low-pass set and a second high-pass set.

**Encoding.** The coefficient sets are read back in this order:

1. the last level's low-pass set, each value as the difference from the one
   before (the first from 0);
2. the high-pass sets, from the last level to the first.

Each value becomes one or more bytes of a single token stream:

| token | meaning |
|---|---|
| `1rrrrrrr` | run of `r+1` zero values (1..128) |
| `0vvvvvvv`, `v != 0x40` | one value in -63..63, 7-bit two's complement (0 never appears: zeros are runs) |
| `0x40 hi lo` | escape: any other value as a 16-bit two's complement |

The stream is self-delimiting once `len` and the level count are known. A
decoder reads `len/2` values (one level) or `len/4 + len/4 + len/2` values
(two levels), undoes the low-pass differences and runs the inverse lifting
steps in reverse order.

### Memory use

The CA reads and writes only the shared SRAM. Coefficients are 16-bit
little-endian words in a scratch area at `cfg.work` that needs `3*len` bytes:

| area | contents |
|---|---|
| `work + 0 .. len-1` | first-level low-pass, `len/2` words |
| `work + len .. 2len-1` | first-level high-pass, `len/2` words |
| `work + 2len .. 2.5len-1` | second-level low-pass, `len/4` words (two levels only) |
| `work + 2.5len .. 3len-1` | second-level high-pass, `len/4` words (two levels only) |

The encoded stream goes to `cfg.dst`, and its length is in `out_len` when
the job ends. The worst case is three bytes per value, so allow up to
`3*len` bytes. `len` must be even, and a multiple of 4 for two levels.
Shorter jobs end at once with no output.

### Structure and timing

One state machine with a pair/element counter drives a small datapath. The
datapath holds three reading registers (even, odd, next even), the previous
high-pass value, two adders with shifters for the lifting steps, a
subtractor for the differences and comparators for the token choice. The
transform streams through memory: each reading is fetched once (2 cycles
for a byte, 3 for a word), and each pair costs a compute cycle and four
write cycles. Encoding costs 3 cycles per coefficient read plus one per
byte written. Measured totals are about 13-15 cycles per original byte for
one level and 16-19 for two levels, including encoding: 18 035 cycles for
1024 samples with two levels. The original chip's accelerator took about
6 µs per byte at 10 MHz (about 60 cycles), so this version is faster.

`en` low freezes the unit. This models a CA that the processor has switched
off to save static power. `in_byte` and `out_byte` pulse once for every
original byte read and every encoded byte written.

## CA bus protocol and memory sharing (`ca_arbiter`)

A job runs in five steps:

1. The processor puts the accelerator number on `sel` (`$clog2(N_CA)` bits).
   Only the selected CA is powered (`ca_on`).
2. It places the job (`src`, `dst`, `work`, `len`, `two_level`) on `cfg`.
3. It raises `ctrl`. On the rising edge the arbiter latches `cfg` and `sel`,
   and one cycle later pulses `start` to that CA.
4. The CA raises its State line, and the arbiter switches to compression
   mode. The SRAM port now carries only the CA's accesses. A processor
   access is held with `cpu_stall` until the mode ends; it is delayed, not
   lost. The processor can do other work or sleep meanwhile.
5. The CA drops State and pulses `done`. The arbiter returns to normal mode
   and sets that CA's bit in `ca_status`, which stays set until the CA's
   next start.

A `ctrl` edge while a job runs is ignored, and an assertion reports it. SRAM
read data have one cycle of latency and go to every user.

## Measuring the compression ratio (`cr_sensor`)

Each CA has a sensor that counts its original and encoded bytes. A `sample`
pulse from the adaptive controller closes the current window and starts a
new one. A serial restoring divider then computes `CR = out/in` in unsigned
Q2.8 format (256 = 1.0, saturating at 3.996). `cr_valid` comes 25 cycles
after the sample. A window with no input bytes repeats the previous ratio.

The accelerator reads all of a job's input before it writes any output, so
a window that ended in the middle of a job would see many input bytes and
few output bytes, and report a ratio that is far too low. The sensor has a
`hold` input, driven high from the start pulse to the end of the job. A
sample that arrives while `hold` is high is remembered and closes the
window when the job ends; the ratio then comes 25 cycles later. A window
therefore always holds whole jobs. Without this, a single mid-job reading
at `R_MIN` would be enough to flip the compression state.

The processor can also compute the ratio itself and supply it
(`sw_cr`, `sw_cr_valid`, `use_sw_cr`). The original chip did this, and the
dedicated sensor was its planned successor.

## Adaptive compression (`adaptive_ctrl`)

### The reference ratio CR0

Let `P` be power and `T` be time per byte, for the radio (RF) and for the
compressor (the CA or the processor). Compressing a byte and sending the
result costs `P_c*T_c + P_RF*T_RF*CR` in energy and `T_c + T_RF*CR` in time.
Sending it raw costs `P_RF*T_RF` and `T_RF`. Compression therefore pays off
below a break-even ratio:

* minimum energy: `CR_E = 1 - (P_c*T_c) / (P_RF*T_RF)`
* minimum latency: `CR_L = 1 - T_c / T_RF`
* minimum energy under a latency bound `LA` for `L` bytes:
  `CR_LA = (max(LA/L, T_RF) - T_c) / T_RF`, and `CR0 = min(CR_E, CR_LA)`.

These come from offline power and timing models of the node, so the
processor computes CR0 in software and supplies it on the `cr0` input.

### Tuning loop

The controller keeps two variables: the compression state `comp_en`, which
is off after reset, and the sampling interval `cur_inter`, which starts at
`R_MAX`. A timer pulses `sample` every `cur_inter` units. Each new ratio
that arrives is a decision point:

* If compression is on and `CR > CR0`, or off and `CR < CR0`, the current
  choice is wrong. If the interval is above `R_MIN`, it shrinks by `STEP`
  and the controller looks again sooner. If the interval is already at
  `R_MIN`, `comp_en` flips.
* Otherwise the current choice is right, and the interval grows by `STEP`
  up to `R_MAX`. This lowers the cost of checking while the data behave
  steadily.

So a change of data statistics must persist for
`(R_MAX - R_MIN)/STEP + 1` decisions before the state flips. This filters
out short CR spikes. The defaults are `R_MAX = 7 ms`, `R_MIN = 3 ms`,
`STEP = 1 ms`, with a 1 ms unit of 10 000 cycles at 10 MHz.
`ev_dec`, `ev_inc` and `ev_flip` pulse when each branch is taken.

`comp_en` is an output to the processor. The firmware decides whether to
send raw or compressed data; the RTL does not block the CA when `comp_en`
is low.

## Peripherals

The Wishbone bus (`wb_interconnect`) uses classic cycles with 8-bit address
and data. Address bits 7:6 select the slave. An unmapped address is
acknowledged with data 0. Each peripheral acknowledges one cycle after the
strobe and decodes address bits 1:0.

| base | block | registers (offset 0..3) |
|---|---|---|
| 0x00 | `spi_master` | DATA (write starts an 8-bit transfer, read gives last received), STATUS (bit 0 busy), DIV (SCLK half period - 1), CS (bit 0 pulls `cs_n` low) |
| 0x40 | `i2c_master` | PRE (quarter SCL period - 1, reset 100 kHz), TXD, RXD, CMD/STATUS (write: START, STOP, WRITE, READ, NACK bits; read: busy, slave NACK) |
| 0x80 | `uart` | DATA, STATUS (tx busy, rx ready, overrun), DIVLO, DIVHI (clocks per bit - 1, reset 115 200 baud) |

* **SPI:** mode 0, MSB first, 16*(DIV+1) cycles per byte. Software drives
  chip select so that multi-byte radio commands stay framed.
* **I2C:** open-drain pins (`*_oe` high pulls the line low). One CMD write
  runs an optional (repeated) START, one byte with its acknowledge bit, and
  an optional STOP. Clock stretching is honoured. There is a single master,
  so bus arbitration is not handled.
* **UART:** 8N1 frames, a synchronised receiver that samples mid-bit, and
  rejection of glitches and of frames with a bad stop bit.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `sensor_node_top`, `ca_arbiter` | `N_CA` | 1 | number of accelerators (the original chip has one) |
| `sensor_node_top`, `adaptive_ctrl` | `CYCLES_PER_UNIT` | 10000 | clock cycles per interval unit (1 ms at 10 MHz) |
| `adaptive_ctrl` | `R_MAX`, `R_MIN`, `STEP` | 7, 3, 1 | interval limits and step, in units |
| `sram_sp` | `DEPTH` | 8192 | data memory bytes |
| `cr_sensor` | `CNT_W` | 16 | byte counter width (windows saturate beyond 65 535 bytes) |

The shared types live in `rtl/sn_pkg.sv`: `mem_req_t`, `ca_cfg_t`, the
Wishbone structs and the CR format.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With
plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sn_pkg.sv $(ls rtl/*.sv | grep -v sn_pkg) \
  tb/wavelet_ref_pkg.sv tb/i2c_sensor_model.sv \
  tb/tb_sensor_node_top.sv --top-module tb_sensor_node_top
./obj_dir/Vtb_sensor_node_top
```

The package goes first because the other files import it. Replace the last
file and the top name to run any other testbench. All files build without
warnings.

| testbench | what it shows |
|---|---|
| `tb_ca_wavelet` | encoded streams and first-level coefficients against a software model; smooth, constant (runs > 128), noisy (escapes), one and two levels, minimum lengths; at most 60 cycles per byte |
| `tb_ca_arbiter` | protocol steps, mode switch, stalls, status bits, ignored restart, with two CAs; then 20 random jobs whose reads and writes are checked against a shadow memory while the idle CA and the stalled processor try to write |
| `tb_sram_sp` | full-memory write/read with one-cycle latency |
| `tb_cr_sensor` | ratio against exact division, saturation, empty windows, windows held over a job, latency |
| `tb_adaptive_ctrl` | every decision against a model of the tuning loop; sample spacing |
| `tb_wb_interconnect`, `tb_spi_master`, `tb_uart` | bus routing; peripherals against behavioural radio and PC models |
| `tb_i2c_master` | against a behavioural slave with 16 registers: address acknowledge and missing acknowledge, repeated START, clock stretching, SCL period, then 30 random multi-byte register writes and reads |
| `tb_sensor_node_top` | end to end with two CAs: I2C readings → SRAM → CA → SPI → UART report, while the adaptive loop switches compression on and off; counts that every mechanism occurred |
| `tb_sensor_node_full` | the default configuration: 1024 samples compressed with two levels, sent over SPI, and the first adaptive decision 7 ms after reset |
| `tb_workload_adaptive` | the default configuration on the latency-bounded stream: one simulated second of 250 KB arriving as 250 jobs of 1024 samples, one job every 4 ms, with calm (ratio about 0.15), moderate (about 0.6) and turbulent (about 1.0) data changing every 100 ms. It runs once for each latency bound of 7, 8, 9 and 11 us per byte, with `CR0 = (LA - T_c)/T_RF` for `T_c = 6 us` and `T_RF = 4 us`. Every job's output is checked against the model, and every job must end inside its 4 ms slot. At the end of each stretch, compression must be on if the stretch's ratio is clearly below CR0 and off if it is clearly above. The interval must return to `R_MAX` within each stretch. The testbench prints the latency per byte: raw 4.00 us, always compressed about 8.2 us, adaptive 5.1, 5.2, 6.5 and 8.1 us for the four bounds. It runs in about half a minute |

`tb/wavelet_ref_pkg.sv` holds the software reference of the coder and
`tb/i2c_sensor_model.sv` a behavioural I2C sensor.

## Where this RTL departs from, or goes beyond, the original design

* **Processor, code memory, internal RAM:** not included; their interfaces
  are top-level ports.
* **Wavelet coder details:** the token format, the low-pass differencing,
  the scratch-area layout, the rounding and the mirrored edges are choices
  made here. The source fixes only the 5/3 lifting equations and run-length
  coding of the high-pass values. The accelerator transforms whatever
  sequence is in memory: one node's readings over time, or readings of
  several nodes placed in node order. The multi-node scheme, where
  neighbouring nodes exchange partial coefficients over the radio, is
  network software and is not modelled.
* **One accelerator at a time:** several CAs can be attached, but only the
  selected one is powered and has the memory. Running several CAs at once
  would need arbitration between CAs for the single-port memory, which the
  original design leaves for later work.
* **Speed:** the accelerator is about four times faster per byte than the
  original. Energy and power figures of the original silicon cannot be
  taken from RTL.
* **CR sensor:** built as a dedicated block, which the original chip had
  only planned. Holding a window until the current job ends is this
  design's addition. The processor-supplied ratio path of the original chip is
  kept as an option.
* **CR0:** computed by software from the formulas above and supplied as an
  input; there is no hardware for the energy and latency models.
* **Handshake choices:** the edge-triggered `ctrl`, processor stalls during
  compression, the status bits and all register maps and bus widths are
  this design's own.
* **Buffer size:** the 8 KB memory holds one job of up to about 1.5 K
  samples (`len` + `3*len` scratch + output). Longer streams, such as a
  250 KB stream per second, are compressed as a sequence of jobs. At 10 MHz
  the accelerator's 14-19 cycles per byte stay within the 40 cycles per
  byte that such a stream allows.
