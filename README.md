# SLH-200 sensor hub: IBE, SIC and power management in SystemVerilog

An always-on sensor hub has to do two things cheaply. It has to watch its
sensors all the time, and it has to run short bursts of floating-point
arithmetic on what they report: Kalman filters for 6- and 9-axis sensor
fusion, and SVM or KNN classifiers for motion detection. The SLH-200 is a
microcontroller SoC built around a Cortex-M4F. This RTL contains the three
parts it adds to make that cheap:

- **IBE, the Intelligence Boost Engine.** A small FP32 accelerator with
  12 multiply-accumulate units. It runs the matrix and vector kernels of
  those algorithms, and it skips multiplications by zero elements of the
  left-hand matrix. That matters because about half of the sensor-fusion
  matrix entries are zero.
- **SIC, the Sensor Interface Controller.** A hard-wired state machine. It
  polls an I2C sensor on a timer and stores the samples in its own 1 KB
  dual-port SRAM. It takes commands from an external host over SPI. It can
  raise interrupts and change the chip's run mode while the CPU sleeps or is
  switched off.
- **PMU.** Implements five run modes (normal, low-power, sleep, down-active
  and power-down) as clock enables, power-domain switches, isolation and a
  CPU reboot.

The top, `slh200_top`, wires these together with the two 64 KB system SRAM
banks. The CPU, embedded flash, bus matrix and standard peripherals are
licensed IP. They are not included. Their connections are ports of the top.

## How the IBE multiplies matrices

The IBE uses a broadcasting scheme. Take the product R = A·B, with matrices
up to 12×12:

```
for each row i of A:
    clear all 12 accumulators
    for each k with A[i][k] != 0:          <- zero skipping
        broadcast A[i][k] to all PEs
        PE j receives B[k][j]  (row k of B, read in one cycle)
        PE j: acc += A[i][k] * B[k][j]
    write the 12 accumulators as row i of R (one cycle)
```

Each PE therefore builds one column of the result row. No partial sums move
between PEs. Zero skipping just means some elements are never broadcast.

A *zero-bit buffer* (`ibe_zero_buf`) keeps one flag per element of A. The
flag is updated on every write into A. While a row is processed, a priority
encoder in `ibe_ctrl` picks the next flagged element in the same cycle that
the current one is used. So a skipped element costs nothing.

A row costs 2 + max(1, nnz) cycles, where nnz is the number of non-zero
elements in the row (nnz = K when skipping is off). The extra one-cycle
minimum covers an all-zero row: it still needs one cycle to find out there
is nothing to do. The number of skipped elements is reported in `SKIPS`.

Mode 2 (A·Bᵀ, which is the SVM linear kernel) is identical except that PE j
receives B[j][k]. For that reason the matrix buffers are flip-flop arrays
with a whole-row read and a whole-column read, both combinational.

### Operating modes and their cost

| Mode | Operation | Busy cycles (this RTL) |
|---|---|---|
| 0 | R = A·B | Σ over rows of (2 + max(1, nnz)) |
| 1 | R = Aᵀ | K (one column per cycle) |
| 2 | R = A·Bᵀ | as mode 0 |
| 3 | R = s1·V | 2 per 12 elements |
| 4 | RES += V1·V2 | rows + 14 |
| 5 | RES = (s1·(V1·V2) + s2)^exp | rows + exp + 17 |
| 6 | RES += Σ (V1 − V2)² | rows + 14 |

Vectors of length L ≤ 144 are stored row-major in the A and B buffers,
12 elements per row.

Modes 4 to 6 work in five steps:
1. Clear the accumulators.
2. Accumulate one 12-element row per cycle into the 12 PEs.
3. Reduce the 12 partial sums into PE 0, one per cycle.
4. Add the previous RES (modes 4 and 6).
5. Store.

Mode 5 then multiplies by s1, adds s2, and raises the result to an integer
power by repeated multiplication. Because RES accumulates, software can
split vectors longer than 144 elements over several runs.

The figures that have been published for this engine count whole
software-driven runs. Those include the CPU's set-up and data movement, so
they cannot be compared with the busy cycles above. Loading one 12×12
operand with the DMA takes 290 cycles (2 per word plus 2).

### Arithmetic

`fp32_mul` and `fp32_add` are combinational IEEE-754 single-precision units:
- Rounding is toward zero.
- Denormal inputs and results are flushed to zero.
- Overflow gives infinity.
- Any NaN input gives the quiet NaN 0x7fc00000.

Round-to-zero keeps the adder small. Results can therefore differ from a
round-to-nearest CPU in the last bit.

Each PE (`ibe_mac`) finishes in one cycle and supports these operations:
- clear
- load
- `acc + a·b`
- `a·b`
- `acc + (a−b)²`
- `acc · a`

There is no pipelining. The clock rate this reaches was not a design goal.

### IBE register map (APB3, byte offsets)

| Offset | Name | Contents |
|---|---|---|
| 0x000 | CTRL | [0] start, [1] zero-skip enable, [6:4] mode |
| 0x004 | STATUS | [0] busy, [1] done (write 1 to clear), [2] DMA busy, [3] DMA done (W1C) |
| 0x008 | DIM | [3:0] M, [11:8] K, [19:16] N, [31:24] vector length L |
| 0x00C / 0x010 | SCALAR1 / SCALAR2 | FP32 |
| 0x014 | EXP | integer exponent for mode 5 |
| 0x018 | RESULT | scalar result of modes 4–6 (also its initial value) |
| 0x01C | CYCLES | busy cycles of the last operation |
| 0x020 | IRQEN | [0] done interrupt enable |
| 0x024 | SKIPS | elements skipped by the last operation |
| 0x030 | DMASRC | system byte address |
| 0x034 | DMABUF | [9:8] buffer (0 A, 1 B, 2 R), [7:0] first word |
| 0x038 | DMALEN | words |
| 0x03C | DMACTL | [0] start, [1] direction (1 = buffer to memory) |
| 0x400 / 0x800 / 0xC00 | A / B / R windows | word (row·12 + column) |

Buffer-window accesses get wait states (PREADY low) while the engine or the
DMA is busy.

The DMA moves one word at a time and has at most one read outstanding. It
shares each SRAM bank with the CPU port. The CPU always wins a conflict, and
the DMA waits.

## SIC: sensor monitoring without the CPU

The host talks to the SIC over SPI mode 0, MSB first, with SCLK at most
1/8 of the SIC clock. Every frame (one SS low period) starts with a command
byte:

| Code | Command | Following bytes |
|---|---|---|
| 0x10 | WRCFG | address, data |
| 0x20 | RUNMODE | mode (0 normal, 1 low-power, 2 sleep, 3 down-active, 4 power-down) |
| 0x30 | READ | address high, address low, then sensor-SRAM bytes are returned |
| 0x40 | STATUS | returns interrupt status (then cleared), run mode, write pointer high, low |
| 0x50 | MONITOR | [0] on/off, [1] rewind the write pointer |
| 0x60 | RDCFG | address, then the register is returned |

The configuration registers are:
- 0 DEV: I2C address
- 1 REG: first sensor register
- 2 NBYTES: bytes per sample
- 3 PERIOD: in units of 256 clocks
- 4 THRESH: samples before the data-ready interrupt
- 5 INTEN: interrupt enables

Each monitoring period runs one I2C sequence: START, DEV+W, REG, repeated
START, DEV+R, NBYTES reads, STOP. The bytes go into the sensor SRAM at a
wrapping write pointer. Host SPI reads of the SRAM take priority over
monitor writes. The MCU reads the same SRAM through the second port.

The I2C master (`sic_i2c_master`) works a byte at a time with open-drain
outputs. A byte takes 36·CLK_DIV + 2 clocks. It supports neither clock
stretching nor arbitration.

There are four interrupts, each AND-ed with INTEN:
- sensor data ready
- CPU wake-up
- power control
- run-mode change

Monitoring runs in normal, low-power and down-active modes. Sleep and
power-down are the SIC's stand-by modes.

## Run modes and power sequencing

| Mode | Clocks stopped | Domains off | Leaves by |
|---|---|---|---|
| normal | – | – | – |
| low-power | CPU, SRAM#0 | eFlash, IBE, SRAM#1 | exception, external event, SIC |
| sleep | CPU, SRAM#0, SRAM#1 | eFlash, IBE, SRAM#1 | exception, external event, SIC |
| down-active | – | eFlash, IBE, CPU, SRAM#0, SRAM#1 | SIC, then the CPU reboots |
| power-down | – | as down-active; SIC SRAM in retention | SIC, then the CPU reboots |

Switching a domain off is done in two steps:
1. Raise its isolation.
2. Remove power one cycle later.

Switching a domain on is done in three steps:
1. Apply power.
2. Wait PWR_DLY cycles.
3. Drop isolation.

The CPU reset is released one cycle after the CPU domain's isolation drops.

In the top, the IBE's reset follows its power switch. So after power comes
back, the IBE starts from reset values, and while it is off its APB port
reads zero. `user_clk_en` lets software gate the IBE, SRAM#0 and SRAM#1
clocks on top of this. The IBE clock passes through a latch-based clock gate
(`clk_gate`).

## Where this RTL departs from, or adds to, the source design

The source design gives these points:
- the mode list
- 12 MACs and the 12×12 size
- broadcasting and zero skipping
- the SIC's parts (SPI, I2C, 1 KB dual-port SRAM) and its command groups
- the five run modes and which clocks and domains each one stops

The following are this design's own choices:
- **Numbers and timing:** FP rounding, the PE operation set, loop order and
  cycle counts, and PMU timing.
- **Encodings and maps:** the register map and the SIC command codes and
  framing.
- **Bus behaviour:** DMA behaviour and SRAM arbitration.
- **Mode 5 exponent:** read as an integer.

These parts are left out:
- **Licensed or foundry parts:** the CPU, flash, bus matrix and peripherals.
- **Clocking and physical parts:** clock sources, power switches and pads.
- **Software frequency scaling:** the profile-driven scheme, which is an
  RTOS table driving a regulator and PLL.

The SIC runs on the same clock as the rest of the top. Its separate clock
source is not modelled.

Domain power follows the run mode only. Software cannot switch a single
domain on or off by itself; it can only gate the IBE and SRAM clocks
through `user_clk_en`. The source design's mode table also lists the eFlash
as power-controllable in normal mode. Here, every domain stays on in normal
mode.

## Files and simulation

`rtl/slh_pkg.sv` holds the shared types, modes, register offsets and
command codes. Every other file holds one module:
- IBE: `ibe_*`
- system SRAM: `sram_sp`
- SIC: `sic_*`
- `pmu`
- `clk_gate`
- `slh200_top`

Each test in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. `tb/tb_fp_pkg.sv` holds real-number
reference helpers for the FP tests. `tb/i2c_sensor_model.sv` is a
behavioural I2C sensor.

To build and run one test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/slh_pkg.sv tb/tb_fp_pkg.sv tb/tb_ibe_top.sv --top-module tb_ibe_top
./obj_dir/Vtb_ibe_top
```

`tb_slh200_top` runs the whole chip at its default sizes. It:
- DMA-loads sparse operands while the CPU contends for the same SRAM bank;
- runs all seven IBE modes and checks their results;
- has the SIC sample a sensor and raise data-ready;
- walks through all five run modes, including wake-up by exception and by
  event and a CPU reboot;
- checks IBE isolation, reset and clock gating.

It counts each of these events and fails if any did not happen. It runs in
about 15 seconds.
