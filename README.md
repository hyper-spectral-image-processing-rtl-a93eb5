# Daub4 wavelet and band-maximum accelerator for a DIMM-slot FPGA board

Analysing a hyper-spectral image (here 65 spectral bands of 460 x 400
pixels, used to find tumours in poultry) starts with a one-level 2-D
Daubechies-4 wavelet transform of every band. Only the low-pass/low-pass (LL)
quarter is kept. Each band is then normalised by its largest value. On a PC
these two steps take most of the time. This RTL moves their arithmetic onto an
FPGA board that plugs into a PC's SDRAM DIMM slot, so the host sees the board
as a small block of memory.

The board does the arithmetic only. The host streams data: for every pair of
neighbouring outputs it writes eight pixels, starts the board, and reads back
two filtered values plus the running maximum of the band. Which pixels go into
each window is the host's choice. That covers the decimation by two, the
wrap-around at the image edge, and the row pass followed by the column pass.
So the board needs only a 256-word exchange memory, however large the image.

The design follows a published thesis implementation on the "Pilchard" board
(Xilinx Virtex-E, 100 MHz DIMM clock). It is rewritten here in SystemVerilog.
The section "Departures from the original" lists the points where this RTL
makes its own choices.

## Hierarchy

```
pilchard              top: board pins, clocking
├── clk_div_en        divided clock, as a 1-in-8 clock enable
├── dimm_io           SDRAM command decode, pin registers
└── pcore             user core
    ├── dpram256_64   256 x 64 dual-port exchange RAM (A: host, B: controller)
    └── parith        eleven-state controller
        ├── fxmult    x2, low-pass Daub4 sum of four products
        └── max_unit  running signed maximum
```

`hsi_pkg` holds the shared types, the coefficients, the memory map and the
state encoding.

## The host's memory window

Words are 64 bits wide. Pixels are 32-bit signed fixed point with 10
fraction bits (Q22.10). A word holds two pixels, the first in bits [63:32].

| word | host access | contents |
|------|-------------|----------|
| 0, 1 | write | pixels s0..s3 of window A (s0,s1 in word 0; s2,s3 in word 1) |
| 2, 3 | write | pixels s0..s3 of window B |
| 4    | write | command: start one iteration (data ignored) |
| 5    | write | command: reset the controller (data ignored) |
| 6    | read / write | {counter[31:0], running maximum[31:0]} |
| 7    | read  | {result A, result B} |

A host sequence for one pair of outputs is: write words 0..3, write word 4,
then read word 7 and word 6. The controller adds one to the counter at the end
of every iteration. A host that wants a handshake can poll the counter. A host
that is slower than the board can simply read after a fixed delay. Before each
pass (or band) the host writes word 6 with the counter and maximum it wants to
start from, for example `{0, 0x80000000}`.

Only address bits 7..0 are decoded, so the window repeats every 256 words. On
the pins, address bits 7..4 are inverted by the board (see below).

## One iteration: the eleven-state schedule

This is the hardest part to follow. The controller `parith` advances once per
divided clock (12.5 MHz, one host cycle in eight). It reaches the RAM through
port B, which needs two controller cycles from issuing an address to holding
its data: the controller registers the address, then the RAM registers the
data. The schedule keeps that port busy every cycle, and overlaps the two
filter windows so that both fit in eleven states:

| state | port B address issued | data taken | arithmetic |
|-------|----|-----------|------------|
| S0  | – | – | idle; a pending start is taken here |
| S1  | 0 | – | |
| S2  | 1 | – | |
| S3  | 2 | word 0 → a0,a1 | |
| S4  | 3 | word 1 → a2,a3 | |
| S5  | 6 | word 2 → b0,b1 | fxmult A computes |
| S6  | – | word 3 → b2,b3 | result A ready |
| S7  | – | word 6 → counter, old maximum | fxmult B computes |
| S8  | 7, write | – | result B ready; both results go to the max unit |
| S9  | – | – | word 7 ← {A, B} written; max stage 1: larger of A, B |
| S10 | 6, write | – | max stage 2: against the old maximum; `finish` set |
| S0  | – | – | word 6 ← {counter+1, new maximum} written |

Port B's write enable is therefore high in S9 (word 7) and in the following
S0 (word 6). An assertion in `parith` checks that no other write happens. The
start is taken in S0 and `finish` rises as the machine returns to S0, ten
enables later. At the default division that is 80 host cycles. The word-6
write lands on the next enable. A start command that arrives while an
iteration runs is held, and runs as soon as the controller is back in S0.

## Filter arithmetic

The LL output uses the low-pass Daub4 filter along rows, then along columns:

    y[k] = h0*s[2k] + h1*s[2k+1] + h2*s[2k+2] + h3*s[2k+3]

Indices wrap around the end of the row or column. h0..h3 =
(1+√3, 3+√3, 3−√3, 1−√3)/(4√2). `fxmult` does not multiply fractions.
It holds the coefficients as 15-bit integers scaled by 2^13:

| | h0 | h1 | h2 | h3 |
|--|--|--|--|--|
| value | 0.48242 | 0.83654 | 0.22412 | −0.12939 |
| integer | 3952 | 6853 | 1836 | −1060 |

Each product then has 10 + 13 = 23 fraction bits. The sum is shifted right
arithmetically by 13, which rounds toward minus infinity, and bits [44:13] are
kept as the Q22.10 result. Overflow above bit 44 wraps. The register after the
adder is the unit's only pipeline stage.

Two worked examples serve as test vectors:
- pixels (0, 1.0, 0, 768.0), i.e. `0, 0x400, 0, 0xC0000`, give `0xFFFE75D8`;
- pixels (0, `0x60000000`, 0, 0) give `0x504F0000`.

`max_unit` compares signed values, so the negative first result loses to the
second.

## Board interface and clocking

`dimm_io` recognises the SDRAM READ command (chip select low, RAS high, CAS
low, WE high) and the WRITE command (the same with WE low) on the pins. It
turns each into a one-cycle strobe. Address and data pass through one register
each, like the I/O-block flip-flops of the board. Address bits 7..4 come in
inverted, so a host offset with those bits at `1111` reaches core words 0..15.
Read data goes onto the bus three cycles after the READ command: the pin
register, the RAM's registered read, then the output register. The output
enable `dimm_d_oe` rises in the same cycle. The bidirectional bus is split
into `dimm_d_i`, `dimm_d_o` and `dimm_d_oe`. Add the tri-state buffer at the
pad level.

The whole design runs on the one pin clock `clk`. The original board divides
the clock with the FPGA's DLL and clocks the controller and RAM port B from
that second clock. Here `clk_div_en` makes a one-cycle enable every `CLK_DIV`
(8) cycles instead. The controller and port B advance only on that enable.
This removes the clock-domain crossing for the start command. The divided rate
still matters on real hardware: the 32-bit datapath closed timing at about
14 MHz on the original device.

## Departures from the original

- **Read addresses.** The controller reads its pixels from words 0..3 and the
  old maximum from word 6, as the original's description of its schedule and
  its host memory map state. The original's code and waveform read words 4
  and 5 in their place. This RTL follows the description, because only then
  does the maximum carry over from one iteration to the next.
- **Counter.** Word 6's upper half is incremented each iteration. The
  original only says the counter tells the host when a transform is done.
- **Start and reset commands.** A start (write to word 4) is held until the
  controller takes it and runs exactly one iteration. A reset (write to
  word 5) returns the controller to S0, clears a held start and clears
  `finish`. It does not touch the RAM. Command writes also store their data
  word in words 4 and 5.
- **Single clock with an enable** in place of the DLL-divided clock (above).
- **RAM behaviour** where the original is silent: both ports read-first. If
  both ports write one word in the same cycle, port B wins. Contents are
  not initialised.
- **Pipeline registers.** Both fxmult units and the max unit are registered
  in the stages the schedule needs. The original's arithmetic processes are
  written without clock edges.
- **Not built:** the clock DLL, global buffers and startup block (vendor
  primitives); the data-mask, external-header and configuration pins (unused
  by the core); the host software and the multi-board task distribution; and
  the 16-bit comparison version, which packs four 16-bit pixels per word and
  uses words 0, 1 and 6 only.

## Throughput

One iteration takes 11 controller cycles, which is 0.88 µs at 12.5 MHz. A
band needs 46,000 row iterations and 23,000 column iterations, so the
65-band image needs 4,485,000 iterations. With the host keeping the board
busy back to back, that is 3.95 s of controller time. In practice the
board is limited by how fast the host can write and read over the memory bus.
Several boards can each take a share of the bands without any change to the
design.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The shared pieces are `tb_ref_pkg`, the
reference arithmetic written independently of the RTL, and `dimm_host`, a
behavioural model of the host memory bus that issues SDRAM commands.

| testbench | what it covers |
|-----------|----------------|
| `tb_fxmult` | worked examples, edge and random vectors, floor rounding against floating point, latency, hold |
| `tb_max_unit` | signed comparisons, worked example, latency |
| `tb_dpram256_64` | random two-port traffic against a model, read-first, enable, collision |
| `tb_clk_div_en` | enable period for DIV = 8, 5, 1 |
| `tb_dimm_io` | command decode, address inversion, read timing and output enable |
| `tb_parith` | results, counter, maximum, 11-state timing, state order, reset mid-iteration |
| `tb_pcore` | read latency, address aliasing, start and reset commands, held start |
| `tb_pilchard` | whole board through its pins at default parameters; counts each mechanism (iteration, maximum replaced or kept, negative result, held start, reset command) |
| `tb_band_dwt` | a full 460 x 400 band: 69,000 iterations, row and column passes, band maximum (also against the stored LL image), counter, one `finish` pulse per iteration |

With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pilchard \
  rtl/hsi_pkg.sv tb/tb_ref_pkg.sv rtl/fxmult.sv rtl/max_unit.sv rtl/parith.sv \
  rtl/dpram256_64.sv rtl/pcore.sv rtl/dimm_io.sv rtl/clk_div_en.sv \
  rtl/pilchard.sv tb/dimm_host.sv tb/tb_pilchard.sv
./obj_dir/Vtb_pilchard
```

Replace the top module and the last file for other testbenches; unit
testbenches need only their module and its submodules. The full-band test
runs in a few seconds. All of the 65-band image has not been simulated; one
band takes about 4 s, so 65 would take about 5 minutes.

## Changing it

- `CLK_DIV` on `pilchard` sets the controller's division. The schedule does
  not depend on it.
- The memory map, pixel format and coefficients live in `hsi_pkg`. A
  different width needs matching changes to the word packing in `parith`.
- Lint warnings that remain are intentional. The unused upper address bits
  follow the original decode. The unused sum bits are the discarded overflow.
  The assertions' `disable iff (rst)` makes Verilator report the reset as
  used both synchronously and asynchronously.
