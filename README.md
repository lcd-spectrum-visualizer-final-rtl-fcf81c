# SPI-attached 32-point FFT for an audio spectrum display

This is the FPGA half of a live audio spectrum visualizer. A microcontroller
samples a microphone at 2 kHz and keeps the latest 32 samples. For every
display refresh it sends those samples to the FPGA over SPI. The FPGA computes
their 32-point FFT and sends back 32 complex results. The microcontroller then
turns the magnitudes of bins 0..15 into 16 bar heights on a 128 x 128 LCD,
each bar 62.5 Hz wide.

The RTL here is the FPGA part: an SPI slave, two ping-pong data RAMs, a twiddle
ROM, a radix-2 butterfly and the address generator that sequences them. The
microcontroller, the microphone and the LCD controller are off-the-shelf parts
running firmware, so they are not part of the RTL. The top-level testbench
contains a small model of the microcontroller's SPI master.

## Number format

Every value is a signed 16-bit **Q5.10** number: a sign bit, 5 integer bits
and 10 fraction bits. 1.0 is `16'h0400` and the range is [-32, 32). A complex
value is one 32-bit word: the real part in bits 31:16 and the imaginary part
in bits 15:0.

The host sends raw 10-bit ADC codes (0..1023). Read as Q5.10, they are values
in [0, 1). The 5 integer bits give room for the FFT's bit growth. A sum of 32
inputs is at most 31.97, so bin 0 cannot overflow for ADC input. Signed input
has no such guarantee: sums and differences wrap at 16 bits, and nothing
saturates.

## Host protocol (SPI mode 0, MSB first)

| step | host does | FPGA does |
|---|---|---|
| 1 | raise `load`, then `ce` | resets the sequencer and the sample counter |
| 2 | send 32 16-bit samples, x[0] first | writes `{x[k], 16'h0}` to address `bitrev5(k)` of **both** RAMs |
| 3 | drop `load` | runs the FFT: 80 `clk` cycles, then raises `fft_done` |
| 4 | wait for `fft_done` | puts bit 31 of result word 0 on `sdo` |
| 5 | clock 32 x 32 bits (for example as 64 16-bit transfers) | shifts out `{re, im}` of bins 0..31, in natural order |
| 6 | drop `ce` | `fft_done` stays high until the next `load` |

`ce` gates the SPI clock. SCK edges while `ce` is low are ignored, so the host
can share SCK and SDI with the LCD. Samples after the 32nd are ignored.
Outside read-out, `sdo` is driven low.

## Clocking

All logic runs on `clk`. Inside the FPGA, `sck`, `sdi`, `ce` and `load` are
treated as asynchronous. Each passes through a two-flop synchronizer, and SCK
edges are detected by comparing successive synchronized values. This sets the
one timing rule of the interface: **each half period of SCK must last at least
4 `clk` periods** (SCK <= clk/8). Under that rule, `sdo` changes about 3 clk
cycles after a falling SCK edge, well before the next rising edge.

`rst_n` is an asynchronous active-low reset for power-up. Raising `load`
restarts everything, even in the middle of an FFT.

## How the FFT runs: in-place radix-2 with ping-pong RAMs

The transform is decimation in time. Because the input is stored in
bit-reversed order, the output comes out in natural order. There are 5 levels
of 16 butterflies. Each butterfly takes a pair (A, B) and the twiddle
w^n = exp(-j*2*pi*n/32):

    A' = A + B*w^n        B' = A - B*w^n

For level `l` (0..4) and pair `p` (0..15), the address generator (`agu`)
computes:

    adr_a  = p + 2^l * floor(p / 2^l)      (insert a 0 at bit l of p)
    adr_b  = adr_a + 2^l
    adr_tw = (p mod 2^l) * 2^(4-l)

One butterfly completes per clock. The RAMs read asynchronously, so the
operands, the twiddle lookup, the butterfly and the write-back all fit in one
cycle. The result of every butterfly goes back to the **same two addresses**,
but in the other RAM:

- `rd_select = l[0]` picks the RAM that is read (0: RAM1, 1: RAM2).
- The other RAM is written (`we1 = rd_select`, `we2 = !rd_select`).

Each RAM therefore sees either only reads or only writes in a given level, so
no read-after-write hazard exists inside a level. The samples are loaded into
both RAMs. After level 4 (5 levels, an odd number) the result is in RAM2. The
level counter stops at 5, which raises `fft_done`, turns off both write
enables and leaves `rd_select` pointing at RAM2 for read-out.

The RAM port multiplexers give both ports to the SPI slave whenever
`load_s | fft_done` is high (`load_s` is the synchronized `load`). While
loading, both ports write the same word to the same address. During
read-out, port A supplies the output words.

**Latency:** `fft_done` rises 80 clk cycles after the synchronized `load`
falls, which is 82 cycles after the pin falls. A full frame is 1536 SCK cycles
of SPI traffic plus those 80 cycles.

## Butterfly arithmetic

`T = B*w` is formed from four 16 x 16 signed products. The sums
`B_r*w_r - B_i*w_i` and `B_r*w_i + B_i*w_r` are taken at full 33-bit width.
The 16-bit result is bits [25:10], which removes the 10 extra fraction bits of
the product. This truncates toward minus infinity. For Q15 data and twiddles
the slice would be [30:15], and the `FR` parameter of `bfu` selects it.
Against an exact DFT, the tests see errors of at most about 8 LSB (8/1024)
per bin. This comes from truncation at each level and from the 10-bit
twiddles.

## Twiddle ROM

16 entries, for n = 0..15:

    tw_re = trunc(1024 * cos(2*pi*n/32)),  tw_im = trunc(-1024 * sin(2*pi*n/32))

`trunc` rounds toward zero, and w^0 is exactly 1.0 (`16'h0400`).

## Where this design departs from the original description

- **Twiddle index.** The original scheme pairs the `adr_a`/`adr_b` formulas
  above with `twAdr = 2^(4-l) * floor(p / 2^(4-l))`. That formula belongs to
  a different address order, built by rotating the bits of `2p`. With the
  `adr_a`/`adr_b` formulas it gives wrong twiddles at levels 1..3, and the
  output is not an FFT. This design keeps `adr_a`/`adr_b` and uses the
  matching index `(p mod 2^l) * 2^(4-l)`. The broken variant is kept as the
  fault case of the `agu` test.
- **Twiddle sign.** The original ROM held +sin for the imaginary parts. That
  computes the transform with the opposite sign convention. This design
  follows the definition exp(-j...). For real audio input the bar heights
  (magnitudes) are the same either way.
- **SPI clocking.** The original clocked its shift registers directly with SCK
  and used asynchronous edge tricks. Here every SPI pin is sampled with
  `clk`, as described under Clocking.
- **Smaller choices.** `rst_n` is added. `fft_done` comes straight from the
  level counter, not one cycle later. Extra samples are ignored rather than
  overwriting the last address.

The magnitude, normalisation and bar-height computation belong to the
microcontroller firmware and are not in this RTL. Neither is a way to change
the FFT size: the twiddle ROM is fixed at 32 points.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | sizes (N = 32, Q5.10), the `cplx_t` word struct, `bit_reverse` |
| `rtl/fft_top.sv` | top level: RAMs, muxes, sequencer, butterfly, ROM, SPI slave |
| `rtl/ram_spi.sv` | SPI slave: synchronizers, 16-bit input / 32-bit output shift registers |
| `rtl/agu.sv` | level and pair counters, addresses, RAM select, write enables, `fft_done` |
| `rtl/bfu.sv` | combinational butterfly, parameter `W`, `FR` |
| `rtl/ram2.sv` | two-port RAM, asynchronous read, shared write enable |
| `rtl/twiddle_rom.sv` | the 16 twiddle factors |
| `tb/tb_*.sv` | one self-checking testbench per module |

`tb_fft_top` is the end-to-end test. It plays the host and sends DC, a bin-3
tone, random 10-bit ADC frames, and signed random data after a run aborted by
a new `load`. Every output bit is compared with an independent fixed-point
reference FFT, and each bin is compared with an exact DFT to within 48 LSB.
The test checks the 80-cycle latency. It also counts that bit-reversed loads,
RAM switches, completed FFTs, output word reloads, SCK edges ignored with `ce`
low, and restarts all happen. The block testbenches check the sequencer cycle
by cycle against the textbook schedule, the butterfly against wide-integer
arithmetic, the ROM against `$cos`/`$sin`, and the SPI slave against a
behavioural RAM.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/fft_pkg.sv tb/tb_fft_top.sv --top-module tb_fft_top
    ./obj_dir/Vtb_fft_top

Replace `fft_top` with `agu`, `bfu`, `ram2`, `ram_spi` or `twiddle_rom` to run
the other testbenches. Each one prints `TB_RESULT checks=N failures=M`.
`-Wno-fatal` keeps the testbenches' width warnings (integer checks on narrow
signals) from stopping the build.
