# Precision-configurable radix-2/4 FFT accelerator with pipeline clock gating

This is a memory-based FFT engine for a small processor. It computes complex FFTs of any
power-of-two length from 16 to 4096 points. It has two precisions: 16-bit real and imaginary
parts (32-bit complex words) and 8-bit parts (16-bit complex words). The processor drives it
with multi-cycle instructions, each of which computes one FFT stage. The design follows the
architecture of *A Low Power ASIP for Precision Configurable FFT Processing* (Bo, Han, Zou,
Zeng). It keeps that paper's three power-saving ideas:

1. **Twiddle reuse by loop order.** Within a stage, the butterfly counter is the outer loop
   and the group counter the inner loop. The twiddle ROM is therefore read once per butterfly
   counter value, not once per butterfly. In a 4096-point FFT the ROM is read 1365 times
   instead of 6144.
2. **Precision scaling.** In 8-bit mode the multipliers use one 8x8 sub-multiplier out of
   four, the 16-bit part of every memory word is switched off, and only the upper-byte half
   of the twiddle ROM is read.
3. **Clock gating.** A *gated* FFT instruction stops the clock of the processor pipeline
   until the accelerator signals `finish`.

The RTL here covers the FFT accelerator, the clock gate and its control. The rest of the
processor (instruction fetch, decoder, register file, ALU, data RAM, forwarding) is not
included. Its connections to the accelerator are ports of the top, `fft_asip_top`.

## Using it: one transform

1. Set `fft_cs = {prec8, log2n, stage}` to the size and precision. Write the N samples
   x[0..N-1] with `we = 1`, `fft_ram_addr = i` and `wdata = {re, im}`, one per cycle. In 8-bit
   mode only bits [7:0] of each part are used.
2. For `stage = 0 .. S-1`, with S = ceil(log2(N)/2), pulse `fft_os` for one cycle. Set
   `fft_gated` for a gated instruction. Wait for the one-cycle `finish` pulse.
3. Read bin X[k]: drive `oe = 1` and `fft_ram_addr = k`. The value is on `fft_data_out` one
   cycle later, with `data_valid` high.
4. The true DFT is `fft_data_out * 2^scale_exp`. This is block floating point (see below).

Addresses on the processor port are natural sample and bin indices. The accelerator does the
reordering internally. Host accesses are allowed only while `fft_busy` is low; an assertion
checks this. Holding `fft_oe` low pauses the issue of butterflies. This is a stall, and the
stage stretches by the same number of cycles.

## Where data lives and how a stage walks through it

This is the least obvious part of the design.

**Banks.** Each memory has four banks, so one butterfly can read its four operands, and write
its four results, in a single cycle. A point at storage position `p` (n bits for N = 2^n) is
stored at:

```
bank(p) = (p[1:0] + p[3:2] + p[5:4] + ...) mod 4      word address = p >> 2
```

Each stage works on one 2-bit *digit field* of the position. Its four operands differ only
in that field, which takes the values 0, 1, 2 and 3. So the four digit sums differ, and the
operands always fall in four different banks. For odd n the top digit is the single bit
p[n-1].

**Stage fields (decimation in time, digit-reversed input).**

| n      | stage s | field           | butterflies per group (BN) | groups (G)   |
|--------|---------|-----------------|----------------------------|--------------|
| even   | s       | p[2s+1:2s]      | 4^s                        | N/4/BN       |
| odd    | 0       | p[n-1] and p[1] | 1 (two radix-2 butterflies)| N/4          |
| odd    | s >= 1  | p[2s-1:2s-2]    | 2*4^(s-1)                  | N/4/BN       |

Each stage issues exactly N/4 butterflies, one per cycle. For butterfly counter `bn` and
group counter `g`, with lb = log2(BN), the operand positions q = 0..3 (A, B, C, D) are:

```
even n:        p_q = g<<(lb+2) | q<<lb     | bn
odd n, s >= 1: p_q = bn[0]<<(n-1) | g<<(lb+1) | q<<(lb-1) | bn>>1
odd n, s = 0:  p_q = q[1]<<(n-1) | (g>>1)<<2 | q[0]<<1 | g[0]
```

The twiddles for operands B, C and D are W^k, W^2k and W^3k, with W = exp(-j2π/4096) and
k = bn << (10 - lb). They depend only on the stage and on `bn`, which is what makes the loop
order work. Results go back to the same positions (in place), but in the other memory.

**Odd sizes.** For odd n the radix-2 stage comes first. All its twiddles are 1. It pairs
position bit n-1 with bit 1, so its two radix-2 butterflies (A, C) and (B, D) together use
all four banks.

**Input and output order.** Because the transform is decimation in time, sample x[i] is
stored at the base-4 digit reversal of i. For odd n the top bit is not moved. Bin X[k] is at
position k for even n. For odd n it is at position {k[0], k[n-1:1]}. `fft_pkg::load_pos` and
`result_pos` do this mapping on the processor port.

## Butterfly and precision

`butterfly_unit` multiplies B, C and D by their twiddles using three complex multipliers.
Eight complex adders then compute:

```
s0 = A + C*w2   s1 = A - C*w2   s2 = B*w1 + D*w3   s3 = B*w1 - D*w3
radix-4: A' = s0 + s2   B' = s1 - j*s3   C' = s0 - s2   D' = s1 + j*s3
radix-2: A' = s0        B' = s2          C' = s1        D' = s3
```

**Widths.** Twiddles are Q1.15; +1 is stored as 32767.

- In 16-bit mode each product is rounded back to the data scale (>> 15, round half up).
  Results are 19-bit per part, a 38-bit complex word, so no sum can overflow.
- In 8-bit mode the multipliers use the data's 8 bits and the twiddle's upper byte (Q1.7).
  Results fit in 11 bits per part, a 22-bit word.
- The twiddle ROM is two arrays, upper bytes and lower bytes. In 8-bit mode the lower-byte
  array is not enabled and its output register holds its last value.

`scalable_mult` builds a 16x16 signed product from four 8x8 partial products. In 8-bit mode
only the signed high×high multiplier gets operands; the other three see zeros.

## Block floating point

Memory words keep all 19 (or 11) bits, but the butterfly takes 16-bit (or 8-bit) operands.
While a stage runs, `overflow_detect` finds the largest number of bits by which any result
part exceeds 16 bits (or 8), capped at 3. This per-stage *overflow flag* then selects what is
read back:

- by the next stage, and by the final read-out: bits [15+f:f] of each part, i.e. [15:0],
  [16:1], [17:2] or [18:3];
- in 8-bit mode: bits [7+f:f], sign-extended.

Stage 0 always reads with f = 0. `scale_exp` is the sum of all flags of the transform.

## Ping-pong memory

`fft_data_memory` holds two memories of 4 banks × 1024 words × 38 bits. Each bank is built
from a 22-bit part and a 16-bit part (`fft_mem_bank`). A stage reads one memory and writes
the other, and the next stage swaps them. The accelerator tracks which memory holds current
data. The word layout is `{re[18:11], im[18:11], re[10:0], im[10:0]}`, so 8-bit mode never
enables the 16-bit parts. The bank RAMs are synchronous single-port arrays: each stands for an
SRAM macro.

## Timing

The stage pipeline has three steps:

1. The AGU presents the four positions. The banks are addressed, and the ROM is read if `bn`
   is new.
2. The read words are shifted, routed from banks to A–D and through the butterfly. The
   results are registered.
3. The results are written to the other memory, and overflow is checked.

`finish` rises N/4 + 3 clock edges after the edge that samples `fft_os`. Counting the
instruction cycle and the finish cycle, a stage occupies **N/4 + 4 cycles**. Simulated cycles
per FFT in 16-bit mode, against the published figures:

| N     | 16 | 32 | 64 | 128 | 256 | 512 | 1024 | 2048 | 4096 |
|-------|----|----|----|-----|-----|-----|------|------|------|
| here  | 16 | 36 | 60 | 144 | 272 | 660 | 1300 | 3096 | 6168 |
| paper | 16 | 48 | 62 | 168 | 296 | 688 | 1328 | 3128 | 6200 |

Accuracy with uniformly random inputs of half full scale (±2^14, ±2^6 in 8-bit mode) is about 72–86 dB SQNR in 16-bit mode, and
31–35 dB in 8-bit mode for 16 to 64 points. The paper reports 51–79 dB and 27 dB (64 points,
8-bit). Its input signals are not known, so these figures only show the same trend.

## Clock gating

`clock_gate` is the usual glitch-free cell: a latch that is transparent while `clk` is low,
followed by an AND gate. `fft_asip_top` drops the gate enable when a gated instruction
starts. It raises the enable again during the accelerator's `finish` cycle, so the pipeline
sees the rising edge that ends that cycle. An *ungated* instruction leaves `gated_clk`
running, so the processor can go on with other instructions. `test_en` forces the clock on.

## Top-level ports (`fft_asip_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| test_en | in | 1 | force the pipeline clock on |
| fft_os | in | 1 | FFT instruction issued: compute one stage |
| fft_cs | in | 8 | `fft_cfg_t {prec8, log2n[3:0], stage[2:0]}` |
| fft_gated | in | 1 | 1 for FFT16_gated / FFT8_gated |
| fft_oe | in | 1 | 1: issue butterflies, 0: pause |
| fft_ram_addr | in | 12 | sample index (write) or bin index (read) |
| oe, we | in | 1 | read / write the FFT data memory |
| wdata | in | 32 | sample {re, im} |
| fft_data_out, data_valid | out | 32, 1 | bin {re, im}, one cycle after `oe` |
| fft_busy, finish | out | 1 | a stage is running; one-cycle end of stage |
| ovf_flag, scale_exp | out | 2, 5 | last stage's shift; total exponent |
| gated_clk | out | 1 | clock for the processor pipeline |

## Files

`rtl/`:

- `fft_pkg` — sizes, types, bank/address/order mappings
- `scalable_mult`, `complex_mult`, `butterfly_unit` — the datapath
- `overflow_detect` — block-floating-point flag
- `agu` — loop counters and addresses
- `twiddle_rom` — table computed at elaboration from cos/sin, split by byte
- `fft_mem_bank`, `fft_data_memory` — ping-pong memory
- `fft_accelerator` — the engine
- `clock_gate`
- `fft_asip_top` — top

`tb/`: one self-checking testbench per block, `tb_<module>.sv`. Each ends with a line
`TB_RESULT checks=… failures=…`. `tb_fft_asip_top` runs every size (16–4096 in 16-bit mode,
16–64 in 8-bit mode) at full size, against a double-precision DFT. It also checks:

- cycles per stage;
- ROM reads per stage;
- the pipeline clock during gated and ungated stages;
- that radix-2 stages, overflow shifts, a stall and both gating modes each occurred.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/fft_pkg.sv tb/tb_fft_asip_top.sv \
          --top-module tb_fft_asip_top -o sim
./obj_dir/sim
```

Use the same command for any other testbench. Substitute its name; `-Irtl` finds the modules.
The full top-level test, reference DFTs included, finishes in about a second.

To change the maximum size, edit `NMAX`/`LOG2_NMAX` in `fft_pkg`. Bank depth, address width
and ROM size follow from them. `fft_cfg_t.stage` and `scale_exp` are sized for up to 4096
points.

## Departures from the published design, and open points

- **Group/butterfly naming.** The paper describes the first stage as one group of N/4
  butterflies. That is the decimation-in-frequency order. It also states that twiddles
  depend only on the stage and the butterfly counter, and it applies them at the butterfly
  inputs, which is decimation in time. These cannot all hold. This design keeps the twiddle
  and loop statements. As a result, stage 0 has N/4 groups of one butterfly, and input
  samples are stored in digit-reversed order.
- **Odd sizes.** The radix-2 stage is placed first, and the bank formula's top digit is the
  single bit p[n-1]. The paper prints the formula only for even sizes.
- **Memory addressing.** The paper's memory figure shows one address bus per bank shared by
  both memories, with 12 bits, and one write enable per memory. This design gives each
  memory its own four 10-bit address buses: a stage reads one butterfly while writing an
  earlier one. It also gives each bank its own write enable, for single-word loads.
- **Twiddle ROM in 8-bit mode.** The published design reports a power saving from scaling
  the twiddle ROM but not how it is done. Here the ROM is split by byte and the lower-byte
  half is idle in 8-bit mode.
- **Read-out select.** The published memory drawing steers the output multiplexer from the
  first memory's chip enable. Here it has its own select input, `rsel`, registered with the
  read.
- **Assumed signal meanings.** fft_os is the start, fft_cs the configuration and fft_oe an
  issue enable; only the names are published. The processor data port, the word layout and
  the rounding are this design's choices.
- **Cycle counts.** These are lower than the published ones, especially for odd sizes. The
  paper does not describe its per-stage overhead.
- **8-bit mode.** The paper supports it only for 16 to 64 points. The hardware here does not
  forbid larger sizes, but their accuracy is poor.
- **Not included.** The processor pipeline (16-bit instruction fetch and decode, 16×32
  register file, ALU, data and instruction RAMs, forwarding, pipeline FSM) is not built. The
  paper gives no instruction encoding, no ALU operation set and no memory sizes for it.
- **Not evaluated.** Power and area are not evaluated here.
