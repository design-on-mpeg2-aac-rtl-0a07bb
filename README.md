# Floating-point DSP core and IMDCT engine for an MPEG-2 AAC decoder

An MPEG-2 AAC main-profile decoder has to cover about 96 dB of dynamic range,
and most of its time goes into the filter bank, which is an inverse MDCT of
2048 points per channel per frame. This design therefore does not build each
AAC tool as its own block. It is a small hardwired DSP core that works on
IEEE single-precision numbers. An IMDCT performer sits next to it and runs
the complex FFT at the centre of the transform. Both share two linear data
memories: one holds real parts and the other holds imaginary parts.

The target is a 2-channel main-profile decoder (configuration M2.0.0.0: two
main channels, no LFE, no coupling channels), at a clock of about 20 MHz.
Bitstream parsing, Huffman decoding, inverse quantisation, scale factors,
M/S, intensity, prediction and TNS are meant to run as programs on the core.
Those programs are not part of this RTL (see *What is not here*).

```
             control bus (one control word per clock)
                        |
   +--------------------v---------------------------+
   | dsp_core                                       |
   |   acu (APL/BPL/CPL, bit-reverse, modulo,       |
   |        bus arbiter)                            |
   |   fpu32 (X,Y -> fp_mul -> P, fp_add -> ACC)    |
   |   seu (exponent detect, 24-bit barrel shift)   |
   |   alu16 (ARUL, ARUR), gpr (RH0..RH3)           |
   |   buses A, B (operands) and C (results)        |
   +-----+-------------------------------+----------+
     DA  | port 0                  DB    | port 0
   +-----v------+                  +-----v------+
   | mem_a      |<-- port 1 ----+  | mem_b      |
   | real parts |               |  | imag parts |
   +------------+               |  +------------+
                      +---------+--------+   ^
                      | imdct_fft        |---+ port 1 (and port 0 while busy)
                      |  imdct_bfly      |
                      |  coeff_rom (512) |
                      +------------------+
```

## Number format

All 32-bit buses carry IEEE single-precision words: a sign bit, an 8-bit
exponent and a 24-bit mantissa (23 bits stored plus the hidden one). The
arithmetic is simplified in the way small DSPs usually simplify it:

* Every result is truncated toward zero. The adder aligns the operands in a
  50-bit field and keeps a sticky bit, so the truncation is exact: each
  result is the exact value rounded toward zero.
* Denormal inputs and results are flushed to zero. An exact cancellation
  gives +0.
* An overflow, or an infinite or NaN input, gives an infinity. No NaN is
  ever produced.

The FPU also has a 24-bit fixed-point mode. It works on Q1.23 two's
complement values held in the low 24 bits of a word. The product is
`(X*Y) >>> 23`, the sum saturates, and results are sign-extended to 32 bits.

## The DSP core and its control word

The core has three internal buses. Bus A and bus B carry operands. Bus C
carries one result per cycle back to a memory, a register or the ACU.

| bus | possible sources (`a_src` / `b_src` / `c_src`) |
|-----|------------------------------------------------|
| A   | word read from memory A in the previous cycle, GPR `RH[gpr_a]`, immediate, zero |
| B   | word read from memory B in the previous cycle, GPR `RH[gpr_b]`, immediate, zero |
| C   | FPU `P`, FPU `ACC`, SEU shifter output, SEU exponent, ALU result, bus A, bus B |

There is no instruction decoder. Each clock, the control bus delivers one
horizontal control word, `aac_pkg::ctrl_word_t`. Its fields drive every unit
directly, and several units can work in the same cycle. The pipeline is
exposed, so a program has to respect these latencies:

| action in cycle t | result visible |
|-------------------|----------------|
| APL / BPL read of memory A / B | on bus A / B in cycle t+1, with `a_src = A_MEM` / `b_src = B_MEM`; the read register holds until the next read of that port |
| `fpu.mul` or `fpu.add` (uses X, Y, P, ACC as they are in cycle t) | in `P` / `ACC` from cycle t+3 |
| `fpu.ld_x`, `fpu.ld_y`, `fpu.clr` | from cycle t+1 |
| SEU or ALU operation | from cycle t+1 |
| GPR or ACU register write from bus C | from cycle t+1 |
| CPL write of bus C to memory | in the memory after the edge that ends cycle t |

A new FPU operation can start every cycle. A program that chains
accumulations through `ACC` must wait three cycles between dependent adds.
For example, one multiply-accumulate step `ACC += A[i]*B[i]` is:

```
t0: apl.en, bpl.en (post-increment)      read both memories
t1: a_src=A_MEM, b_src=B_MEM, ld_x, ld_y
t2: fpu.mul                              P from t5
t5: fpu.add, a_sel=P, b_sel=ACC          ACC from t8
```

The builders in `tb/core_prog_pkg.sv` show how such words are put together.

### Address controller (ACU)

The ACU holds four pointers `RS0..RS3`, each with a step `RDn` and a modulo
mask `MPDn`. These registers are loaded from bus C. Three pointer units each
pick one pointer per cycle:

* APL addresses the read of memory A. It is the only unit that can
  bit-reverse an address.
* BPL addresses the read of memory B.
* CPL addresses the write of bus C. `wr_a` and `wr_b` select memory A,
  memory B or both.

After use, a pointer can be post-modified: `RS <= RS + RD`. If `MPD = 2^k-1`,
the update wraps inside the aligned block of `2^k` words, which gives a
circular buffer. `MPD = 0` means plain linear addressing. With `brev` set,
APL outputs the pointer with its `k` low bits reversed while the pointer
itself still steps linearly. This is how the core copies a buffer into the
bit-reversed order that the FFT needs.

Each external data bus has one core-side port. The bus arbiter gives a CPL
write priority over the read of the same port. The losing read is dropped,
and the `drop` output flags it. When several units update one pointer in the
same cycle, the priority is: load, then CPL, then BPL, then APL.

### SEU and ALU

The SEU takes a 24-bit word from bus A into `SR`. It can count the redundant
sign bits of `SR` into `SE`, which is the normalising shift. It can also
shift `SR` into `SO` by a signed amount: positive shifts left, negative
shifts right arithmetically. The amount comes from the immediate, from bus
B, or from `SE`. The 16-bit ALU works on its input registers `ARUL` and
`ARUR` and sets Z, N and C flags.

## IMDCT performer

Like most fast IMDCTs, the long-block IMDCT is built from a pre-twiddle, an
N/4-point complex FFT and a post-twiddle. For 2048 points that is a
512-point FFT. `imdct_fft` runs this FFT in place on the buffer at `base` in
both memories: real parts in A, imaginary parts in B. The input must already
be in bit-reversed order. The output comes out in natural order and is the
forward DFT, `X[m] = sum x[n] * exp(-j*2*pi*n*m/N)`.

**Butterfly** (`imdct_bfly`). For top element `d`, bottom element `x` and
twiddle `w`:

```
even = d + w*x
odd  = 2*d - even          (equal to d - w*x, but formed from even)
```

The complex product uses four multipliers. The doubling of `d` is an
exponent increment. The unit accepts one butterfly per cycle and has a
latency of 8 cycles: multiply 2, product sum 2, even 2, odd 2.

**Coefficients** (`coeff_rom`). The table has 512 words. Word `2k` holds
`sin(2*pi*k/512)` and word `2k+1` holds `cos(2*pi*k/512)`, for k = 0..255.
The table is computed when the design is elaborated, rounded to nearest. The
performer reads the sine and the cosine in the same cycle through the two
ports and uses `w = cos - j*sin`.

**Schedule**. Stage `s` runs N/2 butterflies. Butterfly `j` uses:

```
top = (j >> s) * 2^(s+1) + (j mod 2^s)
bot = top + 2^s
k   = (j mod 2^s) * N / 2^(s+1)
```

A butterfly is issued every second cycle. In that cycle both ports of both
memories read `top` and `bot`, and the ROM reads the twiddle. Nine cycles
later the results return in a cycle with no issue, and they are written back
through the same ports. The next stage starts only after the previous stage
has written its last result. One transform takes `log2(N)*(N+9)+1` cycles,
which is 4690 cycles for N = 512.

**Memory map.** `aac_pkg` names the transform buffer at word address 0x1000
and the left and right channel buffers at 0x1400 and 0x1800. The steps
around the transform are pre-twiddle, bit-reverse copy, IMDCT, post-twiddle,
windowing, overlap-add into per-channel time-domain buffers, and PCM output.
In this design only the IMDCT step is hardware. The other steps are core
programs. Pre-twiddle, bit-reverse copy, post-twiddle and the unfolding to
2048 samples, windowing and overlap-add are written here as
control-word sequences in `tb_imdct_long_block`; PCM output is not.

## Top level (`aac_dsp_top`)

The top level joins the core, the two memories and the performer.

* Port 1 of each memory belongs to the performer.
* While the performer runs (`fft_busy`), it also takes port 0, and
  `ctrl_ready` goes low. A control word offered then is held until the
  transform ends, and then it executes.
* `fft_start` is taken only while the performer is idle. `fft_done` pulses
  for one cycle.

Parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `MEM_DEPTH` | 9472 | words per memory (37 KB) |
| `FFT_N` | 512 | complex points per transform |
| `TABLE` | 512 | coefficient words; must be at least `FFT_N` |

## Where this design departs from or adds to its source

These choices are this design's own. Each one fills a point that the source
design leaves open:

* **Instruction set.** The core is driven by a horizontal control word with
  an exposed pipeline. There is no program memory, sequencer or instruction
  decoder.
* **FPU latency.** The FPU has a latency of 3 cycles, and the rounding rules
  are as described above.
* **Memory size.** Each memory holds 9472 words, which is 37 KB. The source
  states 37 KB of RAM in total. Its memory map needs addresses past 0x1C00
  on a single bus, so each memory here is given the full amount, and the
  total is twice the stated size.
* **Coefficient layout.** In the coefficient table the sine sits at even
  addresses, as the source's memory picture shows. The source's prose says
  the real part sits at even addresses.
* **Parallel butterfly.** The butterfly is fully parallel. The source's
  signal names (even/odd select, delay selects) suggest a time-multiplexed
  datapath.
* **Top-level wiring.** How the performer connects to the core is this
  design's own: it shares the memories' ports and stalls the core.
* **Internal buses.** Buses A, B and C are multiplexers. An FPGA build of
  the same architecture may use 3-state buffers for them instead; the
  behaviour is the same.

## What is not here

* The decoder programs: ADIF/ADTS parsing, noiseless decoding, inverse
  quantisation, scale factors, M/S, intensity, prediction and TNS.
* The filter-bank steps as decoder programs: pre-twiddle, bit-reverse
  copy, post-twiddle, unfolding, windowing and overlap-add exist only as
  testbench control-word sequences (sine window only, no window switching
  or short blocks), and PCM output does not exist.
* The program and table ROM.

Without these programs, nothing here decodes an AAC frame, and the frame
cycle count of the original implementation (about 1.7 million cycles per
frame) cannot be checked.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_fp_mul`, `tb_fp_add` | thousands of random operands, bit-exact against double-precision results rounded toward zero (`fp_ref_pkg`), plus the 2-cycle latency |
| `tb_fpu32` | multiply, add/subtract, multiply-accumulate through the P and ACC feedback, clear, fixed-point multiply with saturation and fixed-point add, and the 3-cycle latency |
| `tb_seu`, `tb_alu16`, `tb_gpr` | every operation against integer reference models |
| `tb_acu` | random mixes of linear, modulo and bit-reversed addressing, register loads and port collisions against a model |
| `tb_dp_ram`, `tb_coeff_rom` | read latency and collisions; every table word against `$sin`/`$cos` to half an ulp |
| `tb_imdct_bfly` | random butterflies, bit-exact against the same sequence of truncating operations, and within 1e-6 of double precision |
| `tb_imdct_fft` | 64-point transforms against a double-precision DFT; guard words untouched; exact cycle count |
| `tb_dsp_core` | short programs: stores, a dot product, a bit-reversed copy with modulo wrap, an arbiter collision, SEU normalisation, ALU on GPR operands, and a fixed-point multiply |
| `tb_aac_dsp_top` | the full-size design end to end (see below) |
| `tb_imdct_long_block` | a complete 2048-sample long-block IMDCT on the full-size design (see below) |

`tb_aac_dsp_top` runs the whole design at its default parameters. It
performs these steps:

1. Store a random 512-point complex vector through the core.
2. Bit-reverse copy the vector into the transform buffer.
3. Start the performer, offering a control word while it is busy.
4. Read the result back and compare it with a double-precision DFT. The
   largest error seen is about 3e-5, for inputs in [-1, 1]. The relative
   RMS error, about 5e-7, must stay below 0.02 %.
5. Accumulate re*im of the result in the FPU.

The testbench counts how often each mechanism happens: bit-reversed
addressing, modulo wrap, arbiter drop, stall, transform, MAC, SEU, ALU and
fixed-point multiply. It fails if any count is zero. The run takes about
10 seconds in Verilator.

`tb_imdct_long_block` turns a random spectrum of 1024 coefficients into the
2048 time samples `x[n] = sum_k X[k] cos(pi/1024 (n + 512.5)(k + 0.5))`,
with every step done by the hardware:

| step | done by | cycles |
|------|---------|--------|
| pre-twiddle: `v[k] = (X[2k] + j X[1023-2k]) exp(-j pi (4k+1)/4096)` | core, twiddles as immediates | 11788 |
| bit-reverse copy | core, ACU bit-reversed addressing | 1549 |
| 512-point FFT | IMDCT performer | 4690 |
| post-twiddle: `w[n] = V[n] exp(-j pi n/1024)`, `y[2n] = Re w`, `y[1023-2n] = -Im w` | core | 11788 |
| unfold: `x[n] = y[n+512]`, `-y[1535-n]`, `-y[n-1536]` for the three quarters | core | 12303 |
| windowing and overlap-add: `out[n] = w[n] x[n] + prev[n]`, new overlap `w[1024+n] x[1024+n]` | core | 15372 |

The core steps use plain, unpipelined control-word sequences (23 cycles
per complex multiply), so their cycle counts show what the hardware does,
not what a scheduled program would reach. The window `w` is the sine
window `sin(pi (n + 0.5)/2048)` with the 2/2048 IMDCT scale folded in; the
previous overlap `prev` is random. `x` is compared with the direct
double-precision sum: the largest sample error is about 3e-5 for outputs of
magnitude about 10, and the relative RMS error, about 7e-7, must stay below
0.02 %. The windowed output and the new overlap are compared with the same
steps in double precision, with the same bound. Conversion to PCM integers
is not part of the test.

## Simulating

Verilator 5 needs the two packages ahead of the testbench. It can find the
other modules through `-y`. From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aac_dsp_top \
    -y rtl -y tb +libext+.sv -Irtl \
    rtl/aac_pkg.sv tb/fp_ref_pkg.sv tb/core_prog_pkg.sv tb/tb_aac_dsp_top.sv
./obj_dir/Vtb_aac_dsp_top
```

Swap in any other `tb_*` as the top module to run another testbench. The
simulator has two states, and the testbenches reset or initialise
everything they read.

## Files

* `rtl/aac_pkg.sv`: types, control-word layout and memory-map constants.
* `rtl/aac_dsp_top.sv`: the top level.
* `rtl/dsp_core.sv`: the core, with its units `fpu32.sv`, `fp_mul.sv`,
  `fp_add.sv`, `seu.sv`, `acu.sv`, `alu16.sv` and `gpr.sv`.
* `rtl/imdct_fft.sv`: the performer, with `imdct_bfly.sv` and
  `coeff_rom.sv`.
* `rtl/dp_ram.sv`: a data memory.
* `tb/`: one testbench per module, plus `fp_ref_pkg.sv` (reference
  arithmetic) and `core_prog_pkg.sv` (control-word builders).
