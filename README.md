# Energy-scalable DA array for sensor signal processing

A sensor node that lives on harvested energy never knows how much power it
will have next minute. This design is a small reconfigurable array (4 x 4
units) for sensor signal processing in which power can be traded for output
quality at run time. It has three knobs:

* **input bit width.** Each unit works bit-serially. Halving the number of
  bits it processes halves its processing cycles, at the cost of more
  quantisation noise.
* **number of active units.** A shorter filter or a smaller transform leaves
  units asleep.
* **precision of the constants.** The host controls the width of the
  coefficients and twiddle factors it loads.

Every unit is built around **distributed arithmetic (DA)**: an inner product
with constant coefficients is computed from a look-up table and an
accumulator, with no multiplier. Each unit is extended so that the same
datapath also does serial multiplication, division, square root, addition,
complex add/subtract/multiply and polynomial evaluation. The units pass
words to each other over handshaked channels. Each unit takes as many cycles
as its function needs, and the flow graph still keeps its order.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). The top module is
`da_array`.

## 1. How a DA unit computes an inner product

We want `y = a0*x0 + a1*x1 + a2*x2 + a3*x3`, where the `a_k` are constants
and the `x_k` are 16-bit two's-complement inputs. Write each input by its
bits, `x_k = -b_k15*2^15 + sum_{n<15} b_kn*2^n`, and regroup:

    y = - S(b_015, b_115, b_215, b_315) * 2^15  +  sum_{n=0..14} S(b_0n, b_1n, b_2n, b_3n) * 2^n
    where S(c0,c1,c2,c3) = c0*a0 + c1*a1 + c2*a2 + c3*a3

`S` has only 2^4 = 16 possible values. The host computes them once and
stores them in a 16-word LUT (`word[addr] = sum of a_k for the bits k set
in addr`). At run time the unit reads one *bit column* of its four inputs
per cycle, bit `n` of `x0..x3`, which forms the 4-bit LUT address. It then
updates its accumulator, most significant column first:

    cycle 0 (column 15):  acc = -LUT[col15]          (sign column is subtracted)
    cycle j (column 15-j): acc = 2*acc + LUT[col]

After 16 cycles `acc = y`. This throughput does not depend on the number of
inputs: four multiply-accumulates cost the same 16 cycles as one.

**Bit-width scaling.** The configuration gives a width `BW` (1..16). The
unit then processes only columns 15 down to `16-BW`, which takes `BW`
cycles. It shifts the result left by `16-BW`, so the output has the same
scale as the full-precision one. The result equals the inner product of the
inputs truncated to their `BW` top bits.

**Storage.** The four inputs sit in `da_shift_mem`, a 4 x 16 register file.
Rows are written whole: a single row, or a push of a new sample into row 0
that moves every row down one place, which is a 4-tap delay line. Reads are
either a whole row or one bit column across all rows. The sample pushed out
of the last row can be sent to the next unit, so 4-tap units chain into
longer filters.

**Accumulator.** `da_accum` is 32 bits wide and split into two 16-bit
halves, each with its own enable. It can load, shift-and-add, add, or add
or subtract the two halves independently in one cycle. The independent
halves are how a complex add or subtract on `{re, im}` takes a single cycle.

## 2. The unit's functions and its phases

A unit works through four phases, shown on `phase_o`:

| phase | what happens |
|---|---|
| IDLE | asleep: no register changes (stands for clock gating); entered while the enable bit is 0 |
| IN   | takes operands from input channel a (and b if needed) |
| EXEC | the serial computation |
| OUT  | offers the result on output channel 0 until taken; then back to IN. A DOT unit's evicted delay-line sample is offered on channel 1 from the start of EXEC, so the next unit in a chain can take it early |

The 12-bit configuration word (`da_pkg::cfg_t`) has these fields:

| bits | field | meaning |
|---|---|---|
| 11 | `en` | 1 = awake; 0 = idle |
| 10 | `cst_b` | second operand comes from LUT word 0 (real), or words {0,1} (complex), not from channel b |
| 9 | `blk` | DOT: load 4 words per result instead of pushing 1 sample |
| 8 | `fwd` | DOT: send the evicted delay-line sample on output 1 |
| 7:4 | `bw_m1` | input bit width minus 1; for POLY, the polynomial degree |
| 3:0 | `func` | function code |

Writing the configuration word restarts the unit in IN (or IDLE). The shift
memory keeps its contents across the restart.

The functions, with their processing cycles (EXEC phase). The last column
gives the count of the published reference design where it differs:

| code | function | operands → result | algorithm | cycles | reference |
|---|---|---|---|---|---|
| 0 DOT | 4-tap inner product | a: sample (or 4 words) → 32-bit sum | DA, above | BW | 16 |
| 1 MUL | signed multiply | a[15:0] × b[15:0] → 32 bits; b truncated to BW bits | MSB-first shift + add | BW | 16 |
| 2 DIV | unsigned divide | a[15:0] / b[15:0] → {remainder, quotient} | restoring, subtract + shift | 16 | 2–55, data dependent |
| 3 SQRT | square root | unsigned a[31:0] → floor(√a) | non-restoring | 16 | 33 |
| 4 ADD | addition | a + b, 32 bits | parallel add | 1 | 1 |
| 5 CADD / 6 CSUB | complex add / subtract | {re,im} ± {re,im} | split accumulator | 1 | 4 (for add + subtract) |
| 7 CMUL | complex multiply, Q1.15 | a × w, w truncated to BW bits | 4 serial products | 4·BW | 64 + 8 |
| 8 POLY | polynomial, Q1.15 | Σ c_k x^k, c_k in LUT word k, degree N | Horner, 16-cycle serial multiply plus add per step | 16·N | 64 + 81·N |

On top of the processing cycles, the result appears one edge after EXEC
ends. Measured from the clock edge that takes the last operand, the output
is valid `cycles + 1` edges later.

Number formats: real operands use the low 16 bits of a channel word. Complex
values are packed `{re[31:16], im[15:0]}` in Q1.15. Q1.15 products are
truncated (bits 30..15 of the 32-bit product), not rounded. Adds wrap. The
LUT is 16 bits wide, so in DOT mode the sum of any subset of a unit's four
coefficients must fit in 16 bits.

## 3. Channels, routing and configuration

**Channels.** Every channel is 32 bits wide with `valid`/`ready`. A word
moves on an edge where both are high. A unit's `in_ready` does not depend on
its `in_valid`, and its `out_valid` does not depend on its `out_ready`. A
producer keeps an offered word stable until it is taken. Assertions in
`da_unit` and `da_interconnect` check both rules. All units share one clock.
The handshake is what lets a unit with a long or data-dependent operation
run beside fast ones.

**Routing (`da_interconnect`).** Each *sink* has a register naming one
*source*. A sink is a unit input or an array output. A source is a unit
output or an array input.

| index | source | sink |
|---|---|---|
| `2*d + c` | unit d, output c | unit d, input c |
| `32 + e` | array input e | array output e |
| ≥ 36 (e.g. 63) | — | unconnected (reset value) |

A source may feed several sinks (a fork). Its word moves only when *all* of
them are ready, so every consumer gets every word exactly once. Each sink
sees `valid` when the source is valid and all the *other* listeners are
ready. A unit with two inputs waits until both have arrived (a join). A
source with no listener is always ready, so its words are dropped.

**Configuration bus (`da_array`).** One write per clock:

| `cfg_addr_i[9]` | `cfg_addr_i[8:5]` | `cfg_addr_i[4:0]` / `[5:0]` | `cfg_wdata_i` |
|---|---|---|---|
| 0 | unit index | 0..15: LUT word; 16: configuration word | word |
| 1 | — | sink index | source index |

The array has 4 input and 4 output channels (`NEXT`). `da_phase_o` shows
every unit's phase.

## 4. Mapping applications

Both examples are what `tb/tb_da_array.sv` programs and checks.

**32-tap FIR filter.** Units 0–7 are DOT units. Unit d holds taps
`h[4d..4d+3]` in its LUT: `LUT[addr] = Σ_{k: addr[k]=1} h[4d+k]`. The
samples enter unit 0 from array input 0. Each unit forwards its oldest
sample from output 1 to input a of the next unit, so the delay line runs
through all 32 rows. Units 8–14 are ADD units in a 3-level tree over the
eight partial sums, and unit 14 drives array output 0. Unit 15 sleeps. One
output per sample. The array takes a new sample every BW + 3 cycles (IN, the
step into EXEC, BW cycles, OUT): 19 cycles at 16 bits, 11 at 8 bits. The
testbench checks this period. Lowering BW raises the sample rate or lowers
the clock needed. The same mapping on units 0–3 with adders 8, 9 and 12
gives a 16-tap filter, and the other units sleep.

**4-point radix-2 decimation-in-frequency FFT.** A butterfly takes three
units:

* complex add, `A = a + b`
* complex subtract, `D = a - b`
* complex multiply by the twiddle held in the LUT (`cst_b`), `M = D·W`

The two inputs of a butterfly are forked to its add and subtract units.
Units 0–5 form the first stage: butterfly (x0, x2) with W⁰ and butterfly
(x1, x3) with W¹ = −j. Units 6–11 form the second stage with W⁰. The four
outputs come out in natural order on array outputs 0–3. W⁰ is stored as
0x7FFF (Q1.15 cannot hold +1).

**Larger FFTs** are computed a stage at a time. A host runs a subset of
butterflies on the array, keeps the partial results, reorders them and runs
the next pass. `tb/tb_da_fft8.sv` does this for 8 points in four passes. Two
passes run the four first-stage butterflies, two at a time, each with its
own W8 twiddle. Two 4-point passes then produce the even and the odd
outputs.

## 5. What is modelled and what is not

These parts follow the published architecture:

* the DA inner product and its unit structure (shift memory, 2^4-word LUT,
  32-bit accumulator split into 16-bit halves)
* the parallel-loaded shift memory
* the two extra data ports
* the 12-bit configuration word and the four phases
* bit-serial implementations of the listed functions
* handshaked communication between units
* a 4x4 array
* the FIR and FFT mappings above

These are choices of this RTL:

* the configuration field layout and the function codes
* the synchronous valid/ready protocol; the reference describes a
  handshake without giving its signals
* 32-bit channels and 4 external channels
* the configuration bus
* the number formats
* the algorithm and cycle count of each non-DOT function
* delay-line forwarding on the second output port
* reading constants and polynomial coefficients from the LUT

Departures and omissions:

* **Interconnect.** The reference uses an island-style fabric: segmented
  tracks (20 % span one block, 80 % span three), connection boxes, and
  Wilton switch boxes with transmission-gate switches. `da_interconnect`
  instead has one word-wide multiplexer per sink. That gives any-to-any
  connectivity, more than a track-limited fabric could route. Track counts
  and switch patterns are not modelled.
* **Shift memory.** The reference builds it as a multiported 6T-SRAM array
  to save power. Here it is a flip-flop array with the same logical ports.
  The bit-wise Y-direction write port and the sign-extending second X read
  port are not modelled because no function here needs them.
* **Clock gating.** It is represented by register enables. In particular,
  the accumulator's per-half enables are always both on while the unit is
  awake.
* **Functions.** The reference lists one more function: a look-up table
  with linear interpolation, 18–33 cycles. Which function it computes is
  not stated, so it is not implemented. Cycle counts differ from the
  reference as listed in the table in section 2. In particular, DIV and
  SQRT here take a fixed number of cycles.
* **Host controller.** The host that loads LUTs, sets routes and reorders
  FFT partial results is not part of this RTL. Its bus is brought out, and
  the testbenches play its part.

## 6. Files

| file | contents |
|---|---|
| `rtl/da_pkg.sv` | widths, function codes, configuration word, phases, accumulator operations |
| `rtl/da_shift_mem.sv` | 4 x 16 input shift memory |
| `rtl/da_lut.sv` | 16-word coefficient LUT |
| `rtl/da_accum.sv` | split 32-bit shift-and-accumulate register |
| `rtl/da_unit.sv` | enhanced DA unit: phases, function sequencing |
| `rtl/da_interconnect.sv` | routing with fork and handshake |
| `rtl/da_array.sv` | top: 16 units, routing, configuration bus |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_da_fft8` |

## 7. Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops; it also
has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/da_pkg.sv rtl/da_shift_mem.sv \
        rtl/da_lut.sv rtl/da_accum.sv rtl/da_unit.sv rtl/da_interconnect.sv \
        rtl/da_array.sv tb/tb_da_array.sv --top-module tb_da_array
    ./obj_dir/Vtb_da_array

Swap in `tb_da_unit`, `tb_da_fft8`, `tb_da_shift_mem`, `tb_da_lut`,
`tb_da_accum` or `tb_da_interconnect` for the other testbenches. Each runs
in well under a minute.

What the testbenches check:

* **`tb_da_unit`** checks every function against integer models: inner
  product, product, quotient and remainder, integer square root, complex
  sums, Q1.15 complex product, and Horner evaluation. It covers full and
  reduced bit widths and operands from the LUT. It checks each function's
  latency, the idle phase and output back-pressure.
* **`tb_da_array`** runs at the default 4 x 4 size. It runs the 32-tap FIR
  at 16 and 8 bits under random output back-pressure, and a 16-tap version,
  all checked bit-exactly. It checks the sample period without
  back-pressure. It runs the 4-point FFT, checked bit-exactly against a fixed-point model
  and within 4 LSB against the exact DFT. It then switches back to the FIR.
  It counts stalls, sleeping units, forks, forwarding, reduced-width runs
  and reconfigurations, and fails if any never happened.
* **`tb_da_fft8`** runs an 8-point FFT in four passes. It checks every pass
  bit-exactly against a fixed-point model and the spectrum within 8 LSB
  against the exact DFT.
* **Block testbenches** (`tb_da_shift_mem`, `tb_da_lut`, `tb_da_accum`,
  `tb_da_interconnect`) compare each block with a reference model under
  random stimulus.

Known limits worth checking before reuse:

* Q1.15 results are truncated, not rounded.
* DOT LUT words overflow silently if the coefficients are too large.
* A reconfiguration does not clear the delay line.
