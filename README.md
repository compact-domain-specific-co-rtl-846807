# Saber polynomial-multiplication co-processor (Toom-Cook 4-way)

Saber is a lattice-based key-encapsulation mechanism (KEM) whose cost is dominated by
multiplying polynomials of 256 coefficients in Z_q[x]/(x^256 + 1) with q = 2^13. A
power-of-two modulus rules out the number-theoretic transform, so this design takes
another route. **Toom-Cook 4-way** splits each 256-coefficient operand into four
64-coefficient quarters. It evaluates them at seven points, multiplies the seven pairs of
64-coefficient "weighted" polynomials **in parallel** on seven small schoolbook
multipliers, and interpolates the seven products back into the 511-coefficient result.

The hardware is a co-processor for a host CPU that runs the rest of Saber: hashing,
sampling, rounding and the final reduction modulo x^256 + 1. The host streams operands in
through a DMA engine and starts the steps with register commands. It streams the result
back out. Saber needs sums of products (matrix-vector and vector-vector products over
l = 2, 3 or 4 polynomials). The point-wise products can be *accumulated* in the small
multipliers, so such a sum needs only one interpolation ("lazy interpolation").

At the default configuration, one product takes 130 + 1170 + 518 = 1818 cycles of
arithmetic: evaluation, point-wise multiplication and interpolation. Each further term of
a sum costs 130 + 1170 cycles.

```
            register bus                    DMA streams (64-bit words)
                 |                           |                 ^
        +--------v--------+         +--------v-----------------+--------+
        |    cmd_regs     |-------->|           stream_port             |
        | cmd / status    |         +----------------+------------------+
        +--------+--------+                          | port B (64-bit R/W,
                 | commands                          |  16-bit lane writes)
                 v                          +--------v---------+
        +-----------------------------+     |     sys_mem      |
        |         toom_cook4          |     | 1024 x 64 bit    |
        |  tc_eval  ---> schb64 x 7   |<----+ port A (64-bit   |
        |                 (MUL / MAC) |     |  reads)          |
        |  tc_interp <--- schb64 x 7  |---->+ port B (INTERP)  |
        +-----------------------------+     +------------------+
```

## Files

| file | contents |
|---|---|
| `rtl/saber_pkg.sv` | widths, opcodes (`cmd_op_e`), register map, inverses mod 2^16, coefficient address function |
| `rtl/saber_coproc.sv` | top level: wires the units, shares memory port B |
| `rtl/cmd_regs.sv` | command / status registers, command acceptance rules |
| `rtl/stream_port.sv` | attaches memory addresses to the address-free DMA streams |
| `rtl/sys_mem.sv` | 1024 x 64-bit dual-port block RAM, per-lane writes on port B |
| `rtl/toom_cook4.sv` | Toom-Cook controller: evaluation, 7 x `schb64`, interpolation |
| `rtl/tc_eval.sv` | evaluation datapath: 4 coefficients in, 7 weighted coefficients out |
| `rtl/schb64.sv` | 64 x 64 schoolbook multiplier with 4 pipelined MAC cells |
| `rtl/tc_interp.sv` | pipelined interpolation datapath |
| `rtl/lutram_sp.sv`, `rtl/lutram_dp.sv` | single- / dual-port distributed RAMs inside `schb64` |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_saber_levels.sv` | Saber encapsulation arithmetic for l = 2, 3, 4 on the full design |

## Programming model

### Registers

The register bus is a plain synchronous interface. The host writes on `reg_we`, with
`reg_addr` and `reg_wdata`. `reg_rdata` is combinational on `reg_addr`.

| index | name | meaning |
|---|---|---|
| 0 | CMD | write an opcode to issue a command; reads back the last opcode |
| 1 | ADDR_A | word address of operand a (EVAL) |
| 2 | ADDR_B | word address of operand b (EVAL) |
| 3 | ADDR_C | word address of the result (INTERP) or of a transfer (LOAD / STORE) |
| 4 | LEN | transfer length in 64-bit words |
| 5 | STATUS | bit 0 busy, 1 done, 2 error, 3 transfer engine busy, 4 arithmetic engine busy |
| 6 | CYCLES | busy cycles of the arithmetic engine since the last arithmetic command |

### Commands

| opcode | command | engine | what it does | cycles |
|---|---|---|---|---|
| 1 | LOAD | transfer | LEN words from the input stream to ADDR_C.. (ends early on `s_tlast`) | 1 per word |
| 2 | STORE | transfer | LEN words from ADDR_C.. to the output stream, `m_tlast` on the last word | 1 per word |
| 3 | EVAL | arithmetic | evaluate a (ADDR_A) and then b (ADDR_B) into the seven multipliers | 130 |
| 4 | MUL | arithmetic | seven 64 x 64 products, overwriting the held products | 1170 |
| 5 | MAC | arithmetic | seven 64 x 64 products added to the held products | 1170 |
| 6 | INTERP | arithmetic | interpolate the held products into a 512-coefficient result at ADDR_C | 518 |

There are two engines. A command is issued only when its engine is idle. A transfer may
run while EVAL, MUL or MAC runs, so the next operands can stream in during a
multiplication. INTERP writes through the same memory port as the transfers, so INTERP
and LOAD/STORE exclude each other. A command that cannot be issued is dropped and sets
STATUS.error. The next accepted command clears the flag. Do not LOAD over the operands
of an EVAL that is still running: the hardware does not check this.

A sum `sum_j a_j * b_j` (one row of Saber's `A*s`) is computed like this:

```
LOAD a_0,b_0 ; EVAL ; MUL   (LOAD a_1,b_1 meanwhile)
               EVAL ; MAC   (LOAD a_2,b_2 meanwhile)
               EVAL ; MAC
INTERP -> 512 coefficients c ; STORE
host: r[i] = c[i] - c[i+256] mod 2^13      (reduction modulo x^256 + 1)
```

## Memory layout

`sys_mem` holds 1024 words of 64 bits. Each word holds four 16-bit coefficients, and
lane 0 is bits 15:0. A 256-coefficient polynomial occupies 64 consecutive words, with
coefficients 64 apart in the same word:

```
word W+0 :  p0    p64   p128  p192      (lane 0 .. lane 3)
word W+1 :  p1    p65   p129  p193
...
word W+63:  p63   p127  p191  p255
```

With this layout, evaluation reads the i-th coefficient of all four quarters in one
cycle. A 512-coefficient result is two such blocks: words W..W+63 hold c0..c255 and
W+64..W+127 hold c256..c511. In 16-bit units, coefficient k (9 bits) is written at
`W*4 + {k[8], k[5:0], k[7:6]}`, which is `coef_pos()` in the package. Bases should be
multiples of 64 words. The host builds the layout by index arithmetic when it fills its
transfer buffer.

## The arithmetic

### Evaluation (`tc_eval`)

Write the operand as a(y) = a0 + a1 y + a2 y^2 + a3 y^3, with y = x^64. For each i, the
datapath turns (a0[i], a1[i], a2[i], a3[i]) into seven values:

| output | point | value |
|---|---|---|
| aw1 | inf | a3 |
| aw2 | 2 | a0 + 2a1 + 4a2 + 8a3 |
| aw3 | 1 | a0 + a1 + a2 + a3 |
| aw4 | -1 | a0 - a1 + a2 - a3 |
| aw5 | 1/2 (x8) | 8a0 + 4a1 + 2a2 + a3 |
| aw6 | -1/2 (x8) | 8a0 - 4a1 + 2a2 - a3 |
| aw7 | 0 | a0 |

Only shifts and adds are needed, and the adder depth is two. Operand a is evaluated
first and then operand b, one word per cycle (128 cycles plus 2 pipeline cycles). The
results go straight into the operand memories of the seven `schb64` units.

### Precision

All arithmetic is modulo 2^16. Interpolation divides by 3, 9 and 15, which is done by
multiplying with their inverses modulo 2^16. It also divides by 2, 4 and 8, which is
done with right shifts. Every shift makes one more top bit meaningless, and no path
loses more than three bits. The 16-bit words therefore give results exact modulo
2^13 = q. The design writes results with the top three bits cleared. Because
evaluation, products and interpolation are all linear modulo 2^16, any number of
products accumulated with MAC interpolate to the correct sum modulo 2^13. Operand
coefficients may be any representative modulo 2^13 (e.g. two's complement of small
secrets).

### The 64 x 64 multiplier (`schb64`)

This is the core, and there are seven copies of it. It holds operand a (64 words,
single-port LUT RAM), operand b (64 words, dual-port LUT RAM) and the 127-coefficient
product (128 words, dual-port LUT RAM).

The four multiply-accumulate cells form a chain. Operand b is processed in 16 chunks of
four coefficients b[j..j+3], and each chunk goes through three phases:

1. **Load (2 cycles).** The two read ports of the b memory fill the four b registers.
2. **Stream (64 cycles).** a[0..63] is read one coefficient per cycle and broadcast to
   all four cells. Cell m forms a[t]*b[j+m] and adds the partial sum of its right
   neighbour, so partial sums move one cell to the left per cycle. The rightmost cell
   adds the partial sum of coefficient t+j+3 from the result memory. The leftmost
   register then holds coefficient t+j complete for this chunk, and it is written back
   to the result memory in the same cycle as the next read. Both result-memory ports
   are busy: one write and one read per cycle.
3. **Fill and flush (4 + 3 cycles).** Each multiplier has two pipeline stages: a low
   partial product a*b[7:0] and a high one a[7:0]*b[15:8], then their sum. With the
   registered a operand, the first result appears 4 cycles after the first read. Three
   more cycles, with a forced to zero, drain the chain. During the first three fill
   cycles, the zero products let the chain pick up, from the result memory, the
   partial sums that the left cells need for the first coefficients of the chunk.

A chunk takes 2 + 4 + 64 + 3 = 73 cycles, and a product takes 16 x 73 = **1168 cycles**.
For NM up to 4 the latency is 64/NM (NM/2 + 4 + 64 + NM - 1) = 4288/NM + 96. Priming
the chain takes NM - 1 cycles, so for larger NM the fill grows from 4 to NM cycles and
the stream starts reading a later: with NM = 8 a product takes 8 x (4 + 8 + 64 + 7) =
664 cycles, not the 632 the formula gives, and NM = 16 takes 412 instead of 364.

The only difference between MUL and MAC is whether the partial sum read from the result
memory is used:

* **MAC** always adds it, so the previous product is accumulated.
* **MUL** uses it only where an earlier chunk of the same product has written that
  coefficient (chunk > 0 and t <= 59). Elsewhere it adds zero, so old contents never
  leak into a fresh product.

### Interpolation (`tc_interp` and its schedule in `toom_cook4`)

Iteration i (i = 0..126) takes coefficient i of the seven products, (w1..w7) in point
order inf, 2, 1, -1, 1/2, -1/2, 0. It yields seven contributions to coefficients
i, i+64, ..., i+384. The datapath has an input register row, two pipeline register rows
and an output register row. It accepts one iteration per cycle, with a latency of 4.
The sequence of operations is:

```
r1 += r4;  r5 -= r4;  r3 = (r3 - r2) >> 1;  r4 = ((r4 - r0 - 64 r6) << 1) + r5
r2 += r3;  r1 -= 65 r2;  r2 -= r6 + r0                          | pipeline row 1
r1 += 45 r2;  r4 = ((r4 - 8 r2) * inv3) >> 3;  r5 += r1
r1 = ((r1 + 16 r3) * inv9) >> 1                                   | pipeline row 2
r3 = -(r3 + r1);  r5 = ((30 r1 - r5) * inv15) >> 2;  r2 -= r4;  r1 -= r5
outputs (offset 0, 64, .., 384) = r6, r5, r4, r3, r2, r1, r0
```

where r0..r6 = w1..w7 and each line works on the values left by the previous one.

Contributions of iteration i and iteration i+64 land on the same coefficients. Rather
than read-modify-write the system memory, the controller feeds iterations p and p+64
back to back. It adds the two output rows into the eight final coefficients
p + 64 j (j = 0..7) and writes them one per cycle through port B. Iteration 127 does not
exist and is fed as zeros. The write port is the bottleneck: 64 pairs x 8 writes plus 6
pipeline cycles gives 518 cycles, and every coefficient of the 512-word result is
written exactly once.

## Streams and the transfer engine (`stream_port`)

The DMA streams carry 64-bit words with no addresses. The valid/ready/last handshake is
AXI-Stream style. The host sets ADDR_C and LEN and issues LOAD or STORE. The port then
counts addresses from ADDR_C. On input it accepts one word per cycle. On output a
two-entry buffer hides the one-cycle read latency of the block RAM, so a word leaves
every cycle while `m_tready` is high. Back-pressure stalls the reads, and `m_tdata` stays
stable while it waits (there is an assertion for this).

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NM` | 4 | `saber_coproc`, `toom_cook4`, `schb64` | MAC cells per 64 x 64 multiplier (even, divides 64, at most 32); 1168 cycles at 4, 664 at 8, 412 at 16 |
| `MEM_DEPTH` | 1024 | `saber_coproc`, `toom_cook4`, `sys_mem` (`DEPTH`) | system memory words (two 36-kbit block RAMs at 1024) |

Widths (16-bit coefficients, q = 2^13, 64-coefficient sub-polynomials) are package
constants. Changing NM changes the MUL/MAC latency; the `tb_toom_cook4` and
`tb_saber_coproc` checks of 1170 cycles assume NM = 4.

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_lutram_sp`, `tb_lutram_dp`, `tb_sys_mem` | random reads/writes against a reference array, read latency, lane writes |
| `tb_tc_eval` | the seven evaluations against direct polynomial evaluation, latency |
| `tb_tc_interp` | products of random cubics (and sums of up to 3) evaluated, interpolated and compared with direct convolution mod 2^13; latency 4 |
| `tb_schb64` | MUL, MAC, MAC, MUL of random operands against schoolbook products mod 2^16, on NM = 4, 8 and 16 instances; 1168, 664 and 412 cycles |
| `tb_toom_cook4` | one full product and a 3-term inner product (512 coefficients) with a memory model; 130 / 1170 / 518 cycles |
| `tb_cmd_regs` | register read-back, command pulses, acceptance/refusal rules, STATUS, CYCLES |
| `tb_stream_port` | load with input gaps, store with random back-pressure and at full rate, tlast |
| `tb_saber_coproc` | end to end at default parameters: one product (raw and reduced modulo x^256+1), Saber `A*s` for l = 3 with overlapped transfers, refused commands, early tlast; counts each mechanism |
| `tb_saber_levels` | Saber encapsulation arithmetic `A^T s'` and `b^T s'` for l = 2, 3, 4 (6, 12, 20 products), checked in the ring, with the arithmetic cycle totals 9354 / 17672 / 28590 |

The simulator used is Verilator 5 (two-state). Unwritten memory words start at random
values, and the checks are meant to hold under that. To build and run one testbench from
the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/saber_pkg.sv \
          tb/tb_saber_coproc.sv --top-module tb_saber_coproc -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name to run another one. `-y rtl` lets Verilator find the modules
by file name. Every module passes `verilator --lint-only -Wall` with warnings only. The
remaining warnings are unused package constants, unused upper register-bus bits, and the
reset being used in both the flip-flops and the `disable iff` of the assertions.

## How far to trust it, and where it departs from the original description

The design follows a published co-processor. Some parts are carried over as described:

* the block structure: wrapper with command/status registers, block-RAM system memory
  and a Toom-Cook-4 unit made of an evaluation datapath, seven schoolbook multipliers
  and an interpolation datapath;
* the evaluation formulas and points;
* the 16-bit width;
* the four-DSP multiplier chain, with pipeline registers only in the multipliers and
  exactly 1168 cycles per 64 x 64 product;
* the memory types (single-port a, dual-port b and result);
* the 64-bit memory with four coefficients spaced 64 apart per word, and its address
  rewiring;
* the set of commands.

These parts are this implementation's own:

* **Interpolation network.** The original draws a specific adder / inverse-multiplier
  network (using 1/15, 1/3 and 1/5) with two pipeline rows. Here the same linear map is
  computed by the sequence above (1/3, 1/9, 1/15), with the same register structure but
  not the same gates. Its correctness is checked against direct polynomial products,
  not against the original network.
* **Interpolation schedule.** The pairing of iterations p and p+64 into 8 writes, and
  so the 518-cycle figure, is this design's.
* **Multiplier latency for NM > 4.** Above four cells the chain needs a longer fill
  (see above), so the cycle count departs from the original formula there.
* **Evaluation latency.** The description gives 128 cycles; this design needs 130,
  because of the block-RAM read register and the output register.
* **Host interface.** The original talks to an ARM core over AXI and to a DMA engine.
  Here the register side is a simple register bus, and the streams are valid/ready/last
  ports. The register map, opcodes, error flag, cycle counter and the rule that
  transfers may overlap EVAL/MUL/MAC are choices of this design.
* **Result format.** The result is the unreduced 512-coefficient product with 13-bit
  coefficients. The reduction modulo x^256 + 1 is left to the host.
* **Resources.** The original reports 28 or 38 DSPs (its figures disagree). No
  resource target was followed here.

Not included:

* the host processor, its DDR memory and the DMA engine, which are the environment of
  the design;
* the software side of Saber (hashing, sampling, rounding).

The published performance figures (whole-KEM times measured from software, DMA
transfer times) depend on that environment and cannot be reproduced from this RTL
alone.
