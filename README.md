# Low-power geometry processor with logarithmic arithmetic

A vertex shader spends most of its time multiplying: 4x4 matrix transforms,
lighting dot products, normalisation (x / sqrt(y)), powers for specular
highlights and polynomial series for sine and cosine. In a logarithmic number
system (LNS) a multiply is an add, a divide is a subtract, a square root is a
one-bit shift and x^y is one multiply. This design keeps its operands in
floating point (FLP), converts them to base-2 logarithms with a small
piecewise-linear converter, does the multiplicative work in the log domain,
converts back, and does the remaining linear additions in FLP. One 4-channel,
5-stage multifunction unit (MFU) built this way covers every vertex-shader
operation. Where instructions depend on each other, the log-domain result is
forwarded straight into the next instruction, which skips the round trip
through antilog and log conversion.

Around the shader sit a matrix FIFO (matrices coming from an application
processor), a vertex fetch unit, an index FIFO towards a rendering engine,
and two frequency selectors. Each selector watches one FIFO's fill level and
picks a clock frequency for its power domain (dynamic voltage and frequency
scaling, DVFS).

## Number formats (`lgp_pkg`)

| format | layout | notes |
|---|---|---|
| FLP | IEEE-754 binary32 bit layout | exponent 0 means zero. There are no subnormals, no infinities and no NaN. Results are truncated and saturate at +/-0x7F7FFFFF. |
| LNS | `{s, z, l[29:0]}` | `s` is the sign (bit 31, as in FLP) and `z` flags zero. `l` is log2\|x\| as a signed Q9.21 fixed-point number. |

A vector is four 32-bit words, `vec_t = logic [3:0][31:0]`. Constant memory
holds matrices in LNS form. Everything else the shader stores is FLP.
Log-domain sums saturate to the Q9.21 range, and dividing by zero gives the
largest value.

## Converters

**LOGC (FLP to LNS), `logc`.** For x = 2^k (1+m), log2 x = k + log2(1+m).
The fraction m in [0,1) is split into 16 equal segments by its top four bits;
the last two share an entry, giving 15 table entries. Each segment
approximates log2(1+m) ~ a_i m + b_i. The slope is not multiplied: it is
`m (+/-) m>>c_i (+/-) m>>d_i (+/-) m>>e_i`, so an entry stores three shift
amounts, three signs and the offset b_i. That makes one small adder tree.
The entries are a per-segment minimax fit: for each segment, choose the
signed shift terms and the offset that minimise the largest error. The peak
error is 4.5e-4 in log2, which is 0.03 % of the value.

**ALOGC (LNS to FLP), `alogc`.** For l = k + f with f in [0,1),
2^l = 2^f << k, and 2^f ~ a_i f + b_i over 8 segments (the top three bits of
f). The slope is `f (+/-) f>>c_i (+/-) f>>d_i`. The peak relative error is
0.079 %. The mantissa is clamped to [1,2). An exponent that underflows gives
zero; one that overflows saturates.

Because a LOGC/ALOGC round trip costs accuracy (about 0.1 % relative), the
testbenches compare MFU results with real-number references at a tolerance.
They do not check bit-exact IEEE results.

## Multifunction unit (`mfu`)

Four channels, five stages. An operation issued in cycle t comes out in cycle
t+5. The unit takes one operation per cycle and never stalls.

| stage | per channel |
|---|---|
| E1 | LOGC of operand x |
| E2 | PMUL: a shared adder tree used as a log converter (operand y), an antilog converter, or a radix-4 Booth multiplier (y * log2 x), followed by a shifter |
| E3 | log-domain adder/subtractor, then ALOGC. The adder output is the forwarding value. |
| E4 | PADD: four FLP adders, either one per channel or joined into a reduction tree |
| E5 | ACC: FLP accumulation across the two phases of MAT (sum) or CRS (difference) |

Operations (`mfu_op_e`). x, y and z are the three operands, per channel c.
`sub` turns the final addition into a subtraction.

| op | result |
|---|---|
| ADD | x + y. No log conversion is involved. |
| MUL, DIV | x * y, x / y |
| DSQ | x / sqrt(y). The log of y is shifted right by one. |
| MAD | x * y + z |
| DOT | sum over c of x_c * y_c, given on all four channels |
| POW | \|x_c\|^(y_c), computed as 2^(y * log2\|x\|) with the Booth multiplier |
| ELM | series x_3 + sum over c of sign(C_c) * 2^(C_c + k_c log2\|x_0\|), where k = y (FLP) and C = z (LNS) |
| MAT | 4x4 matrix times vector in two phases (below) |
| LOG | log2 x as an FLP number |
| LNS | the raw LNS word of x. Matrices are converted with it before use. |
| CRS | cross product x × y in two phases (below); channel 3 gives 0 |

ELM is written for power series such as sin x = x - x^3/6 + x^5/120 - ...
Each coefficient is stored as an LNS value C_i, whose sign bit carries the
term's sign, and each exponent as k_i. The fifth term (here x itself) enters
the PADD tree through x_3.

**MAT.** A transform y = M x needs 16 products. The unit issues MAT in two
consecutive cycles. In phase p, channels 0 and 1 convert x_2p and x_2p+1,
and every channel i computes c_i,2p * x_2p and c_i,2p+1 * x_2p+1. The first
product uses the E2 log adder plus PMUL as antilog converter. The second uses
the E3 log adder plus ALOGC. The matrix columns 2p and 2p+1 arrive, already in
LNS, on y and z. PADD adds the two products and ACC adds the two phases. So
one transform finishes every 2 cycles, 6 cycles after its first phase. Only
the second phase produces an output.

**CRS.** The cross product also takes two issue cycles, with the same x and y
in both. Phase 0 computes x.yzx * y.zxy on the MUL path, and phase 1 computes
x.zxy * y.yzx. The operands are rotated inside the unit, before LOGC for x and
before PMUL for y. ACC subtracts the second product from the first. Channel 3
multiplies x_3 * y_3 in both phases, so it returns exactly 0.

**PADD.** The tree is wired as ch0 = a0 + a1, ch3 = a2 + a3, ch1 = ch0 + ch3,
ch2 = ch1 + e. DOT uses e = 0 and ELM uses e = x_3. Without the tree, channel
c computes a_c +/- b_c: the second MAT product, MAD's z, or ADD's y. MUL, DIV,
DSQ, POW, LOG, LNS and CRS skip the adders.

**Log-domain forwarding.** The `in_fwd` input makes E3 take x's log value not
from its own LOGC but from the E3 result of the operation one cycle ahead.
That producer must be MUL, DIV, DSQ or POW, because only these have no final
linear addition. The consumer must be MUL, DIV, DSQ, MAD or DOT. A chain such
as `t = a*b; u = t*c` then runs at one instruction per cycle instead of
waiting 5 cycles, and skips one antilog/log round trip. An assertion checks
the producer rule.

## Vertex shader (`vertex_shader`)

| memory | size | organisation |
|---|---|---|
| instruction memory | 2 KB | 128 x 128-bit instructions |
| general registers (GPR) | 512 B | 32 x 4 x 32 bit, 3 read ports |
| constant memory | 4 KB | 256 x 128 bit, 3 read ports |
| vertex input buffer (VIB) | 512 B | 32 x 128 bit, 3 read ports |
| vertex output buffer (VOB) | 256 B | 16 x 128 bit |

Each instruction reads three operands. Each operand names a bank
(GPR/constant/VIB), an address, a swizzle (2 bits per output component,
component 0 in bits [1:0]; `8'b11_10_01_00` is identity) and a negate bit.
Each operand passes its own swizzler. The result goes to a GPR or to the VOB
under a 4-bit component mask.

Instruction word (`instr_t`, 128 bits, from the MSB down):

```
rsvd[44:0] target[6:0] src2[18:0] src1[18:0] src0[18:0] wmask[3:0] dst[7:0] dst_vob sub op[4:0]
src = {bank[1:0], addr[7:0], swz[7:0], neg}
```

Opcodes 0-12 are the MFU operations, with src0/src1/src2 as x/y/z. For MAT,
src1 is the first of four consecutive LNS matrix columns. Control opcodes:

| op | effect |
|---|---|
| LDM (16) | constant[dst] <= next matrix-FIFO word. It waits while the FIFO is empty. |
| STC (17) | constant[dst] <= src0 under the write mask. It waits until src0 is written. |
| WAITV (18) | waits until vertex fetch has filled the VIB |
| END (19) | waits until all results are written, holds `vob_valid` until `vob_ready`, releases the VIB, then jumps to `target` |

**Issue and hazards.** One instruction is fetched and issued per cycle. A
five-entry scoreboard tracks the results in flight. An instruction whose GPR
operand is still in flight waits until that result is written, which is 6
cycles after the producer issued. The exception is the forwarding case: the
previous instruction is a MUL/DIV/DSQ/POW writing all four components of a
GPR, and this MUL/DIV/DSQ/MAD/DOT reads that GPR as src0 with no swizzle or
negate. It then issues in the next cycle with `in_fwd` set. A MAT's second
phase always follows its first.

Host writes to instruction and constant memory are meant for while the shader
is idle; a shader write to constant memory wins over a host write. `start`
begins execution at address 0. The `ev` output gives one-cycle event flags
(forwarding, hazard stall, MAT phase, matrix-FIFO wait, vertex wait,
VOB wait) for performance counting.

## Vertex fetch and FIFOs

`vertex_fetch` takes a vertex index. While the VIB is free and the index FIFO
has room, it reads `cfg_nattr` 128-bit words starting at
`cfg_vbase + idx*cfg_nattr` from external memory. It makes one request at a
time (`mem_req/mem_addr`), and the data returns on `mem_rvalid/mem_rdata` any
number of cycles later. It writes word a to VIB entry a, pushes the index into
the index FIFO and sets `vib_full`. END clears it.

`sync_fifo` is a valid/ready FIFO with a level output. The matrix FIFO is
256 x 128 bits (4 KB, one matrix column per entry). The index FIFO is
16 x 32 bits (64 B).

## Power management (`freq_sel`)

Each domain's PLL has a 1 MHz reference and a divide-by-N feedback, so the
ratio N is the target frequency in MHz. Every PERIOD (64) cycles,
`freq_sel` compares its FIFO's level with a reference level. It moves N by
STEP (4) MHz per entry of difference, clamped to 89..200 MHz, and pulses
`changed` so that the PLL relocks and its regulator follows. A level below the
reference means the consumer is starving, so N goes up.

The selector on the matrix FIFO drives the application domain (`n_app`). The
selector on the index FIFO drives the geometry domain (`n_vs`).

## Top level (`lns_gpu_top`)

Port groups:

- **Application processor:** `start`, `imem_*`, `cmem_*`, matrix stream
  `mat_valid/ready/data`, index stream `idx_valid/ready/idx`, `cfg_vbase`,
  `cfg_nattr`, and the two selector references `ref_mfifo`, `ref_ififo`.
- **External memory:** `mem_req`, `mem_addr`, `mem_rvalid`, `mem_rdata`.
- **Rendering engine:** index FIFO output `ififo_valid/ready/data`, and VOB
  handover `vob_valid/ready` with read port `vob_raddr/vob_rdata`.
- **PLL/regulator units:** `n_app`, `n_vs`, `n_app_chg`, `n_vs_chg`.
- **Status:** `running`, `pc`, `ev`.

## What follows the source design and what is this design's own

Taken from the source design:

- the LNS/FLP split;
- the LOGC (15-entry, three shift terms) and ALOGC (8-entry, two shift
  terms) structures;
- the E1-E5 stage assignment, including PMUL's three uses and PADD's tree;
- the MAT two-phase scheme with 2-cycle throughput and 6-cycle latency;
- the 5-cycle latency of the other operations;
- log-domain forwarding for producers without a final addition;
- the memory sizes and the three swizzled operands;
- a FIFO-level-driven frequency choice per domain, with a 1 MHz PLL
  reference and a range of 89-200 MHz.

This design's own choices:

- the exact number formats, rounding, saturation and zero handling;
- the LUT contents (minimax fit);
- DSQ meaning x/sqrt(y);
- the ELM sign rule and the x_3 input for its fifth term;
- the LOG and LNS output operations;
- DOT/ELM results on all channels;
- CRS as a two-phase operation on the MUL path and ACC;
- the instruction set and encoding, the control instructions, and the
  scoreboard that waits for write-back;
- forwarding only into src0, only from the immediately preceding
  instruction, and only for a full-mask GPR result;
- the vertex-fetch protocol and single vertex buffering;
- the selector's proportional update rule, PERIOD and STEP;
- all handshakes and reset values.

Departures and omissions:

- **One clock.** The source design runs the application, geometry and
  rendering parts in separate voltage/frequency domains. Here everything
  runs on `clk`, and the divider ratios are outputs. Clock-domain crossing
  FIFOs would be needed for a real multi-domain chip.
- **Not included:** the PLLs with their regulators and replica-path VCO
  (analog), the RISC application processor, the rendering engine
  (interpolation and texture mapping), and the external SRAM. They connect
  through the top's ports.
- **Throughput.** The shader works on one vertex at a time: the VIB is
  single-buffered, and END waits for the pipeline to drain. A transform-only
  program therefore takes about a dozen cycles per vertex, while the MAT unit
  itself would allow one transform every 2 cycles. The source design's peak
  of 141 Mvertices/s at 200 MHz is not reached.

## Simulation

All testbenches are self-checking and print
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/lgp_pkg.sv tb/tb_pkg.sv rtl/*.sv tb/tb_mfu.sv --top-module tb_mfu
./obj_dir/Vtb_mfu
```

Replace `tb_mfu` with any other testbench.

| testbench | what it checks |
|---|---|
| `tb_logc`, `tb_alogc` | conversion error over random and edge-case inputs |
| `tb_flp_add`, `tb_padd`, `tb_pmul`, `tb_swizzle` | combinational units against real-number models |
| `tb_mfu` | 3000 random operations of every type against reference values, the 5/6-cycle latencies, and forwarded chains |
| `tb_vs_mem`, `tb_sync_fifo`, `tb_freq_sel`, `tb_vertex_fetch` | storage, handshake, level, update rule and fetch protocol |
| `tb_vertex_shader` | a 40-vertex shading program, then a timing program: forwarded MULs in consecutive cycles, a dependent ADD waiting 6 cycles, MATs 2 cycles apart with 6-cycle latency, STC waiting for its operand, CRS taking two issue cycles |
| `tb_lns_gpu_top` | the whole top at default parameters (below) |

`tb_lns_gpu_top` uploads a program, streams matrices and 48 vertex indices,
and models the external memory and the rendering engine. The rendering engine
stalls at times, so both FIFOs and the frequency selectors move. The
program:

1. converts a matrix to LNS;
2. transforms each vertex;
3. computes diffuse and specular lighting with forwarded multiplies,
   POW, DSQ normalisation, a sine series via ELM, LOG, swizzled and negated
   ADD, DIV, and a CRS of the normal with the light vector.

The testbench checks every output vertex against a real-number reference. It
counts forwarding, hazard stalls, MAT phases, FIFO waits, VOB back-pressure
and frequency changes (the geometry domain's in both directions). It fails
if any of them never happens. `tb_pkg` holds the shared conversions, a small assembler and the
test program.
