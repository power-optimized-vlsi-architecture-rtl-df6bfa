# DA-BLMS: a block LMS adaptive filter built around one shared MAC

This is synthesizable SystemVerilog for a block least-mean-square (BLMS)
adaptive FIR filter in distributed-arithmetic style. It follows the
architecture published by Gangadharaiah, Narayanappa, Divya, Navaneet and
Dushyant, "Power Optimized VLSI Architecture of Distributed Arithmetic Based
Block LMS Adaptive Filter" (IJEER 11(3), 2023). The main idea is to give up
speed for low power. A conventional DA-BLMS filter computes many partial
products in parallel from look-up tables. Here, one multiply-accumulate
(MAC) unit does all of that work, one dot product per clock cycle. It serves
both filtering and weight adaptation. Selection devices feed it L values at
a time, and demultiplexers collect its results. Each block is active only in
its own phase, and a single clock drives everything.

Default configuration: filter length **N = 16**, block size **L = 4**,
8-bit samples, weights and fed-back errors (B' = 8), 16-bit accumulation.
One adaptation iteration for one block of 4 samples takes **64 clock
cycles**.

## The algorithm as the hardware computes it

Let block k bring in the samples x(kL) … x(kL−L+1). The N weights are split
into M = N/L sub-vectors c^j = (w(jL), …, w(jL+L−1)). The input matrix is
split into M square L×L Toeplitz blocks S^j with S^j(i,l) = x(kL − jL − i − l).
The filter computes:

```
u(i,j)   = sum_l  x(kL - jL - i - l) * w(jL + l)          partial filter product
y(kL-i)  = sum_j  u(i,j)                                 filter output, i = 0..L-1
e(kL-i)  = d(kL-i) - y(kL-i)                             error
e'(i)    = trunc(e(kL-i))                                decision device, 16 -> 8 bits
v(i,j)   = sum_l  x(kL - jL - i - l) * e'(l)             weight increment product
w(n)    <- trunc( w(n) + (mu * v(n)) / 16 ),  n = jL + i  weight update
```

S^j is symmetric, so row i and column i are the same L samples. One
selection device (SW) therefore serves both dot products. In phase U it is
paired with the weights, which gives u(i,j). In phase V it is paired with the
error, which gives v(i,j), the increment for weight n = jL + i.

### Number format

All data are **unsigned** and all sums wrap **modulo 2^16**. The multipliers
are unsigned Vedic multipliers. The adders are 16-bit ripple carry adders.
The error d − y is the 16-bit two's-complement difference, and it is
truncated like any other 16-bit value. The step size `mu` is a 4-bit input
read as the fraction mu/16 (0 … 15/16).

This arithmetic matches the published datapath widths. It is not a
sign-aware LMS filter, so it does not converge like a floating-point LMS
filter. Treat the design as a bit-exact model of the published datapath, not
as a ready-to-use echo canceller. See "Departures and open points".

### The decision device (truncation)

A 16-bit error or updated weight must return to an 8-bit input. Keeping only
the upper byte would turn every small value into zero, and adaptation would
stop. The decision device is a 2:1 multiplexer over the two bytes instead:

```
out = (in[15:8] != 0) ? in[15:8] : in[7:0]
```

There are four of them for the errors and sixteen for the weights, one per
weight.

## Schedule of one iteration

A `start` pulse while `busy` is low loads the new samples and the desired
outputs. Then `dablms_ctrl` runs four phases of N = 16 cycles each. A counter
`cnt` = n = jL + i runs 0…15 in every phase, with i counting fastest.

| phase | CTR1 | what happens in cycle n |
|-------|------|-------------------------|
| U | 1 | SW gives row n of the input matrix and SW2 gives c^j. The MAC result u(i,j) goes through DEMUX1 into register n. |
| V | 0 | SW gives row n and SW2 gives the 4 truncated errors. The MAC result v(n) goes into the v collector, register n. |
| W | – | WBSG picks v(n) and w(n). The mu multiplier scales v(n), and the RCA adds w(n). The result goes through a 1:16 DEMUX into register n. |
| T | – | The decision device of weight n loads its truncated result into w(n). |

The outputs y and the errors come combinationally from the held u registers.
Four carry save adders, the error block and four decision devices produce
them. They are stable from the end of phase U onward, so SW2 can feed the
error back during phase V.

`done` pulses 64 cycles after the start cycle. y, e, the fed-back error and
the new weights are then valid, and they stay valid until the next `start`.
A `start` while busy is ignored.

```
clk    _|‾|_|‾|_ ... _|‾|_ ... _|‾|_ ... _|‾|_ ... _|‾|_|‾|_
start  ‾‾‾‾|____________________________________________
phase  IDLE| U (16)   | V (16)   | W (16)   | T (16)   |IDLE
done   ____________________________________________|‾|__
```

## Blocks and files

Everything is in `rtl/`, one module per file. Shared constants and the phase
type are in `dablms_pkg.sv`.

| module | role |
|--------|------|
| `dablms_top` | the filter. Ports: `clk`, `rst_n`, `start`, `x_blk[L]` (x_blk[0] = newest), `d_blk[L]`, `mu`, `y[L]`, `e[L]`, `e_fb[L]`, `w[N]`, `busy`, `done`, plus observation outputs `phase`, `e_hi_sel`, `w_hi_sel` |
| `dablms_ctrl` | phase sequencer: `load`, `cnt`, CTR1 and one enable per phase |
| `sample_buffer` | the N+L−1 = 19 latest samples, shifted by L per block |
| `sw_select` | SW: L-lane multiplexer picking samples n…n+L−1 |
| `sw2_select` | SW2: weights c^j (CTR1 = 1) or truncated errors (CTR1 = 0) |
| `mac_unit` | 4 Vedic multipliers, 3 chained 16-bit RCAs, CTR1 demultiplexer to u/v. Operands are held at zero while disabled |
| `vedic_mult`, `vedic4`, `vedic2` | 8×8 Vedic multiplier from four 4×4, each from four 2×2 |
| `rca` | ripple carry adder (default 16 bits) |
| `demux1to16` | 1:16 demultiplexer with registered outputs (used for u, v and the updated weights) |
| `csa_adder` | 4-operand carry save adder (3:2 compressor chain plus final RCA) |
| `ebsg` | error block, e = d − y |
| `decision` | decision device |
| `mu_mul` | step-size multiplier, (mu·v) >> 4 |
| `wbsg` | 16:1 selection of v(n) and w(n), RCA for w(n) + mu·v(n) |
| `weight_store` | 16 weight registers, each behind its own decision device |

Reset is synchronous and active low. It clears the samples, the collectors
and the weights to zero.

Parameters `N`, `L`, `WIDTH` and `MUW` are generic. `B` must stay 8 because
the Vedic multiplier is fixed at 8×8. Only the default configuration is
verified.

## Simulating

Every module except the Vedic leaf cells `vedic4` and `vedic2` (covered
through `vedic_mult`) has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=… failures=…` and stops itself through a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dablms_pkg.sv tb/tb_dablms_top.sv --top-module tb_dablms_top -o sim
./obj_dir/sim
```

`tb_dablms_top` runs the whole filter at its default size. It checks 60
blocks against an independent reference model of the equations above, in
the same number format. For every block it compares y, e, the truncated
errors and all 16 weights, and it checks that `done` comes exactly 64
cycles after the start cycle. Small and large blocks alternate, and some
desired outputs are placed just above the expected y. That way every
mechanism occurs: all four phases, CTR1 in both states, the upper and the
lower byte of both kinds of decision device, and an ignored `start` while
busy. The test counts each of these and fails if any never happened.

The block testbenches test exhaustively where that is cheap (the Vedic
multiplier, the decision device). Elsewhere they use random vectors against
reference arithmetic.

## Departures and open points

- **Partition.** The formulas above are the standard DA-BLMS partition into
  L×L Toeplitz blocks. They match the published order of the partial
  products (u(0,0), u(1,0), …), the 16 products summed into 4 outputs, the
  4-lane MAC and the 64-cycle count.
- **Signedness and mu.** Unsigned modular arithmetic and mu/16 are choices
  made here. The published design states the widths (8-bit inputs, 16-bit
  RCA, `mu[3:0]`) but not the number format. One sentence gives the error as
  15 bits, but the truncation uses bits [15:8], so 16 bits is used.
- **"The MSB is 0"** is read as "the upper byte is zero".
- **Select signals.** In the published RTL, `sel1`, `sel2` and `CTR1` are
  chip inputs. Here the internal sequencer `dablms_ctrl` generates them. The
  start/busy/done handshake, the v collector registers and the phase
  boundaries are choices made here, made to match the 4 × 16 = 64-cycle
  iteration.
- **Power saving.** Blocks are clock-enabled per phase, and the MAC has
  operand isolation. No clock gating cells are instantiated. The power and
  timing figures of the published FPGA build (about 1.06 mW, about 30.4 ns
  minimum clock period, 3507 LUTs on a ProASIC3L) are not reproduced here.
- **Initial weights** are zero after reset. There is no port for loading
  weights.
