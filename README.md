# Digit-serial semi-systolic convolver

This is synthesizable SystemVerilog for a convolver (an FIR filter with
programmable coefficients) that uses digit-serial arithmetic. It computes

    Y_i = A_1*X_i + A_2*X_(i+1) + ... + A_K*X_(i+K-1)

for a continuous stream of W-bit two's complement samples X and K
coefficients A. The structure is H. T. Kung's semi-systolic "design F":
the coefficients stay in place, the samples move one cell further each
sample period, and a tree of adders collects the products. Here every
operator is digit-serial rather than bit-parallel. Words travel over D
wires, one D-bit digit per clock, least significant digit (LSD) first.
Compared with a bit-parallel array, this makes the hardware about W/D
times smaller, for a throughput of one sample every W/D clocks. The design
follows the article "Digit-Serial Semi-Systolic Convolver". The choices
made here where that description is silent are listed in
[Departures and choices](#departures-and-choices).

Default size: W = 16, D = 4, K = 4. All three are parameters.

## Words, digits and the control signals C1..C_alpha

A word of W bits is cut into alpha = W/D digits. It takes alpha clock
cycles, one *sample period*. Words follow each other with no gap, so every
unit must know which digit is on its inputs. A ring counter (`phase_gen`)
produces the periodic control signals C1..C_alpha. Ci is high only in the
i-th cycle of each sample period, and `phase[i-1]` is Ci. All state
changes that the article describes as strobes of these signals are clock
enables of one common clock.

The LSD of every sample must be presented in a cycle where C1 is high. C1
is high in the first cycle after reset, and the top brings `phase` out so
that a source can align to it.

## Data flow through the convolver (`dsc`)

```
 x ──► MC_1 ──► MC_2 ──► ... ──► MC_K          coefficient chain:
        │        │               │              coef_in ► RA_1 ► RA_2 ► ... ► RA_K ► coef_out
      PL/PH    PL/PH           PL/PH
        └────────┴──── adder tree (cells A, log2 K levels) ──► yl / yh
```

Each multiplier cell MC_j (`mult_cell`) has three parts:

* **RA_j** (`coef_reg`) holds one coefficient. It is one link of a
  bit-serial shift chain through all cells.
* **S_j** (`sync_block`) delays the sample stream by exactly one sample
  period. The delayed stream goes both to the cell's multiplier and on to
  MC_(j+1). So in any sample period MC_1 multiplies X_m, MC_2 multiplies
  X_(m-1), and so on. Because the delay is a whole sample period, all K
  multipliers see digit i of their samples in the same cycle. One set of
  control signals therefore serves the whole array.
* **DSM_j** (`dsm`) multiplies the delayed samples by RA_j.

S_j consists of alpha subblocks L_ji (`sync_subblock`), one per digit
position. Each subblock is double-buffered:

1. Section L' captures digit i at the end of the Ci cycle.
2. Section L'' takes the digit over one cycle later, at the end of the
   C_(i+1) cycle.
3. Section L'' drives the digit during the next Ci cycle, while L' is
   already capturing the same digit of the next word.

The subblocks share one output bus, and exactly one drives it in each
cycle. This double buffering is what lets the structure accept a new
sample every sample period without dummy words: every processing element
is busy in every cycle.

Coefficients are loaded with `coef_shift` high for K*W clocks. Feed A_1
first, then A_2 up to A_K, each LSB first. Afterwards RA_j holds
A_(K-j+1), which is the order the convolution needs. Reloading needs no
reset. Results are meaningless while the chain shifts.

## The digit-serial multiplier (`dsm`, `dsm_st2`, `csm_cell`)

This is the hardest part of the design. The multiplier takes a parallel
W-bit coefficient A and a digit-serial stream of W-bit words X. It returns
each 2W-bit product as two digit streams: the low-order word on `pl` and
the high-order word on `ph`. It has two pipeline stages.

**Stage 1: a folded carry-save array.** A W x W carry-save array
multiplier is folded down to W x D cells (`csm_cell`, a full adder of
x*a, sum-in and carry-in). Row r multiplies A by bit r of the current
digit. The rows are wired as follows:

* A row's sum outputs move one column towards the LSB for the next row.
  Its carries go straight down, because a carry has double weight.
* The sum of the most significant column also feeds that column of the
  next row. This is the sign extension of the partial sum.
* The LSB sum of each row leaves the array as one product bit, so each
  cycle yields one D-bit digit of the low-order product word.

The last row's sums and carries are latched in L_R and feed the first
row in the next cycle, which continues the same product. In the first
cycle of a word (C1) the array inputs are forced to zero instead, which
starts a new product.

*Sign of X.* The MSB of X has weight -2^(W-1). It is on the last row
while C_alpha is high. In that cycle:

* XOR gates invert A for the last row, so that row adds x*(~A).
* The extra cell C_A adds x once more at the row's LSB.

Since -A = ~A + 1, the two together subtract A*2^(W-1). The carry of
C_A belongs to the high-order word and is kept for stage 2. The sign of A
needs nothing special: in the MSB column every bit has negative weight,
so the ordinary full adders are correct there.

The D product bits of each cycle are latched in L_L. Low digit i of a
product is on `pl` one cycle after input digit i.

**Stage 2: resolving the high-order word.** At the end of the C_alpha
cycle the upper half of the product is still in carry-save form: a
vector of sums, a vector of carries and the C_A carry. These are latched
in L_S and L_SC (`dsm_st2`). During the next sample period a D-bit
ripple-carry adder adds them one digit at a time:

* mux_PS selects digit i of both vectors while Ci is high.
* MUX_C gives the adder L_SC as carry-in in the C1 cycle, and the carry
  latched in L_C in every other cycle.

The result digits go through L_H to `ph`. Meanwhile stage 1 is already
multiplying the next word. High digit i appears alpha cycles after low
digit i.

## The pipeline adder tree (`adder_tree`, `adder_cell`)

The tree sums the K products. It has L = floor(log2(K-1)) + 1 levels
(that is, ceil(log2 K)), and every level adds one clock cycle. Its cells
(cell A, `adder_cell`) work in one of two modes.

* **ADD mode: a double digit-serial adder.** RCA_L adds the low-order
  digit streams and RCA_H the high-order streams. The high-order digits
  of word m arrive together with the low-order digits of word m+1, so the
  two adders run at the same time. In the first cycle of a word, RCA_L
  starts with carry 0. In that same cycle MUX_H gives RCA_H the final
  carry of the low-order word, held in LCL. In the other cycles each adder
  uses its own carry latch (LCL, LCH).
* **L mode: a one-cycle delay.** The cell passes one operand to its
  outputs one cycle later. A level with an odd number of inputs pairs the
  last input with nothing and puts that cell in L mode, so every branch of
  the tree has the same delay. This happens for K = 3 and K = 6, for
  example. At the default K = 4 every cell is in ADD mode.

A multiplier delivers the LSD of a product in the C2 cycle. So the first
tree level is driven by C2, and level l by C_(l+1) (indices modulo
alpha).

## Timing and throughput

Suppose the LSD of X_1 is on `x` in cycle t. Then:

* the LSD of Y_1 is on `yl` in cycle t + Z, with
  **Z = alpha*K + floor(log2(K-1)) + 2**, made of:
  * alpha*K cycles to fill the chain of synchronisation blocks;
  * 1 cycle of multiplier latency;
  * L cycles of adder tree;
* the LSD of Y_1's high-order word is on `yh` alpha cycles later;
* Y_(i+1) follows Y_i after alpha cycles.

So the convolver produces one result per sample period, and the sample
rate is f_clk / alpha.

Results are computed modulo 2^(2W). They equal the true convolution if
each coefficient fits in Amax = W - floor(log2(K-1)) - 1 bits (two's
complement); samples may use all W bits. With that limit, the sum of K
products cannot overflow 2W bits.

| W  | D | alpha | K | Amax | Z  | tested in |
|----|---|-------|---|------|----|-----------|
| 8  | 4 | 2     | 8 | 5    | 20 | `tb_dsc_table1` |
| 12 | 3 | 4     | 6 | 9    | 28 | `tb_dsc_table1` |
| 16 | 4 | 4     | 4 | 14   | 19 | `tb_dsc`, `tb_dsc_table1` (default) |
| 24 | 6 | 4     | 3 | 22   | 15 | `tb_dsc_table1` |
| 32 | 8 | 4     | 2 | 31   | 10 | `tb_dsc_table1` |
| 16 | 4 | 4     | 8 | 13   | 36 | `tb_dsc_table1` |

The first five rows are the configurations for which the original design
was evaluated. That evaluation also reports clock frequencies for a 1990s
CMOS standard-cell library. They describe that implementation, not this
RTL, and are not reproduced here.

## Top-level interface (`dsc`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; all registers use the rising edge |
| `rst_n` | in | 1 | synchronous reset, active low; clears all registers, including coefficients |
| `coef_shift` | in | 1 | shift the coefficient chain by one bit |
| `coef_in` | in | 1 | serial coefficient bit |
| `coef_out` | out | 1 | end of the coefficient chain |
| `x` | in | D | sample digit, LSD first, LSD in a C1 cycle |
| `yl` | out | D | low-order result digit |
| `yh` | out | D | high-order result digit |
| `phase` | out | alpha | C1..C_alpha, one-hot |

Parameters: `W` (word size), `D` (digit size, must divide W), `K`
(taps). W/D >= 2 and K >= 2 are required.

## Departures and choices

The following points are not fixed by the original description, or
differ from it.

* **Single clock, no three-state buses.** The original design uses
  separate strobes for the subblock sections and three-state buffers on
  shared digit buses and inside cell A. Here all storage is clocked by one
  clock with clock enables. The three-state buses are AND-gated outputs
  combined by OR, or multiplexers.
* **Carry into the high-order word in cell A.** The description says both
  of cell A's adders start a word with carry 0. It also says RCA_H takes
  LCL's carry in the first cycle of its word. The second is implemented:
  a zero there would lose the carry between the two halves of the sum.
  LCL also carries between the digits of RCA_L.
* **Tree shape and modes.** For K that is not a power of two, the pairing
  of inputs is this design's own. The ADD/L modes are fixed by K when the
  design is elaborated, not set at run time.
* **Stage-1 reset.** The clearing of L_R at the start of each word is
  done by forcing the array inputs to zero while C1 is high.
* **Cell details.** The sum equation of the basic cell is the standard
  full-adder sum. How the carry-save partial sum is sign-extended is this
  design's reading of the algorithm: the MSB-column sum is fed back into
  that column, and carries are not extended.
* **Synchronisation sections.** Each L' and L'' section holds one D-bit
  digit.
* **Interface details are this design's.** These are the reset, the
  port names, the bit order of coefficient loading, and bringing out
  `phase` for input alignment.

## Files

| file | contents |
|------|----------|
| `rtl/dsc_pkg.sv` | functions for tree depth, latency Z and Amax |
| `rtl/dsc.sv` | top: chain of multiplier cells plus adder tree |
| `rtl/phase_gen.sv` | control signals C1..C_alpha |
| `rtl/mult_cell.sv` | multiplier cell MC_j |
| `rtl/coef_reg.sv` | coefficient register RA_j |
| `rtl/sync_block.sv`, `rtl/sync_subblock.sv` | synchronisation block S_j and its subblocks L_ji |
| `rtl/dsm.sv` | digit-serial multiplier, stage 1 (array, C_A, L_R, L_L) |
| `rtl/dsm_st2.sv` | digit-serial multiplier, stage 2 (high-order word) |
| `rtl/csm_cell.sv` | carry-save array cell |
| `rtl/adder_tree.sv`, `rtl/adder_cell.sv` | adder tree and cell A |
| `rtl/digit_rca.sv` | D-bit ripple-carry adder |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/dsc_driver.sv` | stimulus and reference model for the whole convolver |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dsc_pkg.sv tb/tb_dsc.sv --top-module tb_dsc -o sim
./obj_dir/sim
```

Replace `tb_dsc` with any other testbench name. The testbenches are:

* `tb_dsc`: the default configuration, end to end. It loads two
  coefficient sets (the second without reset) and checks about 400 result
  words at the cycles given by Z = 19.
* `tb_dsc_table1`: all six configurations of the table above, side by
  side. This covers the L-mode cells (K = 3 and K = 6) and digit sizes 3,
  4, 6 and 8.
* One testbench per module: exhaustive checks for the cell; random
  products for the multiplier (W = 16/D = 4 and W = 12/D = 3); random sums
  for cell A and the tree (K = 4, 3 and 6); exact delays for the
  synchronisation blocks.

Each testbench compares with a reference computed in plain integer
arithmetic, and checks the cycle in which each digit appears. All
testbenches pass. Changing the design is mostly a matter of parameters.
To support a new K or digit size, run `tb_dsc_table1` with an extra row.

## How far it can be trusted

The design has been checked only in simulation, against integer reference
models, over random data that includes the most negative sample and
coefficient values. The latency formula and the sample-period throughput
are met exactly in all six configurations. No gate-level netlist or
timing analysis was made.
