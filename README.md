# Carry-chain-free distributed arithmetic MACs

Distributed arithmetic (DA) computes a dot product with constant coefficients,

    Y = A0*x0 + A1*x1 + ... + A(K-1)*x(K-1),

without multipliers. The samples are read one bit position at a time. The bits
at position c of all samples form the address of a small table. That table
holds every partial sum of the coefficients. A shift-accumulator then adds the
table words, each weighted by 2^c. In the usual form that accumulator is an
n-bit adder with a register. Its carry chain sets the clock period, and it is
paid once per bit of the word.

The designs here remove that chain from the clocked loop. The accumulator is a
row of bit-level processing elements (PEs). Each PE is one full adder with a
registered sum and a registered carry. A carry is never passed on within a
clock. It is kept and added in the next clock, where the one-bit shift of the
accumulator has given it the right weight. The clock period therefore drops
to table lookup + XOR + one full adder. A single carry-propagate adder resolves
the leftover sums and carries once, after the last clock.

Three designs are provided, two of them in a bit-level and an r-bit form:

| module | what | samples | clocks, start to `done` | result width |
|---|---|---|---|---|
| `sda1_mac4` (R = 1) | one-LUT serial DA, bit-level PEs | 4 | N+1 | N+COEF_W+2 |
| `sda1_mac4` (R > 1) | same, r-bit PEs (ripple inside a PE) | 4 | N+1 | N+COEF_W+2 |
| `sda2_mac8` (R = 1) | two-LUT serial DA with a bit-level adder array | 8 | N+3 | N+COEF_W+3 |
| `sda2_mac8` (R > 1) | same, r-bit PEs in adder array and accumulator | 8 | N+3 | N+COEF_W+3 |
| `pda2_mac4` | 2-bit parallel DA (two bit positions per clock) | 4 | N/2+3 | N+COEF_W+2 |

`da_top` instantiates all five side by side: `sda1_mac4` and `sda2_mac8`, each
with R = 1 and with R = 8, and `pda2_mac4`. They share only the clock and
reset. The defaults are N = 32-bit samples and COEF_W = 32-bit coefficients.

## Number formats

* The samples `x` are N-bit two's complement integers. They are packed as
  `logic [K-1:0][N-1:0]`, so `x[k]` is sample k.
* The coefficients are **unsigned** COEF_W-bit constants. They are set by a
  parameter, packed as `{A(K-1), ..., A0}`. The defaults in `da_pkg` are
  arbitrary values. The accumulators depend on the sign. Every table word
  before the sign cycle must be non-negative, because the top PE shifts in a
  0. Signed coefficients would need a different top end.
* The table word is COEF_W+2 bits wide, which holds the sum of four
  coefficients.
* The result `y` is a full-precision two's complement integer that equals the
  exact dot product. It is valid while `done` is high.

## How the serial accumulator works

Bit c of the samples gives the table word Z_c = sum_k A_k * x_k[c]. For
two's complement samples:

    Y = sum_{c<N-1} 2^c Z_c  -  2^(N-1) Z_(N-1)

The accumulator handles one c per clock, LSB first:

    V <= Z_c + (V - lsb(V)) / 2

The bit that is dropped each clock is a finished bit of Y. It moves into the
output shift register `out_shift_reg`.

In `sda_shift_acc`, V is held as a sum word `s` and a carry word. Bit j is a
`pe_bit` with three inputs:

* the table bit Z_c[j];
* the sum bit of bit j+1, which is the shift;
* its own carry from the previous clock.

That carry had weight 2^(j+1). After the one-bit shift it has weight 2^j, so it
belongs back in the same PE. Nothing propagates sideways. The representation
stays exact:

    V = sum 2^j s[j] + sum 2^(j+1) c[j]

`s[0]` is exactly the LSB that leaves. In the code, the output `cv` holds all
carry bits placed at their weights, so that V = s + cv.

### The sign cycle and the compensating one

The sign bits make the last word negative. The design inverts that word
(`da_inverter`, an XOR row driven by INV from `da_ctrl`), which gives
-Z - 1. It does not add the +1, because that would need a carry chain. Once
the last clock is done, `done` acts as IO and adds the missing 1 in the final
adder (`cpa`), at the weight of the inverted word's LSB.

The inverted word is zero-extended to the accumulator width. As a result the
residual is off by exactly 2^(top bit). The constant `K` of `cpa` therefore
holds a second bit at the result's MSB. Adding it flips the MSB and turns the
result into an ordinary two's complement number. This MSB term is this
design's own addition. Without it, the top bit of `y` would come out inverted.

### r-bit PEs (`pe_rbit`, `sda1_mac4 #(.R(r))`)

Each group of r bits lets its carry ripple between its cells. Only the last
cell registers its carries. That cell adds four bits: its inputs, the ripple
carry, and its own registered carry C. It therefore produces two carries:

* C (weight 2) goes back into the same cell next clock.
* C1 (weight 4) lands, after the shift, on the lowest cell of the next group.

The clock period becomes r full-adder delays. The number of registers drops by
about a factor r. When r does not divide the width, the last group is shorter.
With r = 1 the module uses `pe_bit` directly.

## Two LUTs, eight products (`sda2_mac8`)

Samples x0..x3 address one table and x4..x7 another. The two words (both
inverted in the sign cycle) meet in `sda_adder_array`. This is a row of
`pe_bit`s in which each PE adds a[j] + b[j] + its own carry. The shift that
follows makes the carry's weight right in the same way as above.

The array's registered sum word enters the shift accumulator one clock later.
Carries are still held in the array after the last data clock. One extra clock
with zero words flushes them out, and the accumulator takes the result one
clock after that. Together these two clocks give N+3.

With `R` > 1 both the adder array and the shift accumulator use r-bit PEs.
Both are then one bit wider than the table word, with zeros on top. The top PE
then never makes a C1 that would have no cell to land in after the shift. If
that width would leave a top group of a single cell, one more bit is added,
because a one-cell top group could hold a carry that needs a second flush
clock. The output `cv` of the adder array carries all held carries at their
weights, so the flush is complete exactly when `cv` is zero.

The two deferred +1s weigh 2^(N-1) each, so together they are a single 1 at
2^N. That is the LSB of the residual, where IO adds it. The output shift
register holds N bits here.

## 2-bit parallel DA (`pda2_mac4`)

Each clock takes bits 2i and 2i+1 of every sample. `psc` with BPC = 2 supplies
them. The even bits address one table (word Z) and the odd bits an identical
table (word Z1, weight 2). Only Z1 is inverted in the last clock, because the
sign bit N-1 is odd. N must be even.

* **`pda_adder_array`** adds Z + 2*Z1 in carry-save form. PE k adds Z[k],
  Z1[k-1] and the registered carry of PE k+1. The accumulator scales by 1/4
  per clock, so a carry of weight 2^(k+1) is worth 2^(k-1) in the next clock.
  It therefore belongs one PE down, not in its own PE. The carry of PE 0 falls
  below the array. A flip-flop (`ff`) delays it one more clock, and it then
  enters the accumulator one cell below the array's LSB.
* **`pda_scaling_acc`** is a carry-save array of N+COEF_W+3 cells. Cell p adds
  its input bit, the sum of cell p+2 and the carry of cell p+1, which means
  V <= I + V/4. The word from the adder array enters at cell N. The N cells
  below take the place of the output shift register: after the last clock the
  first word has moved down to cell 0, and cell p holds weight 2^p of Y.
* One flush clock empties the adder array. The accumulator runs one clock
  behind it. The final adder adds the compensating one at bit N-1 and the MSB
  term.

## Interface and timing

All designs use the same handshake, driven by `da_ctrl`:

* `start` while idle is accepted on that clock edge. The PSCs load the
  samples and all PE registers clear.
* `busy` is high for the following N (serial one-LUT), N+2 (two-LUT) or
  N/2+2 (parallel) clocks.
* `done` then rises and stays high until the next start. `y` is valid while
  `done` is high.
* A `start` while busy is ignored.
* The reset `rst_n` is asynchronous and active low.

The latencies in the table above count the load clock too. `y` is produced by
combinational logic from the registers while `done` is high. That adder is the
only carry chain in each design. Its delay is paid once per operation, not
once per clock.

## Files

| file | contents |
|---|---|
| `rtl/da_pkg.sv` | default sizes and coefficient sets |
| `rtl/psc.sv` | parallel-to-serial converter, 1 or 2 bits per clock |
| `rtl/da_lut.sv` | 2^K-entry partial-sum table, built at elaboration from the coefficients |
| `rtl/da_inverter.sv` | XOR row for the sign cycle |
| `rtl/pe_bit.sv` | bit-level PE: full adder, registered sum and carry |
| `rtl/pe_rbit.sv` | r-bit PE with C and C1 in the last cell |
| `rtl/sda_shift_acc.sv` | carry-save shift accumulator (bit-level or r-bit PEs) |
| `rtl/sda_adder_array.sv` | adder array for two tables (bit-level or r-bit PEs) |
| `rtl/out_shift_reg.sv` | low product bits |
| `rtl/cpa.sv` | final adder with compensating constant |
| `rtl/pda_adder_array.sv`, `rtl/pda_scaling_acc.sv` | 2-bit parallel datapath |
| `rtl/da_ctrl.sv` | sequencer: load, count, INV, done/IO |
| `rtl/sda1_mac4.sv`, `rtl/sda2_mac8.sv`, `rtl/pda2_mac4.sv` | the MACs |
| `rtl/da_top.sv` | all five side by side |

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
clocks if it hangs. The MAC testbenches compare `y` with the dot product
computed in the testbench using 128-bit integers. They also check the clock
count. The inputs cover random samples and every combination of the extremes
-2^(N-1), 2^(N-1)-1, 0 and -1.

* `tb_sda1_mac4` runs r = 1, 8 and 3; `tb_sda2_mac8` runs r = 1, 8 and 2.
  Both also use all-ones coefficients, the worst case for carries.
* `tb_pda2_mac4` also runs N = 8.
* `tb_fig9_sweep` runs `sda1_mac4` at N = 8, 16, 32 and 64, with N-bit
  coefficients. Each size uses r = 1, 2, 3, 4, 8 and 16, and r = N+2, where
  one PE spans the whole accumulator. That is 28 instances running at once.
* `tb_da_top` runs all five instances at full size at the same time. It also
  counts how often these events occurred: a sign subtraction, a C1 carry
  between r-bit PEs (in the accumulator and in the adder array), residual adder-array carries removed by the flush, a
  carry through the FF, and an ignored start. It fails if any of them never
  happened.

To build and run one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/da_pkg.sv tb/tb_da_top.sv \
        --top-module tb_da_top -Mdir obj_tb_da_top -o sim
    ./obj_tb_da_top/sim

Every testbench runs in well under a second.

## Choices and departures

* **Clock count of the parallel design.** Counting the load clock, the design
  takes N/2+3 clocks (19 for N = 32). The reference figure for this
  architecture is N/2+2. That figure counts the traditional parallel design
  one clock shorter than the same convention gives for the serial designs,
  whose counts (N+1 and N+3) this RTL matches.
* **Result width.** The usual statement for an n-bit DA MAC is a product of
  2n-1 bits, which assumes signed fractional coefficients. Here the
  coefficients are unsigned integers and four (or eight) products are summed.
  So `y` keeps every bit: N+COEF_W+2 bits, or N+COEF_W+3 for eight products.
  Truncate it if fewer bits are wanted.
* **Compensating one in the parallel design.** It is added at bit N-1. That
  is the weight of the odd table word's LSB in the last clock, and it is what
  the arithmetic requires.
* **Final adders of the parallel design.** The sum-and-carry adder and the
  adder that inserts the 1 are merged into one adder.
* **Choices of this RTL.** The MSB term of the final constant, the control
  sequence, the handshake, clear and enable on the PEs, zero fill in the PSCs
  and the coefficient values are all choices made here.
* **Assertions.** The designs assert that `busy` and `done` are never high
  together. They also assert that the adder arrays hold no carry once the
  result is complete.

## Not included

* The conventional designs with an n-bit carry-propagate accumulator. This
  architecture was compared against them, so they are not built here.
* The r-bit form of the 2-bit parallel design. Its scaling moves a carry one
  position down per clock, so the carries of an r-bit PE's last cell would
  have to enter cells inside the same PE. No arrangement for that is given,
  so only the bit-level parallel design is built.
* The FPGA vendor's dedicated carry logic.
* The analytic CLB-count and delay model. Clock periods and CLB counts are
  properties of a particular FPGA mapping, not of this RTL.
