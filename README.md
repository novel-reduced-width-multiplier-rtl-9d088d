# Reduced-width multiplier with free truncation-error compensation for FPGAs

An N x N unsigned multiplier normally produces 2N product bits. Often only the
upper half is kept, for example in a filter or in a floating-point mantissa
datapath. A *reduced-width* multiplier keeps only the upper N+W bits,
P[2N-1 : N-W], and does not build the logic for the partial products below
that line. This saves more than half of the multiplier, but the result always
comes out too small: every removed partial product would have added to it.

ASIC designs correct this with extra gates that estimate the removed part. On
an FPGA those gates cost LUTs, about as many as simply moving the truncation
line one bit lower. This design uses a correction that costs nothing. An FPGA
multiplier is built from 2 x k-bit slices on the slice carry chain, and each
chain has a carry-in at its lowest column. After truncation that carry-in is
unused. Here it is driven with one operand bit. A uniformly distributed bit
has mean 1/2, which stands in for the mean of the removed products. The LUT
count is exactly that of plain truncation.

Take N = 8 and W = 1 with three of the four blocks compensated. The maximum
error drops from 6.0 to 3.7 units in the last place (ULP). The mean error
drops from 1.5 ULP to about 0.

## Structure

```
            A[7:6] x B[7:0]   A[5:4] x B[7:2]   A[3:2] x B[7:4]   A[1:0] x B[7:6]
            cin = A[6]        cin = B[2]        cin = A[2]        cin = B[6]
  block         3                 2                 1                 0
  output    P3[15:7]          P2[13:7]          P1[11:7]          P0[9:7]
               \_________________\_________________\_________________/
                                        +  (pp_adder)
                                    P[15:7]  (9 bits)
                                        |
                              round to 8 bits (fw_round)
```

The table and the hierarchy below are for the default N = 8, W = 1.

| module | what it is |
|---|---|
| `fw_mult_top` | top: `rw_mult` followed by `fw_round`; outputs the N+W-bit and the N-bit product |
| `rw_mult` | the reduced-width multiplier: N/2 `mul2xk` blocks, compensation wiring, `pp_adder` |
| `mul2xk` | one 2 x k-bit block: a carry chain of `mult_cell`s |
| `mult_cell` | one column of a block: LUT, dedicated AND, carry mux, carry XOR |
| `pp_adder` | sum of the aligned block outputs |
| `fw_round` | rounds N+W bits to N bits, ties rounded up |
| `rwm_pkg` | geometry functions: which columns and B bits each block keeps, and where its carry-in comes from |

Everything is combinational. There is no clock, no register and no reset. A
result is valid one carry-chain-plus-adder delay after the operands change.
For a pipelined design, register around `fw_mult_top`.

### The column cell (`mult_cell`)

Block i multiplies the bit pair {A[2i+1], A[2i]} by B. Column j of the block
adds two products of equal weight, A[2i]*B[j+1] and A[2i+1]*B[j], and the
incoming carry. It maps onto one FPGA slice position:

* the LUT forms `prop = (Am & Bn+1) ^ (Am+1 & Bn)`;
* a dedicated AND gate (MULT_AND) forms `gen = Am+1 & Bn`;
* the carry mux (MUXCY) outputs `ci` when `prop` is 1 and `gen` otherwise.
  When `prop` is 0 the two products are equal, so either one is the carry;
* the carry XOR (XORCY) forms `s = prop ^ ci`.

So each kept column costs one LUT. The RTL writes this as plain logic, not as
vendor primitives.

### Truncation inside a block (`mul2xk`)

The truncation line is column T = N-W. Block i's lowest column is 2i. If
2i < T, every column below T is removed. The lowest column that remains
is T. It adds A[2i]*B[T-2i+1] and A[2i+1]*B[T-2i], so the block needs only
B[N-1 : T-2i]. These are the shrinking B slices in the diagram above. A
truncated block with a K-bit B slice has K columns plus its final carry,
so K+1 output bits. Its value is `a0*(b>>1) + a1*b + cin` in units of 2^T.

For large W a block can lie wholly above the line (2i >= T). It is then built
untruncated (`FULL = 1`), including its single-product column A[2i]*B[0],
and gets no carry-in. With W = N every block is full and the result is the
exact product.

### Which bit feeds each carry-in

Any operand bit has mean 1/2. The choice of bit still matters for the
maximum and RMS error, because the bit is correlated with the products that
remain. Two rules are used:

* The bits alternate between the operands. Odd blocks use A[2i] and even
  blocks use B[N-2-2i]. For N = 8 that is A[6], B[2], A[2], B[6] for blocks
  3..0. Alternating gives a slightly lower mean absolute error and RMS error
  than taking every bit from one operand. For example, at N = 8, W = 1 and
  three compensated blocks, the RMS error is 0.974 ULP alternating and
  0.986 ULP with A[6], A[4], A[2]. The maximum error is not lower: 3.695
  against 3.664 ULP.
* The chosen bit is a factor of one of the products removed from that block.

The same bits are used for every W. `rwm_pkg::cin_from_a` and
`rwm_pkg::cin_idx` define the rule.

### How many blocks to compensate (`CIN_EN`)

Each carry-in can only move the mean error in steps of 1/2 ULP, while the
removed products have a mean that depends on W. At N = 8 that mean is 1.75 ULP
for W = 0 and 1.50 ULP for W = 1. Compensating all four blocks gives a mean
error of −0.25 or −0.50 ULP. Compensating three gives +0.25 or 0.

`CIN_EN[i]` enables block i's carry-in.

* The default, `4'b1111`, is the block diagram the design is based on.
* `4'b1110` leaves block 0 uncompensated. This is the configuration whose
  error statistics are quoted below. It keeps the mean error at 0 or +0.25
  ULP for every W.

Pick `4'b1110` if mean error matters most. At W = 1 the default has mean
−0.50 ULP and maximum 3.875 ULP. `4'b1110` has mean 0.00 ULP and maximum
3.695 ULP.

### Optional quarter-ULP term (`EXTRA_AND`)

Where the mean error stays at +0.25 ULP, one more term with mean 1/4 removes
it: the AND of two operand bits. `EXTRA_AND = 1` adds `A[0] & B[N-1]` as a
fifth adder input at the last place. Unlike the carry-ins, this costs logic:
one AND gate and one more adder operand. It is therefore off by default. Which
two bits to AND is this design's choice; any pair has the same mean.

### Fixed-width output (`fw_round`)

A fixed-width multiplier returns N bits from N-bit operands. Using W > 0
extra bits and then rounding them off reduces the total error. Rounding is
round to nearest with ties up: add 2^(W-1), then drop W bits. For W = 0 there
is nothing to round. The rounded value always fits in N bits here; an
assertion checks this.

## Accuracy

Error e = exact − obtained, in ULP of the output (weight 2^(N-W) for `p_rw`).
The numbers below come from all 65536 operand pairs at N = 8 (from
`tb_err_stats`). They use `CIN_EN = 4'b1110` for the compensated columns.

| W | ME | RMSE | Emax | ME comp. | MAE comp. | RMSE comp. | Emax comp. |
|---|---|---|---|---|---|---|---|
| 8 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| 6 | 0.312 | 0.484 | 1.250 | 0.312 | 0.312 | 0.484 | 1.250 |
| 4 | 0.766 | 0.985 | 3.062 | 0.266 | 0.561 | 0.719 | 2.312 |
| 2 | 1.254 | 1.495 | 5.016 | 0.254 | 0.692 | 0.871 | 3.391 |
| 1 | 1.502 | 1.750 | 6.008 | 0.002 | 0.780 | 0.974 | 3.695 |
| 0 | 1.751 | 2.005 | 7.004 | 0.251 | 0.831 | 1.042 | 4.348 |

Without compensation MAE equals ME, because truncation never over-estimates.

The 8-bit rounded product at W = 1 has Emax 3.0 ULP without compensation and
1.94 ULP with it. From about W = 3 upward, the rounding error (RMS 0.289 ULP,
maximum 0.5 ULP) dominates. With the extra term at W = 0 the mean error is
0.001 ULP.

At N = 16, over 100000 random pairs, W = 0 gives ME 3.74 and RMSE 4.01 ULP
without compensation. It gives ME 0.24 and RMSE 1.49 ULP with seven
compensated blocks.

These figures match the published ones to the printed precision. At N = 8,
W = 0 those are ME 1.75, RMSE 2.0, Emax 7.0, compensated ME 0.25 and Emax
4.35. RMSE at W = 1 is 1.75.

Cost: each block has one LUT-cell per kept column. For N = 8 that is
8+6+4+2 = 20 cells at W = 1 and 36 at W = 8, before the adder. The published
Virtex-4 totals, adders included, range from 35 LUTs (W = 0) to 83 LUTs
(W = 8). These totals were not reproduced here.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | operand width, even |
| `W` | 1 | extra product bits kept below 2^N, 0..N |
| `CIN_EN` | all ones | per-block carry-in compensation enable (bit i = block of A[2i+1:2i]) |
| `EXTRA_AND` | 0 | add the A[0] & B[N-1] quarter-ULP term |

Ports of `fw_mult_top`:

| port | direction | width | meaning |
|---|---|---|---|
| `a` | in | N | operand A |
| `b` | in | N | operand B |
| `p_rw` | out | N+W | P[2N-1 : N-W] |
| `p_fw` | out | N | `p_rw` rounded to N bits |

## Where this RTL departs from or goes beyond the source design

* The default `CIN_EN` compensates all four blocks, as drawn in the block
  diagram. The published error statistics correspond to block 0
  uncompensated (`4'b1110`); see above.
* The carry-in rule is given for N = 8, W = 1 and described only loosely in
  general. The alternating rule used here reproduces the N = 8 connections.
  It was not checked against any published N = 16 connection list.
* The adder's internal organisation and the rounding rule are not specified.
  A plain sum and round-half-up were chosen; the latter reproduces the
  published rounding statistics.
* The operands and the product are unsigned only.
* The `FULL` (untruncated) block and the choice of bits for `EXTRA_AND` are
  this design's generalisations.
* The design is vendor-neutral RTL. The one-LUT-per-column cost holds only
  if each `mult_cell` lands on the slice carry chain. A generic flow does not
  guarantee this. For example, `synth_xilinx -family xc2v` in yosys (LUT4)
  flattens the cells and gives about 160 to 275 LUTs for W = 0 to 8, several
  times the carry-chain figure. To get the intended cost, map `mult_cell`
  onto the vendor's carry-chain primitives, or use a tool that infers them.

## Simulation

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Testbenches that use the reference
model also need `tb/tb_ref_pkg.sv`; `tb_err_stats` also uses the helper
`tb/err_stats.sv`. An example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rwm_pkg.sv tb/tb_ref_pkg.sv tb/tb_fw_mult_top.sv --top-module tb_fw_mult_top
./obj_dir/Vtb_fw_mult_top
```

| testbench | what it covers |
|---|---|
| `tb_mult_cell` | all 32 input combinations of one column |
| `tb_mul2xk` | blocks with K = 8, 6, 4, 2, 1 and one untruncated block, for every input |
| `tb_pp_adder` | random sums and the all-ones case |
| `tb_fw_round` | rounding for W = 0, 1, 3 |
| `tb_rw_mult` | all 65536 operand pairs for W = 0, 1, 4, 8, with different compensation settings and the extra term, against a bit-level reference |
| `tb_fw_mult_top` | the top at default parameters, all operand pairs, both outputs. Also counts how often compensation changes the result and how often rounding rounds up and down |
| `tb_err_stats` | the accuracy numbers above, checked against the published values |

Each one runs in under a second once compiled.

To change the design:

* To change the operand width or the precision, set `N` and `W`.
* The only places that decide which bits feed the carry-ins are the
  functions in `rwm_pkg`.
* The test reference model `tb_ref_pkg` has the N = 8 connections written out
  by hand. Update it if the rule changes.
