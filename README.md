# 32-bit multiply-accumulate unit: Dadda tree + carry save adder

This unit computes `acc = Σ a(k) · b(k)` over a job of unsigned 32-bit operand
pairs, one pair per clock. The product is never formed on its own. A Dadda tree
reduces the 32 × 32 partial-product bits to two 64-bit rows. A three-operand
carry save adder (CSA) then adds those two rows and the current accumulator
value in a single pass. As a result, each operation needs only one
carry-propagate addition, not one for the product and another for the
accumulation.

```
 a,b ──► operand_registers ──► dadda_multiplier ──row0,row1──► carry_save_adder ──► accumulator ──► acc
 (32b)     (stage 1)            AND array + 8 reduction         x + y + z            (64b, sticky     │
                                stages, no final adder          z = acc ◄────────────overflow)  ◄─────┘
                       control_unit: start/num_ops, in_valid/in_ready, load, acc_clr, acc_en, done
```

## Dadda reduction (`dadda_multiplier`, `dadda_pkg`)

The AND of every multiplicand bit `a[i]` with every multiplier bit `b[j]` gives
1024 bits. Each bit belongs to column `c = i + j`, and column `c` starts with
`min(c+1, 63-c)` bits. The tree reduces these columns in stages. The target
heights of the stages follow the Dadda sequence `d1 = 2`, `d(j+1) = ⌊1.5·d(j)⌋`,
taken from the largest value below 32: 28, 19, 13, 9, 6, 4, 3, 2.

Take one stage with target `d`. Suppose column `c` holds `h` bits and gets `k`
carries from the adders that column `c-1` uses in the same stage. If `h + k > d`,
the column gets `⌊e/2⌋` full adders and `e mod 2` half adders, where
`e = h + k − d`. That is the fewest adders that bring the column down to `d`.
For 32 bits this gives 8 stages, 899 full adders and 31 half adders (N² − 4N + 3
and N − 1, the known Dadda counts). After the last stage each column has at most
two bits. These bits form `row0` and `row1`, and `row0 + row1 = a·b`.

The tree is generated, not written by hand:

* `build_sched()` in `dadda_multiplier` replays the schedule once at
  elaboration time. It fills a packed table `SCH[stage][column][field]`.
* Each entry holds the column's height, its full-adder count and its half-adder
  count. It also holds where the column sits in the flat wire vector.
* Every stage's bits live in one vector `pp`. Stage `s`, column `c` starts at
  `SCH[s][c][Q_BASE] + SCH[s][c][Q_OFFSET]`.
* Bit order inside a column:
  * The bits a column consumes come first: three per full adder, then two per
    half adder.
  * The bits that pass through come next.
  * The column of the next stage holds, in this order: the passed bits, the
    full-adder sums, the half-adder sums, then the carries from the column
    below.
* Every bit of `pp` has exactly one driver and one reader.
* `N` may be 2 to 64 (`dadda_pkg::MAX_N`).
* At N = 32, elaboration takes a few seconds in Verilator and in slang.

The half and full adders are separate modules (`half_adder`, `full_adder`). The
full adder is built from two half adders and an OR gate. The CSA and the tree
use both modules, so the whole datapath is built from these two cells.

## Three-operand carry save adder (`carry_save_adder`)

The CSA has two rows of full adders.

1. **Carry-save row.** One full adder per bit adds `x[i]`, `y[i]` and `z[i]`. It
   outputs a save bit `s[i]` and a carry `c[i]` of weight `2^(i+1)`. Nothing
   propagates along this row.
2. **Carry-propagate row.** This row adds `s` and `c << 1` by ripple carry:
   * bit 0 of the result is `s[0]`;
   * position `i` adds `s[i]`, `c[i-1]` and the ripple carry;
   * the top position adds `c[W-1]`, a constant 0 and the ripple carry.

The outputs are `sum[W:0]` and `cout`, so `{cout, sum}` equals `x + y + z` with
no bits lost. In the MAC, `W = 64`, `x` and `y` are the two Dadda rows, and `z`
is the accumulator.

## Running a job (`control_unit`, `mac32`)

| signal | role |
|---|---|
| `start`, `num_ops` | Sampled only while idle. `start` clears `acc` and `overflow` and loads the pair count. `num_ops = 0` finishes at once with `acc = 0`. |
| `in_valid` / `in_ready` / `a`, `b` | Handshake for operand pairs. A pair is taken on a rising edge when both are high. `in_ready` is high only while pairs remain to be taken. A source must hold its pair while `in_ready` is low. |
| `acc`, `overflow` | Running sum and sticky overflow flag. |
| `busy`, `done` | `busy` covers the job. `done` is a one-cycle pulse, and `acc` is final while it is high. |

Timing:

* **Pipeline.** The unit has two stages. On edge P the input registers take a
  pair. On edge P+1 the multiplier/CSA result of that pair goes into the
  accumulator.
* **Throughput.** One pair per clock. A cycle with `in_valid` low is a bubble
  and only delays the job.
* **Latency.** `done` rises on edge P+2 after the last pair is taken on edge P.
  For an empty job, `done` comes one edge after `start`.
* **Control states.** The control unit has three states: IDLE, RUN and DRAIN.
  `acc_en` is the input registers' valid bit, so every pair taken is added
  exactly once.
* **Assertions.** Two assertions check that no pair is taken once the count is
  used up, and that the accumulator is never cleared while a pair is in flight.

## Overflow policy

`acc` is 64 bits (`ACC_W`). That is exactly one full 32 × 32 product, so the sum
of two or more large products can exceed it. Whenever the CSA result has a bit
above `ACC_W`, the accumulator sets `overflow`. The flag stays set until the
next `start`. The stored value wraps modulo 2^64. There is no saturation.
Underflow and rounding cannot happen with unsigned integers. If you need more
headroom, set `ACC_W` above `2*N`: the multiplier rows are zero-extended.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `mac32` | `N` | 32 | operand width |
| `mac32`, `accumulator` | `ACC_W` | 64 (`2*N`) | accumulator width, must be ≥ `2*N` |
| `mac32`, `control_unit` | `CNT_W` | 16 | width of `num_ops`; up to 65535 pairs per job |
| `carry_save_adder` | `W` | 64 | operand width |
| `dadda_multiplier`, `operand_registers` | `N` | 32 | operand width |

## What is fixed and what was chosen

These parts follow the established design:

* the 32-bit operands;
* the block split into input registers, Dadda multiplier, CSA, accumulator and
  control unit;
* partial products made by ANDing bits, reduced by the Dadda sequence;
* the CSA built from full adders, as a carry-save row plus a ripple row with a
  constant 0 at its top position;
* the accumulator fed back into the adder;
* half adders made of XOR/AND, and full adders made of two half adders and an
  OR.

These are choices of this implementation:

* operands are unsigned;
* the multiplier leaves the final addition to the CSA;
* two pipeline stages;
* the job interface (`start`/`num_ops`, valid/ready, `done`);
* a 64-bit accumulator with a sticky overflow flag and wrap-around;
* asynchronous active-low reset, which clears all registers;
* a 64-bit CSA. The reference structure is 4 bits wide, and the testbench also
  runs a 4-bit instance.

The following is not modelled: the power, area and timing figures of an FPGA
build. Those figures come from a vendor toolchain.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_half_adder`, `tb_full_adder` | full truth tables against `a+b(+cin)` |
| `tb_carry_save_adder` | 4-bit instance exhaustive (4096 triples); 64-bit instance with corner and 2000 random triples against wide integer sums |
| `tb_dadda_multiplier` | 8-bit instance exhaustive (65536 pairs); 32-bit instance with corner and 5000 random pairs; checks `row0 + row1 == a*b` |
| `tb_operand_registers`, `tb_accumulator` | cycle-by-cycle comparison with a reference model; reset; sticky overflow |
| `tb_control_unit` | load, clear and accumulate counts; the handshake; `done` latency for jobs of 0 to 20 pairs with random bubbles |
| `tb_mac32` | end to end at default parameters against 128-bit reference sums |

`tb_mac32` runs 36 jobs and checks `acc`, `overflow`, one pair per clock, and
`done` two cycles after the last pair. It also counts how often each mechanism
occurs and fails if any never occurs: bubbles, stalls (a pair offered while
idle or draining), overflow, an empty job, multi-pair jobs and back-to-back
jobs.

Simulate one testbench with Verilator 5. Packages go first on the command line,
and `-Irtl` lets Verilator find the modules:

```
verilator --binary --timing --assert -Irtl rtl/mac_pkg.sv rtl/dadda_pkg.sv \
          tb/tb_mac32.sv --top-module tb_mac32 -Mdir obj_mac32
./obj_mac32/Vtb_mac32
```

Every testbench builds in well under a minute. Every simulation runs in under
a second.

Verilator `-Wall` warns about `rst_n` in `control_unit`. The reset is both a
flop reset and the `disable iff` of the assertions. The warning is harmless.
