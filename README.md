# Speculative 16 × 16 multiplier with correction unit

A multiplier's delay is set by the height of its partial-product matrix. The
inner columns of an N × N array are the tallest, up to N bits. This design
shortens the critical path by summing part of those columns *speculatively*.
It uses counters that are exact only when few of their inputs are high. For
random operands the assumption almost always holds. When it does not, a
separate flag catches the case, and one extra clock cycle produces the exact
product on a slower correction path. The unit therefore has variable
latency: one cycle of computation for most products and two for the rare
wrong guess. It never delivers a wrong result.

The RTL is parameterised. Its defaults are the main configuration: 16-bit
unsigned operands and a 32-bit product.

## Datapath at a glance

```
 a,b ─► pp_gen_recode ──kept bits (a_i·b_j, O_ij)───────────────┐
              │                                                 ▼
              └─A_ij per column─► spec_counter (m:2) ─S,C─► tdm_tree (speculative)
              │                                              │ row0,row1
              └─A_ij per column─► corr_block ─E──┐            ├──► spec_adder ─► ys, err_add
                                                │            │
                                   ─EW──────────┼──► tdm_tree (correction) ─► cp_adder ─► y
                                                ▼
                     err = OR(all E) | err_add
```

| module | role |
|---|---|
| `spec_mult` | top: operand register, controller, output register |
| `spec_mult_datapath` | the combinational datapath above |
| `pp_gen_recode` | partial products and their recoding into A/O terms |
| `spec_counter` | (m:2) speculative counter |
| `corr_block` | error flag and correction word for one counter |
| `tdm_tree` | carry-save tree, wired by arrival time; used twice |
| `spec_adder` | speculative adder with an exact error flag |
| `cp_adder` | exact final adder of the correction path |
| `full_adder` | cell of the trees |
| `spec_mult_pkg` | constant functions giving the matrix's shape |

## Step 1: recoding the inner columns

Column k of the matrix holds every a_i·b_j with i + j = k. In the inner
columns, each pair a_i·b_j and a_j·b_i with i < j is replaced by

* A_ij = a_i·b_j AND a_j·b_i
* O_ij = a_i·b_j OR a_j·b_i

Since A + O = a_i·b_j + a_j·b_i, the column's value does not change. The
point is the probabilities. For independent, uniformly random operand bits,
each product is 1 with probability 1/4, but A_ij is 1 with probability only
1/16. The O terms and any diagonal term a_{k/2}·b_{k/2} stay in the ordinary
carry-save matrix. The A terms are taken out of it.

The recoded span is set by `RC_LO`..`RC_HI` and defaults to columns 8..22.
Those are the columns that are at least nine products high. Outside it, all
products stay as they are. The layout of bits inside each column is defined
once, in `spec_mult_pkg`, and every module uses it.

## Step 2: speculative counters and their correction blocks

All A terms of one recoded column go into one (m:2) speculative counter,
where m is the number of pairs in that column:

| column | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 | 17 | 18 | 19 | 20 | 21 | 22 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| m | 4 | 5 | 5 | 6 | 6 | 7 | 7 | 8 | 7 | 7 | 6 | 6 | 5 | 5 | 4 |

The counter has only two outputs: S, of weight 2^k, and C, of weight 2^(k+1).
S is the parity of the inputs. C means "two or more inputs high". So
2C + S equals the count only when at most three inputs are high. For m = 2
and m = 3 it would be a half-adder and a full-adder. For larger m it is
smaller and faster than an exact counter, which would need ⌈log2(m+1)⌉
outputs.

Each counter has a twin, `corr_block`, that sees the same inputs. It produces
two outputs:

* **E**, the error flag. It is high when four or more inputs are high, the
  only case the counter gets wrong.
* **EW**, the correction word. When count ≥ 4 the counter outputs
  2 + (count mod 2), so the missing amount is 2·((count >> 1) − 1). This is
  always even. EW is therefore sent out in units of two: its LSB has the
  weight of C (2^(k+1)). For m = 4 it reduces to a single AND4 bit, which is
  also the flag. For m = 8 it is two bits.

For uniformly random operands, at least one of the 15 counters overflows in
roughly 0.2 to 0.3 % of multiplications. The speculative adder (below)
mispredicts at a similar rate. `tb_spec_mult_datapath` prints the rates it
measures.

## Step 3: the TDM carry-save trees

`tdm_tree` reduces a column-organised bit matrix to two rows. It follows the
three-dimensional method: full adders are wired by the estimated arrival
time of their inputs, so that paths through the tree end up about the same
length. The wiring is computed at elaboration time by the constant function
`make_plan`:

* Columns are processed from the LSB upward.
* While a column holds more than two bits, its three earliest bits feed a
  full adder.
* The sum returns to the same column with arrival time max + 2. The carry
  goes to the next column with arrival time max + 1.
* Carries out of the top column are dropped, since the product fits in 2N
  bits.

The plan becomes a flat array of nodes: the inputs, then sum and carry for
each adder, then one constant zero. Generate loops instantiate the full
adders from it. The parent supplies the per-column heights (`HEIGHT`) and
the arrival times (`DLY`) as parameters.

The datapath uses the tree twice:

* **Speculative tree.** Its inputs are the kept products and O terms
  (arrival 1 and 2 gate delays) and the counter outputs (2 + log2 m). The
  late counter outputs are therefore consumed at the end of the tree, on
  its shortest path. Its largest column is 10 bits high.
* **Correction tree.** Its inputs are the two rows of the speculative tree
  plus all EW bits, at most four bits per column, with equal arrival times.

## Step 4: the speculative adder, and why it needs no corrector

`spec_adder` cuts the 32-bit rows into blocks of `ADD_BLK` = 8 bits. The
carry into block b is guessed from block b−1 alone, as that block's carry
with a zero carry-in (its group generate G). The guess can only fail if
block b−1 propagates (group propagate P) while a carry enters it. The first
wrong block always has a correctly guessed carry-in, so

    err_add = OR over b = 1 .. NB−2 of ( P[b] AND G[b−1] )

is high *exactly* when the sum is wrong.

The adder has no correction logic. On any error the product comes from the
correction path, which adds the speculative tree's rows and the EW words on
its own and never uses the speculative adder's sum.

## Timing and the controller (`spec_mult`)

The multiplier's error flag is `err = OR(all E) | err_add`. States of the
controller:

* **IDLE**: no operands are held.
* **SPEC**: the operands taken at edge t are in the operand register, and
  the datapath computes `ys` and `err` within the cycle. If `err` is low,
  `ys` is registered as the product at edge t+1. New operands can be taken
  at that same edge, so error-free operation gives one product per cycle.
* **CORR**: entered if `err` was high. `in_ready` dropped during the SPEC
  cycle and the operands were held. The exact product `y` is registered at
  edge t+2, and new operands can then be taken.

The path from the operand register through both trees and `cp_adder` to
the output register therefore has two cycles. A timing analysis must be
given it as a multicycle path (setup multiplier 2). The critical
single-cycle path is operand register → recoding → counters → speculative
tree → speculative adder (and → `err` → `in_ready`).

Two assertions in `spec_mult` check this timing. The operands stay stable
during CORR. A flagged SPEC cycle is always followed by CORR.

### Interface of `spec_mult`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | operand pair offered |
| `in_ready` | out | 1 | pair is taken at the next edge if `in_valid`; low only during a flagged SPEC cycle; does not depend on `in_valid` |
| `in_a`, `in_b` | in | N | unsigned operands |
| `out_valid` | out | 1 | one-cycle pulse: `out_p` holds a product |
| `out_p` | out | 2N | the product |
| `out_corrected` | out | 1 | the product came from the correction path |
| `out_err_cnt`, `out_err_add` | out | 1 | which flags caused the correction |

Products come out in order. Latency from the edge that takes the operands
is one edge for a speculative product and two for a corrected one. The
output cannot be stalled.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | operand width |
| `RC_LO`, `RC_HI` | 8, 22 | span of recoded columns |
| `ADD_BLK` | 8 | block size of the speculative adder |

All other sizes are derived: counter sizes, tree heights and correction-word
widths. If you change `N`, move `RC_LO`/`RC_HI` with it. A column with at
most three A terms never overflows, and its counter is exact.

## Where this design fills in details of its own

The recoding, the speculative counters and their flag and correction, the
OR of all flags, and a correction path that adds the correction words to
the speculative tree's outputs all follow the published scheme. The
following are this implementation's own choices:

* The span of recoded columns (8..22).
* One counter per column, taking all of that column's A terms.
* C built as a running "seen two" chain for any m, rather than a
  hand-built gate tree.
* The correction block computed from a population count.
* The greedy full-adder-only tree plan, and all its delay numbers.
* The speculative adder. Any speculative adder with an error flag fits the
  scheme; this one has an exact flag.
* The handshake, the state machine, the register placement and the
  synchronous reset.

No power, area or timing figures are claimed for this RTL. The trees are not
tuned against a real cell library.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_spec_counter` | exhaustive, m = 2, 3, 4, 5, 8: 2C+S = count for count ≤ 3; S = parity; C = count ≥ 2 |
| `tb_corr_block` | exhaustive, m = 4..8: E ⇔ count ≥ 4; 2C+S+2·EW = count; (4:2) word = AND4 |
| `tb_tdm_tree` | irregular and full matrices, random bits: row0+row1 = weighted sum; bits above the heights ignored |
| `tb_spec_adder` | random and long-propagate operands: flag ⇔ sum wrong |
| `tb_cp_adder` | random and corner sums |
| `tb_pp_gen_recode` | 16 × 16: matrix sums to a·b; every A/O term; unused slots zero |
| `tb_spec_mult_datapath` | 20 000 operand pairs: y = a·b always; ys = a·b when unflagged; counter flag against an independent reference; both error kinds occur |
| `tb_spec_mult` | end to end at default parameters: 6000 products with random gaps; order, value, latency (1 or 2 edges), counter overflow always corrected; speculative products, both kinds of correction, stalls and back-to-back issue each occur |

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/spec_mult_pkg.sv \
          tb/tb_spec_mult.sv --top-module tb_spec_mult -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `-y rtl` lets Verilator find
each module in `rtl/<name>.sv`.

Lint output has two benign `UNUSEDSIGNAL` warnings:

* Slots of the `acol` array above a column's counter size are always zero
  and unread.
* The top bits of an internal count in `corr_block` are not needed for the
  correction word.
