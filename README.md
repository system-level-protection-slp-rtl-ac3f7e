# Run-time Trojan masking and detection with learning voters

A core bought from a third party can hide a hardware Trojan: a small change
that stays quiet until some rare trigger, then corrupts the results. This
design does not need a trusted "golden" reference to catch one. It buys the
same function from three vendors and runs the three cores side by side on
the same inputs. A voter behind the cores does two jobs:

* **protection**: one misbehaving core is outvoted, so the system output stays correct;
* **detection**: the voter learns one trust weight per core. A core that keeps
  disagreeing with the vote loses weight and stands out as the suspect.

Here the protected function is a 4-bit ALU. Two learning voters are built
and run side by side on the same three cores:

* **randomized weighted voting** picks one core at random, with a
  probability equal to its share of the total weight;
* **graded reward/penalty voting** decides by weight, falls back to a
  head count, and moves each weight in small steps until a core has made
  too many mistakes.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`, and
every module has a self-checking testbench in `tb/`.

## Structure

```
                 +-------------+  ip_y[0]
 op, a, b ---+-->| trojan_ip 1 |----------+
             |   +-------------+          |    +-----------------------+
             +-->| trojan_ip 2 |--------+-+--->| voter_bank randomized |--> rand_* outputs
             |   +-------------+ ip_y[1]|      |  4 x rand_voter_bit   |
             +-->| trojan_ip 3 |------+-+      +-----------------------+
                 +-------------+ ip_y[2]  |    +-----------------------+
 trigger[2:0]: one per core               +--->| voter_bank graded     |--> graded_* outputs
                                               |  4 x graded_voter_bit |
                                               +-----------------------+
```

| module             | role |
|--------------------|------|
| `slp_tmr_top`      | top level: three cores, two voter banks |
| `trojan_ip`        | one untrusted core: `alu4` followed by `saz_trojan` |
| `alu4`             | 4-bit ALU, combinational, 8 operations |
| `saz_trojan`       | stuck-at-zero Trojan payload on one output bit |
| `voter_bank`       | one voting circuit per result bit; alarm and outlier outputs |
| `rand_voter_bit`   | randomized weighted voter for one bit |
| `graded_voter_bit` | graded reward/penalty voter for one bit |
| `lfsr16`           | 16-bit LFSR, the random source of the randomized voter |
| `slp_pkg`          | shared widths, opcode and voter-kind enums, constants |

Voting is done **per bit**. Voting circuit *b* sees bit *b* of the three
cores and produces bit *b* of the voted result. Each circuit therefore keeps
its own three weights: a core can be trusted on bit 2 and distrusted on
bit 0. This matters because a Trojan payload usually damages a single bit.

## The Trojan model

`saz_trojan` is a single AND gate in the path of one ALU output bit
(`TARGET_BIT`). Its other input is the inverted trigger. While `trigger` is
high the bit reads 0, and otherwise the core is clean. A stuck-at-zero
Trojan only shows when the clean bit would have been 1. When the clean bit
is 0, a fired Trojan changes nothing and cannot be seen at the outputs.
In the top level the triggers are input ports. A real Trojan would trigger
itself from rare internal states. The testbench drives the ports with the
probabilities of the trust levels below.

## Randomized weighted voter (`rand_voter_bit`)

State: three unsigned 8-bit weights, all 1 after reset.

On each cycle with `vote_en` high:

1. `W = w1 + w2 + w3`. The current LFSR value `r` (16 bits) is scaled to
   `pick = (r * W) >> 16`, which lies in `[0, W)`. Core 1 is chosen if
   `pick < w1`, core 2 if `pick < w1 + w2`, and core 3 otherwise. Each core is
   therefore chosen with probability close to `w_i / W`.
2. The chosen core's bit is the voted bit `y`. `p0_num / p0_den` gives the
   probability with which that core was chosen.
3. Cores whose bit equals `y` gain 1, saturating at 255. Cores whose bit
   differs have their weight shifted right by one.

The chosen core always agrees with `y`, so its weight grows and `W` can
never reach 0. A zero-weight core is never chosen. Because the choice is
random, a core with a Trojan is still picked now and then while its weight
is high. The randomized voter does not *guarantee* a correct output: it
learns quickly, but it can pass the faulty bit on while doing so. Each
bit has its own LFSR. The seeds are `SEED ^ (b * 16'h1357)`.

## Graded reward/penalty voter (`graded_voter_bit`)

State per core: a weight in unsigned 6.2 fixed point (steps of 0.25, reset
to 1.0, range 0 to 63.75), a reward counter and a mistake counter.

**Decision.** Let `S1` be the summed weight of the cores that deliver 1 and
`S0` the sum for those that deliver 0.

* If `S1 > S0`, the output is 1.
* Otherwise the cores are counted, and the output is 1 if more cores deliver
  1 than 0, else 0. `fallback` flags this path.

The rule is asymmetric. A 1 wins either by weight or by head count, while a
0 needs both. With stuck-at-zero Trojans and one Trojan at a time, the
faulty core always delivers the minority 0. The head count then restores
the majority 1, so the graded voter never passes on such a fault.

**Bookkeeping and weight update**, per core, in the same cycle:

| core vs. output | counter          | mistakes < 4 (graded mode)           | mistakes ≥ 4 (weighted mode) |
|-----------------|------------------|--------------------------------------|------------------------------|
| agrees          | reward + 1 (max 3)   | weight + 0.25 × reward            | weight + 1.0                 |
| disagrees       | mistakes + 1 (max 4) | weight − 0.25 × mistakes, floor 0 | weight / 2                   |

The counters are updated first, so the first reward adds 0.25 and the third
and later add 0.75. Penalties of 0.25, 0.5 and 0.75 follow a core's first,
second and third mistakes. The fourth mistake switches that core, for that
bit, to plain weighted voting for good, which `weighted_mode` shows. In
graded mode, one old mistake cannot wipe out a core's influence at once,
and the voter builds trust slowly. A core that keeps failing is treated as
harshly as in classic weighted voting.

## Detection outputs

Each `voter_bank`, and the top level for both voters, provides:

* `alarm[i]`: core *i* disagreed with the voted result in some bit during
  this vote. This is the run-time Trojan alarm. `mismatch[b][i]` gives the
  bits.
* `weight[b][i]`: the learned trust of core *i* for bit *b*. It is an
  integer in the randomized bank and ×0.25 in the graded bank.
* `outlier[b][i]`: core *i* has a weight strictly below both others for
  bit *b*. This marks the suspected Trojan carrier. No core is marked on a tie.
* randomized bank only: `sel[b]`, the core picked for bit *b*, and
  `p0_num[b] / p0_den[b]`, the probability of that pick.
* graded bank only: `weighted_mode[b][i]` and `fallback[b]`.

## Timing and interface

Everything is driven by a single clock. `rst_n` is an asynchronous reset,
active low.

* The cores, the voted outputs, the alarms and the mismatches are
  combinational. They are valid in the cycle in which `vote_en` is high.
* Weights, counters and the LFSRs update at the rising edge that ends a
  `vote_en` cycle. The voter takes one vote per clock.
* With `vote_en` low, no state changes and the alarms are held at 0.

Parameters of `slp_tmr_top`:

* `TROJAN_BIT_IP1`, `TROJAN_BIT_IP2` and `TROJAN_BIT_IP3` (default 0) give
  the bit each core's Trojan attacks.
* `RAND_SEED` sets the LFSR seed of the randomized bank.

Widths and thresholds are in `slp_pkg`:

* `DATA_W` = 4
* `WEIGHT_W` = 8
* `FRAC_BITS` = 2
* `MISTAKE_THRESHOLD` = 4

ALU opcodes (`alu_op_e`), with 4-bit results and carries dropped:

| code | op  | code | op  |
|------|-----|------|-----|
| 0    | ADD | 4    | XOR |
| 1    | SUB | 5    | NOT a |
| 2    | AND | 6    | a << 1 |
| 3    | OR  | 7    | a >> 1 |

## Behaviour in the trust experiment

Each core gets a trust level, which sets its Trojan's trigger probability
per vote:

* H (high): 0 %
* M (medium): 1 %
* L (low): 10 %

At most one Trojan fires per vote. `tb_slp_tmr_top` runs eleven
combinations of trust levels. Each runs 10,000 votes from reset with random
opcodes and operands, and all Trojans attack bit 0.

In the table below:

* "effective" counts fired Trojans that changed a result.
* Detection is the share of effective Trojans whose core was flagged by the
  alarm.
* FP counts votes that flagged a core whose Trojan had not fired.
* FN counts votes whose voted result was wrong.

The table shows one run, with the simulator's default seed:

| trust | fired | effective | detect rand. | detect graded | FP rand. | FP graded | FN rand. | FN graded |
|-------|------:|----------:|-------------:|--------------:|---------:|----------:|---------:|----------:|
| HHH   | 0     | 0     | –      | –     | 0   | 0 | 0   | 0 |
| LLL   | 3070  | 1346  | 65.2 % | 100 % | 469 | 0 | 469 | 0 |
| LLM   | 2119  | 886   | 69.9 % | 100 % | 267 | 0 | 267 | 0 |
| LLH   | 2028  | 880   | 67.5 % | 100 % | 286 | 0 | 286 | 0 |
| LMH   | 1126  | 481   | 79.0 % | 100 % | 101 | 0 | 101 | 0 |
| MML   | 1187  | 503   | 77.5 % | 100 % | 113 | 0 | 113 | 0 |
| MMM   | 307   | 148   | 73.6 % | 100 % | 39  | 0 | 39  | 0 |
| MMH   | 195   | 90    | 66.7 % | 100 % | 30  | 0 | 30  | 0 |
| HHL   | 1013  | 461   | 85.5 % | 100 % | 67  | 0 | 67  | 0 |
| HLL   | 1948  | 851   | 70.7 % | 100 % | 249 | 0 | 249 | 0 |
| HHM   | 99    | 41    | 65.9 % | 100 % | 14  | 0 | 14  | 0 |

For the randomized voter, a false negative and a false positive are the same
event. When the voter picks the faulty core, the two clean cores are
flagged and the faulty one is not. After the HHL run, both voters mark IP3
as the outlier of bit 0. The bit-0 weights are:

* randomized: 255 / 255 / 10
* graded: 63.75 / 63.75 / 10.25

These figures come from this RTL under its own metric definitions. They
are not meant to reproduce any published table.

## Where this RTL makes its own choices

The following are fixed by the scheme:

* three cores fed by the same input;
* one voter per result bit;
* the stuck-at-zero AND-gate Trojan;
* the randomized voter's initial weights of 1, selection probability
  `w_i/W`, increase on agreement and right shift on disagreement;
* the graded voter's decision order, its steps of 0.25/0.5/0.75, its
  mistake threshold of four, and the rules of its weighted mode (+1 and
  halving).

Choices of this design:

* the ALU's operation set and encoding;
* all register widths and saturation;
* the increment of exactly 1 in the randomized voter;
* the LFSR and its scaling;
* reset values of the graded voter (weight 1.0, counters 0);
* the reading of "threshold reached" as mistakes ≥ 4 rather than > 4;
* combinational outputs with state updated at the clock edge;
* the alarm and outlier outputs;
* running both voters side by side in one top level;
* all Trojans on bit 0 by default.

The classic (non-learning) weighted voter and simple majority voting serve
only as points of comparison, so neither is included.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Every testbench has a watchdog. Build and run one, for example
the end-to-end test, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb +libext+.sv rtl/slp_pkg.sv \
    tb/tb_slp_tmr_top.sv --top-module tb_slp_tmr_top
./obj_dir/Vtb_slp_tmr_top
```

Replace the testbench name to run another:

* `tb_alu4`: exhaustive.
* `tb_saz_trojan`: exhaustive.
* `tb_trojan_ip`: random vectors.
* `tb_rand_voter_bit`: cycle-exact model with its own LFSR copy.
* `tb_graded_voter_bit`: real-number reference model. It also forces
  both decision paths, both update modes, the weight floor and saturation.
* `tb_voter_bank`: both kinds of bank, with single stuck-at-zero faults.
* `tb_slp_tmr_top`: the trust experiment above, at default parameters. It
  runs in well under a second.

## Changing it

* **Wider data**: change `DATA_W` in `slp_pkg`. `alu4` and the testbenches
  assume 4 bits.
* **Finer grading**: raise `FRAC_BITS` to get more fractional weight bits.
  The step is always 0.25 × count.
* **Another threshold**: set the `THRESHOLD` parameter of
  `graded_voter_bit`.
* **Another protected function**: replace `alu4` inside `trojan_ip`. The
  voter banks only see three `DATA_W`-bit words.
