# Voted TMR counter: synchronization, reducing and clock-crossing voters

Triple modular redundancy (TMR) protects an FPGA circuit against single event
upsets by building it three times and letting majority voters mask whichever
copy is wrong. The voters are cheap (one three-input look-up table per bit);
the hard part is deciding *where* they go. This repository is a small,
complete TMR circuit in SystemVerilog that contains every kind of voter such a
design needs, each in the place where it does its job:

| voter kind | job | where it sits here |
|---|---|---|
| synchronization voters | keep the state of the three copies from drifting apart after an upset | in the feedback path of the counter, directly after its flip-flops |
| clock-domain-crossing voters | re-align the copies after per-copy synchronizers that may resolve on different cycles | after the two-flop synchronizers of the count enable |
| reducing voters | turn three copies into one (non-triplicated output) or two (a duplicated-with-compare consumer) | on the counter outputs |
| partition voters | split a TMR circuit into partitions that each tolerate one bad copy | same triplicated voter cell (`tmr_voter`); the crossing voters separate the input partition from the counter partition, so a bad enable copy in one domain and a counter upset in another are both masked |

The protected function is deliberately simple, an 8-bit counter, because the
point is the voting structure, not the logic between voters.

## Terms

* **Domain**: one of the three redundant copies. Every triplicated signal is a
  packed array `[2:0][W-1:0]`, domain 0 in the lowest slice (`tmr_pkg`).
* **Upset**: on an SRAM FPGA, a bit flip in configuration memory that changes
  the logic of one domain until **scrubbing** (periodic readback and partial
  reconfiguration) repairs it. While an upset lasts, the affected domain can
  compute wrong values.
* **Persistent error**: a wrong value that an upset left in a domain's
  *state*, and that stays after the upset itself has been repaired.

## Why the counter needs voters in its feedback

If the three counters only meet at an output voter, an upset in domain 1's
counter logic writes a wrong value into domain 1's registers. The output
voter hides it, but domain 1 then counts onward from the wrong value
forever: repairing the logic does not repair the state. The circuit is now
running on two good domains, and the next upset in either of them reaches the
output. Only a reset would bring domain 1 back.

`tmr_counter` (default `SYNC_VOTERS = 1`) places a set of triplicated voters
between the counter registers and the counter logic:

```
            +--------------------- voted value v[k] ----------------+
            v                                                      |
  domain k: counter logic (v[k] + en) ^ upset[k] --> register q[k] --+--> voter k --> x_o[k]
                                                                   |       ^  ^
                                  registers of the other two domains ------+--+
```

Voter *k* sees all three registers and feeds only domain *k*. With one
register wrong, all three voters still produce the right count, so every
domain's next value is computed from the right count. What happens during
and after an upset in domain *k*:

1. While the upset lasts, domain *k*'s register may hold a wrong value. All
   outputs stay correct, since they come from the voters.
2. On the first clock after the repair, domain *k*'s logic is correct again,
   and its input (the voted value) was never wrong, so its register is
   rewritten with the correct count. All three registers agree one clock
   after the repair. Nothing else is needed.

Placing the voters directly after the flip-flops, rather than somewhere inside
the counter logic, means every register-to-register path passes exactly one
voter, which keeps the timing cost to one LUT level.

`SYNC_VOTERS = 0` builds the unprotected version (registers fed straight back
into their own logic). It exists only so that the persistent error can be
shown next to the fix; `tb_tmr_counter` runs both side by side.

A single voter is itself a possible point of failure, which is why the voters
are triplicated: an upset in voter *k* corrupts only domain *k*, which the
next voting stage outvotes.

## Clock-domain crossing

The count enable comes from outside the counter's clock domain, one copy per
domain. Each copy passes its own chain of `STAGES` flip-flops (default 2).
Because the three chains resolve metastability independently, and because the
three input copies have their own routing delays, the chains can deliver a
change on different cycles. Without voting, the domains would then disagree for
a cycle even with no upset, and during that cycle a single upset elsewhere
could reach the output. `tmr_cdc_sync` therefore votes the three chain outputs
with triplicated voters, so that all three domains see the enable change on
the same clock: the one on which the second chain delivers it.

## Reducing voters

`reducing_voter` with `NUM_OUT = 1` is one voter: three domains in, one
signal out, for outputs where there are not enough pins to bring out all
three copies, or where a triplicated part of a circuit feeds a part that is
not triplicated. With `NUM_OUT = 2` it contains two independent voters
feeding a consumer protected by duplication with compare (DWC); one voter
upset then corrupts only one copy, which the DWC compare catches.

## Top level: `tmr_sync_counter_top`

```
en_async_i[2:0] --> tmr_cdc_sync (3 x 2 flops + tmr_voter) --> en[2:0]
                                                                 |
upset_i[2:0] -----------------------------------------------> tmr_counter (SYNC_VOTERS=1)
                                                                 |
                                                        x_tmr_o[2:0][7:0]
                                                     /           |             \
                                            (to pins)  reducing_voter      reducing_voter
                                                       NUM_OUT=1 -> x_o    NUM_OUT=2 -> x_dwc_o[1:0]
```

| port | width | meaning |
|---|---|---|
| `clk_i` | 1 | the only signal that is not triplicated |
| `rst_i` | 3 | synchronous, active-high reset, one bit per domain; clears synchronizers and counter |
| `en_async_i` | 3 | count enable from another clock domain, one copy per domain |
| `upset_i` | 3 x 8 | test hook, see below; tie to zero in a real design |
| `x_tmr_o` | 3 x 8 | voted count of each domain, for a receiver that votes itself |
| `x_o` | 8 | count reduced to one copy |
| `x_dwc_o` | 2 x 8 | count reduced to two copies for a DWC receiver |

Parameters: `WIDTH = 8` (counter width), `SYNC_STAGES = 2`.

Timing: an enable change sampled at clock edge *n* is voted after edge
*n+1* and first changes the count at edge *n+2*; the outputs are
combinational (voters) after the counter registers. The count advances by one
per enabled clock and wraps at 2^WIDTH.

`upset_i[k]` is XORed onto the result of domain *k*'s counter logic. It stands
for a configuration upset in that logic: hold it non-zero for the upset's
lifetime and release it to model the repair by scrubbing. It is only there so
the protection can be tested without a fault-injection tool.

## Files

| file | content |
|---|---|
| `rtl/tmr_pkg.sv` | `NUM_DOMAINS = 3` |
| `rtl/maj_voter.sv` | bitwise 2-of-3 majority, `WIDTH` default 1 (one LUT3) |
| `rtl/tmr_voter.sv` | three `maj_voter`s, one per domain |
| `rtl/reducing_voter.sv` | one or two `maj_voter`s reducing three domains |
| `rtl/tmr_counter.sv` | triplicated counter with optional synchronization voters |
| `rtl/tmr_cdc_sync.sv` | per-domain synchronizer chains plus triplicated voters |
| `rtl/tmr_sync_counter_top.sv` | the top level above |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops; it has a
watchdog that counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/tmr_pkg.sv rtl/maj_voter.sv rtl/tmr_voter.sv rtl/reducing_voter.sv \
  rtl/tmr_counter.sv rtl/tmr_cdc_sync.sv rtl/tmr_sync_counter_top.sv \
  tb/tb_tmr_sync_counter_top.sv --top-module tb_tmr_sync_counter_top
./obj_dir/Vtb_tmr_sync_counter_top +verilator+rand+reset+2
```

Swap the last source file and `--top-module` for any other testbench.

What the testbenches establish:

* `tb_maj_voter`, `tb_tmr_voter`, `tb_reducing_voter`: all eight input
  combinations at one bit and several hundred random 8-bit cases, mostly with
  one domain corrupted, against a majority computed by counting ones.
* `tb_tmr_counter`: counting rate (one per enabled clock, 300 clocks with
  wrap), hold, an upset held for six clocks in domain 1 and then in domains 0
  and 2, single-domain reset. For the synchronized counter the outputs are
  checked every clock and all three registers must agree one clock after each
  repair; for the unprotected one, domain 1 must still be wrong twenty clocks
  after the repair and correct again after reset.
* `tb_tmr_cdc_sync`: latency of exactly `STAGES` clocks, and on every clock
  the three outputs equal the majority of the inputs applied `STAGES` edges
  earlier, with random single wrong copies; both 2-stage/1-bit and
  3-stage/4-bit instances.
* `tb_tmr_sync_counter_top` (all parameters at their defaults): checks all
  outputs every clock against a behavioural reference, measures the 3-clock
  enable-to-count latency, and counts that each mechanism happened: aligned
  and skewed enable crossings, masked upsets in every domain, resynchronization
  after every repair, an outvoted single-domain reset, wrap-around, hold,
  and two simultaneous faults in different partitions and domains (a wrong
  enable copy in domain 0 while domain 2's counter logic is upset).

## Relation to the method this follows, and own choices

The voter kinds, their triplication, the rule that each voter feeds its own
domain, the placement of synchronization voters in the counter feedback
directly after the flip-flops, the use of two parallel reducing voters for a
duplicated consumer, and the 8-bit counter width follow published practice
for automated TMR voter insertion on SRAM FPGAs. The following are this
design's own choices:

* the incrementing counter logic, count enable and synchronous reset to zero;
* two synchronizer stages and the placement of one voter set right after the
  last stage (the method only asks that voters re-align the domains after the
  synchronizers and leaves the strategy open);
* how the blocks are combined in the top level, and the `upset_i` test hook;
* the `keep_hierarchy` attribute on `maj_voter`.

## Limits and cautions

* **Synthesis removes redundancy.** The three voters of a set compute the same
  function of the same inputs, and a synthesis tool that flattens the design
  will merge them, and then the three incrementers behind them. `maj_voter`
  carries `keep_hierarchy`, but each vendor flow needs its own
  keep/dont-touch constraints on the voter instances and domain registers.
  Established TMR flows avoid the problem altogether by triplicating and
  inserting voters in the synthesized netlist instead of in RTL.
* The automatic voter placement algorithms (strongly-connected-component
  decomposition of the netlist graph, with basic, highest-fanout and
  highest-flip-flop-fanout edge selection) are netlist software, not hardware,
  and are not part of this RTL. For the counter the flip-flop-fanout choice
  (voters right after the registers) was applied by hand.
* Configuration scrubbing is done by the FPGA's own configuration logic and
  is not modelled beyond releasing `upset_i`.
* The benchmark circuits used to compare voter placement algorithms (a MAC
  filter, triple DES, a QPSK demodulator, LFSR-based synthetic designs) are
  not included; only the voter cells that such a flow would insert are.
* Metastability itself cannot be simulated in a two-state simulator; the CDC
  test emulates it by skewing and corrupting individual input copies.
