# Weighted round-robin arbiter for a shared bus

Several processor cores on one chip share a single bus, and an arbiter decides
who drives it. A fixed-priority arbiter can starve the low-priority masters. A
plain round-robin arbiter is fair, but it moves the grant on after every slot,
so a master with a lot of data waits a full round between slots. The
weighted round-robin (WRR) arbiter here keeps round-robin's rotation. Each master
may keep the bus for up to *weight* acknowledged slots before the grant passes
on. Bus bandwidth under load is shared in proportion to the weights, and no
master waits longer than the other masters' weights added together,
counted in acknowledged slots.

The reference configuration has four masters with 4-bit weights. The default
weights are 15, 7, 3 and 1.

## How a grant is chosen

The arbiter is two fixed-priority arbiters, a round mask and a weight counter:

```
 hbusreq ──► weight logic ──► AND ◄── mask (thermometer of last grant)
    │        (drops holder       │
    │         when weight used)  ▼
    │                    masked priority arbiter ──► 0 ┐
    └──────────────────► unmasked priority arbiter ─► 1 ├─► gnt_d ──► [reg] ──► hgrant
                                     select: masked == 0 ┘
```

* **Priority arbiters** (`ppc_priority_arbiter`): find-first-set from bit 0.
  The "anything below me?" vector is a parallel prefix OR (Kogge-Stone,
  log2 N levels), and a request wins when nothing below it is set.
* **Round mask** (`wrr_mask_reg`): after every grant it is loaded with the
  *thermometer code* of the grant. The granted bit and all bits above it are 1,
  so grant `0100` gives mask `1100`. Requesters below the holder have already
  been served in this round and are masked out. The holder itself stays in the
  mask. This is the difference from plain round-robin, which shifts the mask one
  further left (`1000`) so the holder cannot win twice.
* **Weight logic** (`wrr_weight_logic`): as the holder stays in the mask, the
  masked arbiter keeps choosing it. The weight logic stops this. One counter
  counts the acknowledged slots of the current holder. It restarts at every new
  tenure, and the holder's weight is captured alongside it. An acknowledge in
  the very first cycle of a tenure counts, so that slot is number 1. In the cycle
  where *count + ack* reaches the weight, the holder's request bit is removed
  ahead of the mask. The masked arbiter then picks the next higher requester.
* **New round**: when nothing is left in the masked vector, the unmasked
  arbiter's choice is taken. It is the lowest-indexed requester overall, and
  the round starts again from the bottom. If the exhausted holder is the only
  requester, it wins the new round and its count restarts.

A holder that drops its request early loses the bus at once. The next higher
requester in the mask takes over, with no wasted cycle.

### Example: all four masters requesting, `t` = 1

After reset the mask is all ones. The grant sequence is then

```
cycle   1..15   16..22   23..25   26    27..41 ...
hgrant  0001    0010     0100     1000  0001   ...
```

The period is 15 + 7 + 3 + 1 = 26 cycles. On the last slot of each holder, the
counter and acknowledge together reach the weight. In that same cycle the next
grant is computed, so hand-over costs no idle cycle.

## Interface (`arbiter_wrr`)

| Port       | Dir | Width | Meaning |
|------------|-----|-------|---------|
| `hclk`     | in  | 1 | clock |
| `hrst`     | in  | 1 | asynchronous reset, **active low** |
| `t`        | in  | 1 | slot timer: 1 = the current grant used (acknowledged) one bus slot |
| `hbusreq`  | in  | 4 | bus requests, bit *i* = master *i* |
| `hgrant`   | out | 4 | one-hot grant, registered; 0 when no one requests |

| Parameter  | Default | Meaning |
|------------|---------|---------|
| `WEIGHT_1` .. `WEIGHT_4` | 15, 7, 3, 1 | 4-bit weights of masters 0..3 |

Timing rules:

* A request made in cycle *k* appears as a grant in cycle *k*+1 if it wins.
* Slots with `t` = 0 do not count against the weight. The holder keeps the bus
  while it still requests.
* A weight of 0 acts as 1.
* Reset clears `hgrant` at once (asynchronously) and sets the mask to all ones,
  so the first round begins at master 0.

The number of masters (`NUM_REQ`) and the weight width (`WEIGHT_W`) are in
`wrr_pkg`. The sub-modules are parameterised by `N` and `WEIGHT_W`. Only the
top fixes four named weight parameters.

## What is given and what was chosen

These points come from the arbiter's specification:

* the port list and widths;
* four 4-bit weight generics;
* the masked/unmasked two-arbiter structure selected by "masked == 0";
* the thermometer-coded mask that equals the grant;
* a single grant counter that restarts when the grant changes, stores the
  holder's weight for comparison, and starts at 1 if the first cycle is
  acknowledged.

These are design choices made here:

* **Active-low reset.** The specification only says "asynchronous".
* **`t` as the acknowledge of a slot.** The specification calls it only a
  timer, and there is no other acknowledge input.
* **Bit 0 has the highest priority inside a round.**
* **Registered `hgrant` with no default master.**
* **Default weights 15/7/3/1.** None are specified. These values fill 4-, 3-,
  2- and 1-bit counters.
* **Weight 0 means 1.**
* **Count restart when a lone exhausted holder is re-granted.**
* **One shared counter.** A reference waveform of the original design shows
  one grant counter per master. The single counter gives the same grants,
  because only the holder's count is ever compared.

Only the WRR arbiter is implemented. The fixed-priority and plain round-robin
arbiters, which it improves on, are not included. Nor are the bus masters or
the bus datapath.

## Assertions

`arbiter_wrr` checks three rules while `hrst` is high:

* `hgrant` is one-hot or zero;
* the next grant always goes to a requesting master;
* an exhausted holder keeps the bus only by winning a new round, when the
  masked vector is empty.

## Verification

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_ppc_priority_arbiter` | all inputs for N = 4 and N = 7 against a loop search |
| `tb_wrr_mask_reg` | reset value, then 500 random loads against a thermometer function |
| `tb_wrr_weight_logic` | 5000 random cycles (grants, acks, weights changing) against a counting model |
| `tb_arbiter_wrr` | default weights, end to end (see below) |
| `tb_arbiter_wrr_weights` | the same with weights 2, 0, 5, 9 |

The two top-level testbenches compare `hgrant` every cycle with a
loop-based model of the round order. The test has three parts:

1. A single request from an idle bus, checking the one-cycle latency.
2. Three full-load rounds, where each master must get exactly its weight in
   slots per round.
3. 6000 cycles of random requests and `t`, with an asynchronous reset in the
   middle of a cycle.

Each mechanism is counted and must occur at least once:

* hand-over after the weight is used up;
* a new round through the unmasked path;
* re-grant of a lone exhausted holder;
* hand-over because the holder dropped its request;
* an idle bus;
* unacknowledged slots;
* acknowledged and unacknowledged first cycles.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/wrr_pkg.sv \
          tb/tb_arbiter_wrr.sv --top-module tb_arbiter_wrr
./obj_dir/Vtb_arbiter_wrr
```

Use the same command with another `tb/*.sv` file and its module name to run the
block testbenches. `wrr_pkg.sv` must come first on the command line.

## Files

* `rtl/wrr_pkg.sv`: sizes and types
* `rtl/ppc_priority_arbiter.sv`: prefix-OR find-first-set arbiter
* `rtl/wrr_mask_reg.sv`: thermometer round mask
* `rtl/wrr_weight_logic.sv`: grant counter and weight compare
* `rtl/arbiter_wrr.sv`: top level
* `tb/`: the testbenches listed above
