# Reconfigurable AHB arbiter with four arbitration schemes

An AMBA 2 AHB bus lets only one master drive the address and control signals at
a time, and the arbiter decides which. Which policy is best depends on the IP
cores on the bus. Some need strict priority. Some need a guarantee against
starvation. Some share the bus in fixed time slots. This arbiter carries four
policies side by side and lets the system choose one at run time with a 2-bit
select input, `ARBITRATION[1:0]`:

| `ARBITRATION` | scheme         | rule                                                                      |
|---------------|----------------|---------------------------------------------------------------------------|
| `00`          | High Priority  | fixed order: master 0 > master 1 > master 2 > master 3                    |
| `01`          | Fair Chance    | a rotating token picks the top-priority master; the rest follow round the ring |
| `10`          | Random Access  | every requester draws a 4-bit random number; the largest wins             |
| `11`          | Round Robin    | masters take turns, each for a time slot as long as its burst             |

The arbiter serves four masters. The AHB protocol allows up to 16, and
`HMASTER` keeps its full 4-bit width. Only the clocked parts of the selected
scheme are enabled, which is where the power saving comes from: the token
ring, the random-number generator and the slot timer of the other schemes do
not toggle.

## Structure

```
ahb_multi_arbiter                 top level
 ├─ ahb_high_priority             combinational fixed priority
 ├─ ahb_fair_chance
 │   ├─ ahb_ring_counter          one-hot token TOKEN[3:0]
 │   └─ ahb_priority_logic x4     rotated priority orders, one per token position
 ├─ ahb_random_access
 │   ├─ ahb_lfsr                  16-bit random pattern generator
 │   └─ ahb_comparator            largest number among the requesters
 ├─ ahb_round_robin               point controller, demux, grant register
 │   └─ ahb_rr_timer              time-slot timer
 └─ ahb_arb_ctrl                  arbitration select controller (one-hot Moore FSM)
ahb_arb_pkg                       shared types: request vectors, enums, helpers
```

The four schemes see the same request vector: `HBUSREQ_x` with the masters
that are waiting on a SPLIT removed. Each scheme proposes a one-hot grant, or
no grant at all when nobody requests. The controller takes the proposal of the
selected scheme and registers it.

## The select controller and its timing

The controller is a one-hot Moore machine with seven states:

```
IDLE --(any request)--> ARBITRATION --(ARBITRATION[1:0])--> HIGH_PRIORITY | FAIR_CHANCE
                                                            | RANDOM_ACCESS | ROUND_ROBIN
   scheme state --> HMASTER --(HREADY and not held)--> ARBITRATION, or IDLE if nobody requests
```

* **IDLE.** `DEFAULT` is high and no `HGRANT_x` is high. On an `HREADY`-high
  edge, `HMASTER` shows the default master's number, `DEFAULT_ID` (4 by
  default, a number no real master uses).
* **ARBITRATION.** `ARBITRATION[1:0]` is sampled here. A change of the select
  input takes effect at the next pass through this state, never in the middle
  of a grant.
* **Scheme state.** The proposal of the selected scheme is written to
  `HGRANT_x`. If the scheme finds no requester, `DEFAULT` is written instead.
* **HMASTER.** On the first edge with `HREADY` high, the granted master's
  number goes to `HMASTER` and its `HLOCK` to `HMASTLOCK`. At that same edge
  the machine goes back to arbitration, unless the grant is *held*. A grant is
  held while the granted master asserts `HLOCK`. Under Round Robin, it is also
  held while the granted master still requests and its slot has not run out.

A request seen in IDLE reaches `HGRANT_x` three clock edges later.
`HMASTER` follows at the next edge with `HREADY` high. While `HREADY` is low,
the controller waits in HMASTER and `HMASTER` does not change, as AHB
requires: ownership moves only when a transfer completes. An unheld grant
lasts at least three cycles, because each arbitration round passes through
ARBITRATION, the scheme state and HMASTER.

**SPLIT.** The controller tracks the master of the data phase (`HMASTER`
delayed by one `HREADY`-high edge). An `HRESP = SPLIT` with `HREADY` high
masks that master out of arbitration. The mask clears when a slave raises the
master's bit of `HSPLIT[3:0]`. `RETRY` and `ERROR` have no effect on
arbitration.

**Enables.** `ENABLE` is the count enable of the token ring, the LFSR and the
slot timer. The controller forwards it only to the scheme last selected in
ARBITRATION.

## The four schemes

**High Priority** (`ahb_high_priority`) grants the lowest-numbered requester.
With masters 1 and 3 requesting, master 1 wins. It is purely combinational.

**Fair Chance** (`ahb_fair_chance`) has four priority blocks. Block *k* ranks
master *k* first, then *k+1*, *k+2* and *k+3*, all modulo 4. A one-hot token
enables exactly one block. The token resets to `0001` and moves one place
(`0001 → 0010 → 0100 → 1000 → 0001`) on every clock edge with `ENABLE` high.
The token holder wins whenever it requests. Otherwise the next requester round
the ring wins. Every master is top priority once every four token steps, so
none can starve.

**Random Access** (`ahb_random_access`) runs a 16-bit maximal-length LFSR with
feedback polynomial x^16 + x^14 + x^13 + x^11 + 1. The LFSR resets to
`LFSR_SEED` (`16'hACE1`) and shifts on each edge with `ENABLE` high. Nibble
*x* of its state is master *x*'s number `NUM_x[3:0]`. A master that does not
request shows `0000`. The comparator grants the requester with the largest
number. On a tie, the lower-numbered master wins.

**Round Robin** (`ahb_round_robin`) has four parts:

- The **grant register** holds the current owner, one-hot.
- The **timer** holds the remaining slot.
- The **point controller** keeps the owner while it requests and its slot
  lasts. Otherwise it looks for the next requester, starting after the owner
  and going round the ring. The owner itself is the last candidate, so a lone
  requester is granted again with a fresh slot.
- The **demux** steers the choice onto its grant line.

A new turn loads the slot length from `HBURST` as it is at that moment:

| `HBURST`        | slot, in cycles |
|-----------------|-----------------|
| INCR4 / WRAP4   | 4               |
| INCR8 / WRAP8   | 8               |
| INCR16 / WRAP16 | 16              |
| SINGLE / INCR   | 1               |

The timer counts down on clock edges with `ENABLE` high. In the full arbiter
each turn also includes the cycles of the next arbitration round.

## Top-level ports (`ahb_multi_arbiter`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `hclk`, `hresetn` | in | 1 | AHB clock; asynchronous active-low reset |
| `enable` | in | 1 | lets the selected scheme's token, LFSR or timer advance |
| `arbitration` | in | 2 | scheme select, table above |
| `hbusreq`, `hlock` | in | 4 | `HBUSREQ_3..0`, `HLOCK_3..0` |
| `hready`, `hresp`, `hburst` | in | 1, 2, 3 | AHB transfer status and burst type |
| `hsplit` | in | 4 | `HSPLIT[3:0]`: re-enable split masters |
| `hgrant` | out | 4 | `HGRANT_3..0`, at most one high |
| `default_grant` | out | 1 | nobody is granted; the default master owns the bus |
| `hmaster`, `hmastlock` | out | 4, 1 | current bus owner and its lock |
| `token`, `number`, `state` | out | 4, 4x4, 7 | observation: Fair-Chance token, Random-Access numbers, controller state |

Parameters: `DEFAULT_ID` (4), the `HMASTER` value while nobody is granted, and
`LFSR_SEED` (`16'hACE1`). The number of masters, 4, is fixed in `ahb_arb_pkg`.

## Where this design makes its own choices

The four policies and the order of the controller states come from the
source description. The following details were left open there and are
choices of this design:

- **Unused inputs left out.** A generic AHB arbiter also receives `HADDR` and
  `HTRANS`. None of the four policies uses them, so they are not ports.
- **Split bus width.** `HSPLIT` is four bits wide, one per master, instead of
  the protocol's 16.
- **Priority order.** Master 0 has the highest priority under High Priority.
  The opposite order (master 3 highest) is stated in one place of the source.
  The order used here is the one backed by its worked example.
- **Open details chosen here:**
  - the LFSR polynomial and seed
  - the tie rule of the comparator
  - the token's reset value
  - the one-cycle slot for SINGLE and INCR bursts
  - the search order of the Round-Robin point controller
  - the rules for holding a grant and for leaving the HMASTER state
  - the default master's number
  - asynchronous reset
- **Default master.** `DEFAULT` is its own output, so no `HGRANT_x` is high
  while nobody requests. A system that needs a real master as the default
  master should map `default_grant` onto that master's grant.
- **Assertions.** They check that the grant, token, owner and state are
  one-hot and that `DEFAULT` matches an empty grant. They sample
  `hresetn` synchronously in `disable iff` while the flip-flops use it
  asynchronously, and Verilator lint reports this combination as
  SYNCASYNCNET. This is intended.

The source also shows a generic AHB system around the arbiter: masters,
slaves, an address decoder and the address, write-data and read-data
multiplexers. It describes them only by their port lists and leaves their
design for later, so they are not part of this RTL.

## Verification

Every module under test has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_ahb_high_priority` | all 16 request patterns, and the masters-1-and-3 example |
| `tb_ahb_fair_chance` | a reference token model over 2000 random cycles; the grant visits 0, 1, 2, 3 with all masters requesting |
| `tb_ahb_random_access` | a reference LFSR over 3000 cycles; the comparator with numbers 1111/0111/0111/0000 grants master 3; ties |
| `tb_ahb_round_robin` | a reference owner and slot model over 3000 random cycles; exact 4-, 8- and 16-cycle tenures in order 0, 1, 2, 3 |
| `tb_ahb_arb_ctrl` | the state sequence and three-edge latency; each select code; the enables; HREADY stalls; HLOCK and slot holds; SPLIT mask and release; the DEFAULT grant |
| `tb_ahb_multi_arbiter` | end to end at default parameters (see below) |

`tb_ahb_multi_arbiter` runs a cycle-level reference model of the whole
arbiter. Each clock edge, it predicts the next state, every scheme decision,
`HMASTER` and `HMASTLOCK`. The observed token and random numbers are checked
every cycle. The stimulus is directed runs followed by about 12,000 cycles of
random traffic: requests, `HREADY` stalls, locks, SPLIT responses and HSPLIT
releases, in each mode and with random mode switches. The testbench counts
how often each mechanism occurred and fails if one never did. The
mechanisms are:

- decisions of each of the four schemes
- DEFAULT grants
- token moves
- HREADY stalls
- lock holds
- slot holds
- splits and split releases
- mode switches
- full Fair-Chance and Round-Robin rotations

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/ahb_arb_pkg.sv \
    tb/tb_ahb_multi_arbiter.sv --top-module tb_ahb_multi_arbiter
./obj_dir/Vtb_ahb_multi_arbiter
```

Replace the testbench name to run another one. Every testbench finishes in
well under a second.
