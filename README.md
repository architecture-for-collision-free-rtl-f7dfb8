# Collision-free parallel memory access with a network-relaxed barrel shifter

Parallel turbo and LDPC decoders split a block of L data among P processing
elements (PEs) that share P memory banks. In every clock cycle each PE reads or
writes one datum. During one half-iteration the PEs walk their data in natural
order, during the other in interleaved order. If two PEs need data from the
same bank in the same cycle, they *collide*, and the decoder must stall, buffer
or duplicate storage.

The approach implemented here avoids collisions without extra memory or
buffers. An offline mapping step places the data in the banks so that the P data
of every cycle lie in P different banks. The PEs reach the banks through a
connecting network. The cheapest network is a barrel shifter, but it only offers
the P rotations. When a cycle needs a permutation that is not a rotation, the
mapping step does not add registers (*memory relaxation*) or FIFOs (*time
relaxation*). It adds a few 2x2 switches to the network (*network relaxation*)
until every cycle can be routed. A small controller then replays, cycle by cycle,
the network control bits and the address of every bank.

This RTL contains that datapath: banks, relaxed network and controller. The
PEs, and the offline flow that finds the mapping, are not part of it. The mapping
enters as parameters.

## The worked example (default configuration)

The defaults are a block of L = 12 data, P = 4 PEs and 4 banks A..D of 3 words.
An iteration has T = 2L/P = 6 access cycles.

| cycle | half        | PE0 | PE1 | PE2 | PE3 | banks (PE0..PE3) | plain rotation? |
|-------|-------------|-----|-----|-----|-----|------------------|-----------------|
| 0     | natural     | 0   | 3   | 6   | 9   | A B C D          | yes, by 0       |
| 1     | natural     | 1   | 4   | 7   | 10  | A B C D          | yes, by 0       |
| 2     | natural     | 2   | 5   | 8   | 11  | D A B C          | yes, by 3       |
| 3     | interleaved | 0   | 8   | 2   | 11  | A B D C          | no              |
| 4     | interleaved | 6   | 5   | 10  | 3   | C A D B          | no              |
| 5     | interleaved | 4   | 7   | 1   | 9   | B C A D          | no              |

The bank assignment is A = {0, 1, 5}, B = {3, 4, 8}, C = {6, 7, 11} and
D = {2, 9, 10}. No cycle uses a bank twice. A bare barrel shifter cannot route
cycles 3 to 5. Two switches added behind the shifter are enough. One exchanges
bank lanes 2 and 3, the other lanes 3 and 0 (`RELAX_MASK = 4'b1100`):

| cycle | shift | switch 2/3 | switch 3/0 |
|-------|-------|------------|------------|
| 0, 1  | 0     | off        | off        |
| 2     | 3     | off        | off        |
| 3     | 0     | on         | off        |
| 4     | 2     | off        | on         |
| 5     | 1     | off        | on         |

The control word is 4 bits per cycle: 2 shift bits and 2 switch bits. The
plain barrel shifter needs 2 bits.

Two tables were taken from the source article's example: the schedule and the
bank assignment. The article says only that a switch or multiplexer is added
to the shifter. It does not say where, or how many. The two switches above are
this design's reconstruction: among exchanges of adjacent bank lanes placed
behind the shifter, no single switch routes all six permutations, and these two
do.

## Architecture

```
            pe_wdata[P]                                    pe_rdata[P]
                |                                               ^
      +---------v----------+                        +-----------+---------+
      |  relaxed_network   |                        |   relaxed_network   |
      | forward:           |                        | inverse:            |
      | rotate, then swaps |                        | undo swaps, rotate  |
      +---------+----------+                        +-----------^---------+
                | bank lanes                                    | (control delayed 1 clk)
         +------v------+------+------+                          |
         | bank0 | bank1 | bank2 | bank3 |  -- rdata -----------+
         +------^------+------+------+
                | addr per bank, en, we
      +---------+----------------------------+
      | cf_controller: step counter + ROM    |---> shift, sw
      +--------------------------------------+
```

* `barrel_shifter`: log2(P) stages of 2:1 multiplexers. Going forward, PE p
  reaches bank (p + shift) mod P. The inverse variant undoes the rotation.
* `relax_switch_stage`: the added switches. Switch k joins lanes k and
  (k+1) mod P and exists only where `MASK[k]` is 1. The switches act in
  ascending k; the inverse stage acts in descending k, so it undoes the
  forward stage exactly. Control bits of switches that do not exist are
  ignored.
* `relaxed_network`: a standard network plus a switch stage. Every control
  value gives a permutation, so two PEs are never routed to the same bank.
  `NET` picks the standard network from the library of the mapping flow:
  * barrel shifter (`NET_BS`, the default): log2 P control bits;
  * butterfly (`butterfly_network`, `NET_BF`): log2 P columns of P/2 2x2
    switches, 16 permutations for P = 4;
  * Beneš (`benes_network`, `NET_BEN`): 2·log2 P − 1 columns, every
    permutation, highest cost.

  Both switch networks are built from `exchange_stage`, a column of 2x2
  switches that pairs the lanes differing in one index bit. The relaxation
  switches can be added behind any of the three; `MASK = 0` leaves the plain
  standard network.
* `memory_bank`: a single-port, synchronous-read, read-before-write bank of
  L/P words.
* `cf_controller`: the step counter and control ROM (below).
* `cf_interleaver_top`: connects the blocks. The write data use the forward
  network. The read data leave the banks one clock later and pass an inverse
  network driven by the control word of the cycle that read them.

### How the controller ROM is produced

The controller takes the mapping itself as parameters, not a list of control
words:

* `SCHED[t*P + p]`: the datum PE p touches in cycle t (2L entries);
* `BANK_OF[d]`: the bank of datum d.

At elaboration, constant functions derive two things:

* **Bank addresses.** The data of a bank are numbered in the order of their
  first access. In the example this gives address = natural-order cycle.
* **Control words.** For each cycle, the controller searches the shift values
  and the switch settings that `MASK` allows. The first setting whose forward
  permutation sends every PE to its bank is stored.

Elaboration stops with `$error` in three cases:

* some cycle uses a bank twice;
* a bank would hold more than L/P data;
* the network cannot route some cycle.

So a wrong mapping or a network that is too weak fails at build time, not in
simulation. The search covers P·2^P candidates per cycle, which is cheap for
P = 4 and P = 8.

## Interface and timing (`cf_interleaver_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (controller and read pipeline; bank contents are not reset) |
| `start`     | in  | 1     | starts an iteration. Accepted when idle, or in the last cycle of an iteration, which chains the next one with no gap |
| `pe_we`     | in  | 1     | the current access cycle writes `pe_wdata` (all PEs together) |
| `pe_wdata`  | in  | P×W   | one word per PE, in PE order |
| `busy`      | out | 1     | high for exactly 2L/P clocks per iteration |
| `step`      | out | log2(2L/P) | access cycle within the iteration |
| `phase`     | out | 1     | 0 for the natural-order half, 1 for the interleaved half |
| `last`      | out | 1     | last access cycle |
| `pe_rdata`  | out | P×W   | words read in the previous access cycle, in PE order |
| `pe_rvalid` | out | 1     | `pe_rdata` is valid (one clock after each access cycle) |

Each access cycle takes one clock and the design never stalls. An iteration
therefore takes 2L/P clocks. For the article's block lengths with P = 4 this
gives 20, 60, 400, 780 and 1120 cycles for L = 40, 120, 800, 1560 and 2240,
which are the latencies it reports. Every access cycle also reads. In a write
cycle, `pe_rdata` returns the old contents of the words being overwritten.

The PE is responsible for knowing which datum it handles in each `step`. The
memory system needs only the data.

## Parameters and retargeting

| parameter | default | meaning |
|-----------|---------|---------|
| `P`       | 4       | PEs = banks (power of two) |
| `L`       | 12      | block length; must be a multiple of P |
| `W`       | 8       | data width (this design's choice; the article gives none) |
| `NET`     | `NET_BS` | standard network: `NET_BS` (0), `NET_BF` (1) or `NET_BEN` (2), from `cf_pkg` |
| `MASK`    | `4'b1100` | which relaxation switches exist; `'0` gives the plain standard network |
| `SCHED`, `BANK_OF` | the worked example | the memory mapping (`cf_pkg::EX_SCHED`, `cf_pkg::EX_BANK_OF`) |

To retarget the design to another interleaver, pass its schedule, a
collision-free bank assignment and the switch mask. The testbench
`tb/qpp_workload_runner.sv` shows how to compute `SCHED` and `BANK_OF` with
constant functions.

## What has been verified

Each block has a self-checking testbench in `tb/`:

* `tb_memory_bank`: random accesses are compared with a reference array.
* `tb_barrel_shifter`: every shift for P = 4 and P = 8, in both directions,
  plus round trips.
* `tb_relax_switch_stage`: all 16 switch settings are compared with
  hand-written lane orders. Unused bits have no effect, and the inverse
  stage undoes the forward stage.
* `tb_butterfly_network`, `tb_benes_network`: for P = 4, every control word
  is compared with a reference sequence of exchanges. The P = 4 Beneš network
  must reach all 24 permutations. For P = 8, random control words must give
  collision-free permutations that the inverse network undoes.
* `tb_relaxed_network`: the six cycles of the example are applied with
  hand-derived control words. For the barrel-shifter, butterfly and Beneš
  variants, every control word is checked for collision freedom and for a
  correct round trip.
* `tb_cf_controller`: the ROM contents are compared with the hand-derived
  tables above. The test also checks the 6-cycle iteration, a start ignored
  mid-iteration, and back-to-back iterations.
* `tb_cf_interleaver_top`: the default design runs end to end. The
  testbench plays the four PEs and keeps a per-datum reference memory. Over
  22 iterations it mixes writes and reads at random. Every word read must
  match the reference, and every iteration must last 6 clocks. The test
  counts natural and interleaved cycles, rotated cycles, uses of each added
  switch, writes, reads and chained starts; each must occur at least once.
* `tb_cf_network_variants`: the example runs end to end on three other
  configurations:
  * butterfly, with a bank assignment the butterfly can route
    (A = {0,4,5}, B = {1,2,3}, C = {9,10,11}, D = {6,7,8});
  * Beneš, with the default assignment;
  * butterfly with the two added switches, with the default assignment.

  The plain butterfly cannot route the default assignment: cycle 4 needs a
  permutation it lacks. That build stops at elaboration.
* `tb_lte_qpp_workload`: nine instances use the plain barrel shifter
  (`MASK = 0`) on LTE-style interleaved blocks, with
  π(i) = (F1·i + F2·i²) mod K:
  * P = 4: K = 160, 200, 240, 320, 2240;
  * P = 8: K = 416, 480, 800, 2240.

  Each PE owns a window of K/P data, and datum d sits in bank d/(K/P). Every
  cycle of these lengths turns out to be a rotation, as the article says for
  them. Each instance writes a full block and reads it back in both orders.
  The largest instances run 1120-cycle (P = 4) and 560-cycle (P = 8)
  iterations. The F1 and F2 coefficients come from the LTE interleaver
  table, not from the article.

Simulate with plain Verilator. The package is named first, and `-y` lets the
tool find each module in the file of the same name:

```
verilator --binary --timing --assert -y rtl rtl/cf_pkg.sv \
    tb/tb_cf_interleaver_top.sv --top-module tb_cf_interleaver_top -o sim
./obj_dir/sim
```

For `tb_lte_qpp_workload` and `tb_cf_network_variants`, add `-y tb`. That testbench takes about a minute to
compile. Each testbench prints `TB_RESULT checks=N failures=M`.

## Departures from the source and limits

* **Processing elements.** The decoder PEs are outside this design. Their data
  ports are the top's ports.
* **Mapping flow.** The offline flow is not hardware and is not included:
  clique test, mapping on the barrel shifter, butterfly or Beneš network, and
  the loop that adds switches. The controller only checks that a given
  mapping is routable on the chosen network, and finds the control words.
  Its exhaustive search is limited to 2^16 candidates per cycle. That covers
  the barrel shifter at any P, but the butterfly and Beneš networks only at
  P = 4. Larger ones would need a proper routing algorithm, such as the
  looping algorithm for Beneš.
* **Example schedule.** The article shows the interleaved half of the example
  in two versions. This design uses the one on which all the article's
  mappings are drawn: 0 8 2 11 / 6 5 10 3 / 4 7 1 9.
* **Relaxation switches.** Their kind and placement are this design's choice:
  adjacent-lane 2x2 exchanges behind the standard network.
* **Butterfly and Beneš.** The article only names these library networks.
  Their wiring and control-bit order here are the textbook structures.
* **Butterfly mapping of the example.** The article reports that the example
  maps onto a plain butterfly, but its bank assignment is not used here. The
  butterfly test uses an assignment worked out for this design instead.
* **Other own choices.** The article does not specify any of these:
  * data width;
  * single-port read-before-write banks with one-cycle read latency;
  * addresses assigned by first access;
  * the start/busy interface;
  * all PEs reading or writing together in a cycle.
* **HSPA block lengths.** These are the article's area and latency benchmarks.
  They cannot be instantiated because the article does not give the mappings
  or the switches used for them. The RTL accepts them once a mapping is
  supplied.
* **Area figures.** The NAND-gate-equivalent areas in 90 nm are not
  reproduced.
