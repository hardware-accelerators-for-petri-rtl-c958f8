# Petri-net reachability accelerator

Checking a property of a system modelled as a Petri net (no deadlock, no
unsafe state, ...) usually comes down to listing every marking the net can
reach from its initial marking. In software the cost is spread over three
jobs: deciding which transition to fire, updating the token counts, and
looking up whether the new marking has been seen before. This design moves
all three into logic:

* the **net itself** is built as hardware, one counter per place and one
  small cell per transition, so firing a transition takes one clock;
* a **daisy chain** through the transitions selects which transition fires
  next, with no search;
* a **search/compare engine** keeps every marking found in a **hashed state
  storage** (linked lists in a large memory) and drives a breadth-first
  exploration until no uncompleted marking is left.

The net is fixed when the hardware is elaborated (it is a parameter). The
initial marking is loaded at run time, so one build serves any number of
initial markings.

```
            host port
   +------------+-------------------------+
   |            |                         |
   v            |                         v
 +--------------+--+  actual     +-----------------+
 | pn_simulator    |  marking    | state storage   |
 |  places + DCT   |-----+       |  hash_table     |
 +-----------------+     |       |  state_memory   |
          ^              v       +-----------------+
          |      +---------------+        ^
          +------| search_engine |--------+ stored marking
  restore / load +---------------+
```

## How a net becomes hardware

**Place** (`rtl/place.sv`). A `TOKEN_BITS`-wide counter (4 bits by default,
so at most 15 tokens). Its up input is "some transition of the place's
pre-set fires", its down input "some transition of its post-set fires". The
non-empty output goes to every transition that takes from the place. A
transition that both takes from and puts into the place leaves it unchanged.
A count that would pass 15 is refused and flagged: the net is not bounded by
the counter width, and the run stops with `err.token_overflow`.

**Transition** (`rtl/transition.sv`). It is *enabled* when all its input
places are non-empty. A *firing flip-flop* remembers that the transition
has already fired from the marking now held in the counters. The transition
is *fireable* when it is enabled, has not fired yet, and sees the active
level on its daisy-chain input.

**Daisy chain** (`rtl/daisy_chain.sv`). The transitions are chained in index
order. The chain input is tied high. A fireable transition pulls its chain
output low. Every other transition passes its input through. So exactly one
transition is fireable at a time, the first in chain order, and the output
of the last stage (`dct_out`) is high only when every enabled transition
has already fired. The controller uses this as its "no more successors"
signal. The firing order does not change the reachability set, because
every enabled transition fires in the end.

**Simulator** (`rtl/pn_simulator.sv`). This block wires N places and M
transitions through two incidence parameters of `M*N` bits each:
`PRE[t*N+p]` is set when p is an input place of t, and `POST[t*N+p]` when p
is an output place. A one-cycle `step` strobe fires the first fireable
transition. The marking is read and loaded through a 32-bit word port. Word
w holds places `8w .. 8w+7`, 4 bits each, with place `8w` in the low bits.
A 100-place marking is therefore `NW32 = 13` words.

## The exploration loop

The engine (`rtl/search_engine.sv`) runs the loop below. `phase` shows where
it is. The cycle counts are exact for this RTL; `S` is the number of records
in the hash list being searched.

| phase     | what happens                                                        | cycles |
|-----------|---------------------------------------------------------------------|--------|
| FIRE      | `dct_out` low: strobe `step`, one transition fires                    | 1 |
| READ      | read the new marking word by word into a buffer, accumulate the hash | NW32 |
| HASH      | look up the head of the list for that hash code                     | 1 |
| SEARCH    | per record: the header word, then the state words compared 64 bits at a time; the record is left at the first mismatch | at most S x REC_WORDS |
| STORE     | not found: write the new record at the head of its list              | REC_WORDS |
| RESTORE   | write back into the simulator the words that differ from the marking being expanded | 1 .. NW32 |
| COMPLETE  | `dct_out` high: set the C (completed) flag of the expanded record   | 1 |
| CHOOSE    | find the next record without C flag; if there is none, DONE          | 1 per record passed |
| LOAD      | copy that record into the simulator, clear all firing flip-flops    | NW32 |

The important trick is in RESTORE. After a firing, the engine puts the
*previous* marking back into the counters, but it leaves the firing
flip-flops alone. The transition that just fired is then marked as fired,
so the next FIRE takes the next enabled transition in chain order. No
explicit list of successors is ever built. The cost is that RESTORE has to
write back the marking after every firing. Keeping the firing flip-flops per
stored state would avoid that (a depth-first variant), but it needs much
more logic, so it is not used here.

Breadth-first order comes from the storage itself. Records are appended in
the order they are found, and a record gets its C flag when it has been
expanded. So the records without C flag form a queue that starts at the
scan pointer.

The run starts from the marking the host has written into the simulator.
That marking is stored as record 0 first.

With the defaults (100 places, so NW32 = 13 and REC_WORDS = 8), one firing
costs 1 + 13 + 1 + 8S' + 8 + r cycles, plus the per-state overhead of
CHOOSE and LOAD. Here S' is the number of records compared and r is at most
13. The full-size test (a 5050-state set over 1024 lists) averages 44 cycles
per firing.

## State storage

`rtl/state_memory.sv` is the big memory: 65536 words of 64 bits (4 Mbit),
one address port, and read data in the same cycle like an asynchronous
SRAM. `rtl/hash_table.sv` holds one entry per hash code (1024 by default):
a valid bit (flip-flops, so the whole table clears in one cycle) and the
record number at the head of that code's list.

A record is `REC_WORDS = 1 + ceil(NW32/2)` words, starting at address
`record * REC_WORDS`:

* word 0 is the header (`pn_pkg::rec_hdr_t`): bit 63 is the C flag, bit 62
  marks that a next record follows, bit 61 marks that the predecessor is
  valid, bits 31:16 hold the predecessor record, and bits 15:0 hold the next
  record in the same list;
* words 1 .. are the marking, two simulator words per storage word (word
  `2k` in the low half), with unused bits zero.

The predecessor pointer gives one incoming arc per state. With it the host
can rebuild a spanning tree of the reachability graph and a firing sequence
to any stored state. At the defaults there is room for 8192 records. When
the storage is full, the run stops with `err.storage_full`.

The hash code comes from the words read in READ. The engine accumulates
`h = rotl(h,5) ^ word` over the words, then keeps the top `HASH_BITS` bits
of `h * 0x9E3779B1`.

## Host side

`rtl/host_interface.sv` gives the host the simulator word port and a read
port into the state storage whenever the engine is not busy. While the
engine runs, it owns both ports, and host writes are dropped and reported on
`host_blocked`. The host can never write the storage. A run goes like this
(`rtl/pn_accelerator.sv`):

1. write the initial marking, `NW32` words, through `host_sim_*`;
2. pulse `start` for one cycle;
3. wait for `done` (or a bit of `err`);
4. `n_states` is the size of the reachability set, `n_fires` the number of
   arcs of the reachability graph, and `n_dups` the number of successors
   that were already stored. Read the records through `host_mem_addr`.

## Parameters

| parameter    | default | meaning |
|--------------|---------|---------|
| `N`          | 100     | places |
| `M`          | 100     | transitions |
| `TOKEN_BITS` | 4       | bits per place counter (must divide 32) |
| `PRE`,`POST` | ring    | incidence matrices, `M*N` bits each |
| `MEM_DEPTH`  | 65536   | 64-bit words of state storage |
| `HASH_BITS`  | 10      | log2 of the number of hash lists |

The 100 places, the 4-bit counters, the 32-bit simulator and 64-bit storage
accesses, and the 4-Mbit storage are the figures the design was sized
around. The transition count, the hash table size and the default net are
choices of this implementation. The default net is a ring: transition t
moves a token from place `t mod N` to place `(t+1) mod N`, built by
`pn_pkg::ring_pre/ring_post`. Any other net is given through `PRE` and
`POST`. Arcs have weight one, and there are no inhibitor arcs or
priorities.

## Where this RTL departs from, or goes beyond, the design it follows

* **Counter bound.** Four bits per place were kept, which bounds a place at
  15 tokens, not 16.
* **Net class.** The first hardware built for this architecture was limited
  to safe nets (one token per place). Here a net is limited by the counter
  width instead.
* **Hash tables.** A single-level hash table is used. A hierarchy of hash
  tables is not built. Storing list elements after the first as
  differences from the previous one is not built either: it needs a hash
  function derived from the net's structure, and no such function is
  defined. Every record holds the full marking.
* **Header word.** Each record has a header word, so searching and storing
  cost one word more per record than a bare-marking estimate.
* **Own choices.** The hash function, inserting at the list head, restoring
  only the changed words, the two error stops and the host ownership rule
  are all choices of this implementation.
* **Outside this RTL.** Several parts are not here: the host computer, the
  board's bus interface and clock generator, and the compositional flow for
  large nets. That flow splits a net into sub-nets whose reachability sets
  are explored separately, then composes the results with tensor algebra,
  and it is host software.
* **Device fit.** The defaults do not fit the small reconfigurable FPGA the
  architecture was first tried on, which has 4096 one-flip-flop cells.
  This design needs about 1800 flip-flops plus a 16-kbit pointer table.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. The reference model,
`tb/pn_ref_pkg.sv`, is a plain software Petri-net interpreter with a
breadth-first search.

| testbench | what it shows |
|-----------|---------------|
| `tb_place`, `tb_transition`, `tb_daisy_chain` | cell logic against small models under random stimulus, including self-loops, overflow and chain priority |
| `tb_pn_simulator` | a 10-place net with fork, join, self-loop and an unbounded place: marking words, chain output, one-hot firing and the overflow flag against the interpreter |
| `tb_state_memory`, `tb_hash_table`, `tb_host_interface` | storage, list heads and clear, port ownership |
| `tb_search_engine` | a 12-place net with 8 hash lists: 448 states and 2148 firings, equal to the reference; every record read back and checked (reachable, unique, C flag, predecessor one firing away); every phase's cycle count checked against the table above |
| `tb_pn_accelerator` | end to end through the host port: two runs from two markings, a net that overflows a counter, a storage too small for the set, and a refused host write; every mechanism is counted and must occur |
| `tb_pn_accelerator_full` | all defaults: 100-place ring with two tokens; 5050 states, 10000 firings, 4951 duplicates, every record checked; about 15 s of simulation |
| `tb_table1_workload` | the same ring with 512 hash lists, so lists grow to about 10 states: every one of the 10000 steps stays within the phase bounds above; the average step takes 38.9 cycles, against the estimate N(S+5)/16 = 92 of the step-cost model this architecture was sized with (N = 100, S = 10), because most list records are rejected at their first state word |
| `tb_safe_net` | one bit per place: five dining philosophers who take the left fork first; 82 states, equal to the reference, and the deadlock marking is among them |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pn_pkg.sv tb/pn_ref_pkg.sv tb/tb_search_engine.sv --top-module tb_search_engine
./obj_dir/Vtb_search_engine
```

Lint warnings that remain are about wide constants in the default-net
functions and unused header bits. They do not indicate faults.
