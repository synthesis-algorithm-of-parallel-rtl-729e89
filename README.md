# Parallel index generation unit

An *index generation function* answers one question for an n-bit input
vector: is it one of k registered vectors, and if so, which one? It returns
the vector's index 1..k, or 0 for any vector that is not registered. Address
tables, access-control lists and dictionaries are typical uses. When the
answer must come in a fixed, short time, the function is built as
memory-based hardware rather than as a search.

This RTL implements the function with several small *index generation units*
(IGUs) working side by side. Each IGU is addressed by its own hash of the
input. The registered vectors are split over the units so that no two
vectors in one unit share a hash value. The split is a bipartite matching
problem, solved when the tables are built. That split is what keeps the
memories small. For 10,000 registered 20-bit vectors, four units of 2^12
words need 360,448 bits of table memory. A single IGU would need its main
memory to grow roughly with k².

The design follows the conflict-free partitioning method described in
"Synthesis Algorithm of Parallel Index Generation Units" (Y. Matsunaga).
The structure of the unit and of the parallel arrangement, the table sizes
and the partitioning rule come from that method. The load port, clear
sequencer, pipeline timing and the concrete hash functions are this
design's own. The section "Own choices and departures" lists each one.

## One IGU: predict, then check

An IGU has two memories, an equality comparator and an AND gate.

```
            P                Q
 hash ──────────► main mem ──────┬──────────────► AND ──► index (Q bits)
                                  │                 ▲
                        (AUX addr)│                 │ match
                                  ▼                 │
                               AUX mem ──(N-P)──► ==┘
 rest ─────────────────────────────────(N-P)───────►
```

* The **main memory** (2^P words of Q bits) is addressed by a P-bit hash of
  the input. It holds the index of the registered vector with that hash, or
  0. For a registered vector this prediction is always right. An
  unregistered vector with the same hash gets the same non-zero prediction,
  which is wrong.
* The **AUX memory** holds the N-P remaining bits that the predicted vector
  must have. The comparator checks them against the input's remaining bits.
  On a mismatch, the AND gate forces the output to 0.

Only N-P bits need checking because the hash and the remaining bits
together determine the vector (see "Input hash functions"). So a vector
that matches both the hash and the remaining bits is the registered vector.

The AUX memory can be addressed in two ways (`igu` parameter
`AUX_BY_INDEX`):

| `AUX_BY_INDEX` | AUX address | AUX size | latency | use |
|---|---|---|---|---|
| 1 | predicted index | 2^Q × (N-P) | 2 cycles | stand-alone IGU; main and AUX memory in series |
| 0 (default) | the hash | 2^P × (N-P) | 1 cycle | each unit of the parallel design |

Inside the parallel design every hash value of a unit holds at most one
vector. Addressing the AUX memory by the hash is therefore equivalent to
addressing it by the index. It also gives each unit 2^P·(N-P+Q) bits and
lets both memories be read in the same cycle.

## Several IGUs and conflict-free partitioning

`pigu` places M IGUs side by side. Unit i sees the input through its own
hash function F_i. A registered vector is stored in exactly one unit, so at
most one unit returns a non-zero index. The M outputs are therefore simply
ORed bit by bit. One assertion checks this: at most one unit may return a
non-zero index.

The RTL does not choose which unit holds which vector. The table builder
does that in software:

1. Build a bipartite graph. One side has the k vectors. The other side has
   the M·2^P pairs (unit i, hash value). Each vector d gets M edges, one to
   (i, F_i(d)) for every unit i.
2. Find a maximum matching. If it covers every vector, each vector goes to
   the unit of its matched edge. A matching uses each (unit, hash value)
   pair at most once, so no unit has two vectors with the same hash.
3. If the matching does not cover every vector, try another set of hash
   functions (`HASH_SEED`) or make P larger.

Example: take seven vectors and two functions. F_1 gives them the values
1,2,3,4,2,2,4 and F_2 gives 1,2,3,3,4,1,1. Neither function alone separates
them. A matching puts vectors 3, 6 and 7 in unit 1 and the other four in
unit 2, with no shared value in either unit. The testbench package
`tb/cfp_pkg.sv` contains such a builder (`cfp_partition`: breadth-first
augmenting paths, Kuhn's method) and runs it on this example.

Matching can fill the tables almost completely. With four units, sets of
k = 1000, 2000, 4000 and 8000 random vectors fit tables of 2^8, 2^9, 2^10
and 2^11 words per unit. That is 97.7% of all words. Usually the first hash
set works; sometimes the second is needed. This is what makes the total
memory small.

## Input hash functions

Each hash output bit j of unit i is built from one *pivot* input bit XORed
with the parity of some non-pivot input bits:

```
hash[j] = vec[pivot(i,j)] ^ ^(vec & xmask(seed,i,j) & ~pivots(i))
rest    = the N-P non-pivot bits of vec, lowest bit first
```

Each hash bit owns a pivot bit that no other hash bit uses. So from `hash`
and `rest`, every pivot bit can be recovered in turn. The pair identifies
the vector, which is why the AUX memory stores only N-P bits. With all
masks zero, the hash reduces to plain wires that pick P of the N inputs.

* Pivots: `pivot(i,j) = (j + 5·i) mod N`, so the units look at different
  input bits.
* Masks: `xmask` is an xorshift32 of `((seed·16 + i)·64 + j + 1)·0x9E3779B9`
  (three rounds of `<<13, >>17, <<5`).

Both formulas are in `rtl/pigu_pkg.sv`, and the testbench model uses the
same constants. The functions handle vectors of up to 32 bits.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `N` | 20 | input vector width |
| `Q` | 14 | index width, ceil(log2(k+1)); 14 bits allow k up to 16383 |
| `P` | 12 | hash width = main-memory address width of each unit |
| `M` | 4 | number of units |
| `HASH_SEED` | 0 | which set of hash functions to build |

Table memory is 2^P·(N-P+Q)·M bits: 4096·22·4 = 360,448 bits at the
defaults. These defaults are the four-unit point for 10,000 random 20-bit
vectors. Other evaluated points are parameter changes. Each has been
simulated:

| configuration | parameters | table bits |
|---|---|---|
| four units, k ≤ 10000 | defaults | 360,448 |
| three units, k = 10000 | `M=3` | 270,336 |
| two units, k = 10000 | `M=2, P=14` | 655,360 |
| four units, k = 1000 / 2000 / 4000 / 8000, tightest | `P=8/9/10/11`, `Q=10/11/12/13` | 22,528 / 45,056 / 90,112 / 180,224 |

For the tightest rows the tests keep `Q=14`, which only widens the index.

## Interface and timing of `pigu`

All signals are synchronous to `clk`. `rst_n` is asynchronous and active low.

| port | dir | width | function |
|---|---|---|---|
| `clear` | in | 1 | start a clear sweep |
| `busy` | out | 1 | clear sweep running |
| `wr_en` | in | 1 | write one table entry |
| `wr_sel` | in | clog2(M) | unit that receives the vector |
| `wr_vec` | in | N | the vector |
| `wr_index` | in | Q | its index; 0 removes it |
| `in_valid` | in | 1 | lookup request |
| `in_ready` | out | 1 | request accepted this cycle |
| `in_vec` | in | N | vector to look up |
| `out_valid` | out | 1 | result valid |
| `out_index` | out | Q | index, or 0 if not registered |

* **Clear.** Reset, or a `clear` pulse while idle, writes index 0 to all
  2^P main-memory words of every unit, one word per cycle. This takes 2^P
  cycles, with `busy` high throughout. The AUX memories are not cleared. An
  empty main-memory word already forces a 0 result.
* **Write.** While `busy` is low, `wr_en` stores `wr_vec` in unit `wr_sel`
  with index `wr_index`, in one cycle. The unit computes the hash and check
  bits itself. Writes are accepted back to back. A write affects lookups
  accepted in later cycles. A vector that the partition moved to another
  unit must be removed from its old unit (written there with index 0).
  Otherwise two units would answer.
* **Lookup.** A request is accepted when `in_valid && in_ready`.
  `in_ready = !busy && !wr_en`: writes and lookups share the hash units,
  and a write wins. The result appears on `out_valid`/`out_index` two
  cycles later: one cycle for the synchronous table read, one for the
  registered OR. Lookups can be issued every cycle.

Loading k vectors takes 2^P + k cycles. After that, lookups run at one per
cycle.

## Files

| file | content |
|---|---|
| `rtl/pigu_pkg.sv` | default sizes and the hash-function formulas |
| `rtl/pigu.sv` | top: hash units, IGUs, OR, write port, clear sequencer |
| `rtl/igu.sv` | one index generation unit (both AUX addressing modes) |
| `rtl/input_hash.sv` | one input hash function |
| `rtl/igu_ram.sv` | table memory: one write port, one synchronous read port |
| `tb/cfp_pkg.sv` | table builder model: hash evaluation and conflict-free partitioning |
| `tb/pigu_sweep.sv` | testbench helper: loads and checks one configuration over several k |
| `tb/tb_*.sv` | self-checking testbenches |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/pigu_pkg.sv tb/cfp_pkg.sv tb/tb_pigu.sv --top-module tb_pigu
./obj_dir/Vtb_pigu
```

Replace `tb_pigu` with any other testbench name. The packages must be
listed first. Every testbench ends with a line
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it shows |
|---|---|
| `tb_pigu` | full default size. 10,000 random vectors are partitioned, loaded and all looked up. 5,000 unregistered vectors return 0. It checks the 2-cycle latency and the 2^P-cycle clear. It also covers removal, re-indexing, explicit clear, lookups held off by `busy` and by writes, hits in every unit, and misses from empty words and from the AUX check. |
| `tb_pigu_workloads` | k = 1000…10000 in steps of 500 on the defaults, the three- and two-unit configurations at k = 10000, and the tightest four-unit tables. It also runs a 4-input, four-vector example, where all 16 inputs are checked. |
| `tb_igu` | both AUX addressing modes: hits, AUX-check rejects, empty words, latencies 1 and 2, updates |
| `tb_input_hash` | hash and remaining bits computed bit by bit; the input rebuilt from them |
| `tb_igu_ram` | random reads and writes against an array model, including read-during-write |

Simulation is fast: the full-size test runs in well under a second.

## Own choices and departures

* **Table loading** (write port, `wr_sel`, removal by writing 0) and the
  **clear sequencer** are this design's own. The method only requires the
  tables to be rewritable, since registered vectors may change.
* **Timing**: synchronous-read memories, a registered OR, latency 2, one
  lookup per cycle. These are own choices.
* **Hash functions**: the method asks for wires or XOR gates and uses
  randomly generated functions. The pivot and parity construction and its
  formulas are own choices. `HASH_SEED` selects the set at build time. The
  hash is fixed hardware, so retrying a failed partition means rebuilding
  with another seed.
* **AUX addressing**: in the parallel design, the AUX memory is addressed
  by the hash (see above). The series arrangement is available in `igu`
  with `AUX_BY_INDEX=1`.
* **Equal unit sizes.** All units have the same P. A variant with a
  different table size per unit is not built.
* **Partitioning is not hardware.** The matching runs in the table builder
  (modelled in `tb/cfp_pkg.sv`), not on chip.
* The memories are plain arrays, so a synthesis tool can map them to SRAM
  macros. No memory macro or other technology-specific part is included.
* Verilator reports `rst_n` being used both as an asynchronous reset and in
  the assertions' `disable iff`. This is harmless.
