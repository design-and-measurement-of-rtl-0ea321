# RL-TCAM: a fully static ternary CAM for near-threshold supply

A ternary content addressable memory (TCAM) stores words whose bits are `0`,
`1` or `X` (don't care). It compares a search key with every stored word at
once and reports which words match. Routers use it for longest-prefix
matching. Conventional TCAMs rely on analog tricks. They precharge a match
line per entry, let any mismatching cell discharge it through a wired NOR, and
then sense the result with a match-line sense amplifier. Such a scheme needs
sizing margins, so it stops working as the supply voltage drops.

This design makes every part of the search path plain, fully complementary
static CMOS:

* **Ratioless storage.** Each ternary cell holds two bits in ratioless static
  latches. The silicon cell has 24 transistors: the 12-transistor ratioless
  SRAM bit with its read driver removed, twice over, plus a comparator.
* **Static per-cell comparator.** It is built from complementary gates, with
  no dynamic node.
* **Hierarchical-AND matching comparator (HAMC).** It replaces the NOR match
  line and sense amplifier. It is a tree of NAND + inverter stages that ANDs
  the cell results of an entry.

Nothing in the match path depends on transistor ratios or on precharge
timing. The silicon this RTL is modelled on therefore works down to a 0.25 V
supply. A conventional TCAM built in the same 180 nm process stops at 0.6 V.
The RTL reproduces the logic of that design: 36 bits x 32 entries,
write-only ternary cells, a static AND-tree match path and a priority
encoder. Voltage, energy and delay are properties of the transistors and
have no RTL counterpart.

## Block structure

```
             wdata/wcare            waddr/we            key/search_en
                 |                     |                      |
           write_driver           row_decoder          search_register
        (bit-line pairs bl)   (one-hot word lines wl)  (search lines sl/slb)
                 \                     |                      /
                  +--------------- rl_tcam_array -------------+
                                 32 x rl_tcam_entry
                                 each = 36 x rl_tcam_cell + hamc
                                       |
                                  match[31:0]
                                       |
                                priority_encoder --> hit, hit_addr
```

| file | role |
|---|---|
| `rtl/tcam_pkg.sv` | sizes (36, 32), `cell_code_t`, `encode_ternary()` |
| `rtl/rl_tcam_cell.sv` | two storage bits + static comparator |
| `rtl/hamc.sv` | level-by-level AND tree (NAND + inverter per node) |
| `rtl/rl_tcam_entry.sv` | 36 cells on one word line, HAMC → match line |
| `rtl/rl_tcam_array.sv` | 32 entries with shared bit lines and search lines |
| `rtl/write_driver.sv` | (data, care) → bit-line pair per column |
| `rtl/row_decoder.sv` | write address → one-hot word line |
| `rtl/search_register.sv` | key register, complementary search lines, `valid` |
| `rtl/priority_encoder.sv` | match lines → `hit`, lowest matching address |
| `rtl/rl_tcam.sv` | top level |

## How a ternary cell is stored and compared

Each cell keeps a pair `(X, Y)`:

| stored value | X | Y | matches search bit |
|---|---|---|---|
| `1` | 1 | 0 | 1 only |
| `0` | 0 | 1 | 0 only |
| `X` | 0 | 0 | both |
| (unused) | 1 | 1 | neither |

The search register drives each column with a complementary pair
`sl = key`, `slb = ~key`. A cell reports a match unless it disagrees with
the key:

```
match = ~((X & slb) | (Y & sl))
```

`write_driver` produces the pair from a data bit and a care bit
(`X = care & data`, `Y = care & ~data`), so the `11` code is never written.
The choice of this pair encoding is this design's own. The transistor-level
cell fixes only that there are two storage bits and a comparator.

The cells have no read port. A TCAM cell is never read at speed and is never
half-selected, so the ratioless cell drops the read bit-line driver of the
SRAM cell it derives from. The contents can only be observed through
searches. The cells also have no reset, like any SRAM: write every entry
before relying on `match`.

## The hierarchical-AND matching comparator

At very low supply, NOR gates become slow and need extreme P/N sizing,
because their PMOS transistors are stacked. The match function of an entry
is the AND of its cell results. It is therefore built only from NAND +
inverter pairs, connected as a tree. `hamc` builds the tree level by level.
Each level pairs up the signals of the level below with `~(~(a & b))`. An
odd signal left over passes to the next level unchanged. A 36-bit entry
therefore needs `ceil(log2 36) = 6` levels. The 2-input fan-in is this
design's choice. The design requires only an AND hierarchy of
NAND/inverter stages. The tree adapts to any `N` by itself.

On silicon, the AND gates sit among the cells of an entry. In RTL,
`rl_tcam_entry` simply feeds its 36 cell outputs into one `hamc`.

## Interface and timing (`rl_tcam`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; async active-low reset (search register only) |
| `we`, `waddr` | in | 1, 5 | write enable and entry number |
| `wdata`, `wcare` | in | 36 | value to store; `wcare[i]=0` stores `X` |
| `search_en`, `key` | in | 1, 36 | capture a search key |
| `valid` | out | 1 | a key was captured at the last edge |
| `match` | out | 32 | match line of every entry |
| `hit`, `hit_addr` | out | 1, 5 | any match; lowest-numbered matching entry (0 if none) |

* **Write.** `we`, `waddr`, `wdata` and `wcare` are sampled at a rising
  edge, which updates the entry.
* **Search.** `key` is sampled with `search_en` at a rising edge. During the
  next cycle, `valid` is 1 and `match`, `hit` and `hit_addr` give the result.
  That is a latency of one cycle, with one search per cycle.
* **Static outputs.** The match path is static and combinational from the
  search register and the cells. As a result:
  * a write and a search in the same cycle give a result that already
    includes the write;
  * a later write to an entry changes `match` one cycle later even without a
    new search.
* **Priority.** Entry 0 has the highest priority. For longest-prefix
  matching, store the longest prefixes at the lowest entry numbers.

The reported silicon figures are for information only:
* propagation delay is roughly equal for both TCAMs above 0.6 V;
* minimum supply is 0.25 V;
* search energy is about 1.03 fJ/bit/search at 0.25 V.

## What is this design's own choice

The architecture comes from the design: ratioless two-bit cells with static
comparators, an AND-only match hierarchy, a search register, a row decoder,
a write peripheral, a priority encoder, and the 36 x 32 size. The following
are filled in here:

* clocked writes and key capture, and the one-cycle search latency;
* the `valid` flag;
* the `(X, Y)` encoding and the data/care write interface;
* a 2-input HAMC tree;
* the lowest-index-wins priority;
* bringing out both the full match vector and the encoded address;
* reset of the search register to an all-zero key.

Not provided, because the design does not describe them:
* a global search mask;
* a read port;
* entry-valid bits.

Not represented in RTL:
* **Output level shifting.** To read a 0.25 V chip with an ordinary digital
  tester, its push-pull output buffers get an external pull-up voltage and
  resistor (1 kΩ–1 MΩ). This turns each buffer into a complementary
  open-drain stage. The stage shifts the output up to the tester's
  threshold, and inverts it: the PMOS pulls low more strongly than the NMOS,
  so V_OH ends up below V_OL. That inversion belongs to the board, not the
  TCAM. The RTL outputs are true polarity.
* **Transistor-level behaviour.** Ratioless sizing, minimum-voltage
  operation and power are outside what RTL can express.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test at full
size:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tcam_pkg.sv \
    tb/tb_rl_tcam.sv --top-module tb_rl_tcam -Mdir obj_tb
./obj_tb/Vtb_rl_tcam +verilator+rand+reset+2
```

Replace `rl_tcam` with a block name (`hamc`, `rl_tcam_cell`,
`rl_tcam_entry`, `rl_tcam_array`, `search_register`, `row_decoder`,
`write_driver`, `priority_encoder`) to test that block. Each testbench
checks against a software model of its block and ends with a watchdog.

`tb_rl_tcam` runs the default 36 x 32 configuration in three phases:

1. It fills all entries with random ternary data and searches with random
   keys and with keys derived from stored entries.
2. It loads a nested longest-prefix table and checks that the longest prefix
   wins.
3. It issues writes and searches in the same cycle, and rewrites entries
   while the key is held.

Each of these phases checks `valid`, the one-cycle latency, `match`, `hit`
and `hit_addr`. The testbench also counts single hits, multiple hits, misses,
don't-care matches, prefix resolutions and the two write/search overlaps.
Each must occur at least once.

To change the size, override `WIDTH` and `ENTRIES` on `rl_tcam`. `AW`
follows `ENTRIES`. The package constants are only the defaults.
