# Abstract multi-port memory with arbitrary addressable units

Formal verification of a processor gets much harder as its memories grow.
Every memory bit is one more state bit for the model checker. A 64 KiB data
memory alone adds half a million state bits, which is usually more than the
checker can handle. Yet a bounded proof only ever touches a few cells. The
memory in this repository records only the cells that are actually accessed.
It stores them as a small table of (address, value) pairs and gives every
untouched cell an *unconstrained* value. Its state grows with the number of
accesses, not with the size of the address space.

The module keeps the interface of an ordinary memory, so it can replace the
real one in a design under verification:

- any number of read ports and write ports;
- accesses of different sizes (byte, word, double word, ...) through one port;
- little- or big-endian layout;
- zero- or one-cycle read latency, and zero- or one-cycle write latency;
- two policies for simultaneous writes to one cell.

For correspondence checking, in which two models of the same processor run
one after the other from the same memory state, a top level pairs two such
memories. It makes them agree on the initial contents they both read
(*shadowing*).

The RTL is synthesizable SystemVerilog. It serves two uses: as a model that
a model checker reads through a SystemVerilog front end, and as a simulation
model of an uninitialised memory.

## How a read sees "random but consistent" contents

The core is `abs_mem_table`. It holds `DEPTH` rows of `(address, value)`
pairs and a counter `used` of rows in use. Each cycle:

- **Read hit.** Every enabled read port compares its address with all used
  rows in parallel. On a hit it returns the row's value in the same cycle.
- **Read miss.** The port returns its free input `rd_free`. At the clock edge
  a new row stores that address and value. Later reads of the address return
  the same value, so an unconstrained initial value, once seen, stays fixed.
  A model checker leaves `rd_free` as an open input, so every initial memory
  content is covered. A simulation drives it with whatever initial contents
  it wants to model.
- **Write.** At the clock edge the matching row is updated. If there is no
  matching row, a new one is allocated.

Several accesses in one cycle may land on addresses the table has not seen
yet. Rows are handed out in a fixed order: read ports before write ports,
lower port numbers first. Ports that miss on the *same* new address share one
row. All reads of that address in the cycle return the free value of the
lowest-numbered such read port. If a read and a write both hit a new address
in one cycle, the row starts with the read's free value and takes the written
value at the edge. The read still returns the old (free) value, because
writes take one cycle.

**Table size.** With bounded model checking to depth *k*, at most *k* times
the number of low-level ports distinct cells can be touched. The default
`DEPTH = 64` matches *k* = 8 with 4 + 4 low-level ports. If the table runs
full anyway, the access that did not fit is not recorded, the sticky
`overflow` output rises, and `used` stays at `DEPTH`. A proof that saw
`overflow` needs a larger `DEPTH`.

## Addressable units: one interface port becomes NU table ports

Different access sizes are handled by keeping the table at the granularity
of the **least addressable unit** (`LAU` bits, a byte by default). A unit of
`u` LAUs (1 ≤ `u` ≤ `NU`) is stored in `u` consecutive cells. Each interface
port `i` is backed by `NU` table ports, numbered `i*NU + j - 1` for
`j = 1..NU`. Port `j` carries the `j`-th least significant LAU of the data.
`NU` is the widest unit divided by the smallest: 2 for bytes and 16-bit words.

| low-level signal | value |
|---|---|
| enable of port `j` | `en && unit >= j` (only the needed cells are accessed) |
| address, little endian | `addr + j - 1` |
| address, big endian | `addr + unit - j` |
| write data of port `j` | `data[j*LAU-1 : (j-1)*LAU]` |
| read data, LAU `j` | port `j`'s data if it is enabled, otherwise 0 |

So a narrow read returns zeros above the unit. LAU 1 is always taken straight
from port 1. When the whole port is disabled its data is undefined, and the
raw low-level data shows through. Addresses wrap modulo 2^`AW`. For example,
a big-endian word (`unit = 2`) at `0x1230` stores bits 15:8 at `0x1230` and
bits 7:0 at `0x1231`.

`rd_port_map` and `wr_port_map` hold these equations. `abs_mem` instantiates
one of them per interface port. The unit is encoded as the plain count of
LAUs, `$clog2(NU+1)` bits wide. A concurrent assertion checks that an enabled
port carries a unit between 1 and `NU`. With `NU = 1` the unit input is
still present and must be 1.

Overlapping accesses of different sizes collide at cell level. For example, a
word write at `0x10` and a byte write at `0x11` in the same cycle both write
cell `0x11`. The collision rules below therefore apply to table ports, not to
interface ports.

## Write collisions

When two or more enabled table write ports store into one cell in the same
cycle, the parameter `COLL` decides what the cell receives:

- `COLL_PRIORITY`: the lowest-numbered table port wins. Write port 0 beats
  port 1, and within a port the lower LAU beats the higher one.
- `COLL_RANDOM`: the cell receives an unconstrained value. It is taken from
  `wr_free` of the lowest-numbered colliding table port.

The `collision` output flags a cycle with a collision.

## Timing options

| parameter | default | effect |
|---|---|---|
| `READ_DELAY` | 0 | 0: data in the cycle of the request. 1: `rd_buffer` registers it and returns it one cycle later, with `rd_valid` marking the cycle. |
| `WRITE_DELAY` | 1 | 1: written data is visible from the next cycle. 0: `wr_bypass` forwards it to reads of the same cell in the same cycle. |

The table always commits at the clock edge. `wr_bypass` compares each table
read address with every table write address. It substitutes the written data
under the same collision rule the table applies at the edge, so the forwarded
value matches what is stored. The `forwarded` output flags such a cycle.
With `WRITE_DELAY = 0`, a read of a new cell that is written in the same
cycle gets the written value. Its row still records the read's free value as
the cell's initial value. That initial value was never observed, so any value
is consistent there.

Reset (`rst_n` low, synchronous) empties the table. It does not clear the
stored rows, because rows at or above `used` are never looked at.

## Correspondence checking and shadowing

`abs_mem_corr` is the top level. It holds one `abs_mem` for the model that
runs first (`mem_a`, ports `a_*`) and one for the model that runs second
(`mem_b`, ports `b_*`). Both start from the same unknown memory. So a cell
that both read before writing it must give both the same value.
`shadow_link` enforces this while `shadow_en` is 1.

For each table read port of `mem_b`, it looks up the address in `mem_a`.
Each of `mem_a`'s rows also keeps the value the cell held before any write,
if a read observed it (`sh_*` ports). If that value exists, `mem_b` gets it
as its free value. Otherwise `mem_b`'s own `b_rd_free` is used.

The lookup returns the *initial* value, not `mem_a`'s current contents. By
the time `mem_b` runs, model A may already have overwritten the cell. The
output `shadowed` counts the reads of `mem_b` that were served from `mem_a`
in the current cycle. `mem_b`'s own lookup ports are unused and tied to 0.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `AW` | 16 | address width: 65536 cells |
| `LAU` | 8 | least addressable unit in bits |
| `NU` | 2 | widest unit / least unit (bytes and 16-bit words) |
| `NR`, `NW` | 2, 2 | interface read and write ports |
| `DEPTH` | 64 | table rows |
| `ENDIAN` | `ENDIAN_LITTLE` | `ENDIAN_BIG` stores the most significant LAU at the lowest address |
| `COLL` | `COLL_PRIORITY` | or `COLL_RANDOM` |
| `READ_DELAY`, `WRITE_DELAY` | 0, 1 | see above |

The defaults describe a 16-bit processor with a 64 KiB byte-addressed memory
and byte and word loads and stores. A word-only memory of 32768 16-bit words
can use `LAU = 16, NU = 1, AW = 15`. A register file of 4 to 32 registers
uses `AW` = 2 to 5, with `LAU` set to the register width and `NU = 1`.

At the defaults, a coarse synthesis of `abs_mem_corr` (two memories) gives
about 10,000 word-level cells and 3,664 flip-flop bits. Each row holds an
address, a value, the observed initial value and a flag. The table search is
`DEPTH` × ports comparators: cost grows with `DEPTH`, not with `AW`.

## Files

`rtl/` holds:

- `abs_mem_pkg.sv`: the `coll_policy_e` and `endian_e` types.
- `abs_mem_table.sv`: the table.
- `rd_port_map.sv`, `wr_port_map.sv`: the unit mapping.
- `wr_bypass.sv`: zero-delay write forwarding.
- `rd_buffer.sv`: one-cycle read buffer.
- `shadow_link.sv`: shadowing between two memories.
- `abs_mem.sv`: the complete memory.
- `abs_mem_corr.sv`: the correspondence pair (top).

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). The
tests of the table, the memory and the pair check against an independent
reference: an explicit cell array with a "touched" bit per cell, whose
initial contents come from the same free inputs. The mapping, bypass,
buffer and shadow tests compare with the equations above, computed
separately. Each test also confirms that the mechanisms it targets (hits,
misses, collisions, forwarding, overflow, shadowing) really occurred.

- `tb_abs_mem_corr.sv` runs a full correspondence sequence on two copies of
  the top: the defaults, and big endian with random collisions, one-cycle
  reads and zero-delay writes. The sequence is:
  1. Model A runs random traffic.
  2. Model B replays it with shadowing. Its reads must equal A's.
  3. B reads cells only A had read, without shadowing. It must now see its
     own free values.
  4. A fills its table until it overflows.
- `corr_driver.sv` holds that sequence.
- `tb_abs_mem_corr_full.sv` runs it once on the top at default parameters.
- `tb_table1_memories.sv` runs random traffic through the memory at eight
  sizes, from a 4 × 8-bit register file to a 65536 × 8-bit byte/word memory,
  using the checker in `mem_workload.sv`: the sizes of the register files and
  memories of small 8- and 16-bit processors.

Each testbench prints `TB_RESULT checks=N failures=M`. To simulate one, for
example the full memory test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/abs_mem_pkg.sv tb/tb_abs_mem.sv --top tb_abs_mem
./obj_dir/Vtb_abs_mem
```

Any testbench works the same way (`--top tb_<name>`). They all finish in
seconds. For lint, use `verilator --lint-only -Wall -Irtl -y rtl
rtl/abs_mem_pkg.sv rtl/<module>.sv`. The only warnings are unused internal
signals in `abs_mem_corr`: `mem_a`'s request outputs and `mem_b`'s lookup
outputs, which the pair does not need.

## Where this design makes its own choices

The table scheme, the mapping equations, the two collision policies, the two
timing extensions and shadowing follow the published method. These details
were not specified there and are choices of this implementation:

- The free inputs `rd_free` and `wr_free` are how "unconstrained" values
  enter, one per table port.
- Which port wins a collision, and which free input supplies the random
  value.
- How rows are handed out and shared within one cycle.
- The write data slice is taken per LAU `j`. A literal reading of one
  published formula would give every port the same slice, which contradicts
  storing a unit in consecutive cells.
- The `overflow`, `collision`, `forwarded`, `rd_valid` and `shadowed`
  outputs, and the `shadow_en` switch.
- Shadowing returns the first memory's observed *initial* value.
- Reset behaviour and address wrap-around.
- The default port counts (2 + 2) and `DEPTH` (64). No port counts or
  verification depths were available for the processors this was meant for.

The original work generated the model as text for a model checker. No such
generator is part of this repository: the parameters above take its place.
