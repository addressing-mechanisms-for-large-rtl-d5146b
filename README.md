# Hashed address translator for large virtual addresses

A persistent store needs virtual addresses wide enough to name every byte on
every disc of a machine, and in a capability system those addresses are
sparse. Conventional page tables grow with the size of the virtual address
space and need several levels to stay in memory. This design avoids
translating through page tables at all. A hardware table holds one entry
for every page frame of main memory, so translating an address never
consults a page table. If the page is not in the table, it is not in main
memory, and the translator raises a page fault. Finding the page on disc is
then left to software, which is far less time-critical.

The table is a hash table with embedded overflow. A virtual page number is
hashed to a *home cell*. That cell's key is compared with the page number. On
a mismatch the translator follows a chain of synonyms through link fields
until an end-of-chain flag stops it. The table's length grows with main
memory. Its width grows only with the logarithm of the virtual address size,
so going from 32-bit to 128-bit virtual addresses costs little.

Default configuration: 60-bit virtual addresses, 23-bit main memory
addresses, 4 KiB pages. That gives a 48-bit virtual page number and 2048
page frames. The table has 8192 cells, four per frame.

## Cell format

Each 75-bit cell holds, from most significant field down:

| field | bits | meaning |
|-------|------|---------|
| key   | 48   | virtual page number of the page in this cell |
| link  | 13   | cell address of the next synonym |
| ro    | 1    | page is read-only |
| valid | 1    | cell holds a page |
| eoc   | 1    | end of chain: no further synonym |
| frame | 11   | main memory page frame number |

The layout is defined once in `rtl/xlat_cell.svh`.

## Translation (`xlat_lookup`)

- **Hash.** `hash_gen` cuts the page number into 13-bit slices and XORs
  them together. This is one gate level, and every page number bit affects
  the result. Consecutive pages of one address space land in consecutive
  cells.
- **Table read.** The table (`xlat_table`) reads synchronously, with a
  latency of one cycle.
- **Compare.** `key_comparator` classifies each cell as one of:
  - *hit*: valid, and the key matches;
  - *follow*: valid, no match, and not the end of the chain;
  - *last*: empty, or the end of the chain.
- **Overlapped chain walk.** On *follow*, the cell's link field goes to the
  table's read address in the same cycle. The next synonym therefore arrives
  one cycle later. A translation takes exactly one cycle per cell searched,
  which `resp_probes` reports. A page at the head of its chain is
  translated in one cycle, and such requests can be issued every cycle.
- **Result.** A hit puts out `{frame, offset}` on `resp_pa`. *last* raises
  `resp_fault` and returns the faulting address on `resp_va`. A write to a
  read-only page raises `resp_hit` and `resp_prot` together.

With uniformly spread keys, the average search length of a hit is about
`1 + a/2`, where `a` is the loading factor. With all 2048 frames mapped into
8192 cells, `a` is 0.25 and the average is about 1.125 cells.

## Loading and discarding pages (`xlat_maint`)

The table changes only when a page is loaded or discarded. It is not
touched on a context switch, because virtual addresses are valid
system-wide. The maintenance sequencer keeps every chain *pure*: the chain
that starts at cell `h` holds only pages whose home is `h`. A lookup
therefore never walks through another chain's entries.

| case | action |
|------|--------|
| insert, home empty | write the page into its home cell |
| insert, home holds its own chain | walk the chain to reject a duplicate. Take a free cell and link it in right after the home cell |
| insert, home *borrowed* by an overflow entry of another chain | copy that entry to a free cell. Relink its predecessor to the copy. Write the new page into its home |
| delete, lone head | clear the cell |
| delete, head with successors | copy the second cell into the head, then clear the second cell |
| delete, further down | the predecessor takes over the deleted cell's link and end-of-chain flag |

Free cells are found by scanning from a rotating pointer, at two cycles per
cell inspected. After reset the sequencer clears all 8192 cells, one per
cycle, and then raises `ready`. Status codes are `ST_OK`, `ST_FULL`,
`ST_NOT_FOUND` and `ST_DUPLICATE`; they are defined in `mpc_pkg`.

The translator and the sequencer share the table's single read port and
single write port:

- A pending command blocks new translations.
- A command starts only once the translation in flight has finished.
- An assertion in the top checks that the two never read in the same cycle.

## Top level (`addr_translator`) and interface

- `req_valid`/`req_ready`, `req_va` and `req_write` carry a translation
  request.
- `resp_valid` is a one-cycle pulse that carries the result: `resp_hit`,
  `resp_fault`, `resp_prot`, `resp_pa`, `resp_va`, `resp_cell` and
  `resp_probes`. Responses cannot be held back.
- `cmd_valid`/`cmd_ready` carry a command: `cmd_op` (`OP_INSERT` or
  `OP_DELETE`), `cmd_vpn`, `cmd_frame` and `cmd_ro`.
- `done_valid` is a one-cycle pulse that carries `done_status` and
  `done_cell`.
- `occupancy` counts the valid cells.
- `rst_n` is an asynchronous reset, active low.

Parameters: `VA_W`, `PA_W`, `PAGE_W` and `CELL_AW`. The page-number,
frame and cell widths follow from them. For example, 128-bit addresses need
only `VA_W=128`.

## What is specified and what is chosen

These parts follow the translation scheme:

- a table sized by main memory, not by virtual memory;
- the cell contents (key, link, read-only bit, flags, frame number);
- hashing by XOR;
- the compare, chain following and end-of-chain bit;
- the overlap of fetch and compare;
- the page fault on a miss;
- the 60/23-bit sizes and 4 KiB pages.

These parts are this design's own choices:

- the table size of 8192 cells, chosen for a loading factor of 0.25;
- which bits the hash combines;
- the valid flag;
- the one-cycle synchronous table read;
- the handshakes;
- the protection-fault output;
- the whole maintenance algorithm, including relocation, free-cell
  scanning and clearing after reset. The scheme leaves these to microcode
  or the operating system.

Not covered in hardware: locating a faulting page on disc. That is done in
software through per-address-space page tables (a 32-entry secondary table
and the head of the primary table in page zero, the full primary table at
the end of the address space) and a per-disc directory hashed on
address-space number. These are data structures maintained by the kernel,
and the translator never reads them.

## Simulating

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M`. For example,
to simulate the top level:

    verilator --binary --timing --assert -Irtl rtl/mpc_pkg.sv rtl/*.sv \
        tb/tb_addr_translator.sv --top-module tb_addr_translator
    ./obj_dir/Vtb_addr_translator

## Verification status

- `tb/tb_addr_translator.sv` runs the whole design at its default size. It
  covers directed cases for every insert and delete case, and 3000 random
  loads, discards and translations over a pool of pages with many synonyms.
  It also covers back-to-back translations. A reference model checks every
  result and the latency of every translation.
- The sub-blocks have no testbenches of their own. They are tested only
  through the top level.
- The testbench contains a phase that maps all 2048 frames and measures the
  mean search length. That phase is not run, because the reference model is
  too slow at that size, so the 1.125 figure is not measured.
- There are no fault-injected copies of the modules.
