# Equihash miner for an FPGA with DDR3 memory

This is a hardware solver for the Equihash proof-of-work with parameters
n = 210 and k = 9. It is meant for a single Virtex-6 class FPGA board that has
a DDR3 memory module and a UART link to a host PC. The host sends a job, which
is a string of bytes. The hardware builds the Equihash list from that job in
external memory, runs Wagner's generalised birthday algorithm over it, and
returns every solution it finds as 2^k = 512 indices.

Equihash is memory-hard. Its working set of about 128 MiB per list cannot sit
in on-chip RAM, so the design is built around one shared memory port. Every
step streams items through that port, and the logic is mostly address
generation and bookkeeping.

The design follows the thesis *Mining for blockchains using commodity
hardware*. It takes that work's module structure, state machines, memory
layout and main configuration. Departures from it are listed under
[Departures from the reference design](#departures-from-the-reference-design).

## The algorithm in hardware terms

With L = n/(k+1) = 21:

1. **Generate.** For i = 0 … 2^21 − 1, the design hashes the job bytes
   followed by i, using BLAKE2b with a 2n-bit (53-byte) digest. It splits each
   digest into two n-bit items, 2i and 2i+1, which gives 2^22 items.
2. **Stage s = 1 … k−1.** The items are sorted on their low L bits. Among the
   items that share those bits (a *collision*), every pair is XORed. The XOR
   is shifted right by L, so the next L bits become the new key. Each result
   becomes a new item. A tree node records which two items were combined.
3. **Stage k.** The items are sorted again. Any pair that agrees on all
   remaining 2L bits XORs to zero, so it is a solution. The tree under the
   pair is walked and its 512 leaf indices are sent to the host.

Three parts carry most of the cost:

- the sort: k stages × 3 passes over up to 4 M items;
- the collision scan;
- the memory traffic of both.

### Item word

Every item is one 256-bit word of the memory-controller user interface:

```
 255      246 245          224 223                          0
+------------+----------------+------------------------------+
| 1111111111 |  22-bit index  |  hash bits still to process  |   stage 1 (leaf)
+------------+----------------+------------------------------+
|     32-bit tree address X   |  (a ^ b) >> L                |   later stages
+-----------------------------+------------------------------+
```

- **Reference.** The top 32 bits are the item's reference. If it starts with
  ten ones it is a leaf, and the low 22 bits are an index. Otherwise it is the
  word address of a tree node.
- **Tree node.** A tree node is a word whose bits [63:32] and [31:0] hold the
  references of the two items that were combined. The earlier item in sorted
  order is on the left.
- **Hash.** The hash is kept right-aligned, so the sort key is always bits
  [L−1:0].

### Memory map

The memory is addressed in 256-bit words, with `app_addr = word << 2`.

| zone     | first word       | contents |
|----------|------------------|----------|
| MEM_BUF0 | 0                | generated items; then one of the two sort and collision buffers |
| MEM_BUF1 | BUF_WORDS        | the other buffer |
| MEM_BUF2 | 2·BUF_WORDS      | tree nodes, appended stage after stage up to the end of memory |

`equihash_pointer` keeps track of which buffer holds the current items (`cur`)
and how many there are. It also holds the next free tree word, and derives
every start pointer, end pointer and base pointer from these three values.

- **Sort.** The radix sort is not in place. Even passes read `cur` and write
  the other buffer; odd passes do the opposite. With an odd number of passes,
  the sorted list therefore ends up in the *other* buffer, and `cur` follows
  it.
- **Collision.** The collision step reads `cur` and writes the new items to
  the other buffer. `cur` then flips.

## Sorting: radix with a snooping bucket counter

`radix` is a least-significant-digit radix sort.

- It uses `RADIX_BITS = 7`, so 128 buckets and ⌈21/7⌉ = 3 passes.
- Pass p uses key bits [7p+6 : 7p].
- One state machine streams the reads, and a second one places each returned
  item at this address:

  ```
  write address = destination base + bucket_base[digit] + bucket_cnt[digit]
  ```

- Equal digits keep their order, so the passes compose into a full sort.

The start of each bucket is known before a pass begins, without a counting
pass over memory. The reason is `snoop`, which watches every item written to
memory. While a list is being written (by the hash generator, the collision
step or the previous sort pass), snoop looks at the digit the *next* pass will
use. For an item with digit d, it adds one to the start pointer of every
bucket above d. When the pass starts, bucket x therefore begins right after
all items with a smaller digit, and no memory is wasted.

snoop keeps two banks of counters:

- one that is being counted;
- one that radix is using.

`snoop_rst` moves the counted bank into use and clears it. Radix pulses it at
the start of every pass. During that pass, radix sets `snoop_pass` to the
number of the next pass, so its own writes are counted for the pass that
follows.

Radix keeps several reads in flight. Returned data goes into a 16-word FIFO,
and a read is only issued when the FIFO has room for every outstanding word.

## Collisions and the solution tree

`collision` streams the sorted items into a 256-bit FIFO of 512 words. The
FIFO is built from 72-bit × 512 units in parallel, the shape of a Virtex-6
FIFO36 block (`wide_fifo`). `collision_store` reads the other end of the FIFO
and holds the current run of equal-key items.

- **Pairing.** Each new item of a run is paired with every held item, one
  pair per few cycles.
- **Intermediate stages.** Each pair writes a tree node at X, then the new
  item `{X, (a^b) >> L}`.
- **Last stage.** A pair whose low 2L bits XOR to zero is reported as a
  solution.
- **Run limit.** At most `MAX_COLL = 7` items of a run are held, which allows
  up to 21 pairs. Later items of the run are still paired, but are not kept
  for pairing with the items after them. `dropped` counts them. With fewer
  held items, too many items are lost per stage and no solution survives all
  nine stages. The reference work saw this with 4 items and found that 7
  keeps the list size stable.
- **Capacity.** When a stage has written `BUF_WORDS` new items, further pairs
  are discarded and counted in `overflow`.

For each solution, the collision unit pauses its item reads and waits for the
reads already in flight. It then walks the tree depth-first with a small
stack (2k+2 references):

- a leaf reference goes out as its 22-bit index;
- a node reference is read from MEM_BUF2 and replaced by its two children,
  left first.

The indices therefore leave in tree order. In that order, every aligned group
of 2^s indices XORs to zero on its low s·L bits.

**Not filtered:** solutions whose indices repeat. These are the common
"trivial" solutions, where the same item meets itself through two paths.
Most solutions reported at reduced sizes are of this kind. Filtering them
needs a check over all 512 indices and is left to the host.

## Hash generation

`blake2b` runs two state machines:

- **Generation** (IDLE, PASS0, WAIT0, PASS_END, DONE). It starts the hash
  core for index i. The message block is the job bytes in received order,
  followed by i as four little-endian bytes, for a total length of
  WORK_BYTES + 4 = 128 bytes.
- **Writing** (IDLE, WRITE_0, WRITE_1). It stores the two halves of the
  digest, read as a little-endian number, as items 2i (bits [n−1:0]) and 2i+1
  (bits [2n−1:n]).

The next hash starts only after both halves are written.

`blake2b_core` is an unkeyed single-block BLAKE2b (RFC 7693). It computes four
G functions per cycle, so one block takes 26 cycles from `init` to
`digest_valid`.

This is Equihash in structure but not Zcash's exact list. There is no
personalisation string, and the index is placed differently. Use the same
message layout in any checker.

## Host link

`comm_uart` runs at 115 200 baud, 8N1, with 1736 clocks per bit at 200 MHz.

- **Job.** The host sends the job as hex digits ended by a line feed
  (`0x0A`). Digits of either case are accepted, and other characters are
  ignored. The last WORK_BYTES = 124 bytes received form the job, first byte
  in the top bits. `work_valid` then stays high until the engine takes the
  job.
- **Solutions.** Each solution index is returned as 8 upper-case hex digits
  and a line feed, which gives 512 lines per solution. A 512-entry FIFO
  absorbs bursts. One solution takes about 0.4 s on the line, so the host
  link is slow next to the engine when many solutions are found.

## Top level and interfaces

`equihash_top` holds `comm_uart` and the engine `equihash`. The engine in turn
holds `equihash_state`, `blake2b`, `radix`, `snoop`, `collision` and
`mem_gasket`.

The DDR3 memory controller is not part of this RTL. Its user interface is
brought out as ports with the usual names:

- `app_addr`, `app_cmd`, `app_en`, `app_rdy`;
- `app_wdf_data`, `app_wdf_wren`, `app_wdf_end`, `app_wdf_rdy`;
- `app_rd_data`, `app_rd_data_valid`;
- `init_calib_complete`.

`mem_gasket` shares this one port between the step in progress:

- hash generation writes;
- radix reads and writes;
- collision reads and writes.

It selects by main state. A write is issued only when `app_wdf_rdy` is high,
and command and data go in the same cycle. Writes win over reads. Read data
returns in order and goes to the unit of the current state.

`equihash_state` steps through IDLE → BLAKE2B → (RADIX → COLLISION) × k → DONE.

- It leaves IDLE when the memory is calibrated and a job is waiting.
- Each step is started by a one-cycle pulse.
- Each step ends on its `*_done` pulse.

Status outputs:

| output | meaning |
|---|---|
| `state`, `stage` | main state, finished stages |
| `done` | one-cycle pulse at the end of a job |
| `dropped`, `overflow` | losses in the current collision step |
| `solutions` | solutions found since reset |

All logic runs on one clock with synchronous, active-high reset.

### Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| N, K | 210, 9 | Equihash parameters |
| RADIX_BITS | 7 | sort digit (passes = ⌈(N/(K+1))/RADIX_BITS⌉) |
| MAX_COLL | 7 | items held per run of equal keys |
| BUF_WORDS | 2^22 | size of MEM_BUF0 and MEM_BUF1 in words |
| WORK_BYTES | 124 | job length |
| CLK_FREQ, BAUD | 200 MHz, 115 200 | UART timing |

Memory needed at the defaults:

- 2 × 128 MiB for the item buffers;
- up to 2^22 tree nodes per stage over 8 stages, which is 1 GiB;
- 1.25 GiB in all, which fits a 2 GB module.

Synthesis of the whole design gives about 7600 flip-flops and 160 kbit of
memory arrays (FIFOs). A 7-bit radix needs 2 × 128 × 32 bits of bucket
offsets in snoop.

## Departures from the reference design

- **One clock.** The reference runs the hash core at 50 MHz with asynchronous
  FIFOs. Here everything is on the 200 MHz clock; check timing of the
  BLAKE2b core before relying on that.
- **Ready/valid handshakes.** Ready and valid replace the memory-controller
  "command full" flag. Radix reads go through a small FIFO instead of one
  holding register, so several reads can be in flight.
- **Sort key.** The key is the *low* L bits of the remaining hash. The source
  mentions both the first and the last bits; the low bits keep the shift
  logic simple.
- **Solution output.** Solutions leave during the last collision step, not in
  the DONE state.
- **No solution filtering.** Repeated indices and duplicate solutions are not
  filtered, and there is no difficulty check.
- **Overflow rule.** The `overflow` rule and the status ports are additions.
- **No burst grouping.** Accesses are single 256-bit words. Pairing them
  into 512-bit groups for full DDR3 bursts was tried in the reference work
  without a measurable gain, and is not built.
- **External parts.** The memory controller, the DDR3 module, the clock
  primitives and the host software are outside the RTL.

## Files

- `rtl/eq_pkg.sv` holds shared constants, the state enum and the item helpers.
  Every other file in `rtl/` is one module.
- `rtl/sync_fifo.sv` is the generic FIFO unit used by `wide_fifo`, `radix` and
  `comm_uart`.
- `tb/<module>_tb.sv` is a self-checking testbench for each module. It ends
  with a `TB_RESULT checks=… failures=…` line and has a watchdog.
- `tb/ddr3_ui_model.sv` is a behavioural model of the memory-controller user
  interface. It has random stalls and a fixed read latency.
- `tb/radix_sort_run.sv` is one sort run at a given radix width, with its own
  memory model and checker. `radix_configs_tb` uses it.
- `tb/collision_store_run.sv` does the same for `collision_store` at a given
  collision limit. `collision_configs_tb` uses it.
- `tb/tb_blake2b_pkg.sv` is an independent BLAKE2b written as testbench
  functions, used as the reference.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/eq_pkg.sv tb/tb_blake2b_pkg.sv tb/equihash_top_tb.sv \
    --top-module equihash_top_tb
obj_dir/Vequihash_top_tb
```

Replace `equihash_top_tb` with any other testbench name. Each one prints
`TB_RESULT checks=N failures=M`.

- **`equihash_top_tb`** is the end-to-end test: host over UART, engine and
  memory model. It runs at N=40, K=4 (L=8, 512 items), with a 3-bit radix
  (3 passes), 512-word buffers, an 8-byte job and 16 clocks per UART bit.
  - It checks every returned solution from scratch. It recomputes the BLAKE2b
    items of the 2^K = 16 indices, checks that they XOR to zero, and checks
    the aligned-group pattern at every level.
  - It keeps sending jobs until it has seen each mechanism at least once:
    memory stalls, every sort pass, tree reads, dropped items, the buffer
    capacity being reached, and indices queued for the UART.
  - It takes under a minute, most of it compilation.
- **`equihash_tb`** does the same for the engine alone.
- **The block testbenches** cover each unit against models written in the
  testbench:
  - `radix_tb` checks a stable sort.
  - `radix_configs_tb` runs the sort at every radix width from 4 to 11 bits
    on 21-bit keys (6 down to 2 passes) and checks the result and the pass
    count of each.
  - `collision_store_tb` and `collision_tb` check every write, the tree walk
    order, dropping and overflow.
  - `collision_configs_tb` repeats the `collision_store` checks with 4, 6
    and 7 items held per run.
  - `blake2b_core_tb` checks against the reference BLAKE2b, including the
    cycle count.

**Largest size simulated:** there is no full-size simulation. The largest
simulated configuration is N=40, K=4. At the defaults one job is about
2^21 hashes plus 9 × 3 passes over 4 M items. That is a few hundred million
cycles, and a memory model of over 10 M words, before the half second of UART
time per solution. This is far beyond a practical simulation time: a
Verilator run of a full job at the defaults had not finished after ten
minutes. The sort and the pairing are also simulated at the other radix
widths and run limits that the reference work compared, on small item
counts.

## How far to trust it

- **Tested.** All testbenches pass at their reduced sizes. Each module's own
  testbench was also checked to fail on a deliberately broken copy of the
  module.
- **Not tested:**
  - the design at full size;
  - against a real Xilinx memory controller;
  - in hardware.
- **Parameters.** Everything scales with N, K, RADIX_BITS and BUF_WORDS, but
  only the reduced values above have been simulated.
