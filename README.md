# Parallel index-generation-unit IPv6 prefix lookup

A core router must find, for every packet, the longest stored prefix that matches the
destination address. At 400 Gb/s with minimum-size frames that is about 1.09 billion lookups
per second, and IPv6 tables hold hundreds of thousands of prefixes of up to 64 bits. A single
memory addressed by the prefix would need 2^64 words, and a TCAM burns too much power.

This engine splits the problem instead. Prefixes are grouped by length. Within one group all
prefixes have the same length L (shorter ones are expanded to L bits), so that group is an
*index generation function*: a map from L-bit vectors to 1..k for the k registered
prefixes, and to 0 for everything else. Each group gets one **index generation unit (IGU)**.
An IGU realises such a function in memory that grows with k·L rather than 2^L. All 28 IGUs look
at the same address at once. A pipelined chain of maximum selectors then keeps the answer of the
longest group that matched.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It is sized for a table of about
340 K IPv6 prefixes (394 K entries after expansion), split into 28 groups. It accepts two
lookups per clock.

## The index generation unit

Take the L-bit group prefix X. If X were split into a few "bound" bits that address a memory
and leave the rest unused, most of the 2^L vectors would share words. As long as no two
*registered* vectors share a word, that memory can still give the only candidate index. The
IGU then confirms the candidate by storing the whole registered prefix next to the index and
comparing it with X. The IGU has five registered stages (`rtl/igu.sv`):

1. **Linear transformation** (`rtl/igu_lin_transform.sv`). Each transformed variable
   is `y_i = x_a XOR x_b`, or just `x_a`. XOR-ing two bits often separates registered vectors
   that would otherwise collide. The first `H_IN` variables form the *row* and the
   next `COL_W` variables form the *column*.
2. **H memory** (row-shift table). It is addressed by the row and returns a shift `h(row)`.
3. **Adder.** The G/AUX address is `h(row) + column`, modulo 2^G_IN. This is the *row-shift
   decomposition*. Think of a chart with one row per row value and one column per column
   value. Each registered vector is a non-zero cell of that chart. Each row is slid right by
   its own shift until no two non-zero cells share a column. The shifted chart then fits a
   memory only slightly wider than k. Without the shift, the memory would need
   2^(row bits + column bits) words.
4. **G/AUX memory.** One word `{index, registered prefix}` per address, with index 0 meaning
   empty. In groups that are on-chip it is a RAM. In the two largest groups it is an
   external SRAM, reached through `ext_rd_*`.
5. **Comparator and AND gates** (`rtl/igu_match.sv`). If the stored prefix equals X, the
   index is output. Otherwise the output is 0. A vector that was never registered can land on
   an occupied word, so this check is what makes the answer exact.

The contents of the three tables come from an offline builder, not from the hardware:
- the transformation: which bits, and which XOR pairs;
- the row shifts: first fit, taking rows in decreasing order of occupancy, each with the
  smallest shift that collides with nothing placed so far;
- the G/AUX words.

`tb/igu_table_pkg.sv` has a compact version of that builder for the testbenches. Any prefix
set whose transformed vectors are unique within the group can be loaded. If the builder
finds no collision-free shift, the group has to be rebuilt with a different transformation.

A worked example is checked exhaustively in `tb/tb_igu_example.sv`. It is a six-variable
function with six registered vectors. Two of them collide in column 0 until the row `x6 = 1`
is shifted by 3. The IGU then needs 78 bits of memory, against 192 bits for a single
memory.

## Groups and their sizes

`rtl/ipv6_lookup_pkg.sv` holds `GROUP_CFG`, one entry per group:
- the prefix lengths it merges (for example 15–18 → length 18, or 45–47 → 47);
- its number of prefixes, which sets the index width `ceil(log2(n+1))`;
- H address bits and H word (shift) bits;
- G/AUX address bits;
- whether the G/AUX memory is off-chip.

The grouping is non-uniform. Lengths with few prefixes are merged into one group and kept in
small on-chip memories. The two large groups, 45–47 (123,110 prefixes) and 48
(128,305 prefixes), each get an off-chip SRAM with 2^17 words of 64 and 65 bits.

| quantity | value |
|---|---|
| groups | 28 |
| on-chip H + G/AUX bits (one copy, read by both lanes) | about 13.6 Mb |
| off-chip G/AUX bits per lane | 2^17·64 + 2^17·65 ≈ 16.9 Mb |
| G/AUX word | index bits + group length |
| column variables | `G_IN − 1` per group |

Three published group sizes give fewer G/AUX words than the group has prefixes. A G/AUX memory
holds at most one prefix per word, so those groups get one more address bit here:
- length 34: 13 bits instead of 12;
- length 40: 15 bits instead of 14;
- lengths 57–58: 10 bits instead of 9.

Prefix expansion is a table-building step. A /16 prefix in the 15–18 group becomes four 18-bit
entries. Where an expansion equals a longer prefix of the same group, the builder must keep the longer prefix.

## Priority: the cascade of maximum selectors

IGU g reports a key: `{g+1, local index}` on a hit, 0 on a miss. Groups are numbered in order
of increasing length, so the longest match has the largest key. A comparator tree over 28 keys
would be the critical path. `rtl/max_selector_cascade.sv` chains 28 two-input maximum
selectors instead, one register after each. Key j is delayed by j cycles on its way in, so
that it meets the running maximum of the same lookup. This adds 28 cycles of latency but
keeps one comparison per clock period.

The result of a lane is `lookup_result_t`:
- `grp = 0` means no prefix matched;
- otherwise `grp - 1` is the group, and `idx` is the local index within it.

Translating the (group, index) pair to a next hop is outside this design.

## Two lanes, timing and the off-chip memories

Every on-chip memory (`rtl/dp_ram.sv`) has two read ports, one for each lookup lane. The
lanes share all tables and run fully independently. The engine therefore takes two addresses
per clock: 1.1 G lookups/s at 550 MHz, which covers the 1.087 G lookups/s that 400 Gb/s needs.

The off-chip SRAMs are interfaced as follows. For each off-chip group and each lane, the top
drives `ext_rd_en`/`ext_rd_addr` and expects the word on `ext_rd_data` exactly `SRAM_LAT`
(= 3) clocks later. That makes four SRAM read ports in all: two groups × two lanes, one chip
each. The single write port per group (`ext_we/ext_waddr/ext_wdata`) is registered and meant
to load both lanes' copies. On-chip G/AUX reads are padded to the same latency, so all IGUs
stay in step. An assertion in the top checks this.

Latency, address to result: `SRAM_LAT + 4 + 28` = **35 clocks**, with one result per lane per
clock and no stalls.

## Loading tables

`cfg` (`cfg_wr_t`) writes one word per clock. It selects:
- `group`: 0..27;
- `target`, one of:
  - `CFG_H`: the shift at H address `addr`;
  - `CFG_G`: the word `{index, prefix}` at G/AUX address `addr`, forwarded to `ext_w*` for
    the off-chip groups;
  - `CFG_LT`: transformation entry `addr`, data `{xor_en, sel_b[5:0], sel_a[5:0]}`. Bit
    numbering is over the group prefix, with bit L−1 as the first prefix bit.

Memories are not reset. Every word a lookup can read must be written before use, including
the zero words. Writes are meant for times when no lookup is in flight. A write and a read of
the same word in one clock return the old word. The transformation registers reset to "bit 0,
no XOR".

## Where this RTL departs from, or adds to, the published architecture

- **The transformation is held in registers.** In the original, the transformation is fixed
  in FPGA LUTs and rebuilt with the table. Here the selections sit in registers with
  multiplexers, so a new table can be loaded without resynthesis. This costs two 64:1 bit
  selectors per variable.
- **Three G/AUX memories are one address bit wider**, as explained above.
- **Column width is this design's choice.** The number of column variables per group is not
  published; it is set to `G_IN − 1`, and the table builder must respect it.
- **Several interfaces are this design's own choice:**
  - the configuration port;
  - the result encoding `{group+1, index}`;
  - the fixed 3-cycle off-chip latency;
  - the write-while-idle rule for table loads.
- **Memory mapping is left to synthesis.** The original maps small memories to distributed
  RAM and large ones to block RAM. Here one array description serves both.
- **No tree priority encoder is included.** The tree is the earlier architecture's, not this
  one's.
- **The off-chip SRAM itself is not part of the RTL.** `tb/ddr2p_sram_model.sv` is a
  behavioural fixed-latency model of it.
- **The offline algorithms are not hardware and are not here.** These are:
  - the greedy transformation search;
  - the row-shift partition search;
  - the grouping that decides which lengths share an IGU and which go off-chip.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_dp_ram` | both read ports against a reference array, read-before-write |
| `tb_igu_lin_transform` | random selections and XORs on both lanes against a bit-level model |
| `tb_igu_match` | equal, one-bit-different and random stored prefixes, empty slots |
| `tb_max_selector_cascade` | maximum of random key sets, exact N-cycle latency |
| `tb_igu` | on-chip and off-chip IGU with a first-fit table of 95 entries: hits, rejections by the comparator, misses, latency `G_LAT + 4` |
| `tb_igu_example` | the six-variable worked example over all 64 inputs |
| `tb_parallel_igu_top` | the whole engine at full size (see below) |

`tb_parallel_igu_top` runs the whole engine at its default (full) size:
- It draws 24 prefixes per group, a third of them extensions of shorter groups' prefixes, and
  writes every table word (about 600 K configuration cycles).
- It then runs 3,000 cycles of lookups on both lanes.
- It then adds six prefixes each to one on-chip group (lengths 27–28) and one off-chip group
  (length 48), rebuilds and rewrites only those two groups, and runs 1,500 more cycles. The
  new prefixes must be found, and the old ones must still be found. This is the update path
  a router needs when a new prefix collides with the current table.
- The reference is the longest group holding the address.
- It requires each of these events to occur: off-chip hits, hits on shifted rows, addresses
  matching several groups, comparator rejections, misses, and both lanes busy at once.

The test takes under a minute with Verilator. It does not load the full 394 K-entry table.
Those memories exist at full size, but are filled mostly with empty words. The published
group sizes run at up to 98 % G/AUX occupancy (128,305 prefixes in 2^17 words). That
occupancy depends on the offline search for variables and partitions, applied to real
routing data. The simple first-fit builder of the testbenches, given random prefixes, does
not reach it.

## Simulating

With Verilator 5 (packages first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_parallel_igu_top \
  rtl/ipv6_lookup_pkg.sv tb/igu_table_pkg.sv rtl/dp_ram.sv rtl/igu_lin_transform.sv \
  rtl/igu_match.sv rtl/igu.sv rtl/max_selector_cascade.sv rtl/parallel_igu_top.sv \
  tb/ddr2p_sram_model.sv tb/tb_parallel_igu_top.sv
./obj_dir/Vtb_parallel_igu_top
```

The other testbenches build the same way with the files they use. Block sizes are parameters
of `igu` (`L, IDX_W, H_IN, H_OUT, G_IN, COL_W, EXT, G_LAT`). The engine's grouping is changed
by editing `GROUP_CFG` and, for off-chip groups, `EXT_GROUP`.
