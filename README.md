# Partial match address compression for a narrow on-chip address bus

Most of the wiring cost of an on-chip address bus sits in the upper address
bits, and those bits hardly change from one access to the next. This design
sends 38-bit L1-to-L2 physical addresses over a much narrower bus, 12 wires
by default. Both ends of the bus hold the same small table of recently sent
upper-address parts ("tags"). When an address's tag is already in the
table, the sender transmits only a short reference to the entry plus the low
address bits, in one bus cycle. When the tag is not in the table, it
transmits more and takes extra cycles.

A plain bus-expander cache only knows "hit" and "miss". A tag that differs
from a stored one in a single low bit still counts as a miss, and then the
whole 38-bit address goes over the narrow bus. **Partial match compression
(PMC)** also accepts tags whose *upper* part matches a stored tag. It then
sends only the tag bits that differ, and the receiver takes the rest from its
own copy of that entry. Only a few partial-match lengths ("partitions") are
supported. The partitions were picked so that the average number of extra
bus cycles is as small as possible; that is the "performance-optimized" part.

The link is three blocks in a row, with identical cache state at both ends:

```
 L1 side                                                        L2 side
 in_valid/ready/addr[37:0] ─► pmc_compressor ─► pmc_bus_pipe ─► pmc_decompressor ─► out_valid/addr[37:0]
                              (cache + match)    (LAT stages)    (register file)
```

## Address fields

An address is split, from MSB to LSB, into three fields:

| field | meaning                                    | default width |
|-------|--------------------------------------------|---------------|
| T     | tag, compared against the cache            | 28            |
| I     | index, selects one set of the cache        | 3             |
| U     | low bits, always sent as they are          | 7             |

The cache is 2-way set-associative with 2^I = 8 sets. Each entry holds a
28-bit tag, a valid bit and an LRU bit, so the cache is 8 x 2 x 30 = 480 bits.
The bus is exactly as wide as a hit word:
`BUS_W = 1 (C_H) + I + W + U`, where W is the way number (1 bit for 2 ways).
`pmc_compressor` checks this rule when it elaborates.

## Lookup classes and partitions

A partition is named by its LSB: the number of low tag bits it leaves
unmatched. Partition j with LSB L matches when tag bits `[T-1:L]` are equal.
The supported partitions are a parameter list `PART_LSB`, from the widest
match to the narrowest. Every lookup ends in one class:

| class          | condition                                      | sent after C_H              |
|----------------|------------------------------------------------|-----------------------------|
| 0 complete hit | whole tag equal in some valid way              | `C_H=1, I, W, U`            |
| j partial hit  | first partition j equal in some valid way      | `C_H=0, C=j-1, I, W, T[L-1:0], U` |
| NPART+1 miss   | nothing matches                                | `C_H=0, C=all ones, address[37:0]` |

C is the partition code. It is `clog2(NPART+1)` bits wide, and absent when
`NPART = 0` (plain hit/miss compression). `pmc_partial_match` makes every
comparison in parallel. The first partition that matches in any valid way
wins, so the class is always the longest supported match. Among ways that
reach it, the lowest-numbered way is chosen.

A packet is packed MSB first and cut into `BUS_W`-bit beats. The last beat
is padded with zeros. With the defaults (one partition, LSB 11):

| class            | bits                          | bus cycles |
|------------------|-------------------------------|------------|
| complete hit     | 12                            | 1          |
| partial, LSB 11  | 1+1+3+1+11+7 = 24             | 2          |
| complete miss    | 1+1+38 = 40                   | 4          |

### Choosing the partitions

The partitions are design-time constants. For one bus width, the cost of a
partition set is `CTCP = sum over classes j of (cycles_j - 1) x MF_j`. Here
`MF_j` is how often class j occurs. It is measured once with the maximal
partitioning: every LSB from 1 to T-1 is a partition, and each has an
individual frequency IMF_l. The frequency of a coarser partition j is then
the sum of `IMF_l` for `LSB_{j-1} < l <= LSB_j`. The set with the lowest
average CTCP over a group of programs is used. The search is an offline
calculation; the hardware only receives its result through `PART_LSB`.

## Keeping both ends in step

The receiver never gets the full tag of a hit. So its register file must
hold exactly the sender's tags in the same ways, and both ends must apply
the same update for every address:

* complete hit: the hit way becomes most recently used;
* partial hit or miss: the least recently used way of set I takes the new
  tag, becomes valid and becomes most recently used.

The two ends share `pmc_tag_array`: synchronous active-low reset, all
entries invalid, and way 0 least recently used. The receiver rebuilds a
partial hit as `{stored_tag[T-1:L], received T[L-1:0]}` from the entry the
packet names. It reads that entry *before* writing the new tag, because the
LRU way can be the way it is reading from. Nothing else crosses the bus.
Losing or inserting a beat desynchronises the two ends until reset; the bus
is assumed reliable.

The sender updates its cache in the cycle it accepts an address. The next
address, one cycle later, is looked up against the updated contents. The
receiver applies the same update in the cycle the last beat arrives.

## Timing

* `in_valid_i`/`in_ready_o` is a valid/ready handshake. An offered address
  must be held until it is taken; an assertion checks this.
* An address accepted in cycle A has its first beat on the bus in A+1.
  It reaches the decompressor in A+1+LAT, and appears on `out_addr_o` with
  a one-cycle `out_valid_o` pulse in **A + n + LAT + 1**, where n is its
  number of bus cycles.
* `in_ready_o` is high while at most one beat is left, so hits stream at one
  address per cycle. An n-beat packet holds the next address off for n-1
  cycles. This stall is the transmission cycle penalty the partitions try
  to keep small.
* The bus has no back-pressure. `bus_valid` is one extra wire beside the
  `BUS_W` data wires.
* `tx_cls_o` gives the class of the address accepted this cycle, and
  `rx_cls_o` the class of the address being delivered.

## Configurations

All parameters default to the 12-wire configuration. Other bus widths are
set on `pmc_link`:

| BUS_W | IDX_W | TAG_W | NPART | PART_LSB     | cycles: hit, partitions, miss |
|-------|-------|-------|-------|--------------|-------------------------------|
| 8     | 1     | 32    | 3     | 6, 14, 22    | 1, 2, 3, 4, 6                 |
| 10    | 2     | 30    | 2     | 9, 18        | 1, 3, 3, 5                    |
| 12    | 3     | 28    | 1     | 11           | 1, 2, 4 (default)             |
| 14    | 2     | 26    | 1     | 13           | 1, 2, 3                       |
| 16    | 2     | 24    | 1     | 15           | 1, 2, 3                       |
| 18    | 1 *   | 22    | 1     | 17           | 1, 2, 3                       |
| 19    | 1 *   | 21    | 1     | 18           | 1, 2, 3                       |
| 20    | 1     | 20    | 0     | –            | 1, 2                          |
| 24    | 1     | 16    | 0     | –            | 1, 2                          |
| 32    | 1     | 8     | 0     | –            | 1, 2                          |

`*` The index width for 18 and 19 wires is this design's choice; the source
configuration lists only the tag width for these two.

Other parameters:

* `WAYS`: 2 in all listed configurations. Any power of two works; LRU is
  kept as a per-entry age.
* `LAT`: bus latency in cycles, default 1.
* `PART_LSB`: an 8-entry `pmc_pkg::lsb_list_t`; entries past `NPART` are
  ignored. LSBs must increase and lie between 1 and TAG_W-1.

## Where this departs from the source configuration or fills a gap

* **10-wire bus, first partition.** The source table gives it 2 bus cycles.
  This packet format needs 3: C_H, a 2-bit code, I(2), W(1), 9 tag bits and
  U(6) make 21 bits. The source could be counting without the way field, or
  reading partition LSBs as 1-based ordinals. Either reading would give 2
  cycles. The way field is kept because without it the receiver cannot tell
  which entry supplies the upper tag bits. The 0-based reading is kept
  because the source's own example says LSB 5 leaves 5 tag bits to send.
  Every other entry of the table matches this format.
* **Field order inside a partial-hit packet** (C after C_H, then I, W,
  unmatched tag bits, U) and the zero padding of the last beat are choices
  of this design. So are the valid strobe, the handshake, registered
  outputs, reset state, and the lowest-way tie-break.
* **Bus latency.** LAT is a plain flip-flop pipeline. The motivation for
  this link is to spend the saved wiring area on wider wire spacing, which
  cuts crosstalk delay and so the bus latency. That is a layout property
  and is represented only by choosing LAT.
* **Not included:** the L1 and L2 caches at the two ends (the top's ports
  are their address request signals), and the offline partition search.
  The maximal-partition profiling configuration (T-1 partitions) needs
  more than the 8 partitions `pmc_pkg::MAX_PART` allows.
* Upper bits of the class outputs are constant when NPART is small.

## Files

| file                         | contents                                             |
|------------------------------|------------------------------------------------------|
| `rtl/pmc_pkg.sv`             | address width, class type, packet-length and packing functions |
| `rtl/pmc_partial_match.sv`   | combinational longest-match search over one set      |
| `rtl/pmc_tag_array.sv`       | tags, valid bits and LRU ages; sender cache and receiver register file |
| `rtl/pmc_compressor.sv`      | lookup, packet build, cache update, serializer       |
| `rtl/pmc_bus_pipe.sv`        | LAT-stage bus                                        |
| `rtl/pmc_decompressor.sv`    | beat collection, address rebuild, mirrored update    |
| `rtl/pmc_link.sv`            | top: the three blocks in a row                       |
| `tb/pmc_ref_pkg.sv`          | independent reference model and address generator   |
| `tb/tb_*.sv`                 | testbenches, one per block, plus `tb_pmc_configs`    |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Packages
must come first on the command line; `-y` finds the rest:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/pmc_pkg.sv tb/pmc_ref_pkg.sv tb/tb_pmc_link.sv --top-module tb_pmc_link
./obj_dir/Vtb_pmc_link
```

Use `-Wno-fatal` because the 20- to 32-wire configurations (no partitions)
make a guard comparison constant, and verilator warns about that.

| testbench              | what it shows                                                  |
|------------------------|----------------------------------------------------------------|
| `tb_pmc_link`          | top at default parameters, 4000 addresses: each address comes out unchanged, in order, with the right class and latency. Stalls last n-1 cycles. Hits, partial hits, misses, stalls and back-to-back hits all occur. |
| `tb_pmc_configs`       | the link in all ten configurations above. Cycle counts per class match the table. Every class occurs in each configuration. |
| `tb_pmc_compressor`    | 8-wire configuration: every bus beat bit-exact against the reference packets |
| `tb_pmc_decompressor`  | 10-wire configuration: reference packets in, with gaps between and inside packets; exact addresses out |
| `tb_pmc_partial_match` | 4 ways, 3 partitions, with match lengths fixed by construction |
| `tb_pmc_tag_array`     | 4 ways, random touch and replace against a use-order model    |
| `tb_pmc_bus_pipe`      | latency 3, valid and data                                      |

All of them pass. The address streams are synthetic: repeats, one-bit tag
changes and fresh addresses. No program traces are used, so the class mix
shows what each test exercises, not a real hit rate.
