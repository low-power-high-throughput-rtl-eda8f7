# SRAM multi-bit trie for IPv4 longest-prefix match

A backbone router has to find, for every packet, the longest stored prefix that
matches the packet's 32-bit destination address, and then forward the packet
to that prefix's port. This design performs that match in a pipelined,
fixed-stride, multi-bit trie built only from small SRAM banks. The address is
cut into strides of {9, 7, 8, 3, 5} bits. Each stride is one pipeline stage,
and each trie node is one SRAM bank indexed by that stride. Sixteen lookups
run side by side through the same banks. Prefixes can be added and removed
while the chip is running, and the time one update takes is bounded by about
half a bank.

The design follows a published thesis on low-power routing-table lookup with
multi-bit SRAM tries. The strides, the 16 parallel lookups, the bank/node/bus/stage
structure, the serial I/O scheme and the update procedures come from it. The
entry encoding, the bank counts, the handshakes and the inner workings of
the update sequencer are this design's own. They are listed under
[Departures and choices](#departures-and-choices).

## How one lookup walks the trie

Each SRAM entry is one of two kinds:

* **pointer**: the search continues in bank `ptr` of the next stride;
* **answer**: a port number plus the length of the prefix that put it there.
  The length is *relative* to the stride: 1 means the prefix ends on the
  stride's first bit.

Each bank also has a **default register**, holding a port and a length. An
answer entry whose port is the reserved code `PORT_DEFAULT` (all ones, 63),
with relative length 0, means "no prefix ends inside this bank here; use
whatever the bank inherits". When a bank is created below a shorter prefix,
its default register receives that prefix's port. A lookup carries a
*default port so far* down the pipeline:

1. At every bank it reads, the bank's default register replaces the
   inherited default, unless the register itself holds `PORT_DEFAULT`.
2. A pointer sends it to the next stage.
3. An answer ends the search. If the answer's port is `PORT_DEFAULT`, the
   inherited default is the result.

The register of the single first-stride bank plays the role of the default
route (prefix length 0). If nothing matches, the result is `PORT_DEFAULT`,
meaning "no route".

Example with 8-bit addresses, strides {4,2,2}, and prefixes 0/1→0, 011/3→1,
0110111/7→2, 01101110/8→3 and others. Address `01101111`:

* its first four bits `0110` select a pointer to stride-2 bank 1, whose
  default register holds port 1 (from 011/3);
* the next bits `11` select a pointer to stride-3 bank 1;
* the last bits `11` select the answer "port 2, length 1".

The result is port 2. `tb_lookup_table` builds exactly this trie and checks
every address.

A prefix that does not end on a stride boundary is *expanded*: it is written
into every entry it covers that no longer prefix already owns. This is why
the relative length is stored: an update can tell, entry by entry, whether
the entry belongs to a shorter prefix (it may be overwritten), to the same
prefix, or to a longer one (it must be kept).

## Sixteen lookups at once

The hardware is a stack of four pieces.

| piece | module | what it adds |
|---|---|---|
| lookup bank | `lookup_bank` | SRAM (2^stride entries) + default register, synchronous read |
| lookup node | `lookup_node` | one bank shared by `LANES` agents: enables ORed, address chosen by an enable-gated AND-OR mux, writes through agent 0 |
| lookup bus | `lookup_bus` | `BANKS` nodes shared by `LANES` agents: each agent's enable is routed to the node of its bank number; the bank number is registered and picks the node output that returns to the agent one cycle later |
| lookup stage | `lookup_stage` | a bus plus the agent logic of the section above, for one stride |

The **first stride** is special. Every lookup reads it, so `first_lookup_stage`
keeps one copy of its bank per lane, and an update writes all copies at once.

**Later strides** do not need copies. Two lookups can meet in a later-stride
bank only if they followed the same pointer. Every pointer names its own bank
(banks are never shared between parents), so two lookups can only meet there
if they read the *same first-stride entry*. `lookup_arbiter` prevents exactly
that: it never puts two lookups with equal first-stride bits into one group.
An assertion in `lookup_node` checks that no two agents ever enable the same
node in one cycle.

A lookup keeps its lane from the first stage to the last. `lookup_table`
chains the stages and ends with `result_logic`, which picks the port or the
inherited default. A group therefore leaves `N_STAGES + 1` table cycles after
it enters.

## The chip: serial in, serial out

`route_lookup_chip` is the top. Sixteen 32-bit addresses in and sixteen
results out per table cycle would need far too many pins. The chip therefore
takes **one command per input clock** (lookup, add or remove) and returns
**one result per input clock**:

* The **arbiter** (`lookup_arbiter`) packs arriving lookups into a group of up
  to `LANES`, in order.
* A lookup whose first-stride bits equal those of one already in the group is
  refused: `in_wait` goes high, and the sender holds the command until the
  group leaves.
* A phase counter makes `tick` high once every `LANES` input cycles. The tick
  is the table's clock enable `ce`, so the table runs at 1/16 of the input
  rate and performs up to 16 lookups per table cycle.
* `result_serializer` captures the table's parallel results and sends them
  out one per cycle, lowest lane first, which is arrival order.
* Total latency from acceptance to result is at most `LANES*(N_STAGES+2)`
  input cycles: 112 for the defaults.

With one command per input cycle a group can never fill up before its tick,
so `full_stall` occurs only while the first-stride bank is being cleared
after reset. The throughput
lost to conflicts is what the original analysis estimates at 14.8 lookups per
16-lane table cycle for uniformly random addresses.

Command interface (`in_op`: `OP_LOOKUP`, `OP_ADD`, `OP_REMOVE`, `OP_NONE`):

| port | width | meaning |
|---|---|---|
| `in_valid`, `in_op` | 1, 2 | command present and its kind |
| `in_addr` | 32 | address, or prefix (bits below the length ignored) |
| `in_len` | 6 | prefix length 0..32 (0 = default route) |
| `in_port` | 6 | port of an added prefix (0..62) |
| `in_wait` | 1 | hold the command: conflict, group full, or update running |
| `out_valid`, `out_addr`, `out_port` | 1, 32, 6 | one result per cycle |
| `upd_done`, `upd_error` | 1, 1 | update finished / aborted |
| `conflict_stall`, `full_stall`, `banks_used[]` | | observation outputs |

The handshake rule: while `in_wait` is high, `in_valid` and the command must
stay unchanged. An assertion in the arbiter checks this.

## Updates

Updates are carried out by `update_controller`. It drives agent 0 of every
stage through the `upd_req`/`upd_rsp` ports. Before an update starts:

* the arbiter stops accepting commands;
* the controller waits until the pipeline is empty;
* it then raises `upd_mode`, which clocks the table every input cycle while
  it works.

After reset the controller clears the first-stride bank, which takes 2^9
cycles. Lookups sent meanwhile collect in the arbiter's first group, and the
input waits once that group is full. Commands sent meanwhile wait.

**Addition of prefix P/len** (the stage k where the prefix ends has relative
length `rel`):

1. *Navigate.* For each stride P passes completely, read P's entry.
   * A pointer is followed.
   * An answer is replaced by a pointer to a newly allocated bank of the next
     stride. `bank_allocator` offers the lowest free bank. The new bank is
     first cleared to "default" entries, and its default register receives
     the replaced answer's port.
2. *Modify.* In the target bank, every entry in P's range is rewritten to
   (port, `rel`) if it currently holds an answer of relative length ≤ `rel`.
   * For an entry that is a pointer, the default register of the bank below
     is rewritten instead, under the same rule.
   * A prefix that ends exactly on a stride boundary is stored in that stride
     with relative length equal to the stride width, in one entry. The default
     route (length 0) is the first-stride bank's default register.

**Removal of P/len:**

1. *Navigate.* The same as for an addition, but nothing is allocated. An
   answer where a pointer is needed means the prefix is not stored, which is
   an error.
2. *Find the replacement.* Scan the half of the target bank that shares P's
   first bit inside the stride. Pick the longest shorter prefix that covers P,
   looking at both the entries and the default registers of banks below
   pointers. If there is none, use the bank's own default.
3. *Modify.* Rewrite the entries (or default registers below pointers) that
   hold P's port with length exactly `rel`, replacing them with the
   replacement.
4. *Release banks.* Walking back up, a bank whose entries are all "default"
   is returned to its allocator. Its default then goes back into the parent
   entry as an answer.

Every step touches at most one bank per stride, or half of one bank.
`tb_update_controller` checks each update's cycle count against such a bound.

The limits of this scheme:

* **A prefix that is completely covered by longer prefixes is not kept.**
  Nothing in the trie records it, so it disappears silently; if one of the
  longer prefixes is later removed, it does not come back.
* The random phases of the testbenches only remove prefixes that no shorter
  stored prefix encloses. After the covered-prefix loss described above, a
  plain longest-prefix-match reference would disagree with any trie of this
  kind. Removals with an enclosing shorter prefix are covered by the worked
  example, where 011/3 is replaced by 0/1.
* `upd_error` is raised, and the update abandoned, when a bank is needed but
  none is free, or when the prefix to remove is not stored. A failed addition
  may leave newly created banks holding only default entries. They give the
  right answers but stay allocated until a later removal in the same place
  releases them.

## Parameters and sizes

| parameter | default | origin |
|---|---|---|
| `IP_W` | 32 | IPv4 |
| `LANES` | 16 | the main configuration (first stride replicated 16 times) |
| `N_STAGES`, `STRIDES` | 5, {9,7,8,3,5} | the main configuration |
| `BANKS` | {1, 512, 1024, 512, 256} | **this design's choice** |
| `PORT_W` | 6 (63 ports + reserved default code) | original interface description |
| `LEN_W`, `PTR_W` | 4, 16 | this design's choice |

The original does not state how many banks each stride gets; a full backbone
table of about 220,000 prefixes needs many thousands in the middle strides.
The defaults here are much smaller, so **the default build does not hold a
full backbone table**. Raise `BANKS` to size it; nothing else depends on the
counts. The memory at the defaults is 16×512 first-stride entries plus
65,536 + 262,144 + 4,096 + 8,192 entries in the later strides, 27 bits each.

The lookup buses are wide multiplexers: 16 agents × up to 1,024 nodes × 27
bits in the stride-8 bus. Yosys coarse synthesis time grows faster than
linearly with the bus size. For one 16-agent bus it takes about 8 s at 64
banks and 160 s at 256 banks. The whole chip with `BANKS = {1,64,64,32,16}`
synthesizes in about 4 minutes, to 16,500 coarse cells. The full-size chip
(2,304 nodes) takes far longer. The
RTL is the same at every size; only the parameters change.

## Files

`rtl/` holds one unit per file:

* `trie_pkg` — widths, the entry/default/lane-state/update-request structs
  and the operation codes;
* the twelve modules above: `lookup_bank`, `lookup_node`, `lookup_bus`,
  `lookup_stage`, `first_lookup_stage`, `result_logic`, `lookup_table`,
  `update_controller`, `bank_allocator`, `lookup_arbiter`,
  `result_serializer` and `route_lookup_chip`.

Each file opens with a description of its interface and timing.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_route_lookup_chip_full.sv`.

* Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
* The block testbenches use small configurations, mostly the 8-bit {4,2,2}
  trie with 3 lanes.
* `tb_route_lookup_chip` runs the whole chip in that small configuration. It
  counts every mechanism and fails if one never happened:
  * first-stride conflict waits;
  * update waits;
  * bank allocation and release;
  * an update error;
  * the default route.

  It also checks latency and result order against a reference
  longest-prefix match.
* `tb_route_lookup_chip_full` instantiates the chip with all defaults and
  does the same with real 32-bit prefixes, from /1 to /32. This includes
  allocation in all four later strides. It builds in about 1.5 minutes and
  runs in seconds.

`tb_lookup_throughput` measures the arbiter's average group size under full
uniformly random load. It compares the result with the expected value of the
grouping rule, given in the file:

| lanes L | first stride F | measured | expected |
|---|---|---|---|
| 16 | 9 | 14.75 | 14.76 |
| 8 | 16 | 7.9989 | 7.9987 |

To simulate one of them with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
          rtl/trie_pkg.sv tb/tb_route_lookup_chip.sv --top-module tb_route_lookup_chip
./obj_dir/Vtb_route_lookup_chip
```

The testbenches use only `$urandom` and two-state logic.

## Departures and choices

* **Entry layout.** The original packs a flag plus either a pointer or
  (port, length) into one word, with a per-stride minimal length width. Here
  the three fields sit side by side (27 bits), and the length is 4 bits
  everywhere.
* **Port width.** 6-bit ports are used, as in the output description. The
  original's update-pin count allows an 8-bit port input.
* **Table clock.** A clock enable replaces a divided clock. During updates
  the table is enabled every input cycle.
* **Update agents.** The per-stage update agents are one central sequencer
  that drives each stage's agent-0 port. The steps and their bounds are the
  original's. The state machine, bank clearing on allocation and the error
  conditions are this design's.
* **Bank bookkeeping.** This is not described in the original. Here it is a
  used-bit per bank and a lowest-free priority encoder.
* **Result serializer and handshakes.** The original gives only their
  function.
* **Reset.** Registers reset synchronously, and SRAMs are not reset. The
  first-stride bank is cleared by the update controller after reset; other
  banks are cleared when allocated.
* **Not built.** Any power or area model, the TCAM comparison and the FPGA
  test harness (a host processor buffering commands).
