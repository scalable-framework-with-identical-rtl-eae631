# 3-D NUMA: a stackable L2 scratchpad memory built from identical memory dies

This is synthesizable SystemVerilog for a level-2 scratchpad memory that is built as a
3-D stack: one logic die at the bottom and up to eight memory dies on top of it. All
memory dies are the same design, so one mask set serves every layer. Adding a die adds
capacity without slowing the clock.

The key idea is to make the stack a pipeline. Every die boundary is a register stage, in
both directions, so no combinational path crosses more than one layer of through-silicon
vias (TSVs). The cost is that far dies answer later than near ones: access time is
non-uniform (NUMA). An L2 memory can tolerate that, because it sits behind the processors'
L1 caches and serves cache refills and write-backs, not single pipeline loads.

The RT-level structure follows the paper *Scalable Framework With Identical Memory Dies To
Achieve High-Clock Frequency*: request engines, arbitration trees, Fork and Join modules,
read buffers, return-address decoders and word-level interleaving over eight memory cones.
The paper describes what these blocks do but leaves most formats and sizes open. All
packet formats, the address map, the FIFO depths, the latencies and the TSV repair scheme
here are this implementation's own choices. They are listed under "Own choices" below.

## Default configuration

| parameter | value | origin |
|---|---|---|
| memory dies `NUM_MD` (top) / `MAX_MD` | 8 | paper: up to eight dies, 4 MB |
| memory cones `N_CONE` | 8 | paper: a 64-byte load becomes eight 8-byte loads on eight cones |
| word `DATA_W` | 64 bits | paper: 8-byte chunks |
| words per cone per die `BANK_WORDS` | 8192 (64 KB) | 4 MB / 8 dies / 8 cones / 8 B |
| NoC interfaces `N_NI` | 4 | own choice (paper: parameter N, no value) |
| outstanding packets per interface `MOT` | 8 | own choice (paper: parameter MOT, no value) |
| Join FIFO depth | 32 = `N_NI*MOT` | own choice, see "Why the memory pipeline needs no flow control" |
| TSV repair group | 25 signals + 1 spare | paper: one spare TSV per 25 |

The counts and widths live in `rtl/numa_pkg.sv`. The packet and chunk structs are built
from them, so change the configuration there. `NUM_MD` on `numa3d_top` may be lowered to
build a shorter stack with the same address map.

## The memory cone: how one word travels

Memory is **word-level interleaved**: consecutive 8-byte words go to consecutive cones. A
*cone* is one vertical slice through the whole stack. It has one memory array in every
die, a request path going up and a response path going down. The eight cones work
independently and in parallel.

Word-address layout (byte address = word address × 8, low three bits ignored):

```
 word address bit  18 17 16 | 15 ............ 3 | 2 1 0
                    die     |  row in the die   | cone
```

Each die therefore holds one contiguous 512 KB region, spread over its eight arrays.

A request packet holds 1 to 8 consecutive words. Its words always fall on different cones,
so it is cut into at most eight one-word **chunks**, and all of them can enter the memory
in the same cycle. A chunk carries only what the memory needs: return address (NI index),
read-buffer tag, operation, die, row and write data. The packet's header stays behind in
the read buffer.

Path of one chunk, with the cycle it takes (cycle 0 = the packet is accepted):

1. **Request engine** (`request_engine`), cycle 0: registers the packet, reserves a
   read-buffer entry, prepares one chunk per cone.
2. **Arbitration tree** (`arbitration_tree`), cycle 1: each cone picks one of the four
   request engines and grants it in the same cycle. The chunk is registered towards die 0.
3. **Fork** (`md_fork`) in each die, from cycle 2: a combinational compare of the chunk's
   die field with the die's own index. On a match the chunk goes to the die's array.
   Otherwise it goes to the register towards the next die, one cycle per die.
4. **Memory array** (`sram_bank`): one-cycle synchronous read or write. A load returns
   the word. A store returns an acknowledge chunk with zero data.
5. **Join** (`md_join`) in each die: two FIFOs, one for this die's answers and one for
   answers from above. A round-robin choice takes one chunk per cycle and registers it
   towards the die below. This costs two cycles per die on the way down.
6. **Return-address decoder** (`return_addr_decoder`) on the logic die: the response
   path of a cone is shared by all read buffers. The decoder turns the chunk's NI index
   into a valid for the right read buffer.
7. **Read buffer** (`read_buffer`): writes the word into its entry and marks it received.
   When the oldest packet is complete, it leaves as flits on the next cycle.

For a lone one-word load to die *k*, the first response flit is valid **6 + 3k** cycles
after the cycle in which the packet was accepted: 6 cycles for die 0 and 27 for die 7. The
end-to-end testbench measures and checks this for every die.

## Flow control: request-grant on the logic die, none in the stack

On the logic die, flow control is a request-grant handshake. A request engine raises a
request on each cone its packet needs. Each cone's arbitration tree grants one request
engine per cycle. Granted chunks leave. Ungranted chunks ask again in the next cycle, so a
packet may enter the stack over several cycles. The request engine takes the next packet
in the same cycle as the last grant, so with no conflicts it accepts **one packet per
cycle**.

The arbitration tree is a binary tree of two-input nodes. Each node keeps one priority bit
and, after passing a grant to one side, points the bit at the other side. This is round
robin at every node, "pseudo" round robin over all requesters. With all four requesting,
each is served exactly once every four cycles.

The memory pipeline itself has **no back-pressure**. Nothing above the logic die can stall.
This works because a chunk enters the stack only once it owns a read-buffer entry, so the
read buffers can always accept what comes back. A request engine does not accept a packet
while its read buffer is full (MOT packets outstanding).

### Throughput per interface: MOT against distance

The request side sustains one packet per cycle. The read buffer bounds what one
interface gets over time. An entry is busy from the cycle its packet is accepted until the
cycle its last flit leaves. For a one-word load to die *k* that is 6 + 3k cycles, plus one
cycle before the entry can be reserved again. One interface therefore sustains

    min(1, MOT / (7 + 3k))  packets per cycle

With MOT = 8, that is a full packet per cycle to die 0, 0.8 to die 1, and 0.29 to die 7.
`tb_workload_l2` measures exactly these rates. To keep full bandwidth to the far dies of an
8-high stack, MOT must grow to 28 (7 + 3·7). The cost is read-buffer storage, which grows
linearly with MOT, and deeper Join FIFOs (`N_NI × MOT`).

### Why the memory pipeline needs no flow control

The Join FIFOs are the one place where chunks can pile up. In a die, answers from the
local array and from the dies above can arrive in the same cycle, but only one leaves per
cycle. A Join cannot refuse a chunk, so its FIFOs must never overflow. In one cone, at most
`N_NI × MOT` = 32 chunks can exist at any time, because each outstanding packet has at most
one chunk per cone. Each FIFO is therefore `N_NI × MOT` deep, which makes overflow
impossible for any traffic. A shallower FIFO would save area but would need a proof about
traffic patterns, or a credit scheme. `sync_fifo` asserts on overflow, so a smaller depth
can be tried in simulation.

## Read buffer: merging out-of-order chunks

The chunks of one packet come back at different times. They may come from different dies,
and the cones compete differently in the Joins. Chunks of a later packet can also arrive
before those of an earlier one. Each read buffer has MOT entries, and each entry holds:

- the header: operation, transaction ID, length and starting cone;
- a received mask, one bit per cone;
- up to eight data words.

A chunk's cone tells which word of the packet it is: `(cone − start) mod 8`. Up to eight
chunks (one per cone) can be written in the same cycle.

Entries are reserved and released in order, so responses leave each interface in request
order. A load leaves as one flit per word: operation, ID, word index, last flag and data.
A store leaves as a single acknowledge flit.

## Identical dies

A memory die (`memory_die`) does not know where it sits. Its index arrives from the die
below on `die_id_in`, and it passes `die_id_in + 1` upward on `die_id_out`. The logic die
sends 0. Nothing die-specific is built into the layers, so any die can sit at any level.
The top die's upward outputs go nowhere. If `NUM_MD` < 8 and a request addresses a missing
die, an assertion fires at the top die.

## TSV links with repair

Every vertical link goes through `tsv_repair_tx` (sending die) and `tsv_repair_rx`
(receiving die): the upward link carries the die index and the request chunks, the
downward link carries the response chunks. Each link is cut into groups of 25 signals, and
each group travels on 26 TSVs. A 5-bit repair code per group names the TSV to leave out:

- Signals below that TSV keep their place.
- Signals from that TSV upward move one TSV up.
- Code 25 leaves the spare unused.

Both ends get the same code through the top-level inputs `tsv_cfg_up[b]` and
`tsv_cfg_dn[b]`, where boundary *b* lies below memory die *b*. With the default widths the
upward link has 699 signals in 28 groups and the downward link has 560 signals in 23
groups. The codes are static. How they are found (stack test) and stored (fuses, a scan
register) is outside this RTL. The links are combinational and add no cycles.

## Interfaces of the top (`numa3d_top`)

Per NoC interface *n*:

- `ni_req_valid[n]`, `ni_req_ready[n]`, `ni_req[n]` (`req_pkt_t`): a request packet is
  taken when valid and ready are both high. It has these fields: `op` (load/store), `tid`
  (8 bits, returned unchanged), `addr` (22-bit byte address), `len_m1` (number of words − 1,
  0..7) and `wdata[j]` (word *j* of a store).
- `ni_rsp_valid[n]`, `ni_rsp_ready[n]`, `ni_rsp[n]` (`rsp_flit_t`): response flits with
  the fields `op`, `tid`, `idx`, `last` and `data`.

Words of a packet are consecutive word addresses. They may cross a 64-byte line, and even
a die boundary. Addresses wrap at 4 MB.

Clock and reset: `clk`, and `rst_n` (asynchronous, active low). Reset clears control state
only. Memory contents and data registers are not reset.

## Own choices and departures

These points are not fixed by the paper and were decided here:

- The packet, flit and chunk formats, 8-bit transaction IDs, and word-granular stores
  (no byte enables).
- `N_NI` = 4 and `MOT` = 8. MOT is read as the depth of each interface's read buffer.
- The address map: the die is selected by the top address bits, so capacity grows by
  adding dies.
- Stores return an acknowledge, so every chunk returns a response and a read buffer can
  complete stores.
- A packet whose chunks are only partly granted keeps requesting the rest. The read-buffer
  entry is reserved when the packet is accepted.
- Responses leave each interface in request order, one word per flit.
- A one-cycle memory array latency, two-cycle Joins, Join FIFO depth `N_NI × MOT`.
- The die-index chain that lets identical dies find their level.
- The shift-based TSV repair with static codes. The paper gives only the ratio of one
  spare per 25.

Not included: the NoC interfaces and the NoC itself, the processing clusters, the off-chip
L3 controller, the clock-gating scheme and everything physical (power delivery, thermal
arrangement, the TSVs themselves). The top brings out a plain request/response port per
interface in place of the NoC interfaces.

The 500 MHz clock (set by the memory macros) and the 1 GHz logic speed reported for the
28 nm implementation are properties of that physical design. This RTL has not been
timed. `sram_bank` is written as an array: for a real chip, replace it with the SRAM macro
(same ports: `en`, `we`, `addr`, `wdata`, `rdata`, one-cycle read).

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_md_fork` | die match steers to the array, mismatch upward |
| `tb_sram_bank` | random reads and writes at full size, one-cycle read, data held |
| `tb_md_join` | cycle-exact reference model of both FIFOs and the round robin |
| `tb_arbitration_tree` | one-hot grants, registered chunk, exact 1/N share under full load, no starvation |
| `tb_request_engine` | every chunk's die, row, cone and data; read-buffer header; no acceptance while chunks are pending or the read buffer is full; 100 packets in 100 cycles with all grants |
| `tb_read_buffer` | out-of-order chunks, in-order flits, store acknowledges, MOT limit, completion-to-output timing |
| `tb_return_addr_decoder` | one-hot valid per NI index |
| `tb_tsv_repair` | a stuck TSV in every group is bypassed; the same faults corrupt an unrepaired link |
| `tb_memory_die` | one full-size die between a traffic source and a model of the die above; three-cycle local access |
| `tb_logic_die` | four NI agents against a random-latency memory model |
| `tb_numa3d_top` | the full default stack (8 dies, 4 MB) end to end, as described below |
| `tb_workload_l2` | full stack: sustained one-word-load rate per die against the formula above; then 64-byte line refills and write-backs from all four interfaces (about 24 bytes per cycle of load data), all data checked |

`tb_numa3d_top` runs the stack at its default size with random repair codes on every TSV
group. It first checks the 6 + 3k access time of every die. It then runs 4000 cycles of
random loads and stores of 1 to 8 words from all four interfaces over all dies. The NI
agents (`tb/ni_agent.sv`) check every flit against their own copy of memory. Each agent
works in its own address slice, so the expected data is exact.

Small probe modules are bound into the blocks (`tb/tb_probe_*.sv`, counters in
`tb/tb_cov_pkg.sv`). They confirm that each mechanism actually happened:

- arbitration conflicts and partial grants;
- full read buffers;
- out-of-order chunk arrival;
- Joins holding chunks from both sources;
- accesses to every die;
- packets crossing a 64-byte line.

The whole run takes a few seconds of simulation after a compile of under a minute.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/numa_pkg.sv tb/tb_numa3d_top.sv --top-module tb_numa3d_top -o sim
./obj_dir/sim
```

Use the same command for any other testbench, changing the file and top-module names. The
RTL passes `verilator --lint-only -Wall` with warnings of three kinds only: unused
signals (for example the address bits that select the cone), unused package constants,
and `SYNCASYNCNET`. The last one comes from assertions that sample the asynchronous reset
in their `disable iff`.

## Files

- `rtl/numa_pkg.sv`: configuration, types, the cone-mask helper.
- `rtl/numa3d_top.sv`: the stack.
- `rtl/logic_die.sv`, `request_engine.sv`, `arbitration_tree.sv`, `read_buffer.sv`,
  `return_addr_decoder.sv`: the logic die.
- `rtl/memory_die.sv`, `md_fork.sv`, `sram_bank.sv`, `md_join.sv`, `sync_fifo.sv`: a
  memory die.
- `rtl/tsv_repair_tx.sv`, `tsv_repair_rx.sv`: repairable TSV links.
- `tb/`: the testbenches named above, the NI agent, and the probes.
