# Non-uniform power access cache bank

In a large last-level cache bank, most of the dynamic energy of an access goes
into the H-tree. The H-tree is the balanced, repeated full-swing wire network that
carries addresses and data between the cache controller and the SRAM subarrays.
The H-tree makes every subarray equally far away in time. As a side effect it also
makes every access cost the same energy.

This bank drops that side effect. A single **low-swing bus** runs along the
central trunk of the H-tree. The two rows of subarrays next to the trunk connect to
this bus instead of the H-tree. Low-swing differential wires use a fraction of the
energy of full-swing wires, but they are slow and cannot be pipelined cheaply.
Because this bus only spans the width of the bank, its delay still fits inside the
H-tree's delay. Both regions therefore keep the same access time. The part of the
bank behind the bus becomes a cheap **low-power region**. In a 16-way bank it holds
exactly one way. The cache controller tries to keep in that way the block of each
set that is most likely to be touched next: the most recently used one.

The RTL follows the organisation and policies published in *Non-Uniform Power
Access in Large Caches with Low-Swing Wires* (A. N. Udipi, N. Muralimanohar,
R. Balasubramonian). It is written in SystemVerilog (IEEE 1800-2017). At its
default size it is the evaluated configuration:

| | |
|---|---|
| capacity | 4 MB, 16 ways, 64-byte lines, 4096 sets |
| data array | 32 x 32 grid of subarrays |
| low-power region | the 2 central subarray rows = 64 of 1024 subarrays = way 0 |
| high-power region | the other 30 rows = ways 1..15 |
| access time | 5 cycles in both regions (5 GHz clock in the published study) |
| placement | *Duplicate* policy, with dynamic on/off switching |

## Organisation

```
                 +-------------------------------------------------+
 requests ------>| nupa_controller                                 |
 responses <-----|   tag_array   (16 tags/set, read in parallel)    |
                 |   lru_array   (LRU order of ways 1..15)          |
 main memory <-->|   reconfig_counter (global 5-bit counter, mode)  |
                 +----------------------+--------------------------+
                                        | one array operation
                                        | (read or masked line write)
                                 +------+-------+
                                 | region_switch|
                                 +--+--------+--+
                      REGION_HP     |        |     REGION_LP
                  +-----------------+        +--------------------+
                  | htree_net                | low_swing_bus      |
                  | pipelined, 2+2 cycles    | one op at a time,  |
                  | accepts every cycle      | busy 5 cycles      |
                  +-----------+              +-----------+        |
                              |                          |
                   data_region (ways 1..15)   data_region (way 0)
                   30 rows of subarrays       2 central rows
```

* **`nupa_controller`** handles one request at a time. It reads the tags of all
  16 ways of the set together. It then sends one or more data-array operations to
  the two regions and talks to main memory on misses and write-backs.
* **`region_switch`** is the simple switch that connects the controller either to
  the H-tree or to the low-swing bus, depending on which region an operation
  addresses. The rest of the cache does not see the bus. When the bus is busy the
  switch passes its "not ready" back to the controller, and the controller stalls.
* **`htree_net`** models the pipelined H-tree. An operation reaches the subarrays
  2 cycles after it enters, and read data returns 2 cycles after the array
  produced it. A new operation can enter every cycle.
* **`low_swing_bus`** has the same delay, but it is **not pipelined**. It takes one
  operation and then refuses new ones until 5 cycles after acceptance. So the
  cycle time of the low-power region equals its access time. This is the only
  source of extra contention in the design.
* **`data_region`** is the data memory of one region. It takes one operation per
  cycle, and a read returns one cycle later. It is used twice: once with 1 way
  (way 0) and once with 15 ways (ways 1..15).

Only the digital behaviour is modelled. The design has no notion of energy. Which
accesses are cheap shows in the event outputs and in `rsp_lp_o` (the request was
served from the low-power way). The low-swing transmitters and receivers are
analog circuits, so they appear only as the bus's delay and occupancy.

## Keeping the right block in way 0: the Duplicate policy

Way 0 is not part of the LRU replacement order. In placement mode it always holds
a *copy* of the block of that set touched most recently. The original normally
stays in its high-power way, so most blocks exist twice. Keeping two copies lowers
the effective capacity to about 15 ways. In exchange, a way-0 block that was only
read can simply be dropped when it is replaced, with no write-back. A lookup that
matches way 0 always wins over the high-power copy. The high-power copy may be
stale, and it is ignored.

What the controller does for each lookup outcome (placement mode):

| outcome | data-array operations, in order |
|---|---|
| hit in way 0 | read or write way 0 over the low-swing bus. A write marks way 0 dirty. The LRU age of the high-power copy is refreshed. |
| hit in high-power way *k* | 1. **retire way 0**: if the way-0 block is dirty, read it and write it into its high-power copy, which becomes dirty. A clean way-0 block is simply overwritten. 2. read way *k*, answer the request. 3. write the line into way 0. Way 0 is clean, or dirty if the request was a write: the write's bytes go only to the way-0 copy. |
| miss | 1. retire way 0 as above. 2. choose the victim: an invalid high-power way, otherwise the LRU one. If it is dirty, read it and write it to memory. 3. fetch the line from memory. 4. write it into the victim way (clean) and into way 0. |

Finding "its high-power copy" in the retire step needs a second tag search, with
the tag of the way-0 block. The controller compares that tag with the tags it
already read at lookup, so the search costs no extra cycle. LRU may already have
evicted the copy: it counts only the high-power ways, and it knows nothing of the
way-0 duplicate. Then there is nowhere in the bank to put the dirty line, and it is
written back to main memory. The published description does not say what happens
in this case. Writing back to memory is this design's choice.

## Switching placement off: the reconfiguration counter

Copying a block into way 0 costs one extra high-power read and one low-power
write. A later eviction of a dirty copy costs one more of each. Copying pays off
only if the block is hit in way 0 a few times before it is replaced. For program
phases with little reuse, a **single global 5-bit saturating counter** decides
whether copying is on:

* **Placement mode.** A lookup that hits way 0 adds 2. Any other lookup subtracts
  1. When the count drops below 0, the bank switches to conventional mode.
* **Conventional mode.** Blocks are no longer copied into way 0. High-power hits
  are served where they are, and a miss fills only the LRU high-power way. A hit
  on the set's most recently used block adds 2: that block is in way 0, or it is
  the youngest high-power way. Any other lookup subtracts 1. When the count rises
  above 0, copying resumes.
* The count saturates at -15 and +15. After reset the count is 0 and the bank is
  in placement mode. The reset state is this design's choice.

The counter parameters (`CTR_W`, `CTR_MIN`, `CTR_MAX`, `INC`, `DEC`, `THRESH`) are
the published values.

`DYN_RECONFIG` on `nupa_bank` (passed down to the controller and the counter)
defaults to 1. Set to 0, the counter still counts but the bank never leaves
placement mode. This is the "placement without reconfiguration" variant, useful
for comparing the two.

## Timing

* After reset, `tag_array` and `lru_array` clear themselves at one set per cycle.
  `req_ready_o` first rises after 4096 cycles.
* A request is accepted when `req_valid_i && req_ready_o`. The set is read in the
  next cycle, and array operations start in the cycle after that. An array read
  returns 5 cycles after it is issued, over either interconnect. `rsp_valid_o`
  follows one cycle later.
* A read hit in way 0 answers **8 cycles** after acceptance. So does a
  conventional-mode hit in a high-power way. A read that had to wait for the busy
  low-swing bus answers later by the number of cycles it waited.
* A high-power hit in placement mode, or a miss, takes longer: it also retires
  way 0 and copies the line. A miss adds the memory latency.
* Writes are posted to the arrays. A write request is answered as soon as its
  array write has been issued. Operations on the same interconnect stay in order.
  A later read therefore always sees an earlier write.

## Port list of `nupa_bank`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset |
| `req_valid_i`, `req_ready_o` | in/out | 1 | request handshake |
| `req_we_i` | in | 1 | 1 = write |
| `req_addr_i` | in | 32 | byte address: tag [31:18], set [17:6], offset [5:0] |
| `req_wdata_i`, `req_wmask_i` | in | 512, 64 | line of write data and its byte enables |
| `rsp_valid_o`, `rsp_rdata_o` | out | 1, 512 | response: read line, or write done |
| `rsp_lp_o` | out | 1 | the request was served by the low-power way |
| `mem_req_valid_o`, `mem_req_ready_i` | out/in | 1 | memory request handshake |
| `mem_req_we_o`, `mem_req_addr_o`, `mem_req_wdata_o` | out | 1, 26, 512 | write-back or fetch, line address |
| `mem_rsp_valid_i`, `mem_rsp_rdata_i` | in | 1, 512 | fetched line |
| `mode_o`, `ctr_o` | out | 1, 5 | placement/conventional mode, signed counter |
| `evt_lp_hit_o`, `evt_hp_hit_o`, `evt_miss_o` | out | 1 | lookup outcome, one pulse per request |
| `evt_copy_o` | out | 1 | a line was written into way 0 |
| `evt_lp_wb_o` | out | 1 | a dirty way-0 block was written into its high-power copy |
| `evt_mem_wb_o` | out | 1 | a dirty line was written back to memory |
| `evt_stall_o` | out | 1 | an array operation waited for a busy interconnect |

The event pulses are the counts that an energy model needs. For example, energy
is roughly (low-power accesses) x L + (high-power accesses) x H.

## Design choices

These follow the published design:

* geometry and sizes
* the low-swing bus on the trunk, and the switch
* equal access time in both regions
* the non-pipelined bus
* Duplicate placement, and the write-back of dirty way-0 blocks into their copy
* the second tag search
* LRU replacement of the high-power ways
* the counter and its rules

These are this design's own choices, where the published description is silent:

* **Address width.** 32-bit byte address.
* **Request protocol.** Valid/ready, one request in flight, and writes carry a
  whole line with byte enables. The published system puts 32-byte L1 lines
  behind the bank; those map onto this protocol through the byte enables.
* **Interconnect width.** A whole 512-bit line per transfer. The published text
  only says the bus is "at least 128 bits" wide.
* **Latency split.** The 5-cycle access is split 2 + 1 + 2 (out, array, back).
  This matches the stated wire delays of about 0.32 ns (H-tree) and 0.26 ns
  (low-swing bus) at 5 GHz.
* **Writes on the low-swing bus.** A write occupies the bus as long as a read does.
* **Dirty way-0 block without a copy.** It is written back to memory.
* **LRU refresh on a way-0 hit.** A hit in way 0 refreshes the LRU age of the
  block's high-power copy.
* **Victim choice.** Invalid high-power ways are filled before LRU chooses.
* **Counter event in conventional mode.** "Hit in the MRU way" is read as a hit
  in way 0 or in the youngest high-power way.
* **Reset.** Reset sweeps clear the tag and LRU arrays. The counter resets to 0,
  in placement mode.

Not built:

* the Swap policy, and the alternative low-swing organisations: one low-swing bus
  for the whole bank, one bus per subarray row, or a fully pipelined low-swing
  H-tree. These are the designs the proposal is compared against.
* the energy model
* the analog low-swing transceivers
* the processor and main memory

The bank size is fixed by `CACHE_BYTES` in `nupa_pkg`, so the published
capacity sweep (4 MB down to 256 kB) needs that constant edited.

## Files

| file | contents |
|---|---|
| `rtl/nupa_pkg.sv` | geometry constants, `arr_req_t`, `region_e`, `mode_e`, `merge_line` |
| `rtl/nupa_bank.sv` | top level |
| `rtl/nupa_controller.sv` | controller and policy state machine |
| `rtl/tag_array.sv`, `rtl/lru_array.sv` | tag/valid/dirty RAM; LRU ages RAM |
| `rtl/reconfig_counter.sv` | placement on/off counter |
| `rtl/region_switch.sv`, `rtl/htree_net.sv`, `rtl/low_swing_bus.sv` | interconnect |
| `rtl/data_region.sv` | data memory of one region |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_nupa_workloads.sv` | synthetic reuse streams on two full-size banks |
| `tb/main_memory_model.sv` | behavioural memory, 300-cycle reads |
| `tb/data_array_model.sv` | behavioural data array for testing the controller alone |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own. A
watchdog ends a testbench that hangs.

* **`tb_nupa_bank`** runs the whole bank at its full default size against the
  300-cycle memory model, in three phases:
  * high reuse, which keeps the bank in placement mode
  * streaming over 40 lines per set, which drives the counter down into
    conventional mode
  * high reuse again, which brings placement back

  It compares every read with a reference image of memory, then reads back every
  line it touched. It checks the 8-cycle hit latency and that misses equal memory
  reads. It also requires each mechanism to occur at least once:
  * way-0 hits
  * high-power hits in both modes
  * misses in both modes
  * copies into way 0
  * write-backs of way 0 into its copy
  * memory write-backs
  * low-swing bus stalls
  * mode switches in both directions
* **`tb_nupa_controller`** runs the controller alone, with behavioural array and
  memory models. An independent reference model of the policy predicts, for
  every request:
  * the lookup outcome
  * copies into way 0, write-backs to the high-power copy, and memory
    write-backs
  * the counter value and mode

  The testbench compares them with the controller's event strobes.
* The unit testbenches compare each block with a reference model:
  * the counter's arithmetic and switching
  * tag and LRU contents, including the length of the reset sweep
  * masked writes in a data region
  * the 2-cycle and 5-cycle timings of both interconnects
  * the 5-cycle occupancy of the low-swing bus
  * the routing of the switch

* **`tb_nupa_workloads`** runs nine synthetic request streams on two full-size
  banks side by side. One bank has reconfiguration on, the other has
  `DYN_RECONFIG = 0`. Each stream has a reuse count N, the average number of
  way-0 hits per block copied into way 0. The nine values range from 39.7 down
  to 0.4 and follow a published per-program characterisation of SPEC2000. A
  request re-touches the block last used in its set with probability N/(N+1).
  The testbench reports:
  * the way-0 hit rate
  * the share of lookups made in placement mode
  * the number of copies into way 0
  * an energy estimate, using 0.185 nJ per H-tree access and 0.014 nJ per
    low-swing access (published figures for a 4 MB bank). It is compared with
    a conventional bank that makes one H-tree access per request, fill and
    write-back.

  It checks the data of every read. It checks that the placement-only bank never
  leaves placement mode and hits way 0 at a rate within 5 points of N/(N+1). For N >= 9 it checks that the
  reconfiguring bank stays in placement mode more than 95% of the time and
  saves more than half the energy. For N <= 0.5 it checks that the bank is in
  placement mode less than 30% of the time, makes fewer than half the copies
  and still saves more than 10%. The model is a simple one: the energy
  estimate counts array accesses only, and in these streams copying never cost
  more than it saved. So it does not reproduce the net energy losses that
  low-reuse programs show in the published placement-only results.

  Two directed read-only streams then test the cost of a copy. Every block
  already held in a high-power way is touched N = 1 or N = 2 times in a row. The
  placement-only bank must spend exactly one H-tree read and N low-swing
  operations per block. That is one read plus one copy into way 0, then N - 1
  way-0 hits. With these energies copying pays off above N = 1.08. So the
  testbench also checks that the N = 1 stream loses energy (-7.6%) and the
  N = 2 stream saves it (+42.4%).

Running one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nupa_bank \
    rtl/nupa_pkg.sv rtl/*.sv tb/main_memory_model.sv tb/tb_nupa_bank.sv
./obj_dir/Vtb_nupa_bank
```

`tb_nupa_workloads` builds from the same files as `tb_nupa_bank`. For
`tb_nupa_controller`, also add `tb/data_array_model.sv`. Verilator has only
two signal states, so every register that is read is reset or initialised. The
full-size bank test builds in seconds and runs in under a second.

## Changing it

* **Number of low-power ways.** `LP_WAYS` and `LP_ROWS` in `nupa_pkg` must keep
  `NDWL x LP_ROWS / (NDWL x NDBL) = LP_WAYS / WAYS`. `nupa_bank` checks this at
  elaboration. The controller assumes a single low-power way (way 0).
* **Interconnect delays.** `REQ_LAT` and `RSP_LAT` on `nupa_bank` set both
  interconnects. `BUSY_CYCLES` on `low_swing_bus` sets how long the bus is held.
* **Counter behaviour.** Set the `reconfig_counter` parameters. Set
  `DYN_RECONFIG = 0` on `nupa_bank` to keep copying always on.
