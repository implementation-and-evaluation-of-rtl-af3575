# Way-partitioned last-level cache

This is synthesizable SystemVerilog for a set-associative last-level cache with
way-based partitioning, in the style of Intel Cache Allocation Technology.
Each request carries two things: the capacity bit mask of its class of service
(CLOS) and the CLOS ID. A request can only hit in the ways set in its mask. A
miss can only replace a line in those ways. Only those ways' replacement state
changes. So each class of service is confined to its share of the ways while
every set stays shared.

The replacement algorithm is fixed when the cache is built. Six are available:
Random, true LRU, NRU, binary tree pseudo-LRU (one tree per set), binary tree
private (one tree per set per CLOS) and DRRIP with set dueling.

## Configuration

| Parameter | Default | Meaning |
|---|---|---|
| `WAYS` | 8 | associativity |
| `INDEX_WIDTH` | 8 | set index bits: 2^8 sets x 8 ways x 32 B = 64 KiB |
| `NUM_CLOS` | 2 | classes of service (tree storage of binary tree private) |
| `REPL` | `REPL_TRUE_LRU` | replacement algorithm (`cache_pkg::repl_e`) |

Fixed in `cache_pkg`:
- 48-bit byte address.
- 32-byte lines, so a 5-bit offset.
- 64-bit processor word; address bits [4:3] choose one of the four words in a line.

The tag is `48 - INDEX_WIDTH - 5` bits wide, which is 35 bits at the default.

Cache sizes from 8 KiB to 8 MiB need `INDEX_WIDTH` 5 to 15. Only the index
and tag widths change; the offset stays the same.

## Interface of `cache_top`

| Group | Signals | Notes |
|---|---|---|
| Request | `req_valid`, `req_ready`, `req_write`, `req_addr[47:0]`, `req_wdata[63:0]`, `req_mask[WAYS-1:0]`, `req_clos` | Accepted when `req_valid && req_ready`. One request is in flight at a time. The mask must not be zero. |
| Response | `resp_valid`, `resp_rdata[63:0]`, `resp_hit` | One-cycle pulse. A read returns the word; a write returns the data written. |
| Write-back | `wb_valid`, `wb_ready`, `wb_addr[47:0]`, `wb_data[255:0]` | Dirty victim line. Address and data are held until accepted. |
| Line fetch | `rd_valid`, `rd_ready`, `rd_addr[47:0]` | Request for the missing line. |
| Fetch data | `rd_rsp_valid`, `rd_rsp_data[255:0]` | The fetched line. It may arrive any number of cycles after the fetch request is accepted. |

Memory addresses are line-aligned (low 5 bits zero). Reset `rst_n` is
active-low and asynchronous.

After reset, the replacement block clears its state RAM, one set per cycle.
`req_ready` stays low until that is done. At the default size this takes 256 cycles.

## Structure

```
            req/resp
               |
      processor_interface ----------------------------.
               | lookup                               | done / data
      directory_interface --- directory_top            |
               |              (tag_directory,          |
               |               status_bits_directory)  |
         tag_comparator (tag, valid, mask)             |
          hit /      \ miss                            |
             /        replacement_algorithm            |
            /          (one of six repl_* modules)      |
           /                  | victim                 |
          /       directory_interface: install tag,    |
         /        report old tag and dirty state       |
        /                     |                        |
       /          write_memory_interface --> wb_*      |
      /                       |                        |
     /            read_memory_interface  <-> rd_*      |
    /                         | fill                   |
 data_interface <-------------'------------------------'
      |
 data_block_selector (data RAM)
```

| Module | Role |
|---|---|
| `processor_interface` | Registers the request. Splits the address into tag, index and word. Starts the lookup and returns the response. |
| `directory_interface` | The only path to the directories. Reads a set on lookup. On a victim, writes the new tag, marks the line valid and clean, and records the old tag and whether the old line was valid and dirty. |
| `directory_top` | Holds `tag_directory` (tags, no reset) and `status_bits_directory` (valid and dirty bits, cleared by reset). Both read with one cycle of latency. |
| `tag_comparator` | Combinational. A way hits if it is valid, inside the mask and its tag matches. If several ways match, the lowest one wins. |
| `replacement_algorithm` | Builds the selected `repl_*` module. They all share one interface: hit pulse, miss pulse, index, CLOS, mask, hit way, `ready_o`, victim pulse and victim way. |
| `data_interface` | Serves hits: a word read, or a word write that sets the dirty bit. Reads the victim line for write-back. Writes a fetched line, merging the write data on a write miss. |
| `data_block_selector` | Data RAM of SETS x WAYS lines. Synchronous read. The read address `{index, way}` does the job of the way multiplexer. |
| `write_memory_interface` | Handles a victim. A valid and dirty victim is read from the data RAM and written to memory at `{old tag, index, 0}`. A clean one finishes at once. |
| `read_memory_interface` | Fetches the line at `{tag, index, 0}` and hands it to `data_interface`. |

## Timing

Cycle 0 is the cycle in which the request is accepted.

| Event | Cycle |
|---|---|
| Directory read (`lookup`) | 1 |
| Tags, valid and dirty bits available; hit or miss known | 2 |
| Hit: data RAM read; replacement hit update starts | 2 |
| Hit: `resp_valid` | 3 |
| Miss: victim known | 2 + replacement latency |
| Miss: new tag installed | victim cycle |
| Miss: write-back (dirty victim only), then fetch, fill, response | following cycles |

The response to a miss comes one cycle after the fill, and the fill comes one
cycle after `rd_rsp_valid`.

Replacement latencies are counted from the miss pulse to the victim pulse:

| Algorithm | Victim | Hit update (busy) |
|---|---|---|
| Random | 1 | none |
| True LRU | 2 | 3 |
| NRU | 2 | 3 |
| Binary tree | 2 | 3 |
| Binary tree private | 2 | 3 |
| DRRIP | 2 to 5 | 3 |

The first cycle of each RAM-based algorithm reads the set's state word from
RAM. The victim logic is combinational on that word. DRRIP then searches once
per cycle, ageing the partition between searches. Its worst case is
2 x M = 4 search cycles, which happens when every RRPV in the partition is 0.

## Replacement algorithms and partitioning

In every algorithm, the partition mask limits both which ways can be victims
and which ways' state is updated.

- **Random** (`repl_random`)
  - A log2(WAYS)-bit counter advances every cycle.
  - On a miss the victim is the first masked way at or after the counter value, wrapping around.
- **True LRU** (`repl_true_lru`)
  - Each way has a log2(WAYS)-bit recency counter; 0 means most recently used.
  - When a way is touched, masked ways with a smaller counter go up by one and the touched way becomes 0.
  - The victim is the masked way with the largest counter; ties go to the lowest way.
  - Partitions share the counters. With overlapping masks, the ways of two partitions can therefore end up with equal counters.
- **NRU** (`repl_nru`)
  - Each way has one used bit.
  - A hit sets its way's bit.
  - On a miss the victim is the lowest masked way whose bit is 0.
  - If every masked way's bit is 1, only the partition's bits are cleared, and the victim is the lowest masked way.
  - The victim's bit is then set.
- **Binary tree** (`repl_binary_tree` with `bt_logic`)
  - Each set has WAYS-1 node bits. Node n has children 2n+1 (lower way numbers) and 2n+2.
  - A node value of 1 sends the victim search toward the higher-numbered half.
  - Two vectors are derived from the mask on every request:
    - *up* is set at nodes whose lower-numbered half holds all the allowed ways;
    - *down* is set at nodes whose higher-numbered half does.
  - These forced nodes steer the search and are left unchanged. Free nodes on the path are inverted.
  - A hit points the free nodes on its path away from the hit way.
- **Binary tree private** (`repl_binary_tree_private`)
  - Same logic, but the tree RAM is addressed by `{index, CLOS}`.
  - So one class of service never disturbs another's recency information.
  - With disjoint masks it behaves like the shared tree.
- **DRRIP** (`repl_drrip`, `drrip_psel`, `drrip_lfsr`)
  - Each way has a 2-bit RRPV; a hit sets it to 0.
  - A miss takes the lowest masked way with RRPV 3. If there is none, the masked ways are aged by one and the search repeats.
  - Insertion value:
    - SRRIP inserts with RRPV 2.
    - BRRIP inserts with RRPV 3, or with 2 when the 4-bit LFSR shows its one-in-fifteen state.
  - Set dueling:
    - In each group of max(SETS/32, 4) sets, the first set is an SRRIP leader and the second a BRRIP leader.
    - A hit in an SRRIP leader increments the 2-bit saturating PSEL counter; a hit in a BRRIP leader decrements it.
    - Follower sets use SRRIP while the PSEL MSB is 1. PSEL starts at 2.

### State storage at the default size (256 sets, 8 ways, 2 CLOSes)

| Algorithm | Bits of replacement state |
|---|---|
| Random | 3 (counter) |
| True LRU | 256 x 8 x 3 = 6144 |
| NRU | 256 x 8 = 2048 |
| Binary tree | 256 x 7 = 1792 |
| Binary tree private | 2 x 256 x 7 = 3584 |
| DRRIP | 256 x 8 x 2 + 2 (PSEL) + 4 (LFSR) = 4102 |

The up and down vectors are computed from the mask on every request and are
not stored, so neither tree variant keeps per-CLOS vector registers.

At the default build (true LRU), the whole cache holds 602,112 bits of RAM:
- 524,288 bits of data;
- 71,680 bits of tags;
- 6,144 bits of LRU state.

The valid and dirty bits are 4,096 flip-flops, because reset clears them in
one step.

## Design decisions not fixed by the thesis

- 64-bit processor word. The response to a write returns the data written.
- Write-allocate on a write miss: the line is fetched, the word is merged in, and the line is marked dirty.
- Start/done pulses between blocks and valid/ready handshakes to memory. There are no FIFOs between blocks.
- The mask and CLOS ID travel with each request. There is no mask register file; allocating masks is left to software.
- Replacement state lives in RAM and is initialised by a sweep after reset:
  - LRU starts with counter w in way w;
  - all other algorithms start from all zeros.
- Random turns the counter into a way inside the mask by taking the first masked way at or after the counter.
- DRRIP leader-set placement as described above.
- DRRIP latency follows the latency table's worst case of 2 x M search cycles. The algorithm's own section gives nine cycles.

## Not implemented

- **Main memory.** The testbenches use a behavioural model, `tb/mem_model.sv`.
- **The FIFOs between modules** that the thesis mentions.
- **The software allocation policy** that assigns threads to CLOSes and picks masks.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- **Replacement algorithms.**
  - Each one runs against an independent reference model, with random hits and misses under the evaluation's masks (11111111, 11110000, 00000011, and the overlapping pairs).
  - Latencies and mask containment are checked.
  - Directed cases:
    - the true-LRU recency table example;
    - the four-way binary-tree example, whose victim is way 2;
    - an NRU partition reset;
    - isolation between private trees;
    - the DRRIP worst case with all RRPVs 0.
- **`tb_cache_top`**
  - Builds six 2 KiB caches, one per algorithm.
  - Each runs two classes of service taking turns in 50-request bursts, with masks widening from disjoint to overlapping to shared, against a memory with random stalls.
  - Checks every read against a golden memory and the three-cycle hit latency.
  - For true LRU it also checks every hit, miss and write-back against a reference model.
  - Fails if any counted mechanism never occurs:
    - read and write hits and misses;
    - dirty write-backs;
    - memory stalls;
    - partition isolation;
    - mask changes;
    - DRRIP ageing;
    - NRU partition reset;
    - forced tree steps.
- **`tb_cache_full`**
  - Runs the same traffic on `cache_top` with all default parameters: 64 KiB, true LRU, checked against the reference model.

- **`tb_workloads`** (with `workload_runner`)
  - Re-creates the thesis' evaluation studies on an 8 KiB cache for each of the six algorithms.
  - The SPEC CPU2006 traces are not included. Each application is a deterministic synthetic trace instead:
    - a hot set hit most of the time;
    - a streaming region that misses;
    - 25% writes.
  - The second application's addresses are shifted past the first's, plus 2048 bytes, so the two never alias.
  - The runs:
    - disjoint splits 20/80, 50/50 and 80/20, each shared (turns of 50 requests) and with each application alone;
    - overlapping masks from F8/1F up to FF/FF;
    - single applications under masks 11111111, 11110000 and 00000011.
  - Every read is checked against a golden copy.
  - For true LRU, NRU and both binary trees, each application's hits and misses with disjoint masks must equal its counts when run alone. This is partition isolation.
  - For true LRU, fewer ways must never give fewer misses.
  - The miss counts of every run are printed as tables.

## Files

- `rtl/`: one module or package per file. `cache_pkg.sv` holds the shared constants and the algorithm enum.
- `tb/`:
  - unit testbenches;
  - `tb_cache_top.sv` and `tb_cache_full.sv`;
  - `cache_driver.sv`, the traffic generator and checker;
  - `mem_model.sv`, the memory model.
  - `tb_workloads.sv` and `workload_runner.sv`, the evaluation studies on synthetic traces.
