# STT-MRAM L1 data cache with a Very Wide Buffer

STT-MRAM is dense and leaks almost nothing, which makes it a candidate to
replace SRAM in a processor's L1 data cache. But its reads are slow. In the
32 nm reference point a 64 KB STT-MRAM cache reads in 3.37 ns and writes in
1.86 ns. The SRAM it replaces does both in about 0.78 ns. On a 1 GHz core that
means 4-cycle reads and 2-cycle writes, and simply swapping the SRAM for
STT-MRAM costs up to about half of the performance on small kernels.

This design hides the read latency behind a **Very Wide Buffer (VWB)**. The
VWB is a tiny, fully associative buffer of two 1 Kbit lines between the
processor and the STT-MRAM array:

- It is wide towards the array. One VWB line is filled at once from two
  512-bit cache lines.
- It is narrow (one 32-bit word) towards the processor. A post-decode
  multiplexer picks the word.
- Loads that hit the VWB finish in one cycle and never touch the slow array.
- Only a VWB miss pays for the STT-MRAM read. The whole 1 Kbit neighbourhood
  is then brought in, so later accesses nearby hit.
- A prefetch request starts such a promotion in the background. Software can
  then bring in data ahead of use.

The architecture follows the proposal by Komalan, Tenllado, Gómez Pérez,
Tirado and Catthoor, "System level exploration of a STT-MRAM based Level 1
Data-Cache". That work describes the organisation and its policies and
evaluates them in a system simulator. The RTL here is an implementation of
that organisation, and many of its details are choices made for this
implementation. Section "Where this RTL goes beyond the proposal" lists them.

```
                 word (32 b)                    line (512 b) x 2
  processor  <------------------>  VWB  <----------------------------+
  (load/store/prefetch)        2 x 1 Kbit                            |
       |                      (fully assoc.)                         |
       |  VWB-missing store, or load during a promotion (one word)   |
       +-----------------------------------------------> 4 STT-MRAM banks
                                                        (64 KB, 2-way,
                               tag array (flip-flops     512-bit lines,
                               + small tag memory)       rd 4 / wr 2 cycles)
                                                              |
                                              write buffer (4 lines)
                                                              |
                                                             L2
```

## Geometry and address split

All sizes live in `rtl/dl1_pkg.sv`:

| constant | value | meaning |
|---|---|---|
| `DL1_BYTES`, `DL1_WAYS`, `LINE_BITS` | 65536, 2, 512 | STT-MRAM cache: 512 sets x 2 ways of 64-byte lines |
| `VWB_LINES`, `VWB_LINE_BITS` | 2, 1024 | VWB: two lines of 1 Kbit; one VWB line = 2 cache lines (`SUBLINES`) |
| `READ_CYCLES`, `WRITE_CYCLES` | 4, 2 | STT-MRAM access times in cycles at 1 GHz |
| `NUM_BANKS` | 4 | data banks (own choice) |
| `WB_DEPTH` | 4 | write buffer entries (own choice) |
| `WORD_BITS`, `ADDR_BITS` | 32, 32 | processor word and byte address (own choice) |

The fields of a 32-bit byte address:

| bits | field |
|---|---|
| `[5:2]` | word within a cache line |
| `[6]` | which half of a VWB line |
| `[14:6]` | cache set |
| `[31:15]` | cache tag |
| `[7:6]` | data bank |
| `[31:7]` | VWB tag, the *block* address |

A *block* here is the aligned 128 bytes that one VWB line holds. Because the
bank is taken from the lowest set bits, the two cache lines of a block always
sit in different banks, so they are read in parallel.

## The Very Wide Buffer (`vwb`, `vwb_post_decode_mux`)

Each VWB line holds:

- the data;
- a tag (the block address);
- a valid bit;
- one dirty bit per 512-bit half.

On the processor side the address is compared with both tags in the same
cycle. `p_hit_o` and the read word are combinational. A store on a hit writes
the word at the clock edge and sets the dirty bit of that half.

On the cache side a promotion works in three steps:

1. It claims a line (`fill_start_i`). The line becomes invalid at once and
   takes the new tag, so it can never hit half-filled.
2. It writes either half as its data arrives (`fill_we_i`).
3. It marks the line valid (`fill_done_i`).

The other line stays valid throughout. The processor keeps reading and
writing it while the first line is being filled. This is how the two lines
let data be "written into and read from the VWB at the same time".

Replacement is least recently used, and an invalid line is taken first. When
a line is replaced, only its dirty halves are written back.

## Access policies (`dcache_ctrl`)

| request | VWB hit | VWB miss |
|---|---|---|
| load | word returned in the same cycle | the block is promoted into the LRU VWB line, then the load hits |
| store | word written into the VWB; the array is not touched | word written straight into the STT-MRAM array; no VWB allocation |
| prefetch | nothing to do | promotion starts; the request completes at once |

Further rules:

- **Promotion.** Each of the two cache lines of the block is looked up in the
  tag array. A line that is present is read from its bank (4 cycles, the two
  reads overlap). A line that is absent is fetched from L2 into the array
  (allocate on load) and copied into the VWB in the same step.
- **VWB write-back.** Before the new block comes in, each dirty half of the
  replaced VWB line is written into the array (a 2-cycle full-line write) and
  marked dirty there. If the array has meanwhile evicted that line, the half
  goes to the write buffer instead.
- **Store miss in the array.** A store that misses both the VWB and the array
  first fetches the line from L2 into the array (write allocate). It then
  writes the word. The cache is write back: nothing is written through to L2.
- **Array eviction.** A dirty line leaving the array is read out (4 cycles)
  and placed in the write buffer. The buffer drains to L2 whenever the L2 port
  is not needed for a refill. If a refill needs a line that is still queued
  there, it waits until that line has drained ("wb_hold").

Consistency between the VWB and the array comes from three facts:

1. A store to a line held in the VWB always hits the VWB, so the array copy
   of such a line is never newer.
2. A dirty VWB copy reaches the array, or L2 through the write buffer, only
   when the VWB line is replaced.
3. The write buffer is first-in first-out, so a newer copy always reaches
   L2 after an older one.

## The miss engine and concurrency

The controller has two parts.

The **request path** is combinational. It answers VWB hits and issues direct
stores to the array.

The **miss engine** is one state machine. It does one promotion or one
write-allocate at a time. Its states:

| state | work |
|---|---|
| `E_WB` | write dirty halves of the replaced VWB line back (array or write buffer) |
| `E_LOOK` | look up the next cache line of the block; if present, issue the bank read |
| `E_VRD`, `E_VWAIT`, `E_VPUSH` | the line is absent and the way to replace is dirty: read that way out and queue it in the write buffer |
| `E_L2REQ`, `E_L2RESP` | fetch the line from L2 (waits while the write buffer still holds it) |
| `E_INSTALL` | write the line into the array, install its tag, and for a promotion copy it into the VWB |
| `E_WAITRD` | collect the outstanding bank reads into the VWB, then mark the line valid |

What can proceed while the engine is busy:

- **VWB hits.** Loads and stores that hit the line not being filled complete
  in one cycle.
- **Direct stores to the array.** A store that misses the VWB and hits the
  array proceeds if its bank is idle and the engine does not claim that bank
  in that cycle. Otherwise the processor stalls until the bank is free. This
  is the *bank conflict*. The engine always has priority on a bank.
- **Set-group lock.** A store or direct load to any set of the group the
  engine is working on waits until the engine is done. A group is the two sets of one block,
  either the block being promoted or the one being written back. The lock
  keeps replacement and dirty state consistent.
- **Direct loads from the array.** A load that misses the VWB while a
  promotion runs, and whose line is in the array, is read straight from its
  bank. It must be outside the locked set group, and its bank must be idle
  and not claimed by the engine; otherwise the processor stalls. The word
  returns after READ_CYCLES cycles and is not copied into the VWB, so the
  next load of that block promotes it as usual. The engine cannot confuse
  this read with its own, because it only waits on banks it made busy.
- **Other VWB misses and new prefetches** wait for the engine to become idle.

### Cycle counts (defaults)

| case | cycles, request to completion |
|---|---|
| VWB hit (load or store) | 1 |
| direct store to the array | 1 (bank busy for 2 cycles counting the request cycle) |
| prefetch | 1 (promotion continues in the background) |
| load: VWB miss, both lines in the array, clean VWB line replaced | 1 + 2 + 4 + 1 = 8 |
| store to a bank that a background promotion is reading | up to 4 |
| load that misses the VWB during a promotion, line in the array, bank free | 1 + 4 = 5 |

Each dirty half written back adds a 2-cycle bank write. Each array miss adds
the L2 latency, plus a 4-cycle victim read if the victim is dirty.

## Data banks (`stt_mram_bank`) and tags (`dl1_tag_array`)

A bank is a single-ported array of 256 lines of 512 bits. It is written as a
plain memory with a busy counter, so it synthesises to a memory macro
placeholder. The latency is modelled at the interface; the cell and sense
circuits are not modelled.

- A read requested in cycle *t* returns its data with a one-cycle `rvalid_o`
  in cycle *t*+4. The bank takes its next request in that same cycle.
- A write stores the masked words at the end of the request cycle and keeps
  the bank busy for one more cycle.

The tag array keeps a tag memory per way, plus valid, dirty and
replacement-pointer bits in flip-flops. Lookups answer in the same cycle. Two
ports serve the request path and the miss engine. Replacement is LRU
for two ways.

## Interfaces of `stt_dl1_top`

**Processor port.**

- Inputs: `req_valid_i`, `req_op_i` (`OP_LOAD`, `OP_STORE`, `OP_PREFETCH`),
  `req_addr_i` (byte address, word aligned) and `req_wdata_i`.
- A request completes in the cycle where `req_ready_o` is high.
- For a load, `rdata_o` is valid in that cycle.
- Keep the request stable until it completes.

**L2 port.**

- Outputs: `l2_req_o`, `l2_we_o`, `l2_laddr_o` (a line address, i.e. byte
  address bits `[31:6]`) and `l2_wdata_o`.
- The request is taken when `l2_gnt_i` is high; a write is then done.
- A read returns one 512-bit line with `l2_rvalid_i`.
- At most one read is outstanding.

**Events.** `events_o` is a packed struct of one-cycle pulses for performance
counting:

- VWB load and store hits, VWB misses, prefetches, completed promotions;
- VWB write-backs, direct stores to and direct loads from the array, L2
  refills;
- write-buffer pushes and holds;
- bank-conflict stalls;
- requests completed during a promotion (`overlap`);
- stall cycles.

## Where this RTL goes beyond the proposal

The proposal fixes these points, and this RTL follows them:

- 64 KB 2-way STT-MRAM cache with 512-bit lines;
- 4-cycle reads and 2-cycle writes;
- a 2 Kbit, two-line, fully associative VWB with a tag per line and a word
  multiplexer;
- VWB looked up first, promotion on a load miss, write-back of the replaced
  VWB data into the array;
- no VWB allocation on stores;
- write allocate and write back in the array;
- a small write buffer towards L2;
- a banked array that stalls the processor on a bank conflict;
- software prefetch into the VWB.

These are this implementation's own choices:

- **How a 1 Kbit VWB line maps onto 512-bit cache lines.** Here one VWB line
  holds two consecutive cache lines.
- **Bank count and bank mapping.** Four banks, selected by the low set bits.
- **Word width and access size.** 32-bit words, whole-word accesses only. There
  are no byte enables.
- **Replacement and dirty tracking.** LRU in both the VWB and the array.
  Dirty bits are kept per half of a VWB line, and only dirty halves are
  written back.
- **Where a written-back half goes.** If the array no longer holds it, it
  goes to the write buffer.
- **The miss engine.** One engine, sequential lookups of the two cache lines,
  and a set-group lock against concurrent stores.
- **Write buffer.** Four entries, with an address match that holds back
  refills.
- **Tag storage and handshakes.** All handshakes, reset behaviour and the tag
  storage are this implementation's own.
- **Prefetch as a request.** The proposal inserts prefetches with compiler
  intrinsics. Here a prefetch is a request kind on the processor port.
- **Loads during a promotion.** The proposal lets the processor fetch from
  one bank while a promotion reads another, and also says that loaded data
  always goes into the VWB. With one engine and both VWB lines taken, both
  cannot hold at once. Here such a load is read directly from the array and
  not copied into the VWB. Its block is promoted on its next load once the
  engine is free.
- **Left out.** The code transformations of the proposal (vectorisation,
  alignment, branch removal) are software and are not part of the RTL.

Not included are the processor, the L2 cache and main memory, and the
instruction cache. The testbenches use a behavioural L2 model
(`tb/l2_model.sv`).

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_vwb_post_decode_mux` | word select and merge on random lines |
| `tb_vwb` | fills, hits, word writes, dirty halves, read-out, LRU, no hit while filling |
| `tb_stt_mram_bank` | data against a reference array; read latency 4, write occupancy 2 |
| `tb_dl1_tag_array` | both lookup ports, install, dirty, victim choice against a model |
| `tb_write_buffer` | FIFO order, full/empty, address match, push and pop together |
| `tb_dcache_ctrl` | policies with exact cycle counts: VWB hit 1, promotion 8, direct store 1, no VWB allocation on stores, background prefetch, bank-conflict stall, direct load during a promotion 5, VWB write-back |
| `tb_stt_dl1_top` | see below |

`tb_stt_dl1_top` is the end-to-end test at full size:

- It runs 20,000 random loads, stores and prefetches with locality, aimed at
  a few sets so that conflict misses are frequent.
- The L2 model refuses requests at random.
- A directed sequence makes a refill wait for a line still in the write
  buffer.
- Every load is compared with a reference memory image. At the end every word
  ever written is read back.
- It fails if any mechanism in the events list never occurs.

`tb_polybench_kernels` runs two kernels of the PolyBench suite at small
sizes through the full-size cache, with the testbench acting as the
processor:

- reg-detect, with MAXGRID 6, LENGTH 32 and 2 iterations;
- gemm, with 16 x 16 matrices.

Each kernel runs twice, once as plain code and once with prefetches of the
next streamed row into the VWB. The result arrays are read back and compared
with the same kernel computed in the testbench. With a 10-cycle L2:

| kernel | plain | with prefetch |
|---|---|---|
| reg-detect | 7226 cycles | 6000 cycles |
| gemm | 26624 cycles | 26602 cycles |

In reg-detect the prefetch more than doubles the VWB hits. In gemm the column walk
over B misses the two-line VWB on nearly every access, and prefetching A's
rows changes little. The testbench requires reg-detect to gain from
prefetching and only reports gemm.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_stt_dl1_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/dl1_pkg.sv tb/tb_stt_dl1_top.sv
./obj_dir/Vtb_stt_dl1_top
```

Replace the module and file names to run another testbench. The full-size
end-to-end run takes under a second.

## Changing the design

The sizes are package constants in `rtl/dl1_pkg.sv`. Derived widths (set, tag,
bank and row bits) follow from them. The code assumes:

- two or more cache lines per VWB line;
- a power-of-two number of banks, no larger than the number of sets;
- at least two ways.

`vwb`, `stt_mram_bank`, `dl1_tag_array` and `write_buffer` take their size as
parameters, with the package values as defaults. The unit testbenches use
that to run at smaller sizes.
