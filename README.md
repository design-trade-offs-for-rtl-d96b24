# WideWord Load/Store Buffer (WLSB)

A small, fully associative load/store buffer for the memory stage of a
single-issue, in-order embedded processor that sits next to its own DRAM bank
(a processing-in-memory node). Such a processor cannot afford a data cache or
a large load/store queue, but its on-chip DRAM is slow. The WLSB is a
four-entry buffer whose entries are not words but whole 256-bit
*WideWords*: one entry holds either one WideWord access or up to eight
scalar accesses to consecutive words. Wide entries give few comparators
(one per entry), so the buffer stays small and fast. A scalar load miss
brings in the whole line, so the neighbouring words hit afterwards.

The buffer does four jobs at once:

* **store buffer**: stores are written into it and reach memory later, in
  FIFO order; repeated stores to a line are absorbed and written once;
* **store-to-load forwarding**: loads read stores that are still pending;
* **small cache**: committed stores and fetched lines stay until replaced;
* **alias resolution** between the scalar and the WideWord instruction set
  (below).

Four entries of 256 bits hold 1024 data bits, the same as a 32-entry buffer
of 32-bit words, but need 4 address comparators instead of 32.

## An entry and its two valid fields

```
 31            5   7      0   7      0   255                              0
+---------------+-----------+-----------+----------------------------------+
| WideWord addr |  sv[7:0]  |  cv[7:0]  | word7 | word6 | ... | word0      |
+---------------+-----------+-----------+----------------------------------+
```

A 32-bit byte address splits into the 27-bit WideWord address (bits 31:5),
the word index (bits 4:2, which selects one of the eight 32-bit slots) and two
ignored bits (accesses are 4-byte aligned).

Each slot has two flags:

* `sv` (store valid): the slot holds store data **not yet in memory**;
* `cv` (cache valid): the slot holds data **equal to memory**.

A slot is readable when either flag is set. An entry is in use when any
flag is set. The flags move like this:

| event                         | sv of the slot(s)   | cv of the slot(s)        |
|-------------------------------|---------------------|--------------------------|
| store into a matching entry   | set                 | cleared                  |
| store replacing an entry      | set (others clear)  | all cleared              |
| commit of the entry to memory | cleared             | set where sv was         |
| line fetched from memory      | unchanged           | set wherever sv is clear |

An extra flag per entry records whether a load or a store allocated it.
Only the "dedicated load" replacement algorithm uses it.

## What each instruction does

`ld`/`st` are scalar (32 bit), `wld`/`wst` WideWord (256 bit).

* **ld / wld, data present**: the address matches an entry and the slot is
  valid (for `wld`, all eight slots). The load completes in the cycle it is
  presented and reads from the buffer (`rsp_hit = 1`). Pending stores are
  forwarded this way.
* **ld / wld, data absent**: the pipeline stalls. The whole line is read
  from memory into the matching entry if there is one, or else into the
  replacement victim. The load completes in the cycle the data returns
  (`rsp_hit = 0`), 2 cycles plus the memory latency after it was presented.
* **st / wst, address matches**: the data is written and the slots become
  store valid. This completes at once. It stalls only if that entry is being
  written to memory at that moment.
* **st / wst, no match**: the victim entry is taken over for the new
  address. This completes at once. If every entry holds pending stores, there
  is no victim and the store stalls until a commit frees an entry.

### The RAW hazard between the two instruction sets

Take `st A` (scalar) followed by `wld A`. The entry for A holds one valid
word, so the WideWord load has to go to memory. Memory does not yet have the
store, because it is still pending. The **alias handler** (`wlsb_alias`)
builds the line written into the entry and returned to the pipeline. It takes
every slot with `sv` set from the entry, and every other slot from the
fetched data. Every line fetched into an entry goes through this merge. The
processor is single-issue and in-order, so WAW and WAR hazards cannot occur.

### Commit order

Stores reach memory in FIFO order **per entry**. When a store first gives
an entry a pending slot, the entry's index goes into a small queue
(`wlsb_commit_fifo`, depth = ENTRIES). Whenever no load needs the memory
port, the entry at the head of the queue is written to memory as one masked
256-bit write (`wmask = sv`). When memory acknowledges it, the entry's sv
bits turn into cv bits. Stores to an entry that is already queued join its
pending slots, so eight scalar stores to a line cost one memory write. An
entry with pending stores is never replaced, so an index cannot be queued
twice.

## Replacement

A replacement pointer walks the entries in FIFO order. The victim is the
first entry at or after the pointer, wrapping round, that holds no pending
store. This rule holds for every algorithm. After an allocation the pointer
moves to the next entry. The `POLICY` parameter selects one of three
algorithms:

* `REPL_FIFO`: nothing more. This is the baseline.
* `REPL_DEDLOAD` ("1 dedicated load"): stores may never occupy all
  entries. At least one entry stays allocated by a load. When N-1 entries
  already belong to stores, a store may only replace another store entry.
* `REPL_HITPOINT` (default, "order revision next to the hit point"):
  whenever an access matches an entry, the pointer moves to the entry just
  after it. An entry that keeps being hit is therefore the last one to be
  replaced.

Example: a fragment of SPEC2K `art`, with four entries (entry used per
instruction):

| # | op | address  | Hitpoint    | FIFO        |
|---|----|----------|-------------|-------------|
| 1 | ST | 10190024 | 0           | 0           |
| 2 | LD | 10199D4C | 1           | 1           |
| 3 | LD | 101584EC | 2           | 2           |
| 4 | LD | 103DAD14 | 3           | 3           |
| 5 | LD | 10190024 | hit 0       | hit 0       |
| 6 | ST | 10190024 | hit 0       | hit 0       |
| 7 | LD | 10199D50 | hit 1       | hit 1       |
| 8 | LD | 1015852C | 2           | 0           |
| 9 | LD | 103DAC14 | 3           | 1           |
|10 | LD | 10190024 | **hit 0**   | miss, 2     |
|11 | ST | 10190024 | hit 0       | hit 2       |

Instruction 7 hits entry 1 because its address shares the 256-bit line of
instruction 2. Hitpoint then points at entry 2, which keeps the frequently
used entry 0 alive. Both columns are reproduced by `tb_wlsb_art`.

Published evaluations of this buffer on SPEC2K memory traces report the
following load hit rates (scalar code only):

| buffer                          | load hit rate |
|---------------------------------|---------------|
| 4 entries, Hitpoint             | about 57%     |
| 32-entry scalar buffer          | about 5.7 points lower |
| 8 entries, Hitpoint             | about 68%     |

Hitpoint was about 2.5 points better than FIFO. The dedicated-load variant
gained almost nothing, because stores rarely fill the buffer. These traces
are not part of this repository, so the numbers are not reproduced here.

## Interfaces and timing

`wlsb` (top), parameters `ENTRIES = 4`, `POLICY = REPL_HITPOINT`.

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `req_valid`     | in  | 1     | memory instruction in the MEM stage |
| `req_op`        | in  | 2     | `OP_LD`, `OP_ST`, `OP_WLD`, `OP_WST` (`wlsb_pkg::op_e`) |
| `req_addr`      | in  | 32    | byte address, 4-byte aligned |
| `req_wdata`     | in  | 256   | store data; scalar data in bits 31:0 |
| `req_ready`     | out | 1     | the instruction completes this cycle; low = stall |
| `rsp_valid`     | out | 1     | load result valid (goes to MEM/WB) |
| `rsp_rdata`     | out | 256   | `wld`: the line; `ld`: the word, zero-extended |
| `rsp_hit`       | out | 1     | the load was served without a memory access |
| `rsp_entry`     | out | log2 ENTRIES | entry that served the access |
| `mem_req_valid` | out | 1     | memory request |
| `mem_req`       | out | struct | `mem_req_t`: `we`, 27-bit `addr`, 256-bit `wdata`, 8-bit `wmask` |
| `mem_req_ready` | in  | 1     | memory accepts the request |
| `mem_rsp_valid` | in  | 1     | one pulse per request: read data, or write acknowledge |
| `mem_rsp_rdata` | in  | 256   | line read |

* The pipeline must hold a stalled instruction unchanged until `req_ready`
  (an assertion checks this). Hits and stores complete in the cycle they are
  presented. The buffer's lookup is combinational from the request to
  `req_ready`/`rsp_rdata`.
* There is one memory request at a time. Reads have priority over
  background commits. The memory port sequence is
  `IDLE -> RD_REQ -> RD_WAIT -> IDLE` or `IDLE -> CM_REQ -> CM_WAIT -> IDLE`
  (`wlsb_ctrl`).
* Reset `rst_n` is asynchronous and active low. It clears all valid bits,
  the pointers, the queue and the FSM. Address and data registers have no
  reset, since they are only read under a valid bit.

## Module map

| module              | role |
|---------------------|------|
| `wlsb_pkg`          | widths, `op_e`, `repl_e`, `mem_req_t`, address helpers |
| `wlsb`              | top: wires the blocks, memory request and result muxes |
| `wlsb_entries`      | entry registers with store, fill and commit update ports |
| `wlsb_comp`         | one address comparator per entry; `match` and `avail` vectors |
| `wlsb_ptr`          | write/read pointer: matched entry or replacement victim |
| `wlsb_repl`         | replacement pointer and victim search, three algorithms |
| `wlsb_alias`        | merge of a fetched line with pending store words |
| `wlsb_commit_fifo`  | FIFO order of entries with pending stores |
| `wlsb_ctrl`         | accept/stall decisions, port commands, memory FSM |

With the defaults the design has about 1210 flip-flops, 1200 of them in the
four entries.

## Where this RTL makes its own choices

The block structure, entry format, flag rules, the merge, the FIFO commit,
the store-full stall and the three replacement algorithms follow the
published description. The following are this implementation's own choices:

* **Protocols and timing**: the processor and memory handshakes, hits in the
  same cycle, and a load miss costing 2 cycles plus the memory latency.
* **Blocking loads**: a load miss stalls the pipeline. "Combining" a load
  with an earlier load to the same line happens because the line stays
  fetched; there is no miss queue.
* **Commit granularity**: commits are done per entry (one masked 256-bit
  write for all pending slots), not one write per scalar store.
* **Stall on a committing entry**: a store to the entry currently being
  written to memory waits until the write is acknowledged.
* **Clearing flags on a store**: a store into a slot clears that slot's cv
  bit, so sv and cv are never both set. When a store replaces an entry, all
  of the entry's cv bits are cleared.
* **Dedicated-load rule**: the "one dedicated load entry" is read as "stores
  may not make every entry store-allocated". The flag belongs to the
  instruction that allocated the entry.
* **Replacement pointer**: the pointer starts at entry 0, and unused entries
  are ordinary victims. A fill into a matched but partly valid entry counts
  as a hit for Hitpoint.

Not included: the 32-entry scalar buffer that the WLSB was compared against,
the processor pipeline and the DRAM. `tb/dmem_model.sv` is a behavioural
memory used only by the testbenches.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_wlsb`               | end to end at the default parameters. It runs the `art` fragment (entries and hits), load hit and miss latency, forwarding, neighbouring-word hits, the `st A; wld A` merge, the stall on a buffer full of pending stores and the stall on a committing entry. It then runs 3000 random ld/st/wld/wst with a memory that refuses 30% of cycles, drains and compares memory. Every mechanism must occur at least once. |
| `tb_wlsb_art`           | the `art` fragment on 4-entry Hitpoint, 4-entry FIFO and 8-entry Hitpoint |
| `tb_wlsb_policies`      | five configurations (4/8 entries, three algorithms). A sequential sweep must hit exactly 7 of 8 loads. A dedicated-load invariant is checked, then random traffic runs against a reference memory, and load hit rates are printed. |
| `tb_wlsb_entries`, `tb_wlsb_comp`, `tb_wlsb_ptr`, `tb_wlsb_repl`, `tb_wlsb_alias`, `tb_wlsb_commit_fifo`, `tb_wlsb_ctrl` | each block against a model written in the testbench |

Simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_wlsb \
    rtl/wlsb_pkg.sv rtl/wlsb*.sv tb/dmem_model.sv tb/tb_wlsb.sv
./obj_dir/Vtb_wlsb
```

For a block test, list `rtl/wlsb_pkg.sv`, the block's file and its
testbench. `tb_wlsb_art` and `tb_wlsb_policies` also need
`tb/dmem_model.sv`. All tests finish in well under a second.

## Changing it

* `ENTRIES` may be any value of 2 or more. The comparators, pointer, queue
  and replacement search all scale with it. Published figures cover 4 and 8.
* `POLICY` selects the replacement algorithm.
* The line format (8 x 32 bits, 27-bit address) is set in `wlsb_pkg`. It
  matches a 32-bit address space with 256-bit WideWords.
