# MAPLE memory-access engine (SystemVerilog)

This is a synthesizable implementation of MAPLE, a small memory-access engine that sits on its own tile of a manycore SoC. It is described in "Tiny but Mighty: Designing and Realizing Scalable Latency Tolerance for Manycore SoCs".

Cores talk to MAPLE with ordinary loads and stores to one memory-mapped 4 KB page. MAPLE keeps eight hardware FIFO queues in a 1 KB scratchpad. With them it can:

- pass data between threads (produce/consume);
- load pointed-to data asynchronously on behalf of a core, delivering it in program order;
- prefetch into the shared last-level cache;
- run whole indirect loops `A[B[i]]` by itself (LIMA, "loops of indirect memory accesses").

It has its own TLB and page-table walker, so cores hand it virtual addresses.

## Files

| File | Contents |
|---|---|
| `rtl/maple_pkg.sv` | sizes, operation codes, message structs |
| `rtl/maple.sv` | top level, wires everything below together |
| `rtl/maple_req_dec.sv` | MMIO request decoder, routes to one of three pipelines |
| `rtl/maple_consume_pipe.sv` | consume pipeline |
| `rtl/maple_produce_pipe.sv` | produce pipeline (data, pointer, prefetch) |
| `rtl/maple_config_pipe.sv` | configuration pipeline, LIMA registers, counters |
| `rtl/maple_queue_ctrl.sv` | circular-queue pointers and per-entry "written" bits |
| `rtl/maple_scratchpad.sv` | 256 x 32-bit storage, 1 write + 1 read port |
| `rtl/maple_mmu.sv` | 16-entry fully associative TLB + Sv39 page-table walker |
| `rtl/maple_lima.sv` | LIMA loop engine |
| `rtl/maple_resp_enc.sv` | round-robin merge of replies to cores |
| `rtl/maple_mem_req_enc.sv` | round-robin merge of memory requests, transaction-id stamping |
| `rtl/maple_mem_resp_dec.sv` | steers memory responses by transaction id |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_maple.sv` | end-to-end testbench of the top at full size |

## Top-level interface (`maple`)

Parameters: `NQ = 8` queues, `ENTRIES = 256` scratchpad words, `TLB_N = 16`.

- **Core side.** `core_req_*` carries a load or store with the core id, a tag, the 12-bit page offset and 64-bit store data. `core_resp_*` returns the core id, the tag and the load data. A store gets an ack with data 0.
- **Memory side.** `mem_req_*` carries a 40-bit physical address, a size (word, double word or 64-byte line), a prefetch flag (LLC fill only, no response), a non-coherent flag (go straight to DRAM) and a transaction id. `mem_resp_*` returns the transaction id and right-aligned data. Responses may come back in any order and are always accepted.
- **Interrupt.** `irq` signals a page fault.

The NoC and its adapter are not part of this design. A P-Mesh or any other fabric attaches to these valid/ready ports.

## Address map

Inside MAPLE's page:

- offset bits 11..9 select the queue;
- bits 8..3 are the operation code, so there are 64 load codes and 64 store codes.

| Access | Code | Operation |
|---|---|---|
| load | 0 | CONSUME: pop the head of the queue; waits while the queue is empty |
| load | 1 | CONSUME2: pop the next two entries, returned as {second, first} in one 64-bit load |
| load | 8 | OPEN: bind the queue; returns 1 on success, 0 if already bound |
| load | 9 | CLOSE: unbind the queue; returns 1 |
| load | 16 | virtual address of the last page fault |
| load | 17 | status: bit 1 LIMA busy, bit 0 fault pending |
| load | 20–23 | 32-bit counters: produces (prefetches included), consumed entries, TLB misses, cycles with a produce stalled on a full queue |
| store | 0 | PRODUCE: push the 32-bit data |
| store | 1 | PRODUCE_PTR: push the 32-bit word at virtual address `data`, loaded coherently through the LLC |
| store | 2 | PREFETCH: prefetch the line at virtual address `data` into the LLC |
| store | 3 | as code 1, but a non-coherent load straight from DRAM |
| store | 8 | INIT: empty all queues, unbind them and set the entries per queue to 2^data[3:0] |
| store | 9 | page-table root PPN |
| store | 10 | flush the TLB |
| store | 11 | fault handled: clear the interrupt and let translations resume |
| store | 16, 17, 18 | LIMA arguments A, B, begin |
| store | 19 | LIMA with end = data: prefetch A[B[i]] into the LLC for i in [begin, end) |
| store | 20 | LIMA_PRODUCE with end = data: push A[B[i]] into the addressed queue |

A LIMA with A = 0 uses `&B[i]` as the pointer. B holds 32-bit indices and A holds 4-byte elements.

## How it works

### Request decoder

The decoder registers the request. It sends:

- CONSUME and CONSUME2 loads to the consume pipeline;
- store codes 0–3 to the produce pipeline;
- everything else to the configuration pipeline.

### Queues

The queue controller divides the scratchpad into 8 regions of 2^k entries, with k = 5 after reset. That gives 8 × 32 × 4 B = 1 KB.

Each queue has head and tail pointers and a count. Each scratchpad entry has a "written" bit. A produce reserves the tail slot first and fills it later. A consume may pop the head only once the head's slot is written. This is what keeps data in program order when loads return out of order.

If a smaller size is chosen, the upper part of the scratchpad is unused. If a larger size is chosen, the queues whose region would fall outside the scratchpad are unusable.

### Produce pipeline

Each queue has one buffered produce, and LIMA has one extra slot. A produce waits in its slot until:

- its pointer (if any) is translated, one slot at a time through the MMU; and
- its queue has a free entry.

Then it reserves the tail entry. A data-produce writes the entry. A pointer-produce sends a load whose transaction id is the slot's scratchpad index; the memory response is written straight into that entry.

A prefetch needs no queue entry. It issues a line prefetch after translation.

A core's store is acknowledged once its entry is reserved and its write or load is issued, so the core can retire the store without waiting for memory. LIMA's pointers are not acknowledged.

A produce to a full queue simply waits in its slot. The core's next produce to that queue is then back-pressured at the request port. Nothing overflows.

### Consume pipeline

Each queue has one buffered consume. Each cycle the lowest-numbered queue whose buffered consume is waiting and whose head is written is chosen. It pops the head, reads the scratchpad and replies.

A CONSUME2 stays in its slot for two pops. The first entry is parked in a per-queue register, and the reply carries both entries. For 32-bit data such as the gathered vector of a sparse matrix-vector product, the core then needs half as many loads. Consumes to other queues can be served between the two pops.

A consume to an empty queue waits in its slot without polling. It does not block consumes to other queues.

### Configuration pipeline

It decodes one request per cycle. It issues the one-cycle commands (INIT, page-table base, flush, fault handled, LIMA start) and replies one cycle later.

### MMU

The TLB has 16 fully associative entries, including 2 MB and 1 GB superpages, with round-robin replacement. On a miss, the page-table walker reads Sv39 page-table entries through the memory port, one level per round trip.

An invalid or malformed entry raises `irq` and records the faulting virtual address. Translations are then held off until the driver stores code 11. The requester whose translation faulted retries afterwards. The driver therefore:

1. reads the address (load 16);
2. fixes the page table;
3. stores code 11.

Code 11 must be issued after the interrupt is seen.

### LIMA

LIMA translates the 64-byte-aligned chunk of B that holds B[i] and fetches it. It then emits one pointer per element of the chunk into its produce slot, as a prefetch or as a queue produce. It repeats chunk by chunk until `end`.

While LIMA is busy, a new start is ignored; software can check the busy bit in the status load.

## Timing

- A consume to a queue whose head is ready takes 5 cycles from the request entering MAPLE to the response leaving it: decoder 1, consume buffer 1, pop/read 1, reply register 1, response encoder 1.
- A CONSUME2 whose two entries are ready takes 6 cycles, one more for the second pop.
- A data-produce is acknowledged 4 cycles after the produce pipeline accepts it, when its queue has room.
- A TLB hit adds 2 cycles to a pointer-produce. A miss adds one memory round trip per page-table level.
- Memory responses have priority at the scratchpad write port. A data-produce write waits while a response is being written.

## What follows the paper and what does not

Taken from the paper:

- operation codes in address bits 3–8;
- separate consume, produce and configuration pipelines around a queue controller and a shared scratchpad;
- 8 circular queues of 32 four-byte entries in 1 KB;
- queue slot index as the memory transaction id, giving program-order delivery;
- buffering, not polling or overflowing, on empty and full queues;
- a 16-entry fully associative TLB with a page-table walker and a page-fault interrupt whose address the driver reads back;
- LIMA fetching B in 64-byte chunks, with speculative and queue-producing variants;
- a 5-cycle internal latency;
- loading two 32-bit queue entries with one 64-bit load.

Choices of this design, not given in the paper:

- exact opcode numbers;
- queue-id field position;
- message formats;
- Sv39 page tables and a 40-bit physical address;
- one buffer slot per queue in each pipeline;
- round-robin arbiters;
- event counters;
- queue size set by INIT;
- the per-queue register that parks the first entry of a CONSUME2;
- the fault-handled store.

Simplifications:

- LIMA holds its current chunk of B in a local 64-byte register instead of scratchpad entries. Eight 32-entry queues already fill the 1 KB scratchpad, so there would be no room for it. LIMA keeps one chunk in flight.
- Request-port blocking: each queue has a single produce buffer. A second produce to a queue whose buffer is occupied is held at the shared request port. That stalls every core until the queue drains, and it deadlocks if the consumer's load is stuck behind it. Software must therefore wait for a produce's ack before issuing the next produce to the same queue. Blocking MMIO stores do this naturally.
- The NoC routers, caches, DRAM and cores of the host SoC are outside this design. The end-to-end testbench models the memory, including random latency, out-of-order responses and page tables.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl --top-module tb_maple rtl/maple_pkg.sv tb/tb_maple.sv
./obj_dir/Vtb_maple
```

`tb_maple` runs the top at its default size. It covers:

- binding;
- data and pointer produces, coherent and non-coherent;
- superpages;
- a page fault serviced by a driver model;
- prefetches;
- both LIMA variants;
- a full-queue stall;
- a consume waiting on an empty queue;
- resizing;
- TLB flush;
- counters.

It fails if any of these mechanisms never occurred.

`tb_maple_spmv` runs a sparse matrix-vector product through the engine three ways and compares y with a direct computation:

1. an Access core gathers `x[col[j]]` with pointer produces while an Execute core consumes two values per load;
2. a single LIMA_PRODUCE gathers the same values;
3. a speculative LIMA prefetches them.

The matrix has 40 rows, up to 8 non-zeros per row and a 512-element x.

The engine-level testbenches are in `tb/tb_<module>.sv`. Each compares its module against an independent model under random traffic.
