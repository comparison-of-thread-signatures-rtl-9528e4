# MEMIF thread shadowing: memory-access signatures for hardware threads

In a hybrid multi-core (a CPU plus reconfigurable hardware slots on one FPGA), a
*hardware thread* (HWT) is an accelerator that behaves like an OS thread: it makes OS
calls over an OS interface (OSIF) and reaches main memory over a memory interface
(MEMIF). To find errors in such a thread, a second copy of it is run for a while next to
it. The original is the **thread under observation (TUO)**, the copy the **shadowing
thread (ST)**. Whatever the two threads do towards the outside is compared; any difference
means one of them is faulty.

What is compared is the thread's *signature*, at one of three levels:

| level | OS calls: name | OS calls: parameters, return value | memory: read/write, address, data |
|-------|:--------------:|:----------------------------------:|:---------------------------------:|
| 1     | yes            |                                    |                                   |
| 2     | yes            | yes                                |                                   |
| 3     | yes            | yes                                | yes                               |

Levels 1 and 2 are handled by the OS runtime on the CPU, which already sees every OS call.
Level 3 needs hardware: the memory traffic of both threads has to be intercepted on its
way to the memory controller. That hardware is what this repository holds. It guarantees
two things:

* the ST reads exactly the data the TUO read, even if memory changed in between, so both
  threads follow the same path;
* the ST's writes never reach memory; they are compared with the TUO's writes instead.

Two arbiters do this, with opposite trade-offs, and both are included:

* **`memif_arbiter_dlat`** (lowest detection latency) runs the threads in lock step. A
  wrong header is caught before it reaches memory; a wrong data word is caught while the
  write is under way.
* **`memif_arbiter_perf`** (least slowdown) lets the TUO run ahead. All of the TUO's traffic
  is recorded in a 32 KB log; the ST is checked against, and fed from, that log when it
  catches up. The TUO is only held back when the log is full. The price is that an error is
  seen only when the ST reaches it.

## Where it sits

```
        CPU (OS kernel, delegate threads, OS-call shadowing in software)
         |  OSIF links                     |  OSIF links
   +-----------+                     +-----------+
   | slot: TUO |                     | slot: ST  |
   +-----------+                     +-----------+
     tuo_req/tuo_rsp                   st_req/st_rsp
         \                                 /
          +-------- shadow_memif_top -----+        err_* --> CPU (queue + irq)
          |  memif_arbiter_dlat           |
          |  memif_arbiter_perf + log     |
          |  error_reporter               |
          +-------------------------------+
                        | mem_req / mem_rsp
                memory controller -- DRAM (system bus)
```

`shadow_memif_top` has both arbiters behind a static select, `arb_sel` (0 = dlat,
1 = perf). The unselected arbiter sees idle inputs. Change `arb_sel` only while `busy` is
low, and leave a few cycles after the last packet so that a final error message is not
lost. The CPU, the OSIF, the hardware threads themselves, the memory controller and the
DRAM are outside this RTL. Their signals are the top's ports.

## The MEMIF packet

Every stream is 32 bits wide with a valid/ready handshake. A word moves when valid and
ready are both high at a rising clock edge. A thread sends a request as a packet on its
`*_req` stream:

| word | contents |
|------|----------|
| 0    | header: bit 31 = 1 for write, 0 for read; bits 30:24 reserved (zero); bits 23:0 = length in bytes |
| 1    | start byte address |
| 2 .. | write only: `ceil(length/4)` data words |

The read data, `ceil(length/4)` words, comes back on the thread's `*_rsp` stream. The
memory side (`mem_req`, `mem_rsp`) carries the same packets. A thread has one packet in
flight at a time. A read packet ends when its last data word has been returned. Helpers
for decoding and comparing headers are in `rtl/memif_pkg.sv`.

A request word, once offered, must stay offered and unchanged until it is taken. The top
asserts this for both threads and for the memory side. A read word offered to a thread in
lock step can be withdrawn before it is taken, because it also waits for the other
thread. So a thread's `rsp_ready` must not wait for `rsp_valid`.

## Lock-step arbiter (`memif_arbiter_dlat`)

1. **Header phase.** The arbiter takes the two header words from each thread, in any
   order and at any pace. Nothing is forwarded yet. A thread that is ahead simply stalls
   with its next word (or its read) pending. This is the lock step.
2. **Decision.** Once both headers are in, they are compared: type first, then length,
   then address.
   * Equal: the TUO's header goes to memory (2 cycles). Then:
     * **Write:** one data word from each thread moves per cycle, and only when both
       threads and memory are ready. The TUO word goes to memory and the ST word is
       compared with it. On the first difference in a packet an `ERR_WDATA` message gives
       the word index. The write still completes with the TUO's data.
     * **Read:** each memory word is handed to both threads in the same cycle. It moves
       only when both are ready.
   * Different: an `ERR_TYPE`, `ERR_LEN` or `ERR_ADDR` message is sent, and nothing goes
     to memory. Each thread's packet is then closed by its own header: write data is
     taken and dropped, and a read is answered with zero words. Neither thread hangs, and
     the next packets are compared normally.

A write therefore streams at one word per cycle, but the TUO never gets further than the
ST's current access.

## Decoupled arbiter (`memif_arbiter_perf`)

The arbiter has two independent state machines around a log FIFO (`shadow_fifo`,
8192 x 32 bit = 32 KB, read without a clock so that it maps onto distributed LUT RAM).

* **TUO side.** Header words and write data go straight to memory and are pushed into the
  log in the same cycle. Read data from memory goes to the TUO and into the log in the same
  cycle. So the log holds the TUO's packets word for word, read data right after its
  header. If the log is full, the TUO's stream is held. This is the only way the ST can
  slow the TUO down.
* **ST side.** For each ST packet, both header words are popped from the log together with
  the ST's header words, then compared (one cycle).
  * Equal write: each ST data word is popped against a logged TUO word and compared. The
    first difference is reported as `ERR_WDATA`. ST data is never sent to memory.
  * Equal read: the logged read data is sent to the ST. Memory is not read again, so the
    ST sees what the TUO saw.
  * Different header: a header error is reported. The logged packet is skipped by its
    logged length, and the ST's packet is closed by its own length (dropped data, or zero
    read words). Log and ST stay aligned packet by packet.

How far the TUO can run ahead is set by `LOG_DEPTH`. Headers count too: a packet of `n`
data words takes `n + 2` log words.

## Error messages to the CPU (`error_reporter`)

Each arbiter pulses `err_valid` with an `err_msg_t` (42 bits):

| field | bits | meaning |
|-------|------|---------|
| kind  | 3    | `ERR_TYPE` 1, `ERR_LEN` 2, `ERR_ADDR` 3, `ERR_WDATA` 4 |
| pkt   | 16   | packet number since reset, counted by the arbiter (ST packets in the perf arbiter) |
| pos   | 23   | data word index for `ERR_WDATA`; header word (0 = type/length, 1 = address) otherwise |

`error_reporter` queues 16 messages (`ERR_DEPTH`). While a message waits it raises
`err_irq`. It counts all errors in `err_count`, and sets the sticky `err_overflow` when a
message arrives at a full queue. The CPU reads `err_msg` while `err_msg_valid` is high,
pops it with `err_msg_pop`, and clears the count and the overflow flag with `err_clear`.
Only the first data mismatch of a packet produces a message.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `shadow_memif_top` | `LOG_DEPTH` | 8192 | perf log depth in 32-bit words (32 KB) |
| `shadow_memif_top` | `ERR_DEPTH` | 16 | queued error messages |
| `memif_arbiter_perf` | `LOG_DEPTH` | 8192 | as above |
| `shadow_fifo` | `WIDTH`, `DEPTH` | 32, 8192 | FIFO word width and depth |
| `error_reporter` | `DEPTH` | 16 | queue depth |

Word width (32) and the header layout are fixed in `memif_pkg`.

## What follows the published scheme and what is this design's own

Taken from the published scheme:
* the three signature levels, and the split between OS calls (checked in software) and
  memory accesses (checked in hardware);
* a packet made of a header (type, length, address) and, for writes, the data;
* the lock-step arbiter: threads synchronised on every access, header errors caught
  before memory, data errors caught in flight with the write completed, and an error
  message with kind and position;
* the decoupled arbiter: a FIFO with all TUO requests and all read and written data, ST
  packets compared against it, ST reads served from it, a 32 KB buffer in distributed
  memory;
* two hardware slots, TUO and ST, beside one CPU.

This design's own choices:
* the 32-bit word, the header bit layout and the valid/ready streams;
* how a packet with a header mismatch is closed (dropped writes, zero reads);
* one data-error message per packet, the packet number in each message, and the
  priority type > length > address;
* the error queue, interrupt, counter and overflow flag;
* both arbiters in one netlist behind `arb_sel`. The published system builds one or the
  other;
* reset: active-low and asynchronous, with FIFO storage not cleared.

Not covered here:
* The shadowing arbiters serve one TUO/ST pair. A system with more hardware threads would
  need them combined with an ordinary round-robin MEMIF arbiter for the other slots.
* The OS-call side of shadowing (levels 1 and 2), with its 512-entry call FIFO, is CPU
  software and is not part of this RTL.

For orientation, the published FPGA implementation reports about 2089 LUTs and 531
registers for the lock-step arbiter, and 9075 LUTs and 661 registers for the decoupled one
(most of the LUTs are the 32 KB log). This RTL has not been mapped to an FPGA, so it cannot
be compared with those figures.

## Verification

Each testbench is self-checking, has a watchdog, and prints
`TB_RESULT checks=N failures=M`.

| testbench | covers |
|-----------|--------|
| `tb_shadow_fifo` | random push/pop against a queue model, full/empty, one-cycle fall-through (16-deep) |
| `tb_error_reporter` | order, irq, count, overflow with loss, clear (4-deep) |
| `tb_memif_arbiter_dlat` | shared read data, single memory access per pair, lock-step hold (memory untouched until the ST arrives), 1 word/cycle write rate, data/address/length/type errors with position and packet number, random stalls on all sides |
| `tb_memif_arbiter_perf` | TUO finishing while the ST is absent, ST reads from the log after memory changed, TUO held exactly at a full log (64-deep), errors only once the ST arrives, realignment after a rejected packet, independent threads with random stalls |
| `tb_shadow_memif_top` | whole design at default sizes: one computation cycle of the matrixmul, sort and gsm thread traffic through both arbiters, with the ST late, and outputs checked against a reference; injected ST data and address faults; error-queue overrun. It counts lock-step waits, log-full cycles, TUO run-ahead, arbiter switches, log-served reads, header and data errors and overflows, and fails if any never happened |

The thread programs in `tb_shadow_memif_top` reproduce the per-cycle memory traffic of
the three benchmark threads: number of reads and writes, and bytes read and written. For
gsm, the upper end of its range is used. Data written is computed from data read, so a
wrong read to the ST would show up as wrong output.

`tb/tb_hwt_model.sv` (a thread's MEMIF with `read_pkt`/`write_pkt` tasks) and
`tb/tb_mem_model.sv` (memory controller plus memory, with random back-pressure) are
behavioural models used only by the testbenches.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/memif_pkg.sv rtl/shadow_fifo.sv \
  rtl/error_reporter.sv rtl/memif_arbiter_dlat.sv rtl/memif_arbiter_perf.sv \
  rtl/shadow_memif_top.sv tb/tb_hwt_model.sv tb/tb_mem_model.sv \
  tb/tb_shadow_memif_top.sv --top-module tb_shadow_memif_top -o sim
./obj_dir/sim
```

The full-size run takes a few seconds. Lint with
`verilator --lint-only -Wall` on the same RTL files and `--top-module shadow_memif_top`.
The remaining warnings are unused header bits in the package helpers, and `rst_n` being
used both as an asynchronous reset and as an assertion `disable iff` condition.
