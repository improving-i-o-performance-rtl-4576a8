# Conditional store buffer for uncached I/O stores

Stores to I/O devices must reach the bus in program order, exactly once, and
without speculation, so processors normally send each uncached store as its
own single-beat bus transaction. That wastes a bus built for cache-line
bursts, and if a device needs several words written as one unit, software
has to take a lock around the writes.

The conditional store buffer (CSB) lets software gather up to one cache line
of uncached stores and send it as one burst, under its own control. Stores
to pages marked *combining* collect in a one-line buffer. A final
*conditional flush* sends the line only if no other process has touched the
buffer in between. It reports success or failure, and on failure the
software simply retries. The scheme is optimistic and lock-free, in the
spirit of load-linked/store-conditional. The design follows the CSB
described in the paper "Improving I/O Performance with a Conditional Store
Buffer". The surrounding uncached path (dispatcher, uncached buffer, system
interface) is built here in its simplest form, to give the CSB something to
run in.

## How the conflict check works

The CSB holds four things:

| register      | content                                                     |
|---------------|-------------------------------------------------------------|
| data buffer   | one cache line (64 bytes = 8 doubleword slots by default)   |
| address       | line address of the most recent combining store             |
| PID           | process ID that issued it                                   |
| hit counter   | stores accepted in a row from that process to that line     |

**Combining store.** The store's line address and the current process ID are
compared with the saved ones.

* On a match, the bytes go into their slot and the counter goes up by one.
* On a mismatch, or if the buffer is empty, the whole line is cleared first.
  Then the bytes are written, address and PID are saved and the counter
  restarts at 1.

Stores may arrive in any order. Only their number matters.

**Conditional flush.** This is the SPARC atomic `swap` aimed at combining
space. Its source register holds the number of stores the program issued.
The flush succeeds when three things hold: that number equals the counter,
the flush address lies in the saved line, and the PID matches. Then:

* on success, the line is committed and goes to the bus as one full-line
  burst. Slots that were never written go out as zeros, so no stale data
  leaks. The swap returns its source value unchanged.
* on failure, the line and the counter are cleared, nothing reaches the bus,
  and the swap returns 0.

Software compares the returned value with what it sent and branches back to
its first store on a mismatch.

Why a count is enough: say process A is interrupted halfway through its
sequence, and process B runs a combining store. B's store clears the buffer
and sets the counter to 1 with B's PID. When A comes back and flushes, the
PID or the count no longer matches. A gets 0 and retries. The line address
is compared as well, so two threads that share a PID but write different
lines also fail.

Points to keep in mind:

* The CSB has one entry. After a successful flush, new combining stores and
  flushes stall (`req_ready` low) until the system interface has taken the
  line. The system interface takes it at the start of its burst, not at the
  end.
* A flush sent to an empty buffer (counter 0) always fails.
* The counter saturates at its maximum (255 with the default `CNT_W = 8`).
* Uncached loads do not look into the CSB. A load to a line under combination
  returns what the device holds. This is intended: nothing is committed
  before the flush.

## The uncached path around it

```
 processor ──req──► uc_dispatch ──combining store / flush──► csb_buffer ──line──┐
                        │                                                       ▼
                        └──other uncached loads/stores──► uc_buffer ──────► sys_if ──► system bus
                 ◄──rsp (flush result or load data)──────────────────────────────┘
```

* **`uc_dispatch`** steers each operation by the page attribute `req_comb`,
  which the TLB supplies:
  * a store in combining space goes to the CSB;
  * a swap in combining space is the conditional flush;
  * every other uncached load or store goes to the uncached buffer.

  It also forms the byte enables from size and address, and merges the two
  response sources.
* **`uc_buffer`** is a plain FIFO (4 entries by default), one bus transaction
  per entry.
* **`sys_if`** is the bus master. It serves one transaction at a time.

**Order.** Uncached accesses keep program order, and a committed line keeps
its place among them. Two rules enforce this:

* the dispatcher holds new uncached loads and stores while a committed line
  waits;
* the system interface takes a line only when the uncached buffer is empty.

**Memory barrier.** `mem_idle` is high when the uncached buffer is empty, no
committed line waits and the bus is idle. A memory barrier waits for it.

## Bus timing

The bus runs `CLK_RATIO` times slower than the processor (default 6). The
top derives a bus-cycle enable `bus_ce` and brings it out. All bus outputs
are registers that change only on `bus_ce`.

| bus (`MUX_BUS`, `BUS_BYTES`) | doubleword store | 64-byte line |
|------------------------------|------------------|--------------|
| multiplexed, 8 bytes (default) | 2 cycles (address, data) | 9 cycles (address + 8 beats) |
| split, 16 bytes              | 1 cycle          | 4 cycles     |
| split, 32 bytes              | 1 cycle          | 2 cycles     |

On the split bus the address goes out in the same cycle as the first data
beat. A transaction on the next address can start in the cycle right after
the last data beat.

Two bus options add overhead:

* **`TURNAROUND`** inserts idle cycles after every transaction. With one idle
  cycle, two doubleword stores on the multiplexed bus take 5 cycles.
* **`ACK_DELAY`** models selective flow control. The target accepts
  (`bus_ack=1`) or rejects each address in the cycle `ACK_DELAY-1` after it.
  Uncached accesses stay strongly ordered, so the next address waits for
  that answer: addresses are at least `ACK_DELAY` cycles apart. A rejected
  transaction is sent again, and a rejected load gets no data.

**Uncached loads.** A load holds the bus until the target returns one beat on
`bus_r_valid`, at the earliest in the cycle after the address.

**Arbitration** is not modelled. The interface behaves as the only master,
with arbitration assumed hidden under the previous transaction.

Measured bandwidth, in bytes per bus cycle, CSB / one transaction per
store. Each row is one bus configuration; all rows use a 64-byte line and
a bus clock of 1/6 unless noted.

| bus | 16 B | 64 B | 1 KB |
|-----|-----:|-----:|-----:|
| multiplexed 8 B (default; same at bus clock 1/3 and 1/9) | 1.78 / 4.00 | 7.11 / 4.00 | 7.11 / 4.00 |
| multiplexed 8 B, 32-byte line | 3.20 / 4.00 | 6.40 / 4.00 | 6.40 / 4.00 |
| multiplexed 8 B, 128-byte line | 0.94 / 4.00 | 3.76 / 4.00 | 7.53 / 4.00 |
| multiplexed 8 B, turnaround 1 | 1.78 / 3.20 | 7.11 / 2.78 | 6.44 / 2.67 |
| multiplexed 8 B, ack delay 4 | 1.78 / 2.67 | 7.11 / 2.13 | 7.11 / 2.01 |
| multiplexed 8 B, ack delay 8 | 1.78 / 1.60 | 7.11 / 1.10 | 7.11 / 1.01 |
| split 16 B | 4.00 / 8.00 | 16.00 / 8.00 | 16.00 / 8.00 |
| split 32 B | 8.00 / 8.00 | 32.00 / 8.00 | 32.00 / 8.00 |
| split 16 B, turnaround 1 | 4.00 / 5.33 | 16.00 / 4.27 | 12.96 / 4.02 |
| split 16 B, ack delay 4 | 4.00 / 3.20 | 16.00 / 2.21 | 16.00 / 2.01 |
| split 16 B, ack delay 8 | 4.00 / 1.78 | 16.00 / 1.12 | 8.26 / 1.01 |

All of these follow one formula. Let L be the cycles of one transaction and
S = max(L + `TURNAROUND`, `ACK_DELAY`) the distance between two address
cycles. Then k transactions take (k − 1)·S + L bus cycles. A turnaround
after the last transaction is not counted.

Transfers much smaller than a line lose with the CSB, because it always
sends a whole line. From one line upward it comes close to the bus peak. A
line burst of at least `ACK_DELAY` cycles hides the acknowledgment
completely. Single-beat stores never can.

For an atomic update of *n* doublewords, the flush result comes back *n* + 1
processor cycles after the sequence starts: one cycle per store, one for the
flush. The line then drains in the background. This is measured at the
request port of `csb_system`. The paper's figures are for a whole
out-of-order processor, where uncached operations issue only at
retirement. There the CSB sequence costs about n + 5 cycles. It grows by
one cycle per doubleword, the same slope as here. A lock-protected sequence
of plain uncached stores grows by about 12 cycles per doubleword instead.

## Files

| file | contents |
|------|----------|
| `rtl/csb_pkg.sv` | shared types: operation kinds, uncached request struct, byte-enable helper |
| `rtl/csb_buffer.sv` | the conditional store buffer |
| `rtl/uc_buffer.sv` | uncached buffer (FIFO) |
| `rtl/uc_dispatch.sv` | routing of uncached operations, byte enables, response merge |
| `rtl/sys_if.sv` | system interface / bus master |
| `rtl/csb_system.sv` | top level: the four blocks plus the bus clock enable |
| `tb/tb_*.sv` | self-checking testbenches, one per block and two for the top |
| `tb/io_target.sv`, `tb/sif_harness.sv`, `tb/csb_env.sv` | bus target model and per-configuration test harnesses |

### Top-level parameters (`csb_system`)

| parameter | default | meaning |
|-----------|---------|---------|
| `LINE_BYTES` | 64 | cache line, the CSB size and burst length |
| `BUS_BYTES` | 8 | bus data width |
| `MUX_BUS` | 1 | 1 = multiplexed address/data bus, 0 = split bus |
| `TURNAROUND` | 0 | idle bus cycles after each transaction |
| `ACK_DELAY` | 0 | acknowledgment delay in bus cycles, 0 = none |
| `CLK_RATIO` | 6 | processor clocks per bus cycle |
| `UCB_DEPTH` | 4 | uncached buffer entries |
| `PID_W` | 8 | process ID width |
| `CNT_W` | 8 | hit counter width |

Limits: `LINE_BYTES` and `BUS_BYTES` must be powers of two, with
8 ≤ `BUS_BYTES` ≤ `LINE_BYTES`. Accesses must be naturally aligned.
Addresses are 64 bits wide. Reset is synchronous and active low.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/csb_pkg.sv \
          tb/tb_csb_system_full.sv --top-module tb_csb_system_full -o sim
./obj_dir/sim
```

Swap in another testbench name to run the others:

* `tb_csb_buffer`: random stores and flushes from two processes against a
  byte-level reference model.
* `tb_uc_buffer`, `tb_uc_dispatch`: the two smaller blocks.
* `tb_sys_if`: six bus configurations, checking address spacing, beat
  contents and retries.
* `tb_csb_system`: end to end in four configurations (64-, 128- and 32-byte
  lines; multiplexed and split buses; turnaround and rejections). It checks
  device memory against a shadow copy, and checks that every mechanism (hit,
  conflict, wrong count, stall, held uncached access, load bypass, burst,
  retry) occurs.
* `tb_csb_system_full`: the bandwidth and atomic-access benchmarks at the
  default parameters.
* `tb_csb_bandwidth`: the bandwidth benchmark on all bus
  configurations of the table above, run side by side (13 runs; the first
  row stands for three bus clock ratios). Each run checks
  exact cycle counts.

## What is this design's own, and what is left out

Taken from the paper:

* the CSB registers and their rules;
* the swap-as-flush convention and its return values;
* full-line bursts with zero padding;
* the single entry and the stall it causes;
* loads bypassing the CSB;
* the bus models and their cycle counts;
* the turnaround and acknowledgment-delay overheads.

Choices made here, where the paper is silent:

* widths: 64-bit addresses, 8-bit PID and 8-bit counter;
* counter saturation, and the failure of a flush to an empty buffer;
* byte-enable stores;
* uncached buffer depth;
* the ordering rule between a committed line and later uncached accesses;
* one clock domain with a bus enable in place of two clocks;
* load timing on the bus, and retry after a rejection;
* all handshakes.

Not built:

* the processor, caches, TLB, process-ID register, bus, devices and main
  memory. Their signals are ports of `csb_system`; a behavioural device model
  is in `tb/io_target.sv`.
* the two-line variant of the CSB. The paper mentions it as a possible
  extension but does not evaluate it.
* the combining uncached buffers (R10000-style and similar) and the
  lock-based access sequence. They serve only as points of comparison. This
  uncached buffer never combines stores.
