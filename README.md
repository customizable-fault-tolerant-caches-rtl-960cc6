# Fault tolerant direct-mapped cache with programmable placement

Process variation makes some SRAM cells in an on-chip cache fail: they are too slow, or they
are unstable on read or write. A cache line with even one failing bit in its data or its tag is
unusable. The usual fixes are spare rows, ECC, or simply never caching the memory lines that map
to a bad line. Each tolerates only a few faults, or makes performance collapse as faults grow.

This cache takes another route. It puts a small **placement table** between the address index
and the array decoder. Every memory line still goes to exactly one cache line, as in any
direct-mapped cache. But which physical line that is gets decided by software, per chip, after
self test has said which lines are bad. No table entry points to a bad line, so bad lines are
never used. Several original indices share each good line instead. Software can load any
placement:

* **Modulo placement** spreads memory line `L` over the `S - f` good lines as `L mod (S - f)`.
  It is the profile-agnostic baseline.
* **Profile-driven placement** decides which original indices share a line. It picks indices
  that are rarely busy at the same time in a program's run, so that sharing costs few extra
  conflict misses.

The hardware is the same for both. Only the table contents differ.

## Conflict sets and why the tag grows

In a direct-mapped cache with `S` lines, all memory lines with the same index form a
*conflict set*: they compete for one cache line. The placement table maps each of the `S`
conflict sets to a physical line. When two table entries hold the same line, their conflict
sets have been *merged*. For example, with 4 lines and line 3 bad, sets {L1,L5} and {L3,L7}
can both be put on line 1.

After a merge, the ordinary tag no longer identifies a memory line. Two memory lines with
different indices but equal upper address bits would land on the same physical line with the
same tag. So the tag array stores the tag **concatenated with the original index**, which is
simply the memory line number (`addr[31:5]`, 27 bits here instead of 20). The hit comparison
is done on that widened tag.

This has a useful side effect. A stored entry names its memory line exactly, whatever table
was loaded when it was filled. Reloading the table therefore never makes the cache return
wrong data. Flushing after a reload is only a matter of tidiness.

## Address path

```
 addr[31:12] tag (t=20) | addr[11:5] index (i=7) | addr[4:0] offset
                              |
                    placement table (128 x 7 bit)
                              |  physical line
                    decoder, masked by the fault status register
                              |  one-hot word lines (a faulty line never rises)
                 tag array (valid + 27-bit tag)    data array (128 x 256 bit)
                              |                              |
        {tag,index} ==? stored tag -> hit         offset[4:2] -> word mux -> data
```

The table lookup and the decoder sit in front of the arrays in the same cycle. The arrays are
read at the clock edge that accepts the request. In the next cycle the comparator and the word
mux produce the answer. The table adds delay to the index path, but no pipeline stage. If a
target clock cannot absorb that delay, the table output is the place to cut.

## Fault status register and the decoder

Self test produces one bit per line. The cache captures it in the 128-bit fault status register
when `bist_valid` is high. Software reads the register back through `cfg_rd_idx`/`cfg_rd_faulty`
(or as the whole `fault_status` vector) and uses it to build the table.

The decoder ANDs each word line with the inverse of that line's fault bit. With a correctly
built table this mask never acts. If an entry does point to a faulty line, the access finds no
valid entry. It is then served from memory and nothing is allocated, so a table error costs
performance but not correctness. This guard is an addition of this implementation.

## Building the table contents

The table is written by software through `cfg_lut_we`, `cfg_lut_idx` and `cfg_lut_line`, one
entry per cycle. The end-to-end testbench contains both placement procedures as SystemVerilog
functions (`modulo_placement`, `custom_placement` in `tb/tb_ftc_cache.sv`).

Let `g[0..S-f-1]` be the good lines in increasing order.

* **Modulo:** `map[k] = g[k mod (S-f)]`.
* **Profile-driven:**
  1. Cut a reference trace into windows, which stand for program phases. Count `r(w,k)`, the
     references in window `w` to index `k`.
  2. The *interference potential* of two conflict sets is
     `ip(i,j) = sum over w of min(r(w,i), r(w,j))`. It estimates how many extra misses they
     would cause each other if they shared a line.
  3. Start from `map[k] = k`. Repeat `f` times:
     * pick the two live sets with the smallest `ip`;
     * merge the second into the first;
     * add its counts to the first;
     * recompute the first set's `ip` against all live sets.
  4. Exactly `S - f` sets remain. Number them in order onto `g[]`.

Note that every set may move, not only those whose home line is faulty. Ties go to the lowest
index pair.

Reset loads the identity map `map[k] = k`. This is the correct table for a chip with no faults,
so the cache works as an ordinary direct-mapped cache before any configuration.

## Access sequencing

`ftc_controller` is a small blocking state machine with these states:

| state | what happens |
|---|---|
| IDLE | ready; on accept the request and its translated line are captured and the arrays are read |
| COMPARE | hit known. A read hit answers now and may accept the next request in the same cycle. A read miss goes to RD_REQ. A store updates the word on a hit and goes to WR_REQ |
| RD_REQ | line read request to memory, held until `mem_req_ready` |
| RD_WAIT | on `mem_resp_valid` the line is written into both arrays (only when the line is not faulty) and the requested word is returned straight from the memory line |
| WR_REQ | word write to memory, held until accepted; the store is answered then |

Latencies, counted from the cycle a request is accepted to the cycle `resp_valid` is high:

* read hit: 1 cycle, with back-to-back hits at one per cycle;
* read miss: 2 cycles plus the memory latency (a 98-cycle memory gives the 100-cycle miss used in
  the tests);
* store: 2 cycles when memory accepts at once.

Stores write through to memory. A store miss does not allocate a line.

## Interfaces

All signals are synchronous to `clk`. `rst_n` is an asynchronous, active-low reset.

| group | signals | notes |
|---|---|---|
| processor | `req_valid`, `req_ready`, `req_we`, `req_wstrb[3:0]`, `req_addr[31:0]`, `req_wdata[31:0]` | request taken when valid and ready are both high |
| | `resp_valid`, `resp_hit`, `resp_rdata[31:0]` | one response per request, in order |
| memory | `mem_req_valid`, `mem_req_ready`, `mem_req_we`, `mem_req_addr`, `mem_req_wstrb`, `mem_req_wdata` | the request stays stable until accepted; read addresses are line-aligned |
| | `mem_resp_valid`, `mem_resp_line[LINE_BYTES*8-1:0]` | a read is answered by one beat holding the whole line |
| configuration | `cfg_lut_we`, `cfg_lut_idx`, `cfg_lut_line`, `cfg_rd_idx`, `cfg_rd_line`, `cfg_rd_faulty`, `cfg_flush` | table write and read-back, fault bit read, clear all valid bits |
| self test | `bist_valid`, `bist_fault[S-1:0]`, `fault_status[S-1:0]` | result vector from the self-test logic, which is outside this design |

## Parameters

`ftc_cache` takes `CACHE_BYTES` (default 4096) and `LINE_BYTES` (default 32). The line count
`S`, the index, offset and widened-tag widths, and the table and fault-register sizes all follow
from them. The address and word widths (32 bits each) are package constants in `ftc_pkg`.

The three geometries this scheme is usually studied with all have 128 lines:

| configuration | parameters | tag stored |
|---|---|---|
| 4 KB, 32 B lines (default) | none | 27 bits |
| 8 KB, 64 B lines | `CACHE_BYTES=8192, LINE_BYTES=64` | 26 bits |
| 16 KB, 128 B lines | `CACHE_BYTES=16384, LINE_BYTES=128` | 25 bits |

At the default size, fault tolerance costs three things on top of a plain direct-mapped cache:

* a 128 x 7-bit table;
* 7 extra tag bits per line;
* a 128-bit fault register.

The arrays are written as flip-flop arrays with one-hot row select, mirroring the decoder and
word-line structure. In silicon they would be SRAM macros.

## What is and is not here

The implementation adds several choices of its own:

* the 32-bit address and data word;
* the write-through, no-write-allocate policy;
* the valid/ready handshakes and the one-beat line refill;
* the flush input;
* the decoder's fault mask;
* the identity reset value of the table.

The following parts are not implemented as RTL:

* **Self test.** The self-test logic that finds failing cells is assumed to exist. Its result
  enters on `bist_valid`/`bist_fault`.
* **Placement software.** Computing the table contents is software. The testbench version is
  for verification, not for synthesis.
* **Main memory.** It is outside the chip. `tb/ftc_main_memory_model.sv` is a behavioural model
  with a configurable read latency (default 100 cycles) and optional random back-pressure.
* **Set-associative caches.** Set-associative variants, and splitting one conflict set over
  several lines, are possible extensions of the scheme and are not built.

## Verification

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. The unit tests cover:

* the table: identity reset, random load, both read ports;
* the fault register: load only on strobe, bit read;
* the decoder: every line against random fault vectors;
* the tag and data arrays: model comparison, flush, byte strobes;
* the comparator and the word mux;
* the controller: the strobes of every state, back-pressure, and latencies.

`tb_ftc_cache` runs the whole cache at its default size against the memory model, with a read
miss costing 100 cycles. A reference model predicts the hit flag and the data of every access.
The test checks every latency and checks on every cycle that no faulty line's word line rises.

It runs a phased synthetic workload: four phases, each using its own quarter of the indices,
with 10% stores. The workload runs first on the fault-free cache. It then runs with 4, 16, 64
and 102 of the 128 lines faulty (3%, 12.5%, 50% and 80%). At each fault count it runs twice,
once with modulo placement and once with the profile-driven placement computed from its own
reference counts (8 windows).

With the seed the simulator uses by default, the mean access time comes out as follows (7.3
cycles fault-free):

| faulty lines | modulo | profile-driven |
|---|---|---|
| 4 (3%) | 7.7 | 7.6 |
| 16 (12.5%) | 11.5 | 8.4 |
| 64 (50%) | 18.9 | 11.4 |
| 102 (80%) | 37.7 | 23.3 |

The test fails if profile-driven placement is ever slower than modulo placement. The test also:

* points one table entry at a faulty line (the access must bypass);
* runs random loads and stores under memory back-pressure;
* requires that each of these mechanisms was seen at least once: hits, refills, write
  hits/misses, back-to-back hits, back-pressure, misses between merged sets, bypass, self-test
  load, table reload, flush, remapped accesses.

`tb_ftc_cache_configs` runs random loads and stores, checked against a reference model, on the
8 KB/64 B and 16 KB/128 B geometries. It runs them with a quarter of the lines faulty, modulo
placement, and read misses of 108 and 124 cycles.

`tb_ftc_cache_4line` shrinks the cache to four 16-byte lines with line 3 faulty. It loads a
table that sends conflict sets 1 and 3 to line 1. It then checks that memory lines 0x10, 0x30
and 0x70 displace each other correctly. This shows the widened tag at work: 0x10 and 0x30 have
the same ordinary tag.

To run a testbench with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/ftc_pkg.sv tb/tb_ftc_cache.sv --top-module tb_ftc_cache -o sim
./obj_dir/sim
```

Replace `tb_ftc_cache` with any other testbench name. Each test takes a few seconds at most.
