# A bus-based reconfigurable system: processor, AMBA bus and reconfigurable units

This design connects a processor to hardware accelerators that live in an
embedded FPGA (e-FPGA). The accelerators are *reconfigurable units* (RUs), and
the processor reaches them as ordinary memory-mapped slaves on an on-chip AMBA
bus. The e-FPGA can be reloaded while the system runs, either entirely or in
part, so the set of RUs on the bus changes over time. A partial reload can go
on while another RU keeps computing.

The RTL covers the hardware between the processor's caches and the e-FPGA:

* the processor's bus side: an AHB master interface and a queue for
  non-cacheable accesses;
* an AHB with a memory controller and SRAM, and an APB behind a bridge;
* a configuration controller that streams bitstreams from a configuration
  PROM into the e-FPGA;
* two RUs: a scalable matrix-multiplication unit and an LZ77 string-matching
  unit.

The processor itself, its caches and the e-FPGA's configuration logic are not
included. Their connections are ports of the top module `rcs_top`.

```
 processor (L2 line requests)   (NC loads/stores)
            |                        |
            |                  nc_queue (NC stores before NC loads)
            |                        |
            +---- ahb_master_if -----+   NC first, skip count out
                        |
 ===================== AHB (ahb_interconnect: decoder, mux, default slave) =====
      |                 |                       |                    |
   mem_ctrl         apb_bridge              matmul_ru             lz77_ru
   + sram               |                  (buffers)     (FIFO, length, pointer)
                        |
 ===================== APB =====================================================
      |                       |                          |
   config_ctrl          matmul_ru regs              lz77_ru regs
      |  \
 config_prom  cfg_* stream --> e-FPGA (outside); ru_present --> bus enables, RU resets
```

## Address map

The AHB decodes `HADDR[31:28]`. The APB decodes `PADDR[15:12]`.

| Address | Slave |
|---|---|
| `0x0xxx_xxxx` | SRAM through the memory controller (64 Ki words by default) |
| `0x8000_0xxx` | configuration controller registers (APB) |
| `0x8000_1xxx` | matmul RU control and status (APB) |
| `0x8000_2xxx` | LZ77 RU control and status (APB) |
| `0x9xxx_xxxx` | matmul RU row, column and output buffers (AHB) |
| `0xAxxx_xxxx` | LZ77 RU FIFO input port and results (AHB) |

Any other region gets an AHB ERROR from the default slave. An RU region whose
RU is not configured also gets an ERROR.

The address ranges are fixed in the decoder, which is how a bus-based system
of this kind works. The processor's non-cacheable address ranges must match
them. The numbers themselves are this design's own choice.

## The processor's side of the bus

The processor uses the bus in two ways.

* **L2 line transfers.** A fill or write-back of a 64-byte L2 line becomes a
  16-beat `INCR16` burst. Requests of 1 to 16 beats are accepted.
* **Non-cacheable (NC) accesses.** The RU address ranges must not be cached,
  because the RUs change their buffers on their own. Loads and stores to
  those ranges therefore skip the caches. They are at most a double word
  (one or two beats) and go through `nc_queue`.

`nc_queue` is a FIFO in program order. It also counts NC stores that have been
accepted but have not yet finished on the bus. Its `load_issue_ok` output is
high only when that count is zero. The processor's load/store unit must not
issue an NC load before then. This rule keeps out-of-order execution from
reading an RU status register before an earlier command write to the same RU
has arrived. The queue does not reorder anything itself. The gating is
exported so that the pipeline can hold the load.

`ahb_master_if` accepts a new request only when it is idle. NC requests always
win over L2 requests, since they are short and an RU may be waiting for them.

Other behaviour of the master interface:

* Beats are pipelined: the address phase of beat *k+1* overlaps the data
  phase of beat *k*.
* On an ERROR response the burst is cancelled and the request ends with
  `error` set.
* One idle cycle separates requests.
* `skip_count` is the number of data phases still due. It is a lower bound
  on how many more cycles the current transfer takes. Because the processor is
  the only master (there is no arbiter), this bound is exact apart from slave
  wait states. A simulator that runs the processor model on its own can use it
  to know how long it may advance without talking to the bus.

## Bus fabric

`ahb_interconnect` decodes the address phase into `HSEL` lines. It registers
the selected slave for the data phase and returns that slave's response.
`slave_en` removes a slave from the map. The top drives it from the
configuration controller's RU-present mask. Deselected or unmapped addresses
go to a default slave that gives the standard two-cycle ERROR.

`mem_ctrl` is a zero-wait AHB slave in front of `sram`. The SRAM has a
synchronous read port and a byte-enabled write port. Under pipelined AHB a
write's data arrives one cycle after its address, so a read of the same word
in the next cycle would see old data. The controller detects that case and
forwards the written bytes (`bypass_hit`).

`apb_bridge` is the only APB master. Each APB access costs one AHB wait state:
the SETUP cycle holds `HREADYOUT` low, and the ACCESS cycle completes the
transfer. This is AMBA 2 APB, so there is no `PREADY` and no `PSLVERR`.

## Reconfiguration

Bitstreams are stored in `config_prom` (2^20 words of 32 bits). It has a
programming port so that a testbench or loader can fill it.

The processor only starts a reconfiguration. `config_ctrl` moves the words to
the e-FPGA over a separate 32-bit path at one word per clock, and the
processor polls its status register.

| Offset | Register | Use |
|---|---|---|
| `0x00` | CTRL | write: bit 0 start, bit 1 partial, bits 7:4 target RU |
| `0x04` | SRC | first PROM word |
| `0x08` | LEN | number of words |
| `0x0C` | STATUS | bit 0 busy, bit 1 done, bits 15:8 RU-present mask |
| `0x10` | COUNT | words delivered so far |

Timing, with the APB write of CTRL ending in cycle 0:

* PROM reads go out in cycles 1..LEN.
* `cfg_we`/`cfg_data` deliver the words in cycles 2..LEN+1.
* `cfg_cs` is high for LEN+1 cycles.
* From cycle LEN+2, STATUS shows not busy and done.

The RU-present mask (bit 0 matmul, bit 1 LZ77) shows which RUs hold a valid
configuration:

* After reset the mask is LZ77 only. LZ77 is the base configuration.
* A **full** reconfiguration clears the whole mask when it starts, because the
  whole fabric is being rewritten.
* A **partial** reconfiguration clears only the target's bit. The other RUs go
  on working, and their bus traffic overlaps the configuration stream.
* The target's bit is set when the last word has been delivered.

The top uses the mask in two ways. A missing RU's AHB region is taken off the
bus, so it answers ERROR. The missing RU is also held in reset, so it starts
clean when it appears. While it is missing, its APB registers read their reset
values, with busy low.

The e-FPGA interface is reduced to `cfg_cs`, `cfg_we`, `cfg_data` (32 bits),
`cfg_target` and `cfg_partial`. A real device's configuration port (frame
addresses, CRC, start-up sequence) is not modelled.

## Matrix-multiplication RU

`matmul_ru` computes one element of C = A·B per command: the dot product of a
row of A and a column of B. The vector is cut into *boxes* of 16 elements
(`mm_box`).

* One box is enough for 16×16 matrices. Four boxes, the default `NBOX`, cover
  64×64 matrices.
* The SIZE register selects how many boxes take part.
* Longer vectors are split into passes. Software adds the partial results.

### Inside a box

A box has 16 row cells, 16 column cells and four multiply-accumulate units.
Each MAC is shared by four element pairs through a 4:1 multiplexer. In four
cycles every MAC has added its four products. In the fifth cycle an adder sums
the four MACs into the box's output register.

A final adder outside the boxes sums the box outputs and writes the result
into the output row buffer. The timing of one element, with the APB
start write ending at t = 0:

| cycle | action |
|---|---|
| t = 1..4 | each MAC accumulates one product per cycle |
| t = 5 | box sums registered |
| t = 6 | final sum written to the output buffer, STATUS busy drops |

So one element takes six cycles. The element and accumulator widths are this
design's choices: `DATA_W` = 16-bit signed inputs and `ACC_W` = 32-bit
wrapping sums.

### Buffers and the column prefetch

The column buffer is double-banked. AHB writes to the column region always go
to the bank that is *not* being computed on. Each start makes the
most recently written bank the active one. Software therefore writes column
*j+1* while column *j* is computing, and the computation hides behind the
bus time of the column transfer.

The output row buffer holds 16 results. The CTRL write says which entry the
next result goes to, so one row of A can be multiplied by 16 columns before
the results are read back.

| AHB offset | Buffer |
|---|---|
| `0x0000 + 4i` | row element *i* (low `DATA_W` bits of the word) |
| `0x1000 + 4i` | next-column element *i* (write bank) |
| `0x2000 + 4j` | output element *j* (read) |

| APB offset | Register |
|---|---|
| `0x00` | CTRL: bit 0 start, bits 15:8 output index |
| `0x04` | STATUS: bit 0 busy, bit 1 done |
| `0x08` | SIZE: boxes used, 1..NBOX (NBOX after reset) |

A typical software loop for one row:

1. Write the row.
2. Write column 0, then start the element.
3. Write column 1 while element 0 computes.
4. Poll STATUS, then start the next element, and so on.
5. Read back the 16 outputs.

Buffer entries beyond the active length must hold zeros. `rcs_cpu_model.svh`
shows the complete routine, including padding and splitting into passes.

## LZ77 string-matching RU

LZ77 compression replaces a string with a reference to an earlier copy. The
reference is a length and a pointer into a *search window* of the last P bytes
(256), and it applies to the start of a *lookahead window* of the next Q bytes
(16). `lz77_ru` does the expensive part in hardware: finding the first longest
match. Software reads the length and pointer and forms the codeword.

### Datapath

* An input FIFO of 512 bytes (2P). The processor fills it over the AHB, one
  byte per write, even while a search is running.
* A *data buffer* of P+Q bytes: the search window followed by the lookahead
  window. New bytes enter on the right from the FIFO and shift the buffer left.
* An *encoding buffer* of the same size. It is loaded from the data buffer
  and then shifts left one byte per cycle.
* Q−1 comparators. Comparator *j* compares lookahead byte *j* with encoding
  byte *j*. In match cycle *i*, the encoding buffer has shifted *i* times, so
  the comparators test the string that starts at search position *i*. That
  string may run on into the lookahead window, as LZ77 allows.
* `match_len_enc` counts the leading run of equal comparators. That count is
  the match length at that position, from 0 to Q−1.
* A length register, an index register that counts the shifts, and a pointer
  register. When the current length is strictly greater than the stored one,
  the length register takes it and the pointer register takes the index. The
  pointer therefore names the *first* position with the longest match.

### A round

A CTRL write with bit 0 set and a shift count *n* in bits 24:16 starts a
round:

1. *n* bytes move from the FIFO into the data buffer, one per cycle. The round
   waits whenever the FIFO is empty (`fifo_empty_wait`).
2. One cycle loads the encoding buffer and clears the length and index
   registers.
3. P match cycles run.

If the bytes are already in the FIFO, a round takes *n* + 1 + P cycles. At the
start of a file the shift count is Q, to fill the lookahead window. After that
it is the number of bytes the last codeword consumed: length + 1.

| AHB offset | Use |
|---|---|
| `0x0` | write: push `HWDATA[7:0]` into the FIFO |
| `0x4` | LENGTH (read) |
| `0x8` | POINTER (read) |
| `0xC` | STATUS (read) |

| APB offset | Register |
|---|---|
| `0x00` | CTRL: bit 0 start, bits 24:16 shift count |
| `0x04` | STATUS: bit 0 busy, bit 1 done, bits 25:16 FIFO count |
| `0x08` | LENGTH |
| `0x0C` | POINTER |

**Flow control caveat.** A push into a full FIFO is held with AHB wait states
(`fifo_full_wait`) until a round drains a byte. If no round is running, that
stalls the bus for good. Software must therefore keep its pushes within the
free space shown in STATUS. The testbenches never queue more than one round's
worth (at most Q bytes).

The data buffer is zero after reset. A decoder must treat positions before the
start of the input as zero bytes.

## Verification

Every block has a self-checking testbench in `tb/` that compares it with an
independent model. Where the design has a latency or rate, the testbench
checks the cycle count too:

* `mm_box`: five cycles;
* `matmul_ru`: six cycles and the prefetch bank;
* `lz77_ru`: *n*+1+P cycles per round, and both FIFO waits;
* `config_ctrl`: one word per clock and LEN+1 busy cycles;
* `apb_bridge`: one wait state.

System-level testbenches run `rcs_top` at its default parameters:

* **`rcs_top_tb`** runs an LZ77 + 32×32 matrix scenario:
  1. LZ77 rounds on the base configuration, and an ERROR from the missing
     matmul RU.
  2. A partial reconfiguration of 95746 words (half of a 191492-word device)
     that adds a one-box matmul RU while LZ77 rounds continue.
  3. The 32×32 product on one box.
  4. A full reconfiguration of 191492 words to a two-box RU, and the product
     again.
  5. A full reconfiguration back to LZ77.

  It counts each mechanism and fails if any of them never happens: NC before
  L2, NC load held behind NC stores, the APB wait state, ERROR from a missing
  RU, column prefetch, LZ77 waiting for FIFO data, computation during partial
  reconfiguration, multi-cycle skip counts, a double-word NC load, and full
  and partial reconfigurations.
* **`rcs_matmul_sizes_tb`** computes C = A·B for N = 4, 8, 12, …, 32, 48, 56
  and 64, with ⌈N/16⌉ boxes, and checks every element. It prints the cycles
  for each size.
* **`rcs_lz77_sizes_tb`** compresses inputs of 800, 1100, 1300 and 1600
  bytes. It checks every length/pointer pair against a software search, then
  decodes the codewords and compares the result with the input.
* **`rcs_table4_tb`** runs LZ77 on 1100 bytes together with a 64×64 product on
  a device twice as large, in two cases:
  1. A full reconfiguration of 382984 words to a four-box RU.
  2. A partial reconfiguration of 191492 words to a two-box RU, concurrent
     with the compression. The product then needs two passes per element and
     is interleaved with the rest of the compression.

The cycle counts these testbenches print cover only the bus side. There is no
processor model, so the software's own instruction time is not counted, and
the counts should not be compared with whole-system figures. For example,
without that software overhead the partial-reconfiguration case of
`rcs_table4_tb` comes out ahead of the full one.

Known gaps in what the top-level tests exercise:

* The memory controller's bypass cannot occur inside `rcs_top`, because the
  master leaves an idle cycle between requests. It is tested in `mem_ctrl_tb`.
* Likewise, the FIFO-full wait of the LZ77 RU is tested only in `lz77_ru_tb`
  (see the caveat above).

## Where this design follows its source and where it fills gaps

These parts follow the published architecture:

* the system structure: one processor as the only AHB master, the NC queue,
  NC priority, the APB bridge, RU registers on the APB and RU buffers on the
  AHB;
* the reconfiguration model: a separate 32-bit PROM path, one word per clock,
  polling, and full versus partial reconfiguration;
* the matmul RU: boxes of 16 elements with four shared MACs, the six-cycle
  element latency, the prefetch column buffer and a 16-entry output buffer;
* the LZ77 RU: P = 256, Q = 16, a 512-byte FIFO, two P+Q buffers, Q−1
  comparators, the length encoder and the length/index/pointer registers with
  a strict-greater update.

These are this design's own choices:

* the address map and every register layout;
* the element and accumulator widths;
* the SRAM and PROM sizes and the NC queue depth (8);
* the burst types;
* the ERROR behaviour of absent RUs, and holding them in reset;
* the start-command fields (output index, shift count);
* the FIFO flow control;
* the reset values.

The original description uses "RU" both for a whole matmul unit and for one
16-element box. Here a box is `mm_box`, and the RU is `matmul_ru` with up to
four boxes.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `rcs_top` | `MEM_WORDS` | 65536 | SRAM words |
| | `PROM_WORDS` | 1048576 | configuration PROM words |
| | `NC_DEPTH` | 8 | NC queue entries |
| | `MM_NBOX` | 4 | matmul boxes (16 elements each) |
| | `LZ_P`, `LZ_Q` | 256, 16 | search and lookahead window bytes |
| | `LZ_FIFO` | 512 | LZ77 input FIFO bytes |
| `mm_box`, `matmul_ru` | `DATA_W`, `ACC_W` | 16, 32 | element and sum widths |

## Files and simulation

`rtl/rcs_pkg.sv` holds the shared types (AHB/APB structs, request formats) and
the address map. Each other file in `rtl/` holds one module:

`rcs_top`, `ahb_master_if`, `nc_queue`, `sync_fifo`, `ahb_interconnect`,
`mem_ctrl`, `sram`, `apb_bridge`, `config_ctrl`, `config_prom`, `matmul_ru`,
`mm_box`, `lz77_ru`, `match_len_enc`.

`tb/` holds one testbench per module, named `<module>_tb.sv`, plus the
system-level testbenches above. `ahb_tasks.svh` and `apb_tasks.svh` are bus
driver tasks. `rcs_cpu_model.svh` is the processor-side software model used
by the workload testbenches.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. Every testbench has
a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/rcs_pkg.sv tb/rcs_top_tb.sv \
          --top-module rcs_top_tb --Mdir obj_rcs_top_tb
./obj_rcs_top_tb/Vrcs_top_tb
```

Run times on a current machine:

* `rcs_top_tb`: about half a minute;
* each system workload testbench: under ten seconds;
* each block testbench: a few seconds.
