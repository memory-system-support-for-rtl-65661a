# Dynamic cache line assembly in the main memory controller

Programs that touch memory at scattered addresses (`sum += A[random()]`, the
z-axis pass of a 3-D FFT) waste nearly all of every cache line they pull in.
This design moves the gathering into the main memory controller (MMC). The
program writes a line of addresses, the *indirection vector* (IV), and flushes
it to memory. Then it reads a line from a special *alias* region. The
controller builds that line on the fly: it fetches the object at each address
and packs the objects next to each other. The processor sees a dense cache line
of exactly the data it asked for, and it needs only two cache misses (one for
the addresses, one for the data) where it would otherwise take up to 32.

This is dynamic cache line assembly (DCA). It is built on top of an MMC that
already remaps *shadow* physical addresses, and the RTL here is that MMC: the
normal memory path, the shadow engine that does the remapping, and the DRAM
interface that connects both to four DRAM channels.

## Shadow address space

The system has 32-bit physical addresses and 1 GB of DRAM. Every physical
address at or above the DRAM size (`0x4000_0000`–`0xFFFF_FFFF`, set by the
`DRAM_BYTES` parameter) would normally be invalid. Here those addresses are
*shadow* addresses. The operating system maps virtual pages onto them, and the
processor caches them like any other memory. When a line fill or write-back
for a shadow address reaches the controller, `shadow_decode` sends it to the
shadow engine instead of to DRAM. Everything below `DRAM_BYTES` goes through
`normal_path`, which moves a 128-byte line as sixteen 8-byte DRAM words.

## Remappings: register sets and regions

The shadow engine has eight register sets (`ctrl_regs`), so up to eight
remappings can be live at once. Each set describes:

| field | meaning |
|---|---|
| `data_base` | shadow address of the **data region** (the dense alias the program reads) |
| `addr_base` | shadow address of the **address region** (where the program writes IV lines); used only when `dca` = 1 |
| `iv_pa` | real physical address where the IV is kept |
| `n_elems` | number of elements; the two regions hold the same number |
| `addr_log2` | bytes per IV entry: 4 or 8 |
| `obj_log2` | bytes per gathered object: 4 to 128, a power of two |
| `kind` | how to read an IV entry: physical address, virtual address, or array index |
| `vbase`, `obj_pv` | the bases used to turn virtual addresses or indices into pseudo-virtual addresses |

The software writes the registers through a 32-bit port, one field per cycle
(`cfg_field_e` in `dca_pkg`). `F_PTBASE` sets the base of the controller's page
table, and writing `F_FLUSH` empties the MTLB and the IV buffer.

`region_match` looks up every shadow address against all sets. It returns the
set, whether the address is in the data region or the address region, and the
offset within that region. If regions overlap, the lowest-numbered set wins,
and within a set the data region wins.

There are two kinds of remapping:

* **Plain IV remapping** (`dca` = 0). The IV already sits in normal memory at
  `iv_pa`, and the data region gathers through it.
* **DCA** (`dca` = 1). The address region is itself in shadow space. A
  write-back to it is caught by the controller. The line goes into the IV
  buffer *and* to memory at `iv_pa + offset`. The copy in memory lets the line
  be reloaded if another write-back pushes it out of the buffer. A line fill
  from the address region reads back that memory.

## What happens on a data-region fill

Element *i* of the data region is the object whose address is entry *i* of the
IV. A data line at region offset `ofs` therefore starts with element
`e0 = ofs >> obj_log2`. The entry for `e0` sits in the IV line at
`iv_pa + ((e0 << addr_log2) & ~127)`. There are `128 >> obj_log2` entries per
data line. With 4-byte addresses and 16-byte objects, one IV line feeds four
data lines.

1. **IV check.** The IV buffer (`iv_buffer`, two lines by default) is searched
   for that IV line. On a miss, the line is read from memory into the buffer.
   The victim is an invalid line if there is one, otherwise the lines are
   replaced in turn.
2. **Pipeline.** The entries leave the buffer one per cycle and pass through
   four registered stages:

   ```
   IV buffer read -> AddrCalc -> MTLB lookup -> issue register -> DRAM request
   ```

   * `addr_calc` turns a virtual-address entry into `entry - vbase`, and an
     index into `obj_pv + (index << obj_log2)`. Both are *pseudo-virtual*
     addresses.
   * Physical-address entries are marked to bypass the MTLB.
   * `mtlb` translates pseudo-virtual to physical.
3. **Gather.** The issue stage sends one 8-byte read per object, or several
   reads if the object is larger than 8 bytes. Each read carries a tag that
   says where its data belongs in the dense line. When the word returns, it is
   written into that place in the scatter/gather buffer (`sg_buffer`). A
   4-byte object is taken from the correct half of its word and placed in the
   correct half of the destination word. Responses may come back in any order.
4. **Reply.** After the last word arrives, the buffer's line goes back on the
   bus.

A data-region **write-back** runs the same flow backwards. The line is loaded
into the scatter/gather buffer, and each object is written, with byte strobes,
to the address its IV entry names.

### Timing

* The first physical address sits in the issue register four cycles after the
  first entry is read. After that, one address follows per cycle.
* Counted from the cycle the bus request is accepted, the first gather read
  reaches a DRAM channel six cycles later, provided the IV line is already
  buffered and the MTLB hits. Two of those cycles go to decoding and the IV
  check.
* The 32 reads of a line of 4-byte objects then go out on consecutive cycles,
  as long as DRAM accepts them. The end-to-end testbench checks this cycle
  count.
* An MTLB miss stalls the whole pipeline by back-pressure until the
  page-table entry comes back.
* All parts of the controller run on one clock, the memory clock.

## The MTLB and the controller page table

The MTLB has 256 entries, 4-way set associative, with 4 KB pages and a
one-cycle lookup. It translates pseudo-virtual page numbers using a flat page
table in DRAM that the operating system builds:

* The entry for pseudo-virtual page *v* is a 32-bit word at `pt_base + 4*v`.
* The physical page number is in bits `[31:12]`. The other bits are ignored.

On a miss, the MTLB reads the 8-byte word that holds the entry, fills one way
of the set (the ways are replaced in turn), and then lets the stalled request
through.

256 entries cover only 1 MB. That is the small configuration, chosen so that
MTLB misses happen often. The hardware it models has 1024 entries: set
`MTLB_ENTRIES = 1024`.

## Invalidating buffered IV lines

A plain IV remapping reads its IV from normal memory. So `normal_path` reports
every normal write-back (`snoop_*`), and the shadow engine drops any IV buffer
line loaded from that address. DCA address lines need no snoop, because their
write-backs come through the shadow engine.

## Module map

| file | role |
|---|---|
| `rtl/dca_pkg.sv` | widths, register-set struct, field codes, bus and memory-port structs, tag kinds, event bundle |
| `rtl/mmc.sv` | **top**: `shadow_decode` + `normal_path` + `shadow_engine` + `dram_if` |
| `rtl/shadow_decode.sv` | shadow/normal split, one transaction outstanding |
| `rtl/normal_path.sv` | dense line fill / write-back, snoop output |
| `rtl/shadow_engine.sv` | sequencer and gather/scatter pipeline; contains the next six |
| `rtl/ctrl_regs.sv` | eight register sets, page-table base, flush |
| `rtl/region_match.sv` | shadow address → set, region, offset |
| `rtl/iv_buffer.sv` | tagged IV lines, whole-line and word writes, one-cycle read |
| `rtl/addr_calc.sv` | IV entry → pseudo-virtual address, or bypass |
| `rtl/mtlb.sv` | set-associative TLB with its own page-table refill |
| `rtl/sg_buffer.sv` | one-line scatter/gather buffer with byte strobes |
| `rtl/dram_if.sv` | routes both request streams to the four DRAM channels, merges the responses |

### Interfaces of the top (`mmc`)

* **Bus side.** One transaction at a time.
  * Request: `bus_req_valid`/`bus_req_ready` with `bus_req` = {`we`, line
    address, 1024-bit write-back line}.
  * Response: `bus_rsp_valid` with `bus_rsp_line`. Write-backs are answered
    too, as an acknowledge.
* **Configuration.** `cfg_we`, `cfg_set`, `cfg_field`, `cfg_wdata`.
* **DRAM side.** There is one port per channel: four arrays of `NCHAN`
  entries.
  * Requests: `mem_req_valid[c]`/`mem_req_ready[c]` with `mem_req[c]` =
    {`we`, `addr`, 64-bit `wdata`, `wstrb`, 12-bit `id`}.
  * Reads answer with `mem_rsp_valid[c]`/`mem_rsp_ready[c]` and `mem_rsp[c]` =
    {`rdata`, `id`}, in any order. A channel must hold a response until it is
    taken. Writes get no answer.
* **Status.** `shadow_access`, plus `ev`: one-cycle pulses for IV capture, IV
  hit, IV miss, MTLB miss, gather, scatter, address-region read, and unmapped
  access.

## Where this design departs from, or adds to, the described system

* **System bus.** The real system uses a split-transaction, 8-byte, snooping
  processor bus. That bus protocol is not modelled. The controller takes whole
  128-byte lines over a valid/ready port and handles one transaction at a time.
* **DRAM.** The memory has eight banks, in pairs that share an 8-byte bus, so
  `dram_if` drives four channels.
  * Whole 128-byte lines are interleaved over the channels by address bits
    `[8:7]`. This interleaving is a choice of this design.
  * The banks themselves, their timing, and critical-word-first return sit
    outside the RTL, on the DRAM side.
  * Words of a normal line are fetched in address order.
* **Objects.** Objects must be naturally aligned, a power of two from 4 to
  128 bytes, and at least as large as an IV entry. Both regions must be whole
  lines. For 8-byte entries, only the low 32 bits are used.
* **Design choices of this RTL.** The register encoding, the page-table entry
  format, the replacement policies, the memory tag layout, the zero fill or
  drop for shadow addresses that no set maps, and the snoop invalidation are
  all choices of this design.
* **Software.** The operating-system side (allocating regions, building the
  page table) is left to software. The testbench does it directly.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. There are two DRAM
models. `tb/dram_model.sv` has one port and is used by the block tests.
`tb/dram_channels.sv` has four channel ports over one shared memory, and
holds a response until it is taken. Both offer:

* read latency `LAT`, 16 cycles by default;
* random stalls with `STALL_PCT`;
* out-of-order answers with `REORDER`;
* never-written words read as a function of their address, so a gathered line
  can be checked without preloading memory.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mmc \
    rtl/dca_pkg.sv rtl/*.sv tb/dram_model.sv tb/dram_channels.sv tb/tb_mmc.sv -o sim
./obj_dir/sim
```

Replace `tb_mmc` with any other `tb_<block>` to test one block. `tb_mmc` runs
the top at its default parameters and covers:

* the unrolled random-access loop with two IV lines in flight;
* IV eviction and reload;
* address-region reads;
* index IVs with 16-byte objects, scatter write-backs, and snoop invalidation;
* physical IVs with MTLB bypass;
* normal traffic and unmapped addresses.

It counts every mechanism and fails if one never happens. `tb_shadow_engine`
drives the engine alone against a DRAM with random stalls and reordering.
It also sweeps every legal pair of entry size (4 or 8 bytes) and object size
(4 to 128 bytes), checking both gathers and scatters.

## The evaluated programs

Two more testbenches run the programs this mechanism was designed for. Both
use the top at its default parameters, with full-size data sets.

* **`tb_wl_random`: the random-access loop, unrolled and simple.**
  * A[] has one million 4-byte floats (4 MB, 1024 pages).
  * Two 32-entry IV lines are in flight.
  * It makes two million random accesses: 62,500 gathered lines and about
    30 M cycles, roughly half a minute in Verilator.
  * The 1 MB MTLB reach is a quarter of A[], so about three quarters of the IV
    entries miss the MTLB. A line then takes about 485 cycles.
  * It then runs 65,536 more accesses in the simple form: one 32-entry vector
    line, rewritten and gathered in turn.
* **`tb_wl_fftw`: the z-axis (depth) pass of a 3-D FFT.**
  * It uses 16-byte elements and the arrays 567×61×51, 576×57×31 and
    576×7×11.
  * Every z column is gathered 32 elements at a time. That is four data lines
    per IV line.
  * The transform is a stand-in: bitwise inversion. Its results are scattered
    back through the same lines, and every element of the array is checked.
  * In the two large arrays one z step is larger than a page, so every element
    misses the MTLB. The small array fits in the MTLB.
  * It runs in about a minute.

Both workloads fit the default configuration. Their addresses are 4 bytes, the
objects 4 or 16 bytes, two IV lines are needed, and the data sets are at most
about 27 MB against 1 GB of DRAM.
