# Relocation MMU: moving damaged RAM blocks without relinking

On a spacecraft, radiation can leave RAM cells permanently stuck. On-board
application software is usually linked statically to fixed addresses. A single
dead cell under its code or global data would therefore mean building a new
image and uploading it. This memory management unit (MMU) avoids that. Boot
software tests the RAM and finds the damaged blocks. It then tells the MMU to
send every access to such a block to a spare, healthy block. The application
is loaded and runs at its link-time addresses and never knows.

Two properties make the MMU fit this job better than a general-purpose paging
MMU:

* **Pages of any power-of-two size, from 1 byte to 2^32 bytes.** A damaged
  block can be as small as the boot software likes, so little memory is lost
  per fault.
* **Overlapping entries.** A small page may be laid on top of a large one. One
  entry maps the whole RAM 1-to-1. Each damaged block then costs exactly one
  more entry, whatever its alignment inside the big page. A paging MMU would
  have to split the big page into many aligned pieces.

The TLB (translation lookaside buffer, the table of address mappings) is
managed by software. It holds P entries, 8 by default. There are no page tables
in RAM and no hardware refill, so nothing is replaced behind the software's
back. Translation is deterministic and uses no RAM that could itself be damaged.

The design follows an MMU built for the LEON3 (SPARC v8) processor:

* the entry format;
* the rule that chooses between overlapping entries;
* the W/X permission checks;
* the register map in alternate address space 0x1A;
* the one-cycle translation latency.

Where that description is silent, this RTL makes its own choices. They are
listed in [Choices made in this RTL](#choices-made-in-this-rtl). The processor
itself is not part of this RTL. Its side of every interface is a port of the top
module, `reloc_mmu`.

## An entry: mask, VPBA, PFBA and five attribute bits

Each entry has four 32-bit words:

| word | meaning |
|---|---|
| `mask` | Ones over the page-number bits and zeros over the page-offset bits, for example `0xFFFFF000` for a 4 KiB page. The number of zeros is the page size s (the page is 2^s bytes). |
| `VPBA` | Virtual page base address: the first virtual address of the page. Its offset bits must be zero. |
| `PFBA` | Physical frame base address: the first physical address of the target frame. Its offset bits must be zero. |
| attributes | Bit 4 `C` cacheable, bit 3 `W` writable, bit 2 `X` executable, bit 1 `V` valid, bit 0 `O` overlapping. Bits 31..5 are reserved and read as zero. |

Because of this encoding, translation needs no adder and no shifter:

* a virtual address `va` lies in the page exactly when `(va & mask) == VPBA`;
* the physical address is `PFBA | (va & ~mask)`.

This is the same as the arithmetic form:

* page number = va / 2^s;
* physical address = frame × 2^s + (va mod 2^s).

The testbenches check the RTL against that arithmetic form.

The hardware does not check that a mask is contiguous, or that the offset bits
of VPBA and PFBA are zero. Writing well-formed entries is the software's job.
An entry whose VPBA has offset bits set simply never matches. An all-zero mask
is accepted: it gives one page covering the whole 4 GiB space.

## Choosing an entry: the overlap rule

This is the part that makes overlapping pages work. It is also the part most
likely to surprise. Every valid entry is compared with the address at the
same time (`mmu_entry_match`, one per entry). The vector of hits then goes to
`mmu_entry_select`:

| entries that hold the address | result |
|---|---|
| none | **translation fault** (a trap for the processor) |
| exactly one | that entry |
| two or more, exactly one of them with O = 1 | the entry with O = 1 |
| two or more, and none or several with O = 1 | **undefined**: a configuration error |

The `O` flag therefore means "I am the exception inside a bigger page". A
relocation entry sets `O = 1`. The 1-to-1 background entry keeps `O = 0`.

An undefined case raises no trap. The unit picks an entry silently and goes on,
so software must never create this case. This RTL picks the lowest-numbered
overlapping hit, or the lowest-numbered hit when none of the hits overlaps. It
also reports the case on `rsp_undefined`, which is for observation only.

The rule is applied to any number of hits. With three hits and exactly one
overlapping entry, that entry wins. One flowchart of the original design
instead sends three or more hits straight to "undefined". The written
description applies the filter to any set of hits, and this RTL follows the
written description.

Worked example: this eight-entry configuration (entries 6 and 7 invalid) is
used throughout the testbenches.

| e | mask | VPBA | PFBA | C W X V O |
|---|---|---|---|---|
| 0 | 0x80000000 | 0x00000000 | 0x00000000 | 1 0 1 1 0 |
| 1 | 0xC0000000 | 0x80000000 | 0xC0000000 | 1 1 0 1 0 |
| 2 | 0xF0000000 | 0x20000000 | 0x10000000 | 1 0 1 1 1 |
| 3 | 0xE0000000 | 0x40000000 | 0x60000000 | 1 0 1 1 1 |
| 4 | 0xF8000000 | 0x50000000 | 0x30000000 | 1 0 1 1 1 |
| 5 | 0xF0000000 | 0x90000000 | 0xA0000000 | 1 0 0 1 0 |

* `0x00001000`: only entry 0 holds it, so the result is 0x00001000.
* `0x20001234`: entries 0 and 2 hold it. Only entry 2 overlaps, so the result
  is 0x10001234.
* `0xC0000000`: no entry holds it, so the result is a translation fault.
* `0x50000000`: entries 0, 3 and 4 hold it. Entries 3 and 4 both overlap, so
  the case is undefined and this RTL uses entry 3.
* `0x90000000`: entries 1 and 5 hold it. Neither overlaps, so the case is
  undefined and this RTL uses entry 1.

## Permission check and the translation path

`mmu_translate` runs these steps once an entry has been chosen:

1. A **write** to a page with `W = 0` gives a **write fault**.
2. An **instruction fetch** from a page with `X = 0` gives an **execute fault**.
3. A **read** never faults.
4. Otherwise, `pa = PFBA | (va & ~mask)`, and `rsp_cacheable` carries the
   entry's `C` bit to the caches.

Timing: a request (`req_valid`, `req_va`, `req_acc`) is registered. Its answer
appears on `rsp_*` with `rsp_valid` **one clock later**. That extra cycle is
the cost of translation on every access in the original design. A new request
may be issued every clock. On a fault, `rsp_pa` is zero and `rsp_fault` names
the fault. Taking the trap is the processor's job.

When the MMU is disabled (control bit 0 clear, the state after reset), the unit
is transparent: `pa = va`, no fault, and `rsp_cacheable = 1`. Boot software
works in this mode while it sets up the TLB.

## Software interface: alternate address space 0x1A

The processor reaches the MMU with SPARC `LDA`/`STA` in ASI 0x1A. Address bits
11..8 choose the register, and bits 7..0 are ignored.

| address | access | action |
|---|---|---|
| 0x0xx | STA | **update**: copy the four I/O registers into TLB entry *wdata* |
| 0x1xx | STA | **load**: copy TLB entry *wdata* into the four I/O registers |
| 0x2xx | LDA | **probe** (see below) |
| 0x3xx | R/W | mask I/O register |
| 0x4xx | R/W | VPBA I/O register |
| 0x5xx | R/W | PFBA I/O register |
| 0x6xx | R/W | attribute I/O register |
| 0x7xx | R/W | control register |
| 0x8xx | R | fault status register (FSR) |
| 0x9xx | R | fault address register (FAR) |

**Probe.** Software first writes an address into the VPBA I/O register and then
reads 0x2xx. The result is the index of the entry that a translation of that
address would use, with the same overlap rule. The four I/O registers are also
loaded with that entry. If no entry holds the address, the read returns
0xFFFFFFFF and the registers are left alone. The probe ignores permissions and
never faults.

**Control register.** This layout is this design's own:

* bit 0 is the enable bit, and the only writable bit;
* bits 15..8 give the number of installed entries, P;
* bits 23..16 give the number of entries with V = 0, so boot software can see
  whether a relocation entry is still free.

**FSR and FAR.** The FSR holds the type of the last translation fault in bits
1..0: 1 for translation, 2 for write, 3 for execute, and 0 if there has been no
fault since reset. The FAR holds the virtual address of that fault. Both keep
their values until the next fault. Reading does not clear them.

**Handshake.** An access is taken when `asi_valid` is high and `asi` equals
0x1A. It is acknowledged one clock later on `asi_ack`, together with
`asi_rdata` for a read. Other ASIs are not acknowledged, because they belong to
other units. A TLB update is visible to translations from the cycle after
`asi_ack`.

## How boot software uses it

The MMU stays off while boot software does the following. The testbench
`tb_reloc_mmu` runs this procedure through the register interface.

1. Test every RAM block and build a map of the damaged ones.
2. Invalidate all entries. Write entry 0 as a 1-to-1 map of the whole RAM with
   O = 0.
3. For every damaged block of the application area:
   1. Check that a TLB entry is still free. If not, stay in safe mode.
   2. Take the next healthy, unused block of a reserved relocation area. If
      there is none, stay in safe mode.
   3. Write an entry with O = 1 that maps the damaged block onto that spare
      block.
4. If anything was relocated, enable the MMU. Then load the application at its
   normal addresses.

Example, run by the testbench: 4 MiB of RAM is split into 16 blocks of 256 KiB.
Blocks 0..7 hold the application and blocks 8..15 are spares. Application
blocks 0 and 2 and spare block 1 are damaged. The procedure gives:

* entry 0: the whole RAM, 1-to-1;
* entry 1: application block 0 to spare block 0;
* entry 2: application block 2 to spare block 2, since spare block 1 is skipped.

Five entries stay free. With the default of eight entries, a system that needs
one more entry for an I/O page can absorb six damaged blocks.

## Module hierarchy

```
reloc_mmu                  top: processor-side ports, P parameter (default 8)
├── mmu_tlb                P entries in flip-flops, one write port, all read in parallel
├── mmu_translate          registered translation + permission check
│   └── mmu_lookup         parallel search + selection
│       ├── mmu_entry_match   (x P)  V && (va & mask) == VPBA
│       └── mmu_entry_select         overlap rule, one-hot choice
└── mmu_asi_regs           ASI 0x1A registers, update/load/probe, FSR/FAR
    └── mmu_lookup         second instance, used by the probe
mmu_pkg                    entry struct, access and fault enums, register map
```

Size at P = 8 after coarse synthesis: about 300 word-level cells and 1049
flip-flop bits, of which 808 are TLB storage. Storage grows linearly with P.
The selection logic grows with P as well.

## Choices made in this RTL

These points are not fixed by the original design. Each one is marked in the
header comment of the module concerned.

* The request/answer and ASI valid/acknowledge handshakes, and the port names.
  How the unit is hooked into the LEON3 pipeline is not specified.
* Reset values: all TLB entries are zero (invalid), the MMU is disabled, and
  the I/O registers, FSR and FAR are zero.
* Disabled means transparent, with cacheable = 1.
* On a fault, the physical address is zero.
* The entry picked in the undefined overlap case, and the extra
  `rsp_undefined` / `rsp_idx` outputs.
* The control register layout and the FSR encoding.
* Update or load with an index of P or more is ignored. Writes to read-only
  registers and reads of write-only addresses are ignored, and such reads
  return zero.
* TLB entries are kept in flip-flops.

## Not in this RTL

The design stops at the MMU's ports. The following parts are outside it:

* the LEON3 processor and its caches, which look up in parallel with the
  translation;
* the rest of the system-on-chip: memory controller, buses, UARTs, timers;
* the PROM, EEPROM and SDRAM;
* the boot software that runs the relocation procedure.

The testbenches stand in for the processor, for the boot software and, in
`tb_reloc_mmu`, for the RAM. The benchmark cycle counts and FPGA resource
figures of the original design cannot be reproduced from this RTL alone.

## Simulating

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a cycle watchdog. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mmu_pkg.sv tb/mmu_ref_pkg.sv tb/tb_reloc_mmu.sv --top-module tb_reloc_mmu
./obj_dir/Vtb_reloc_mmu
```

Replace the testbench name to run another one:

| testbench | what it checks |
|---|---|
| `tb_mmu_entry_match` | page test for page sizes 0..32, valid and invalid entries |
| `tb_mmu_entry_select` | all 65,536 hit/overlap combinations for 8 entries |
| `tb_mmu_lookup` | the worked example above, plus random configurations against a reference model |
| `tb_mmu_translate` | translations, all three faults, undefined cases, disabled mode, one-cycle latency with back-to-back requests |
| `tb_mmu_tlb` | reset, indexed writes, out-of-range writes |
| `tb_mmu_asi_regs` | every register, update/load/probe, FSR/FAR capture, acknowledge timing, other ASIs ignored |
| `tb_reloc_mmu` | end to end at the default size: the relocation procedure, deployment through the MMU into a RAM model, safe-mode exits when entries or spare blocks run out, a 4 KiB block inside a 64 KiB page, the example configuration against the reference model, and a back-to-back burst; each mechanism is counted and must occur |
| `tb_reloc_mmu_sizes` | the top built with 4 and with 16 entries |

`tb/mmu_ref_pkg.sv` is the reference model. It uses the arithmetic form of
translation (division and modulo by the page size) rather than the RTL's masks.
