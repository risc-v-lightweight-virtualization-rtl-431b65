# Interrupt and timer virtualization for a RISC-V hypervisor platform

A guest operating system needs two things from the platform many times a second: timer interrupts and device interrupts.
With the RISC-V hypervisor (H) extension alone, neither reaches a guest directly:

- **Timers.** The only hardware timer is the machine-mode `mtimecmp`. Every supervisor and guest timer request becomes a chain of traps, first into the hypervisor and then into machine-mode firmware.
- **Device interrupts.** The standard PLIC knows only M and S contexts. Every device interrupt meant for a guest lands in the hypervisor, which must inject it, and every claim/complete access of the guest must be trapped and emulated.

This RTL implements the platform side that removes those traps:

- **Timers (CLINT).** The core-local interrupter gains supervisor and virtual-supervisor timers: `stimecmp`, `vstimecmp` and a per-hart `htimedelta`. Their comparators drive the harts' `STIP` and `VSTIP` bits directly.
- **Device interrupts (PLIC).** The interrupt controller gains one *VS context* per guest per hart, with its own enables, threshold and claim/complete page.
  - A device assigned to a guest raises that context's line. The line drives the hart's `hgeip` bit, so the guest takes the interrupt and claims it with no hypervisor involvement. This is *direct injection*.
  - For interrupts that exist only in software (emulated devices, inter-VM signals), the PLIC provides *virtual interrupt injection registers* (VIIRs). The hypervisor writes an ID and a priority there. The guest sees, claims and completes that interrupt exactly like a physical one.
- **Privilege unit.** Around these sit the per-hart privilege/CSR unit with the H extension, which turns the new lines into traps, and a small MMIO timer used to measure interrupt latency.
- **Two-stage translation.** Each hart also has a TLB and a page-table walker that translate guest virtual addresses through the guest's own tables (VS stage) and the hypervisor's tables (G stage).

## Blocks and wiring

```
             rtc_tick                 ext_irq[2:1]
                |                          |
          +-----v------+   +---------------v----------------+   +-----------------+
          | clint_virt |   |            plic_virt           |<--| irq_latency_    |
          |  mtime     |   | gateways -> pending -> per-    |   | timer (src 3)   |
          |  m/s/vs    |   | context fan-in (physical +     |   +-----------------+
          |  timers    |   | attached VIIR block)           |
          +--+--+--+---+   +---+--------+---------+---------+
     msip mtip stip vstip   meip     seip    geip[g] (one per VS context)
             |  |  |  |      |        |         |
          +--v--v--v--v------v--------v---------v--------+
          |  hext_csr (one per hart): mip/hip/hgeip,      |<-- core_req (pipeline events)
          |  delegation, trap entry, sret/mret, checks    |--> core_rsp (redirect, priv, V)
          +-----------------------------------------------+
```

`rv_virt_platform` is the top. It holds the following for `NHARTS` harts (default 6):

- one `clint_virt`;
- one `plic_virt`, built from `plic_gateway` per source and `plic_fanin_virt` per context;
- one `irq_latency_timer`;
- one `hext_csr` per hart;
- one `tlb_2stage` per hart, with a `ptw_2stage` page-table walker behind it, driven by that hart's `satp`, `vsatp` and `hgatp`.

It decodes one MMIO register port:

| Range | Block | Notes |
|---|---|---|
| `0x0200_0000`–`0x0203_FFFF` | CLINT | 64-bit registers |
| `0x0C00_0000`–`0x1BFF_FFFF` | PLIC | 32-bit registers; the lane is selected by `addr[2]` |
| `0x2200_0000`–`0x2200_001F` | latency timer | 64-bit registers |

PLIC sources are numbered as follows:

| Source | Meaning |
|---|---|
| 1 .. `NEXT_IRQ` | device lines (default 2) |
| `NEXT_IRQ`+1 | latency timer |
| next `NVIRT_BLKS` | management interrupts of the injection blocks 1..`NVIRT_BLKS` |

The processor pipelines, caches and buses are not included. Each hart's pipeline talks to its `hext_csr` through the `core_req_t`/`core_rsp_t` structs in `hv_pkg`, described below.

## CLINT with supervisor and guest timers (`clint_virt`)

| Offset | Register | Access |
|---|---|---|
| `0x00000 + 4n` | `msip` of hart n (1 bit) | R/W |
| `0x04000 + 8n` | `mtimecmp` n | R/W |
| `0x0BFF8` | `mtime` | R/W |
| `0x0C000 + 8n` | `stimecmp` n | R/W |
| `0x14000 + 8n` | `vstime` n = `mtime + htimedelta` n | read only |
| `0x1BFF8` | `stime` = `mtime` | read only |
| `0x1C000 + 8n` | `vstimecmp` n | R/W |
| `0x24000 + 8n` | `htimedelta` n | R/W |

Each register type sits on its own page. A hypervisor can therefore map, for example, the `stimecmp` page into its own space without exposing `mtimecmp`.

- `mtime` advances by one on each `rtc_tick` pulse.
- Each hart has three comparators: `mtip = mtime >= mtimecmp`, `stip = stime >= stimecmp` and `vstip = vstime >= vstimecmp`. Writing a larger compare value clears the line, and writing a smaller one sets it.
- All registers reset to 0. A compare value of 0 means that every timer line is high after reset until software programs it.
- The lines are combinational from the registers. `INT_STAGES` adds register stages if the wiring to the harts needs them.

In the privilege unit, `mip.STIP` is the OR of its software-writable bit and the CLINT `stip` line. `mip.VSTIP` is the OR of `hvip.VSTIP` and `vstip`. An OS that still uses firmware calls to set its timer therefore keeps working, and one that writes `stimecmp` directly needs no firmware at all.

## PLIC with VS contexts and virtual injection (`plic_virt`)

This is the most involved block. The standard part works as follows:

- **Gateway.** A level-sensitive gateway per source (`plic_gateway`) requests service when its line is high.
- **Pending.** The request sets a pending bit when the PLIC can accept it (`ready = !pending`).
- **Blocking.** The gateway then blocks until that source is completed, so a line that stays high does not re-pend.

### Contexts

Each hart has `2 + NGUEST` contexts, numbered `c = hart*(2+NGUEST) + k`:

- `k = 0` is the M context, which drives `meip`;
- `k = 1` is the S/HS context, which drives `seip`;
- `k = 2..` are the VS contexts of guest lines 1..`NGUEST`, which drive `geip[hart][g]` and from there `hgeip[g]`.

Every context has the standard registers: enable bits at `0x2000 + 0x80c`, threshold at `0x200000 + 0x1000c` and claim/complete at `0x200004 + 0x1000c`. Claim/complete sits on a page of its own, so a hypervisor can map a guest's claim/complete page straight into the guest's address space.

### Injection registers and blocks

| Offset | Register |
|---|---|
| `0x4000000 + 4c` | VCIBIR of context c: the number of the injection block attached (0 = none) |
| `0x4010000 + 0x1000n + 4j` | VIIR j of block n |
| `0x4110000 + 4n` | IBMSR of block n (management and status) |

A VIIR holds one virtual interrupt:

```
 31      21 20      11 10       1   0
+----------+----------+----------+---+
| reserved |   prio   |  int_id  | F |     F = in flight
+----------+----------+----------+---+
```

- It is *pending* when `int_id != 0` and `F == 0`.
- A block is a page of `NVIIR` such registers.
- The hypervisor attaches a block to one or more contexts by writing the block number into their VCIBIRs. Attaching one block to several contexts lets a guest with several virtual harts take its interrupts on any of them.

### One fan-in for both kinds

Physical sources are first put into the same format as a VIIR:

- priority: the source's priority if it is pending and enabled;
- ID: the source number.

The context's fan-in (`plic_fanin_virt`) then searches physical and virtual candidates together:

- The candidate with the highest priority wins; on a tie the lower index wins, physical sources first.
- The result is the priority, the ID and the index of the winning register.
- The context's line is `max_prio > threshold`. Thresholds are 10 bits wide because virtual priorities are 10 bits, while physical priorities are `PRIO_BITS` wide (default 1).

### Claim and complete

**Claim** (a read of the context's claim register) returns the winner's ID, or 0 if there is none, and in the same cycle:

- if the winner is a VIIR, sets its in-flight bit; the ID is kept so that the complete can find the register;
- if the winner is physical, clears its pending bit; the gateway stays blocked.

**Complete** (a write of an ID to the claim register) is resolved in this order:

1. If a register of the attached block is in flight with that ID, clear its ID and in-flight bit. The register is free again, and the priority field is left as it was.
2. Otherwise, if the ID is a physical source enabled in this context, release that source's gateway.
3. Otherwise, if a block is attached, this is a *bad complete*: the guest completed an ID the hardware does not know.

### Management interrupts (IBMSR)

| Bits | Field | Access |
|---|---|---|
| `[0]` | enable the "no VIIR pending" event | R/W |
| `[1]` | enable the "bad complete" event | R/W |
| `[8]` | no register of the block is pending | read only |
| `[9]` | a bad complete was seen | write 1 to clear |
| `[25:16]` | ID of the last bad complete | read only |

Each block has its own PLIC source, `NDEV + n`. The source is high while an enabled event holds. The hypervisor routes it like any other source, normally to its own S context:

- The "no VIIR pending" event tells the hypervisor it can refill the block.
- The bad complete tells it that a guest misbehaved.

## Privilege unit with the hypervisor extension (`hext_csr`)

One instance per hart holds:

- privilege and `V`;
- the M, HS and VS trap CSRs;
- `hstatus`, `hedeleg`/`hideleg`, `hvip`, `hgeie`/`hgeip`, `hgatp`, `vsatp` and `satp`.

It implements the H extension (v0.6) rules:

- **Interrupt pending.** The `mip` view is composed from the CLINT and PLIC lines. `hgeip[g]` is the PLIC VS-context line g, and bit 0 reads 0.
  - `VSEIP` includes `hgeip[hstatus.VGEIN]`. This is how a directly injected device interrupt becomes a guest external interrupt.
  - `SGEIP` is `|(hgeip & hgeie)`. It lets the hypervisor be told when an interrupt arrives for a guest that is not running.
- **Interrupt selection.** The priority order is MEI, MSI, MTI, SEI, SSI, STI, SGEI, VSEI, VSSI, VSTI. Global enables are taken per target level (M, HS, VS), and VS interrupts are only taken while `V=1`.
- **Trap routing.**
  - A trap not delegated in `medeleg`/`mideleg` goes to M.
  - A trap delegated there goes to HS.
  - A trap also delegated in `hedeleg`/`hideleg` while `V=1` goes to VS.
  - A VS interrupt taken in VS mode reports the supervisor code (1, 5 or 9).
- **Trap entry.**
  - Entry saves epc, cause and tval.
  - Entry into M saves `MPV`, `GVA`, `MPP` and `MPIE`.
  - Entry into HS saves `SPV`, `SPVP`, `GVA`, `SPP` and `SPIE`.
  - For guest-page faults the guest physical address is written to `htval`/`mtval2`.
  - `mret` and `sret` restore the privilege and `V`.
- **Checks.**
  - A guest access to a hypervisor or machine CSR raises a virtual-instruction (22) or illegal-instruction (2) trap, with the instruction bits as tval.
  - The same applies to `sret` with `VTSR`, `wfi` with `VTW`, and hypervisor loads/stores from a guest.
  - `mret` below M is illegal.
- **Redirection.** With `V=1`, supervisor CSR addresses are redirected to their VS copies.

**Pipeline interface:**

- The pipeline presents at most one event per cycle in `core_req_t`: a CSR access, `sret`/`mret`/`wfi`, a hypervisor load/store, an exception with its cause/tval/GPA, or "take the pending interrupt".
- The response `core_rsp_t` is combinational. It carries the old CSR value, whether a trap was taken, the redirect pc, `irq_pending`, the privilege and `V`.
- State changes at the next clock edge.

## Two-stage page-table walker (`ptw_2stage`)

A guest access (V=1) is translated twice. The guest's Sv39 tables (`vsatp`) turn a guest virtual address into a guest physical address (GPA). The hypervisor's Sv39x4 tables (`hgatp`) turn every GPA into a physical address. The guest's tables themselves live at GPAs, so the walker has to translate the address of each guest PTE before it can read it:

- For each VS level, the walker computes the PTE's GPA and switches (state `S_SWITCH`) into a full G-stage walk of it. It then reads the VS PTE at the resulting physical address.
- When the VS leaf is found, the leaf's GPA goes through one last G-stage walk.
- A full nested walk of 4 KiB pages therefore needs 3 × 4 + 3 = 15 memory reads, against 3 for one stage.

Sv39x4 differs from Sv39 in the root level:

- The GPA is 41 bits wide, and a GPA with any higher bit set gives a guest-page fault.
- The root table is 16 KiB (2048 entries, indexed by GPA[40:30]).

Checks and faults:

- The usual PTE checks apply: valid, R/W/X for the access, A, and D for stores, plus aligned superpages.
- G-stage leaves must have U set.
- Reads of guest PTEs are checked as loads in the G stage.
- Access type 3 is the read done by the hypervisor's `hlvx` instructions. It needs X rather than R in both stages and faults as a load. Plain `hlv`/`hsv` accesses are ordinary guest loads and stores (V=1, with `req_user` taken from `hstatus.SPVP` by the pipeline).
- A failure in the VS stage reports a page fault (12/13/15).
- A failure in the G stage reports a guest-page fault (20/21/23) with the failing GPA. The trap unit writes it (shifted right by 2) to `htval` or `mtval2`.

Interface and limits:

- A request/ready handshake starts a walk. One page-table read is outstanding at a time on a simple memory port. The result is a one-cycle pulse.
- `hgatp.VMID` is ignored. A/D bits are not updated by hardware: a clear bit faults.
- On success the walker also returns both leaves' permissions and the leaf GPA, which the TLB keeps.

## TLB with guest entries (`tlb_2stage`)

A small fully associative TLB (8 entries by default, `NTLB`) sits in front of each walker. It caches host (V=0) and guest (V=1) translations side by side:

- **Guest bit.** Each entry carries a V bit, so a guest address never hits a host entry with the same number.
- **Direct mapping plus GPA.** A guest entry maps the guest virtual page straight to the host physical page. It also keeps the page's GPA and the {X, W, R} permissions of both stages. A later access that the cached translation does not allow is still reported correctly, with no new walk:
  - a VS-stage violation (or a U-bit mismatch) gives a page fault;
  - a G-stage violation gives a guest-page fault with the GPA taken from the entry.
- **Flushes.** `sfence_vma` clears every host entry. `hfence` clears every guest entry, whatever address or stage the instruction named; the pipeline should also send a `sfence.vma` executed by a guest to `hfence`. Without VMIDs, a hypervisor that switches between guests must flush on every switch, which a statically partitioned system never does.
- **Fills and timing.** Faulting walks are not cached, and replacement is round robin. Each entry holds one 4 KiB page, so a superpage is cached one 4 KiB piece at a time. A hit answers on the next cycle. A miss answers one cycle after the walker.
- **Not built.** There is no walk cache for intermediate page-table entries.

## Latency timer (`irq_latency_timer`)

A free-running 64-bit `time` (+1 per clock), `timecmp` and `enable` at offsets `0x00`, `0x08` and `0x10`:

- When `enable[0]` is set and `time > timecmp`, a sticky flag raises the interrupt line, which is PLIC source 3 in the top.
- Writing `enable` acknowledges the interrupt. With `enable[1]` (auto-restart) set, it also restarts `time` from 0, so the timer ticks periodically without reprogramming.
- The flag rises `timecmp + 2` cycles after `time` was 0, and the PLIC line one cycle later. A handler that reads `time = T` therefore knows the line rose `T - timecmp - 2` cycles earlier.

## Timing and interfaces

- **Clock and reset.** There is one clock. The reset is asynchronous and active low, and every register that is read is reset.
- **MMIO port.** The port is single cycle:
  - `mmio_valid` with `mmio_write` writes at the clock edge, using byte strobes for 32-bit halves;
  - reads are combinational in the same cycle.
- **Claim reads.** A PLIC claim has a side effect, so a claim read must be presented for exactly one cycle.
- **PLIC latency.** From a device line to the context line takes one clock: the pending register.
- **CLINT latency.** From a compare match to `mtip/stip/vstip` takes zero clocks with `INT_STAGES = 0`.

## Parameters

| Top parameter | Default | Meaning |
|---|---|---|
| `NHARTS` | 6 | harts (six-core system) |
| `NGUEST` | 1 | guest external lines per hart (`GELEN`), i.e. VS contexts per hart |
| `NEXT_IRQ` | 2 | device interrupt lines |
| `NVIRT_BLKS` | 4 | injection blocks (the register map allows up to 240) |
| `NVIIR` | 4 | injection registers per block (up to 1024) |
| `PRIO_BITS` | 1 | width of physical source priorities |
| `NTLB` | 8 | TLB entries per hart |

The numbers of blocks and of registers per block are this design's defaults. The register map reserves a 4 KiB page per block, and a few registers per block are expected to be enough, much as with the list registers of other interrupt virtualization schemes.

## Where this design makes its own choices

The following points are not fixed by the architecture as described, or the description is ambiguous and one reading was chosen:

- **Read-only time replicas.** `stime` and `vstime` are read only. The time base can only be changed through `mtime` and `htimedelta`.
- **`>=` comparisons.** All three CLINT comparators use `>=`.
- **Virtual claim.** Claiming a virtual interrupt keeps its ID and sets in-flight; complete then frees the register. A reading in which claim clears the ID would leave complete nothing to match.
- **Small choices.**
  - Block numbers start at 1, and a VCIBIR of 0 means "none".
  - The IBMSR layout, the management source numbers, and 10-bit thresholds are this design's own.
  - The order of the contexts within a hart (M, S, VS...) is also chosen here.
- **Trap sequences.** Trap entry and `mret`/`sret` follow the RISC-V H specification field by field: `mret` restores from `MPP`, `SPVP` lives in `hstatus`, and a VS trap saves `vsstatus.SIE`.
- **Supervisor timer bit.** `mip.STIP` keeps a software-writable bit ORed with the CLINT line, rather than becoming fully read-only.
- **Latency timer.** Its register offsets, the sticky flag, acknowledging through `enable`, and what auto-restart restarts are this design's own.
- **Not implemented in the privilege unit.** `htinst`/`mtinst` read as zero, trap vectors are direct only, and counters and PMP are absent.

- **Walker.** The walk order (one G-stage walk per VS level, then one for the final GPA) follows the hypervisor architecture. The memory port and the single outstanding read are this design's own. In the TLB, keeping the GPA, the guest bit and flushing all guest entries on any `hfence` follow the architecture as described. The entry count, full associativity, round-robin replacement and 4 KiB-only entries are this design's own.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_clint_virt` | mtime counting and writes, partial writes, msip lanes, the exact tick on which each of mtip/stip/vstip rises, vstime with a delta |
| `tb_plic_gateway` | request, blocking until complete, re-request of a held line |
| `tb_plic_fanin_virt` | 2000 random and directed cases against a reference search, including ties |
| `tb_plic_virt` | the physical claim/complete flow, thresholds, priority ties, a device routed to a VS context, virtual injection (claim sets in-flight, complete frees), a block shared by two contexts, detaching, both management events |
| `tb_hext_csr` | CSR masks, the mip composition (stip/vstip OR, hgeip, VGEIN, SGEIP), VS redirection, virtual/illegal instruction traps routed to HS and VS, guest-page fault, sret/mret, interrupts to VS/HS/M with their causes and priority |
| `tb_ptw_2stage` | hand-built VS and G tables behind a memory with random 1–3 cycle latency: nested 4 KiB, 2 MiB and 1 GiB translations, the 15-read count, guest-page faults with their GPA (unmapped, read-only, missing U, GPA wider than 41 bits, unmapped guest root), VS page faults, bare modes and single-stage walks |
| `tb_tlb_2stage` | the same tables with walker reads counted: a nested miss (15 reads) and its hit (0 reads), G-stage read-only and VS permission faults served from the TLB with the right GPA, faulting walks not cached, guest and host entries kept apart, `hfence`/`sfence_vma` flushing only their own kind, round-robin eviction |
| `tb_irq_latency_timer` | the exact rise cycle and the latency arithmetic, auto-restart, acknowledge |
| `tb_rv_virt_platform` | the whole platform at default parameters (see below) |

`tb_rv_virt_platform` plays the six pipelines and the software. It counts each mechanism and fails any that never occurs:

- CLINT machine timer, software interrupt, HS timer, and guest timer with `htimedelta`;
- direct injection of a device into a guest (claimed and completed by the guest);
- SGEI to the hypervisor;
- virtual injection through a VIIR;
- the bad-complete management interrupt;
- two periodic latency-timer interrupts, whose PLIC delay is checked to the cycle;
- a guest illegal instruction delegated to VS;
- a nested translation by hart 3's walker (15 page-table reads) after the CSR unit writes `vsatp` and `hgatp`;
- the same access again served by the TLB with no reads, and walked again after `hfence`;
- a guest-page fault from that walker taken by the trap unit, with the GPA in `mtval2`.

Simulate a testbench with Verilator, for example:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/hv_pkg.sv -y rtl \
    tb/tb_rv_virt_platform.sv --top-module tb_rv_virt_platform -o sim
./obj_dir/sim
```

The full-size platform test builds in about half a minute and runs in well under a second.
