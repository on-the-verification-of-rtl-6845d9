# Address translation for a pipelined DLX processor: MMU, stabilizers and fetch synchronization

This RTL adds virtual memory support to a DLX-class processor with split
instruction and data caches. In user mode every memory access goes through a
one-level page table in main memory. In system mode, where the operating system
kernel runs, addresses are used as they are. On a missing page the hardware
raises a page fault interrupt. A kernel handler can then swap the page in and
restart the instruction, so that user programs see one large, flat virtual
memory.

The design follows the construction in *On the Verification of Memory
Management Mechanisms* (I. Dalinger, M. Hillebrand, W. Paul). The MMU is
deliberately simple. It has no TLB, and it walks the page table on every
translated access. The hard part is not the MMU. It is keeping the MMU's inputs
unchanged while an access runs in a pipelined, out-of-order core. Two
mechanisms do that: a *stabilizer* on each memory port, and *fetch gating*
that stops instruction fetch while the translation registers may still change.
A software convention for the kernel completes them.

## Address translation

Virtual addresses are 32 bits wide. Pages are 4 KB, so `va = px[31:12] o bx[11:0]`.
Two special purpose registers describe the page table:

* `pto`: page table origin, a physical page index. The table starts at byte `pto * 4096`.
* `ptl`: page table length, the largest legal virtual page index.

The entry for page `px` is the 32-bit word at `ptea = pto*4096 + 4*px`:

| bits  | field | meaning |
|-------|-------|---------|
| 31:12 | ppx   | physical page index |
| 11    | v     | valid: the page is in physical memory |
| 10    | p     | write protected |
| 9:0   | -     | unused |

The physical address is `ppx o bx`. An access raises a page fault in these cases:

* **table length**: `px > ptl`
* **invalid**: `v = 0`
* **protection**: a store to a page with `p = 1`

A fault on a fetch is interrupt 3 (`pff`); a fault on a load or store is interrupt 4 (`pfls`).

## The memory bus and its protocol

The bus carries eight bytes. It has the same shape at every point: core to
stabilizer, stabilizer to MMU, and MMU to cache. Addresses on it are 29-bit
double-word addresses (`va[31:3]`). The types are in `mmu_pkg`:

* `mem_req_t`: `mr`, `mw`, `addr[28:0]`, `data[63:0]`, `mbw[7:0]` (byte enables)
* `mem_rsp_t`: `busy`, `data[63:0]`, as returned by a cache port
* `mmu_rsp_t`: `busy`, `pf`, `data[63:0]`, as returned to the core

Rules of the protocol:

1. A master raises `mr` or `mw`, never both.
2. The master keeps the whole request constant until the access ends.
3. The access ends in the first cycle in which `busy` is low. If `busy` never
   rises, the access takes one cycle. Read data is valid in the end cycle, and
   a write takes effect at the clock edge that ends it.

Assertions in `mmu` and `stabilizer` check rules 1 and 2. The testbench memory
model checks them at the cache ports too.

## The MMU control automaton (`mmu`)

The MMU has an address register `ar`, a 64-bit data register `dr` and a small
state machine:

| state   | what happens | next |
|---------|--------------|------|
| idle    | `ar <= p.addr o 000` | user mode: add; system mode: read / write |
| add     | `ar <= pto*4096 + 4*px`; check `px > ptl` | excp on fault, else readpte |
| readpte | cache read at `ar`; on `busy` low, `dr <= data` | comppa |
| comppa  | entry = `ar[2] ? dr[63:32] : dr[31:0]`; check `v` and `p`; `ar <= ppx o bx` | excp on fault, else read / write |
| read    | cache read at `ar` | idle when `busy` is low |
| write   | cache write at `ar`, with the core's data and byte enables | idle when `busy` is low |
| excp    | `busy` low and `pf` high towards the core; no memory access | idle |

Towards the core, `busy` stays high from the first cycle of the request until
the end cycle. That end cycle is a read/write state with the cache's `busy`
low, or the excp state. Read data is passed straight from the cache in that
cycle. Access lengths, where `b` is the number of busy cycles the cache adds:

| access | cycles |
|--------|--------|
| untranslated | 2 + b |
| translated, or a fault found in the entry | 5 + b |
| table length fault | 3 |

The MMU is correct only if four things stay constant during an access:

* the core's request
* `mode`, `pto` and `ptl`
* the page table entry in memory
* for reads, the data being read

Nothing inside the MMU enforces these. The rest of the design, and the kernel,
must guarantee them.

## Keeping a started access stable (`stabilizer`)

Suppose an interrupt deep in the pipeline forces new values into PC and DPC
while a fetch is still running. The fetch address then changes in the middle of
the access. The bus rules forbid that, and the cache may never finish.

The stabilizer watches the first cycle of each access. If the access is not
over in that cycle, the stabilizer copies the request into a register. Until
`busy` drops, this copy, not the core's live request, drives the MMU. If the
core's request no longer matches the copy, the end of the old access is hidden:
`busy` stays high and `pf` is masked. The core then sees its new request start
in the next cycle. An access that is not interrupted passes through with no
extra latency. The same circuit sits on the data port.

## Keeping the translation registers stable (`fetch_ctrl`, `sys_decode`)

The data port is left to the core: it performs loads and stores in order, so
the data a load reads stays put while the load runs. Instruction fetch runs
ahead of execution, so a fetch can be translated while an older instruction
that changes `mode`, `pto` or `ptl` is still in flight. Fetch must therefore be
held back. The busy signal of the fetch stage is
extended:

```
fetch'  = not (full_ID and (syncing(IR) or movi2s(IR) or rfe(IR)))
fetch   = pto.v and ptl.v and mode.v and fetch'
busy_IF = busy'_IF or not fetch
```

The terms mean:

* `pto.v`, `ptl.v` and `mode.v` are the register valid bits of the
  out-of-order core. A bit is low while an issued instruction that writes that
  register has not completed.
* The decode-stage term stops fetch while an instruction that may change these
  registers, or a synchronizing instruction, is still in decode.
* `busy'_IF` is the fetch stage's busy signal in a core without MMUs.

The read request to the instruction MMU is the fetch stage's request ANDed with
`fetch`. Once a fetch has started, `fetch` is held on until that access ends,
so gating never cuts off a running access.

The synchronizing instructions are `movs2i` reading IEEEf, and `rfe`. The
pipeline is drained behind them before the next fetch is translated.
`sys_decode` recognises them. It uses the standard DLX encodings:

* `movs2i`: R-type, function `010000`
* `movi2s`: R-type, function `010001`
* `rfe`: opcode `111111`

It also flags as illegal, in user mode, any special register access outside
RM, IEEEf and FCC, and any `rfe`.

The hardware covers the registers. Memory needs a **software convention**,
which the kernel must follow:

1. Between a store to an instruction's physical address and the fetch of that
   instruction, a synchronizing instruction must execute.
2. Between a store to a page table entry and a user-mode fetch that uses that
   entry, a synchronizing instruction must execute.

A handler that ends with `rfe` meets both rules.

## Interrupts and special registers (`cause_unit`, `spr_file`)

There are 32 interrupt causes. Positions 0 (reset) and 14..31 (I/O) come from
the external lines `eev[0]` and `eev[j-13]`. The other positions come from
internal events:

| cause | event |
|-------|-------|
| 1 | illegal instruction |
| 2 | misaligned access |
| 3 | page fault on fetch |
| 4 | page fault on load/store |
| 5 | trap |
| 6..11 | arithmetic exceptions |
| 12 | unimplemented FP operation |
| 13 | timer |

Causes 6..11 and 14..31 can be masked by the same bit of `SR`. `JISR` is the OR
of the masked causes.

The special register file holds 13 registers:

| address | register |
|---------|----------|
| 00000 | SR |
| 00001 | ESR |
| 00010 | ECA |
| 00011 | EPC |
| 00100 | EDPC |
| 00101 | Edata |
| 00110 | RM |
| 00111 | IEEEf |
| 01000 | FCC |
| 01001 | pto |
| 01010 | ptl |
| 01011 | EMODE |
| 10000 | MODE |

Other addresses read as 0. `MODE[0] = 1` means user mode.

On JISR:

* `ESR <= SR`
* `ECA <=` masked causes
* EPC, EDPC and Edata take the values the core supplies
* `EMODE <= MODE`
* `SR` and `MODE` are cleared, which enters system mode

On `rfe`, `SR <= ESR` and `MODE <= EMODE`. JISR has priority over `rfe`, and
`rfe` over a `movi2s` write. Reset clears everything, so the machine starts in
system mode.

## The subsystem (`vamp_mmu_top`)

The instruction path is:

`if_mr/if_addr` → `fetch_ctrl` gating → stabilizer → MMU → `ci_req/ci_rsp`

The data path is:

`d_req/d_rsp` → stabilizer → MMU → `cd_req/cd_rsp`

Both MMUs take `mode`, `pto` and `ptl` from `spr_file`.

The core is not part of this RTL. Its interface is brought out as ports:

* decode-stage contents: `full_id`, `ir`
* register valid bits: `pto_v`, `ptl_v`, `mode_v`
* special register access: `spr_we/wa/wd/ra/rd`
* `rfe_wb`, for an `rfe` that completes
* EPC, EDPC and Edata values
* internal events `iev`

Page faults are wired in directly: an MMU's `pf` is ORed into cause 3 (fetch)
or 4 (data) in the cycle its access ends. In a complete core the fault would
travel with its instruction to write back, where external interrupts are also
sampled. Moving it there means removing the two ORs in `vamp_mmu_top` and
feeding the faults through `iev`.

The split cache memory system is also outside the design. It must meet the
protocol above and give *shared memory semantics*: a read on either port
returns the data of the last write to that address on the data port.
`tb/split_mem_model.sv` is a behavioural stand-in with random busy latency.

## Running a virtual machine on it

`tb/tb_vm_simulation.sv` exercises the whole point of the design. It runs a
user program over 24 virtual pages, while only 6 physical user pages exist. The
testbench plays the kernel's page fault handler:

1. Read ECA to tell a fetch fault from a load/store fault.
2. Take the faulting address from EDPC or Edata.
3. If no user page is free, pick a victim page. It may be any page except the
   most recently loaded one. Copy the victim to swap and clear its valid bit.
4. Copy the missing page in from swap.
5. Set its page table entry.
6. Return with `rfe` and restart the instruction.

The handler writes page table entries with untranslated stores through the data
port. Page copies use the memory model's back door, which stands in for a swap
device driver. Every fetched and loaded word is compared with a flat reference
memory. At the end, every virtual word must be either in its physical page
(valid) or in its swap page (invalid).

One case in the test is a fetch fault right after a load/store fault in the
same instruction. It happens when the instruction's own page was evicted. The
test sees it hundreds of times.

## How far to trust it, and where it departs from the source

What the testbenches cover:

* Every block has a self-checking testbench with random stimulus and an
  independent reference.
* The MMU test checks data, fault flags and exact cycle counts over all access
  kinds against random cache latency.
* The top-level test and the virtual machine test run the whole subsystem at
  its default sizes.

Choices made in this design that the construction leaves open:

* the exception state of the MMU and where each fault is detected
* the write and untranslated paths
* byte enables on the bus
* the exact end-of-access cycle: data is passed through in the cycle `busy`
  drops, one cycle earlier than a registered-output reading would give
* the internal circuit of the stabilizer
* the register that holds `fetch` during a started fetch
* DLX opcode values
* JISR/`rfe` register effects and priorities
* reset values
* the direct wiring of MMU faults into the cause vector

Not included:

* the processor core (Tomasulo scheduler, reorder buffer, write back)
* the caches
* the swap device and its driver
* the misaligned-access and other internal interrupt sources, which belong to
  the core

## Files

| file | contents |
|------|----------|
| `rtl/mmu_pkg.sv` | widths, bus structs, PTE struct, state enum, register addresses, interrupt table, opcodes |
| `rtl/mmu.sv` | MMU |
| `rtl/stabilizer.sv` | request stabilizer |
| `rtl/sys_decode.sv` | system instruction decode |
| `rtl/fetch_ctrl.sv` | fetch gating |
| `rtl/cause_unit.sv` | interrupt cause, mask, JISR |
| `rtl/spr_file.sv` | special purpose registers |
| `rtl/vamp_mmu_top.sv` | the subsystem |
| `tb/split_mem_model.sv` | behavioural split cache memory, for simulation |
| `tb/tb_<block>.sv` | one testbench per block |
| `tb/tb_vamp_mmu_top.sv` | end-to-end test |
| `tb/tb_vm_simulation.sv` | virtual machine simulation |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Example runs with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mmu_pkg.sv \
  rtl/sys_decode.sv rtl/fetch_ctrl.sv rtl/stabilizer.sv rtl/mmu.sv \
  rtl/cause_unit.sv rtl/spr_file.sv rtl/vamp_mmu_top.sv \
  tb/split_mem_model.sv tb/tb_vamp_mmu_top.sv --top-module tb_vamp_mmu_top
./obj_dir/Vtb_vamp_mmu_top

verilator --binary --timing --assert rtl/mmu_pkg.sv rtl/mmu.sv \
  tb/split_mem_model.sv tb/tb_mmu.sv --top-module tb_mmu
./obj_dir/Vtb_mmu
```

For `tb_vm_simulation`, use the first command with its file and top name. Each
test runs in about a second.

The parameters to change:

* `tb/split_mem_model.sv`: `MAXLAT` sets the random cache latency, `WORDS` the
  memory size.
* `tb/tb_vm_simulation.sv`: `V`, `A`, `ABASE` and `SBASE` set the sizes of the
  virtual machine.

The widths in `mmu_pkg` are those of the architecture: 32-bit addresses, 4 KB
pages and an eight-byte bus. Changing them means changing the entry format and
the address arithmetic in `mmu` as well.
