# RiSC-16 with precise exceptions, kernel mode and a software-managed TLB

The design idea: make every exceptional event an ordinary pipeline field. Each
pipeline register from IF/ID to MEM/WB carries a 7-bit code next to the
instruction. Fetch, decode or memory can set the code. Any stage acts on a
non-zero code only by passing it on and by refusing to change machine state.
Writeback is the only place where the machine reacts, so every older
instruction has already committed and every younger one can be discarded. That
is what makes exceptions precise.

The same 7-bit code space covers:

- hardware exceptions (TLB misses, privilege violations);
- interrupts;
- software traps;
- the privileged "extended" instructions.

The code of an exception, interrupt or trap is also its vector address. The
vector table starts at physical 80 = 0x50, which is the first code that needs a
handler.

On top of this sits a small virtual-memory system:

- a kernel/user mode bit with an 8-deep history for nesting;
- sixteen registers: eight user registers, and eight kernel registers that
  replace them in kernel mode;
- a two-entry, fully associative TLB tagged with a 6-bit address-space ID;
- hardware that builds the page-table-entry address a miss handler needs.
- interrupt status and mask registers, fed by external request lines and by a
  built-in interval timer.

The TLB is refilled by software handlers. The machine is synthesizable
SystemVerilog; the default parameters give the full 64K-word machine.

## Instruction set

The eight base RiSC-16 instructions keep their usual encodings:

| Instruction | Operation |
|---|---|
| `add` | rA ← rB + rC |
| `addi` | rA ← rB + imm7 |
| `nand` | rA ← ~(rB & rC) |
| `lui` | rA ← imm10 << 6 |
| `sw` | M[rB + imm7] ← rA |
| `lw` | rA ← M[rB + imm7] |
| `beq` | if rA = rB, branch to PC + 1 + imm7 |
| `jalr` | rA ← PC + 1, jump to rB |

A `jalr` whose 7-bit immediate is not zero is an EXTEND instruction. Its
immediate is the code {EXT_OP[2:0], EXT_DATA[3:0]}:

| EXT_OP | Codes | What the hardware does |
|---|---|---|
| 000 MODE | 0x01 SLEEP, 0x02 HALT, 0x08–0x0F PANIC | SLEEP: flush the pipe and stop fetching until an unmasked interrupt is pending, then continue with the next instruction. HALT, PANIC: stop; `panic_code` shows EXT_DATA. |
| 001 TLB | 0x10 READ, 0x11 WRITE, 0x12 CLEAR | Done in the memory stage, then retired like a normal instruction. |
| 010 CRMOVE | 0x20–0x2F | Bit 3 = 1: cr[n] ← user r[rA]. Bit 3 = 0: user r[rA] ← cr[n]. n = bits 2:0. |
| 011 RFE | 0x30–0x3F | In writeback: jump to rB and pop the mode history. |
| 100 | — | Reserved. |
| 101 EXC | 0x50 GENERAL, 0x51 TLBUMISS, 0x52 TLBKMISS, 0x53 INVALIDOPCODE, 0x54 INVALIDADDR, 0x55 PRIVILEGES | Vector through M[code]. |
| 110 INT | 0x60 IO, 0x61 CLOCK, 0x62 TIMER, … | Vector through M[code]. |
| 111 TRAP | 0x70 GENERAL, 0x71 HALT, … | Vector through M[code]. User code may issue these. |

Rules for EXTEND codes:

- In user mode, any code outside the TRAP class raises EXC_PRIVILEGES.
- In kernel mode, an undefined code raises EXC_INVALIDOPCODE. Undefined codes
  are MODE 3–7, TLB 3–15 and the reserved class.
- `sys code` is `ext r0, r0, code`.
- In kernel mode, `sys` can raise any exception or interrupt code, which is
  useful for testing handlers.

Operands of the TLB instructions:

- `tlbw rA, rB`: rA[7:0] is the page frame number (PFN). rB[13:8] is the ASID
  and rB[7:0] is the virtual page number (VPN). So rB has the same layout as the
  low 14 bits of the address the hardware puts in cr3 on a user miss.
- `ext rA, rB, TLB_READ`: probes the TLB with the ASID/VPN in rB. It writes rA
  with a page-table-entry-shaped word: bit 15 = hit, bits 7:0 = PFN, or 0 on a
  miss. An instruction that uses rA right after it waits one cycle, as after a
  load.

## Registers and modes

- **Register file.** The file has sixteen entries, addressed by the 4-bit index
  {K, r}. K is the kernel bit of the processor status register (PSR). User code
  sees r0–r7. Kernel code uses the same 3-bit fields and sees cr0–cr7.
- **r0 and cr0** read as zero.
- **cr1, cr2** are kernel scratch registers.
- **cr3** is scratch, and the hardware overwrites it on TLB misses.
- **cr4** reads and writes only the ASID of the PSR.
- **cr5** is the interrupt status register (ISR). **cr6** is the interrupt mask
  register (IMR).
- **cr7** is the exception PC (EPC), written by the hardware when it vectors.

PSR layout: `{khist[7:0], K, 0, ASID[5:0]}`.

- After reset it is 0x0009: user mode, empty history, ASID 9. The PC starts
  at 0.
- Vectoring shifts K into the history and sets K.
- RFE shifts the history right with zero fill and takes K from its lowest bit.
- Nesting therefore works up to eight levels: a user miss whose page-table load
  misses again in the kernel returns correctly through both levels.

EPC rules:

- An exception saves the PC of the faulting instruction, so a TLB miss is
  retried.
- A trap saves PC + 1, so the trap is not re-executed.
- An interrupt saves the PC of the fetch slot it replaced. That instruction
  never ran, so returning to EPC resumes exactly.
- A kernel `sys INT_x` is an instruction, so it saves PC + 1.

## Address translation

Pages are 256 words, so a virtual address is {VPN[7:0], offset[7:0]}.

| Access | Translated when | ASID used |
|---|---|---|
| Instruction fetch | user mode, or kernel address ≥ 0x8000 | user: PSR ASID; kernel: always 0 |
| Data (LW/SW) | user mode, or kernel address ≥ 0x8000 | PSR ASID (lets the kernel reach a user space) |

Kernel addresses below 0x8000 go straight to physical memory and cannot miss.

A miss raises EXC_TLBUMISS in user mode and EXC_TLBKMISS in kernel mode. Before
vectoring, the hardware writes cr3:

- **user miss:** `0xC000 | ASID << 8 | VPN`. This is the kernel-virtual address
  of the page-table entry, in the user page tables held in the top quarter of
  kernel space.
- **kernel miss:** the bare VPN. Kernel page-table pages live at VPNs 0xC0–0xFF,
  so this VPN is also the physical address of the root page-table entry
  (192–255, in page frame 0).

The faulting VPN comes from the PC when fetch missed, and from the data address
when a load or store missed. A page-table entry is `{valid, 7'b0, PFN}`.

The TLB:

- has two entries by default (`TLB_ENTRIES`);
- is fully associative on {ASID, VPN};
- has one lookup port for fetch and one for data;
- picks the entry to replace from a free-running 16-bit LFSR that advances every
  clock.

The LFSR is deliberate. A plain counter bit alternates every cycle. A miss
handler of odd length then always picks the same victim, and with two entries a
code page and a data page can evict each other forever. The random-program
test below found this livelock. The LFSR bit has no short period, so the
machine always makes progress.

## Pipeline

| Stage | Work | Exceptional work |
|---|---|---|
| Fetch | PC, TLB port 1, memory port 1 | Miss (CTL0) or pending interrupt: put the code in IF/ID, with IFX = 1 and a NOP instead of the instruction. |
| Decode | Register read, forwarding from EX/MEM/WB, load-use stall, BEQ/JALR resolved with the next fetch squashed | EXTEND code → EXC field; privilege and invalid-opcode checks. |
| Execute | Adder, NAND, pass-through | RFE: the jump target replaces the PC field so that it reaches writeback. |
| Memory | TLB port 2, memory port 2 | Data miss → UMISS/KMISS (CTL8); address beyond memory → INVALIDADDR; TLB read/write/clear and CRMOVE (CTL9). No store happens for an instruction that carries a code or while writeback vectors (CTL2). |
| Writeback | Register write | Code ≠ 0 (CTL1): clear IF/ID … MEM/WB, then vector, RFE, halt or sleep. |

Vectoring in writeback, all in one cycle:

1. Memory port 2 is taken over to read M[code].
2. The PC loads that vector.
3. EPC and, for misses, cr3 are written.
4. The PSR pushes.

The next cycle fetches the handler's first instruction.

Costs:

- A taken branch or `jalr` costs one squashed fetch.
- A load or TLB read followed by a dependent instruction costs one bubble.
- An exception costs the four younger instructions.

Interrupts:

- `irq[i]` sets ISR bit i. Software writes cr5 to acknowledge, usually with
  `add r5, r0, r0` in kernel mode.
- When ISR AND IMR is non-zero and the processor is in user mode, fetch inserts
  the interrupt's class code (0x60 + lowest pending type) into IF/ID.
- Interrupts are not taken in kernel mode. A handler therefore cannot be
  pre-empted before it has saved EPC, which it would lose. A kernel that wants
  to wait uses `sys MODE_SLEEP` and takes the interrupt after returning to user
  mode, or polls cr5.
- A built-in interval timer pulses request line 2 (INT_TIMER, vector 98) every
  `TIMER_PERIOD` cycles. It is masked like any other type: it only interrupts
  once software sets IMR bit 2. It has no registers. It cannot be restarted
  or reprogrammed by software, since the architecture describes no interface
  for the timer.

## Top-level interface (`risc16_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk | in | 1 | Clock, rising edge. |
| rst | in | 1 | Synchronous reset, active high. |
| irq | in | 16 | Interrupt requests, one per type (0 I/O, 1 clock, 2 timer). One cycle high is enough. |
| ld_we, ld_addr, ld_data | in | 1/16/16 | Back-door memory write, used to load the boot image while `rst` is high. |
| halted | out | 1 | The machine executed MODE_HALT or MODE_PANICn. |
| sleeping | out | 1 | The machine is dozing after MODE_SLEEP. |
| panic_code | out | 4 | EXT_DATA of the halting instruction (2 = HALT). |
| psr | out | 16 | Processor status register. |
| dbg_pc | out | 16 | Fetch PC (virtual). |

Parameters:

- `MEM_AW` = 16: physical address bits, 64K words.
- `TLB_ENTRIES` = 2.
- `INIT_ASID` = 9.
- `TIMER_PERIOD` = 4096: cycles between INT_TIMER requests. The architecture
  gives no value; this is a choice.

Memory is read combinationally on both ports, like the single-cycle memory of
the classic RiSC-16 pipeline. The full memory is 1 Mbit of storage, so a
synthesis flow will map it to a memory macro.

## Files

| File | Contents |
|---|---|
| `rtl/risc16_pkg.sv` | Opcodes, the 7-bit code constants and class helpers, the PSR struct, pipeline register structs. |
| `rtl/risc16_top.sv` | Core, memory and interval timer. |
| `rtl/risc16_core.sv` | The five stages, forwarding, hazards, fetch/data translation, interrupt insertion, sleep/halt state. |
| `rtl/risc16_wb_ctl.sv` | Writeback controller: flush, vector, EPC, cr3, PSR push/pop, RFE, halt, sleep. |
| `rtl/risc16_tlb.sv` | Two-port fully associative TLB with LFSR replacement and clear. |
| `rtl/risc16_regfile.sv` | Unified 16-entry file; cr4–cr6 redirected to the PSR and the interrupt registers; cr3/cr7 hardware write ports. |
| `rtl/risc16_psr.sv` | PSR with the mode-history shift register. |
| `rtl/risc16_intc.sv` | ISR/IMR, pending detection, priority encoding of the interrupt class. |
| `rtl/risc16_memory.sv` | Dual-ported word memory with a load port. |
| `rtl/risc16_timer.sv` | Interval timer that requests INT_TIMER. |
| `tb/tb_*.sv` | One self-checking testbench per module; `tb_risc16_top` runs the whole machine. |

## Verification

Each unit testbench:

- drives random stimulus (`$urandom`);
- compares against a small reference model or against rules written out case
  by case;
- has a watchdog;
- ends with a `TB_RESULT checks=N failures=M` line.

`tb_risc16_top` runs the machine at its default size. It assembles a small
operating system and a user program with its own encoder functions:

- **Memory image.** Page frame 0 holds the vector table, the root page-table
  entry for ASID 9 and kernel save words. Frame 1 holds the handlers. Frame 2
  holds the user page table: code in frame 5, data in frame 6, results in
  frame 7.
- **Start-up.** The program starts with an empty TLB. Its first fetch misses,
  and the user-miss handler's page-table load misses again, so a kernel miss is
  nested inside a user miss.
- **System call.** A TRAP_GENERAL handler unmasks interrupts by writing cr6 and
  moves registers between banks with CRMOVE. It reads the TLB (one hit, one
  miss), clears the TLB, hits an undefined code (the invalid-opcode handler
  skips it) and sleeps.
- **Interrupts.** The testbench raises irq[0] while the machine sleeps. The
  interrupt is taken when the kernel returns to user mode. A second interrupt,
  irq[1], arrives inside the user loop.
- **User work.** The user program sums an array (stalls, forwarding, branches)
  and stores into another page (data miss). It tries a privileged `tlbw`
  (EXC_PRIVILEGES, skipped by its handler) and calls a subroutine.
- **Timer.** The program then spins on a branch until the timer's first
  INT_TIMER request, 4096 cycles after reset. The timer handler acknowledges
  it and releases the loop by moving a value into a user register with CRMOVE.
  The program then halts through TRAP_HALT → MODE_HALT.
- **Checks.** The testbench checks every cr3 and EPC value written, the
  results, the final PSR (0x0089) and the halt code. It counts each mechanism
  and fails if any never happened.

A run takes about 4,100 cycles, most of them spent waiting for the timer.

Three more machine-level testbenches:

- `tb_risc16_random` compares the machine with an instruction-level reference
  model. Each of six rounds places a random 120-instruction user program in a
  randomly chosen physical frame, with its data in another. The program mixes
  ALU operations, loads, stores, forward branches, system calls and privileged
  instructions that must be skipped, while random interrupt requests arrive.
  After the halt trap, the user registers and the data page must match the
  model. Any imprecision in exception or interrupt handling shows up as a
  mismatch.
- `tb_risc16_top_smallmem` builds the machine with a 4K-word memory
  (`MEM_AW` = 12) and maps a user page to a frame that does not exist. It checks
  that a load and a store there raise EXC_INVALIDADDR with the right EPC and
  change neither memory nor registers.
- `tb_risc16_top_timer` builds the machine with a 97-cycle timer and unmasks
  only INT_TIMER. A user loop then runs for about ten timer periods. The
  testbench checks several things. Every tick is serviced in user mode with an
  EPC inside the program. The handler's count equals the number of interrupts
  taken. The ticks are exactly one period apart. The loop's result is unchanged
  by the interruptions.

Each module also has a deliberately broken variant that its testbench is known
to reject.

## Choices beyond the architecture description

- Interrupts are taken only in user mode (see above).
- EPC for interrupts depends on how they were raised (see above).
- `tlbw` takes the ASID from rB bits 13:8. The description counts these bits
  as "9–14" and also says "the bottom 14 bits". The other `ext … TLB_WRITE`
  usage note ("rA is ignored") is not followed.
- TLB_READ result format, CRMOVE direction bit and operand register: as in the
  instruction-set section.
- Code 0x53 (vector 83) is EXC_INVALIDOPCODE, following the code table. The
  vector-table layout also names an EXC_TLBPRIV, which is not built (see
  below).
- Undefined extended codes are detected in decode rather than execute; the
  outcome is the same.
- A write to cr4 (ASID) takes effect in writeback. A load or store directly
  behind it still translates with the old ASID.
- Interrupt priority is lowest type number first. ISR writes replace the
  register, but a request in the same cycle is kept.
- The back-door load port and the observation outputs are additions for
  loading and testing.

## Not implemented

- **EXC_TLBPRIV:** it appears only as a vector-table name. No page-table entry
  or TLB field defines a protection bit that could raise it.
- **EXC_GENERAL and the TRAP types other than GENERAL/HALT** have no
  dedicated hardware source. Kernel code can raise them with `sys`, and they
  vector like the others.
- **Watchdog behaviour of the timer:** the timer runs freely. Nothing restarts
  it, so it acts as an interval timer, not as a watchdog that software must
  service.
- **EXC_INVALIDADDR** is built, but it can only occur with `MEM_AW` < 16. At
  the default size every physical address exists, so only the small-memory test
  exercises it.
- **MODE_RUN and MODE_RFU3–7:** MODE_RUN is the plain `jalr` encoding;
  MODE_RFU3–7 raise EXC_INVALIDOPCODE.
- **Kernel page table (KPT) region:** not used.
- **Assembler, `laplace.s`:** no assembler or `laplace.s` image is included.
  The end-to-end test uses its own program with the same operating-system
  layout.
