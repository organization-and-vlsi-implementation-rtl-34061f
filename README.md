# MIPS: a processor without interlocked pipe stages

This is synthesizable SystemVerilog for the original Stanford MIPS processor
organization. It is a 32-bit, word-addressed load/store machine with sixteen
general registers. Its pipeline has no hardware interlocks. The hardware never
stalls one instruction to wait for another. Instead, the code is scheduled so
that no register is read before it is written, and branches take effect after
a fixed delay. Taking the interlocks out leaves a small controller and a short
pipestage. The same fixed, synchronous schedule also makes precise exceptions
cheap: when something goes wrong, the position of every instruction is known.

The RTL has the datapath (ALU with multiply/divide step registers, combined
rotator, register file, program counter with restart history, address
masking), the decoder, the master pipeline controller and the bus interface.
The top level is `mips_top`. A behavioural memory system and a small
assembler, both in `tb/`, let you run programs on it.

## The pipeline

One clock is one *pipestage*. Two pipestages make a *machine cycle*: slot A,
then slot B. Every instruction takes five pipestages, and a new instruction
starts every machine cycle:

```
slot            A    B    A    B    A    B    A
instruction I   IF   ID   OD   SX   OF
instruction I+1           IF   ID   OD   SX   OF
instruction I+2                     IF   ID   OD ...
```

| stage | slot | what happens |
|-------|------|--------------|
| IF | A | the PC (after masking) goes out on the address pins |
| ID | B | the instruction word comes back and is decoded |
| OD | A | the ALU forms an effective address or a branch target; registers are read for it |
| SX | B | the data address goes out; the ALU does the register-register operation or the branch compare; the result is written back |
| OF | A | load data comes back and is written to its register, or the store word is driven |

The ALU is used in OD and in SX, but a given instruction usually needs only
one of them. A load or store needs OD, for its address. An ALU operation needs
SX. So one machine word can *pack* a based load or store together with an
unrelated two-operand ALU operation. The packed formats are `LDP` and `STP`.
For the same reason a multiply or divide step can be *doubled*: one step uses
the ALU in OD and another uses it in SX. A doubled step handles four
multiplier bits or two quotient bits per instruction.

### Rules the code must follow

Nothing enforces these rules in hardware. Code that breaks them simply gets
the old value.

* **Load delay.** A load writes its register in OF. That is the same
  pipestage as the next instruction's OD, so the next instruction must not
  use the loaded register.
* **Branch delay of one.** A compare-and-branch, a direct jump or a based
  jump changes the PC at the end of SX. The instruction after it always runs.
* **Indirect jump delay of two.** An indirect jump reads its target from
  memory in OF, so the two instructions after it always run.

## The bus

There are 24 address pins and 32 data pins. Both are time-multiplexed between
the instruction stream and the data stream:

| pipestage | address pins | data pins |
|-----------|--------------|-----------|
| slot A | instruction address (`ifetch_o`=1) | data of the instruction in OF (load in / store out with `data_oe_o`) |
| slot B | data address (`dref_o`=1, `rw_o`=0 for a write) | the instruction word fetched in slot A |

Memory can answer in three ways during the address pipestage:

* `ihit_i` low means an instruction-cache miss. The processor repeats slot A,
  in the cache-miss state, until the line arrives.
* `dready_i` low means a slow data reference. The processor repeats slot B,
  in the wait state.
* `page_fault_i` means the reference cannot be satisfied. It leads to a
  restartable exception.

In the data pipestage, `bus_error_i` reports a hard error.

Two more signals deal with DMA:

* `dma_req_i` makes the processor idle at the next machine-cycle boundary. It
  lowers `addr_oe_o` and raises `dma_ack_o` until the request goes away.
* `dfree_o` is raised during ID when the instruction being decoded will not
  use its data slot. A cache or DMA engine can use that slot.

## Exceptions and restart

This is the subtle part of the design.

**Where faults are found.**

* Faults found early travel with their instruction. These are a mapping error
  or page fault on the fetch, a bus error on the instruction word, an illegal
  instruction, a privilege violation and an interrupt.
* They are reported when that instruction reaches SX, together with the
  instruction's own SX faults. These are a data mapping error, a data page
  fault, overflow and a software trap.
* A hard bus error on load data is found in OF, in slot A. That is earlier in
  the pipeline than the SX of the following instruction, so it is reported
  first.

The result is that the oldest instruction in trouble is always the one
reported. If one instruction has several faults, the order is: the fault it
carries from fetch or decode, then mapping error, page fault, overflow and
trap.

**Taking an exception.** On the edge where the exception is taken:

* The PC becomes 0.
* The status word (`PSW`) records the cause and, for a trap, the trap code.
* The current supervisor, interrupt-enable and masking bits are copied into
  "previous" fields.
* The processor enters supervisor state, with interrupts off and masking off.
* The faulting instruction and everything after it are cancelled.
* Everything older has already completed.

One or two synchronization pipestages follow, with no fetch. Then the
processor fetches from 0, where the handler lives.

One exception to the cancelling rule: an overflowing ALU result *is* written
to its register. The trap then lets the run-time system decide what to do,
and it can recover the lost operand from the result.

**The PC history.** The PC unit shifts each fetched address into a
three-entry history (`PC-1`, `PC-2`, `PC-3`). Exception entry shifts it once
more and then freezes it. The three entries then hold:

* `PC-3`: the faulting instruction;
* `PC-2`: the instruction that followed it;
* `PC-1`: the address that would have been fetched next.

These are exactly the three addresses needed to restart when the faulting
instruction sits in a branch delay slot. The handler stores them with
`SavePC 3`, `SavePC 2` and `SavePC 1`.

**Returning.** The return is three indirect jumps through the saved
addresses, one after another. The first uses mode 3 ("return"). When it
reaches OF, it restores supervisor, interrupt-enable and masking from the
previous fields and unfreezes the history. The other two jumps sit in its
delay slots and were fetched in supervisor state. Everything after them is
fetched in the restored mode. To skip the faulting instruction instead (after
a trap, for example), a handler returns through only `PC-2` and `PC-1`.

**Reset** clears the machine and starts at 0 in supervisor state with cause
`RESET`. It enters the handler the same way an exception does.

## Address masking

User programs see a 2^32-word process address space. The mask register marks
the top *n* bits of an address, and the PID register supplies the bits that
replace them:

```
virtual[31:16] = (process[31:16] & ~MASK) | (PID & MASK)
```

For example, address `FFFD74D3` with mask `FFFC` and PID `0ED8` becomes
`0ED974D3`.

Only the lowest and the highest 2^(31-n) words of the process space are
visible. An address is legal only when its top n+1 bits are all equal. Any
other address raises a mapping error.

Masking applies to user-state references. It is switched off on exception
entry, so the handler runs on physical addresses. Only the low 24 bits of the
result go to the pins.

## Datapath units

* **ALU** (`alu.sv`). Add, subtract in both directions, and, or, xor and
  pass, with signed overflow. It also evaluates the compare conditions used
  by branch, trap and set.
  * The H and L registers support step-by-step multiply and divide.
  * `MSTEP` is one radix-4 Booth step. It handles two multiplier bits and
    does its arithmetic 34 bits wide. Start with H = 0 and L = the
    multiplier; after 16 steps {H,L} holds the signed 64-bit product.
  * `DSTEP` is one non-restoring divide step, one quotient bit per step. It
    keeps a hidden sign bit for the remainder. Start with H = 0 and L = the
    dividend; after 32 steps L holds the unsigned quotient. The remainder is
    H, or H plus the divisor if the hidden sign is set.
  * A doubled step (ALU3 bit 6 set) runs its first half in OD. That half
    writes only a set of pending registers. The second half, in SX, starts
    from the pending values and commits them to H and L. So if an exception
    cancels the instruction between its halves, H and L are untouched and the
    restarted instruction gives the right result.
* **Combined rotator** (`barrel_shifter.sv`). It picks a 32-bit window out of
  a 64-bit pair of words, in two stages: first whole nibbles (amount / 4),
  then single bits (amount mod 4). Shifts, rotates, the two-register rotate
  `RLC`, extract byte `XC` and insert byte `IC` all come from choosing the
  two words and the window offset. The table is in the file header.
* **Register file** (`reg_file.sv`). Sixteen registers, two read ports and
  two write ports. Port A takes load data in OF; port B takes ALU results in
  SX.
* **PC unit** (`pc_unit.sv`). It picks the next PC from six sources:
  increment, hold, zero, branch target register, data bus (indirect jump) or
  ALU result (based jump). It also holds the history described above.
* **Address masking** (`addr_mask.sv`) and the **memory interface**
  (`mem_if.sv`). One masking unit serves both streams. The memory interface
  multiplexes the PC and the memory address register (MAR) onto it, and holds
  the memory data register (MDR).

## Control

* **Decoder** (`idu.sv`). It maps an instruction onto a flat control word
  (`ctrl_t`). It mostly copies nibbles onto fields, and it flags illegal
  and privileged instructions. It knows nothing about timing.
* **Master pipeline control** (`mpc.sv`). It never looks at opcodes. It is
  an eight-state machine: reset, slot A, slot B, cache miss, wait, DMA and
  two synchronization states. It produces `adv` (the pipeline moves on this
  edge), `fetch`, the slot, and the exception decision and cause.

## Instruction encoding

The operations are the classic MIPS set. The bit layout is this design's
own, and is documented at the top of `rtl/mips_pkg.sv`. In summary, bits
31:28 are the opcode:

* `ALU3`: three-operand ALU or shift, with an optional 4-bit constant as
  source 1.
* `LDP` / `STP`: packed based load/store with a 6-bit offset, plus a
  two-operand ALU operation.
* `LD` / `ST`: based, indexed, shifted-index or direct addressing, with an
  18-bit displacement.
* `LDI`: load a 24-bit signed immediate.
* `BRA`: compare-and-branch, with a 16-bit offset from the branch itself.
* `JMP`: direct, based, indirect, or return.
* `TRAP`, `SET`: conditional trap and conditional set.
* `SAVEPC`: store one history entry.
* `MOVS`: move to or from H, L, PSW, MASK, PID or the overflow-enable bit.
  PSW, MASK and PID are supervisor-only.
* `NOP`.

`tb/mips_asm_pkg.sv` has one encoder function per format.

## Where this departs from the original chip

* **Clocking.** One edge-triggered clock per pipestage replaces the
  two-phase non-overlapping clocks and their precharged buses.
  * Circuit-level structures are not modelled: the dynamic register cell,
    the bootstrap control drivers, the pads and the scan (LSSD) logic.
* **Controller size.** The original controller has sixteen states. Its exact
  state list is not known, so this one uses the eight listed above.
* **Exception sequencing.** The ranking of simultaneous faults of one
  instruction and the length of the synchronization cycle are choices made
  here.
* **Status word and pins.**
  * The layout of the status word is this design's.
  * The status pins match the original counts: 8 out and 7 in, counting
    `rst_n`.
  * `exc_cause_o` is an extra 4-bit output for observation.
* **Legal segment versus the worked example.** The legality rule is "the top
  n+1 bits equal". Under that rule the worked example above (`FFFD74D3` under
  mask `FFFC`) would raise a mapping error, although its translation is
  computed as shown.
* **Byte pointers.** Byte-pointer instructions beyond insert/extract byte are
  not built.

## Simulating

Each unit has a self-checking testbench in `tb/`. Each one prints a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -Itb --top-module tb_alu \
    rtl/mips_pkg.sv rtl/alu.sv tb/tb_alu.sv
./obj_dir/Vtb_alu
```

The whole-processor test needs every RTL file, plus the assembler package and
the memory model:

```
verilator --binary --timing -Irtl -Itb --top-module tb_mips_top \
    rtl/mips_pkg.sv tb/mips_asm_pkg.sv rtl/*.sv tb/mips_mem_model.sv tb/tb_mips_top.sv
./obj_dir/Vtb_mips_top
```

`tb_mips_top` loads an exception handler at 0 and a user program at `0x100`,
then runs from reset at full size. The memory model adds:

* cold cache misses;
* wait states on odd data addresses;
* four regions that are absent until the handler pages them in, one per
  page fault; an absent instruction word first goes through the cache-miss
  cycles and then reports the fault;
* a port that answers a load with a bus error;
* one instruction word whose first fetch has a bus error.

The testbench also raises two interrupts and several DMA requests.

The program runs in user state with masking on and checks:

* every ALU and shift operation;
* a loop with a delay slot;
* a 16-step multiply and a 32-step divide, and the same with 8 and 16
  doubled steps (a second interrupt cancels one of them half-way);
* direct, based and indirect jumps with their delay slots;
* the load addressing modes and a packed load;
* each exception, raised at least once and counted by the handler;
* an overflow whose successor page-faults on its fetch: the overflow is
  reported, and the fetch fault is taken when the stream resumes;
* a load that page-faults on the last word of a resident page while the
  fetch of the next word misses and page-faults: the load's fault is
  reported and the load is restarted, so its data arrives;
* a hard bus error on an instruction word (caught in ID) as well as on load
  data (caught in OF).

It finishes in about 1,850 cycles. The testbench also counts how often each
mechanism happened, and fails if any never did. The mechanisms are: cache
miss, wait state, DMA, every exception kind, the synchronization cycle, taken
branches, based and indirect jumps, mode-restoring returns, packed words,
single and doubled multiply and divide steps, free data cycles, and the PID appearing on the
address pins.

## Benchmark programs

`tb_workloads` runs the eight classic Stanford integer benchmarks on the
processor, one after another, at their usual sizes. They are hand-scheduled
machine code built with the encoder functions, since no compiler is
included. Delay slots are filled where that was easy and padded with no-ops
otherwise. A procedure call loads its return address with `LDI` and jumps;
the callee returns with a based jump through that register and keeps its
frame on a stack in memory. Every result is checked against one computed
in the testbench.

```
verilator --binary --timing -Irtl -Itb --top-module tb_workloads \
    rtl/mips_pkg.sv tb/mips_asm_pkg.sv rtl/*.sv tb/mips_mem_model.sv tb/tb_workloads.sv
./obj_dir/Vtb_workloads
```

Times at a 250 ns clock (two clocks per instruction), with cold cache
misses and wait states included. The published figures for the original
machine came from compiled and reorganized code on an instruction-level
simulator.

| Program | What it does | Cycles | Time here | Published |
|---|---|---|---|---|
| Bubble | bubble sort, 500 integers | 2,513,330 | 0.63 s | 0.58 s |
| Intmm | 40x40 integer matrix product, doubled Booth steps | 2,590,844 | 0.65 s | 0.80 s |
| Towers | Towers of Hanoi, 14 discs, every move checked | 1,784,019 | 0.45 s | 0.64 s |
| Quick | quicksort, 5000 integers | 1,301,986 | 0.33 s | 0.41 s |
| Perm | permutations of 1..7, five times | 2,332,926 | 0.58 s | 0.56 s |
| Queen | eight queens, first solution, 50 times | 1,594,578 | 0.40 s | 0.44 s |
| Tree | tree insertion sort, 5000 integers | 1,992,446 | 0.50 s | 1.01 s |
| Puzzle | pack a 5x5x5 box with 18 pieces, 2005 trials | 11,519,806 | 2.88 s | 2.40 s |

For Puzzle the testbench sets up the boards and places the first piece;
the machine runs the recursive search. The same search also runs in the
testbench, and the trial counts must agree. The whole run is about 25
million cycles, or about 17 s of simulation.
