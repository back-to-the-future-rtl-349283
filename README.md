# A C-slow multithreaded MIPS core for current-mode logic

MOS current-mode logic (MCML) draws a constant current through every gate,
whether the gate switches or not. Its power therefore scales with the number
of gates, not with activity. The way to get energy efficiency out of such a
logic family is to keep a *small* circuit *busy*: few gates, each doing
useful work every cycle, at a very high clock rate. This core follows that
rule. Instead of several CMOS cores running in parallel, it builds one
five-stage in-order MIPS pipeline and multiplies its throughput in two steps:

* **C-slow retiming.** Each of the four pipeline registers between the five
  stages becomes a chain of C registers. The logic of each stage can then be
  spread over C cycles, and the clock runs up to C times faster. With the
  default C = 8 the pipeline has 4C + 1 = 33 stages.
* **Time-division multithreading.** The extra stages are filled with C
  independent instruction streams. Every clock cycle belongs to one of C
  *time slots*, and a thread only ever issues in its own slot. From one
  thread's point of view the machine is the plain five-stage pipeline, run at
  1/C of the clock.

Because consecutive instructions of one thread are always exactly C cycles
apart, no new hazards, forwarding paths or interlocks appear. The baseline
pipeline's control logic is reused unchanged. On top of this, T hardware
threads (default 16, two per slot) let a slot switch to a sibling thread when
its current thread waits for memory or for the multiplier.

The SystemVerilog in `rtl/` is written for synthesis. The top module is
`cslow_cpu`. The MCML gate and latch cells are included as logic models.

## Time slots and threads

`slot_counter` produces the time-slot ID. It counts 0, 1, …, C−1 and wraps,
and it holds still when the pipeline freezes. Thread `t` is bound to slot
`t mod C` and to register bank `t / C`. With C = 8 and T = 16, slot 1 owns
threads 1 and 9, and register file 0 holds the banks of threads 0 and 8.

Fetch selects a thread in two levels (`thread_select`):

1. The current slot ID picks that slot's set of T/C threads.
2. Within the set, a round-robin pointer picks the next thread that is
   ready. The pointer moves past the thread just chosen.

If threads 0, 1 and 9 are the only ready ones, slot 0 runs thread 0 every
time, slot 1 alternates between 1 and 9, and the other six slots issue
nothing. A thread is *ready* when it is enabled and not parked on any of:
- an I-cache refill;
- a D-cache refill;
- an instruction-TLB fill;
- a data-TLB fill;
- its outstanding multiply/divide operations.

## The C-deep pipeline registers

`cslow_stage_reg` is one major pipeline register turned into a C-deep shift
chain. The core has four of them: fetch→decode, decode→execute,
execute→memory and memory→writeback. Each carries a packed record from
`cslow_pkg` (`if_id_t`, `id_ex_t`, `ex_mem_t`, `mem_wb_t`). Every record holds
a valid bit, the thread ID, the PC and the next PC.

In the RTL the stage logic is written once, in front of its chain. All four
chain outputs therefore belong to the same time slot in every cycle, which is
what makes the baseline logic correct.
- Forwarding into execute compares the thread ID as well as the register
  number. It takes results from the memory stage (including load data) and
  from the writeback stage.
- The register file passes a same-cycle write through to its reads.

A retiming synthesis run can move the combinational logic into the chains to
reach the short cycle time. The RTL itself does not place logic between the
minor registers.

All chains, the slot counter and the multiplier pipeline share one enable.
Dropping it freezes the whole machine in place.

## Thread switching by replay

A thread that cannot continue is not stalled in place, because that would
block its slot's siblings. Instead, the blocking instruction and everything
younger from the same thread are cancelled. The thread's PC and next PC are
restored from the cancelled instruction, and the thread is parked. Its slot
then picks a sibling on the next turn. When the wake-up event arrives, the
thread is ready again and re-fetches from the restored PC.

| Cause | Where detected | Wake-up |
|---|---|---|
| I-cache miss | fetch | refill of the slot's I-cache bank done |
| I-TLB miss | fetch | the slot's I-TLB filled |
| D-cache load miss | memory | refill of the addressed D-cache bank done |
| D-TLB miss (load or store) | memory | the addressed bank's D-TLB filled |
| non-mul/div instruction behind an unfinished mul/div | decode | the thread has no mul/div in flight |

A memory-stage replay kills the thread's younger instructions in execute,
decode and fetch. Each record carries its own next PC, so the restored state
is exact even inside a branch delay slot.

A miss starts a refill (or walk) only if that cache bank or TLB is idle. A
thread whose miss arrives while another one is being served parks until
that one completes, then tries again.

## Branches and the delay slot

MIPS branch delay slots are kept. Branches and jumps resolve in execute. By
then the same thread has had one more fetch turn: the delay-slot instruction
is in decode. If the thread is being fetched again in the same cycle, that
fetch is the one over-fetched instruction and is nullified. The thread's PC
then goes to the target. The branch unit (`branch_unit`) supports:
- BEQ, BNE, BLEZ, BGTZ, BLTZ and BGEZ;
- J and JAL;
- JR and JALR.

JAL and JALR write PC + 8.

## Whole-pipeline freezes

Two events stop every stage for a cycle instead of switching threads:

* **D-cache bank conflict.** The C data-cache banks are shared by all
  threads. A bank stays busy for `BANK_BUSY` cycles (2 by default) after a
  load. A load that reaches a busy bank freezes the pipeline until the bank
  is free, then proceeds.
* **Store buffer entry occupied.** Each thread has one store-buffer entry. A
  store whose thread's entry has not drained yet freezes the pipeline until
  it has.

## Register files

`regfile_cslow` models C register files, one per slot. Each file holds T/C
banks of 32 registers, and the banks share two read ports and one write
port. Decode reads the current slot's file at bank `tid / C`. Writeback
writes the same slot's file at the retiring thread's bank. Register 0 reads
as zero. The storage is one flat array, which maps naturally onto an SRAM
macro.

## Multiply and divide

`muldiv_pipe` has 32 radix-2 stages. Each is followed by a C-deep register
chain, so the latency is 32·C cycles (256 at C = 8) and a new operation can
enter every cycle.
- **MULT** uses Booth recoding.
- **MULTU** uses the same recoding, then adds the multiplicand to HI when
  the multiplier's top bit is set.
- **DIV and DIVU** use restoring division on magnitudes. The signs are fixed
  at the output.
- **Division by zero** gives a quotient of all ones and the dividend as the
  remainder.

Results go to the thread's HI/LO registers. Independent mul/div operations of
one thread, and those of different threads, overlap freely. Any other
instruction of a thread with mul/div in flight is replayed at decode and the
thread is parked, so results never complete out of order.

## Memory system

* **I-cache** (`icache_bank`): one private bank per slot, 16 KB and
  direct-mapped with 64-byte lines. A bank is only accessed in its own slot,
  so it never has a conflict.
* **D-cache** (`dcache_banked`): C shared banks of 16 KB, 4-way, with
  64-byte lines. The bank is the line address mod C. Replacement is round
  robin per set. The cache is write-through with no write allocate. Stores
  reach it only when the store buffer drains them, through a write port that
  does not occupy the bank. A load that hits completes in the memory stage.
* **TLBs** (`tlb`): 32 entries, 4-way, 4-KB pages. There is one per I-cache
  bank and one per D-cache bank. The D-cache bank bits (address bits 6–8)
  lie inside the page offset, so the virtual address picks the bank and its
  TLB before translation. There is no address-space tag: all threads share
  one address space.
* **Store buffer** (`store_buffer`): one entry per thread, holding
  physical addresses.
  - A load compares its address with all entries and takes matching data
    from the buffer. Its own thread's entry wins.
  - Entries drain one at a time, in round-robin order, to the next memory
    level.
* **Next-level memory port** (`mem_arbiter`): one port is shared by C
  I-cache refills, C D-cache refills and the store-buffer drain. Arbitration
  is round robin, with one transaction outstanding. A read returns a whole
  64-byte line.
* **Page-walk port**: a second `mem_arbiter`, one word wide, collects the 2C
  TLB walk requests onto one port. The walker itself (page tables, software
  or hardware refill) is outside the core.

Both external ports use the same protocol. The request, address and write
data are held until `*_ack`. A read then ends with `*_rvalid` and its data.
On the page-walk port, the virtual page base goes out and the physical page
base comes back.

## MCML cells

These are logic models of the library cells the core would be built from.
They are instantiated next to the core with their own pins, as a cell check:
the universal gate drives a flip-flop clocked by the core clock.

* `mcml_ugate`: the two-level differential universal gate.
  - `out = in1 ? in3 : in5` and `out_b = in1 ? in4 : in6`.
  - AND, OR, XOR and a 2:1 mux come from the choice of inputs.
* `mcml_dlatch`: the D-latch.
  - It follows the differential input while CLK is high (CLK_B low).
  - It holds while CLK is low, and also when a pair's two rails are equal
    (an invalid level).
* `mcml_dff`: two latches, master on the low phase and slave on the high
  phase, giving a rising-edge flip-flop.

## Parameters of `cslow_cpu`

| Parameter | Default | Meaning |
|---|---|---|
| `C` | 8 | slow-down factor: time slots, I-cache banks, D-cache banks, register files |
| `T` | 16 | hardware threads (a multiple of C) |
| `ICACHE_BYTES` | 16384 | size of one I-cache bank |
| `DBANK_BYTES` | 16384 | size of one D-cache bank |
| `DWAYS` | 4 | D-cache associativity |
| `LINE_BYTES` | 64 | line size of all caches |
| `BANK_BUSY` | 2 | D-cache bank occupancy after a load, in cycles |
| `MD_STAGES` | 32 | multiplier/divider steps |
| `TLB_ENTRIES`, `TLB_WAYS` | 32, 4 | size of every TLB |
| `PAGE_BITS` | 12 | page size 4 KB; must be at least 6 + log2(C) |

The default sizes are those of the original 8-slow design. The exceptions
are `BANK_BUSY` and `PAGE_BITS`, which are this design's choices. The
original evaluation also ran C = 1, 2, 4 (5-, 9- and 17-stage pipelines)
and up to 64 threads. These are reached by overriding `C` and `T`. The
end-to-end test program gives correct results with `C` set to 1, 2, 4 and
8 (T = 16), and with `T` set to 32 and 64 (C = 8). `T` must be a multiple
of `C`.

## Ports of `cslow_cpu`

- **`clk`, `rst`**: clock, and synchronous active-high reset.
  - Reset clears the pipelines, the caches, the TLBs and the store buffer.
  - Reset loads each thread's PC from `boot_pc[t]`.
  - Register-file contents are not reset.
- **`thread_en[T]`**: per-thread enable. A disabled thread is never fetched.
- **`m_*`**: the next-level memory port.
- **`pw_*`**: the page-walk port.
- **`perf`**: one-cycle event strobes (`perf_ev_t`), for performance
  counting. The events are:
  - fetch and retire;
  - I-cache, D-cache, I-TLB and D-TLB miss switches;
  - mul/div block and mul/div completion;
  - taken branch and nullified fetch;
  - bank-conflict and store-buffer-full freezes;
  - store-to-load forward;
  - both forwarding paths;
  - idle slot.
- **`ug_in`, `ug_out`, `ff_q`**: the MCML cell-check pins.

## Instruction subset

The decoder (`mips_decoder`) implements this MIPS-I integer subset:
- **ALU, register forms:** ADD(U), SUB(U), AND, OR, XOR, NOR, SLT(U).
- **ALU, immediate forms:** ADDI(U), SLTI(U), ANDI, ORI, XORI, LUI.
- **Shifts:** SLL, SRL, SRA and their variable forms.
- **Multiply and divide:** MULT(U), DIV(U), MFHI, MFLO.
- **Loads and stores:** LW, SW.
- **Control:** the branches and jumps listed above.

Not supported:
- overflow traps (ADD/SUB/ADDI behave as their unsigned forms);
- exceptions and interrupts;
- sub-word loads and stores;
- coprocessors.

Any other encoding executes as a no-op.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cslow_pkg.sv \
    tb/tb_cslow_cpu.sv --top-module tb_cslow_cpu
./obj_dir/Vtb_cslow_cpu
```

`tb_cslow_cpu` runs the core at its default parameters (C = 8, T = 16):
- **Programs.** Every thread runs a generated MIPS program with loops,
  delay slots, multiply and divide, stores reloaded at once, loads of a
  shared word, shifts, compares and a JAL/JR call.
- **Timing.** Threads 12–15 are enabled late, so some slots run one thread
  for a while and others two.
- **Page mapping.** The walker model maps every page 32 KB away from its
  virtual address, so a missing translation would put data where the checks
  do not find it.
- **Checks.** The testbench checks every stored result. It also checks that
  each mechanism above occurred at least once: every kind of thread switch,
  nullification, both freezes, store-buffer forwarding, both forwarding
  paths and idle slots.

The run takes about 5,200 cycles.

`tb_kernels` runs two small integer data-parallel kernels on the same
default core:
- **Histogram**, on threads 0–7. Each thread bins 64 values into 16
  counters, using load, increment and store on the same word, so it leans on
  store-to-load forwarding.
- **Linear regression**, on threads 8–15. Each thread sums x, y, x² and xy
  over 24 points, so every iteration waits out two multiplies.

Each slot thus mixes a memory-bound thread with a multiplier-bound one. The
testbench checks every bin and sum, and prints the cycle count and IPC
(about 18,600 cycles at an IPC of about 0.8).

The block testbenches start with directed cases. Those of the caches, the
TLB, the store buffer, the memory arbiter and the decoder then run a long
random phase. Each output is compared every cycle with a small reference
model in the testbench: resident lines, bank busy time, buffered stores,
grant fairness, or the decoded fields.

## Departures and limits

* **Not built:**
  - **FPU.** The original design adopts an existing four-stage
    single-precision unit. Floating-point workloads therefore cannot run.
  - **L2 cache and DRAM.** These are outside the core, behind the `m_*`
    port.
  - **MCML↔CMOS level converters and the bias generator.** These are analog
    circuits.
* **Retiming.** C-slow retiming is expressed as register chains after each
  stage's logic. The cycle-time benefit assumes a retiming synthesis step.
* **Multiply/divide latency.** It is 32·C. A 38·C figure quoted for the
  floating-point multiply/divide path does not apply to this integer unit.
* **This design's own choices:**
  - the replay-based switching mechanism;
  - freezing on a full store-buffer entry;
  - the bank-to-address mapping, the bank occupancy time and the
    replacement policies;
  - the page size and the walk port;
  - the single-outstanding memory arbitration;
  - the reset behaviour.

  The original design states only the effects: a miss switches threads, and
  a bank conflict freezes the pipeline for one or two cycles.
