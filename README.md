# Co-operative Intelligent Memory (CIM)

A conventional processor spends most of its time in a few tight loops that
stream through a block of data: add pairs of words, accumulate a vector, and
so on. The CIM puts a small loop engine next to memory and lets it take such
loops over **without recompiling the program**. It has two parts:

* the **CPIM** (co-operative pseudo-intelligent memory): a shared SRAM plus a
  tiny processor, *CPU_minor*, that fetches no instructions. A handful of
  registers, loaded from outside, tell it where the operands are, how many
  there are, which operation to apply, and where the results go.
* the **observer**: logic that sits on the host processor's (*CPU_major*'s)
  instruction and data buses while the program runs, works out what the loop
  does from the traffic alone, and then hands the loop to the CPIM.

Execution has two stages:

1. **Learning.** CPU_major runs the whole program, loop included. The observer
   records the loop's operand block, its operation, its result block and the
   addresses of the loop's instructions. When the data memory goes quiet it
   interrupts CPU_major and borrows its buses. It then loads the CPIM
   registers, copies the operands into the shared memory, and overwrites the
   loop's instructions with NOPs. Once it releases the buses, the CPIM runs
   the loop.
2. **Serving.** On later runs CPU_major finds NOPs where the loop was and
   continues with the rest of its program. Fetching the first NOP restarts
   the CPIM on the learned loop. The two processors run in parallel, and the
   results appear in the shared memory.

CPU_major is an existing processor and is not part of this RTL. Its buses are
ports of `cim_top`. A small behavioural model, `tb/cpu_major_model.sv`, drives
them in the system test.

## Block structure

```
cim_top
 ├─ instruction_memory   CPU_major's program (fetch port + write port)
 ├─ data_memory          CPU_major's data
 ├─ observer
 │   ├─ vsa_vjs_extractor  operand block: start (VSA), count (VJS), step
 │   ├─ vjn_vdb_extractor  job nature (VJN) and destination block (VDB)
 │   ├─ vib_extractor      instruction block (VIB): CMP .. BRA addresses
 │   └─ itc                information transfer control (bus hand-over)
 └─ cpim
     ├─ icu                iteration control unit: registers, pointers, start
     ├─ cpu_minor          machine-cycle sequencer with accumulator
     │   └─ fu_bank        functional units: ADD SUB AND OR
     ├─ sm_arbiter         shared-memory arbitration
     └─ shared_memory      SRAM
```

`cim_pkg` holds the shared types: functional-unit codes, the job op-code
struct, the ICU register selector, and the CMP/BRA/NOP codes.

While the observer owns the buses (`bus_req_o` high and `bus_ack_i` given),
multiplexers in `cim_top` route the memory ports to the observer. At all
other times they belong to CPU_major.

## The CPIM

### Registers (ICU)

| register | meaning | width |
|---|---|---|
| Ra   | first operand address (VSA) | ADDR_W |
| Rjs  | number of operands (VJS) | JS_W |
| Rjn  | `[3:0]` op-code, `[7:4]` operand address step | 8 |
| Rsai / Reai | first / last address of the bypassed instructions (VIB) | ADDR_W |
| Rsdi | first result address; result step in `[ADDR_W+3:ADDR_W]` | ADDR_W+4 |
| Redi | last result address | ADDR_W |

Op-code (`job_op_t`): bits `[1:0]` select the functional unit (0 ADD, 1 SUB
= a−b, 2 AND, 3 OR), bit 2 selects the cumulative form, and bit 3 is unused.
When Rjn is read back, bit 15 holds the busy flag.

A job starts when **Ra, Rjs and Rjn have all been written since the last
start** and `hold_i` is low. In the serving stage a job also starts on the
registers already loaded when CPU_major fetches the word at Rsai. When the
job ends, `irq_o` is set and stays set until `irq_clr_i`.

### Jobs and timing

One clock is one machine cycle. Memories are synchronous, and read data
arrives one cycle after the request.

* **Pairwise** (`M[d+k] ← M[a+2k] op M[a+2k+1]`). The cycles are OF1 (read
  operand 1), OF2 (read operand 2), and IE (execute and write the result).
  That is 3 cycles per result, and Rjs/2 results; an odd last operand is
  ignored. Total: `1 + 3·⌊Rjs/2⌋ + 1` cycles.
* **Cumulative** (`M[d] ← M[a] op M[a+1] op … op M[a+Rjs−1]`). The first
  pair takes OF1, OF2 and IE. Each further operand takes OF2 and IE, because
  operand 1 is the accumulator. A final WBM writes the accumulator. Total:
  `1 + 3 + 2·(Rjs−2) + 1 + 1` cycles.

The extra 1s are one setup cycle after the start and one done cycle.

### Shared-memory arbitration

In active mode (a job running) CPU_minor has absolute priority and accesses
the SRAM every cycle it needs (burst). An external request is granted only
in a cycle CPU_minor leaves free (cycle stealing, flagged by `sm_stolen_o`).
A refused request must be held until `sm_gnt_o`. In sleep mode (no job) the
external side owns the SRAM. A pairwise job keeps the memory busy from its
first OF1 to its last IE, so outside masters get in only during its setup and
done cycles. A cumulative job frees one cycle in every two.

## The observer

### Finding the operand block (VSA, VJS, step)

The extractor differences the addresses of successive data reads. A run is a
series of reads with the same positive step that fits in 4 bits. The run ends
at the first read whose step differs. If the ended run covered at least
`LOOP_THRESH` operands (default 8), the extractor reports its start address,
operand count and step, and pulses `record`. A shorter run is forgotten.
Because a run ends only when the next read arrives, a loop is recognised at
the first read after it.

### Finding the operation (VJN) and result block (VDB)

The extractor keeps the last two operands read and feeds them to a copy of the
functional units. It also keeps one running accumulator per unit, started
from the first two operands of the run. Each data write is compared with all
pairwise results and all accumulator values, and the comparisons are ANDed
over every write of the run. A unit that matched once by chance is therefore
dropped at the next write. The encoder prefers a cumulative match, then the
lowest-numbered unit. The first and last write addresses, and the step
between the first two writes, give the destination block.

### Finding the instructions (VIB)

The extractor keeps the addresses of the most recent CMP and BRA fetched. At
the loop end they bound the instruction block to be replaced. Instruction
words carry a 4-bit op-code in `[15:12]`: NOP = 0, CMP = 3, BRA = 8.

If a loop ends and any extractor cannot describe it (no matching operation,
or no CMP/BRA pair), the observer clears all three extractors and keeps
learning.

### Bus hand-over (ITC)

When all vectors are valid, the ITC:

1. Waits until the data memory has seen no access for `IDLE_CYCLES` (4)
   cycles in a row.
2. Raises `bus_req_o`. CPU_major answers with `bus_ack_i` at an instruction
   boundary and waits.
3. Writes Rsai, Reai, Rsdi, Redi, Ra, Rjs and Rjn, one per cycle. `hold`
   stays high so the job cannot start early.
4. Copies the VJS operands from the data memory to the **same addresses** in
   the shared memory. Each word takes a read cycle and a write cycle, plus any
   refused cycles.
5. Writes NOP over every word from CMP to BRA.
6. Pulses `dtc_o` (data transfer complete) and drops `bus_req_o` and `hold`.
   The CPIM starts.

The hand-over costs about `1 + 7 + 2·VJS + VIB_length + 1` cycles of
CPU_major time. `xfer_cycles_o` reports the actual count. After one transfer
the observer stops learning: the system has one CPIM, so it keeps one loop.

## Departures and choices

These points follow the published architecture in spirit but are fixed here by
choice.

* **Clocking.** The original pipeline uses both clock edges. This RTL uses the
  rising edge only, with one machine cycle per clock. Reset is synchronous
  and active low. Memory contents are not reset.
* **Sizes.** Words are 16 bits. Each memory holds 2^20 words, enough for a
  1024×768 frame of 16-bit pixels. Rjs is 20 bits. Four functional units are
  used (n = 2 op-code bits).
* **Granularity.** Byte, word and long-word modes are not built. The upper Rjn
  bits carry only the operand address step.
* **Result block.** Redi is stored and can be read, but it does not limit the
  writes. The job length comes from Rjs alone.
* **Pairwise job count.** The result block of a pairwise job has Rjs/2
  entries, following the M[x] ← M[0]+M[1], M[x+1] ← M[2]+M[3] pattern.
* **Start hold and serving trigger.** These are additions. Without the hold,
  the job would start on data not yet copied. The restart on the Rsai fetch
  is this design's answer to how a learned loop is re-run.
* **Result return.** Results stay in the shared memory, and CPU_major reads
  them through the `sm_*` port. The operands are copied to the same addresses
  they had in the data memory.
* **Handshakes.** Bus request/acknowledge, ICU register loading and memory
  request/grant are plain level handshakes of this design.
* **Software-loaded form.** The CPIM can also work without the observer. In
  that form, a program-rewriting tool replaces the loop with stores that
  load the registers. That tool is software and is not included here. Such
  stores would reach the CPIM's `ld_*` port, and `cpim_tb` drives that port
  in this way.
* **Learning limits.** The loop threshold (8) and the idle count (4) are
  assumed values. Only one loop is learned. Multi-CPIM SIMD/MIMD
  arrangements are not built.

## Verification

Every block has a self-checking testbench `tb/<block>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* The memory and arbiter benches use random traffic against a reference
  model. The arbiter bench checks priority, stealing and sleep mode every
  cycle.
* `icu_tb` covers the start rule, hold, the serving restart, the pointers and
  the irq.
* `cpu_minor_tb` and `cpim_tb` run pairwise and cumulative jobs of several
  sizes and check results and exact cycle counts. `cpim_tb` also steals
  cycles while a job runs.
* The extractor, ITC and observer benches replay bus traffic: short runs,
  qualifying loops, wrong operations, and a refused shared memory.
* `cpim_scenarios_tb` runs the two CPIM workloads at full size with default
  parameters. The cumulative sum covers 1,000,000 operands. The pairwise sum
  covers 600,000 operands and gives 300,000 results. It checks every result
  and the exact cycle counts: 2,000,002 and 900,002. It also checks the
  speedup over a non-pipelined machine that needs 5 cycles per iteration:
  the measured values are 2.5 (cumulative) and 1.667 (pairwise, against the
  5/3 limit). It takes a few seconds.
* `cim_top_tb` runs `cim_top` **at its default parameters** with the CPU_major
  model. Program A is a pairwise ADD of 32 pairs. Program B is a cumulative
  SUB of 40 operands. Each program runs once learning and once serving. The
  bench checks results, the extracted vectors, the NOP overwrite, the
  CPU_minor cycle counts, the restart, cycle stealing and the irq. It counts
  every mechanism (short-run reject, loop record, bus request, copy, NOP
  write, DTC, load start, serve start, stolen cycle, irq) and fails if any
  count is zero. In the current run, program A takes CPU_major 632 cycles in
  the learning pass (143 of them handing over the buses) and 48 cycles in the
  serving pass. Program B takes 487 cycles learning and 46 serving. The
  serving pass shows the point of the design: the loop costs CPU_major a
  single NOP per bypassed instruction.

### Simulating

With Verilator 5, for example for the system test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module cim_top_tb \
    rtl/cim_pkg.sv tb/cim_top_tb.sv -y rtl -y tb -o sim
./obj_dir/sim
```

Replace `cim_top_tb` with any other `<block>_tb`. The package must come first.
The system test runs in well under a second at full size. To try smaller
memories, override `ADDR_W` on `cim_top`.
