# SIMD execution of unmodified scalar RISC-V code

This is a RISC-V processor that runs a loop as SIMD without any SIMD
instructions. The program is ordinary RV32I code plus the multiply
instructions, built with a stock compiler. One loop in it is marked as the
*SIMD loop*. The core has one **master** processing element (PE) and `NPE-1`
**slave** PEs, and all of them share one five-stage pipeline. Outside the loop
only the master works, like a plain in-order scalar core. Inside the loop
every PE executes the same instruction in the same cycle, on its own register
file and its own slice of the data memory. A loop of `X` iterations therefore
finishes in `X/NPE` trips.

No instruction is added to the code, and the core spends no cycles entering
or leaving the loop. The cost is in the data layout. Everything one iteration
reads and writes must sit in one contiguous block, which the core cuts into
`NPE` equal partitions. A small set of configuration values, worked out ahead
of time from the compiled program, tells the core where the loop is.

## The idea in one example

Take matrix-vector multiplication where row `i` of `A` carries its own result
in an extra column: `A[i][5] += A[i][0..4] · v[0..4]`. The compiled loop looks
like this:

```
        lui  x5, %hi(A)          # running row address  (loop-bound register rs1)
        add  x6, x5, x11         # end of A             (loop-bound register rs2)
loop:   lw   x12, 20(x5)
        lw   x13, 0(x5) ; lw x14, 0(x10) ; mul x15,x13,x14 ; add x12,x12,x15
        ...                      # (inner loop unrolled by the compiler)
        sw   x12, 20(x5)
        addi x5, x5, 24
        bne  x5, x6, loop        # closing branch: rs1 = x5, rs2 = x6
```

The loop walks `x5` from the start of `A` up to the end held in `x6`. To run
it on `n` PEs:

1. The block `A` is cut into `n` equal partitions. Slave `Sk` gets
   partition `k` (k = 1..n-1) and the master takes the last one.
2. When the two instructions that set `x5` and `x6` reach writeback, every
   PE writes its **own** partition's start into `x5` and its own end into
   `x6`, in place of the computed values. For 30 words on 3 PEs this gives
   S1 = (1, 10), S2 = (11, 20) and master = (21, 30). This costs no cycle,
   because it replaces the original writes.
3. Every instruction fetched from `loop` up to the `bne` runs on all PEs.
   Each PE's `x5` points into its own rows, so each PE does its share of
   iterations. The master's `bne` decides when everyone leaves. Since all
   partitions are the same size, all PEs finish together.
4. `v` lies outside the partitions. A load of `v[j]` shows the same address
   on every PE. Only the master then reads memory, and its result is written
   into every register file.

## Who executes what

| instruction / situation | master | slaves |
|---|---|---|
| anything, standard mode (PC outside the loop) | executes | the master's result is written into their register files |
| ALU, multiply, load/store to own partition, parallel mode | executes | each executes on its own registers and partition |
| LUI, AUIPC, JAL, JALR, branches, parallel mode | executes | the master's result is written into their register files |
| load/store where all PEs give the same word address (common memory) | accesses memory | a load gets the master's data; a store is done by the master alone |
| load/store beyond local memory (expanded memory, master's address), any mode | accesses it through `ext_*` | a load gets the master's data; a store is done by the master alone |
| the two loop-bound instructions (by PC and destination register) | writes its own bound | each writes its own bound |

In standard mode the slave register files follow the master's. This is how
registers set before the loop, such as the base address of `v`, reach the
slaves.

## Tagged data memory

Each 32-bit word of the local data memory has a **tag** of `ceil(log2 NPE)`
bits:

* `0`: a word only the master may touch. This covers common data, everything
  outside the SIMD block, and the master's own partition.
* `k` (1..NPE-1): a word in slave `Sk`'s partition.

In the execute stage each PE's address looks up its tag. The tag sets that
PE's enable for the memory stage:

* standard mode: the master may access any word;
* parallel mode, all addresses equal: the master accesses the word for
  everyone (common access);
* parallel mode, addresses differ: PE `k` may access the word only if its tag
  is `k`, or `0` for the master. Otherwise the access is blocked and
  `evt.part_fault` pulses. A correctly laid-out program never triggers this.

Tags are fixed for a program. They are written with the load port together
with the program and data, and instructions cannot read or write them.

The memory is stored as four byte-wide arrays, so byte and halfword stores
work. Every PE has its own tag port and data port. Reads are asynchronous and
writes are synchronous. Partitions do not overlap, so two PEs never write the
same word in one cycle. An assertion in `tagged_dmem` checks this.

## Pipeline

| stage | master | per PE (`pe_lane`) |
|---|---|---|
| fetch | instruction memory read; 1-bit branch prediction; mode = "PC inside `[loop_start, loop_branch]`" | — |
| decode | decoding; branch/jump resolution with the master's operands; hazard stall | register read (write-through from writeback) |
| execute | common-access test; tag check → enables | ALU with 1-cycle 32×32 multiplier; address; tag lookup |
| memory | — | local memory access (1 cycle); expanded-memory access through `ext_*` (master, until `ext_ready`) |
| writeback | — | register write: own result, master's result, or loop bound |

Timing rules:

* **No forwarding.** If decode reads a register that an instruction in
  execute or memory will write, decode and fetch hold and a bubble goes into
  execute. A result in writeback reaches decode through the register file's
  write-through. A dependent instruction right after its producer waits 2
  cycles; one instruction further on, it waits 1.
* **Branches** are predicted in fetch by a table of 1-bit counters (64
  entries, indexed by PC[7:2]). The target is PC + B-immediate, pre-decoded
  from the fetched word. Branches are resolved in decode, so a misprediction
  costs 1 cycle. **JAL/JALR** are not predicted; they redirect from decode
  and also cost 1 cycle.
* **Expanded memory.** A load or store whose byte address is at or above
  the local data memory size (`4 × DMEM_DEPTH`, 32 KiB) goes out through the
  `ext_*` port. A cache or an external memory can sit there. While
  `ext_req` is high and `ext_ready` is low, the whole pipeline holds: no
  register, memory or predictor state changes. The access completes in the
  cycle `ext_ready` is high. Only the master makes the access. In parallel
  mode its load result goes to every PE, as for common data, so external
  data never becomes part of a partition.
* **Mode changes** cost nothing. The mode travels with each instruction from
  fetch.
* A loop that is correctly predicted therefore runs at the same cycles per
  iteration in both modes. A SIMD run takes exactly
  `(X − X/NPE) × cycles_per_iteration` fewer cycles than the scalar run.

`ECALL`/`EBREAK` stops the core: fetch stops, and `halted` rises when the
instruction retires. `FENCE` is a no-op. Division, remainder and CSR
instructions are not supported and run as no-ops.

## Interface of `simd_riscv_core`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ld_imem_we`, `ld_dmem_we`, `ld_tag_we` | in | 1 | load-port write strobes for instruction word, data word, tag |
| `ld_addr`, `ld_wdata`, `ld_tag` | in | 32, 32, TAGW | load-port byte address, word, tag |
| `cfg` | in | `simd_cfg_t` | `simd_en`, `loop_start` (branch target), `loop_branch` (PC of the closing branch), `set_rs1_pc`/`set_rs2_pc` (PCs of the two loop-bound instructions), `rs1_reg`/`rs2_reg` (their register numbers) |
| `rs1_init`, `rs2_init` | in | NPE×32 | per-PE partition start / end (index 0 = master = last partition) |
| `dbg_addr` / `dbg_rdata` | in / out | 32 | asynchronous read of a data word |
| `halted` | out | 1 | the program has stopped |
| `evt` | out | `events_t` | one-cycle pulses: retire, stall, mispredict, jump, par_enter, par_exit, par_instr, common_access, part_access, part_fault, rs_init, ext_access, ext_wait |
| `ext_req` | out | 1 | expanded-memory request; it and the request fields stay stable until `ext_ready` (a concurrent assertion checks this in simulation) |
| `ext_we`, `ext_be` | out | 1, 4 | write and byte enables |
| `ext_addr`, `ext_wdata` | out | 32 | byte address, store data |
| `ext_rdata`, `ext_ready` | in | 32, 1 | load data; the access completes in this cycle |

To run a program:

1. Hold `rst_n` low. Write the program, the data and the tags through the
   load port, one word per clock.
2. Drive `cfg`, `rs1_init` and `rs2_init`. Keep them stable while the core
   runs.
3. Release reset. Execution starts at `RESET_PC`.

For a loop whose bound registers run from `start` to `end` on `NPE` PEs, use
`P = (end − start)/NPE`. Slave `k` gets `(start + (k−1)·P, start + k·P)` and
the master gets `(start + (NPE−1)·P, end)`. Tag the words of partition `k−1`
with `k`, and tag every other word `0`. With `cfg.simd_en = 0` the core is a
plain scalar RV32IM core.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NPE` | 25 | number of PEs (unroll factor). The largest evaluated build; 5 and 15 were also evaluated, and 25–30 PEs fit the target FPGA |
| `IMEM_DEPTH` | 4096 | instruction words (16 KiB) |
| `DMEM_DEPTH` | 8192 | data words (32 KiB); the evaluated programs need under 32 KiB |
| `BHT_ENTRIES` | 64 | branch predictor counters |
| `RESET_PC` | 0 | first instruction |
| `HAS_MUL` | 1 | build the multipliers; with 0 the four multiply instructions are illegal (no-ops), for programs that use none |

## Modules

| file | role |
|---|---|
| `rtl/simd_pkg.sv` | shared types: decoded control record, SIMD configuration, events, load/store helpers |
| `rtl/simd_riscv_core.sv` | top: fetch, decode control, shared control pipeline, tag-based enables, writeback select, external-memory port and pipeline hold, PE array |
| `rtl/pe_lane.sv` | one PE's datapath: register file, ALU, memory port, writeback mux |
| `rtl/tagged_dmem.sv` | data + tag memory, one port pair per PE |
| `rtl/imem.sv` | instruction memory |
| `rtl/regfile.sv` | 2R1W register file with write-through |
| `rtl/rv_decoder.sv` | RV32I + MUL/MULH/MULHSU/MULHU decoder |
| `rtl/rv_alu.sv` | ALU and multiplier |
| `rtl/branch_predictor.sv` | 1-bit dynamic predictor |
| `rtl/branch_resolve.sv` | decode-stage branch/jump resolution |
| `rtl/stall_ctrl.sv` | hazard stall |
| `rtl/simd_mode_ctrl.sv` | mode from PC, loop-bound instruction recognition, mode pulses |

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. Testbenches with a processor program write it
with the encoders in `tb/rv_asm_pkg.sv`.

* `tb_simd_riscv_core` uses the default build (25 PEs). It runs
  matrix-vector multiplication on 150 rows, plus a constant read from
  external memory in every iteration, three times: scalar, SIMD, and
  SIMD with one deliberately wrong tag. It checks every result against values
  computed in the testbench. It checks the number of mode switches, common
  and partition accesses, loop-bound overrides, external accesses and wait
  cycles. An external-memory model answers after two wait cycles. After the
  loop the program stores to external memory and reads the word back. It
  checks that the SIMD run saves exactly 144 × 54 cycles (scalar 8139
  cycles, SIMD 363 cycles, 22.4× fewer cycles). It also checks that the
  wrong tag blocks exactly that store. Every mechanism must fire at least
  once.
* `tb_simd_workloads` builds the core with 5, 15 and 25 PEs and runs six
  workloads on each: matrix-vector multiplication (MVM), sum of absolute
  differences (SAD) and sum of squared differences (SSD) on 150 rows; a
  neural-network layer (ANN) of 75 neurons with a ReLU and one serial output
  neuron; and k-nearest-neighbour search over 150 points, whose distances are
  then fully sorted in standard mode, either by selection sort (KNS) or by
  an iterative quicksort (KNQ). All kernels are hand-written; only the
  algorithm names and iteration counts are fixed. For each workload the
  testbench measures the cost of one loop iteration from two scalar runs of
  the loop alone. It then checks every result and checks that the SIMD run
  is faster by exactly `(X − X/NPE)` iterations:

  | workload | cycles/iteration | scalar | n = 5 | n = 15 | n = 25 |
  |---|---|---|---|---|---|
  | MVM | 48 | 7217 | 1457 (4.95×) | 497 (14.5×) | 305 (23.7×) |
  | SAD | 93 | 13967 | 2807 (4.98×) | 947 (14.7×) | 575 (24.3×) |
  | SSD | 63 | 9467 | 1907 (4.96×) | 647 (14.6×) | 395 (24.0×) |
  | ANN | 57 | 5204 | 1784 (2.92×) | 1214 (4.29×) | 1100 (4.73×) |
  | KNS | 63 | ≈103k | 1.08× | 1.09× | 1.10× |
  | KNQ | 63 | ≈25k | ≈1.45× | ≈1.47× | ≈1.56× |

  The sort times depend on the random data, so those rows vary a little from
  run to run. The serial parts of ANN, KNS and KNQ limit their speed-up, as
  Amdahl's law predicts; the mode switches themselves cost nothing. MVM,
  SAD and SSD come close to n because their programs contain almost nothing
  outside the loop. A whole application with more set-up code gains less.
  A fourth build, with 5 PEs and `HAS_MUL = 0`, runs SAD, the only workload
  without multiplications, with the same result and cycle counts. A fifth,
  with a single PE (`NPE = 1`, a plain scalar core whose one-bit tags are
  all 0), runs all six workloads in the same number of cycles with or
  without the SIMD configuration.

To simulate with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/simd_pkg.sv tb/rv_asm_pkg.sv tb/tb_simd_riscv_core.sv \
    --top-module tb_simd_riscv_core -o sim
./obj_dir/sim
```

Any other testbench builds the same way with its own name.

## Where this design makes its own choices

The source describes the architecture but not its RTL. These points are
choices of this implementation:

* **Loop-bound override.** The core recognises the two instructions by PC
  and destination register taken from `cfg`. The source says only that the
  master replaces the instruction that sets rs1 and rs2.
* **Slave register state.** Slaves receive every master result in standard
  mode and for master-only instructions.
* **Common access.** A common access is detected as "all PEs present the
  same word address".
* **Tag faults.** A mismatching tag blocks the access and is reported.
* **Register file.** Writes pass through to reads in the same cycle. This is
  why a hazard is checked only against execute and memory.
* **Small decisions.** The predictor size and indexing, halting on
  ECALL/EBREAK, the load port, and clearing the registers on reset are also
  choices of this design.
* **Memory ports.** Every PE has its own port on one multi-ported memory,
  rather than the memory being split into physical banks per partition.
* **Instruction set per program.** Only the multiplier can be left out
  (`HAS_MUL = 0`). All other instructions are always decoded. Stripping
  every instruction a program does not use would save area but would not
  change behaviour.
* **Expanded memory port.** The request/ready handshake on `ext_*`, and
  holding the whole pipeline while waiting, are choices of this design. The
  cache itself and the external memory device are not included. Any
  controller connected to `ext_*` must provide them.
