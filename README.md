# Rollback-based error detection and recovery for a soft-core integer pipeline

On an SRAM-based FPGA a particle strike can flip two very different kinds of
bit. A flip in a *user bit* (a flip-flop of the design) is an ordinary soft
error: the next write to that flip-flop repairs it. A flip in the
*configuration memory* (a LUT entry, a routing switch) changes the circuit
itself, and it stays until the FPGA is reconfigured. About 98 % of the memory
cells on such a device are configuration cells, so the second case is the
common one.

This design protects the integer pipeline of a soft processor against both,
with one idea: **run two copies of the pipeline in lock step, compare them
stage by stage, and on a mismatch roll the pipeline back and run the faulty
instruction again.** A user-bit upset is gone after the re-run, so execution
simply continues. A configuration fault produces the same mismatch in the same
place again, and that repetition is what identifies it. Nothing has to be
known in advance about where the fault is. Without faults there is no time
penalty. A recovered upset costs exactly seven cycles.

Next to this main mechanism sits a lighter *alternative* checker. It compares
only what the two copies drive to the outside world and raises a flag. It
does not try to recover. The fault is left to reconfiguration.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The mechanism was
first developed for the LEON3 SPARC V8 pipeline. That pipeline is not
included. In its place is a small seven-stage pipeline with its own ISA (see
"The pipeline being protected").

## Block structure

```
                 imem          dmem                    (copy 1 drives these)
                  |              |
   +--------------+--------------+--------------------------------------+
   | ft_iu        |              |                                      |
   |   int_pipeline u_p1  FE DE RA EX ME XC WR ----+--> regfile u_rf    |
   |   int_pipeline u_p2  FE DE RA EX ME XC WR     |   (written by p1)  |
   |                        |  |  |  |  |  |       |                    |
   |            dwc_compare x6 (+ reg-file read/write trees)            |
   |                        |                                           |
   |                     cmp[6:0] --> fault_pipe --> rollback to        |
   |                        |                        restart_pc, gating |
   |                        |                        of rf and store wr |
   |                        +------> cfg_fault_detector --> perm_fault  |
   |   p1/p2 outputs ------------->  alt_checker --------> alt_fault    |
   +--------------------------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/ft_pkg.sv` | widths, stage indices, ISA opcodes, stage-register structs |
| `rtl/int_pipeline.sv` | the seven-stage pipeline; exports every stage input register |
| `rtl/regfile.sv` | 32 × 32 register file, 2 synchronous read ports, 1 write port |
| `rtl/dwc_compare.sv` | XOR-per-bit, OR-of-all comparison tree |
| `rtl/fault_pipe.sv` | fault bits travelling with the instructions; rollback decision |
| `rtl/cfg_fault_detector.sv` | the persistence test (counter preset to 7) |
| `rtl/alt_checker.sv` | output-only, detection-only alternative |
| `rtl/ft_iu.sv` | top: two pipelines, register file, all checkers, restart register, store gating |

## Detection: what is compared

Each stage's **input register** is compared between the two copies. It is the
register that feeds the stage, not the stage's result. The comparison tree
then runs in parallel with the stage logic, not in series with it. The stage's
critical path stays as it was, as long as the tree (depth about
log_LUT-inputs(bits)) is shallower than the stage logic. One mismatch signal
is produced per stage, `cmp[k]`:

| k | stage | compared |
|---|---|---|
| 0 | fetch | nothing: its input comes from the instruction cache |
| 1 | decode | `de_q`, plus the register-file read addresses and read enable |
| 2 | register access | `ra_q` |
| 3 | execute | `ex_q` |
| 4 | memory | `me_q` |
| 5 | exception | `xc_q` |
| 6 | write-back | `wr_q`, plus the register-file write address, data and enable |

The read request is folded into decode because decode computes it. The
register file is read synchronously, so a wrong address would show up as
wrong data one stage later. The write port is folded into write-back, so a
corrupted write is caught in the cycle it would happen.

Only copy 1 drives the memories and the register file. Copy 2 is observed,
never used. Both copies get the same inputs, so a fault-free pair stays bit
identical.

## Recovery: how a fault travels and is rolled back

Acting on a mismatch in the stage where it appears would mean annulling a
different set of younger instructions for each stage, and choosing among
seven restart addresses. Instead, the mismatch **travels with the
instruction** (`fault_pipe`). A fault bit is registered at the output of each
stage:

```
fault_reg[k+1] <= fault_reg[k] | cmp[k]        (fault_reg[1] <= cmp[0] = 0)
```

Action is taken only when the instruction reaches write-back. If
`fault_reg[6] | cmp[6]` (`wb_fault`) is high:

* the register-file write of that instruction is suppressed (`rf_we` gated),
  because write-back's outputs are not registered and cannot be annulled
  afterwards;
* if the instruction is not already annulled, `rollback` (annul-all) is
  raised: every instruction in both copies gets its annul bit set, and both
  PCs are loaded with the write-back instruction's address.

An annulled instruction that carries a fault bit (for example one in the
shadow of a taken branch) only has its write suppressed. Rolling back to it
would restart on a path the program never takes.

**Where the restart address comes from.** The obvious source is the PC field
of the write-back instruction, but that field may be the very bit that was
hit. A flipped PC bit travels with the instruction, gets compared, and then
makes the rollback restart at the corrupted address. Instead, `ft_iu` keeps
`restart_pc`: the next-instruction address (`npc`, carried down from the
memory stage) of the last instruction that left write-back without a fault.
With no fault this is exactly the write-back instruction's address. Since it
is only ever loaded from checked instructions, a corrupted PC never reaches
it.

**Stores.** A store writes memory in the memory stage, two stages before
write-back, so a rollback would come too late to undo a wrong one. The store
enable is therefore gated with the memory stage's fault signal
(`stage_fault[ME]`). A store that is held back this way is carried out when
its instruction runs again after the rollback.

Timing of a transient fault detected in stage *s* at cycle *t*
(no stalls, stage indices as in the table):

```
cycle t          : cmp[s]=1, detector loads its counter with 7 (6 after this edge)
cycle t+6-s      : instruction in write-back, rollback=1, write suppressed
cycle t+7-s      : instruction refetched (fetch)
cycle t+7        : instruction back in stage s  -> counter = 0 -> check
cycle t+8        : recovered=1 (mismatch gone) or perm_fault=1 (mismatch again)
```

The loop is seven cycles long whatever *s* is: 6−*s* steps to write-back, one
to fetch, *s* back to stage *s*. So every recovered upset delays the rest of
the program by exactly 7 cycles. The testbenches check this to the cycle.

## Telling configuration faults from user-bit faults

`cfg_fault_detector` does the persistence test. When it is idle and any
`cmp` bit is set, it records which stages mismatched. It then loads a down
counter with 7. The counter steps once per *instruction cycle*, meaning a
cycle in which the pipeline advances (`hold` low); the detection cycle
counts. When it reaches 0, the rolled-back instruction is back in the
recorded stage, and that stage is looked at again:

* still mismatching → `perm_fault` (sticky) and a `perm_event` pulse. This is
  the hook for a partial or full reconfiguration controller, which is not
  part of this RTL;
* clean → a one-cycle `recovered` pulse.

Mismatches that appear while the counter runs (the same fault moving down the
pipeline) do not restart it. Under a persistent fault the pipeline keeps
rolling back and makes no progress until it is reconfigured and reset.

## The alternative mechanism

`alt_checker` compares only the outputs of the two copies: fetch address,
data-memory address, data and enables, and the register-file read and write
ports. It sets the sticky `alt_fault` at the first difference. It watches no
internal signal and never recovers. It therefore needs a much smaller
comparator, touches no timing path, and catches any fault that becomes
visible at the outputs, wherever it sits. In `ft_iu` it runs on the same two
copies as the main mechanism. Setting the parameter `MAIN_MECH = 0` builds
`ft_iu` with the checker alone. The stage comparators, `fault_pipe`,
`cfg_fault_detector` and the restart register are then left out. Rollback
never happens, and `stage_fault`, `recovered`, `checking`, `perm_event` and
`perm_fault` stay 0.

## The pipeline being protected

`int_pipeline` has seven stages, named after LEON3's: fetch, decode, register
access, execute, memory, exception and write-back. It runs a small load/store
ISA of its own (`ft_pkg`):

```
[31:26] op  [25:21] rd  [20:16] rs1  [15:11] rs2  [15:0] imm (signed)
ADD SUB AND OR XOR SLL SRL   rd = rs1 op rs2
ADDI rd = rs1+imm   LUI rd = imm<<16
LD rd = mem[rs1+imm]   ST mem[rs1+imm] = rd
BZ/BNZ rs1: if (rs1 ==/!= 0) pc += imm*4     other opcodes: no-op, r0 = 0
```

* Decode drives the register-file read addresses. Operands arrive in register
  access.
* Execute computes the result, the branch condition and the branch target.
* A taken branch redirects fetch from the memory-stage register and annuls
  the four younger instructions. There is no delay slot.
* The exception stage only passes the instruction on.
* Memories are expected to answer in the same cycle. `hold` freezes every
  register, as on a cache miss.
* **There is no interlock and no forwarding.** A result may be used by the
  fifth instruction after its producer, so code must keep four instructions
  in between.
* Every stage register is rewritten on every advancing cycle, so a flipped
  flip-flop is always overwritten by the re-run. In a pipeline that leaves
  don't-care fields unwritten, such flips would survive the rollback and be
  mistaken for configuration faults.

## Interface of `ft_iu`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `hold` | in | 1 | stall both pipelines this cycle |
| `imem_addr` / `imem_rdata` | out / in | 32 | fetch; data in the same cycle |
| `dmem_addr`, `dmem_wdata`, `dmem_we`, `dmem_re` / `dmem_rdata` | out / in | 32,32,1,1 / 32 | memory stage; load data in the same cycle, store at the clock edge |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | 1,5,32 | register writes actually committed |
| `stage_fault` | out | 7 | per-stage fault (`fault_reg | cmp`) |
| `rollback` | out | 1 | annul-all and restart this cycle |
| `recovered` | out | 1 | pulse: upset corrected |
| `checking` | out | 1 | persistence test under way |
| `perm_event` | out | 1 | pulse: persistence test failed again (reconfiguration trigger) |
| `perm_fault` | out | 1 | sticky: persistent fault found |
| `alt_mismatch` | out | 1 | alternative checker's compare, this cycle |
| `alt_fault` | out | 1 | sticky: outputs of the copies differed |

`dmem_we` is already gated by the memory stage's fault signal, and `rf_we` by
the write-back fault signal.

Parameters: `NSTAGES` = 7 (fixed by the pipeline), `ROLLBACK_CNT` = 7
(counter preset; it must equal the number of stages), and `MAIN_MECH` = 1
(0 builds the alternative mechanism alone).

## Limits and departures

* **The annul bit of copy 1 is exposed.** Write-back looks only at copy 1's
  annul bit. A flip that *sets* it makes copy 1 drop a valid instruction
  without a rollback. Rolling back whenever the two copies disagree on the
  bit would cover this, but then an annul bit of copy 2 stuck at 0 causes
  endless rollbacks that are never reported as persistent. That trade was
  not taken.
* Two additions go beyond the published scheme: the restart register and
  the store gating described above. The store gating puts the memory
  stage's comparison tree (about 3 LUT levels for 138 bits) on the
  store-enable path.
* The fetch PC itself is not compared. A PC upset is caught one stage later
  in the decode register's `pc` field.
* `restart_pc`, the checkers, the fault registers and the counter are not
  duplicated. A stuck-at-0 on a fault signal disables detection, and triple
  redundancy on this small logic would harden it.
* Synthesis must keep both copies. With identical inputs, a tool may merge
  equivalent flip-flops of the two pipelines. Keep the `u_p1`/`u_p2`
  hierarchy, or mark the copies "keep", in the FPGA flow.
* The LEON3 core, its SPARC V8 ISA, caches, multiplier/divider and the
  reconfiguration controller are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_isa_pkg.sv` holds a random program
generator and an instruction-level reference model. The model also predicts
the commit cycle of every register write.

* `tb_ft_iu`: the top at its default parameters, end to end. It runs:
  * fault-free programs, with no detection allowed;
  * about 90 single bit flips, one at a time, at random times and bits in
    copy 2's stage registers and copy 1's write-back data. Every flip is
    recovered, results and memory match the model, commit times are
    model + stalls + 7 × rollbacks, and there is no false `perm_fault`;
  * three permanent stuck-at faults, each of which must raise `perm_fault`
    and `alt_fault`.

  The run counts stalls, taken branches, rollbacks, gated writes, recoveries,
  persistent and alternative detections, and fails if any of them never
  happened.
* `tb_fault_campaign`: a fault-injection campaign. Three systems run side
  by side: an unprotected pipeline, `ft_iu` as built by default, and `ft_iu`
  built with `MAIN_MECH = 0`. Each run injects the same fault into all three
  at the same cycle: one flip (360 runs) or a stuck-at-0/1 held to the end
  (240 runs). The fault goes on a random bit of a random stage register,
  including the fetch PC, in copy 1 or copy 2. Each run is classified as
  correct (`0`), wrong result (`1`), not finished within 125 % of the
  fault-free time (`C`), or fault declared (`P`: `perm_fault` in the default
  build, `alt_fault` in the checker-only one). The testbench prints
  unprotected-against-protected tables for both builds. A typical run of the
  default build:

  ```
  flips       unprotected \ protected   P      0      1 and C
              1 and C                   0.3%  16.9%   0.3%
              0                         0.0%  82.5%   0.0%
  stuck-at    1 and C                  66.2%   0.0%   0.0%
              0                        11.7%  22.1%   0.0%
  ```

  The test requires that:
  * every flip in copy 2, and every flip in copy 1 outside the annul bits,
    ends correct;
  * every stuck-at in copy 2 ends correct or declared;
  * every wrong or unfinished run has raised `alt_fault`;
  * the checker-only build never ends wrong or unfinished.

  The checker-only build flags about half of all flips (49 % in a typical
  run), including many that would have done no harm. It recovers none of
  them.
* `tb_int_pipeline`: one pipeline against the model, with random stalls and
  externally requested rollbacks.
* `tb_fault_pipe`, `tb_cfg_fault_detector`, `tb_alt_checker`,
  `tb_dwc_compare`, `tb_regfile`: cycle-by-cycle comparison with independent
  models, plus directed latency cases.

Transient faults are injected with `force` and then `release` on a stage
register, which leaves the flipped value until the next write. Permanent
faults use a `force` held until reset.

Simulating with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ft_pkg.sv tb/tb_isa_pkg.sv rtl/*.sv tb/tb_ft_iu.sv --top-module tb_ft_iu -o sim
./obj_dir/sim
```

For another testbench, swap the last file and the `--top-module`. Lint with
`verilator --lint-only -Wall -Irtl rtl/ft_pkg.sv rtl/ft_iu.sv`. Every run
finishes in seconds.
