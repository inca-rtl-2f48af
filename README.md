# INCA instruction arrangement unit: preempting a CNN accelerator inside a layer

A robot runs several neural networks on one FPGA accelerator. Feature-point
extraction has a hard deadline and place recognition does not. Usually each
network is written by a different developer and runs as its own process. An
ordinary instruction-driven CNN accelerator runs one instruction stream to the
end. Either the urgent network waits, or software switches only between layers,
and one layer can take several milliseconds to tens of milliseconds.

This RTL makes such an accelerator preemptible **inside** a layer. The
accelerator itself is not changed. A unit in front of it, the **Instruction
Arrangement Unit (IAU)**, decides which task's instructions it receives. The
method works as follows:

* The compiler inserts **virtual instructions** at chosen points of each
  network's instruction stream. A virtual SAVE (Vir_SAVE) writes out finished
  results. A virtual LOAD (Vir_LOAD) reloads on-chip inputs.
* If no higher-priority request is waiting, the IAU drops every virtual
  instruction. The accelerator then sees exactly the original stream, so
  preemption costs nothing when it is not used.
* If a request is waiting when the running task reaches such a point, the IAU
  does three things:
  * it executes the Vir_SAVEs;
  * it hands the accelerator to the urgent task;
  * when the interrupted task comes back, it executes that task's Vir_LOADs
    and shortens the task's next normal SAVE, so that no result is written
    twice.

The interrupt points lie after a CALC_F, the last accumulation for a group of
output channels, or after a SAVE. At those points nothing is half-accumulated.
The only state to keep is finished results, and the following SAVE would have
written them anyway. Restoring therefore costs just a reload of the inputs, and
backing up costs no extra traffic. An urgent task waits on the order of one
block of output channels (a *CalcBlob*), not a whole layer.

`rtl/inca_iau.sv` is the top. It supports three priority levels:

* 0 is the highest and is never interrupted;
* 1 and 2 can be interrupted, including nested (2 by 1, then 1 by 0).

## The accelerator's instruction stream

The accelerator has five instruction classes:

| class  | does |
|--------|------|
| LOAD_W | weights/bias from DDR into the on-chip weight buffer |
| LOAD_D | input featuremap rows from DDR into the on-chip input buffer |
| CALC_I | partial sums for `Para_out` output channels from `Para_in` input channels |
| CALC_F | the same for the last `Para_in` input channels; the results are final |
| SAVE   | final results from the on-chip output buffer to DDR |

One CALC covers `Para_height` rows × `Para_in` input channels × `Para_out`
output channels. The reference accelerator uses 8 × 16 × 16 ("big") or
4 × 8 × 8 ("small"). A **CalcBlob** is one output-channel block: its LOADs,
`ceil(Ch_in/Para_in)−1` CALC_Is and one CALC_F. One SAVE often covers two
CalcBlobs.

A typical compiled stretch, and what the accelerator receives:

```
VI-ISA in DDR:       LOAD_D LOAD_W CALC_F  Vir_SAVE  Vir_LOAD_D  LOAD_W CALC_F SAVE(blob1+2)
no interrupt:        LOAD_D LOAD_W CALC_F                        LOAD_W CALC_F SAVE(blob1+2)
interrupt requested: LOAD_D LOAD_W CALC_F  SAVE(blob1) | urgent task | LOAD_D LOAD_W CALC_F SAVE(blob2)
```

In the third line, the Vir_SAVE becomes a real SAVE of blob 1. The task is
switched out at the Vir_LOAD_D. When the task comes back, that Vir_LOAD_D
becomes a real LOAD_D. The final SAVE is cut down to blob 2.

### Word formats (`rtl/inca_pkg.sv`)

These encodings are this implementation's own. The method fixes which
information exists, not how it is encoded.

* `vi_instr_t`, 92 bits, as stored in DDR:

  | field      | bits |
  |------------|------|
  | `op`       | 3    |
  | `virt`     | 1    |
  | `id`       | 8    |
  | `buf_addr` | 24   |
  | `ddr_addr` | 32   |
  | `len`      | 24   |

  * `op` is LOAD_W, LOAD_D, CALC_I, CALC_F, SAVE, or END (end of task).
  * `virt` turns a LOAD or SAVE into a virtual one.
  * `id` is the SaveID. A Vir_SAVE carries the ID of the normal SAVE that
    would otherwise write its data.
  * For a CALC, `buf_addr` is the output buffer address and `ddr_addr` is the
    input-buffer offset.
* `orig_instr_t`, 83 bits, as sent to the accelerator: `op`, `buf_addr`,
  `ddr_addr` and `len`. It has its own opcode encoding, and no `virt` or `id`
  field.
* Addresses and lengths count words. What a word is belongs to the
  accelerator.

## Deciding what a virtual instruction does

This is the subtle part. It lives in `iau_virt_fifo`, together with
`iau_out_ctrl`.

Virtual instructions come in **groups**, each after a CALC_F or a SAVE. The
Vir_SAVEs come first, then the Vir_LOADs. The decision is taken **once per
group**, when its first instruction reaches the head. A request that arrives in
the middle of a group therefore cannot cause a switch without the backup.

| situation | Vir_SAVE | Vir_LOAD |
|-----------|----------|----------|
| no higher-priority task waiting at the group's start | dropped | dropped |
| a task of higher priority READY at the group's start | executed (as SAVE) | **switch point**: the task stops here |
| task just resumed (restoring phase) | dropped | executed (as LOAD) |

* **Switch.** The task's Status Pool entry becomes PREEMPTED, and its Instr
  Addr is set to the Vir_LOAD itself. Both FIFOs and the fetch are flushed.
  One cycle later, the highest-priority waiting task starts.
* **Resume.** Fetching restarts at that Vir_LOAD. The task is in the restoring
  phase until its first normal instruction. The Vir_LOAD is executed, and the
  stream continues.
* **Group without a Vir_LOAD.** If a group has Vir_SAVEs but no Vir_LOAD, the
  switch happens at the next normal instruction (`grp_backup`).
* **After-SAVE point.** Here the group is just a Vir_LOAD_D, and the task
  switches at once.
* **No virtual instruction.** A position without a virtual instruction is not
  interruptible. The compiler decides where interrupts can happen.

### SAVE modification (`iau_save_ctrl`)

Each executed Vir_SAVE writes a record to the task's Status Pool entry: SaveID,
Save Addr and Save Length. A second Vir_SAVE with the same ID, directly behind
the first in DDR, extends the record.

When the normal SAVE with that ID comes, the saved part is cut off:

* **Prefix case** (the usual layout): DDR address and buffer address advance
  by Save Length, and the length shrinks by the same amount.
* **Suffix case:** only the length shrinks.
* **Fully saved:** the SAVE is not issued at all.

After the normal SAVE, the record is cleared. A record of any other shape
leaves the SAVE unchanged. That is still correct, just slower. Priority 0 has
no record, because it is never interrupted.

## Block structure

```
 CPU ──start/state──► iau_status_pool ◄──── state / record writes ─────┐
                         │ Run State, Instr Addr, SaveID/Addr/Len       │
                         ▼                                               │
 DDR ◄─read──► iau_instr_fetcher ─┬─► iau_virt_fifo ──(action)──┐       │
                                  └─► iau_instr_fifo (normal) ──┤       │
                                                                ▼       │
                       iau_save_ctrl ◄── cur_instr ── iau_out_ctrl ─────┘
                       iau_translator ◄─┘                │
                                                         └─► original ISA ─► CNN accelerator
```

| module | role |
|--------|------|
| `iau_status_pool` | one entry per priority: Run State (IDLE, READY, RUNNING, PREEMPTED), Instr Addr, and the save record (priorities 1 and 2 only); takes CPU start requests for idle entries |
| `iau_instr_fetcher` | fetches from the running task's Instr Addr; sorts instructions by the `virt` flag; up to `MAX_OUT` reads in flight; never overfills the FIFOs; drops stale read data after a switch and everything after END |
| `iau_instr_fifo` | normal instruction FIFO; each entry carries its instruction address |
| `iau_virt_fifo` | virtual instruction FIFO plus the group decision above |
| `iau_translator` | LOAD/CALC from VI-ISA to original ISA |
| `iau_save_ctrl` | SAVE and Vir_SAVE handling above |
| `iau_out_ctrl` | rebuilds program order from the two FIFOs by instruction address; issues through a one-entry output register; picks tasks, preempts, resumes, ends tasks |

## Interfaces and timing of `inca_iau`

All signals are in one clock domain. Reset `rst_n` is asynchronous and active
low. The reference system clocks the IAU and the accelerator at 300 MHz.

* **CPU.** Driving `cpu_start` with `cpu_task` (priority) and `cpu_addr` (the
  instruction address of the task's VI-ISA stream) requests a task.
  * `cpu_start_ok` in the same cycle says whether the request was accepted. It
    is accepted only when that priority's entry is IDLE.
  * `task_state[]` shows the Run States.
  * `task_done[p]` pulses when task p's END is consumed. The accelerator may
    still be executing the task's last instructions at that point.
  * `busy`, `cur_task` and `switch_evt` show what is running.
* **DDR instruction read.**
  * Requests use `rd_req_valid`/`rd_req_ready` and `rd_req_addr`, one VI-ISA
    word per request, addressed in words.
  * Responses come back in order on `rd_resp_valid`/`rd_resp_data`, with no
    back-pressure.
  * Any latency works. Up to `MAX_OUT` (4) reads are in flight.
* **Accelerator.** `acc_valid`/`acc_ready`/`acc_instr` carry one original-ISA
  instruction per handshake. `acc_instr` holds steady while it is not taken.
  The accelerator never learns about interrupts.

Parameters:

* `FIFO_DEPTH` = 8 per FIFO.
* `MAX_OUT` = 4.
* In `inca_pkg`: `NUM_TASKS` = 3, plus the field widths.

Timing:

* Issue rate is up to one instruction per cycle, when fetch keeps up.
* A switch costs two cycles in the IAU, then the refetch of the new task's
  first instructions.
* The IAU can be up to two instructions ahead of the accelerator: one in the
  output register and one executing. The response time to a request is
  therefore:
  * what the accelerator still has to finish, plus
  * the stretch up to the next interrupt point, plus
  * the backup SAVE.

## Response latency on the evaluated layer shapes

For one layer, waiting for the whole layer costs about
`Ch_in·Ch_out·H / (Para_in·Para_out·Para_height)` CALCs. Waiting for one
CalcBlob costs `Ch_in/Para_in` CALCs. The worst-case ratio is therefore about
`Para_out·Para_height / (Ch_out·H)`. The gain is larger for layers with many
output channels and many rows.

`tb/tb_inca_layers.sv` compiles nine ResNet101, VGG and MobileNet layer shapes
for both accelerator sizes. It interrupts each one at three random times and
measures the latency and the extra cost in cycles. The accelerator here is a timing model: a CALC
takes `2+2·W` cycles, LOAD/SAVE take `4+length` cycles. The cycle numbers are
therefore only relative, but the ratios can be compared with the formula:

| layer (W×H, Ch_in×Ch_out) | big: layer cycles | big: worst VI latency | ratio | formula | worst extra cost | restoring LOAD_D |
|---|---|---|---|---|---|---|
| A ResNet Conv80 (41×31, 1024×256) | 352 480 | 5 184 | 0.015 | 0.016 | 43 | 45 |
| B ResNet Conv15 (160×120, 128×128) | 334 583 | 5 724 | 0.017 | 0.008 | 162 | 164 |
| C ResNet Conv1 (640×480, 3×64) | 505 868 | 4 368 | 0.009 | 0.004 | 642 | 644 |
| D VGG Conv19 (7×7, 512×512) | 18 404 | 498 | 0.027 | 0.036 | 9 | 11 |
| E VGG Conv9 (56×56, 256×256) | 215 419 | 784 | 0.004 | 0.009 | 58 | 60 |
| F VGG Conv2 (224×224, 64×128) | 465 956 | 4 266 | 0.009 | 0.004 | 226 | 228 |
| G MobileNet Conv21 (14×14, 512×512) | 65 934 | 680 | 0.010 | 0.018 | 16 | 18 |
| H MobileNet Conv7 (56×56, 256×256) | 215 419 | 2 140 | 0.010 | 0.009 | 53 | 60 |
| I MobileNet Conv2 (112×112, 32×32) | 18 152 | 1 400 | 0.077 | 0.036 | 114 | 116 |

Measured and predicted reductions agree to within a small factor. The small
accelerator gives ratios down to 0.001. With only three random requests per
layer, a request does not always land in the worst spot, so a ratio can come
out below the formula. Layers with few input channels (C) or few CalcBlobs per
band (I) show the fixed costs: LOAD, SAVE, the backup SAVE, and the two
instructions the IAU runs ahead.

The *extra cost* column is the time an interrupted run takes, minus the layer
alone, minus the urgent task alone, with every run timed until the accelerator
is idle. It never exceeds the restoring LOAD_D. The backup SAVE costs nothing
extra, because it only moves work out of the later, shortened SAVE, and the
switches overlap with the accelerator still running.

## Verification

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. To run one with
plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/inca_pkg.sv tb/tb_inca_iau.sv --top-module tb_inca_iau
./obj_dir/Vtb_inca_iau
```

Replace the last file and the top name to run the others.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_inca_iau` | whole IAU at default parameters, with a behavioural DDR and accelerator (`tb/inca_acc_model.sv`, see below), over 24 trials with random request times (details below) |
| `tb_inca_layers` | the latency and cost study above, 18 layer/size combinations |
| `tb_iau_out_ctrl` | program-order merge, switch at a Vir_LOAD or (group without Vir_LOAD) at the next normal instruction, resume with restore, modified SAVE; exact accelerator sequence |
| `tb_iau_virt_fifo` | the decision table, the per-group latch, flush; 300 random groups with the request changing every cycle |
| `tb_iau_save_ctrl` | record, extend, prefix/suffix cut, drop, no-match pass-through; 300 random splits, each word written exactly once |
| `tb_iau_instr_fetcher` | order, routing, credit rule, END, stale data dropped on restart |
| `tb_iau_status_pool` | request acceptance, writes, priority-0 entry without record; 2000 random cycles against a model |
| `tb_iau_instr_fifo`, `tb_iau_translator` | FIFO behaviour against a queue; opcode mapping |

`tb_inca_iau` in detail:

* **The accelerator model.** It uses stand-in arithmetic and on-chip buffers
  shared by all tasks, so an urgent task really destroys the interrupted one's
  inputs and unsaved outputs.
* **Setup.** Three tasks are compiled into the VI-ISA layout above.
* **Checks:**
  * every output word against values computed independently;
  * the number of saved words equals the output size (nothing saved twice);
  * no switch while priority 0 runs;
  * response latency within the stretch bound;
  * in the uninterrupted trial, no virtual instruction reaches the
    accelerator.
* **Mechanisms counted.** Each must occur at least once: skipped virtual
  instructions, backup, restore, modified SAVE, switches after CALC_F and
  after SAVE, nested preemption, a request held back by priority 0, stalls on
  both ports, discarded fetch data.

## Where this RTL departs from the reference or adds its own choices

* **Not included.** The CNN accelerator, the DDR, the CPU/ROS software and the
  compiler are outside this RTL. The two baselines the method is compared with
  (CPU-style backup of all buffers, and switching only between layers) are not
  built.
* **Own choices.** The following are this implementation's own:
  * instruction encodings and field widths;
  * the END marker;
  * the CPU, DDR and accelerator handshakes;
  * FIFO depths and the number of reads in flight;
  * the per-group decision latch;
  * the switch at the first Vir_LOAD;
  * the prefix/suffix rule for cutting SAVEs;
  * extending a record;
  * letting a priority-2 task be preempted by 1, and then 1 by 0.
* **Order of merge and translation.** In the reference block diagram, both
  FIFOs feed the SAVE controller and the translator, which then feed the output
  control. Here the output control first picks the next instruction in program
  order from the two FIFO heads. It then passes that one instruction through
  the SAVE controller or the translator, so both see a single stream. The
  virtual FIFO does not read the Status Pool directly. The output control
  derives from the pool whether a higher-priority task is waiting and whether
  the running task is restoring, and gives it those two signals.
* **Task completion.** `task_done` marks END consumed by the IAU, not the
  accelerator finishing. A system that must know when results are in DDR has
  to combine it with the accelerator's own completion signal.
* **Widths.** `LEN_W`/`BUF_W` = 24 allow a two-CalcBlob SAVE of
  2·16·8·640 words on the widest evaluated layer. The SaveID is 8 bits and may
  wrap, because it only has to tell a SAVE from its neighbours.
* **Interrupt points.** The testbench compiler places no interrupt point
  between a band's last SAVE and the next band's LOAD_D. That stretch is why
  the worst latency is about two CalcBlobs rather than one. A compiler can add
  a Vir_LOAD_D there to shorten it.
