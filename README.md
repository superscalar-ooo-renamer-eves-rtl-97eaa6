# Out-of-order register renamer with a confidence-gated stride value predictor

A value predictor guesses an instruction's result at dispatch, so that the
instructions that consume it can start before the producer has executed. The
guess is checked when the producer writes back. In this design a wrong guess
that was used is repaired in the simplest possible way: the whole pipeline is
flushed when the producer retires. This is called VR-1 recovery. A flush costs
a full window of work, so a prediction pays off only if it is right about
99.5% of the time. A plain saturating confidence counter does not give that
level of accuracy. Most of this design is therefore about when *not* to use a
prediction.

This repository holds synthesizable SystemVerilog for the rename, dispatch,
writeback-check and retire core of a 4-wide out-of-order processor. It has
three parts:

* **A MIPS R10000-style register renamer** with eight structures:
  * a speculative map table (RMT) and a committed map table (AMT);
  * a free list and an active list, both circular buffers with phase bits;
  * a physical register file with a separate ready-bit array;
  * a global branch mask (GBM) and per-branch checkpoints.

  It has two recovery paths. A mispredicted branch is repaired in one cycle
  from that branch's checkpoint. An exception, a load violation or a value
  misprediction causes a full squash, which restores the RMT from the AMT.
* **A stride value predictor (SVP)** and the **value prediction queue (VPQ)**
  that tracks every prediction-eligible instruction in flight.
* **A confidence layer** modelled on the EVES predictor. It has four
  mechanisms:
  * a forward probabilistic counter (FPC);
  * per-instruction-type probabilities for the FPC;
  * a cooldown after every costly miss;
  * a global miss-rate kill switch, "SafeStride".

The front end, the issue queue, the execution lanes and the load/store unit
are not part of this design. Their signals are ports of the top module,
`vp_renamer_top`.

## What happens in one cycle

Everything is on one clock with a synchronous, active-low reset. In one cycle
the top does the following:

1. **Rename and dispatch together.**
   * A bundle of up to `WIDTH` instructions (`in_*`, valid slots packed from
     slot 0) is renamed and written into the active list in the same cycle.
   * The bundle is taken (`in_ready`) only when all of the following hold:
     * there are enough free registers (otherwise `stall_reg`);
     * there are enough free branch IDs (otherwise `stall_branch`);
     * there are enough active-list entries (otherwise `stall_dispatch`);
     * there are enough VPQ entries (otherwise `stall_vpq`);
     * no branch recovery or squash is happening, and no VPQ rollback walk
       is running.

   The renamed bundle comes out on `out_*` for the issue queue:
   * physical sources and destination;
   * active-list index;
   * branch ID and branch mask;
   * the predicted value and whether it was used.
2. **Writeback.**
   * Up to `WIDTH` lanes (`wb_*`) write values into the register file and
     mark their active-list entries complete.
   * Each lane also searches the VPQ by active-list index. If the entry's
     prediction was used and differs from the real value, the entry's
     value-mispredict bit is set (`wb_val_misp`).
3. **Branch resolve.** One branch per cycle (`res_*`).
   * A correct branch frees its mask bit.
   * A mispredicted branch restores the renamer at the next clock edge. The
     VPQ then drops its younger entries, one per cycle.
4. **Retire.**
   * The oldest completed, fault-free instructions retire (`retire_n`).
   * A head with an exception or load violation (`exc_*`, `lv_*`) triggers a
     full squash (`squash_out`) instead.
   * A value-mispredicted instruction retires and triggers the squash of
     everything behind it (`squash_vm`).

## The renamer

### Maps, free list and active list

The **RMT** maps each logical register to its newest physical register. It is
read and written at rename. Slot *k* of a bundle reads the RMT as already
updated by the destinations of slots 0..*k*-1. That is how dependences inside
a bundle are handled.

The **AMT** is written only at retire. It is the committed architectural
state, and it is what a full squash returns to.

The **free list** holds `N_PHYS - N_LOG` register numbers. The **active list**
holds `AL_SIZE` instructions in program order. Both are circular buffers:
* Each pointer carries a *phase* bit that flips every time the pointer wraps.
* Equal pointers with equal phases mean empty; equal pointers with different
  phases mean full. No extra counter is needed.
* When a checkpoint restores the free-list head, or a branch moves the
  active-list tail back, the phase is restored or recomputed along with the
  pointer.

At retire the caller chooses `commit_n`, which may not exceed `retire_ok_n`.
For each committed destination:
* the AMT entry is updated;
* the physical register that the AMT entry held before goes back to the tail
  of the free list.

### Branch masks and checkpoints

There are `N_BRANCH` = 64 branch IDs, one per bit of the 64-bit GBM. A branch
that needs a checkpoint (`in_ckpt`) is handled as follows:
* It takes the lowest free ID and sets that bit in the GBM.
* It stores a checkpoint. The checkpoint holds the RMT (as it stands after the
  branch's own destination), the free-list head and phase, and the GBM.

Every instruction leaves rename with a branch mask: the set of unresolved
branches it depends on. Branches earlier in the same bundle are included.

* **A correct resolve** clears the branch's bit in the GBM and in every stored
  checkpoint mask. Older checkpoints then no longer name a branch that is
  gone.
* **A mispredict** restores the RMT, the free-list head and the GBM from the
  checkpoint, and clears the branch's own bit. It moves the active-list tail
  to the slot after the branch. The branch's own entry stays: it completes
  and retires normally. Recovery is finished at this point, so the branch is
  *not* marked for a second recovery at retire.

### Full squash

A full squash puts the renamer in the committed state:
* RMT := AMT;
* the GBM and all checkpoints are freed;
* the active list is emptied;
* the free list is rebuilt by scanning the AMT for registers it does not
  use;
* every physical register is marked ready.

The rebuild is a single-cycle scan. The unused registers are packed in
ascending order, which leaves the free list full. The AMT used is the one
that already includes any instruction retiring in the same cycle.

## Value prediction

### Stride value predictor (`svp`)

The SVP is a direct-mapped table of 256 entries, indexed by PC bits [9:2] and
tagged with the next 12 bits. Each entry holds:
* the last retired value;
* the stride;
* a 5-bit confidence counter;
* an 8-bit count of the instances of this PC now in flight.

The prediction for a new instance is

    last + (in_flight + 1) * stride

where `in_flight` also counts earlier instances in the same bundle.

Training happens at retire, one instruction per cycle:
* **Correct value** (equal to last + stride): the counter may increase. A
  tag miss instead allocates the entry fresh.
* **Wrong value:** the counter is reset to 0. In both cases the stride and
  the last value are updated.

An entry is **confident** when its counter is saturated at 31.

The instance count is kept exact in three ways:
* it goes up at dispatch;
* it goes down at retire, and when the VPQ walk removes an instance after a
  branch mispredict;
* it is cleared on a full squash.

Instances dispatched before the entry existed carry a `counted = 0` flag, so
they do not decrement it.

### Value prediction queue (`vpq`)

An instruction is **eligible** for prediction when:
* `vp_en` is high;
* it writes a register;
* its type `in_vtype` is integer ALU, FP ALU or load (not `VT_NONE`).

Every eligible instruction takes a VPQ entry at dispatch, in program order.
The entry records its active-list index, PC, type, predicted value, whether
the prediction was used, and whether the SVP counted it.

* **Writeback:** the VPQ is searched associatively by active-list index, and
  the actual value is stored there.
* **Retire:** the head entry trains the SVP and is popped.
* **Branch mispredict:** the VPQ counts the entries younger than the branch,
  with ages taken relative to the active-list head. It then removes them from
  the tail, one per cycle. Each removed entry the SVP had counted also
  decrements the SVP. `vpq_busy` is high during the walk, and rename waits.
  An older branch that mispredicts during a walk restarts the count.

### Using a prediction

A prediction is **used** when:
* the instruction is eligible and the SVP entry is confident;
* and, if the confidence layer is on (`eves_en`), neither the cooldown nor
  SafeStride is holding predictions off.

A used value is written into the register file at dispatch and its ready bit
is set, so consumers can issue at once. Every other destination has its ready
bit cleared at dispatch.

### VR-1 recovery

The value-mispredict bit set at writeback is acted on at retire.

The mispredicted instruction holds the correct value in its own register,
because writeback wrote it. So it **retires and trains the SVP** like any
other instruction. This resets that entry's confidence. In the same cycle,
everything younger is squashed with the full-squash path. This also starts
the cooldown and counts a miss in SafeStride.

At most one eligible instruction retires per cycle, because the SVP has one
training port. Ineligible instructions around it retire freely, up to
`WIDTH`.

## The confidence layer

All four mechanisms act only when `eves_en` is high. With `eves_en` low the
design behaves as the plain stride predictor: every correct retire
increments the counter, and predictions are never gated.

**1. Forward probabilistic counter (`eves_fpc`).**
* A 16-bit Fibonacci LFSR (taps 16, 14, 13, 11) steps once for each trained
  instruction.
* A correct prediction may increment the counter only when
  `sample % denom == 0`.
* Reaching 31 therefore takes on average `denom` x 31 correct retires instead
  of 31, which is much stronger evidence.

**2. Per-type denominators.** `denom` depends on the instruction type:
* integer ALU: 4;
* FP ALU: 2;
* load: 2.

These are parameters, so other settings need no change to the logic.

**3. Cooldown (`eves_cooldown`).**
* One global counter. Each confident mispredict (`squash_vm`) loads it with
  128.
* It counts down by the number of instructions retired.
* No prediction is used while it is non-zero. This absorbs bursts of misses
  at program phase changes.

**4. SafeStride (`eves_safestride`).**
* A 16-bit saturating miss counter and a 32-bit event counter.
* Events are prediction-eligible retirements plus confident mispredicts.
* Prediction is switched off globally while
  `misses * 1024 > events`, i.e. while the miss rate is above 1/1024.
* Both counters are halved every 1,000,000 retired instructions, so a bad
  phase does not switch prediction off for good.

## Parameters and sizes

All defaults are in `vp_pkg.sv`.

Values taken from the design's description:
* 64 branch IDs (a 64-bit mask);
* three source operands per instruction (A, B and D) and one destination;
* a 5-bit confidence counter, confident at 31;
* FPC denominators 4/2/2;
* cooldown of 128;
* SafeStride: 16-bit miss counter, 1/1024 threshold, 1,000,000-retire halving
  period.

Values that were not given and are this design's choice:
* `WIDTH`=4;
* `N_LOG`=64 logical and `N_PHYS`=320 physical registers, 64-bit values;
* `AL_SIZE`=256;
* 256 SVP entries with 12-bit tags and 8-bit instance counters;
* `VPQ_SIZE`=256.

`AL_SIZE` must be a power of two, because VPQ ages are taken modulo it.
`VPQ_SIZE` >= `AL_SIZE` means the VPQ never limits dispatch more than the
active list does.

## Where this design departs from its description, and limits

The description this design follows is a cycle-level C++ simulator model. A
hardware version needs decisions that the model never had to make.

* **Rename and dispatch share one cycle.** The described pipeline has two
  rename stages and a separate dispatch stage. Here a bundle is taken whole
  or not at all, in one cycle.
* **The prediction is checked in the writeback lane.** The described
  pipeline compares the value in execute and sets the mispredict bit in
  writeback. Here the VPQ search and the compare happen in the same cycle as
  the writeback.
* **The value-mispredicted instruction retires before the flush.** The
  description routes a head with the value-mispredict bit straight to the
  full squash. If that instruction were flushed too, it would be fetched
  again. Its SVP entry would be untrained and still confident, so the same
  wrong prediction would repeat. With the confidence layer off, that repeats
  forever.
* **The SafeStride rate counts all eligible retirements.** The description
  only says "miss rate above 1/1024". If the rate counted only predictions
  that were used, one miss would switch prediction off, and nothing would
  count again until the next halving.
* **One SVP training per cycle.**
* **Used predictions are written into the register file at dispatch.** The
  alternative is a separate bypass of predicted values at register read.
* **Area is large.** Several structures are plain flip-flop arrays with
  combinational searches:
  * the full RMT copy in every checkpoint (64 x 64 x 9 bits);
  * a register file with 12 read and 8 write ports;
  * the 4-port VPQ search;
  * the VPQ's 256-entry younger count;
  * the single-cycle free-list rebuild, which scans all 320 registers
    against the committed map and packs the unused ones.

  These are written for clarity, not for timing or area. Coarse synthesis of
  the leaf blocks takes seconds to minutes. For the free list, the renamer
  and the full top at default size it takes more than ten minutes.

  A cheaper full-squash rebuild exists. The consumed region of the free list
  (tail to head) holds exactly the registers of the squashed in-flight
  instructions, so a squash could just set the head to the tail. This design
  keeps the AMT scan that its description specifies.

Not included:
* the front end;
* the issue queue and its wakeup/select logic;
* the payload buffer;
* the execution lanes and the load/store unit.

Their interfaces are the top's ports. The described project also explored
a multi-table tagged value predictor (E-VTAGE) and selective replay (VR-5),
but did not adopt them, so they are not built here either.

## Files

| File | Contents |
|---|---|
| `rtl/vp_pkg.sv` | default sizes, EVES constants, the instruction-type enum |
| `rtl/free_list.sv` | free list, phase bits, checkpoint restore, rebuild from the AMT |
| `rtl/active_list.sv` | active list: status bits, head view, rollback, squash |
| `rtl/prf.sv` | physical register file with ready bits |
| `rtl/branch_ckpt.sv` | GBM, branch ID allocation, checkpoints |
| `rtl/renamer.sv` | RMT, AMT, rename, retire and recovery; uses the three above |
| `rtl/svp.sv` | stride value predictor |
| `rtl/vpq.sv` | value prediction queue and its rollback walk |
| `rtl/eves_fpc.sv` | probabilistic counter gate with per-type denominators |
| `rtl/eves_cooldown.sv` | cooldown counter |
| `rtl/eves_safestride.sv` | miss-rate monitor |
| `rtl/vp_renamer_top.sv` | the top: everything wired together |
| `tb/tb_*.sv` | one self-checking testbench per module |

Each RTL file starts with a comment that gives the block's interface and
timing.

## Verification

Every module has a self-checking, randomized testbench. Each one:
* compares the design against a behavioural model every cycle;
* ends by printing `TB_RESULT checks=N failures=M`;
* stops itself with a watchdog.

Some unit testbenches reduce sizes so that full and wrap-around cases come
often. `tb_renamer` uses 16 logical and 48 physical registers, 32 entries and
8 branches, which reaches every stall.

`tb_vp_renamer_top` runs the top at its default size. The testbench itself
acts as the missing parts of the core:
* a looping program with stride, phase-changing and random results;
* branches, about one in five mispredicted, followed by wrong-path fetch;
* out-of-order execution lanes, and long stalls of the oldest instruction;
* rare exceptions and load violations;
* stretches with prediction off, and with the confidence layer on and off.

It checks the following:
* retirement order;
* the committed register values, read back through the register file;
* the value-mispredict flags;
* that pure-stride instructions never mispredict;
* when squashes happen, and why;
* that no prediction is used while it is gated off.

The test fails unless each mechanism has occurred at least once:
* all four stalls;
* correct and mispredicted branches;
* the VPQ walk;
* used predictions;
* value-mispredict, exception and load-violation squashes;
* the cooldown;
* SafeStride switching prediction off;
* the mode switches.

Run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl --top-module tb_vp_renamer_top \
        rtl/vp_pkg.sv tb/tb_vp_renamer_top.sv
    obj_dir/Vtb_vp_renamer_top

The full-size end-to-end run takes about 160,000 cycles and around ten
seconds. For a unit testbench, replace the top-module name. A testbench that
leaves variables uninitialized should still pass with
`+verilator+rand+reset+2`.

Each testbench has also been checked to fail against a deliberately broken
copy of its module. The broken copies include:
* a missing in-bundle forward;
* an LFSR with one tap dropped;
* a cooldown of 127;
* a wrong rollback phase;
* no squash on a value mispredict.
