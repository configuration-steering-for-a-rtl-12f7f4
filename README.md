# Configuration steering for a reconfigurable superscalar processor

A superscalar processor has some of its functional units in reconfigurable
logic. Which units it has at a given moment depends on how that logic is
loaded. The code it runs changes all the time: a loop of loads and stores
wants many load/store units, a floating-point kernel wants floating-point
units. This RTL is the control logic that keeps the reconfigurable part
matched to the code. It looks at the instructions waiting in the instruction
queue and picks the configuration that best fits them. Then it reloads
whichever reconfigurable slots it can, without touching a unit that is still
executing.

It does not jump straight to an ideal configuration. It steers toward one of
a few fixed **steering configurations**. Because only idle slots are
reloaded, the machine usually ends up with a mix of several of them. Around
this core sits a wake-up array scheduler. It issues instructions only to
units that are configured and idle, and only once their operands are ready.

## Units, slots and configurations

There are five functional-unit types. Each has a three-bit type code:

| type    | code | slots per unit |
|---------|------|----------------|
| Int-ALU | 000  | 2 |
| Int-MDU | 001  | 2 |
| LSU     | 010  | 1 |
| FP-ALU  | 011  | 3 |
| FP-MDU  | 100  | 3 |

The machine always has **one fixed unit (FFU) of each type**, so every
instruction can run eventually. It also has **eight slots** of reconfigurable
logic. There are three predefined steering configurations, laid out from slot
0 upward:

| configuration | slots 0..7 | units incl. fixed (ALU, MDU, LSU, FPA, FPM) |
|---|---|---|
| 1 | ALU ALU' MDU MDU' LSU LSU LSU LSU | 2, 2, 5, 1, 1 |
| 2 | FPA FPA' FPA' FPM FPM' FPM' LSU LSU | 1, 1, 3, 2, 2 |
| 3 | ALU ALU' ALU ALU' MDU MDU' MDU MDU' | 3, 3, 1, 1, 1 |

`'` marks a continuation slot. Configuration 0 always means "the current
contents of the slots".

The current contents are held in the **resource allocation vector (RAV)**,
with one 3-bit code per slot:
- the first slot of a unit holds the unit's type code;
- the other slots of a multi-slot unit hold `111`;
- an empty slot holds `110`.

Because units of different configurations overlap in different slots, the
RAV can hold mixes. For example, it can hold three Int-MDUs: one from
configuration 1 in slots 2-3 and two from configuration 3 in slots 4-7. The
reachable ranges are 0-2 Int-ALUs, 0-3 Int-MDUs, 0-4 LSUs and 0-1 of each
floating-point unit, on top of the fixed units.

## Choosing a configuration (`config_select`)

The selection is combinational and runs every cycle in four stages:

1. **Unit decoders** (`unit_decoder`, one per queue entry) turn the opcode of
   every entry that is ready to execute into a one-hot unit requirement.
   An entry counts when it is valid, not yet scheduled and every result it
   needs is available.
   Bit 0 is Int-ALU and bit 4 is FP-MDU.
2. **Requirement encoders** (`req_encoder`, one per type) count how many of
   the seven entries need that type. This is a seven-input population count
   giving a 3-bit result.
3. **Error metric generators** (`cem`, one per configuration) compute

       error = sum over types of floor(required / available)

   where "available" counts the fixed unit as well. The division is a barrel
   shifter that divides by 1, 2 or 4. The divisor is the unit count rounded
   down to a power of two and capped at 4 (`cem_shift_ctrl`): the shift is
   `{q[2], ~q[2] & q[1]}` of the 3-bit count `q`. For configurations 1..3
   the shifts are constants. For configuration 0 they come from the counts
   the loader reports. The five terms are summed by two 3-bit adders and one
   3-bit, three-operand adder. The sum cannot overflow, because the queue
   holds at most seven instructions and each term is at most its
   requirement.
4. **Minimal error selection** (`min_err_select`) outputs the 2-bit index of
   the smallest error.

**Ties matter more than they seem.** The tie rule is "least
reconfiguration". Here that means the number of functional units of the
candidate layout that would have to be reloaded. Any unit with at least one
slot differing from the RAV counts. This number is computed from the RAV
inside `config_select`. The current configuration costs zero, so it wins
every tie it is part of, and an empty queue never causes reconfiguration.
Remaining ties go to the lower index.

This tie rule is what makes configuration 3 usable. Under the power-of-two
rounding, 2 and 3 units both divide by 2. So configuration 3 has the same
integer divisors as configuration 1 and worse LSU support, which means its
error is never lower than configuration 1's. It wins only on ties. For
example, with an integer-only queue and empty slots it needs 4 units loaded
against configuration 1's 6. An exact divider would remove this effect, at
the cost of area and delay.

## Loading a configuration (`config_loader`)

Every cycle the loader compares the chosen layout with the RAV, slot by slot
(XOR). It treats each unit of the chosen layout separately. A unit is
**loaded** when both of these hold:
- at least one of its slots differs from the RAV;
- **every** slot it spans reports `slot_avail`, meaning the unit now in that
  slot is idle and the slot is not already being reconfigured.

Busy units are skipped and tried again on later cycles. The loader does not
latch its target. If the selection changes while a slot is busy, the slot is
later loaded for the new choice. Choosing configuration 0 loads nothing.

When a load starts:
- `load_valid[s]` and `load_code[s]` pulse for one cycle for each slot of
  the unit;
- the RAV takes the new codes at that clock edge;
- slots outside the loaded span that belonged to a unit the load partly
  overwrote are set to empty (`110`).

So a half-destroyed unit is never counted or scheduled. The loader also
outputs `qty`: per type, one fixed unit plus the number of RAV entries
holding that type's code. Units still being loaded are included. They cannot
be scheduled anyway, because their slots report unavailable until the fabric
finishes.

The reconfigurable fabric (partial reconfiguration of an FPGA region) is not
part of this RTL. It must take `load_valid`/`load_code`, and it must hold
`slot_avail` low while a slot reconfigures and while its unit executes. All
slots of a multi-slot unit must report together.

## Scheduling: availability and the wake-up array

**Availability** (`resource_available`, one per type) is

    available(t) = OR over fixed units and slots i of (code(i) == t) AND availability(i)

The code test is a 3-bit XNOR-AND. Continuation and empty codes never match,
so a multi-slot unit is counted once.

**Instruction queue** (`instr_queue`): seven entries, each holding an opcode
and one wake-up row (`wakeup_entry`). A row stores three things:
- a one-hot vector of the unit type it needs, decoded from the opcode on
  insertion;
- one bit per queue entry whose result it needs;
- a scheduled bit.

The row requests execution when it is valid and unscheduled, and for every
column either the bit is clear or the matching availability line is high.
The lines are the five unit lines and the seven result lines of the other
entries. A grant sets the scheduled bit and `reschedule` clears it.

**Result timing.** On a grant, a count-down timer is loaded with
latency − 1. The row's result line is a register:
- it is set at the grant edge for a one-cycle instruction;
- otherwise it is set at the edge where the timer holds 1.

So the result line is high exactly `latency` cycles after the grant cycle. A
dependent instruction can therefore be granted in the first cycle its operand
exists.

**Retire** empties the row. In the same edge it clears that entry's column in
every other row, so a new instruction that reuses the entry number is never
mistaken for a producer. Dependencies are given as entry numbers at
insertion (`ins_dep`). New instructions take the lowest free entry
(`ins_idx`).

**Scheduler** (`scheduler`): the wake-up array only says who could run. The
scheduler grants at most one instruction per unit type per cycle, the
lowest-numbered requester, because availability is one line per type. It
also names the unit to use (`grant_unit`):
- 0..4 are the fixed units, numbered by type code;
- 5 + s is the reconfigurable unit whose first slot is s.

It prefers the fixed unit, then the lowest idle slot unit.

## Top level (`steer_top`) and timing

`steer_top` wires the queue, the configuration manager (`config_manager` =
selection + loader), five availability circuits and the scheduler. The parts
outside the core appear as ports:
- the front end and register update unit: `ins_*`, `retire`, `reschedule`,
  `iq_valid`, `result_avail`;
- the functional units: `grant`, `grant_unit`, `ffu_avail`;
- the fabric: `slot_avail`, `load_valid`, `load_code`.

The chosen configuration, RAV, unit counts, requirements, errors and
per-type availability are brought out for observation.

All state changes at the rising edge of `clk`: insertion, grant, retire,
reschedule and the start of reconfiguration. Requests, grants, the
configuration choice and the load requests are combinational in the cycle
they act. `rst_n` is an active-low asynchronous reset that empties the queue
and every slot. The assertions check three rules:
- a load is only requested on an available slot;
- a grant only goes to a requesting row;
- the queue is never written while full.

## Design choices not fixed by the architecture

The following are this implementation's own decisions:
- **Opcode map.** 5-bit, RISC-like, in `steer_pkg::opcode_e`. Unit decoders
  map ranges of it to unit types.
- **Which entries are counted.** "Ready" means the operands are ready.
  Whether the unit type is available is left out. Counting only instructions
  that can already issue would never steer toward a unit that is missing. The
  parameter `COUNT_READY = 0` (on `steer_top` and `instr_queue`) counts every
  valid, unscheduled instruction instead. That setting steers harder toward
  the predefined configurations. The default tends to settle on a hybrid that
  already covers the few instructions that are ready at once.
- **Slot order** of the predefined configurations (table above).
- **Tie-break measure.** Units to reload, then the lower index.
- **Empty code.** `110` for an empty slot. Slots of a partly overwritten unit
  are emptied.
- **RAV timing.** The RAV is updated when a load starts, not when it
  completes.
- **Result line.** Registered. A valid bit in each wake-up row. Retire has
  priority over grant, and reschedule clears the timer.
- **Scheduler policy.** Entirely this implementation's (one grant per type
  per cycle, fixed unit first).
- **Latencies and reconfiguration time** are inputs or model parameters, not
  constants of the core.

## Files

`rtl/` holds one module or package per file:
- `steer_pkg` holds the codes, layouts, unit counts, opcode map and shift
  functions;
- the leaf blocks are `unit_decoder`, `req_encoder`, `cem_shift_ctrl`,
  `div_shifter`, `cem` and `min_err_select`;
- the blocks above them are `config_select`, `config_loader`,
  `config_manager`, `resource_available`, `wakeup_entry`, `instr_queue`,
  `scheduler` and `steer_top`.

`tb/` holds one self-checking testbench per block (`tb_<module>`) and
`rfu_fabric_model`. That model is behavioural, for testbenches only: a
loaded slot stays unavailable for `RECONF_LAT` cycles, and a granted unit
stays busy for the instruction's latency.

Simulate, for example, the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
      rtl/steer_pkg.sv tb/rfu_fabric_model.sv tb/tb_steer_top.sv \
      --top-module tb_steer_top -y rtl -y tb
    ./obj_dir/Vtb_steer_top

Each testbench ends with a line `TB_RESULT checks=N failures=M`. Lint a
module with `verilator --lint-only -Wall -Irtl rtl/steer_pkg.sv
rtl/<module>.sv -y rtl --top-module <module>`.

## Verification

- **Leaf blocks.** Decoder, requirement encoder, shift control, error metric
  and minimal-error selection are checked exhaustively or with thousands of
  random vectors against reference arithmetic written in the testbench.
- **`tb_config_loader`** walks through partial loads:
  - a load blocked by a busy slot and completed when the slot frees;
  - the empty slot left by a partly overwritten unit;
  - the mixes of configurations 2/3 and 1/3 (the latter with three Int-MDUs).
- **`tb_wakeup_entry`** checks the request, the operand-ready output, the
  scheduled bit and result latencies 1, 2 and 5.
- **`tb_instr_queue`** runs a seven-instruction dependency example
  (Shift → Add, Shift → Sub → Mul, Load → FPMul → FPAdd). It checks the
  exact grant cycles, column clearing on retire and reschedule.
- **`tb_steer_top`** runs the whole core at its default sizes. It uses 240
  instructions in integer, load/store, floating-point and mixed phases, with
  random dependencies, in-order retire, random reschedules and units held
  busy. It checks every cycle that:
  - a grant goes to a configured, idle unit of the right type;
  - no instruction starts before its producers' results;
  - each result line rises exactly one latency after its grant.

  It also requires the following in their phases:
  - the slots reach exactly configuration 3 and exactly configuration 2;
  - in the load/store phase, configuration 1 is chosen and at least two
    slot LSUs are loaded.

  Finally, each of these happens at least once: keeping the current
  configuration, a blocked load, an emptied slot, a hybrid configuration,
  grants to fixed and slot units, waits for units and for results,
  reschedule and a full queue.

Not covered: the functional units' datapaths, the register update unit, and
real reconfiguration times. Those belong to the surrounding processor.
