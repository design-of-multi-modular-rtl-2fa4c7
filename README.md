# Four-modular-redundant MIPS system with subsystem-level repair

This design is a small fault-tolerant processor system for an FPGA with
partial reconfiguration. It runs four copies of the same single-cycle,
MIPS-style processor core. The copies form two pairs, called **subsystem A**
and **subsystem B**. A pair cannot tell which of its two cores is wrong, but it
can tell that they disagree. The system therefore works like this:

* one pair drives the system's results;
* the other pair runs in lockstep as a hot standby;
* when the active pair disagrees with itself, the standby pair takes over
  in the same clock cycle;
* the failed pair can then be repaired on its own, by rewriting only its
  partial-reconfiguration region, while the other pair keeps running.

Repairing a whole pair as one reconfiguration unit keeps each repair short,
and a faulty module is never left in the system for long.

All logic is synthesizable SystemVerilog (IEEE 1800-2017). The configuration
access port and the host that performs the reconfiguration are outside the
RTL. Their effect shows up as two inputs, `reconfig_a` and `reconfig_b`.

## Block structure

```
                 +-------------+        +--------------------------+
  host load ---->| instr_mem   |--instr-+-> subsystem A            |   err_a   +--------------+
                 +-------------+        |   core A0 --+            |---------->| output_error |--> led_a, led_b
        +--------+     ^ pc             |   core A1 --+-> analyze  |   out_a   |              |
        |fetch_pc|-----+--------------->|                          |-----+     +------+-------+
        +--------+                      +--------------------------+     |       sel_b| sys_ok
            ^ next_pc                   +--------------------------+     |            v
            |                           |   subsystem B            |     +--> +---------------+
            +---------------------------|   core B0 --+            |--------> | select_output |--> led_d[3:0]
                 +-------------+        |   core B1 --+-> analyze  |   out_b  +-------+-------+
  host port <--->| data_mem    |--rdata>|                          |   err_b          | selected bundle, commit
                 +-------------+        +--------------------------+                  v
                      ^  address / store data (selected pair only)          +-----------------+
                      +------------------------------------------------------| data_collection |--> host readback
                                                                             +-----------------+
```

The design has two kinds of logic:

* **Static logic.** This is `fetch_pc`, `instr_mem`, `data_mem`,
  `output_error`, `select_output`, `resync_ctrl` and `data_collection`. It
  is never reconfigured. (`resync_ctrl` is left out of the sketch above. It
  connects to both pairs' register files and to `output_error`.)
* **Reconfigurable logic.** This is the two `subsystem` instances. Each
  instance is one partial-reconfiguration region.

Every core receives the same instruction, the same PC and the same load
data. Only the selected pair writes the data memory and steers the PC.

## How a fault is detected and handled

### The compared bundle

In every cycle each core produces a bundle, `mips_pkg::core_out_t`. It holds:

* the ALU result, which is also the data-memory address;
* the store enable and the store data;
* the register-write enable and the destination register;
* the next PC.

This bundle is everything a core decides in that cycle that can be seen from
outside the core. The only exception is the value loaded from memory.

### Detection in `analyze_unit`

`analyze_unit` compares the two bundles of its pair bit for bit and raises
`err` on any difference.

Its output stage also filters. If the pair agrees, it passes the agreed
bundle on. If the pair disagrees, it passes a null bundle instead: no store,
no register write, all fields zero.

The load data enters a core only on the register-write path, so the compared
bundle never depends on it combinationally. This matters because the memory
address itself comes from the selected bundle. If the load data were part of
the comparison, the path from comparison to selection to memory address to
load data would form a combinational loop.

### Selection in `output_error`

`output_error` keeps one sticky failure flag per pair. It decides which pair
is used with this rule:

| state of the pair that was active in the last cycle | selection this cycle |
|---|---|
| usable | keep it |
| not usable, other pair usable | switch to the other pair |
| neither pair usable | keep the selection, drop `sys_ok` |

A pair counts as usable when all four of these hold:

* its failure flag is clear;
* its `err` is low in this cycle;
* it is not being reconfigured;
* it is not stale (see the repair rule below).

The selection (`sel_b`) is combinational from `err_a` and `err_b`. A
disagreement that appears in cycle *n* therefore already moves the
selection in cycle *n*. The wrong result is never committed: no store, PC
update or log entry comes from the failing pair.

`commit = run & !resync_busy & sys_ok` gates the PC, the store into the
data memory, the register-file writes of all four cores and the
data-collection log. When neither pair is usable, `commit` stays low and the
system halts with the PC frozen.

### The LEDs

* `led_a` and `led_b` are the failure indicators. Each one is
  `fail | stale` for its pair.
* `led_d[3:0]` (D4..D1) shows bits 3..0 of the most recent committed store
  data.

## Repair, the stale rule and resynchronisation

This is the part of the design with the least obvious behaviour.

In the FPGA, the host repairs a pair by reloading that pair's partial
bitstream. In the RTL, `reconfig_a` or `reconfig_b` stands for that
reconfiguration. While the input is high, the pair is held in reset, and its
register files return to zero, as a freshly configured region would. During
reconfiguration the pair counts as unusable. When the input falls, the pair's
failure flag is cleared.

A repaired pair holds reset state, not the program's state. If it took over
as it is, it would produce consistent but wrong results: its two cores would
agree with each other and still disagree with the program. For that reason
the output-error module marks a repaired pair **stale**, and a stale pair is
never selected.

`resync_ctrl` then brings the stale pair up to date:

* It starts as soon as the reconfiguration input has fallen and the other
  pair is usable.
* It stalls the system: `resync_busy` is high and nothing commits. The PC,
  the data memory and the source pair's registers therefore stand still.
* It copies registers r1..r31 of the running pair into both cores of the
  repaired pair, one register per clock. The copy reads through a third read
  port of the register file and writes through the normal write port, which
  is taken over for the copy.
* On the last register it pulses `resync_done`, and the stale flag clears.

A repair therefore costs 31 stall cycles. After it, the repaired pair is a
full standby again. Only the register files need copying, because the PC and
both memories are shared.

If the source pair stops being usable during the copy, or the destination is
reconfigured again, the copy is abandoned and the pair stays stale. A system
reset (`rst_n`) also clears all stale flags and restarts the program from
PC 0 on both pairs.

A typical sequence runs as follows:

1. Core A1 is upset. In the same cycle, B takes over and `led_a` lights.
2. The host reconfigures A. B keeps running.
3. A is stale. The system stalls for 31 cycles while B's registers are
   copied into A. Then `led_a` goes dark.
4. Core B1 is upset. In the same cycle, A takes over, and the program
   finishes with correct results.
5. If both pairs fail before either is repaired, nothing usable is left, and
   the system halts with `sys_ok` low until `rst_n`.

## The class-MIPS core (`mips_core`)

The core is a single-cycle processor without memories. It is built from a
control unit (`mips_control`), a 32 x 32-bit register file (`mips_regfile`,
register 0 reads as zero) and an ALU (`mips_alu`). It executes one
instruction per clock:

* The instruction and the PC come from outside the core.
* The bundle comes out combinationally.
* The register file is written at the next rising edge when `en` is high.

It uses the three 32-bit MIPS formats with the standard MIPS-I encodings:

| format | fields (bits) |
|---|---|
| R | op(6) rs(5) rt(5) rd(5) shamt(5) funct(6) |
| I | op(6) rs(5) rt(5) imm(16) |
| J | op(6) addr(26) |

It implements the following instructions:

* **Arithmetic:** `add`, `addu`, `sub`, `subu`, `addi`, `addiu`.
* **Logic:** `and`, `or`, `xor`, `nor`, `andi`, `ori`, `xori`, `lui`.
* **Compare:** `slt`, `sltu`, `slti`, `sltiu`.
* **Shifts:** `sll`, `srl`, `sra`, `sllv`, `srlv`, `srav`.
* **Memory:** `lw`, `sw`.
* **Control flow:** `beq`, `bne`, `j`, `jal`, `jr`.

Some behaviour differs from a full MIPS:

* There are no branch delay slots.
* Overflow does not trap, so `add` behaves like `addu`.
* Unknown instructions execute as no-ops.

A `fault_mask` input is XORed onto the ALU result. Keep it at zero in normal
use. It exists to emulate an upset: the corrupted value is also written back,
so the two cores of the pair stay diverged, as they would after a real
single-event upset.

## Static logic

* **`fetch_pc`** holds the one PC that all four cores share. It resets to 0
  and loads the selected pair's next PC on `commit`.
* **`instr_mem`** has 256 x 32 bits. It is read asynchronously at the PC and
  has a host write port for loading programs.
* **`data_mem`** has 256 x 32 bits. Reads are asynchronous. The processor port
  writes at the rising edge. The host also has a port: its writes take
  priority, and it has a separate asynchronous read for readback. Use the
  host ports while `run` is low.
* **`resync_ctrl`** copies the register state into a repaired pair (see
  above).
* **`data_collection`** is a circular log of the last 16 committed stores.
  Each entry is `{sel_b, address, data}`, so the log shows which pair
  produced each result. It also keeps a saturating 16-bit count of stores
  since reset. The host reads entry `dc_rd_idx`.

## Top-level interface (`ft_mips_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low system reset (restarts the program, clears all flags) |
| `run` | in | 1 | execute one instruction per clock |
| `imem_we`, `imem_addr`, `imem_wdata` | in | 1, 8, 32 | instruction-memory load |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | in | 1, 8, 32 | data-memory load |
| `dmem_rdata` | out | 32 | data-memory readback at `dmem_addr` |
| `reconfig_a`, `reconfig_b` | in | 1 | pair under reconfiguration (held in reset). Drive it synchronously to `clk`; it feeds the pair's asynchronous reset |
| `fault_mask[0:3]` | in | 4 x 32 | upset emulation for cores A0, A1, B0, B1; tie to 0 |
| `led_a`, `led_b` | out | 1 | pair failed or stale |
| `led_d` | out | 4 | low bits of the last committed store |
| `sel_b`, `sys_ok`, `pc` | out | 1, 1, 32 | selected pair, a usable pair is selected, current PC |
| `resync_busy` | out | 1 | a repaired pair is being resynchronised; the system is stalled |
| `dc_rd_idx`, `dc_rd_entry`, `dc_count` | in, out, out | 4, 65, 16 | data-collection readback |

Parameters (with their defaults):

* `IM_DEPTH` = 256;
* `DM_DEPTH` = 256;
* `DC_DEPTH` = 16.

The data width is 32 bits. It comes from `mips_pkg::XLEN` and is not meant
to be changed.

### Timing

The design has one clock domain. The longest combinational path runs as
follows:

1. PC to the instruction memory.
2. Instruction to the register files and ALUs of all four cores.
3. Bundle comparison.
4. Selection.
5. Data-memory address and load data.
6. Write-back multiplexer of each core.

This is the path that sets the clock period of a single-cycle design.

## What follows the source description and what is this design's own

**Taken from the description of the system:**

* four identical MIPS-style cores in two pairs;
* each pair has an analysis unit with an error-detection part and an
  output-generating part;
* the static logic holds the instruction memory, the data memory, an
  output-error module (failure signals and selection control) and an
  output-selection module, plus a result-acquisition module;
* each pair is repaired as one reconfiguration unit;
* the cores are single-cycle and have a control unit, a register file and an
  ALU;
* instructions are 32 bits wide in the R/I/J formats;
* the board has LEDs A and B for failures and D1..D4 for results.

**Chosen here, because the description leaves it open:**

* the instruction subset and its encodings;
* one shared PC in the static logic, with the next PC computed by the cores;
* the contents of the compared bundle and the null-bundle filter;
* same-cycle switch-over, sticky failure flags and the halt on double
  failure;
* the stale rule after a repair and the register copy (`resync_ctrl`) that
  lets a repaired pair rejoin;
* memory and log sizes, host ports and what the LEDs show;
* the `fault_mask` inputs;
* modelling a reconfiguration as a reset of the pair.

The source evaluates reliability with a Markov model of failure rate,
detection coverage and repair rate. That model is analysis, not hardware.
`tb_reliability` is this design's own simulated counterpart to it, run on
the RTL (see Verification).

## Files

* `rtl/mips_pkg.sv`: shared types: opcodes, `alu_op_t`, control word `ctrl_t`
  and the compared bundle `core_out_t`.
* `rtl/`: one module per file, as named above, with `ft_mips_top` as the top.
* `tb/mips_ref_pkg.sv`: a reference model of the core, written independently
  of the RTL, plus instruction encoders and a random-instruction generator.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends by
  printing `TB_RESULT checks=N failures=M`.
* `tb/tb_reliability.sv`: the fault-and-repair campaign over the repair
  rate.

## Verification

Every block testbench compares the block's outputs with values computed
inside the testbench:

* **ALU:** random and corner operands for every operation.
* **Control unit:** all 4096 op/funct combinations against a table.
* **Core and subsystem:** thousands of random instructions against the
  reference model. The subsystem test also injects an upset and checks that
  `err` rises in that cycle, then repairs the pair and checks that it runs
  cleanly again.
* **Output-error module:** a hand-worked sequence, followed by random
  error and repair patterns against a behavioural model.
* **Resynchronisation controller:** every cycle of a copy into A and into B
  (address order, data source, 31 busy cycles, done pulse), an abandoned copy
  and the wait for the end of a reconfiguration.
* **Core and subsystem, resynchronisation:** state loaded through the
  resynchronisation port must let the core or pair carry on in step with the
  model.
* **Other blocks:** memories, selector and log are checked against shadow
  copies.

`tb_ft_mips_top` runs the whole system at its default sizes. It loads a
program through the host ports: a loop over two 16-word arrays that calls a
subroutine per element and stores the results and a total. It then makes
five runs:

1. **Clean run.**
2. **Core A1 upset.** It checks the same-cycle switch to B. It then repairs
   A while B keeps running, checks that the resynchronisation takes exactly
   31 stall cycles, and upsets B1: A must take over in the same cycle, and
   the program must finish correctly.
3. **Upsets in A and then B.** It checks the halt: the PC stays frozen for
   20 cycles and nothing is committed.
4. **Core B0 upset while A is active.** A must stay active, and B is
   repaired and resynchronised meanwhile.
5. **Restart.**

In every committing cycle the PC is compared with the reference model. After
each completed run, the testbench compares the whole data memory, the result
LEDs and the data-collection log (including which pair produced each entry)
with the model.

It also counts how often each mechanism occurs:

* switch-over;
* resynchronisation stall;
* switch back to a resynchronised pair;
* standby failure;
* repair;
* halt;
* restart;
* taken branch;
* call;
* return;
* load;
* store.

It fails if any of them never happens.

`tb_reliability` is a randomized fault-and-repair campaign on the whole
system. It is the simulated counterpart of a reliability study over the
repair rate mu.

* The program runs without end: the array loop jumps back to its start.
* Each cycle, each core is upset with probability 400 per million.
* The testbench plays the host. A subsystem whose failure LED is lit is
  repaired with probability mu per cycle. The hardware then resynchronises
  it on its own.
* A trial lasts 2500 cycles and survives if the system never halts.
  Sixty-four trials are run for each of 13 values of mu, from 1 down to 0.

In every trial, each committed PC is compared with the reference model, and
the PC must stay frozen after a halt. After each surviving trial, the whole
data memory is compared with the model. Across the sweep, survival at
mu = 1 must exceed survival at mu = 0. Survival must also not rise as mu
falls, beyond a slack of 16 trials. With the fixed seed the surviving
trials go from 60 of 64 at mu = 1 to 19 of 64 at mu = 0. Every upset is
detected here, because the ALU result is part of the compared bundle.

To simulate with Verilator (5.x), from the project root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mips_pkg.sv tb/mips_ref_pkg.sv -y rtl tb/tb_ft_mips_top.sv \
  --top-module tb_ft_mips_top
./obj_dir/Vtb_ft_mips_top
```

Any other testbench builds the same way: change the testbench file and
`--top-module`. The simulator is two-state, so every state element that is
read is reset or initialised.

## Limits

* Synthesis has only been checked at the coarse level: no FPGA
  implementation, no timing closure, no partial-reconfiguration floorplan.
* The register copy trusts core 0 of the source pair. An error that the
  pair's comparison did not catch is copied along.
* With two cores per pair, the pair detects a disagreement but does not
  locate the faulty core. A fault that hits both cores of a pair identically,
  or hits the shared static logic, is not detected.
* The memories and the PC are not protected.
