# Mirror Processor node: micro rollback, lockstep checking and self-repair

A self-checking computer node made of two identical RISC processors, the
*Mirror Processors* (MP). They run in lockstep as a master and a slave. The
slave compares the master's pins, and a compressed signature of internal
values, with its own every cycle. Checking takes time. Rather than slow every
cycle to wait for it, each chip holds back every state change for four
cycles in *delayed write buffers* (DWBs). When a check fails a few cycles
late, the whole node, together with its memory, undoes the last one to four
cycles in a single *rollback cycle* and runs them again. This is *micro
rollback*.

If one chip's register file holds a corrupted value, rolling back is not
enough. The two chips then copy the good value from one to the other over the
data bus (*state repair*). If errors keep coming back, the node stops retrying
and takes a *shutdown trap* to a fixed address.

This repository holds synthesizable SystemVerilog for the chip and the
two-chip node, a behavioural memory with its own store buffer, and
self-checking testbenches.

## The node

```
            ext_rb_n/amt_n/shut_n (other modules of the rollback domain)
                         |  wired-AND (open-drain lines with pull-ups)
     +-------------------+--------------------+
     |  rb_n, amt_n[2:0], shut_n              |
 +---+---------+   repair pins (2+2)   +------+------+
 | mp_chip     |<--------------------->| mp_chip     |
 | master_pin=1|                       | master_pin=0|
 +---+---------+                       +------+------+
     | addr, rd, wr, mode, sig, data          | (reads the master's pins
     +---------------+------------------------+  and compares them)
                     |
              memory with store DWB (outside the node)
```

`mp_node` instantiates the two chips. The master drives the address,
strobes, mode bit, signature and store data. The slave drives nothing on the
bus; its comparator checks all of these against its own values. Both chips
read instructions and load data from the same memory.

The rollback line, the three rollback-amount lines and the shutdown line are
open-drain lines shared by every module of the *rollback domain*. This
includes the memory and any other module, which reach the node through the
`ext_*` inputs. They are modelled as wired-AND of active-low drives. The two
pairs of repair pins are cross-connected between the chips.

## Delayed write buffers

`dwb_reg` is the basic building block. A register is a permanent storage
word behind four stages, each with a valid bit.

- **Every normal cycle.** Stage 0 takes the new value, and its valid bit is
  the write enable. All stages move one place to the right. The value leaving
  stage 3 is written into permanent storage, but only if its valid bit is set.
- **A read.** Returns the leftmost (newest) valid stage, or the permanent word
  if no stage is valid.
- **A rollback of n.** Clears the n leftmost valid bits, and does nothing
  else. The rollback cycle neither shifts nor commits. Later reads then see
  the value from n cycles back.

Four stages are enough because every check in the chip reports within four
cycles.

DWBs sit in front of every register whose value lives across a cycle
boundary:

- **Register file (`regfile_dwb`).** 74 registers: 10 globals and 4 window
  banks of 16. Each DWB stage carries the 7-bit physical register number as a
  tag. A read compares its register number with all tags at once and takes the
  newest match.
- **PC unit (`pc_unit`).** A single four-stage DWB of new PC values in front of
  a three-deep FIFO of permanent registers (npc, pc, lpc). `next_PC`, `PC` and
  `last_PC` are the first, second and third valid values, scanning the DWB
  stages first and then the permanent FIFO. After a rollback clears some
  stages, the scan simply reaches further right. This gives rollback of three
  PC registers for the cost of one DWB.
- **MAR.** Holds the fetch address, so an interrupted fetch can be restarted
  exactly.
- **IR.** Holds the instruction fetched before the cycle boundary that a
  rollback returns to.
- **SDR.** Holds store data, so a rollback into the middle of a store can
  repeat its second cycle.
- **PSW.**
- **Control state.** The FSM state, and for a load or store in progress its
  kind and destination. It lets a rollback that lands between the two cycles
  of a load or store resume in that instruction's second cycle. The original
  control unit has a small rollback memory for the same purpose, whose
  contents are not given in detail. Here it is one more DWB register.

The external memory must also roll back recent stores. The testbench memory
(`tb/mem_dwb_model.sv`) therefore has the same four-stage buffer for writes.

## Timing model

One clock edge is one machine cycle. The original chip divides a cycle into
four non-overlapping phases; they are folded together here.

| cycle | what happens |
|---|---|
| c | an error is detected. The error signals of the cycle are registered at its end. |
| c+1 | **rollback cycle.** The chip's controller pulls the lines combinationally. Every module reads the wired rollback, amount, shutdown and repair lines. No state is updated except the valid bits, which are cleared at the end of the cycle. |
| c+2 | execution resumes from the restored state, or a repair starts. |

Register instructions take one cycle, because the next instruction is fetched
while one executes. Loads and stores take two cycles, because the address and
data share one multiplexed bus:

1. **First cycle.** Computes the effective address into MAR and the store value
   into SDR, and still fetches.
2. **Second cycle.** Puts the address on the bus and moves the data.

Jumps are delayed by one instruction.

## Error detection and the rollback distance

| check | where | requests |
|---|---|---|
| master/slave comparison: address and strobes (when in use), mode bit, store data, 4-bit signature | slave's `ms_compare` | rollback of 2 |
| parity of every word read from the bus (busIN) | `bus_parity` in both chips | rollback of 2 |
| parity of a register value read onto busA or busB | `regfile_dwb` in both chips | rollback of 1, and the chip drives its repair pin for that bus |
| parity of the repair value driven on the data pins | sender in REP2 | rollback of 1 |

**Register-file parity.** Each register's parity bit covers the data *and* the
register's physical number. A write decoded to the wrong register is
therefore caught when that register is read.

**The signature (`sig_gen`).** The signature is four interleaved parity bits:
bit k is the XOR of input bits k, k+4, k+8, and so on. It covers 55 internal
bits:

- the value on busD (32 bits),
- the destination register number (7 bits),
- the register-file write enable (1 bit),
- the PSW (11 bits),
- the four FSM state bits.

Any single-bit difference changes the signature, and so does any two-bit
difference in adjacent bits. Because busD is in the signature, a fault in one
ALU is caught in the cycle it happens. Without it, the fault would only show
up when the bad value was later stored to memory, possibly many cycles later.

## The rollback controller (`rb_controller`)

The controller has two halves.

### Requesting a rollback

1. **Distance.** The largest distance among the errors latched in the last
   cycle is the *requested distance* d, counted in execution cycles.
2. **Post-rollback counter.** This counts cycles since the last rollback and
   saturates at 4. Suppose it equals d. Then rolling back d cycles would
   restore exactly the state the previous rollback restored. That state may be
   the bad state, for example if a DWB stage was itself corrupted. So one more
   cycle is added.
3. **Select.** A rollback of d *execution* cycles is not always d DWB entries.
   Slots belonging to earlier rollback, repair or trap cycles hold no
   execution. A 4-bit history register records which recent slots were normal
   execution cycles that were not rolled back:
   - a 1 is shifted in every normal cycle;
   - a 0 is shifted in for repair and trap cycles;
   - a rollback of n clears the n newest entries.

   The select logic counts back through this history until it has passed d
   normal cycles. The result is the number of entries to clear.
4. **Shutdown conditions.** The controller pulls the **shutdown** line
   instead of the rollback line in three cases:
   - more than four entries would be needed;
   - the rollback counter already shows three rollbacks in the current
     16-cycle frame (a 4-bit free-running frame counter clears the 2-bit
     rollback counter each time it wraps);
   - rollback is not yet enabled, because the enable counter holds rollback
     off for four cycles after reset or a shutdown.
5. **Otherwise.** The controller pulls the rollback line, drives the number of
   entries on the amount lines, and drives its two repair pins with the busA
   and busB parity errors it saw.

### Arbitration (`rb_arbiter`)

Several modules may ask for different amounts in the same cycle. All must
roll back by the largest. This uses Futurebus arbitration on the wired amount
lines: a module that sees a line asserted where its own amount has a 0 stops
driving all lower bits. The lines settle to the maximum.

In RTL this is a combinational loop through the wired lines. Verilator
reports it as UNOPTFLAT on the amount lines of the node. The loop settles
because each bit depends only on higher bits.

### Acting on the lines

- **Shutdown line pulled.** The cycle becomes a shutdown-trap cycle. Every
  chip jumps to address `0x400` in system mode, squashes the instruction it
  had fetched, clears its counters and disables rollback for four cycles.
- **Rollback line pulled.** The cycle is a rollback cycle. Every DWB in the
  domain clears the arbitrated number of entries. The rollback bit is set.
- **Repair decision.** Both chips see all four repair pins and make the same
  choice independently:
  - if exactly one chip saw a busA error, busA is repaired;
  - otherwise, if exactly one chip saw a busB error, busB is repaired;
  - an error seen by both chips on the same bus is not repaired, only retried.

  If both buses need repair, busA is done first. The busB error then comes
  back when the instruction is re-executed, and is repaired then.

## State repair

After a rollback cycle that decided on a repair:

1. **REP1.** Both chips re-read the registers of the instruction that failed.
   The register being repaired goes through the shifter onto busD and is
   latched with its physical number. If the sender finds a parity error in this
   re-read, it asks for another one-cycle rollback, and the repair starts
   over.
2. **REP2.** The chip that read the good value drives it with bus parity on the
   data pins. The other chip takes it from the pins and writes it, with fresh
   register-file parity, into the same physical register.

The FSM then returns to the state restored by the rollback, and the failed
instruction runs again. Repair cycles are not themselves rolled back.

In the original chip the sender temporarily takes master mode. Here only the
data-bus drive follows the sender (`data_drive_o`), which has the same effect
on the bus.

## Control unit and instruction set (`mp_control`)

A four-state one-hot FSM tracks the chip's cycle:

| state | meaning |
|---|---|
| NORMAL | executing an instruction |
| SECOND | second cycle of a load or store |
| REP1 | first repair cycle |
| REP2 | second repair cycle |

A combinational decoder turns the instruction in IR, the state and the
master pin into a control word.

The instruction set follows RISC II in spirit, but the encoding is this
design's own.

- **Short format:** `op[31:25] scc[24] rd[23:19] rs1[18:14] imm[13] s2[12:0]`.
  s2 is either rs2 or a sign-extended 13-bit immediate.
- **Long format:** `op, scc, rd, imm19`.

| op | instruction | effect |
|---|---|---|
| 01-07 | ADD ADDC SUB SUBC AND OR XOR | rd = rs1 op s2. The flags Z, N, V, C are set if scc. Subtract is a + ~b + carry-in, so C=1 means no borrow. |
| 08-0A | SLL SRL SRA | rd = rs1 shifted by s2[4:0] |
| 0B | LDHI | rd = imm19 << 13 |
| 10 | LDL | rd = mem[rs1 + s2] (two cycles) |
| 11 | STL | mem[rs1 + imm13] = rd (two cycles) |
| 20 | JMP | if cond(rd[3:0]) then jump to rs1 + s2 (delayed) |
| 21 | JMPR | if cond(rd[3:0]) then jump to PC + imm19 (delayed) |
| 22 | CALLR | cwp = cwp-1; rd (in the new window) = PC; jump to PC + imm19 |
| 23 | RET | cwp = cwp+1; jump to rs1 + s2 |
| 24 / 25 / 26 | GETPSW / PUTPSW / GETLPC | rd = PSW / PSW = rs1 + s2 / rd = last_PC |
| 30-39 | diagnostic instructions | see below |

**Condition codes.** The values of `rd[3:0]` are: 0 always, 1 eq, 2 ne, 3 lt,
4 ge, 5 le, 6 gt, 7 ltu, 8 geu, 9 neg, 10 pos, and any other value never.

**PSW.** The PSW is 11 bits:

| field | bits | meaning |
|---|---|---|
| cwp | 2 | current window pointer |
| swp | 2 | saved window pointer |
| I | 1 | interrupt enable |
| S | 1 | system mode |
| P | 1 | previous system mode |
| Z, N, V, C | 4 | condition flags |

**Register windows.**

- r0 to r9 are the globals, and r0 always reads as zero.
- r10 to r25 are bank cwp.
- r26 to r31 alias the first six registers of bank cwp-1.

So a caller's r26 to r31 are the callee's r10 to r15.

**Privileged instructions.** PUTPSW and the diagnostic instructions are
privileged. In user mode they do nothing.

### Diagnostic instructions

These instructions act differently on the master (`…m`) and the slave
(`…s`). They let a test program make each detection and recovery path fire on
purpose.

| instruction | effect |
|---|---|
| `clrrbm`, `clrrbs` | clear the rollback bit of the master, or of the slave |
| `addbpm`, `addbps` | ADD, but the named chip stores the result with wrong parity. A later read forces a one-cycle rollback and a repair. |
| `jmprbm`, `jmprbs` | If the rollback bit is set: rd = rs1, and jump to PC + rs2. If it is not set: one chip stores rs1 and the other stores rs2. (For `…m` the master stores rs1; for `…s` the slave does.) Different values mean different busD signatures, so a two-cycle rollback follows, and then the jump is taken. |
| `strbdm`, `strbds` | PC-relative store. If the rollback bit is clear, the named chip stores MAR instead of rd, which forces a store-data mismatch. |
| `ldrbpm`, `ldrbps` | PC-relative load. If the rollback bit is clear, the named chip expects inverted parity, which forces a busIN parity error. |

## Departures from the described chip

- **Clocking.** One clock per cycle instead of four phases. There is no clock
  generator and there are no pads; open-drain lines are wired-AND.
- **Encoding.** The instruction encoding, opcode numbers and condition codes
  are this design's own.
- **Instruction subset.**
  - Words only: there are no byte or halfword accesses.
  - No interrupts, so the comparator has no interrupt-acknowledge pin.
  - No register-window overflow or underflow traps.
  - Privileged instructions in user mode are no-ops rather than traps.
- **Added state.**
  - The control state has its own DWB.
  - The rollback controller also shuts down when a rollback would need more
    than four buffer entries.
  - The enable counter holds rollback off for four cycles.
  - The post-rollback counter is three bits wide, saturating at 4.
- **When shutdown is decided.** In the original sequence, the rollback
  counter and the arbitrated amount are checked after the rollback cycle has
  latched the lines, and the shutdown line is pulled in the following cycle.
  Here the controller checks its own request before it drives anything, and
  pulls the shutdown line instead of the rollback line. The trap therefore
  comes one cycle earlier. A rollback amount over four requested by another
  module of the domain is not turned into a shutdown.
- **Shutdown vector.** The shutdown trap jumps to `0x400`. The trap saves no
  return state, so it cannot be resumed exactly.
- **Repair-transfer check.** The sender compares the parity of the value it
  drives with the parity it took from busD, and asks for a one-cycle rollback
  on a difference. The model has no way to inject the wiring fault this
  check is meant to catch, so the check is built but not exercised.
- **Interrupts and wait states.** The interrupt unit and memory wait states
  are not built, because their function is not given.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_dwb_reg`, `tb_pc_unit`, `tb_regfile_dwb` | random writes and rollbacks against a reference that keeps the whole history of cycle slots |
| `tb_alu`, `tb_shifter`, `tb_bus_parity`, `tb_sig_gen`, `tb_ms_compare`, `tb_rb_arbiter` | random and exhaustive checks of the combinational blocks; the signature test also checks the single- and adjacent-bit detection properties |
| `tb_rb_controller` | directed sequences: rollbacks of 1 and 2, the extra cycle from the post-rollback counter, select past rolled-back slots, shutdown at the fourth rollback in a frame and before rollback is enabled, arbitration, the repair table, the rollback bit |
| `tb_mp_control` | decode, privilege, load/store states, rollback into a second cycle, REP1/REP2, shutdown squash |
| `tb_mp_chip` | one chip running a program: ALU, shifts, LDHI, loop, call/return across windows, PSW, GETLPC. It also checks the cycle count of 1 per register instruction and 2 per load or store, and that external rollbacks of 1 to 4 cycles are invisible in the results. |
| `tb_mp_node` | the two-chip node at its default size, running a self-diagnosis program (see below) |

The `tb_mp_node` program:

1. ordinary arithmetic, loads, stores, a loop and a call;
2. `addbpm`, which forces a one-cycle rollback and a repair from the slave;
3. `jmprbm`, which forces a signature mismatch;
4. `strbdm`, which forces a store-data mismatch;
5. `ldrbpm`, which forces a busIN parity error;
6. external rollbacks of 3 and 4 cycles;
7. finally, a memory that returns bad parity until the fourth rollback in a
   frame forces a shutdown trap, whose handler writes a marker.

The run counts each mechanism and fails if any never happened. A run gives
rollbacks of 1, 2, 3 and 4 cycles (1, 4, 1 and 2 of them), one repair, one
shutdown trap and 16 second cycles in 219 cycles.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/mp_pkg.sv tb/tb_mp_node.sv \
    --top-module tb_mp_node -o sim
./obj_dir/sim
```

Replace `tb_mp_node` with any other testbench name. Verilator finds the
modules it needs in `rtl/` and `tb/` by file name, through the `-I` paths.
`-Wno-fatal` is needed because Verilator warns about the arbitration loop
through the wired rollback-amount lines (see above). The warning is expected,
and the loop settles.

## Files

- **`rtl/mp_pkg.sv`.** Sizes, the PSW, state and control-word types, the
  opcodes, and the register-window mapping.
- **Data path.**
  - `rtl/dwb_reg.sv`, `rtl/pc_unit.sv`, `rtl/regfile_dwb.sv`: the DWB storage.
  - `rtl/alu.sv`, `rtl/shifter.sv`: the data path units.
  - `rtl/bus_parity.sv`, `rtl/sig_gen.sv`, `rtl/ms_compare.sv`: checking.
- **Rollback and control.** `rtl/rb_arbiter.sv`, `rtl/rb_controller.sv`,
  `rtl/mp_control.sv`.
- **Chip and node.** `rtl/mp_chip.sv` is one processor. `rtl/mp_node.sv` is
  the master/slave node, and the top level.
- **`tb/mem_dwb_model.sv`.** The behavioural memory, with a store DWB and a
  fault input.

All sizes are parameters with the original chip's numbers as defaults:

| parameter | default |
|---|---|
| word width | 32 bits |
| registers | 74 |
| register number | 7 bits |
| buffer depth | 4 |
| rollback-amount lines | 3 |
| signature | 4 bits over 55 |

Every file starts with a comment on what the module does and which of its
choices are its own.
