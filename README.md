# Intel 8085A, modelled state by state

This is a synthesizable SystemVerilog model of the Intel 8085A 8-bit
microprocessor, built from its internal architecture. It is not written
from an instruction-set simulator. Its blocks are the ones of the processor's
block diagram: accumulator, temporary register, flag flip-flops, ALU, register
array, increment/decrement address latch, instruction register and decoder,
timing and control, interrupt control, serial I/O control, and the address and
address/data buffers. The timing and control unit steps through the
processor's ten states: T1 to T6, TRESET, THALT, TWAIT and THOLD.

The pins behave the same way in every clock period. Each machine cycle puts
out its status, ALE, the multiplexed address/data bus and the RD, WR and INTA
strobes in the T-state where the 8085A does, so a board model can be wired to
it directly. The top level, `i8085a_system`, adds the classic two-flip-flop
circuit that stretches machine cycles by exactly one WAIT state.

## Clocking and pin conventions

- One T-state lasts one period of `clk`, and every register changes on its
  rising edge.
- The real part runs at 320 ns per state with a 6.25 MHz crystal. The model
  has no timing of its own, so the crystal oscillator is not modelled:
  supply the clock directly.
- `clk_out` (CLK(OUT)) is the inverse of `clk`. Its rising edges fall in the
  middle of each state, which is where the WAIT circuit samples.
- Three-state pins are split into a value and an output enable:
  - `a_hi`/`a_hi_oe` for A15-A8;
  - `ad_out`/`ad_oe` for AD7-AD0, with `ad_in` carrying what the bus holds;
  - `ctl_oe` for RD, WR and IO/M.

  Join them in a pad ring or in the board model. All of them float in
  TRESET, THALT and THOLD.
- RESET IN (`reset_in_n`) is an asynchronous active-low reset. It puts the
  processor in TRESET and clears PC to 0000h. RESET OUT is high during
  TRESET.

## Machine cycles on the pins

Every instruction is one to five machine cycles. Each cycle is named by the
status lines, which are put out at the start of T1 and held for the whole
cycle:

| cycle | IO/M S1 S0 | strobe | states |
|---|---|---|---|
| opcode fetch (OF) | 0 1 1 | RD | 4 or 6 |
| memory read (MR) | 0 1 0 | RD | 3 |
| memory write (MW) | 0 0 1 | WR | 3 |
| I/O read | 1 1 0 | RD | 3 |
| I/O write | 1 0 1 | WR | 3 |
| interrupt acknowledge | 1 1 1 | INTA | 4 or 6 |
| bus idle | 0 0 0 | none | 6 (vectored interrupt) |

Within a cycle:

- **T1:** ALE is high. The 16-bit address goes out, high byte on A15-A8 and
  low byte on AD7-AD0. It comes from PC, a register pair, SP or W,Z through
  the address latch. An I/O cycle puts the port number on both halves.
- **T2:** AD7-AD0 float for a read or carry the write data. The strobe goes
  low. The source register is updated from the incrementer/decrementer
  (PC+1, SP-1 or SP+1, WZ+1). At the end of T2 READY is sampled, and then
  HOLD.
- **TWAIT (only if READY was low):** every pin stays as it was at the end
  of T2.
- **T3:** the byte on the bus is taken in. The strobe goes high at the end
  of T3.
- **T4 to T6 (opcode fetch only):** the opcode is decoded, and register-to-
  register and 16-bit work is done. The address bus keeps its last value.

An ALU result is written one clock after its second operand reaches the
temporary register, usually in T1 of the next cycle. So `ADD M` finishes
while the next opcode is being fetched, as on the real part.

## The T-state generator

`state_gen` is the part to read first if the timing looks wrong. It is a
counter with several modes. The next state depends on READY, HOLD, the
interrupt logic and three flip-flops:

- **HALT:** set when HLT is decoded in T4.
- **HLDA:** set when HOLD is seen.
- **INTA:** set when an interrupt is accepted, and cleared after the
  acknowledge cycle.

Transitions:

- **TRESET to T1:** at the first clock after RESET IN rises.
- **T1:** to THALT if the HALT flip-flop is set, otherwise to T2. The T1
  that enters THALT still pulses ALE with the next PC. HLT therefore
  reaches THALT five states after its own T1.
- **T2 and TWAIT:** stay in TWAIT while READY is low, but only in cycles
  that use the bus. Otherwise go to T3, and set HLDA if HOLD is high.
- **T3:** ends the cycle unless it is the opcode fetch.
- **T4:** in a six-state fetch, go on to T5 and sample HOLD again.
  Otherwise T4 ends the cycle.
- **End of a cycle:** THOLD if HLDA is set. Otherwise, after the last cycle
  of an instruction, a pending interrupt is accepted here; this clears
  INTE. Then T1.
- **THOLD:** stays while HOLD is high. On leaving, HLDA is cleared first,
  then the state goes to THALT if HALT is set, otherwise to T1.
- **THALT:** leaves on HOLD (through THOLD, and back to THALT afterwards),
  on an accepted interrupt (to T1), or on reset.

The rules that follow from this:

- A HALT is entered in T1.
- A WAIT comes after T2.
- HOLD is served when a machine cycle ends.
- An interrupt is served only when an instruction ends.
- When HOLD and an interrupt arrive together, HOLD goes first.

## Arithmetic section and flags

The ALU always works on the accumulator and the temporary register. For an
ALU instruction the second operand is first copied into the temporary
register. `INR`/`DCR` pass the register through the temporary register and
write the result back to it.

The flag register holds S, Z, AC, P and CY in bits 7, 6, 4, 2 and 0. The
other three bits are always 0, even after `POP PSW`.

Auxiliary carry is the part of the flags most often got wrong:

- **Addition:** AC is the carry from bit 3 into bit 4.
- **Subtraction and compare:** the model adds the two's complement and
  takes the carry out of bit 3. It does not invert it. CY, on the other
  hand, is the borrow.
- **DCR:** AC is set only when the low nibble borrows, that is, when it was
  0. This does not follow the subtraction rule. It is what makes DCR of D2h
  give flags 84h, whereas the subtraction rule would give 94h.
- **INR:** AC is set when the low nibble was Fh.
- **ANA:** AC is the OR of bit 3 of both operands.
- **XRA and ORA:** AC and CY are cleared.

Worked values that the tests check:

- 9Bh + A5h = 40h with flags 11h.
- A5h - 9Bh = 0Ah with flags 04h.
- 9Bh - A5h = F6h with flags 95h.
- DCR of D2h gives D1h with flags 84h.

## Registers and the address latch

`reg_array` holds B, C, D, E, H, L, SP and PC. It also holds the internal
pair W,Z, which collects the two address bytes of three-byte instructions
(Z low, W high) and then addresses the data.

`incdec_latch` is the 16-bit increment/decrement address latch. In T1 it
takes the address selected from PC, SP, a register pair or W,Z, and holds
it on the pins. Its +1 and -1 outputs are the only 16-bit adder in the
design. They serve PC stepping, stack pointer moves, INX/DCX and the second
byte of LHLD/SHLD.

## Instruction decoding

`instr_decoder` turns the opcode into:

- an instruction class and the register fields;
- whether the fetch takes six states;
- a plan of up to four further machine cycles, each with a cycle kind, an
  address source and an increment or decrement.

`control_unit` walks that plan. STA, for example, is planned as:

1. opcode fetch (4 states);
2. memory read at PC, into Z;
3. memory read at PC, into W;
4. memory write at W,Z.

That is 13 states in total. The decoder is combinational logic, not a
micro-programme.

## Interrupts and serial I/O

`interrupt_ctrl` takes five interrupt inputs.

- **TRAP:** cannot be masked. It is sensed on a rising edge.
- **RST7.5:** sensed on a rising edge and held in a flip-flop until it is
  taken or cleared by SIM.
- **RST6.5, RST5.5 and INTR:** level-sensed.
- **Priority:** TRAP, then 7.5, 6.5, 5.5, INTR.
- **INTE:** all inputs except TRAP need INTE, which EI sets. DI, reset and
  every accepted interrupt clear it.

How an interrupt is served:

- **Vectored inputs:** the processor runs a six-state bus-idle cycle. It
  then pushes PC with two memory writes and continues at 0024h, 003Ch,
  0034h or 002Ch.
- **INTR:** the next fetch becomes an interrupt acknowledge cycle. The
  opcode is read with INTA low and PC is not advanced. A `RST n` supplied
  this way executes normally.

SIM and RIM:

- SIM loads the masks (bit 3 enables the load), clears RST7.5 (bit 4), and
  loads SOD from bit 7 when bit 6 is set.
- RIM returns SID, the pending 7.5/6.5/5.5 requests, INTE and the three
  masks.

## One-WAIT-state circuit

`wait_state_gen` is two D flip-flops clocked by CLK(OUT):

1. The first is set in the middle of T1. Its D input is ALE, gated by
   `wait_en` and, when `wait_of_only` is high, by the opcode-fetch status
   (IO/M=0, S1=1, S0=1).
2. The second copies the first in the middle of T2. Its output drives
   READY low just before the processor samples READY, and clears the first
   flip-flop.
3. In the middle of TWAIT the second flip-flop copies the cleared first one,
   so READY returns high and the cycle continues in T3.

The result is exactly one WAIT state in every machine cycle while `wait_en`
is high, or only in each opcode fetch when `wait_of_only` is also high.
Gating the D input with ALE and the status lines is this design's choice. `ready_in` lets other board logic add its own wait states. One WAIT
state allows (5/2 + 1)T - 225 ns of memory access time instead of
(5/2)T - 225 ns: 895 ns instead of 575 ns at T = 320 ns.

## Departures from the real 8085A

These are deliberate simplifications:

- **Conditional jumps** always read both address bytes: 10 states, where the
  part takes 7 when the jump is not taken.
- **Conditional calls that are not taken** take 12 states; the part takes 9.
- **Conditional returns that are not taken** take 6 states, as on the part.
- **EI** takes effect immediately. The part waits for one more instruction.
- **Undefined opcodes** of the 8085 (08h, 10h, ...) execute as NOP.
- **ALE** is high for the whole of T1, not for half of it.
- **A15-A8** keep their last value in T4 to T6; the part leaves them
  unspecified.
- **Reset** clears all registers, not just PC.

Not modelled:

- the crystal oscillator;
- the one-shot that holds READY low for slow devices;
- the external memory and the 74LS373 address latch. The testbenches
  include a behavioural memory and I/O board (`tb/sys_mem.sv`).

## Files

| file | contents |
|---|---|
| `rtl/i8085_pkg.sv` | shared types: T-states, machine-cycle kinds, ALU operations, flag layout, decode record, vectors |
| `rtl/i8085a_system.sv` | top: processor plus one-WAIT-state circuit |
| `rtl/i8085a.sv` | processor: wires all internal blocks |
| `rtl/state_gen.sv` | T-state generator with HALT, HLDA and INTA flip-flops |
| `rtl/control_unit.sv` | machine-cycle sequencing, datapath and pin control |
| `rtl/instr_decoder.sv` | instruction register and decoder |
| `rtl/alu.sv`, `rtl/arith_section.sv` | ALU; accumulator, temporary and flag registers |
| `rtl/reg_array.sv`, `rtl/incdec_latch.sv` | register array; address latch with incrementer/decrementer |
| `rtl/interrupt_ctrl.sv`, `rtl/serial_io.sv` | interrupt control; SID/SOD |
| `rtl/bus_buffers.sv` | A15-A8 and AD7-AD0 drivers with the data output latch |
| `rtl/wait_state_gen.sv` | two-flip-flop READY circuit |
| `tb/tb_<block>.sv` | self-checking test of each block |
| `tb/tb_i8085a.sv` | program run on the processor: results, flags, T-states per instruction, pin sequence, HOLD timing |
| `tb/tb_i8085a_system.sv` | end-to-end run of the top: WAIT, HOLD (running and halted), HALT, every interrupt, SIM/RIM, I/O, reset |
| `tb/sys_mem.sv` | behavioural 64 KB memory, 256 I/O ports and address latch |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
also has a watchdog that fails it if it hangs. To run one, for example the
end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb rtl/i8085_pkg.sv \
        tb/tb_i8085a_system.sv --top-module tb_i8085a_system -o sim
    ./obj_dir/sim

Replace the testbench name to run any other test. Verilator finds the other
modules in `rtl/` and `tb/` by name.

With `--assert`, the processor also checks its bus rules at every clock:

- at most one of RD, WR and INTA is low;
- ALE is high only in T1;
- no pin is driven while HLDA is high.

A violation stops the simulation.

The end-to-end test counts how many times each mechanism occurs: WAIT
states, HOLD, HALT, reset, four- and six-state fetches, every machine-cycle
type, INTA and bus-idle cycles. It fails if any mechanism never occurs. It
also checks:

- that STA takes 17 states with one WAIT in each of its four machine cycles;
- that STA takes 14 states with the WAIT in its opcode fetch only;
- that IN takes 13 states when a slow port holds READY low for two more
  WAIT states;
- that LXI takes 10 states with the circuit off;
- that a DMA write made during HOLD survives.

The processor test compares the length of every executed instruction with
the 8085A state counts. It also checks the pins in the middle of every
state of every machine cycle against the rules in the section on machine
cycles. The decoder test checks the implied state count of
all 256 opcodes.
