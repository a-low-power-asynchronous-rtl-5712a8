# A compact MSP430 core for duty-cycled sensor nodes

A sensor node spends almost all of its life asleep: it wakes a few times per
second (or per minute), takes a sample, does a little filtering and
compression, and goes back to sleep. Over such a duty cycle the energy lost to
leakage while idle outweighs the energy of the few active instructions, so the
processor should be made **small** rather than fast. This design is an
MSP430-compatible core built on that idea:

* a single ALU does all arithmetic, including address and pointer arithmetic
  (PC + 2, base + index, SP − 2, PC + jump offset), so there is no separate
  address adder or incrementer;
* the controller is not a set of per-instruction sequences: every instruction
  is a walk through the same few shared steps, fetch (IF), decode (ID),
  operand fetch (OF), execute (EX), write back (WB) and offset calculation
  (OC), and one OF step is used twice for two-operand instructions
  ("functional coupling" of the instruction set).

The price is more clock cycles per instruction, which costs some dynamic
energy. With long idle times that extra energy is small next to the leakage
saved by the smaller area. The core runs the MSP430 instruction set: all 27
core instructions, all seven addressing modes, byte and word operations, the
constant generators, interrupts with RETI, and the CPUOFF low-power mode.

The design this RTL follows was an asynchronous (handshake) circuit. This
version is synchronous: each step takes one clock cycle, and the handshakes
remain only on the memory/peripheral bus. See
[Departures](#departures-from-the-original-design).

## Files

| file | contents |
|---|---|
| `rtl/msp430_pkg.sv` | opcodes, status-register bits, ALU operations, decoded-instruction struct |
| `rtl/msp430_alu.sv` | the one shared ALU |
| `rtl/msp430_regfile.sv` | R0..R15 |
| `rtl/msp430_decoder.sv` | instruction decode into the three instruction classes |
| `rtl/msp430_core.sv` | datapath registers, multiplexers and the shared-step controller |
| `rtl/msp430_mem.sv` | program/data memory on the bus |
| `rtl/msp430_system.sv` | top: core + memory + peripheral window |
| `tb/msp430_asm_pkg.sv` | a small assembler used to write test programs |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Datapath

```
 register file (R0 PC, R1 SP, R2 SR, R3 CG, R4..R15)
   Src and Dst read ports --> src_t, dst_t, areg (operand fetch), Dst mux

   Src mux (ALU a): src_t, dreg,     Dst mux (ALU b): dst_t, PC, SP, areg,
                    jump offset,                      0, register (Src or
                    constant 1 / 2                    Dst port, per phase)
                    \                    /
                     +------ ALU -------+ --> C Z N V --> R2 (SR)
                              |
                              +--> register write port, areg, dreg
   write port also takes: bus read data (vectors, RETI), dreg, src_t (CALL)

 Addr mux: PC, SP, areg, reset/interrupt vector ---> internal address bus
 internal data bus ---> ir, src_t, dst_t, dreg      (reads)
 dreg, src_t, PC, SR ---> internal data bus          (writes)
```

Storage outside the register file:

| register | role |
|---|---|
| `ir` | instruction register |
| `areg` | address register: operand address for reads and for the write back; also holds the address of an index word for symbolic mode |
| `dreg` | data register: the index word, the ALU result waiting for write back, the popped PC in RETI, the jump target |
| `src_t`, `dst_t` | source and destination operand temporaries |

The register file has two read ports, one for the Src side and one for the Dst
side, and one write port. A separate path writes only R2, so an instruction
can store its flags in the same cycle as another register write. If both
write R2 in the same cycle, the general write wins. R3 reads as zero; R0 and
R1 always hold even values.

## How an instruction runs: the shared steps

This is the part of the design that differs most from a conventional MSP430
implementation. The controller (`msp430_core`, one `always_comb` case on
`state`) has one state per shared step. The decoded class picks the path:

| class | path through the steps |
|---|---|
| double operand (ADD, ADDC, SUBC, SUB, CMP, DADD, BIT, BIC, BIS, XOR, AND) | IF → ID → OF(src) → OF(dst) → EX → WB |
| MOV | IF → ID → OF(src) → OF(dst) → WB |
| single operand (RRC, SWPB, RRA, SXT) | IF → ID → OF(src) → EX → WB |
| PUSH, CALL | IF → ID → OF(src) → EX → SP−2 → write to stack (CALL also loads PC) |
| RETI | IF → ID → pop SR → pop PC → WB |
| jumps | IF → ID → OC → WB (WB only if the condition holds) |

`OF` is a single sequence with a phase bit, `of_dst`. In the source phase it
uses `As` and the source register; in the destination phase it uses `Ad` and
the destination register. Depending on the addressing mode it runs through
these sub-steps:

| mode | sub-steps of OF |
|---|---|
| Rn, constant (R3, or R2 with As = 10/11) | 1 cycle: register or constant into the temporary |
| @Rn | areg ← Rn, then a bus read |
| @Rn+, #N | areg ← Rn and Rn ← Rn + 1/2 on the ALU in the same cycle, then a bus read (#N is @PC+) |
| X(Rn), ADDR (symbolic), &ADDR | read the index word at PC (areg ← its address, PC ← PC + 2 on the ALU), then areg ← base + index on the ALU, then a bus read |

For the symbolic mode the base is the address of the index word, which `areg`
still holds. For the absolute mode the base is zero. The destination of a
MOV is never read: after its address is formed, OF goes straight to WB with
the source value (cut to a byte for MOV.B).

`EX` applies the ALU operation to `src_t` (ALU input a) and `dst_t` (input b),
puts the result in `dreg`, and writes C, Z, N and V to SR for the
instructions that change flags. CMP and BIT end here. `WB` writes `dreg` to a
register, or to memory at `areg`. Because `areg` was loaded before any
auto-increment, a single-operand instruction on `@Rn+` writes back to the
location it read.

Interrupts and the low-power mode are handled at the instruction boundary,
a one-cycle `S_BOUND` state between instructions. From there the core either
fetches, sleeps (`SR.CPUOFF` set) or takes an interrupt.

### Cycle counts

With the memory at its default (0 wait states) every bus transfer takes 2
cycles: the request cycle and the acknowledge cycle. An instruction costs:

* 1 (boundary) + 2 (IF) + 1 (ID);
* per operand: 1 for a register or constant; 3 for @Rn or @Rn+; 6 for an
  indexed, symbolic or absolute operand (4 for the destination of MOV);
* 1 for EX (not for MOV); WB is 1 to a register or 2 to memory;
* jumps: 1 (OC), plus 1 if taken.

For example, `ADD R4,R5` takes 8 cycles and `MOV #imm,R5` 9 cycles. Each
memory wait state adds one cycle per bus transfer. In the RLE_stream test
below, one sample (interrupt entry, about 25 instructions and RETI) takes
about 170 cycles.

## Bus

The core has one request/acknowledge channel for instruction fetches and data:

* the core raises `bus_req` with `bus_addr`, `bus_we`, `bus_byte` and
  `bus_wdata`, and holds all of them unchanged until the transfer ends (a
  concurrent assertion in the core checks this);
* the transfer ends in the one cycle in which `bus_ack` is high. `bus_rdata`
  is valid in that cycle;
* any number of wait cycles is allowed. This is how a slow memory or
  peripheral stalls the core.

Byte accesses pick the lane with `bus_addr[0]`. On reads the core selects the
byte from the full word. On writes it repeats the byte on both lanes, and the
slave writes only the addressed lane.

`msp430_system` splits the bus by address. Byte addresses below `PER_LIMIT`
(0x0200) leave the chip on the `per_*` ports, the peripheral window where a
timer, an ADC and other devices belong. Everything else goes to
`msp430_mem`, a 32K × 16 array covering the whole 64 KB space. The memory
acknowledges `WAIT_STATES + 1` cycles after a request. Peripherals must use
the same handshake.

## Sleeping and waking

Setting `CPUOFF` (SR bit 4), for example with `BIS #0x18,SR` (GIE + CPUOFF),
stops the core at the next instruction boundary. `sleeping` is then high and
the core makes no bus requests. A level-sensitive `irq`, taken when `GIE` is
set, wakes the core as follows:

1. PC is pushed, then SR.
2. SR is cleared, except SCG0.
3. `irq_ack` pulses for one cycle (the device should drop `irq`).
4. PC is loaded from the word at `IRQ_VECTOR` (0xFFF0).

RETI restores SR and PC. If the handler clears CPUOFF in the stacked SR
(`BIC #0x10,0(SP)`), the core stays awake after RETI. Otherwise it goes back
to sleep. After reset, PC is loaded from `RESET_VECTOR` (0xFFFE) and all
registers, SR included, are zero.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `msp430_system` | `PER_LIMIT` | 0x0200 | first byte address that is memory, not peripheral |
| | `MEM_WORDS` | 32768 | memory size in 16-bit words |
| | `MEM_WAIT` | 0 | memory wait states |
| `msp430_core`, `msp430_system` | `RESET_VECTOR` | 0xFFFE | address of the reset vector |
| | `IRQ_VECTOR` | 0xFFF0 | address of the interrupt vector |

All of these defaults are this design's choices, following MSP430
conventions. The original design gives no sizes.

## Departures from the original design

* **Clocked instead of asynchronous.** The original was written as a
  handshake-circuit program and had no clock. Here each step of the
  controller takes one cycle. The structure is kept: the storage elements,
  the single ALU used for address calculation, and one shared OF, EX and WB.
  Cycle counts and any power figure of the original do not carry over.
* **One decode step.** The original draws separate second-level decodes for
  single-operand instructions and for jumps (IF2/ID, IF3/ID). Since the
  MSP430 encodes all formats in one word, one combinational decoder
  (`msp430_decoder`) classifies all three formats at once.
* **Single-operand operations pass through EX.** The original draws RRA, SXT
  and their relatives going from OF straight to WB. Here the operation
  runs on the shared ALU in a separate EX step, which costs one cycle and
  gives the same result.
* **Interrupts.** The original only shows RETI. This design has one
  interrupt input and one vector. Real devices have several prioritised
  vectors.
* **Low-power modes.** Of the MSP430 operating modes only CPUOFF has an
  effect, because there is no clock system. OSCOFF, SCG0 and SCG1 can be
  set in SR but control nothing.
* **ROM.** Program memory is the same writable array as RAM, so that a
  testbench can load programs.
* **Not included:** the timer and the ADC, which the original design names
  but does not describe. They connect through the peripheral window and
  `irq`.
* Instructions outside the MSP430 set are skipped as no-ops.

## Verification

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_msp430_alu` | every operation, byte and word, at corner values and 400 random operand pairs each, against an integer-arithmetic reference for result and C/Z/N/V |
| `tb_msp430_regfile` | 3000 random writes and reads against a model, including the R2 write priority, R3 = 0 and even PC/SP |
| `tb_msp430_decoder` | known encodings field by field, then the class of all 65536 words |
| `tb_msp430_mem` | random word/byte reads and writes, exact latency and single-cycle acknowledge |
| `tb_msp430_core` | a program covering every addressing mode, byte ops, constant generators, all jump conditions, PUSH, CALL (immediate and absolute) and RET, DADD, sleep, interrupt and RETI, against a memory with random wait states; final registers and memory compared with hand-computed values; also checks that requests stay stable while waiting |
| `tb_msp430_core_random` | 150 random programs of 40 instructions each (all double-operand instructions, shifts, PUSH, conditional jumps, every addressing mode, byte and word), run on the core and on an instruction-set model in the testbench; registers, flags, data area and stack compared at the end |
| `tb_msp430_system` | the whole system at its default parameters running RLE_stream (below); also counts how often each mechanism was used and fails if one never happened |
| `tb_msp430_idle_sweep` | RLE_stream with the idle time stepping through 0 to 256 ms (at an assumed 1 MHz clock); checks the output and that every idle period lasts exactly as programmed |

**RLE_stream** is the kind of application the design targets. On each timer
tick the node:

1. wakes up;
2. reads one ADC sample;
3. passes it through a Schmitt-trigger threshold detector, which switches to
   1 at or above 0x0A00 and back to 0 below 0x0600;
4. run-length encodes the resulting bit stream. Each run becomes one byte
   (bit 7 the level, bits 6..0 the length; runs longer than 127 are split),
   stored in RAM and written to an output port;
5. goes back to sleep.

A separate model in the testbench computes the expected runs.

Not verified: CALL is only tested with immediate and absolute targets,
RETI only from the single interrupt, and there are no tests of gate-level
timing or power. Words that are not instructions are skipped, which is this
design's choice, not MSP430 behaviour that software could rely on.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/msp430_pkg.sv tb/msp430_asm_pkg.sv tb/tb_msp430_system.sv \
    --top-module tb_msp430_system
./obj_dir/Vtb_msp430_system
```

Replace the last file and the top name for another testbench. The
testbenches mix integer and fixed-width arithmetic freely, so Verilator
prints width warnings for them; `-Wno-fatal` keeps those from stopping the
build. With `-Wall` the RTL gives only two kinds of warning: unused
package constants, and reset used both as an asynchronous flop reset and as
the disable condition of the bus assertion in the core.
`msp430_asm_pkg` is only needed by `tb_msp430_core`, `tb_msp430_core_random`,
`tb_msp430_system` and `tb_msp430_idle_sweep`.

Writing new test programs is easiest with `msp430_asm_pkg`, for example:
`i1(ADD, inc(6), idx(4, 7))` assembles `ADD @R6+,4(R7)`, `imm(n)` picks a
constant generator when it can, and `jf()`/`fix()` handle forward jumps.
