# A transport triggered processor for NTRU public-key cryptography

This is synthesizable SystemVerilog for a small **transport triggered architecture (TTA)**
processor. Its unit mix is tuned for software implementations of **NTRU**, a lattice-based
public-key cryptosystem that is believed to resist quantum computers. NTRU works on polynomials
in the ring Z[x]/(x^N − 1). Nearly all of its time goes into cyclic convolutions (multiply and
accumulate over index pairs taken modulo N) followed by reduction of the coefficients modulo q or p.

In a TTA the program does not name operations. It names **data transports**. Each instruction holds
one *move* per transport bus: "copy this value from that source to that destination port". An
operation starts as a side effect, when a value is moved into a unit's *trigger* port. Its result
stays in the unit's result register until a later move carries it elsewhere. That can be straight
into another unit, with no trip through a register file. Register files are simply more units on
the buses. Parallelism comes from moving on several buses in the same cycle. Specialisation comes
from choosing which function units sit on the buses.

The default configuration is the largest one of its family, **TTA-P5**:

| resource | count | notes |
|---|---|---|
| transport buses | 4 | fully connected: every unit has sockets on every bus |
| LSU (load/store) | 2 | 8/16/32-bit loads and stores, one data-memory port each |
| ART (arithmetic) | 4 | ADD, SUB, EQ, GT |
| LOG (logic) | 1 | AND, IOR, XOR |
| SHF (shift) | 2 | SHL, SHR (arithmetic), SHRU (logical) |
| ADD | 2 | addition only |
| MUL | 1 | 32 × 32 → low 32 bits, pipelined |
| DIV-MOD | 1 | DIV, DIVU, MOD, MODU |
| RF | 2 | 40 × 32-bit each, one read and one write port |
| BL | 1 | 2 × 1-bit boolean registers, used as move guards |
| GCU | 1 | program counter, JUMP, CALL, return address |
| instruction word | 176 bits | 4 move slots of 44 bits |

The smaller processors of the same family are built by overriding the unit-count parameters of
`tta_top`. The smallest, TTA-P1, has one bus and one each of LSU, ART, LOG and SHF, one RF and BL.
The sizes of the family are listed under "Configurations" below.

## The move slot

The instruction format is the part to understand first. Everything else follows from it.
Slot *b* of an instruction (bits `44*b+43 : 44*b`, bus 0 lowest) is a `tta_pkg::slot_t`:

```
 43    41 40                              16 15          11 10                    0
+--------+----------------------------------+--------------+-----------------------+
| guard  | source                           | dest unit    | dest sub-address      |
+--------+----------------------------------+--------------+-----------------------+
```

* **guard** (3 bits): `0` always, `1` if BL0, `2` if !BL0, `3` if BL1, `4` if !BL1,
  `7` never (an empty slot). A move whose guard fails is cancelled ("squashed").
* **source** (25 bits): if bit 24 is set, bits 23:0 are an immediate, sign-extended to 32 bits.
  Otherwise bits 10:6 name a unit and bits 5:0 an index. The index is the register number for an
  RF, the bit number for BL, and 0 for the others. Reading a function unit gives its result
  register. Reading the GCU gives its return address.
* **destination** (16 bits): bits 15:11 name a unit, where unit 0 means "no move". For a function
  unit, bit 4 selects the trigger port (1) or the operand port (0), and bits 3:0 carry the opcode
  when triggering. For RF and BL, bits 5:0 are the register written.

Unit ids are fixed, whatever the configuration: LSU 1–2, ART 3–6, LOG 7, SHF 8–9, ADD 10–11,
MUL 12, DIV-MOD 13, RF 14–15, BL 16, GCU 17. In a smaller configuration the missing units read
as 0 and ignore writes. `tta_pkg` also holds the opcode enums and small helper functions (`mv`,
`src_imm`, `src_unit`, `dst_operand`, `dst_trigger`, `dst_reg`) that build slots. The testbench
uses them as an assembler.

## Timing and programming rules

The processor has **no interlocks and no hazard detection**: the schedule is static, as it is on
any TTA, and the program (a compiler, or a hand-written schedule) has to respect the latencies
itself.

| event | when the value is visible |
|---|---|
| move into an RF or BL register | from the next instruction (a guard sees a new BL value one instruction later) |
| ART / LOG / SHF / ADD trigger | result register valid in the next instruction |
| LSU load trigger | result valid 2 instructions later; a store takes effect at the end of its instruction |
| MUL trigger | result valid 3 instructions later (`MUL_LATENCY`); a new multiply may start every cycle |
| DIV-MOD trigger | result valid 33 instructions later; not pipelined, a new trigger restarts it |
| JUMP / CALL trigger at address *a* | *a*+1 (the delay slot) still executes, then the target; CALL sets RA = *a*+2 |

Some further rules:

* **Operand before or with the trigger.** A value moved to a unit's operand port in the same
  instruction as its trigger is used by that operation. The operand register keeps its value, so
  a constant operand needs to be moved only once.
* **Order of non-commutative operations.** The trigger value is the first operand: SUB is
  trigger − operand, GT is trigger > operand (signed), SHx shifts the trigger value by the low five
  bits of the operand, and DIV-MOD divides the trigger value by the operand. LSU addresses go to
  the trigger port, store data to the operand port.
* **One port, one writer.** In one instruction two executed moves must not write the same port.
  Each register file has one write port and one read port, so all moves of an instruction that
  read one RF must read the same register. Assertions in `tta_interconnect` report a violation.
  The highest-numbered bus wins.
* **Return.** Move the GCU (RA) into the GCU's JUMP trigger. A move to the GCU's operand port
  writes RA, so nested calls can save and restore it.
* **Halting.** There is no halt instruction. A program ends in a jump to itself.
* **Results persist.** A result register keeps its value until the unit's next result arrives.
  Programs use this to read one result several times, and to pass values from unit to unit.

After reset the GCU fetches address 0. The first cycle executes nothing.

## Unit details

* **LSU** (`tta_lsu`): LDW, LDH, LDHU, LDQ, LDQU, STW, STH, STQ, where H is 16 and Q is 8 bits.
  Memory is little-endian. Halfword and word accesses should be naturally aligned: address bits
  below the access size are ignored.
* **DIV-MOD** (`tta_divmod`): radix-2 restoring division, one quotient bit per cycle. Signed
  operations follow C: the quotient rounds toward zero and the remainder takes the dividend's sign.
  Dividing by zero gives all ones as quotient and the dividend as remainder. `busy_o` is high
  during the 32 iteration cycles.
* **MUL** (`tta_mul`): a `LATENCY`-deep pipeline. It returns the low word of the product, which is
  the same for signed and unsigned operands.
* **RF / BL** (`tta_rf`, `tta_bool_rf`): reset to zero. The RF read is combinational from the
  index in the source field. A BL write stores bit 0 of the value moved into it.
* **GCU** (`tta_gcu`): holds the fetch address. The instruction memory answers one cycle after it
  gets an address, which is where the single delay slot comes from.

## Memories and the outside world

`tta_imem` is DEPTH × 176-bit memory with a synchronous read port for fetch and a write port for
loading (`imem_*` on the top). `tta_dmem` is a 4096 × 32-bit (16 KiB) true dual-port memory with
byte enables and synchronous reads, one port per LSU. Neither memory is reset.

The top has a simple host port (`host_*`) onto data-memory port 0. When `host_req_i` is high it
takes precedence over LSU 0. Read data appears on `host_rdata_o` one cycle after the request. The
intended use: hold `rst_n` low, load the program and the input data, release reset, wait for the
program's final self-jump (`fetch_addr_o`), assert reset again and read the results.

## Configurations

The unit counts are parameters of `tta_top`. They are bounded by the TTA-P5 counts, since the
unit id map is fixed:

| processor | `N_BUS` | `N_LSU` | `N_ART` | `N_LOG` | `N_SHF` | `N_ADD` | `N_MUL` | `N_DIV` | `N_RF` | word |
|---|---|---|---|---|---|---|---|---|---|---|
| TTA-P1 | 1 | 1 | 1 | 1 | 1 | 0 | 0 | 0 | 1 | 44 |
| TTA-P2 | 2 | 1 | 2 | 1 | 1 | 0 | 0 | 0 | 1 | 88 |
| TTA-P3 | 4 | 2 | 2 | 1 | 1 | 0 | 0 | 0 | 2 | 176 |
| TTA-P4 | 4 | 2 | 4 | 1 | 2 | 2 | 1 | 0 | 2 | 176 |
| TTA-P5 (default) | 4 | 2 | 4 | 1 | 2 | 2 | 1 | 1 | 2 | 176 |

The unit counts of this family are specified as a table. A block drawing of TTA-P4/P5 shows only
two ART and one SHF, but the table gives four ART and two SHF, and this RTL follows the table.
The family's instruction words are specified as 43, 86, 176, 176 and 176 bits. The 44-bit slot
used here reproduces the four-bus width exactly, and is one bit per bus wider for the one- and
two-bus processors.

## What is specified and what is chosen here

The design follows its source in: the TTA organisation (buses, sockets, trigger ports, register
files as bus units, direct unit-to-unit transport), the unit counts per configuration, the
operation lists of ART, LOG, SHF, ADD, MUL, DIV-MOD, LSU and GCU, the 40 × 32 and 2 × 1 register
file sizes, and the 176-bit instruction word of the four-bus processors.

These are this design's own choices, since the source gives only what the units do:

* the move-slot encoding, unit ids and opcode numbers;
* every latency, the single delay slot, and the absence of interlocks;
* guards on the boolean registers;
* the 24-bit in-slot immediates. The source's general TTA picture has a separate immediate unit,
  but none of the processors of this family has one;
* the division algorithm and its C semantics;
* little-endian byte order;
* memory sizes (1024 instructions, 16 KiB data) and the program-load and host ports;
* asynchronous active-low reset of all unit state.

The original processors were generated by a TTA design toolset. This RTL is an independent
implementation of the same architecture and is not binary-compatible with that toolset's programs.

Not included: the RISC-V cores the design was compared against, the compiler toolchain, and any
instruction compression.

## Files

* `rtl/tta_pkg.sv`: slot type, unit ids, opcodes, slot-building helpers
* `rtl/tta_top.sv`: the processor
* `rtl/tta_interconnect.sv`: buses, guards, source multiplexers, destination sockets
* `rtl/tta_gcu.sv`, `rtl/tta_imem.sv`, `rtl/tta_dmem.sv`: control and memories
* `rtl/tta_art.sv`, `tta_log.sv`, `tta_shf.sv`, `tta_add.sv`, `tta_mul.sv`, `tta_divmod.sv`,
  `tta_lsu.sv`: function units
* `rtl/tta_rf.sv`, `rtl/tta_bool_rf.sv`: register files
* `tb/tb_<module>.sv`: one self-checking testbench per module
* `tb/tb_tta_configs.sv`, `tb/tta_cfg_run.sv`: one program run on all five configurations
* `tb/tb_tta_ntru_dec.sv`: NTRU decryption on the default processor

## Simulating

Every testbench checks its own results and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Any one of them runs with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tta_pkg.sv tb/tb_tta_top.sv --top-module tb_tta_top -o sim
./obj_dir/sim
```

`tb_tta_top` runs the whole processor at its default size. It assembles a hand-scheduled program
that performs NTRU encryption, e = r·h + m (mod q), with N = 11 and q = 2048. Here h has
coefficients in [0, q) and r, m are ternary. The program uses nested loops, a called reduction
subroutine on the DIV-MOD unit, guarded correction of negative remainders, and halfword stores;
a checksum loop and a short tail follow. The testbench compares every coefficient with a model and
checks that the run takes exactly the 2124 cycles of the static schedule. It also checks that
each mechanism actually occurred: jumps, calls and returns, guard-squashed and guard-enabled
moves, operand/trigger pairs in one instruction, unit-to-unit moves, four-bus instructions, both
LSUs in one cycle, every load and store width, MUL and DIV-MOD. The unit testbenches compare each
unit with an independent reference model on random and corner-case inputs, and check the
latencies listed above.

`tb_tta_configs` builds the processor five times side by side, once per configuration from
TTA-P1 to TTA-P5 (through the harness `tta_cfg_run`). It runs the same encryption on each with a
program written for the one-bus TTA-P1. That program uses one move per instruction, and the extra
slots of wider machines stay empty. It has no multiplier to use: because r is ternary, each product
term becomes two EQ compares into the boolean registers, then a guarded ADD and a guarded SUB on one
ART, one of which is squashed. The reduction mod 2048 is an AND with 2047 on the LOG unit. The
program has 65 instructions and takes 4853 cycles in every configuration.

`tb_tta_ntru_dec` runs the other half of NTRU on the default processor. The testbench generates a
key pair: a ternary f and its inverses modulo 3 and 2048, the latter by Newton iteration. It then
encrypts a random ternary message. The processor decrypts it with one convolution subroutine that
is called twice, first for a = f·e and then for Fp·a. The lifting of a into (−q/2, q/2] uses an
AND and a guarded subtraction. The reduction modulo 3 runs on DIV-MOD, and two guarded moves
correct its sign. The testbench checks that the processor recovers the message exactly. The
program has 331 instruction words and runs in 5265 cycles. Key generation itself (polynomial
inversion) runs only in the testbench.

To write a new program, follow `assemble()` in `tb/tb_tta_top.sv`. Each `I(...)` call emits one
instruction of up to four moves, built with the helpers from `tta_pkg`.
