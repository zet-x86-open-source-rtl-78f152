# Zet: a microcoded 8086 core and its Wishbone SoC

Zet runs the 16-bit x86 instruction set the way the original 8086 did: with microcode.
It does not decode an instruction into control signals directly. It turns the opcode and
modrm bytes into an address, and from there it plays back a short list of 49-bit
microinstructions. Each microinstruction drives a simple datapath: a register file, an
operand multiplexer and an ALU. The processor is the only Wishbone master of a small
SoC (`kotku`). That SoC reaches RAM, flash, a UART, a PS/2 keyboard, VGA, an SD card and
the board's switches and LEDs through a Wishbone switch.

This RTL follows the published description of Zet version 1.1: its block structure, its
fetch state machine, the three-level decode (opcode lookup, sequencer ROM, microcode ROM),
the exact 49-bit microinstruction format, and the microcode of `INTO`. Where that
description stops, this design makes its own choices. They are marked as such below and
in each file's header. The core runs a **subset** of the 8086 instruction set (listed
under *Instruction subset*). The peripherals other than switches/LEDs are not included:
their Wishbone ports are brought out of the top. The VGA, RAM and SD card ports pass
through asynchronous Wishbone bridges into their own 25 MHz and 100 MHz clock domains.

## How an instruction flows

```
            +-----------+   opcode,modrm   +--------+  first (10b)  +---------------+
  bytes --> | fetch FSM | ---------------> | decode | ------------> | micro_seq     |
  (8 bit)   | 5 states  | <--- format ---- |        |               | seq ROM  1024 |
            +-----------+                  +--------+               | ucode ROM 512 |
                  | addr (mux input 0)                               +-------+-------+
                  v                                                          | 49-bit
            +-----------+  addr (mux input 1), data   +----------------------v------+
  Wishbone <| wb master |<----------------------------| exec: regs, B/imm mux, ALU |
            +-----------+                             +----------------------------+
```

1. **Fetch** (`zet_fetch`) reads the instruction one byte per bus transaction from
   CS:IP. Its five states follow the 8086 instruction layout: `0` opcode or prefix,
   `1` modrm, `2` offset (displacement), `3` immediate, `4` execute. After every byte the
   decoder looks at what has been read and picks the next state. A prefix loops in state 0.
   A state whose field the instruction lacks is skipped. When the last byte arrives, IP is
   set to the address of the next instruction, and the collected fields (`insn_t`) go to
   execute.
2. **Decode** (`zet_decode`) is plain logic, not a ROM. It maps opcode and modrm to the
   instruction's format and to a 10-bit *first* address in the sequencer ROM.
3. **Sequencer** (`zet_micro_seq`) steps through the sequencer ROM from *first*, one entry
   per microinstruction, until an entry whose `last` bit is 1. Each entry holds only a
   9-bit address into the 512 x 49 microcode ROM. Instructions can therefore share
   microinstructions: `PUSH` reuses `INTO`'s "SP = SP - 2" word.
4. **Exec** (`zet_exec`) carries out one microinstruction per step. It may also read or
   write memory or IO through the same bus master. The bus is free for this because fetch
   is idle while an instruction executes.

Fetch and execute never overlap. The 2-input address multiplexer in front of the bus
master therefore switches on the fetch state alone: input 0 (fetch) outside state 4,
input 1 (exec) inside it.

## The microinstruction

All 49 bits are defined by `zet_pkg::uinstr_t`. Field positions are those of the Zet
microcode format:

| bits  | field    | meaning |
|-------|----------|---------|
| 1:0   | addr_s   | segment register read (0 ES, 1 CS, 2 SS, 3 DS) |
| 5:2   | addr_a   | register read on port A |
| 9:6   | addr_b   | register read on port B |
| 13:10 | addr_c   | register read on port C (store data) |
| 17:14 | addr_d   | register written from the D bus |
| 18    | wrfl     | write the flags |
| 19    | wr_mem   | the memory step is a write |
| 20    | wr       | write register D |
| 21    | wr_cnd   | write register D only if the ALU condition holds |
| 22    | high     | also write ALU bits 31:16 to DX |
| 25:23 | t        | ALU type |
| 28:26 | func     | function within the type |
| 29    | byteop   | 8-bit operation |
| 31:30 | memalu   | bit 1: this step accesses the bus; `10`: D bus = bus data, else ALU |
| 32    | m_io     | IO space instead of memory |
| 33    | b_imm    | ALU B input = immediate instead of register B |
| 34/35 | a_byte/c_byte | A / C name an 8-bit register (AL..BH) |
| 36    | var_s    | segment from the instruction (override prefix, else DS, or SS for BP) |
| 38:37 … 44:43 | var_a … var_d | 0 microcode, 1 opcode bits 2:0, 2 modrm reg, 3 modrm r/m |
| 45    | var_off  | add the instruction's displacement |
| 48:46 | var_imm  | immediate: 0 → 0, 1 → 2, 2 → 4, 3 → instruction immediate, 4 → 1 |

The `var_*` fields make one microinstruction serve many instructions. For example,
`var_c = 1` stores "the register named in the opcode", which is how a single `PUSH` word
covers `PUSH AX` … `PUSH DI`. With `var_a = var_b = 3` the A and B ports read the base
and index registers of the 8086 effective address (BX/BP/SI/DI, or the zero register),
so `A + B + displacement` is the effective address for every addressing mode. In
register form (mod = 11) A reads the register that r/m names and B reads zero, which lets
`MOV r16,r/m16` pass that register through the ALU.

**Which parts are this design's reading.** The published format does not say what the
`var_*` codes mean. The codes above are fixed by what the `INTO` microcode needs, then
extended consistently. `var_imm` 1 and 2 must be the constants 2 and 4: with that reading,
"SP-2", "SP-4", "4→tmp", "tmp*4 = 4 rol 2", "CS = [tmp|2]" and "IP = [tmp|0]" all come out
right. The ALU codes come from the same source. The published microcode uses `t=1 func=5`
for a subtraction and `t=1 func=1` for an OR, which are the 8086's own group-1 codes. It
uses `t=5 func=0` for a rotate-left, the group-2 code. So the ALU uses those tables
throughout:

| t | unit | func |
|---|------|------|
| 0 | move | 0: B, 1: A |
| 1 | arithmetic/logic | 0 add, 1 or, 2 adc, 3 sbb, 4 and, 5 sub, 6 xor, 7 cmp (8086 flags) |
| 2 | condition | 0 ZF, 1 CF, 2 SF, 3 PF, 4 CF\|ZF, 5 SF^OF, 6 ZF\|(SF^OF), 7 OF; result A+B |
| 5 | shift/rotate | 0 rol, 1 ror, 2 rcl, 3 rcr, 4 shl, 5 shr, 6 shl, 7 sar; count = B |
| 7 | other | 0: S·16 + (A+B+disp), 1: the same +2, 5: flags → D, 6: clear IF and TF |

Every bus step takes its address from the ALU output. Stack and operand stores use
type 7, which adds the segment and yields a 20-bit physical address. The interrupt-vector
loads use a plain 16-bit OR, which lands in segment 0, where the vector table is. Store
data is always register C.

A failing condition test (`t = 2` without `wr_cnd`) ends the instruction at once. This is
how `INTO` does nothing when OF is clear: its first step is "OF?".

### Registers

`zet_regfile` holds sixteen 16-bit registers: 0–7 AX CX DX BX SP BP SI DI, 8–11 ES CS SS
DS, 12 always reads zero, 13 the microcode temporary, 14 spare, 15 IP. The numbers for SP,
CS, tmp, IP and zero are those the `INTO` microcode uses. Ports A, B and C read
combinationally, S reads a segment register, and D writes on the clock edge. A byte
write lands in AL..BH, and `high` puts ALU bits 31:16 into DX. The flags register sits in
`zet_exec` and uses the 8086 layout; bits 15:12 and 1 read as 1.

## Worked example: INTO

With OF set, the twelve sequencer entries at `first = 1` run microcode words 0–11:

```
 0  OF?               (ends here if OF = 0)
 1  SP  = SP - 2      5  SP  = SP - 4            8  tmp = 4
 2  tmp = flags       6  [SS:SP]   = IP          9  tmp = tmp rol 2      (= 0x10)
 3  [SS:SP] = tmp     7  [SS:SP+2] = CS         10  CS  = [tmp | 2]      (0x12)
 4  IF = TF = 0                                 11  IP  = [tmp | 0]      (0x10)
```

When the microcode runs, IP already holds the address of the following instruction, so
step 6 pushes the correct return address.

## Instruction subset

The decoder recognises:

- the prefixes `26 2E 36 3E` (segment override) and `F0` (LOCK);
- `CE` INTO;
- `50+r` PUSH r16 and `58+r` POP r16;
- `B8+r` MOV r16,imm16;
- `C7 /0` MOV r/m16,imm16, in register form and with every memory addressing mode;
- `89`/`8B` MOV r/m16,r16 and MOV r16,r/m16, in both forms;
- `05 0D 15 1D 25 2D 35 3D`: ADD/OR/ADC/SBB/AND/SUB/XOR/CMP AX,imm16, with full flags;
- `E5`/`ED` IN AX, imm8/DX, and `E7`/`EF` OUT imm8/DX, AX;
- `EB` JMP short: a single microinstruction adds the sign-extended displacement to IP,
  which already points past the instruction.

Any other opcode runs as a one-byte no-op. The published example instructions
`lock movw $0x7432,%cs:-0x101(%bx,%di)` (`2e f0 c7 81 ff fe 32 74`) and `push %bx`
(`53`) both run. `POP SP` loads SP and then adds 2, which differs from the 8086. While a LOCK-prefixed instruction executes, the core's `lock` output is
high.

Adding an instruction takes three steps:

1. Give it a run of entries in `zet_seq_rom`.
2. Add any new microinstructions to `zet_micro_rom`, reusing existing ones where possible.
3. Map its opcode (and modrm if needed) to the run's first entry in `zet_decode`.

## Bus and timing

`zet_wb_master` runs Wishbone classic single read and write cycles. It holds `cyc`,
`stb`, `adr`, `sel`, `we` and the write data from registers until `ack`, then drops
`stb`/`cyc` for a cycle. The bus is 16 bits wide with byte selects, and the address is
20 bits (`adr[19:1]`). `tga` = 1 marks IO space. A word at an odd address becomes two
byte transactions.

With slaves that acknowledge one cycle after `stb` (one wait state), execution time is
exact:

- **3 cycles per instruction byte** fetched;
- **1 cycle** to start the sequencer;
- **1 cycle** per microinstruction, **3** per bus step, **6** for an odd-address word.

So `PUSH BX`, `POP CX`, `JMP short` and a register-to-register `MOV` each take 8 cycles,
`MOV r16,imm16` 11, `MOV [disp16],r16` 16, the locked store above 32, and `INTO` 5 (not taken) or 26 (taken). The test program averages about 12 cycles per instruction.
The original core is quoted at about 4 to 6. Most of the gap is the bytewise fetch with
an idle cycle between transactions.

## The SoC (`kotku`)

`wb_switch` decodes each transaction to one of seven slaves, numbered in this order: 0
flash, 1 UART, 2 keyboard, 3 switches/LEDs, 4 VGA, 5 RAM (the SDRAM bridge), 6 SD card.
The address map is this design's choice, modelled on a PC:

| space | range | slave |
|-------|-------|-------|
| memory | A0000–BFFFF | VGA |
| memory | everything else | RAM |
| IO | 0238–023F | flash |
| IO | 03F8–03FF | UART |
| IO | 0060–0067 | keyboard |
| IO | F100–F101 | switches (read) / LEDs (write, low byte) |
| IO | 03C0–03DF | VGA |
| IO | 0100–0101 | SD card |

An IO access to any other port is answered by the switch itself with `FFFF`, so the core
cannot hang on a missing device. `sw_leds` is the one slave inside.

Every other slave appears on the top as a port pair: a `wb_m2s_t` output and a
`wb_s2m_t` input. RAM must be attached to `fml_m2s`/`fml_s2m`, and the boot code must
sit at F000:FFF0. The original SoC also has a CSR bridge beside the RAM bridge, which
configures the SDRAM controller. It is not one of the seven slaves, so it has no port here.

The SoC has three clock inputs, as on the board:
- `clk` (12.5 MHz) runs the processor, the switch, flash, UART, keyboard and
  switches/LEDs;
- `clk_vga` (25 MHz) runs the VGA port;
- `clk_mem` (100 MHz) runs the RAM and SD card ports.

Each port in another domain goes through its own `wb_async_bridge`. The bridge carries
one transaction at a time. It captures the request, then passes a toggle through a
two-flop synchronizer to the slave side. That side runs a normal Wishbone cycle and
passes a done toggle back the same way. Address, data and read data stay in registers
while a toggle is in flight, so only the toggles are synchronized. Reset is synchronized
separately into each domain.

A bridge crossing costs a few processor cycles per access. The test program takes about
20 processor cycles per instruction at the SoC level, against 12 on a direct
one-wait-state bus. The clock generator, the SDRAM controller with its cache, and the
other peripherals are outside this RTL.

## What is not here

- Most of the 8086 instruction set. Nothing else's microcode is available to follow,
  so that includes mul/div: the `high` write path exists but nothing uses it.
- Flash, UART, PS/2, VGA (with its SRAM frame buffer), the SD card controller, the SDRAM
  path (bridge with L2 cache, CSR bridge, SDRAM controller) and the PLL.
- Hardware interrupts, the trap flag, REP prefixes and segment-register loads other than
  the one in `INTO`.
- The sequencer and microcode ROMs are read combinationally. An FPGA build would want them
  registered, which adds a cycle per step.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `zet_pkg.sv` | microinstruction struct, register and code constants, Wishbone structs |
| `zet.sv` | processor top |
| `zet_fetch.sv` | fetch state machine |
| `zet_decode.sv` | opcode lookup |
| `zet_micro_seq.sv` | sequencer |
| `zet_seq_rom.sv` | sequencer ROM |
| `zet_micro_rom.sv` | microcode ROM |
| `zet_exec.sv` | execution unit |
| `zet_regfile.sv` | register file |
| `zet_alu.sv` | ALU |
| `zet_wb_master.sv` | Wishbone master |
| `wb_switch.sv` | Wishbone switch |
| `sw_leds.sv` | switches/LEDs slave |
| `wb_async_bridge.sv` | Wishbone clock-domain bridge |
| `kotku.sv` | SoC top |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) and a few helpers:

- `tb_wb_mem.sv`: RAM model with random wait states;
- `tb_wb_stub.sv`: stand-in for the missing slaves;
- `tb_prog_pkg.sv`: the machine-code test program.

`tb_kotku` boots the whole SoC at its default parameters, with its three clocks at 12.5, 25 and
100 MHz and the RAM model behind the 100 MHz bridge, and runs that program. It
checks results in RAM and on the LEDs, and it confirms that each mechanism happened at
least once: override and LOCK prefixes, the split odd word, wait states, the switch read,
the LED write, the unmapped port, and INTO both taken and not taken. `tb_zet` runs the
same program on the bare core and checks each instruction's cycle count.

To simulate, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/zet_pkg.sv tb/tb_prog_pkg.sv tb/tb_kotku.sv --top-module tb_kotku
./obj_dir/Vtb_kotku
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.
