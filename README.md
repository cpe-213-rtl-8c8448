# WIMP51 with SUBB and NOP

The WIMP51 ("Weekend Instructional Microprocessor") is a deliberately small
8-bit accumulator machine for teaching computer organisation. It runs a
handful of 8051 instructions, and every instruction takes the same three
clock cycles. This RTL models the processor after an extension that adds
three instructions to the original set: `SUBB A,#D`, `SUBB A,Rn` and `NOP`.

Subtraction is added without a separate subtractor. The adder that already
serves `ADDC` is made to compute `A - B - CY` by inverting its second operand
and its carry-in. The rest of the work is in the control: a set of
write-enable signals, each decoded from the instruction register and the
current cycle. These enables decide which register may change in which cycle.
A new instruction is correct only if every enable treats it correctly.

## Instruction set

| Instruction  | Opcode     | Bytes | Effect                                   |
|--------------|------------|-------|------------------------------------------|
| `MOV A,#D`   | `74` D     | 2     | A <- D                                   |
| `ADDC A,#D`  | `34` D     | 2     | C,A <- A + D + C                         |
| `SUBB A,#D`  | `94` D     | 2     | C,A <- A - D - C (C = borrow)            |
| `MOV Rn,A`   | `11111nnn` | 1     | Rn <- A                                  |
| `MOV A,Rn`   | `11101nnn` | 1     | A <- Rn                                  |
| `ADDC A,Rn`  | `00111nnn` | 1     | C,A <- A + Rn + C                        |
| `SUBB A,Rn`  | `10011nnn` | 1     | C,A <- A - Rn - C                        |
| `ORL A,Rn`   | `01001nnn` | 1     | A <- A or Rn                             |
| `ANL A,Rn`   | `01011nnn` | 1     | A <- A and Rn                            |
| `XRL A,Rn`   | `01101nnn` | 1     | A <- A xor Rn                            |
| `SWAP A`     | `C4`       | 1     | swap the nibbles of A                    |
| `CLR C`      | `C3`       | 1     | C <- 0                                   |
| `SETB C`     | `D3`       | 1     | C <- 1                                   |
| `SJMP rel`   | `80` rel   | 2     | PC <- PC + rel (PC after the instruction)|
| `JZ rel`     | `60` rel   | 2     | same, only if A = 0                      |
| `NOP`        | `00`       | 1     | nothing                                  |

`rel` is a signed byte. `SJMP` with `rel = FE` therefore jumps to itself.
Any other opcode runs as a one-byte instruction that changes nothing. It
loads AUX, but nothing reads AUX afterwards.

## Datapath

```
              +-----------+   mem_data   +-----+        +-----+
 PC --addr--> | program   |------------->| IR  |        |     |
 ^            | memory    |------+       +-----+        |     |
 |            +-----------+      |  REG_IN             |     |
 |                               v     |               | ALU |--> ACC --+--> zero (JZ)
 |          +---------------+   +-----+-+--> AUX ------>|     |          |
 |          | register bank |-->| mux |                 |     |<---------+
 |          | R0..R7        |   +-----+           CY -->|     |--> Carry_F --> CY
 |          +---------------+                           +-----+
 |                 ^ Rn <- ACC (MOV Rn,A)
 +-- PC ALU: PC+1, or PC+AUX in Execute of SJMP / JZ
```

The program memory is read asynchronously at the PC. In the Fetch cycle the
byte read there is the opcode. In the Decode cycle it is the data or offset
byte. AUX is the ALU's second operand. It is loaded from the register bank
when `REG_IN` is high (the `Rn` forms) and from program memory otherwise.
The ALU combines ACC, AUX and the carry flag.

## The three cycles and the write enables

This is the core of the design. All registers are clocked on every edge. The
table shows which of them may load in each cycle.

| Cycle   | Always                           | Depends on the opcode                                          |
|---------|----------------------------------|----------------------------------------------------------------|
| Fetch   | IR <- mem[PC], PC <- PC+1        |                                                                |
| Decode  |                                  | `AUX_WE`: all but SETB C, CLR C, SWAP. `PC_WE`: two-byte instructions |
| Execute |                                  | `ACC_WE`, carry write enable, register write (MOV Rn,A), `PC_WE` (SJMP, JZ if A = 0) |

Each enable is a small combinational block of its own:

- `pc_we_logic` keeps the PC enabled in Decode for two-byte instructions, so
  the PC steps over the data byte. `SUBB A,#D` is one of these. In Execute
  the PC is enabled only for `SJMP`, and for `JZ` while ACC is zero.
  `two_byte_decoder` supplies the two-byte flag.
- `aux_we_logic` blocks AUX for the three instructions that have no
  operand: `SETB C`, `CLR C` and `SWAP A`.
- `reg_in_logic` selects the register bank as the AUX source. For every
  defined opcode this equals opcode bit 3, so `SUBB A,Rn` (`10011nnn`) fits
  the existing format without a change.
- `acc_we_logic` enables ACC only for instructions that change A. It is
  therefore off for the jumps, for `NOP`, and also for `MOV Rn,A`,
  `CLR C` and `SETB C`.
- `carry_we_logic` enables the carry flag for `ADDC`, `SUBB`, `CLR C` and
  `SETB C`. `carry_flag` then loads 0, 1 or the ALU's `Carry_F`.
- `regbank_we_logic` writes ACC into Rn in Execute of `MOV Rn,A`.

`NOP` needs no logic of its own. Every enable is already off for it in
Decode and Execute, except `AUX_WE`. `AUX_WE` is harmless here because
nothing reads AUX.

## Subtracting with the adder

`addsub_unit` is an 8-bit ripple-carry adder with three additions:

1. XOR gates on the B input, driven by `Subtract_Enable`. They invert B
   for SUBB.
2. A carry-in multiplexer. It feeds `CY` for ADDC and `~CY` for SUBB.
3. An inverter on the carry-out for SUBB.

With these, SUBB computes `A + ~B + ~CY = A - B - CY` (mod 256). The raw
carry-out is 1 exactly when no borrow occurred. Inverting it makes the flag
a borrow, as on the 8051. For example, `5 - 5 - 1` gives `FF` with `CY = 1`.

`subtract_enable` is a single AND gate on opcode bits 7..4 = `1001`. This
nibble belongs only to the two SUBB forms.

`l_a_sel` picks the ALU section that drives the result, using only opcode
bits 7..4:

| L1 L0 | Section      | Opcodes (bits 7..4)                   |
|-------|--------------|---------------------------------------|
| 00    | logic unit   | ORL 0100, ANL 0101, XRL 0110          |
| 01    | adder        | ADDC 0011, SUBB 1001                  |
| 10    | nibble swap  | 1100 (SWAP; CLR C shares it, but ACC is not written) |
| 11    | AUX pass     | MOV A,#D 0111, MOV A,Rn 1110, others  |

Inside the logic unit, opcode bits 5..4 choose OR (00), AND (01) or XOR (10).

## Jumps

The PC points past the offset byte by the time Execute starts, because it
stepped in both Fetch and Decode. `pc_alu` therefore forms the target as
`PC + sign_extend(AUX)`. This is the usual 8051 rule: the offset counts from
the address that follows the jump. In every other case `pc_alu` outputs
`PC + 1`. Whether the PC loads the value is up to `pc_we_logic`.

## Where this RTL makes its own choices

The original description gives the instruction set, the three-cycle
structure, the list of write enables and the add/subtract method. The
following are choices made here:

- **Sizes.** The PC is 8 bits (`PC_W`) and the program memory holds
  `2**PC_W` = 256 bytes. The register bank has 8 registers, matching the
  3-bit `nnn` field.
- **Program loading.** A synchronous write port (`load_we`, `load_addr`,
  `load_data`) on the top level loads the program while `rst` is high.
- **Reset.** Reset is synchronous and active-high. It clears PC, ACC, AUX,
  CY and R0-R7, loads IR with `NOP`, and starts in Fetch.
- **Borrow.** The borrow is formed in the single adder. The original design
  used a second adder stage for the carry of SUBB. The result and the flag
  are the same as the 8051's.
- **ACC write enable.** The original gated ACC only for the jumps and
  `NOP`, and rewrote A with itself for the other instructions. Here ACC
  simply is not written for `MOV Rn,A`, `CLR C` and `SETB C`.
- **L1/L0 code.** The code assignment in the table above is this design's.
- **Exact decodes.** Jump, register-source and write-enable decodes compare
  the full opcode pattern. The original PC ALU could treat `NOP` as a jump
  while ACC was zero, which was harmless because the PC was disabled. Here
  `NOP` is never seen as a jump.
- **Undefined opcodes** act as one-byte no-ops.

## Files

- `rtl/wimp51_pkg.sv` holds the cycle type, the L1/L0 select type, the
  opcodes and two opcode-class functions.
- `rtl/wimp51.sv` is the top level.
- Every other file in `rtl/` holds one block named above.
- `tb/tb_<block>.sv` is a self-checking testbench for each block.
  `tb/isa_ref_pkg.sv` is an instruction-level reference model written from
  the instruction table alone. `tb/tb_check.svh` holds the check macro.

## Simulation

The remaining modules are found by name in `rtl/`. Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the whole processor:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/wimp51_pkg.sv tb/isa_ref_pkg.sv tb/tb_wimp51.sv --top-module tb_wimp51
./obj_dir/Vtb_wimp51
```

`tb_wimp51` runs the processor at its default size. It has two parts:

- It runs six short check programs, one each for MOV/JZ/SJMP, the logic
  operations, CLR/SETB, ADDC, SUBB and NOP, and compares their final results
  with hand-worked values.
- It runs 30 random programs that fill all 256 bytes, with jumps aimed at
  instruction starts. After every instruction it compares A, CY, R0-R7 and
  the PC with the reference model.

The state is sampled every third clock, so a wrong cycle count also shows as
a failure. The testbench also counts how often each mechanism occurs and
fails if one never does. The mechanisms are: two-byte fetch, SUBB, borrow,
ADDC carry, JZ taken and not taken, SJMP, NOP, register write, SWAP,
CLR/SETB, logic operations and undefined opcodes.

The block testbenches sweep all 256 opcodes (decoders and enables), all
inputs (the adder: 2 x 2 x 256 x 256 cases), or random stimulus (registers
and memory).

## Changing it

To add an instruction:

1. Choose its opcode.
2. Add it to `wimp51_pkg`.
3. Go through every enable block and decide whether the instruction must
   turn that enable on in each of the three cycles. Also check `l_a_sel` and
   `two_byte_decoder`.
4. Add the instruction to `isa_ref_pkg` so the random test covers it.

`PC_W` sets the program memory size. Jump offsets remain 8-bit and are
sign-extended to `PC_W` bits.
