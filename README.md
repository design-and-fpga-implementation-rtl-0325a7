# A programmable SHA-1 / SHA-256 hash processor

This is a small 32-bit accumulator processor. A few of its instructions are
hash specific. One instruction computes a whole SHA-1 round and another a
whole SHA-256 round. Two more move the chaining variables between a register
file and the round logic. A hash is therefore not hard-wired. A program of
about a dozen instructions walks through the 80 SHA-1 rounds or the 64
SHA-256 rounds of one 512-bit message block. The same hardware serves both
algorithms. Programs and message blocks arrive over an RS-232 serial link.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It has been checked
against the FIPS 180-2 test vectors.

## Block structure

```
             rxd/txd
               |
        +--------------+   48-word buffer  +--------------+  ctrl bundle  +---------------------------+
        |uart_interface|------------------>| control_unit |-------------->| datapath                  |
        | baud_gen, rx,|<--- OUT bytes ----|  (FSM, A, PC,|  acc, mem     |  message_expansion (80x32)|
        | tx, buffer   |                   |   IR)        |-------------->|  constants_rom (80x64)    |
        +--------------+                   +--------------+               |  register_file (16x32)    |
                                             |        ^                   |  alu (SHA-1/256 round,    |
                                             v        |                   |       add/sub/and/or)     |
                                           +------------+                 +---------------------------+
                                           |program_mem.|
                                           |  32 x 32   |
                                           +------------+
```

| file | role |
|---|---|
| `rtl/hp_pkg.sv` | opcodes, ALU select codes, control bundle struct, register map, initial hash values, round constants, SHA functions |
| `rtl/hash_processor.sv` | top level |
| `rtl/control_unit.sv` | loader and instruction FSM, accumulator `A`, program counter, instruction register |
| `rtl/program_memory.sv` | 32 x 32 RAM: program and data words |
| `rtl/datapath.sv` | wires the four datapath units together |
| `rtl/message_expansion.sv` | 80 x 32 message RAM and the SHA-1 / SHA-256 message schedule |
| `rtl/constants_rom.sv` | round constants: SHA-1 in the upper 32 bits, SHA-256 in the lower 32 bits |
| `rtl/register_file.sv` | 16 x 32 registers with 8 write ports and 8 registered read ports |
| `rtl/alu.sv` | one SHA-1 round, one SHA-256 round, add, sub, and, or |
| `rtl/uart_interface.sv` | baud generator, receiver, transmitter and serial receive buffer |
| `rtl/uart_baud_gen.sv`, `uart_rx.sv`, `uart_tx.sv` | 8N1 serial link with 16x oversampling |

## Programming model

Instruction words are 32 bits wide. Only the low nine bits are decoded:

```
 31          9 8      5 4       0
+-------------+--------+---------+
|   ignored   | opcode | address |
+-------------+--------+---------+
```

| opcode | mnemonic | effect |
|---|---|---|
| 0000 | LDA a | A <= M[a] |
| 1000 | STA a | M[a] <= A |
| 0010 | ADD a | A <= A + M[a] |
| 0011 | SUB a | A <= A - M[a] |
| 1001 | AND a | A <= A & M[a] |
| 0100 | INPUT | A <= `in_data` pin |
| 0101 | OUT | send A over the UART, most significant byte first |
| 0110 | JMPP a | if A is nonzero and bit 31 is clear: PC <= a |
| 1111 | JMPZ a | if A == 0: PC <= a |
| 0111 | HALT | stop until reset |
| 1100 | RRGF1 | read the SHA-1 chaining variables (registers 0-4) into the ALU operands |
| 0001 | SHA1 | compute one SHA-1 round, round number t = A[6:0] |
| 1011 | SRGF1 | write the round result back to registers 0-4 |
| 1110 | RRGF2 | read the SHA-256 chaining variables (registers 5-12) |
| 1010 | SHA2 | compute one SHA-256 round, t = A[6:0] |
| 1101 | SRGF2 | write the round result back to registers 5-12 |

**The round number is the accumulator.** The SHA instructions take no
operand. The controller gives the datapath `A[6:0]` as the round number `t`,
all the time. That number selects `K_t` in the constants ROM and `W_t` in the
message RAM. A program must therefore load its round counter into `A`
before RRGF/SHA. The usual SHA-1 loop does so:

```
00  LDA 1E      ; loop: A = t
01  RRGF1
02  SHA1
03  SRGF1
04  LDA 1E
05  ADD 1D      ; t + 1
06  STA 1E
07  LDA 1F      ; 80
08  SUB 1E
09  JMPZ 0B
0A  JMPP 00
0B  HALT
1D  1           ; data words
1E  0
1F  80          ; 64 for SHA-256, with RRGF2/SHA2/SRGF2
```

## Timing

Every instruction goes through `S_START` (memory address <= PC), `S_FETCH`
(IR <= M[PC], PC++) and `S_DECODE` (memory address <= IR[4:0]), then one
execute state. That makes four clock cycles per instruction. STA takes five,
because the write enable is raised in one state and lowered in the next.

Inside one round, the pieces line up like this:

- **RRGF.** The register file's read ports capture the chaining variables.
- **SHA.** The ALU is enabled for one cycle. During decode the opcode already
  drives the select lines, so `K_t` (a registered ROM read) and `W_t` are
  ready by the execute cycle. The ALU registers the eight new variables. In
  the same cycle the message RAM stores the `W_t` it just used at index `t`.
  The schedule taps then see expanded words in later rounds:
  - SHA-1: `t-3, t-8, t-14, t-16`.
  - SHA-256: `t-2, t-7, t-15, t-16`.
  For `t < 16` the RAM returns the message word itself.
- **SRGF.** All eight write ports store the ALU outputs at once.

The loop above takes 45 cycles per round. From the first fetch to HALT:

- SHA-1: 79 x 45 + 41 + 3 = 3599 cycles.
- SHA-256: 63 x 45 + 41 + 3 = 2879 cycles.

The testbenches check both numbers exactly.

## Loading a job

After reset the controller waits until the UART buffer holds 48 words
(1536 bits). The host sends these words:

1. words 0..31: the program memory image (instructions and data words);
2. words 32..47: the 16 words of one padded 512-bit message block, W_0 first.

Each word goes least significant byte first. Bytes are 8N1 at the rate picked
by `baud_sel`:

| `baud_sel` | baud |
|---|---|
| 0110 | 38400 |
| 0101 | 19200 |
| 0100 | 9600 |
| 0011 | 4800 |
| 0010 | 2400 |
| 0001 | 1200 |

Other codes stop the link. The controller moves one word per three cycles
into program memory. It then moves one word per two cycles into message RAM
entries 0..15, and starts executing at address 0. Padding the message is the
host's job.

## Register file map and result

| registers | contents after reset |
|---|---|
| 0-4 | SHA-1 H(0): 67452301 EFCDAB89 98BADCFE 10325476 C3D2E1F0 |
| 5-12 | SHA-256 H(0): 6A09E667 ... 5BE0CD19 |
| 13-15 | spare; SRGF1 sends its three unused write ports here |

When the last round has run, the `chain` output shows the working variables
`a..e` (SHA-1) or `a..h` (SHA-256). The processor does not add the initial
hash value back. The digest word is `H_i(0) + chain[i]`. For "abc" with
SHA-1, `chain[0] = 42541B35` and the digest starts `A9993E36`. For SHA-256,
`chain[0] = 506E3058` and the digest starts `BA7816BF`. A job therefore covers one
block only. Messages longer than one block are not supported, because reset
always restarts the registers from the standard initial values.

## Where this design departs from, or fills in, its source description

- **Round number.** The source names a 7-bit round signal from the
  controller but does not say where it comes from. Here it is `A[6:0]`.
- **Message loading.** The source loads the 32 program words from the serial
  buffer but does not say how the 16 message words reach the message RAM.
  Here they follow the program in the same serial load.
- **No final addition.** The initial hash value is not added back. The
  source does that addition by hand, too.
- **Throughput.** The source claims 1.37 Mbit/s at 12.5 MHz. With the timing
  above, one 512-bit block at 12.5 MHz gives 1.78 Mbit/s for SHA-1 and
  2.22 Mbit/s for SHA-256. Both figures leave out the serial load time. The
  source also calls its instructions two-cycle instructions, while its own
  state list gives four; the state list is followed.
- **Jump target.** The source's loop listing jumps to address 09 for HALT.
  In that listing HALT sits at 0B, which is used here.
- **Program counter.** It is 5 bits wide. The source says 32, but only five
  bits address the memory.
- **INPUT and OUT.** These opcodes are only named in the source. Their
  behaviour here (load from a pin, send A over the UART) is this design's
  own.
- **ADD/SUB/AND.** The controller does these on its own accumulator. The ALU
  repeats them on the same operands so the result shows on `alu_out`.
- **SHA-256 initial values and schedule.** These follow FIPS 180-2: H0 is
  6A09E667 and sigma0 is taken of W[t-15].
- **Reset.** All blocks use a synchronous, active-high reset.
- **UART.** The baud generator uses 16x oversampling. The receiver checks
  the start bit at mid-bit and flags a low stop bit on `rx_frame_err`. Two assertions in `uart_interface`
  state the handshake with the controller: the buffer is taken only when
  full, and a byte is handed over only while the transmitter is idle.

Not built:

- the host program that pads messages and sends jobs (a behavioural host
  inside the top-level testbenches does this);
- the FPGA board.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/sha_ref_pkg.sv` is an independent
SHA-1/SHA-256 model. It derives the constants from square and cube roots of
primes rather than copying the RTL tables. The testbenches compare against
it.

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb \
    rtl/hp_pkg.sv tb/sha_ref_pkg.sv $(ls rtl/*.sv | grep -v hp_pkg) \
    tb/tb_hash_processor.sv --top-module tb_hash_processor
./obj_dir/Vtb_hash_processor
```

The packages come first. `--timescale` supplies a time unit to the RTL files,
which declare none. Unit testbenches that use only the package need
`rtl/hp_pkg.sv` plus their module.

- `tb_hash_processor` runs at a reduced clock frequency, so that a serial bit
  lasts only 4 x 16 clocks. It runs three jobs:
  - SHA-1 "abc", with INPUT, AND and OUT as well;
  - SHA-256 "abc" at 19200 baud;
  - SHA-1 "tugba" (chain[0] = B3AF9A0B, digest word 1AF4BD0C).
  It counts every state of the controller and checks the cycle counts.
- `tb_hash_processor_full` uses the default parameters: a 100 MHz clock at
  38400 baud. It runs one complete SHA-1 job and one complete SHA-256 job,
  both on "abc", and checks results and cycle counts. It takes a few seconds.

## Size

Generic synthesis of the top level gives about 390 cells, 3.5 k flip-flop
bits and 9 k memory bits. Most of the flip-flop bits come from two places:

- the 1536-bit receive buffer;
- the controller's copy of that buffer, which is shifted 32 bits per word
  during the fill.
