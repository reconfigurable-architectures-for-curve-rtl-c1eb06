# GF(2^83) co-processor for hyperelliptic curve cryptography on 8-bit micro-controllers

Public-key cryptography on a small 8-bit micro-controller (an 8051 or an AVR) is
dominated by one thing: multiplications in a large binary field, thousands of them per
scalar multiplication. Genus-2 hyperelliptic curves (HECC) need only an 83-bit field
for roughly the security of a 160-bit elliptic curve, so the operands are short enough
for a small co-processor. What then limits speed is less the arithmetic than the
traffic over the 8-bit port between the CPU and the co-processor. The architecture
here therefore moves the hardware/software boundary upward. The co-processor keeps
the field variables of the curve arithmetic in its own storage. Each line of the
divisor addition and doubling formulae, such as `d = a*b + c`, becomes a single
instruction. Only the scalar multiplication loop and the sequencing of those lines
stay on the CPU.

This RTL implements that co-processor: four 8-bit ports, a top controller, a
128 x 32-bit local storage, 84-bit input-word and output-word registers, and a datapath
with a GF(2^83) multiplier, a field adder and a multiply-and-add feedback path.

```
      ins_port  addr_port  din_port                     dout_port
          |         |         |                             ^
      +---v---------v---------v---+                         |
      | port_sync: port registers |                         |
      | and toggle handshake      |                         |
      +---+---------------+---+---+                         |
          | instr, addr   |   | din                         |
   +------v---------+     |   |                             |
   | top_controller |     |   |                             |
   | op regs A..D   |     |   |                             |
   +---+------------+     |   |                             |
       | RD/WR, addr      |   v                             |
       |          +-------+-----------+      +--------------+----+
       |          | input word 84 b   |      | output word 84 b  |
       |          +---^-----------+---+      +---^----------+----+
       |   result     |           | 32 b         | 32 b      | operand
       |              |      +----v--------------+---+       | (84 b)
       +--------------|----->| local_storage 128x32  |       |
                      |      +-----------------------+       |
               +------+--------------------------------------v-+
               | gf2m_datapath: operand regs A B C, result R   |
               |   gf2m_mul (digit-serial), R = A*B (+C),      |
               |   A+B or A*A                                  |
               +-----------------------------------------------+
```

## How software drives it

The CPU sees the co-processor as three output ports and one input port. It never waits
for an acknowledge. It writes the address and data ports, then the instruction port.
The co-processor picks the instruction up and carries it out. This one-way protocol
only works if the software leaves each instruction enough time. On an 8051, with its
12-clock machine cycle, that happens naturally. A `busy` output is provided for test
and debug, but the protocol does not need it.

Instruction byte (`hecc_pkg`):

| bits  | field  | meaning |
|-------|--------|---------|
| 7     | toggle | a new instruction is recognised when this bit differs from the toggle of the last accepted one |
| 6:4   | opcode | see below |
| 3:0   | sub    | operand register for SETREG, operation for EXEC |

| opcode | name     | action | busy cycles after accept |
|--------|----------|--------|--------------------------|
| 0      | NOP      | nothing | 0 |
| 1      | INSHIFT  | input word <= {input word, din} (shift left one byte) | 0 |
| 2      | WRITE    | storage variable `addr[4:0]` <= input word | 3 |
| 3      | READ     | output word <= storage variable `addr[4:0]` | 4 |
| 4      | OUTSHIFT | output word >>= 8 | 0 |
| 5      | SETREG   | operand register `sub[1:0]` (A, B, C, D) <= `addr[4:0]` | 0 |
| 6      | EXEC     | `sub[1:0]`: 0 MUL D=A*B, 1 MULADD D=A*B+C, 2 ADD D=A+B, 3 SQR D=A*A | see below |
| 7      | reserved | treated as NOP | 0 |

The toggle bit is what makes the one-way handshake work. Without it, the co-processor
could not tell a second identical instruction from the first one still standing on the
port. The same applies to a run of INSHIFTs whose data bytes happen to be equal.

**Moving a field element in.** Send 11 bytes, most significant first. Each byte is a
`din` write followed by INSHIFT. The top nibble of the first byte falls off, since the
word is 84 bits. Then issue WRITE with the variable number on the address port.

**Moving one out.** Issue READ with the variable number, then read `dout_port` and issue
OUTSHIFT, 11 times. Bytes come out least significant first, and the last one holds
bits 83..80.

**Computing.** A formula line `d = a*b + c` becomes SETREG A, SETREG B, SETREG C,
SETREG D, then EXEC MULADD. The operand registers keep their values, so consecutive
lines that reuse variables skip the SETREGs. For example, the inversion loop below
issues only EXECs.

The address and data ports are sampled when the controller accepts the instruction.
If an instruction is written while the co-processor is busy, it is held and runs when
the co-processor is free. The address and data ports must stay unchanged until then.
Do not write a second instruction before the first has been accepted. The toggle bit
would then return to its old value, and neither instruction would run.

## Local storage and the word registers

The storage is 128 words of 32 bits. That is the widest port of the FPGA block RAM the
architecture was sized for. The 7-bit address is `{variable[4:0], word[1:0]}`, so
each of the 32 variables owns four consecutive locations:

| location | contents |
|----------|----------|
| 4v + 0   | bits 31..0 |
| 4v + 1   | bits 63..32 |
| 4v + 2   | bits 83..64, zero above |
| 4v + 3   | unused |

The RAM has a synchronous read. Data come one cycle after RD, as in a block RAM, and a
read during a write of the same location returns the old word.

Nothing enters or leaves the storage except through the two 84-bit word registers.
This holds for the datapath as well as for the CPU, and it is the reason the registers
are as wide as the datapath word:

* **Loading operands.** An EXEC reads each operand's three words into the output-word
  register. In the cycle after the last word lands, it copies the whole word into
  operand register A, B or C. The reads of the next operand already run during that
  copy, so the operands stream at one storage word per clock.
* **Storing the result.** The result enters the input-word register in the cycle
  the datapath finishes. Three writes then put it into variable D.

An EXEC therefore overwrites both word registers. Software must not keep a
half-sent input word or a half-read output word across an EXEC.

## Datapath and multiplier

`gf2m_datapath` holds three 83-bit operand registers, A, B and C, each loaded whole from
the output-word register, and a result register R. Addition in GF(2^m) is XOR. The
multiply-and-add path XORs C into the product as it enters R. So `d = a*b + c`, the
most common line in the divisor formulae, costs no more than a plain product and
needs no extra transfers.

`gf2m_mul` is a most-significant-digit-first digit-serial multiplier in polynomial
basis. Each clock it performs `acc = acc * x^DIGIT + (digit of b) * a` with reduction
modulo `P(x) = x^83 + x^7 + x^4 + x^2 + 1`. With `DIGIT = 1` (the default) a product
takes 83 steps. Larger digits trade area for speed: `DIGIT = 8` gives 11 steps and is
tested. `b` is zero-extended at the top to a whole number of digits, which does not
change the product.

## Timing

With the instruction written to the port in cycle 0, the port register holds it in
cycle 1. The controller accepts it in cycle 1, and `busy` is high from cycle 2 for the
number of cycles below.

| instruction | busy cycles |
|-------------|-------------|
| WRITE       | 3 (three storage writes) |
| READ        | 4 (three reads + one cycle of read latency) |
| EXEC ADD    | 14 = 6 reads + 2 drain + 1 start + 2 + 3 writes |
| EXEC SQR    | 3*1 + ceil(83/DIGIT) + 8 = 94 |
| EXEC MUL    | 3*2 + ceil(83/DIGIT) + 8 = 97 |
| EXEC MULADD | 3*3 + ceil(83/DIGIT) + 8 = 100 |

For a multiplying EXEC the cycles add up as follows:

* 3 read cycles per operand;
* 2 cycles for the last word to land and be copied;
* 1 start cycle;
* ceil(83/DIGIT) multiplier steps, plus 2 cycles of capture and result, with the
  result entering the input word in the last of them;
* 3 write cycles.

The testbenches check these counts.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `M`       | 83 | `hecc_coproc`, `gf2m_datapath`, `gf2m_mul` | field degree |
| `DIGIT`   | 1  | same | multiplier digit size |
| `POLY_LOW`| x^7+x^4+x^2+1 | same | reduction polynomial without x^M |
| `DW`, `DEPTH` | 32, 128 | `local_storage` | storage geometry |

The storage layout (three 32-bit words per variable) limits `M` to at most 96. The
84-bit word length and the storage sizes are package constants in `hecc_pkg`.

## Files

| file | contents |
|------|----------|
| `rtl/hecc_pkg.sv` | sizes, polynomial, instruction encoding (`opcode_e`, `opreg_e`, `dpop_e`, `instr_t`) |
| `rtl/hecc_coproc.sv` | top level: the co-processor |
| `rtl/port_sync.sv` | port registers and toggle handshake |
| `rtl/top_controller.sv` | instruction sequencing, storage strobes, operand registers |
| `rtl/word_io.sv` | 84-bit input-word and output-word registers (CPU byte side, datapath word side) |
| `rtl/local_storage.sv` | 128 x 32 RAM |
| `rtl/gf2m_datapath.sv` | operand and result registers, adder, multiply-and-add |
| `rtl/gf2m_mul.sv` | digit-serial GF(2^m) multiplier |
| `tb/tb_gf_ref_pkg.sv` | reference GF(2^83) arithmetic (full product, then reduction) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_host_model.sv` | behavioural CPU side: paced port writes, no busy polling, inversion routine |
| `tb/tb_hecc_host_pacing.sv` | inversion with 8051-paced and AVR-paced hosts |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. A watchdog counts
a failure if a testbench hangs. For example, with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hecc_pkg.sv tb/tb_gf_ref_pkg.sv tb/tb_hecc_coproc.sv \
    --top-module tb_hecc_coproc -Mdir obj_top
./obj_top/Vtb_hecc_coproc
```

Replace the testbench name to run another. `tb_hecc_coproc` runs the top at its
default parameters and acts as the CPU, writing the ports cycle by cycle:

* It loads eight random field elements over the ports and reads them back.
* It runs 24 random MUL, MULADD, ADD and SQR lines. It reads every result back over the
  ports, compares it with the reference, and checks each EXEC's busy time.
* It writes an instruction while the co-processor is busy and checks that it is not lost.
* It runs the field inversion used for the final projective-to-affine conversion as a
  micro-code routine. This is Fermat inversion, a^(2^83-2), computed by 81
  square-and-multiply steps and a final squaring, and the testbench checks that
  `a * a^-1 = 1`.
* It counts each mechanism: queued instruction, repeated instruction via the toggle,
  each of the four operations, and bytes in both directions. It fails if any of them
  never occurred.

It also prints the co-processor usage, meaning datapath-active cycles over all cycles,
and the share of cycles with `busy` high. Because this
testbench host writes a port every clock, its usage is far higher than that of a real
8051 or AVR program.

`tb_hecc_host_pacing` runs the same inversion with two hosts that keep strictly to the
one-way protocol. Neither ever reads `busy`; each waits out the instruction times from
the table above. `tb/tb_host_model.sv` models the CPU side:

* One host is paced like an 8051, with two 12-clock machine cycles per port write.
* The other is paced like an AVR, with 2 clocks per port write.

The testbench checks four things: both inverses are correct, no instruction was
written while the co-processor was busy, the datapath work is identical, and the
datapath usage is lower for the slower host. At the default parameters the usage is
about 53 % for the slow host against 82 % for the fast one. Clocks spent on port
traffic, not on arithmetic, set the pace.

The unit testbenches check the following:

* `tb_gf2m_mul`: DIGIT 1 and 8 against the reference, plus latency.
* `tb_gf2m_datapath`: all four operations, with garbage above bit 83, plus latency.
* `tb_local_storage`: all locations, read latency, read during write.
* `tb_word_io`: byte order, zero padding of the output word, and the whole-word paths.
* `tb_port_sync`: toggle detection and the hold-until-accept behaviour.
* `tb_top_controller`: the exact strobe sequence of every instruction against the
  storage layout.

## What follows the original architecture and what is this design's own

Taken from the architecture:

* the field GF(2^83);
* four 8-bit ports (instruction, address, data in, data out) with a one-way handshake;
* the 84-bit input-word and output-word registers as the only path into and out of
  the storage;
* local storage of 128 x 32 bits with a 7-bit address and RD/WR strobes, four
  locations per variable, 32 variables;
* a datapath with field multiplier, adder and multiply-and-add feedback;
* one instruction per line of the divisor formulae, with the scalar multiplication in
  software.

This design's own choices, where the architecture does not specify:

* **The reduction polynomial.** `x^83 + x^7 + x^4 + x^2 + 1` is irreducible. No
  trinomial of degree 83 is.
* **The multiplier.** It is bit-serial by default.
* **The instruction encoding.** This includes the toggle bit and the four operand
  address registers. One 8-bit address port cannot name four operands at once, so
  each formula line costs up to four SETREGs plus its EXEC.
* **Byte order.** Bytes go in most significant first and come out least significant
  first.
* **Storage layout.** The word order within a variable is this design's choice, and the
  unused fourth location of each variable is never accessed.
* **Storage timing.** The RAM has a synchronous read.
* **Datapath transfers.** Operands and results are moved as whole 84-bit words between
  the word registers and the datapath.
* **Reset.** Reset is asynchronous and active low, and clears every register except the
  storage.
* **The `busy` output.**
* **A single clock** for the ports and the co-processor.

Not included:

* The two lighter partitions of the same study. One is a multiplier-only accelerator.
  The other is a multiplier with multiply-and-add, where the CPU still moves every
  operand. Their operations are the MUL and MULADD instructions here, but no separate
  co-processors are provided for them.
* The 163-bit elliptic-curve co-processor that served as a comparison. An 83-bit
  datapath cannot hold 163-bit operands.
* The host CPU and its software: the scalar multiplication and the divisor
  doubling, addition and subtraction routines. Their formulae are not reproduced here.

## How far to trust it

The field arithmetic is checked against an independent reference model on hundreds of
random products. The complete port-level flow is checked end to end at the default
parameters, including an 83-bit inversion of about 160 chained operations. The
curve-level routines have not been run, because their formulae are not part of this
RTL. All RTL lints cleanly with Verilator (`-Wall`: only unused-bit warnings remain)
and elaborates with Yosys/slang. Synthesis of the top gives about 830 flip-flops and
a 4 Kbit memory.
