# An 8-bit bus processor built from reversible gates

This is a small 8-bit processor in which every datapath block is built from
reversible logic gates: Feynman, Fredkin, Toffoli, Peres and HNG gates. A
reversible gate has as many outputs as inputs, and its output pattern
determines its input pattern. In principle, such a circuit destroys no
information and so avoids the Landauer energy cost of erasing bits. In this
RTL the gates are ordinary combinational modules, and they synthesize to
ordinary logic. What the RTL keeps of reversible design is the structure: the
adder, multiplier, shifter, logic unit and decoders are netlists of reversible
gates.

The processor works at a very low level. Each instruction does one thing:
either one component puts its value on a shared data bus (ENABLE), or one
component takes in a value (LOAD). A program is therefore a list of bus
transfers. Examples are "put the data buffer on the bus", "load the
accumulator from the bus" and "load the ALU result register with ACC*TMP".

## Components on the bus

Eight components share one 10-bit data bus. Each has a 3-bit device ID:

| ID  | Component                 | Width | On LOAD it takes                           | On ENABLE it drives          |
|-----|---------------------------|-------|--------------------------------------------|------------------------------|
| 000 | Accumulator (ACC)         | 8     | bus[7:0]                                   | ACC                          |
| 001 | ALU result registers x, y | 2 x 8 | ALU result of operation `arg` (and flags)  | x if arg[0]=0, y if arg[0]=1 |
| 010 | Data bus buffer (DBB)     | 8     | `mem_din`, the data word from memory       | DBB                          |
| 011 | Program counter (PC)      | 8     | bus[7:0] (a jump)                          | PC                           |
| 100 | Instruction register (IR) | 10    | bus (overwritten by the next fetch)        | the whole 10-bit IR          |
| 101 | Status register (SR)      | 4     | bus[3:0]                                   | {carry, overflow, sign, zero} |
| 110 | Register file             | 16x8  | bus[7:0] into register `arg`               | register `arg`               |
| 111 | Temporary register (TMP)  | 8     | bus[7:0]                                   | TMP                          |

8-bit values go on the bus zero-extended. The ALU is wired directly to its
operands, A = ACC and B = TMP, so an ALU operation needs no bus transfer.
Loading the ALU result registers also loads the status register with that
operation's flags.

Every component is a *controlled buffer register* (`buffer_register`). It has
a LOAD input that captures at the clock edge and an ENABLE input that gates
its output onto the bus. A disabled output is zero instead of high-impedance,
and the bus is the OR of all outputs. The instruction decoder makes the ENABLE
lines one-hot, so at most one component drives the bus at a time.

## Instruction word and how data moves

```
  9      8       7..5       4     3..0
+------+--------+-----------+-----+-----------+
| LOAD | ENABLE | device ID | cin | argument  |
+------+--------+-----------+-----+-----------+
```

* LOAD = 1: the component named by the device ID takes its input at the end
  of the instruction.
* ENABLE = 1: the component named by the device ID drives the bus during the
  instruction.
* argument: the ALU operation when the ALU result registers load. Also the
  register number for the register file, and the byte select when the ALU
  result registers drive the bus.
* cin: carry-in for ALU addition (A+B+cin).

An instruction names only one device. Moving a value from one component to
another therefore takes two instructions: ENABLE the source, then LOAD the
destination. A **bus holder** makes this work. It remembers the last value any
component drove. When no component drives the bus, the bus shows that
remembered value. The LOAD in the second instruction sees the source's value
even though the source is no longer enabled. A single instruction with both
bits set loads a component with its own value.

A short program that multiplies two numbers from memory:

```
LOAD  DBB            ; DBB <- memory word (4)
ENABLE DBB           ; bus <- 4
LOAD  ACC            ; ACC <- 4 (from the bus holder)
LOAD  DBB            ; DBB <- memory word (3)
ENABLE DBB
LOAD  TMP            ; TMP <- 3
LOAD  ALUR, 0011     ; {y, x} <- ACC * TMP = 12, SR <- flags
ENABLE ALUR, 0       ; bus <- x = 12
LOAD  RF, 5          ; R5 <- 12
```

## Timing

Each instruction takes two clock cycles:

1. **Fetch.** `fetch` is high. The instruction register takes `imem_data`, the
   word at `imem_addr` = PC, and the PC increments. No LOAD or ENABLE strobe is
   active, and the bus shows the held value.
2. **Execute.** The instruction decoder turns the IR into one-hot LOAD and
   ENABLE strobes. The enabled component drives the bus combinationally. The
   loaded component captures at the clock edge that ends the cycle. A LOAD of
   the PC in this cycle is a jump: the next fetch uses the new address.

Instructions come in through a separate instruction port. Data comes in
through `mem_din`, which the data bus buffer takes when `mem_rd` is high. The
bus is brought out as `data_bus`, for a memory to take. The processor has no
memory of its own. Reset is synchronous and clears every register, the PC and
the bus holder.

## The ALU

`alu` takes a 4-bit select:

| sel  | op     | sel  | op          | sel  | op  | sel  | op     |
|------|--------|------|-------------|------|-----|------|--------|
| 0000 | Clear  | 0100 | A+1         | 1000 | OR  | 1100 | NOR    |
| 0001 | A+B    | 0101 | A           | 1001 | AND | 1101 | NAND   |
| 0010 | A-B    | 0110 | A<<1        | 1010 | NOT A | 1110 | XNOR |
| 0011 | A*B    | 0111 | A>>1        | 1011 | XOR | 1111 | Preset |

The result is 16 bits: `x` is the low byte and `y` the high byte. `y` is the
upper product byte for A*B, 0xFF for Preset (all 16 bits set) and zero for
every other operation. The flags are as follows:

* carry: the adder's carry-out for A+B, A-B and A+1. For A-B it is 1 when no
  borrow occurs, since A-B is computed as A + ~B + 1. It is 0 for the other
  operations.
* overflow: two's-complement overflow for the same three operations, and 0
  otherwise.
* sign: x[7]. zero: x == 0.

Four reversible sub-units compute the results. A final multiplexer, written
as ordinary logic, picks one of them:

* **`rev_adder_sub`**: a ripple adder. Each bit is a full adder made of two
  cascaded Peres gates. The first gives a^b and a&b; the second gives the sum
  and the carry. A Feynman gate per bit XORs B with the subtract control. The
  carry into bit 0 is `sub | cin`. A+1 uses the same adder with B = 0 and
  carry-in 1.
* **`rev_multiplier`**: an unsigned array multiplier. Peres gates with C = 0
  form the 64 partial-product bits. Seven rows of adders sum them. Each row has
  a Peres half adder at bit 0 and HNG full adders elsewhere.
* **`rev_shifter`**: one Fredkin gate per bit, used as a 2:1 multiplexer,
  selects the left or right neighbour. A zero is shifted in.
* **`rev_logic_unit`**: Toffoli gates give AND and NAND. A Peres gate
  followed by a Feynman gate gives OR (a^b ^ a&b). Feynman gates with a
  constant 1 give NOT, NOR and XNOR. A Feynman gate gives XOR.

## Decoders and the register file

`rev_decoder` is an N-to-2^N decoder with a chip select. It is built as a
binary tree of 2^N-1 Fredkin gates, each with its third input tied to 0. A
Fredkin gate in that form is a 1:2 demultiplexer: the control bit steers the
incoming line to one of two outputs. The chip select enters at the root.

* **`instruction_decoder`**: two 3-to-8 decoders. The LOAD bit is the chip
  select of one and the ENABLE bit of the other, and both take the device ID.
  Output bit n belongs to device ID n.
* **`register_file`**: 16 buffer registers of 8 bits with two 4-to-16
  decoders. One decoder writes, with chip select `l`; the other reads, with
  chip select `e`. One Feynman gate per address bit copies the address for the
  two decoders. A read and a write of the same register in one cycle return
  the old value.

## The gate library

| Module         | Inputs  | Outputs                                           |
|----------------|---------|---------------------------------------------------|
| `feynman_gate` | A B     | P=A, Q=A^B                                        |
| `fredkin_gate` | A B C   | P=A, Q=~A&B ^ A&C, R=~A&C ^ A&B (swap B, C if A) |
| `toffoli_gate` | A B C   | P=A, Q=B, R=A&B ^ C                               |
| `peres_gate`   | A B C   | P=A, Q=A^B, R=A&B ^ C                             |
| `hng_gate`     | A B C D | P=A, Q=B, R=A^B^C, S=(A^B)&C ^ A&B ^ D            |

Gate outputs that nothing uses are the garbage outputs of reversible logic.
They stay unconnected, and they account for most of verilator's
UNUSEDSIGNAL warnings.

## What follows the original design and what is added here

Taken from the original design: the component list and the 3-bit device IDs;
the 10-bit bus and instruction word with LOAD, ENABLE, device ID and a 4-bit
argument; the 16 ALU operations and their codes; the 16-bit ALU result;
the four status flags; a register file of 16 registers with two Fredkin
decoders and Feynman fan-out; an instruction decoder of two 3-to-8 Fredkin
decoders; and the choice of gate type for each sub-unit (Peres and Feynman in
the adder/subtractor, HNG and Peres in the multiplier, reversible multiplexers
in the shifters).

Added here, because the original leaves it open:

* the two-cycle fetch/execute sequence, the separate instruction port and the
  8-bit program counter with reset to 0;
* the bus holder that makes ENABLE-then-LOAD transfers work;
* instruction bit 4 as the ALU carry-in. The original word has one bit with no
  stated use, and its ALU has a carry input;
* the byte select (arg[0]) for reading x or y over the 8-bit data path;
* the contents of `y` for operations other than multiply, and the flag rules;
* the status register being written by every ALU-result load as well as by
  its own LOAD;
* the internal gate arrangement of every sub-unit (tree decoders, ripple
  adder, row-by-row array multiplier, shift by one with zero fill, the gates
  chosen for each logic function) and the HNG gate equations;
* zero-when-disabled outputs ORed into the bus instead of tri-state drivers;
* synchronous reset of everything.

The DBB loads from memory and the ALU result registers load from the ALU;
neither takes its input from the bus. A general rule in the original says
that a LOADed device takes the bus, but its descriptions of these two
components say otherwise, and those descriptions were followed.

The design has no branch on flags, no memory write strobe and no halt. The
original describes none of them.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`:

| Testbench                | What it checks |
|--------------------------|----------------|
| `tb_*_gate`              | full truth tables against the equations, and that each gate is a bijection |
| `tb_rev_decoder`         | every address, with chip select on and off, at N = 3 and N = 4 |
| `tb_rev_adder_sub`       | all 65536 operand pairs for A+B, A+B+1 and A-B, including carry and overflow |
| `tb_rev_multiplier`      | all 65536 products |
| `tb_rev_shifter`         | all values, both directions |
| `tb_rev_logic_unit`      | random operands for all eight codes |
| `tb_alu`                 | a=4, b=3 for ops 0000..0111 giving 0, 7, 1, 12, 5, 4, 8, 2; then random operands for all 16 ops, with flags |
| `tb_buffer_register`, `tb_program_counter` | random load/enable/increment/reset against a model |
| `tb_register_file`       | writes 0xAB to R0 and 0xAA to R1 and reads them back, then random traffic |
| `tb_instruction_decoder` | all LOAD/ENABLE/ID combinations |
| `tb_control_unit`        | the fetch/execute alternation (two cycles per instruction) and strobe decoding |
| `tb_rev_processor`       | the whole processor at its default size, against an instruction-level model |

`tb_rev_processor` runs a directed program (the multiply example above, an
add with carry-in, a read of the flags and the PC) and then 6000 random
instructions. It compares the bus, `bus_driven`, `mem_rd` and the fetch
address with an instruction-level model written separately from the RTL. It
fails if any of the following never happened: a load or an enable of each
device, any of the 16 ALU operations, a jump, a bus-holder transfer, a carry,
an overflow, or a product above 255.

To run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_proc_pkg.sv \
    tb/tb_rev_processor.sv --top-module tb_rev_processor -o sim
./obj_dir/sim
```

Use the same command with another `tb_<module>.sv` for the block-level tests.
Verilator finds the modules in `rtl/` through `-Irtl`, because each module is
in a file named after it. The package `rev_proc_pkg` holds the device IDs,
ALU codes, the flag struct and the instruction struct. It must be listed
first.

## Changing the design

* The data width of the ALU and its sub-units is the parameter `W`. The
  processor's widths (`DATA_W`, `BUS_W`, `INSTR_W`) are in `rev_proc_pkg`.
  The instruction format fixes the 3-bit device ID and the 4-bit argument, so
  a wider data path still has 8 devices and 16 registers.
* Adding an ALU operation means widening `sel`, because all 16 codes are used.
* The two-cycle sequencer is in `control_unit`. Overlapping fetch with
  execute would need the bus holder and the PC-load path to be rechecked.
