# A microprogrammed bit-slice processor module for packet communication

A data flow computer built from packet-switched sections needs many small processing
elements: cell blocks, block managers and specialised instruction processors. This processor
module provides one general-purpose element for all of those roles. It has the same external
connections as a 2x2 packet router: two byte-serial input ports and two byte-serial output
ports. The microcode loaded into it decides which role it plays.

The module is an 8-bit machine in the style of an AMD bit-slice design:

- two Am2903 slices form the ALU;
- an Am2904 is the status and shift controller;
- an Am2910 is the microprogram sequencer.

Around these sit the I/O ports, a byte-wide main memory with a split 16-bit address register,
and a writable 4096 x 40-bit control store. Every element is described here as synthesizable
SystemVerilog with the behaviour of the chips it replaces. The module is programmed directly in
microcode. No macro-instruction set is layered on top.

## Structure

```
              +---------------------------- B bus -----------------------------+
              |        |           |            |           |          |       |
         input ports  I/O status  status reg   ALU DB     address regs memory  selection
         (0, 1)       (6 bits)    (Am2904)     (Am2903)   (LHA/LLA/CLA) write   logic -> Am2910 D
                                                 |
              +---------------------------- Y bus -----------------------------+
              |                 |                          |
         ALU output        memory read (RD)          output ports (0, 1), ALU register file
```

| Module | Role |
|---|---|
| `processor_module` | Top level: buses, port wiring, pipeline register |
| `am2903_alu` | Two Am2903 slices as one 8-bit unit: 16 registers, Q, 16 functions, shifter, special functions (multiply, divide, normalise, sign/magnitude, increment) |
| `am2904_status` | Machine status register, condition code CT, carry-in selection, shift linkage |
| `am2910_seq` | Microprogram controller: 12-bit µPC, 5-deep stack, register/counter, 16 instructions |
| `seq_select` | Builds the sequencer's D input from the microword and the B bus |
| `ucode_decode` | Decodes the C field, IOEN and other bits into bus and strobe controls |
| `ucode_store` | 4096 x 40 control store and micro-instruction register |
| `ucode_loader` | Ring counter and sequencer forcing for loading the control store |
| `in_port`, `out_port` | Byte-serial ports with four-phase ("reset") signalling |
| `main_memory` | 64K x 8 memory, higher/lower address registers |
| `pm_pkg` | Microword struct, field encodings, decoded-control struct |

There are two buses:

- **B bus**: one source per cycle. The source is the ALU's B-port register, an input port, the
  I/O status word, or the status register. Its readers are:
  - the ALU, as its S operand when OE_B is inactive;
  - main memory (write data);
  - the two address registers;
  - the sequencer selection logic.
- **Y bus**: driven by the ALU output, or by main memory when the RD bit is set. Both output
  ports read it. The ALU register file is written from it, which is how memory data reach a
  register.

## The micro-instruction

The microword is 40 bits, with fields numbered 1 to 40 from the most significant end. Bit k of
the list below is bit 40-k of `pm_pkg::uword_t`.

| Bits | Field | Use |
|---|---|---|
| 1-12 | `jf` | Overlapped (see below) |
| 13-21 | `i03` | Am2903 I8-0: destination (8-5), function (4-1), source (0) |
| 22-23 | `i04_ci` | Am2904 I12, I11: carry-in select |
| 24-27 | `i04_cc` | Am2904 I3-0: condition code select (also part of the carry select) |
| 28-31 | `i10` | Am2910 instruction |
| 32 | `ccen_n` | Condition enable; high means the instruction is unconditional |
| 33-35 | `c` | C1 C2 C3: bus/strobe code |
| 36 | `ioen` | I/O instruction |
| 37 | `rd` | Memory drives the Y bus |
| 38 | `ce_n` | Load the status register |
| 39 | `ien_n` | ALU write enable (register file, Q, sign flip-flop) |
| 40 | `ea_n` | High: ALU R operand is the direct-data byte |

Bits 1-12 carry one of four meanings, depending on the rest of the word:

- the sequencer jump address D11-0;
- the direct-data byte (bits 1-8) together with the B address (bits 9-12);
- the Am2904 shift code I9-6 (bits 1-4), the A address (bits 5-8) and the B address (bits 9-12).
  The fifth shift-code bit, I10, is the Am2903 I8;
- for JMAP and CJV: the upper eight address bits, with the low four taken from the B bus.

The shift code only reaches the Am2904 when three conditions all hold:

- EA is low;
- the sequencer instruction is one that uses no D input: RFCT (8), CRTN (A), LOOP (D) or CONT (E);
- the word is not a register load (RLD).

Otherwise the shift lines stay undriven, so an address in bits 1-4 cannot change a shift. The
same overlap gives the microcoding rules:

- a jump cannot also use the A address or a shift;
- a word with direct data cannot use an A address;
- in a JMAP or CJV word, bits 9-12 are the B address that puts the dispatch value on the B bus.

### The C field

When IOEN = 0, the C field selects one of eight actions:

| C | Mnemonic | Effect |
|---|---|---|
| 0 | RIOS | I/O status onto the B bus |
| 1 | RSR | Status register onto the B bus (`{0000, MOVR, MC, MN, MZ}`) |
| 2 | — | Nothing (ALU drives B) |
| 3 | CLA | Clear the lower address register |
| 4 | LHA | Load the higher address register from B |
| 5 | LLA | Load the lower address register from B |
| 6 | WRITE | Write B into memory |
| 7 | RLD | Load the sequencer register/counter from `{jf[11:8], B}` |

When IOEN = 1, the bits mean:

- C1 = 0 is an input. C2 selects the port, and the byte goes onto the B bus. The read
  acknowledges the sender. With C3 = 1 the byte is also written into memory in the same cycle.
- C1 = 1 is an output. C2 selects the port, and the Y bus is loaded into the port. C3 marks the
  byte as the last of its packet.

The I/O status word read by RIOS has these bits:

| Bit | 7-6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| Signal | 0 | ILST1 | ILST0 | OSVC1 | OSVC0 | ISVC1 | ISVC0 |

- ISVC*n*: input port *n* holds a byte that is not the last of its packet.
- ILST*n*: input port *n* holds the last byte of a packet.
- OSVC*n*: output port *n* is clear.

## Timing and the pipeline

Everything changes on the rising edge of one clock, and one micro-instruction executes per clock.
During a cycle, the micro-instruction register (µIR) holds the word the sequencer chose in the
previous cycle. The sequencer works out the next address at the same time as the ALU computes.

The condition input CT comes from the registered status. A conditional branch therefore tests the
status saved by an earlier word with `ce_n` low, never the result being computed in the same
cycle. The usual pattern takes two words:

1. An ALU word that loads status.
2. A branch word, which can itself do unrelated ALU work.

Four sequencer behaviours matter for writing microcode:

- CJS and PUSH save the address of the word after themselves.
- LOOP that fails jumps to the top of the stack; LOOP that passes pops it.
- RFCT repeats while the counter is non-zero. Loading the counter with *n* runs the loop body
  *n* + 1 times.
- A condition passes when `ccen_n` is high or when CT is low, since CT is wired to the
  active-low CC input. For example, with condition code 4 (CT = MZ) a conditional jump is taken
  when the last loaded result was non-zero.

Multi-way branches read the B bus:

| Instruction | D input | Use |
|---|---|---|
| JMAP | `{jf[11:4], B[3:0]}` | 16-way dispatch |
| CJV | `{jf[11:4], 0, index of the lowest set bit of B}` | 8-way priority dispatch, normally on a masked I/O status word |
| RLD | `{jf[11:8], B}` | Loads a variable count or address into the register/counter |
| Any other | `jf` | Fixed jump |

## A polling I/O handler

The ports are not interrupt driven. Microcode polls the status word and dispatches on it. The
end-to-end testbench `tb/tb_processor_module.sv` contains a handler in this style, and its
central loop is:

1. `DISPATCH`: `R1 <- I/O status AND R0` (R0 holds the set of active ports), load status, and
   PUSH the address of step 2.
2. `CJV` on R1 if it is non-zero. This jumps into a table with one entry per status bit.
3. `CRTN`: the first time this returns to step 2, which fails again; the second time it leaves
   the dispatcher.

Each service routine runs these steps:

1. Move the port's pointer into the address registers, using LLA with an increment and LHA.
2. Clear its own bit in R1.
3. Move one byte, then `LOOP` back to the dispatch while R1 is non-zero.

Two ports that are both ready are therefore served in a single pass. Last-byte routines also
record the packet length at offset 0 of the port's page (via CLA and WRITE) and clear the port
from R0.

## The ports

The sender and receiver use four-phase handshakes:

- the sender raises ready with data;
- the receiver raises acknowledge;
- the sender drops ready;
- the receiver drops acknowledge.

The processor never takes part in more than one step:

- **Input port**: a JK flip-flop holds `iack`. It is set by the read micro-instruction and
  cleared once the sender drops `irdy`. A byte is waiting while `irdy & ~iack`.
- **Output port**: a write loads the data register and the last-byte flag and sets `ordy`.
  `oack` clears `ordy`. The port counts as clear (OSVC) only when both `ordy` and `oack` are
  low. Microcode must wait for OSVC before the next write.

Assertions in both ports check that the microcode reads a port only when a byte is waiting and
writes one only when it is clear. Port inputs are used without synchronisers, so the far end is
assumed to share the module clock.

## Main memory

The memory is addressed by two 8-bit registers, higher and lower. Both are loaded from the B bus,
and the lower one can be cleared. A page change costs one extra cycle, while walking within a
256-byte page needs only LLA. Memory is written from the B bus, either by a WRITE word or by an
input with C3 set, and read onto the Y bus with RD. The read is asynchronous. A write uses the
address held at the start of the cycle. The memory's size is an application choice in the
original design; here it fills the 16-bit address space (`HI_W`, `LO_W`).

## Loading the control store

The control store is RAM, written through an 8-bit port one byte at a time:

1. Hold `rst_n` and `dsbl_n` low and give one `ld_stb` pulse. This clears the sequencer address
   and sets the byte ring counter to byte 1.
2. Raise `rst_n`, keeping `dsbl_n` low. Give each microword as five `ld_stb` pulses with the byte
   on `pld`, most significant byte (bits 1-8) first. The sequencer is forced to CONT, and its
   carry-in is high only on the fifth byte. The address therefore advances once per word.
3. Lower `rst_n`, raise `dsbl_n`, and clock for at least one cycle. Then release `rst_n`.
   Execution starts at word 0.

`ld_stb` stands in for the separate load clock of the original design. It is a one-cycle
strobe in the module clock domain: it enables the sequencer and the store write for that cycle.
While `dsbl_n` is low, the µIR holds a no-operation word, so loading cannot change registers,
memory or ports.

## Departures and design choices

These points are this design's own choices, or readings of places where the original
description is ambiguous or inconsistent:

- Single rising-edge clock for everything. The load clock is a strobe. The B and Y buses are
  multiplexers, not tri-state lines.
- SE (shift enable) follows the rule that the shift field is used only for sequencer
  instructions 8, A, D and E with EA low. A printed gate equation disagrees with this rule and
  would enable shifts during CJS.
- RLD is C field code 7, as the C-field table gives it. Another printed equation decodes a
  different code.
- Am2903 destination codes A-F follow the standard chip ordering. The register file is written
  for every code except 5, 6 and C. In detail:
  - C: F to Y, no write, Q shifted left;
  - D: F to Y, write, Q shifted left;
  - E: SIO0 copied to every Y bit, write;
  - F: F to Y, write, Q held.

  To leave every register unchanged, set `ien_n` high.
- The ALU parity output covers F only, and the ALU's Z pin reaches the Am2904 CX input only
  during special functions. Both choices avoid combinational loops through the shift and carry
  paths. Parity is not used by the module.
- The register file is written from the external Y bus, so that memory data can be loaded into a
  register.
- A push onto a full sequencer stack overwrites the top entry.
- The status register and ALU registers have no reset, like the chips. The port flip-flops and
  the load ring counter are reset by `rst_n` synchronously; the original parts clear them
  asynchronously.
- The 2x2 router that shares the module's pin-out, and the data flow machine's cell blocks and
  networks, are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>`). Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_am2903_alu` | All functions and sources against a reference model; shifts; Q operations; an 8-step unsigned multiply using the special function |
| `tb_am2904_status` | The CT, carry and shift-linkage tables exhaustively; status loads |
| `tb_am2910_seq` | Every instruction, stack depth and overflow, counter loops |
| `tb_seq_select` | JMAP, CJV and RLD address formation on random inputs |
| `tb_ucode_decode` | Every C/IOEN combination and the OE_B/SE equations |
| `tb_ucode_store` | Byte writes and the registered read (small address width) |
| `tb_ucode_loader` | Ring counter, forcing and carry-in across whole load sequences |
| `tb_in_port`, `tb_out_port` | Handshakes with random sender/receiver delays |
| `tb_main_memory` | Address registers and read/write ordering |
| `tb_processor_module` | The whole module at its default size (see below) |

`tb_processor_module` works as follows:

- It loads a 152-word microprogram through the byte-load interface and verifies the store
  contents.
- It checks that straight-line code runs one word per clock.
- It receives two simultaneous 6-byte packets on the two input ports into memory, with their
  lengths.
- It echoes the port-0 packet on output port 0, with correct last-byte marking.
- It multiplies the first two bytes with eight Am2903 multiply steps under an RFCT loop, and
  sends the 16-bit product on output port 1. The loop count is loaded from a register with
  RLD; a following conditional PUSH with a failing condition must leave it unchanged.
- It counts these mechanisms, and any that never happen count as failures: input reads,
  last-byte inputs, output writes, last-byte outputs, priority dispatch, map jump,
  call/return, LOOP back to the dispatcher, counter loops, memory reads and writes, multiply
  steps, status-register reads and register/counter loads from the B bus (RLD).

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/pm_pkg.sv \
    tb/tb_processor_module.sv --top-module tb_processor_module
./obj_dir/Vtb_processor_module
```

Replace the testbench name to run any other testbench. Add `+verilator+seed+N` to vary the
random handshake delays.
