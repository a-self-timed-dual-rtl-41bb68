# APIC18S: a clockless, dual-rail, five-stage PIC18-compatible core

APIC18S executes a subset of the Microchip PIC18 instruction set without a
clock. Every datapath bit travels on two wires, and each pipeline stage starts
as soon as its inputs are complete. It hands a result on as soon as that
result exists. An instruction therefore costs what its own path costs:

- A literal move skips the data memory, the adder and the WREG read.
- An ADD pays for the ripple adder.
- An instruction that depends on the one before it waits for exactly that
  instruction to finish. No worst-case clock period is involved.

This repository holds synthesizable SystemVerilog for the core, its memories
and its building blocks. It also has self-checking testbenches for every block
and an end-to-end test that runs a program and checks it against an
instruction-level model.

## Dual-rail tokens and the four-phase rhythm

Each logical bit `x` is a pair `(x_t, x_f)`:

| x_t x_f | meaning |
|---|---|
| 0 0 | NULL (no data yet / spacer) |
| 0 1 | valid 0 |
| 1 0 | valid 1 |
| 1 1 | illegal |

In this RTL a bundle is two vectors with the same layout, `foo_t` and
`foo_f`. Packed structs from `apic_pkg` give the fields names, for example
`ctrl_t` for the control word, `opnd_t` for operands and `res_t` for results.

Data moves in a four-phase rhythm:

1. A valid token appears.
2. The receiver acknowledges it.
3. The sender returns every bit to NULL.
4. The acknowledge falls.

A receiver knows a bundle is complete when every bit has one rail up. An
OR per bit followed by an N-input C-element (`c_tree`) detects this. No
separate request wire exists.

Every gate of the design keeps one rule: an output becomes valid only after
all inputs it depends on are valid. It returns to NULL only after all of them
are NULL. The rule is kept in one of three ways:

- **DIMS gates.** A C-element per input minterm, with an OR of the minterms
  per output rail: `dr_and2` (the ALU's AND function), `dr_full_adder`,
  `dr_ripple_adder`.
- **Hold elements.** Wider single-rail functions are computed from the true
  rails. They are then put back on two rails by `dr_hold`. It shows the
  result when the inputs are all valid and drops to NULL when they are all
  NULL. The instruction decoder, the branch condition and the ALU logic
  functions use it.
- **DeMUX-MERGE pairs.** `dr_demux` sends a bundle down one of two paths
  according to a dual-rail select. The other path stays NULL and does no
  work. The paths rejoin through OR gates. This is what gives the design its
  data-dependent delay. **The select must itself be a token that returns to
  NULL with the data.** A steady select level would keep the chosen path's
  C-elements from ever returning to NULL.

## The pipeline

```
        +------ newPC (written before ID acknowledges IF) ------+
        v                                                       |
   [PC reg] -> IF --|latch|--> ID --|latch|--> OF --|latch|--> EXE --|latch|--> WB
                |              ^  \             |  \                           |
              IMEM             |   BSR, STATUS  |   DMEM (read), WREG, STATUS.C |
                               |                                               |
                               +------------------ ack_final ------------------+
                                           WREG / STATUS / BSR / DMEM (write) <-+
```

The stage latches are Muller pipeline stages (`dr_pipe_latch`). Each bit
passes through a C-element whose other input is the inverted acknowledge of
the next stage. The latch's completion signal is its acknowledge backwards.

- **IF** (`if_stage`) reads the PC register while ID is empty. Its read
  request is the inverse of ID's acknowledge. The read adapter fetches the
  word, and IF presents `{PC, instruction}` as one token.
- **ID** (`id_stage`) has four parts:
  - The stall controller (next section).
  - Two dual-rail adders for PC+1 and PC+offset+1.
  - The branch controller, which reads STATUS for conditional branches.
  - The decoder and address mapper. It produces the control word and reads
    BSR only for banked addresses (`a = 1`).

  ID writes the next PC into the PC register. It acknowledges IF only after
  that write has completed, which closes the IF–ID–PC loop.
- **OF** (`of_stage`) uses three DeMUX-MERGE pairs, one per source:
  - source 1 is a data-memory byte, or the literal carried in the address
    field;
  - source 2 is WREG, or an immediate from the decoder;
  - the carry-in is STATUS.C, or a constant 0/1.

  A storage is touched only when the token is steered to it. After the
  merges come an optional swap of the sources and a complement of source 2,
  done by exchanging its rails. Subtraction is therefore an addition.
- **EXE** (`exe_stage`) has one DeMUX-MERGE pair. It chooses between the
  8-bit dual-rail ripple adder and the logic/rotate block:
  - The adder path takes C, DC and OV from the carry chain.
  - The logic path gives AND, IOR, XOR, pass, rotates through or without
    carry, and nibble swap.
  - Z and N are formed after the merge.
- **WB** (`wb_stage`) waits until the whole result is valid. A ripple adder
  finishes its low bits first, and writing early would feed a half-finished
  WREG back to OF. WB then writes the one destination (WREG, BSR or data
  memory) and the STATUS flags selected by the mask. An N-input C-element over
  the done signals of all destinations gives `ack_final`. It acknowledges the
  WB latch and tells ID that the instruction has finished.

Registers (`dr_register`) hold one bit per NOR latch:

- A write acknowledge bit rises when the stored bit equals the incoming
  valid bit: `ack = din_t & q | din_f & ~q`.
- A NULL input bit leaves the bit alone, which is how WB writes only the
  masked STATUS flags.
- A read request drives `dout_t = rd_t & q` and `dout_f = rd_t & ~q | rd_f`.
  Raising `rd_f` instead returns a valid 0 without reading.

Memories are ordinary single-rail arrays (`imem`, `dmem`). Adapters sit
between them and the dual-rail world:

- The read adapter (`mem_adapter`) detects a complete address, waits a
  matched delay, then enables AND gates onto the data rails. The enable is
  the AND of the completion and its delayed copy. Data therefore falls to
  NULL at once when the address does, and the next address cannot slip
  through a stale enable.
- The write adapter (`mem_wr_adapter`) raises a write strobe one matched
  delay after address and data are complete. The strobe also serves as the
  write acknowledge.

## Stalling: how dependent instructions wait

There is no forwarding. WB writes WREG, STATUS, BSR and memory. OF and ID read
them. So an instruction must not read state while the instruction ahead of it
is still writing.

The design stalls **one bit** of the instruction. Every later decode needs all
16 instruction bits valid, so holding back the opCode bit `inst[15]` freezes
the whole instruction in ID. The rest of ID keeps working: the PC adders run,
and a non-branch or BRA delivers its next PC at once. The stall controller
(`stall_ctrl`) works as follows:

- A DeMUX steered by a dual-rail stall select decides the path of the
  opCode bit.
- If the previous instruction writes nothing, the bit goes straight to the
  MERGE.
- Otherwise it enters a pair of C-elements whose other input is `ack_final`.
  The bit passes when WB reports the previous instruction finished. It
  returns to NULL only after both the bit and `ack_final` have fallen.

The stall select is computed in ID from the control word of the instruction
that just left:

- On the rising edge of ID's completion, ID captures whether that
  instruction writes anything.
- On the falling edge, this becomes the select for the next instruction.

The select therefore never changes under a valid token. It reaches the
DeMUX as a token that is valid while the other fifteen instruction bits are
valid.

**ack_final must belong to the right instruction.** `ack_final` stays high
until the NULL spacer behind an instruction has reached WB. Meanwhile a
younger instruction that needed no stall may already have left ID, and the
one after it may arrive at the stall controller. A still-high `ack_final` at
that moment belongs to an older instruction. It would release the stalled
instruction too early; a branch would then read STATUS before the ALU
instruction ahead of it had written it.

ID therefore counts issued instructions (rising edges of its completion) and
retired ones (rising edges of `ack_final`) in two 3-bit counters. It passes
`ack_final` to the stall controller only when the counts agree. These two
counters and the two select flip-flops are the only flip-flops in the core.
They are clocked by handshake edges, not by a clock.

**The timing condition.** The stall works only if the stalled instruction
reaches the stall controller before the `ack_final` it waits for has come and
gone:

> delay from IF to the stall controller < delay from OF to the end of WB

With the default delays the left side is 1000 + 550 ps and the right side
about 34 ns, so the condition holds by a wide margin. Keep it in mind before
making the memories slower or the stages faster.

## Branches

Branches are handled entirely in ID. BRA adds an 11-bit signed offset, and its
new PC is ready as soon as the PC and instruction are. A conditional branch
(BZ, BNZ, BC, BNC, BOV, BNOV, BN, BNN: `inst[15:11] = 11100`) reads STATUS
only after its opCode bit has passed the stall controller. STATUS is then up
to date, and the condition picks PC+1 or PC+1+offset. No instruction is ever
fetched speculatively. The next fetch waits for the next PC to be written.

## Instruction subset

Standard PIC18 encodings; program addresses are word addresses and the PC has
10 bits (1024 words).

| Group | Instructions |
|---|---|
| byte-oriented, `f,d,a` | ADDWF, ADDWFC, ANDWF, IORWF, XORWF, COMF, DECF, INCF, MOVF, RLCF, RLNCF, RRCF, RRNCF, SWAPF, SUBFWB, SUBWF, SUBWFB |
| byte-oriented, `f,a` | CLRF, SETF, MOVWF, NEGF |
| bit-oriented | BCF, BSF, BTG |
| literal | ADDLW, ANDLW, IORLW, XORLW, MOVLW, SUBLW, MOVLB |
| control | BRA, BZ, BNZ, BC, BNC, BOV, BNOV, BN, BNN, NOP |

The flags follow PIC18 rules:

- Arithmetic sets C, DC, Z, OV and N.
- Logic operations and moves set Z and N.
- Rotates through carry set C, Z and N.

Data addressing uses 16 banks of 256 bytes (12-bit physical address):

- `a = 1` uses `{BSR[3:0], f}`.
- `a = 0` uses the access bank: `f < 80h` is bank 0, `f >= 80h` is bank 15.

Not built; these words execute as NOP:

- multiply (MULLW, MULWF);
- skip instructions (CPFSx, TSTFSZ, BTFSx, DECFSZ, INCFSZ, DCFSNZ, INFSNZ);
- anything that uses the return stack (CALL, RCALL, RETURN, RETFIE, RETLW,
  PUSH, POP);
- table reads and writes;
- the two-word instructions (MOVFF, LFSR, GOTO);
- DAW, SLEEP and RESET.

WREG, STATUS and BSR are separate dual-rail registers. They are not visible
in the data memory map.

## Timing model

The logic is written without delays, so on its own a simulator would settle
every handshake in zero time. To give the pipeline real latencies, every
stage output passes through a behavioural `delay_line` (`assign #(DELAY)`),
set by parameters on `apic18s_top`:

| parameter | default (ps) | meaning |
|---|---|---|
| `D_IF` | 550 | IF stage |
| `D_ID` | 3378 | ID stage |
| `D_OF` | 5382 | OF stage |
| `D_EXE` | 25497 | EXE stage |
| `D_WB` | 3086 | WB stage |
| `IMEM_DELAY` | 1000 | instruction memory access (matched delay in the read adapter) |
| `DMEM_DELAY` | 1000 | data memory access (read and write adapters) |

The stage values are worst-case delays of a 0.13 µm implementation. The
memory times are this design's assumption.

With the defaults, the end-to-end test retires about one instruction every
51 ns. Most instructions stall behind their predecessor, so the time is close
to the sum of the stage delays. For synthesis, `delay_line` becomes a wire,
and a real implementation would need matched delays in its place.

## Where the design departs from the original description

- The stalled bit is `inst[15]`, the opCode bit named in the text. One
  drawing of the stall controller labels it `inst[0]`.
- Instruction encodings are the standard PIC18 ones. The original core used a
  slightly modified encoding that is not published.
- The data memory is 4096 bytes, which is what a 12-bit address with 16
  banks of 256 bytes gives. A larger size appears in one place of the
  description.
- ID's qualification of `ack_final` (issued/retired counts) is this design's
  own addition. Without it the stall policy is unsafe in a pipeline whose
  spacers trail their tokens, as described above.
- OF has a third DeMUX-MERGE pair for the STATUS.C carry-in and a source
  swap. These support ADDWFC, SUBWFB, SUBFWB, RLCF and RRCF.
- EXE has one DeMUX-MERGE pair at the top (adder vs. logic). It has no
  further pairs inside each path.
- Decode and the ALU's logic functions other than AND use the hold-element
  style rather than gate-by-gate DIMS logic. AND uses dual-rail AND gates. Adders, registers, latches, DeMUXes and the stall
  controller are built from C-elements as described.
- The memories read asynchronously and the instruction memory has a load
  port. Neither is part of the original description.

## Reset

`rst` is active high and asynchronous. C-elements, latches, registers and
hold elements are level-reset to 0 (NULL). Two requirements follow from the
rest of the design:

- `rst` must **rise**, because the four ID flip-flops are reset on its edge.
- `rst` must stay high longer than the longest delay line (`D_EXE` by
  default), so every delay line has settled to NULL.

The core starts fetching at PC 0 when `rst` falls. Load the program through
`load_clk`/`load_we`/`load_addr`/`load_data` before that.

## Simulating

Verilator 5 with `--timing` runs everything. The handshake rings make
Verilator report UNOPTFLAT (combinational loop) warnings, which are expected,
hence `-Wno-fatal`. The end-to-end test at default parameters:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_apic18s_top \
  -y rtl +libext+.sv rtl/apic_pkg.sv tb/tb_apic18s_top.sv
./obj_dir/Vtb_apic18s_top
```

It prints per-mechanism counts and ends with
`TB_RESULT checks=<n> failures=<n>`. It checks WREG, STATUS, BSR and each
data-memory write after every retired instruction, then the final PC and the
whole data memory. It fails if any of these never happened: a stall, a
stall-free pass, a taken or not-taken branch, BRA, a data-memory read or
write, a WREG read, a STATUS.C read, a banked access, or the adder path. It simulates in well under a second.

Every block has its own testbench, `tb/tb_<module>.sv`, run the same way with
`--top-module tb_<module>`:

| testbench | checks |
|---|---|
| `tb_c_element` | truth table, hold, reset |
| `tb_dr_and2` | all valid input pairs; NULL/valid ordering |
| `tb_dr_ripple_adder` | random sums and every carry; no early output |
| `tb_dr_demux` | routing by select; return to NULL |
| `tb_dr_register` | masked writes, per-bit ack, both read rails |
| `tb_dr_pipe_latch` | capture, hold until ack, blocked while ack is high |
| `tb_mem_adapter` | data appears exactly one matched delay after a complete address |
| `tb_mem_wr_adapter` | strobe timing; memory contents |
| `tb_stall_ctrl` | bypass vs. wait for ack, both bit values |
| `tb_if_stage` | fetch timing and contents with a real PC register |
| `tb_id_stage` | next PC, destination, flag mask, address mapping; stalls, including a stale `ack_final` |
| `tb_of_stage` | operands from memory, WREG, STATUS.C, literals; swap and complement |
| `tb_exe_stage` | random operands for every function, flags from integer arithmetic |
| `tb_wb_stage` | writes to real registers, masked flags, `ack_final` ordering |
| `tb_imem`, `tb_dmem` | the memory arrays |
| `tb_delay_line` | delay exactness |

## Synthesis notes

Every module is synthesizable except `delay_line`, which is behavioural.
Synthesis tools will report two kinds of structure on purpose:

- **Latches.** They are the C-elements, hold elements and register bits.
- **Combinational loops.** They are the handshake rings:
  - request forward, acknowledge back through C-elements;
  - through the memories in IF and OF;
  - from ID through WB and back via `ack_final`.

A gate-level flow for this style needs C-elements as cells and matched delays
in place of the delay lines. The full core is about 5,800 generic cells
before mapping, plus 48 kbit of memory.

## Files

- `rtl/apic_pkg.sv`: widths, enums (function, destination, carry-in), the
  control, operand and result structs.
- `rtl/apic18s_top.sv`: the core with memories.
- Stages: `if_stage`, `id_stage` (with `id_decode`), `of_stage`,
  `exe_stage`, `wb_stage`.
- Elements:
  - `c_element`, `c_tree`;
  - `dr_and2`, `dr_full_adder`, `dr_ripple_adder`;
  - `dr_demux`, `dr_hold`, `dr_pipe_latch`, `dr_register`;
  - `stall_ctrl`, `mem_adapter`, `mem_wr_adapter`;
  - `imem`, `dmem`, `delay_line`.
- `tb/`: one self-checking testbench per module listed above.
