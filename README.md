# A reconfigurable bit-processor array: Bit Processors, Stages and long-word boards

This design is a SIMD array built from one-bit processing elements. The same
hardware runs in two ways:

* **Vertical mode.** Each of the 64 Bit Processors (BPs) on a board works
  alone and bit-serially, like the processing element of a massively
  parallel bit-plane machine. It has a full adder, a carry, a mask and a
  variable-length shift queue.
* **Horizontal mode.** The eight BPs of a *Stage* act as the eight bits of an
  8-bit processor. The Stages of a board can in turn be joined into long
  words of 16 to 64 bits. In this mode, addition does not go bit by bit: the
  two operand bytes address a 64K x 9 table (the ADD ROM) that holds their
  sum and carry. Long words get their carries from a board-level look-ahead
  in one extra cycle.

So one board can be sixty-four 1-bit machines, eight 8-bit machines, one
64-bit machine, or a mix of word sizes. It can also be two 32-bit
floating-point machines. A host sends two-address commands, such as
`ADD OP1, OP2`, with OP1 in the A memory and OP2 in the B memory. A sequencer
turns each command into a short series of microinstructions, one per machine
cycle. Every Stage receives the same microinstruction. Boards are joined
into an array (two by default) that adds words longer than one board and
moves long words between boards.

## Hierarchy

```
rcs_array                     N_BOARDS boards, board-to-board carry, north/south
└── rcs_top  xN_BOARDS        one board with its sequencer
    ├── lw_sequencer          command -> microinstruction per cycle
    └── rcs_board             8 Stages, word configuration, look-ahead, masks
        ├── board_cla  x2     carry look-ahead over the Stages of each word;
        │                     second copy passes the carry from the board below
        └── stage  x8
            ├── bit_processor x8   r0-r3, m, c, q, full adder, r3 logic
            ├── mem_bank      x2   A and B memory (DEPTH x 8)
            ├── add_rom            {carry, sum} = hi + lo, 64K x 9
            ├── stage_router       R3 shifts 1/2/4/8 up/down, north, south
            └── stage_flags        zero, r3==m, propagate, generate, overflow
```

`rcs_pkg` holds the shared types: the microinstruction structs, the command,
and the enums for every multiplexer.

## The Bit Processor

A BP has:

* four general registers, r0 to r3;
* a mask m and a carry c;
* a queue q of 4 to 16 bits, which runs from r1 (the tail) to r2 (the head).

Two input buses (a and b) and one output bus (o) join it to the Stage. The
full adder adds r2, r3 and c. It writes the sum to r1 and the carry to c.

r3 is the logic and routing register. On each load it takes `fn[{r3, x}]`,
where `fn` is a 4-bit truth table. `x` comes from a, from b, or from the
routing network. This gives all 16 functions of two variables. The
constants `FN_LOAD`, `FN_NOT`, `FN_AND` and others are in `rcs_pkg`.

When a microinstruction sets `use_mask`, a BP whose m is 0 keeps its state.
The m register itself always loads when asked, so the mask can be changed in
any cycle.

In horizontal mode the same registers are simply used eight at a time:

| Stage register | made of | role |
|---|---|---|
| R0, R1, SC | r0, r1 of 8 BPs, Stage carry | 17-bit product shift register {SC, R0, R1} |
| R2, R3 | r2, r3 | ROM operands, results |
| R3 | r3 | logic unit and long-word shift register (through the router) |
| M | m | mask; one Stage mask bit loads all eight |

## One machine cycle in a Stage

A microinstruction (`stage_uc_t`) sets up the whole data path for one cycle.
In that cycle:

1. The A bus and B bus each take one source: memory, the L-buffer byte, the
   ROM sum, or the Stage's own O bus. The O bus carries one register chosen
   by `o_src`, so moving one register to another takes one cycle through O.
2. The ROM is addressed by a high byte and a low byte. The high byte is a
   register chosen per BP. The low byte is a register, SC, the latched
   look-ahead carry CI, or zero. The ROM returns the 9-bit sum.
3. The registers load from the buses. The router gives r3 its shifted or
   neighbour byte. SC takes the ROM carry.
4. Memory writes take the O bus. They are masked like the registers.

Both memories read asynchronously and write on the clock edge. This is what
lets the document's "R2 <- MEM[OP1]; R3 <- MEM[OP2]" happen in one cycle.

The Stage produces these flags:

* zero: R3 is 0;
* eq: every r3 equals its m;
* p (carry propagate): the AND of the eight ROM sum bits;
* g (carry generate): the ROM carry;
* v: two's complement overflow of the current ROM add;
* sticky: a 1 was shifted off the Stage's low end since the last clear.

## Long words: segmentation and carries

`word_lsb_i[i] = 1` makes Stage i the lowest Stage of a word. For example,
`8'hff` gives eight 8-bit words, `8'h11` gives two 32-bit words and `8'h01`
gives one 64-bit word. This setting decides three things:

* **Carries.** A long add takes two ROM cycles:
  * In the first cycle every Stage adds its own bytes. `board_cla` takes each
    Stage's (g, p) and works out the carry into every Stage from the Stages
    below it in the same word. The CI latch in each Stage stores that carry.
  * The second cycle adds CI into the partial sum with `R2 <- ROM[R2, CI]`.
  * One correction is always enough. A Stage that can pass a carry on (p = 1)
    holds 0xFF, so it cannot itself produce a new carry when CI is added.
  * A 64-bit add is therefore load, add, correct, store: 4 cycles.
* **Shifts.** Inside a word, a Stage's up and down neighbours are the R3
  bytes next to it. At the ends of the word the fill is chosen per
  microinstruction:
  * zero;
  * sign (copies of the top bit; this applies at the upper end only);
  * rotate (end-around);
  * inverted sign (used for floating-point renormalisation).
* **Detection.** The zero and equivalence flags cascade upward through each
  word. The flag of a word's top Stage covers the whole word.

Routing moves R3 by 1, 2, 4 or 8 bit positions per cycle, up or down. A
shift by D therefore takes D/8 + popcount(D mod 8) cycles. North and south
routes load R3 from the same Stage of the neighbouring boards. This is the
link across the words that builds a linear array of long-word processors.

## Words longer than one board

`rcs_array` holds `N_BOARDS` boards (default 2). All of them take the same
command at the same time, each with its own copy of the sequencer, and run
in lockstep.

* **North and south.** The north neighbour of board b is board b+1 and its
  south neighbour is board b-1. A north or south route moves every long word
  one board along the vector. The two outer ends are ports.
* **Chaining.** `chain_i[b] = 1` makes board b continue the top word of board
  b-1; Stage 0 of board b then never starts a word. A 64-bit word on each of
  two chained boards makes one 128-bit word. Other words on the same boards
  stay independent.
* **Rippled carry.** Each board keeps the carry out of its top word in a
  register. The long add ends with N_BOARDS - 1 extra ripple steps. In each
  step every board adds the carry that the board below passed up, and then
  passes up the carry that this increment produces. A second `board_cla`
  spreads that carry over the Stages, through every Stage whose byte is all
  ones. The step is `R2 <- ROM[R2, carry in]`.
* **Cost.** A long add over R boards therefore takes R+3 cycles: 4 on one
  board and 5 on two.
* **Limits.** Only addition crosses boards. Long subtract, shifts, multiply,
  floating point and the zero/eq cascades stay within one board. The carry
  out of the last board is not kept.

## Floating-point add (the hardest part)

**Format.**

* A 32-bit floating-point word is an 8-bit two's complement exponent in the
  upper Stage and a 24-bit two's complement mantissa in the three Stages
  below it.
* Value = mantissa x 2^(exponent - 23).
* A normalised mantissa has its top two bits different.
* Configure the board with `word_lsb_i = 8'b1001_1001` and
  `fp_exp_i = 8'b1000_1000`. Each exponent is then its own 8-bit word, and
  each mantissa is its own 24-bit word.

**Board masks.** The microinstruction can pick a per-Stage mask source. The
board forms it for each Stage from the exponent Stage above it:

| source | meaning |
|---|---|
| `MS_EXP` | exponent Stages only |
| `MS_MANT` | mantissa Stages only |
| `MS_DNEG` | the whole floating-point word, if its exponent difference is negative |
| `MS_DBIT` | mantissa Stages, if bit k of the difference is set |
| `MS_DBIG` | mantissa Stages, if the difference is 32 or more |
| `MS_OVF` | the whole word, if its mantissa sum overflowed |

The source can drive either of two things:

* it loads m (`mask_sel`);
* it gates the Stage for one cycle (`gate_sel` with `gate_en`).

**The 26-cycle `OP_FADD` sequence.** OP1 is X, in the A memory; OP2 is Y, in
the B memory.

| cycles | step |
|---|---|
| 0-4 | load X into R2 and Y into R3; keep Y in R0; in the exponent Stage, R3 <- ex - ey |
| 5-9 | where the difference is negative: m <- 1, swap X and Y, and recompute the difference; the larger exponent is now in R2 and the difference d >= 0 is in R3 |
| 10-18 | align the mantissa in R3 with sign-filling downward shifts of 1, 2, 4, 8, 8 (each gated by bits 0-4 of d), then 8, 8, 8 when d >= 32; the lowest mantissa Stage collects the sticky bit |
| 19-21 | mantissa R1 <- R2 + R3 with look-ahead, then R3 <- R1; m <- overflow |
| 22-23 | in overflowed words: mantissa down by 1 with the inverted-sign fill (the lost carry becomes the new sign), then exponent + 1 |
| 24-25 | store the mantissa Stages' R3, then the exponent Stage's R2, to A[OP1] |

**Comparison with the document.** The document counts 16 cycles:

| step | document | this design |
|---|---|---|
| exponent compare | 5 | 5 |
| operand swap | not described | 5 |
| alignment | 5 | 9 |
| mantissa add | 3 | 3 |
| renormalisation | 2 | 2 |
| store | 1 | 2 |

The differences have three causes:

* The document does not say how the smaller operand is chosen.
* This router has no 16- or 32-bit routes.
* The result's exponent and mantissa sit in different registers.

**Limits.**

* Results are truncated. The sticky bit is reported on `sticky_o` but not
  used for rounding.
* A sum that cancels is not shifted left to renormalise it.
* Exponent overflow is not detected.
* The test keeps exponents within +-40.
* The alignment always runs all nine steps. The Stage zero detects could end
  it early once the mantissa is all sign bits, but the sequencer does not
  look at them.

## Commands and their cycle counts

| command | cycles | micro-operations |
|---|---|---|
| `OP_ADD` | 3 | R2<-A[op1], R3<-B[op2]; SC,R2<-ROM[R2,R3]; A[op1]<-R2 (per Stage) |
| `OP_SUB` | 4 | R2<-A, R3<-~B, SC<-1; SC,R3<-ROM[R3,SC]; SC,R2<-ROM[R2,R3]; store |
| `OP_ADDL` | N_BOARDS + 3 | long-word add: load; add and latch the look-ahead carries; correct; one carry step per further board; store |
| `OP_SUBL` | 6 | long-word subtract: load ~B; +1 across the word (2); add (2); store |
| `OP_LOGIC` | 3 | R3<-A[op1]; R3<-fn(R3, B[op2]); A[op1]<-R3 |
| `OP_LOGIC_R3` | 1 | R3<-fn(R3, B[op2]) |
| `OP_MUL` | 19 | load; 8 x (conditional add of R2 into R0 if R1[0], then shift {SC,R0,R1} right); low byte to A[op1], high byte to B[op2] |
| `OP_SHIFT` | D/8 + popcount(D mod 8) | R3 shifted by `shamt` with the chosen fill |
| `OP_FADD` | 26 | see above |
| `OP_LOAD`, `OP_READ` | 2 | L-buffer to memory; memory to the O bus (`rd_valid_o`) |
| `OP_MICRO` | 1 | the command's own `stage_uc_t`, used for vertical-mode programs |

The document gives these counts: add 3, subtract 4, 64-bit add 4, logic 3 or
1, and multiply 19. This RTL matches all of them.

The document also gives long-word add time as "R+2" for R boards. For one
board that formula gives 3, which conflicts with the 4 cycles it states for a
64-bit add. This design takes 4 cycles on one board and adds one cycle per
further board, which gives R+3.

## Top-level interface (`rcs_array`, and `rcs_top` for one board)

`rcs_array` has the ports of `rcs_top` below, with the per-board ones
concatenated (board 0 in the low bits). It adds `chain_i`. Its `north_i` feeds
the last board, its `south_i` feeds board 0, and `board_cin_i` enters board 0
when `chain_i[0]` is set.


* **Commands.** `cmd_valid_i` / `cmd_ready_o` is the handshake; `cmd_i`
  (`cmd_t`), `op1_i` and `op2_i` carry the command and its two addresses.
  `cmd_ready_o` stays low while a sequence runs. `done_o` is high during the
  last micro-operation; its results are visible from the next cycle.
* **Board setup.** `word_lsb_i`, `fp_exp_i`, `smask_i` and `qlen_i` set the
  word layout, the exponent Stages, the external mask bits and the queue
  length.
* **Data in and out.** `lbuf_i` is 64 bits of L-buffer. `o_bus_o`,
  `sum_or_o` and `r3_o` bring out the O bus, its OR, and R3.
* **Neighbour boards.** `north_i`, `south_i` and `board_cin_i` come from
  them. `board_cout_o` is the registered carry passed to the next board.
* **Per-Stage flags.** `zero_o`, `eq_o`, `cout_o`, `v_o`, `sc_o` and
  `sticky_o`. The zero and eq flags are cascaded within each word.
* **Reset and size.** `rst_n` is an asynchronous, active-low reset of all
  registers; the memories are not cleared. `MEM_DEPTH` (default 1024) sets
  the words per memory bank.

## Departures from the document and choices made here

* **Routing network.** The document leaves the routing network to future
  work. This design builds a partial power-of-two network (1, 2, 4, 8) along
  the word, plus north and south. There is no richer two-dimensional
  vertical-mode routing.
* **Memory.** The document gives no memory size or addressing detail.
  Memory depth is 1024. All BPs of a board share the A and B addresses, so
  there is no local indexing.
* **Overflow.** The overflow flag uses the usual rule: operands of the same
  sign giving a result of the other sign. The document only says overflow
  hardware will be needed. No overflow handling is built.
* **Multiply.** The multiply is unsigned. It uses the iterative scheme. The
  alternative ROM-lookup multiply (4 cycles, 64K x 16 table) is not built.
* **Not built.** Division and multi-Stage multiplication are named in the
  document but never specified, so they are not built. The path from the
  L-buffer into memory is a plain 64-bit input port.
* **Array of boards.** The document lets carries ripple from board to board,
  one cycle per board, and links long words across boards. The number of
  boards, the shared command, and the way the boards are wired are this
  design's own. Only addition crosses boards; long subtract and shifts of
  words that span boards are not built.
* **Encodings.** The microinstruction format, the command encoding and
  handshake, and reset behaviour are this design's own.
* **Timing.** There is one machine cycle per clock. The ROM and memory reads
  sit inside that clock, so the critical path is memory read, then ROM, then
  register.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bit_processor` | 4000 random microinstructions against a reference model; the full-adder truth table; every queue length |
| `tb_add_rom` | all 65,536 entries |
| `tb_mem_bank` | writes and reads against a reference array |
| `tb_stage_router` | every direction and distance, including the lost bits |
| `tb_stage_flags` | every flag against its definition |
| `tb_board_cla` | against a ripple-carry reference over random word layouts |
| `tb_stage` | the add, subtract and multiply sequences, all 16 logic functions, routes with sticky, the CI correction, masking, the gate and the mantissa overflow test |
| `tb_lw_sequencer` | the cycle count and contents of every command sequence |
| `tb_rcs_board` | long add, shifts with every fill, and the cascaded flags over random word layouts |
| `tb_rcs_top` | end to end on one board at the default size |
| `tb_rcs_array` | the two-board array at the default size |

`tb_rcs_array` runs the array with no parameter overrides. It covers 128-bit
adds with the carry crossing boards, with and without a carry in. It also
covers random layouts where one word spans the boundary between boards,
boards working on their own words, and north and south moves between
boards. Both boards also run the single-board operations together: 8-bit
subtract and multiply on all sixteen Stages, logic, sign-fill shifts with
the sticky bit, and floating-point adds on four words.

`tb_rcs_top` runs one board with no parameter overrides:

* eight 8-bit machines: add, subtract, multiply, logic;
* 64-bit and 32-bit long words: add, subtract, shifts;
* a bit-serial vertical-mode add through the BP full adders;
* masking, north routing, the queue, and the word zero detect;
* 240 floating-point adds. These are checked against an integer model of the
  same algorithm, and against real arithmetic to within two units in the
  last place.

It counts how often each mechanism occurs (carry propagation across Stages,
skipped multiply steps, each fill kind, sticky, overflow, operand swap,
renormalisation, far-apart exponents and others). A mechanism that never
occurs counts as a failure.

To run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/rcs_pkg.sv tb/tb_rcs_array.sv --top-module tb_rcs_array
./obj_dir/Vtb_rcs_array
```

Replace `tb_rcs_array` with any other testbench name.
