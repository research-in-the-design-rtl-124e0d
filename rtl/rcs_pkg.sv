// rcs_pkg: types and constants shared by the reconfigurable Stage design.
//
// The machine is built from 1-bit Bit Processors (BPs). Eight BPs form a
// Stage, the 8-bit unit of horizontal (word-parallel) operation, and eight
// Stages form a board that can be split into long words of 8 to 64 bits.
// Everything is driven by one horizontal microinstruction per machine cycle:
// `bp_ctl_t` is the part every BP sees, `stage_uc_t` adds the Stage-level
// bus, memory, ADD ROM, routing and carry controls, plus the board-level
// mask and gate selects used by floating point words. The field layout and the
// encodings are this design's own; the document gives the register set, the
// buses and the micro-operation sequences, not a microword format.
package rcs_pkg;

  localparam int unsigned STAGE_W   = 8;    // BPs per Stage (document: 8)
  localparam int unsigned N_STAGES  = 8;    // Stages per board (document: 8)
  localparam int unsigned QMAX      = 16;   // longest q queue (document: 4 to 16)
  localparam int unsigned QMIN      = 4;

  // ---- BP register sources --------------------------------------------
  typedef enum logic [2:0] {R0_HOLD, R0_A, R0_B, R0_SHIFT, R0_ZERO} r0_src_e;
  typedef enum logic [2:0] {R1_HOLD, R1_A, R1_B, R1_SUM, R1_SHIFT, R1_ZERO} r1_src_e;
  typedef enum logic [1:0] {R2_HOLD, R2_A, R2_B, R2_Q} r2_src_e;
  typedef enum logic [1:0] {OPND_A, OPND_B, OPND_ROUTE} r3_opnd_e;
  typedef enum logic [1:0] {M_HOLD, M_A, M_B, M_STAGE} m_src_e;
  typedef enum logic [2:0] {C_HOLD, C_CARRY, C_ZERO, C_ONE, C_A} c_src_e;
  typedef enum logic [2:0] {O_NONE, O_R0, O_R1, O_R2, O_R3, O_C, O_EQ} o_src_e;
  typedef enum logic [1:0] {SEL_R0, SEL_R1, SEL_R2, SEL_R3} reg_sel_e;

  // Truth tables for the r3 load logic: r3 <= fn[{r3, x}].
  localparam logic [3:0] FN_LOAD  = 4'b1010;  // x
  localparam logic [3:0] FN_NOT   = 4'b0101;  // ~x
  localparam logic [3:0] FN_AND   = 4'b1000;
  localparam logic [3:0] FN_OR    = 4'b1110;
  localparam logic [3:0] FN_XOR   = 4'b0110;
  localparam logic [3:0] FN_XNOR  = 4'b1001;
  localparam logic [3:0] FN_HOLD  = 4'b1100;  // r3
  localparam logic [3:0] FN_INV_R3 = 4'b0011; // ~r3

  typedef struct packed {
    r0_src_e  r0_src;
    r1_src_e  r1_src;
    r2_src_e  r2_src;
    logic     r3_ld;
    r3_opnd_e r3_opnd;
    logic [3:0] r3_fn;
    m_src_e   m_src;
    c_src_e   c_src;
    logic     q_shift;   // shift r1 into the q queue tail
    logic     use_mask;  // only BPs whose m is 1 update registers
    o_src_e   o_src;
    reg_sel_e rom_hi;    // which register drives the ROM high address bit
    reg_sel_e rom_lo;    // which register drives the ROM low address bit
  } bp_ctl_t;

  // ---- Stage-level controls --------------------------------------------
  typedef enum logic [2:0] {BUS_ZERO, BUS_MEM, BUS_LBUF, BUS_ROM, BUS_O} bus_src_e;
  // Low ROM operand: a register, the single bit SC or latched carry-in, or 0.
  typedef enum logic [2:0] {LO_REG, LO_SC, LO_CI, LO_ZERO, LO_INC} rom_lo_e;  // LO_INC: board increment carry
  typedef enum logic [2:0] {SC_HOLD, SC_ROM, SC_ZERO, SC_ONE} sc_src_e;
  typedef enum logic [1:0] {RT_UP, RT_DOWN, RT_NORTH, RT_SOUTH} route_dir_e;
  typedef enum logic [1:0] {FILL_ZERO, FILL_SIGN, FILL_WRAP, FILL_NSIGN} fill_e;
  // Per-Stage mask sources, formed by the board for each Stage. MS_EXT is the
  // external mask port; the others serve floating point words, where the
  // board marks exponent Stages and each mantissa Stage looks at the R3 of
  // the exponent Stage above it (the exponent difference) or at the
  // overflow of its word's mantissa addition.
  typedef enum logic [2:0] {
    MS_EXT,    // smask_i port
    MS_EXP,    // exponent Stages
    MS_MANT,   // mantissa Stages
    MS_DNEG,   // whole floating point word whose exponent difference is < 0
    MS_DBIT,   // mantissa Stages whose exponent difference has bit `dbit` set
    MS_DBIG,   // mantissa Stages whose exponent difference is 32..127
    MS_OVF     // whole floating point word whose mantissa addition overflowed
  } mask_src_e;

  typedef struct packed {
    bp_ctl_t    bp;
    bus_src_e   a_src;
    bus_src_e   b_src;
    logic       mem_a_we;   // A memory <= O bus
    logic       mem_b_we;   // B memory <= O bus
    rom_lo_e    rom_lo_mode;
    sc_src_e    sc_src;
    logic       ci_ld;      // latch the board carry into the Stage CI flag
    logic       word_cin;   // carry into the least significant Stage of a word
    route_dir_e route_dir;
    logic [1:0] route_dist; // shift distance 2**route_dist (1, 2, 4, 8)
    fill_e      fill;       // what enters at the ends of a word
    logic       cond_mul;   // update only if R1 bit 0 is 1 (shift-add multiply)
    logic       sticky_clr;
    mask_src_e  mask_sel;   // source of the Stage mask bit loaded into m
    logic       gate_en;    // update only Stages whose gate_sel bit is 1
    mask_src_e  gate_sel;
    logic [2:0] dbit;       // bit of the exponent difference for MS_DBIT
  } stage_uc_t;

  localparam stage_uc_t UC_NOP = '0;

  // ---- Sequencer commands ----------------------------------------------
  typedef enum logic [3:0] {
    OP_NOP, OP_LOAD, OP_READ, OP_ADD, OP_SUB, OP_ADDL, OP_SUBL,
    OP_LOGIC, OP_LOGIC_R3, OP_SHIFT, OP_MUL, OP_MICRO, OP_FADD
  } op_e;

  typedef struct packed {
    op_e        op;
    logic       bank_b;     // OP_LOAD / OP_READ: 0 = A memory, 1 = B memory
    logic [3:0] fn;         // OP_LOGIC: truth table
    logic       dir_down;   // OP_SHIFT: 1 = towards the LSB
    fill_e      fill;       // OP_SHIFT: end fill
    logic [5:0] shamt;      // OP_SHIFT: distance in bits
    stage_uc_t  micro;      // OP_MICRO: raw microinstruction
  } cmd_t;

endpackage
