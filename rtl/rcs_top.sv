// rcs_top: one board of the reconfigurable array with its sequencer.
//
// The board holds eight Stages (64 Bit Processors). A command with two
// memory addresses goes in on a valid/ready handshake; the sequencer turns
// it into micro-operations, one per machine cycle, that every Stage executes
// on its own byte. How the Stages join into words is set by `word_lsb_i`
// (bit i set: Stage i starts a word), so the same hardware is eight 8-bit
// processors, a 64-bit long-word processor or anything between. The same
// board also runs bit-serial (vertical mode) programs, one bit per BP per
// cycle, through OP_MICRO commands that carry a raw microinstruction.
// With `fp_exp_i` marking exponent Stages (and word_lsb_i splitting each
// floating point word into an exponent word and a mantissa word) the board
// also holds 32-bit floating point words and OP_FADD adds them.
// Everything the board cannot source itself is a port: the L-buffer bytes,
// the stage mask bits, the north/south neighbour words of a linear array of
// boards and the carry from a previous board. Outputs are the O bus (and
// its sum-or), the R3 bytes (to the neighbours), the cascaded word zero and
// equivalence flags, the carries, overflow, SC and sticky bits.
// Boards chain into longer words through board_cin_i / board_cout_o (see
// rcs_array): board_cout_o is a register, so a carry moves one board per
// cycle, and with N_BOARDS > 1 the long add waits N_BOARDS - 1 increment
// cycles for it.
// Timing: done_o is high in the cycle of a command's last micro-operation;
// its register and memory results are visible from the next cycle. rd_valid_o
// marks the cycle in which an OP_READ puts the word on o_bus_o.
module rcs_top
  import rcs_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned N_BOARDS  = 1,     // boards a long word may span (long add length)
  localparam int unsigned AW = $clog2(MEM_DEPTH),
  localparam int unsigned BW = N_STAGES * STAGE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cmd_valid_i,
  output logic                cmd_ready_o,
  input  cmd_t                cmd_i,
  input  logic [AW-1:0]       op1_i,
  input  logic [AW-1:0]       op2_i,
  output logic                done_o,
  output logic                rd_valid_o,
  input  logic [4:0]          qlen_i,
  input  logic [N_STAGES-1:0] word_lsb_i,
  input  logic [N_STAGES-1:0] smask_i,
  input  logic [N_STAGES-1:0] fp_exp_i,    // exponent Stages of floating point words
  input  logic [BW-1:0]       lbuf_i,
  input  logic [BW-1:0]       north_i,
  input  logic [BW-1:0]       south_i,
  input  logic                board_cin_i,
  output logic [BW-1:0]       r3_o,
  output logic [BW-1:0]       o_bus_o,
  output logic                sum_or_o,
  output logic [N_STAGES-1:0] zero_o,
  output logic [N_STAGES-1:0] eq_o,
  output logic [N_STAGES-1:0] cout_o,
  output logic [N_STAGES-1:0] v_o,
  output logic [N_STAGES-1:0] sc_o,
  output logic [N_STAGES-1:0] sticky_o,
  output logic                board_cout_o  // registered carry to the next board
);

  stage_uc_t     uc;
  logic [AW-1:0] addr_a, addr_b;

  logic bcout, bcarry;

  lw_sequencer #(.MEM_DEPTH(MEM_DEPTH), .N_BOARDS(N_BOARDS)) u_seq (
    .clk, .rst_n, .cmd_valid_i, .cmd_ready_o, .cmd_i, .op1_i, .op2_i,
    .uc_o(uc), .addr_a_o(addr_a), .addr_b_o(addr_b), .done_o, .rd_valid_o);

  rcs_board #(.MEM_DEPTH(MEM_DEPTH), .N(N_STAGES)) u_board (
    .clk, .rst_n, .uc, .addr_a, .addr_b, .qlen_i, .word_lsb_i, .smask_i, .fp_exp_i,
    .lbuf_i, .north_i, .south_i, .board_cin_i,
    .r3_o, .o_o(o_bus_o), .sum_or_o, .zero_o, .eq_o, .cout_o, .v_o, .sc_o, .sticky_o,
    .board_cout_o(bcout));

  // Carry passed to the next board: taken when the look-ahead carries are
  // latched (the board's own carry out) and at each increment step (the
  // carry that increment passes on, which also consumes the one received).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                    bcarry <= 1'b0;
    else if (uc.ci_ld || uc.rom_lo_mode == LO_INC) bcarry <= bcout;
  end
  assign board_cout_o = bcarry;

endmodule
