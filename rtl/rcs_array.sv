// rcs_array: a linear array of boards, the machine built from rcs_top boards.
//
// All boards receive the same command at the same time and run the same
// micro-operations in lockstep, each with its own copy of the sequencer
// (ready, done and read-valid are taken from board 0). The boards are
// coupled in two ways:
// * across the words ("north"/"south"): board b's north neighbour is board
//   b+1 and its south neighbour board b-1, so a north or south route moves
//   every long word one board along the vector; the outer ends come from
//   the north_i / south_i ports;
// * along the words: with chain_i[b] set, the top word of board b-1
//   continues into the bottom Stages of board b (board b's Stage 0 then
//   never starts a word). The long add then ripples the carry from board to
//   board through each board's registered carry, one cycle per board, so a
//   word spanning R boards adds in R+3 cycles (4 on one board). chain_i[0]
//   takes the carry from board_cin_i. The carry out of the last board is
//   not kept: like the document's machine, this one has no overflow
//   handling.
// Only the addition carries cross boards: OP_SUBL, shifts and the cascaded
// zero/equivalence flags still act within each board, and words whose
// boards are chained should use OP_ADDL only for arithmetic.
// Per-board ports are concatenated, board 0 in the low bits. The document
// gives 8 Stages per board, rippling of carries between boards at one cycle
// per board and a nearest-neighbour connection across the words for vectors
// of long words; the number of boards (N_BOARDS, default 2), the shared
// command and this way of wiring them are this design's choices.
// Timing: as rcs_top; a carry crosses one board per clock.
module rcs_array
  import rcs_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned N_BOARDS  = 2,
  localparam int unsigned AW = $clog2(MEM_DEPTH),
  localparam int unsigned BW = N_STAGES * STAGE_W,
  localparam int unsigned NS = N_BOARDS * N_STAGES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cmd_valid_i,
  output logic                   cmd_ready_o,
  input  cmd_t                   cmd_i,
  input  logic [AW-1:0]          op1_i,
  input  logic [AW-1:0]          op2_i,
  output logic                   done_o,
  output logic                   rd_valid_o,
  input  logic [4:0]             qlen_i,
  input  logic [NS-1:0]          word_lsb_i,   // word starts, all boards
  input  logic [N_BOARDS-1:0]    chain_i,      // board b continues board b-1's top word
  input  logic [NS-1:0]          smask_i,
  input  logic [NS-1:0]          fp_exp_i,
  input  logic [N_BOARDS*BW-1:0] lbuf_i,
  input  logic [BW-1:0]          north_i,      // into the last board
  input  logic [BW-1:0]          south_i,      // into board 0
  input  logic                   board_cin_i,  // carry into board 0 when chain_i[0]
  output logic [N_BOARDS*BW-1:0] r3_o,
  output logic [N_BOARDS*BW-1:0] o_bus_o,
  output logic                   sum_or_o,     // OR of every board's O bus
  output logic [NS-1:0]          zero_o,
  output logic [NS-1:0]          eq_o,
  output logic [NS-1:0]          cout_o,
  output logic [NS-1:0]          v_o,
  output logic [NS-1:0]          sc_o,
  output logic [NS-1:0]          sticky_o
);

  logic [BW-1:0]       r3 [N_BOARDS];
  logic [N_BOARDS-1:0] ready, done, rd_valid, sum_or, bcout, bcin;

  for (genvar b = 0; b < N_BOARDS; b++) begin : g_board
    logic [N_STAGES-1:0] lsb;
    assign lsb = word_lsb_i[b*N_STAGES +: N_STAGES] & ~N_STAGES'(chain_i[b]);
    if (b == 0) begin : g_first
      assign bcin[b] = chain_i[b] && board_cin_i;
    end else begin : g_next
      assign bcin[b] = chain_i[b] && bcout[b-1];
    end

    rcs_top #(.MEM_DEPTH(MEM_DEPTH), .N_BOARDS(N_BOARDS)) u_top (
      .clk, .rst_n, .cmd_valid_i,
      .cmd_ready_o (ready[b]),
      .cmd_i, .op1_i, .op2_i,
      .done_o      (done[b]),
      .rd_valid_o  (rd_valid[b]),
      .qlen_i,
      .word_lsb_i  (lsb),
      .smask_i     (smask_i[b*N_STAGES +: N_STAGES]),
      .fp_exp_i    (fp_exp_i[b*N_STAGES +: N_STAGES]),
      .lbuf_i      (lbuf_i[b*BW +: BW]),
      .north_i     ((b == N_BOARDS - 1) ? north_i : r3[(b+1) % N_BOARDS]),
      .south_i     ((b == 0) ? south_i : r3[(b+N_BOARDS-1) % N_BOARDS]),
      .board_cin_i (bcin[b]),
      .r3_o        (r3[b]),
      .o_bus_o     (o_bus_o[b*BW +: BW]),
      .sum_or_o    (sum_or[b]),
      .zero_o      (zero_o[b*N_STAGES +: N_STAGES]),
      .eq_o        (eq_o[b*N_STAGES +: N_STAGES]),
      .cout_o      (cout_o[b*N_STAGES +: N_STAGES]),
      .v_o         (v_o[b*N_STAGES +: N_STAGES]),
      .sc_o        (sc_o[b*N_STAGES +: N_STAGES]),
      .sticky_o    (sticky_o[b*N_STAGES +: N_STAGES]),
      .board_cout_o(bcout[b])
    );
    assign r3_o[b*BW +: BW] = r3[b];
  end

  assign cmd_ready_o  = ready[0];
  assign done_o       = done[0];
  assign rd_valid_o   = rd_valid[0];
  assign sum_or_o     = |sum_or;

  // The boards' sequencers see the same commands and must stay in step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (ready == '0 || ready == '1) && (done == '0 || done == '1));

endmodule
