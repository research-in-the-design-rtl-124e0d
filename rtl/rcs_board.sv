// rcs_board: a board of eight Stages coupled into long words.
//
// All Stages receive the same microinstruction. `word_lsb_i[i]` marks Stage
// i as the least significant Stage of a word, so the board works as eight
// 8-bit processors, four 16-bit, two 32-bit or one 64-bit processor (or any
// mix). The word configuration decides three things:
// * carries: the board carry look-ahead (board_cla) gives every Stage the
//   carry from the Stages below it in its own word; the word's lowest Stage
//   gets the microinstruction's `word_cin`;
// * routing: inside a word each Stage's up/down neighbour is the next
//   Stage's R3; at the word's ends the microinstruction's fill applies:
//   zero, the sign (copies of the top bit, upward end only) or the other
//   end of the word (rotate);
// * detection: the Stage zero and equivalence flags are cascaded upward
//   through each word; the value at a word's top Stage covers the word.
// The O buses of all Stages also feed a sum-or tree (the OR of all 64 O
// bits). North and south R3 bytes come from the neighbouring words of a
// linear array of boards and are ports here.
// Floating point words: `fp_exp_i[i]` marks Stage i as the exponent Stage
// of a floating point word whose mantissa fills the Stages below it down to
// the next exponent Stage (configure word_lsb_i so the mantissa and the
// exponent are separate words). For every Stage the board forms two mask
// bits from the microinstruction's `mask_sel` (loaded into m) and
// `gate_sel` (a direct Stage enable when `gate_en`): the external mask,
// exponent or mantissa Stage, the sign, a chosen bit, or bits 5-6 of the
// exponent difference held in the exponent Stage's R3, or the overflow of
// the mantissa sum seen at the top mantissa Stage. FILL_NSIGN fills the
// upward word end with the complement of the top bit, which renormalises
// an overflowed sum.
// Words longer than a board: the look-ahead of an addition starts each
// board from carry 0; `board_cout_o` gives the top Stage's carry out. A
// second look-ahead (propagate = the ROM high operand is all ones, no
// generate) carries `board_cin_i`, the carry from the previous board,
// through the bottom word in a cycle whose ROM low operand is LO_INC, and
// board_cout_o then gives the carry that increment passes on.
// The document gives 8 Stages per
// board, look-ahead at board level, the cascaded zero/equivalence outputs
// and the shift kinds; the segmenting into words is this design's choice.
// Timing: as the Stage; everything between the Stages is combinational.
module rcs_board
  import rcs_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned N         = N_STAGES,
  localparam int unsigned AW       = $clog2(MEM_DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  stage_uc_t              uc,
  input  logic [AW-1:0]          addr_a,
  input  logic [AW-1:0]          addr_b,
  input  logic [4:0]             qlen_i,
  input  logic [N-1:0]           word_lsb_i,
  input  logic [N-1:0]           smask_i,
  input  logic [N-1:0]           fp_exp_i,     // exponent Stages of floating point words
  input  logic [N*STAGE_W-1:0]   lbuf_i,
  input  logic [N*STAGE_W-1:0]   north_i,
  input  logic [N*STAGE_W-1:0]   south_i,
  input  logic                   board_cin_i,  // carry rippled in from the previous board
  output logic [N*STAGE_W-1:0]   r3_o,         // also to the north/south boards
  output logic [N*STAGE_W-1:0]   o_o,
  output logic                   sum_or_o,
  output logic [N-1:0]           zero_o,       // cascaded within each word
  output logic [N-1:0]           eq_o,         // cascaded within each word
  output logic [N-1:0]           cout_o,       // carry out of each Stage
  output logic [N-1:0]           v_o,
  output logic [N-1:0]           sc_o,
  output logic [N-1:0]           sticky_o,
  output logic                   board_cout_o  // carry out of the top Stage (see header)
);

  logic [STAGE_W-1:0] r3 [N];
  logic [STAGE_W-1:0] up [N];
  logic [STAGE_W-1:0] down [N];
  logic [N-1:0] p, g, cin, zero, eq, msb, ovf, smask, gate, pinc, cinc, coutinc;

  // Mask sources for Stage i, from the exponent Stage e at or above it.
  function automatic logic msrc(mask_src_e sel, int i, logic [2:0] bit_k,
                                logic [N-1:0] ext, logic [N-1:0] isexp,
                                logic [N-1:0] ov, logic [STAGE_W-1:0] r3v [N]);
    int e;
    logic [STAGE_W-1:0] d;
    e = -1;
    for (int k = N - 1; k >= i; k--) if (isexp[k]) e = k;
    d = (e >= 0) ? r3v[e] : '0;
    unique case (sel)
      MS_EXT:  return ext[i];
      MS_EXP:  return isexp[i];
      MS_MANT: return !isexp[i];
      MS_DNEG: return (e >= 0) && d[STAGE_W-1];
      MS_DBIT: return (e >= 0) && !isexp[i] && d[bit_k];
      MS_DBIG: return (e >= 0) && !isexp[i] && !d[STAGE_W-1] && (d[6] || d[5]);
      MS_OVF:  return (e >= 1) && ov[e-1];
      default: return 1'b0;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) begin
      smask[i] = msrc(uc.mask_sel, i, uc.dbit, smask_i, fp_exp_i, ovf, r3);
      gate[i]  = !uc.gate_en || msrc(uc.gate_sel, i, uc.dbit, smask_i, fp_exp_i, ovf, r3);
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      msb[i] = (i == N - 1) || word_lsb_i[(i+1) % N];
  end

  // Neighbour bytes with the word-end fill.
  always_comb begin
    int lo, hi;
    for (int i = 0; i < N; i++) begin
      lo = 0;
      for (int k = 0; k <= i; k++) if (word_lsb_i[k]) lo = k;
      hi = N - 1;
      for (int k = N - 1; k >= i; k--) if (msb[k]) hi = k;
      if (!msb[i])                 up[i] = r3[(i+1) % N];
      else if (uc.fill == FILL_WRAP) up[i] = r3[lo];
      else if (uc.fill == FILL_SIGN) up[i] = {STAGE_W{r3[i][STAGE_W-1]}};
      else if (uc.fill == FILL_NSIGN) up[i] = {STAGE_W{!r3[i][STAGE_W-1]}};
      else                         up[i] = '0;
      if (!(word_lsb_i[i] || i == 0)) down[i] = r3[(i+N-1) % N];
      else if (uc.fill == FILL_WRAP)  down[i] = r3[hi];
      else                            down[i] = '0;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    stage #(.MEM_DEPTH(MEM_DEPTH)) u_stage (
      .clk, .rst_n, .uc, .addr_a, .addr_b, .qlen_i,
      .lbuf_i  (lbuf_i[i*STAGE_W +: STAGE_W]),
      .smask_i (smask[i]),
      .gate_i  (gate[i]),
      .up_i    (up[i]),
      .down_i  (down[i]),
      .north_i (north_i[i*STAGE_W +: STAGE_W]),
      .south_i (south_i[i*STAGE_W +: STAGE_W]),
      .cin_i   (cin[i]),
      .cinc_i  (cinc[i]),
      .r3_o    (r3[i]),
      .o_o     (o_o[i*STAGE_W +: STAGE_W]),
      .sc_o    (sc_o[i]),
      .zero_o  (zero[i]),
      .eq_o    (eq[i]),
      .p_o     (p[i]),
      .g_o     (g[i]),
      .v_o     (v_o[i]),
      .sticky_o(sticky_o[i]),
      .ovf_o   (ovf[i]),
      .pinc_o  (pinc[i])
    );
    assign r3_o[i*STAGE_W +: STAGE_W] = r3[i];
  end

  board_cla #(.N(N)) u_cla (
    .p_i(p), .g_i(g), .lsb_i(word_lsb_i), .cin_i(uc.word_cin),
    .board_cin_i(1'b0), .c_o(cin), .cout_o);

  // Increment look-ahead: adds the carry rippled in from the previous board
  // to the word that continues from it (Stage 0 not a word start). A Stage
  // passes the carry on when its byte is all ones; nothing is generated.
  board_cla #(.N(N)) u_inc (
    .p_i(pinc), .g_i('0), .lsb_i(word_lsb_i), .cin_i(1'b0),
    .board_cin_i, .c_o(cinc), .cout_o(coutinc));

  assign board_cout_o = (uc.rom_lo_mode == LO_INC) ? coutinc[N-1] : cout_o[N-1];

  // Cascaded zero and equivalence detection.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (i == 0 || word_lsb_i[i]) begin
        zero_o[i] = zero[i];
        eq_o[i]   = eq[i];
      end else begin
        zero_o[i] = zero[i] && zero_o[i-1];
        eq_o[i]   = eq[i] && eq_o[i-1];
      end
    end
  end

  assign sum_or_o = |o_o;

endmodule
