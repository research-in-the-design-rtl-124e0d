// stage_flags: Stage-level status signals.
//
// * zero: R3 holds zero (used to stop floating point alignment shifts and
//   for long-word tests); cascaded along a word by the board.
// * eq: every BP's r3 equals its m, the Stage form of the bit-wise
//   equivalence; also cascaded by the board.
// * p / g: carry propagate and generate of the last ROM addition. As the
//   document defines them, p is the AND of the eight ROM sum bits and g is
//   the ROM carry out; the board's look-ahead logic uses them.
// * v: two's complement overflow of the ROM addition (operands of equal sign
//   giving a sum of the other sign). The document only says overflow
//   detection will be needed; this rule is this design's choice.
// g_o is the ROM carry bit unchanged, so it has no logic of its own here.
// Combinational.
module stage_flags
  import rcs_pkg::*;
(
  input  logic [STAGE_W-1:0] r3_i,
  input  logic [STAGE_W-1:0] eq_bits_i,  // per-BP r3 == m
  input  logic [STAGE_W-1:0] rom_hi_i,   // ROM operands
  input  logic [STAGE_W-1:0] rom_lo_i,
  input  logic [STAGE_W:0]   rom_data_i, // {carry, sum}
  output logic               zero_o,
  output logic               eq_o,
  output logic               p_o,
  output logic               g_o,
  output logic               v_o
);

  logic s_msb;

  assign s_msb  = rom_data_i[STAGE_W-1];
  assign zero_o = (r3_i == '0);
  assign eq_o   = &eq_bits_i;
  assign p_o    = &rom_data_i[STAGE_W-1:0];
  assign g_o    = rom_data_i[STAGE_W];
  assign v_o    = (rom_hi_i[STAGE_W-1] == rom_lo_i[STAGE_W-1]) &&
                  (s_msb != rom_hi_i[STAGE_W-1]);

endmodule
