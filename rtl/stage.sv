// stage: one Stage, the 8-bit atom of horizontal-mode operation.
//
// Eight Bit Processors side by side make the Stage registers R0-R3 and M
// and the 8-bit A, B and O buses. Around them sit the A and B memory banks,
// the 64K x 9 ADD ROM, the routing logic, a Stage carry register SC and the
// status flags (zero, equivalence, carry propagate/generate, overflow).
//
// Buses: A and B each carry zero, their own memory bank, the L-buffer byte,
// the ROM sum or the O bus; O carries one BP register per bit (selected in
// the microinstruction) and is written to either memory bank.
// ADD ROM: the high address byte is one of R0-R3; the low byte is one of
// R0-R3, zero, or the single bit SC or CI in bit 0 (for "+1" and for carry
// correction). SC can take the ROM carry. CI latches the carry that the
// board's look-ahead logic computes for this Stage (`cin_i`) in the cycle
// after an addition, so the next cycle can add it in.
// Product register: R0, R1 and SC form a 17-bit register that shifts one
// place towards R1's low end with R0/R1 source R*_SHIFT (SC enters R0 bit 7,
// R0 bit 0 enters R1 bit 7), as the document's iterative multiply needs.
// With `cond_mul` set the BPs and SC update only when R1 bit 0 is 1, which
// gives the multiply's conditional add. `gate_i` (from the board) likewise
// holds the whole Stage when low. `ovf_o` tells whether R1 has the other
// sign from both R2 and R3, the overflow test of a mantissa sum R1 = R2 + R3.
// For a carry rippled in from another board the ROM's low operand can be
// `cinc_i` (LO_INC), the carry of a board-wide increment; `pinc_o` (the high
// operand is all ones) is the propagate the board uses for it.
// Masking: the Stage mask bit `smask_i` loads every BP's m (M_STAGE); with
// `use_mask` set, BPs with m = 0 hold their registers, and SC, the memory
// writes and the sticky flag follow when the BPs' m bits are all 0.
// Sticky: when R3 is loaded from a downward route, a 1 shifted out of the
// low end of the Stage sets `sticky_o`; `sticky_clr` drops the old value
// (the bit shifted out in that same cycle still counts). At the least
// significant Stage of a word this is the guard ("sticky") bit of an
// alignment shift.
// The document gives the registers, buses, ROM, P/G rule and masking; the
// microword encoding, the CI latch, the gating rules and the reset are this
// design's choices. Timing: registers and memory writes at the rising edge;
// memories and ROM read combinationally, so one micro-operation per cycle.
module stage
  import rcs_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 1024,
  localparam int unsigned AW = $clog2(MEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  stage_uc_t          uc,
  input  logic [AW-1:0]      addr_a,
  input  logic [AW-1:0]      addr_b,
  input  logic [4:0]         qlen_i,
  input  logic [STAGE_W-1:0] lbuf_i,   // L-buffer byte
  input  logic               smask_i,  // Stage-level mask bit (loads m)
  input  logic               gate_i,   // Stage enable from the board
  input  logic [STAGE_W-1:0] up_i,     // routing neighbours (R3 bytes)
  input  logic [STAGE_W-1:0] down_i,
  input  logic [STAGE_W-1:0] north_i,
  input  logic [STAGE_W-1:0] south_i,
  input  logic               cin_i,    // carry from the board look-ahead
  input  logic               cinc_i,   // carry of a board-wide increment (LO_INC)
  output logic [STAGE_W-1:0] r3_o,
  output logic [STAGE_W-1:0] o_o,      // O bus (also to the sum-or tree)
  output logic               sc_o,
  output logic               zero_o,
  output logic               eq_o,
  output logic               p_o,
  output logic               g_o,
  output logic               v_o,
  output logic               sticky_o,
  output logic               ovf_o,    // R1 differs in sign from R2 and R3
  output logic               pinc_o    // ROM high operand is all ones
);

  logic [STAGE_W-1:0] a_bus, b_bus, o_bus, mem_a_q, mem_b_q, route;
  logic [STAGE_W-1:0] r0, r1, r2, r3, m, eq_bits, rom_hi, rom_lo_r, rom_lo;
  logic [STAGE_W-1:0] r0_hi, r1_hi;
  logic [STAGE_W:0]   rom_q;
  logic               sc, ci, sticky, en, active, lost;

  assign en     = (!uc.cond_mul || r1[0]) && gate_i;
  assign active = en && (!uc.bp.use_mask || (|m));

  function automatic logic [STAGE_W-1:0] bus_mux(bus_src_e s, logic [STAGE_W-1:0] mem,
                                                 logic [STAGE_W-1:0] lb, logic [STAGE_W-1:0] rs,
                                                 logic [STAGE_W-1:0] ob);
    unique case (s)
      BUS_MEM:  return mem;
      BUS_LBUF: return lb;
      BUS_ROM:  return rs;
      BUS_O:    return ob;
      default:  return '0;
    endcase
  endfunction

  assign a_bus = bus_mux(uc.a_src, mem_a_q, lbuf_i, rom_q[STAGE_W-1:0], o_bus);
  assign b_bus = bus_mux(uc.b_src, mem_b_q, lbuf_i, rom_q[STAGE_W-1:0], o_bus);

  // Product register shift path: SC -> R0[7] ... R0[0] -> R1[7] ... R1[0].
  assign r0_hi = {sc, r0[STAGE_W-1:1]};
  assign r1_hi = {r0[0], r1[STAGE_W-1:1]};

  for (genvar i = 0; i < STAGE_W; i++) begin : g_bp
    bit_processor u_bp (
      .clk, .rst_n,
      .ctl      (uc.bp),
      .en_i     (en),
      .qlen_i,
      .a_i      (a_bus[i]),
      .b_i      (b_bus[i]),
      .route_i  (route[i]),
      .smask_i,
      .r0_hi_i  (r0_hi[i]),
      .r1_hi_i  (r1_hi[i]),
      .o_o      (o_bus[i]),
      .r0_o     (r0[i]),
      .r1_o     (r1[i]),
      .r2_o     (r2[i]),
      .r3_o     (r3[i]),
      .m_o      (m[i]),
      .eq_o     (eq_bits[i]),
      .rom_hi_o (rom_hi[i]),
      .rom_lo_o (rom_lo_r[i])
    );
  end

  always_comb begin
    unique case (uc.rom_lo_mode)
      LO_SC:   rom_lo = STAGE_W'(sc);
      LO_CI:   rom_lo = STAGE_W'(ci);
      LO_ZERO: rom_lo = '0;
      LO_INC:  rom_lo = STAGE_W'(cinc_i);
      default: rom_lo = rom_lo_r;
    endcase
  end

  add_rom #(.AW(2*STAGE_W)) u_rom (.addr({rom_hi, rom_lo}), .data(rom_q));

  mem_bank #(.DEPTH(MEM_DEPTH), .WIDTH(STAGE_W)) u_mem_a (
    .clk, .addr(addr_a), .we(uc.mem_a_we && active), .wdata(o_bus), .rdata(mem_a_q));
  mem_bank #(.DEPTH(MEM_DEPTH), .WIDTH(STAGE_W)) u_mem_b (
    .clk, .addr(addr_b), .we(uc.mem_b_we && active), .wdata(o_bus), .rdata(mem_b_q));

  stage_router u_route (
    .r3_i(r3), .up_i, .down_i, .north_i, .south_i,
    .dir_i(uc.route_dir), .dist_i(uc.route_dist), .route_o(route), .lost_o(lost));

  stage_flags u_flags (
    .r3_i(r3), .eq_bits_i(eq_bits), .rom_hi_i(rom_hi), .rom_lo_i(rom_lo),
    .rom_data_i(rom_q), .zero_o, .eq_o, .p_o, .g_o, .v_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc     <= 1'b0;
      ci     <= 1'b0;
      sticky <= 1'b0;
    end else begin
      if (active) begin
        unique case (uc.sc_src)
          SC_ROM:  sc <= rom_q[STAGE_W];
          SC_ZERO: sc <= 1'b0;
          SC_ONE:  sc <= 1'b1;
          default: ;
        endcase
      end
      if (uc.ci_ld) ci <= cin_i;
      sticky <= (sticky && !uc.sticky_clr) |
                (lost && active && uc.bp.r3_ld && uc.bp.r3_opnd == OPND_ROUTE &&
                 uc.route_dir == RT_DOWN);
    end
  end

  assign r3_o     = r3;
  assign o_o      = o_bus;
  assign sc_o     = sc;
  assign sticky_o = sticky;
  assign pinc_o   = &rom_hi;
  // Two's complement overflow of R1 = R2 + R3, seen at the top bit.
  assign ovf_o    = (r1[STAGE_W-1] != r2[STAGE_W-1]) && (r1[STAGE_W-1] != r3[STAGE_W-1]);

endmodule
