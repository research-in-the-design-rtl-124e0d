// bit_processor: one Bit Processor (BP), the 1-bit cell of the machine.
//
// The BP follows the MPP processing element: a mask register m, a carry
// register c, a single-bit full adder taking r2, r3 and c and returning its
// sum to r1 and its carry to c, and a variable-length queue q that joins r1
// (tail) to r2 (head). Register r3 is loaded through a 16-function logic
// unit, r3 <= fn[{r3, x}], where x is the a bus, the b bus or the routing
// input; r3 also feeds the routing logic and the zero detect. The r3 == m
// equivalence is available on the o bus and as a separate output.
// Registers r0-r3 and m load from either input bus, and r0-r3, c and the
// equivalence can drive the o bus; these follow the document. Register r0
// and r1 also shift in from the next higher BP (the Stage product register),
// and r0/r1/r2/r3 can each drive the high and low ADD ROM address bits.
//
// Interface: `ctl` is the BP part of the microinstruction. `en_i` is a
// Stage-level enable (used for the conditional add of a multiply); when
// `ctl.use_mask` is set a BP whose m is 0 also leaves its registers alone.
// m itself always loads when asked, so a mask can be set while masked.
// Timing: all registers load on the rising clock edge; o_o, eq_o and the ROM
// address bits are combinational from the registers. Reset (active low,
// asynchronous) clears every register; the reset and the queue tap encoding
// are this design's choices.
module bit_processor
  import rcs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bp_ctl_t     ctl,
  input  logic        en_i,
  input  logic [4:0]  qlen_i,    // queue length, QMIN..QMAX
  input  logic        a_i,       // a bus bit
  input  logic        b_i,       // b bus bit
  input  logic        route_i,   // from the routing logic (into r3)
  input  logic        smask_i,   // Stage-level mask bit
  input  logic        r0_hi_i,   // next higher bit of the product register (r0)
  input  logic        r1_hi_i,   // next higher bit of the product register (r1)
  output logic        o_o,       // o bus bit
  output logic        r0_o,
  output logic        r1_o,
  output logic        r2_o,
  output logic        r3_o,      // to routing and zero detect
  output logic        m_o,
  output logic        eq_o,      // r3 == m
  output logic        rom_hi_o,  // high ROM address bit
  output logic        rom_lo_o   // low ROM address bit
);

  logic r0, r1, r2, r3, m, c;
  logic [QMAX-1:0] q;            // q[0] is the newest entry
  logic sum, carry, x, upd, q_head;

  assign sum   = r2 ^ r3 ^ c;
  assign carry = (r2 & r3) | (r2 & c) | (r3 & c);
  assign upd   = en_i && (!ctl.use_mask || m);

  always_comb begin
    unique case (ctl.r3_opnd)
      OPND_A:     x = a_i;
      OPND_B:     x = b_i;
      OPND_ROUTE: x = route_i;
      default:    x = 1'b0;
    endcase
  end

  // Queue head: the bit that entered qlen shifts ago.
  always_comb begin
    q_head = q[QMIN-1];
    for (int i = QMIN; i <= QMAX; i++)
      if (32'(qlen_i) == i) q_head = q[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {r0, r1, r2, r3, m, c} <= '0;
      q <= '0;
    end else begin
      unique case (ctl.m_src)
        M_A:     m <= a_i;
        M_B:     m <= b_i;
        M_STAGE: m <= smask_i;
        default: ;
      endcase
      if (upd) begin
        unique case (ctl.r0_src)
          R0_A:     r0 <= a_i;
          R0_B:     r0 <= b_i;
          R0_SHIFT: r0 <= r0_hi_i;
          R0_ZERO:  r0 <= 1'b0;
          default:  ;
        endcase
        unique case (ctl.r1_src)
          R1_A:     r1 <= a_i;
          R1_B:     r1 <= b_i;
          R1_SUM:   r1 <= sum;
          R1_SHIFT: r1 <= r1_hi_i;
          R1_ZERO:  r1 <= 1'b0;
          default:  ;
        endcase
        unique case (ctl.r2_src)
          R2_A:    r2 <= a_i;
          R2_B:    r2 <= b_i;
          R2_Q:    r2 <= q_head;
          default: ;
        endcase
        if (ctl.r3_ld) r3 <= ctl.r3_fn[{r3, x}];
        unique case (ctl.c_src)
          C_CARRY: c <= carry;
          C_ZERO:  c <= 1'b0;
          C_ONE:   c <= 1'b1;
          C_A:     c <= a_i;
          default: ;
        endcase
        if (ctl.q_shift) q <= {q[QMAX-2:0], r1};
      end
    end
  end

  assign eq_o = (r3 == m);

  always_comb begin
    unique case (ctl.o_src)
      O_R0:    o_o = r0;
      O_R1:    o_o = r1;
      O_R2:    o_o = r2;
      O_R3:    o_o = r3;
      O_C:     o_o = c;
      O_EQ:    o_o = eq_o;
      default: o_o = 1'b0;
    endcase
  end

  function automatic logic pick(reg_sel_e s, logic v0, logic v1, logic v2, logic v3);
    unique case (s)
      SEL_R0:  return v0;
      SEL_R1:  return v1;
      SEL_R2:  return v2;
      default: return v3;
    endcase
  endfunction

  assign rom_hi_o = pick(ctl.rom_hi, r0, r1, r2, r3);
  assign rom_lo_o = pick(ctl.rom_lo, r0, r1, r2, r3);
  assign {r0_o, r1_o, r2_o, r3_o, m_o} = {r0, r1, r2, r3, m};

endmodule
