// lw_sequencer: expands two-address operations into Stage micro-operations.
//
// A command names an operation and two memory addresses: OP1 in the A
// memory, OP2 in the B memory. The sequencer then drives one microinstruction
// per machine cycle to the board. The micro-operation sequences and their
// lengths follow the document where it gives them:
//   OP_ADD     3 cycles  R2<-A[op1], R3<-B[op2]; SC,R2<-ROM[R2,R3]; A[op1]<-R2
//   OP_SUB     4 cycles  R2<-A[op1], R3<-~B[op2], SC<-1; SC,R3<-ROM[R3,SC];
//                        SC,R2<-ROM[R2,R3]; A[op1]<-R2
//   OP_ADDL  R+3 cycles  long-word add: load; ROM add with the look-ahead
//                        carries latched; one correcting ROM add (R2+CI);
//                        R-1 increments by the carry from the previous
//                        board (R = N_BOARDS, one cycle per board); store.
//                        4 cycles on one board.
//   OP_SUBL    6 cycles  long-word subtract: load with R3<-~B; R3+1 across the
//                        word (two cycles, as for a long add); add (two); store
//   OP_LOGIC   3 cycles  R3<-A[op1]; R3<-fn(R3, B[op2]); A[op1]<-R3
//   OP_LOGIC_R3 1 cycle  R3<-fn(R3, B[op2]) (first operand already in R3)
//   OP_MUL    19 cycles  1 load (R1 multiplier, R2 multiplicand, R0 and SC
//                        cleared), 8 x (conditional SC,R0<-ROM[R0,R2], shift
//                        SC,R0,R1 right), 2 stores: A[op1]<-low, B[op2]<-high
//   OP_SHIFT   one cycle per power-of-two step of the distance (8, 4, 2, 1)
//   OP_LOAD    2 cycles  R3<-L buffer; A or B [op1]<-R3
//   OP_READ    2 cycles  R3<-A or B [op1]; R3 on the O bus (rd_valid_o)
//   OP_MICRO   1 cycle   the command's own microinstruction
//   OP_FADD   26 cycles  floating point add, A[op1] <- A[op1] + B[op2], on
//                        words of an exponent Stage above mantissa Stages
//                        (board fp_exp_i / word_lsb_i). Exponent difference
//                        d = ex - ey in the exponent Stage's R3 (5 cycles);
//                        where d < 0 swap X and Y and negate d (5, masked);
//                        align the smaller operand's mantissa by d with masked
//                        sign-filling shifts of 1, 2, 4, 8, 8 selected by the
//                        bits of d, and three of 8 when d >= 32 (9); mantissa
//                        add with look-ahead (3, result in R3, overflow to m);
//                        renormalise overflowed words: mantissa down 1 with
//                        the carry as new sign, exponent + 1 (2); store (2).
//                        The document counts 16 cycles (5, 5, 3, 2, 1) and
//                        leaves out the swap; its layouts were not available,
//                        so the swap, the 16/32 shift steps and the
//                        two-cycle store are this design's. Results are not
//                        renormalised after cancellation, the shifted-out
//                        bits only set the sticky flag (no rounding), and
//                        exponent overflow is not detected.
// OP_ADD/OP_SUB/OP_MUL work per Stage (8-bit words, unsigned product);
// OP_ADDL/OP_SUBL use the word configuration of the board. OP_LOGIC's
// three steps, OP_SUBL, the product's store addresses and the shift steps
// are this design's reading of the document. Handshake: a command is taken
// when cmd_valid_i and cmd_ready_o are both high; ready is low while a
// sequence runs; done_o is high in the cycle of its last micro-operation.
// Two assertions bound the step counter and tie done_o to a running
// sequence; their `disable iff (!rst_n)` is why the linter sees rst_n used
// both as the asynchronous reset and in clocked logic.
module lw_sequencer
  import rcs_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned N_BOARDS  = 1,  // boards a long word may span (at most 29)
  localparam int unsigned AW = $clog2(MEM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid_i,
  output logic          cmd_ready_o,
  input  cmd_t          cmd_i,
  input  logic [AW-1:0] op1_i,
  input  logic [AW-1:0] op2_i,
  output stage_uc_t     uc_o,
  output logic [AW-1:0] addr_a_o,
  output logic [AW-1:0] addr_b_o,
  output logic          done_o,
  output logic          rd_valid_o
);

  logic          busy;
  logic [4:0]    step;
  cmd_t          cmd;
  logic [AW-1:0] op1, op2;
  logic [5:0]    rem;        // shift distance still to go
  logic [1:0]    sh_log;     // log2 of this cycle's shift step
  logic          last;

  assign cmd_ready_o = !busy;
  assign addr_a_o    = op1;
  // OP_LOAD and OP_READ name one word, op1, in whichever bank they use.
  assign addr_b_o    = (cmd.op == OP_LOAD || cmd.op == OP_READ) ? op1 : op2;

  always_comb begin
    if (rem >= 6'd8)      sh_log = 2'd3;
    else if (rem[2])      sh_log = 2'd2;
    else if (rem[1])      sh_log = 2'd1;
    else                  sh_log = 2'd0;
  end

  // Microinstruction for (operation, step).
  always_comb begin
    stage_uc_t u;
    u          = UC_NOP;
    last       = 1'b0;
    rd_valid_o = 1'b0;
    if (busy) begin
      unique case (cmd.op)
        OP_LOAD: begin
          if (step == 0) begin
            u.a_src = BUS_LBUF;
            u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
          end else begin
            u.bp.o_src = O_R3;
            u.mem_a_we = !cmd.bank_b;
            u.mem_b_we = cmd.bank_b;
            last = 1'b1;
          end
        end
        OP_READ: begin
          if (step == 0) begin
            u.a_src = BUS_MEM; u.b_src = BUS_MEM;
            u.bp.r3_ld = 1'b1; u.bp.r3_fn = FN_LOAD;
            u.bp.r3_opnd = cmd.bank_b ? OPND_B : OPND_A;
          end else begin
            u.bp.o_src = O_R3;
            rd_valid_o = 1'b1;
            last = 1'b1;
          end
        end
        OP_ADD: begin
          unique case (step)
            5'd0: begin
              u.a_src = BUS_MEM; u.b_src = BUS_MEM;
              u.bp.r2_src = R2_A;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = FN_LOAD;
            end
            5'd1: begin
              u.bp.rom_hi = SEL_R2; u.bp.rom_lo = SEL_R3; u.rom_lo_mode = LO_REG;
              u.a_src = BUS_ROM; u.bp.r2_src = R2_A; u.sc_src = SC_ROM;
            end
            default: begin
              u.bp.o_src = O_R2; u.mem_a_we = 1'b1; last = 1'b1;
            end
          endcase
        end
        OP_SUB: begin
          unique case (step)
            5'd0: begin
              u.a_src = BUS_MEM; u.b_src = BUS_MEM;
              u.bp.r2_src = R2_A;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = FN_NOT;
              u.sc_src = SC_ONE;
            end
            5'd1: begin
              u.bp.rom_hi = SEL_R3; u.rom_lo_mode = LO_SC;
              u.a_src = BUS_ROM; u.sc_src = SC_ROM;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
            end
            5'd2: begin
              u.bp.rom_hi = SEL_R2; u.bp.rom_lo = SEL_R3; u.rom_lo_mode = LO_REG;
              u.a_src = BUS_ROM; u.bp.r2_src = R2_A; u.sc_src = SC_ROM;
            end
            default: begin
              u.bp.o_src = O_R2; u.mem_a_we = 1'b1; last = 1'b1;
            end
          endcase
        end
        OP_ADDL: begin
          if (step == 5'd0) begin
            u.a_src = BUS_MEM; u.b_src = BUS_MEM;
            u.bp.r2_src = R2_A;
            u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = FN_LOAD;
          end else if (step == 5'd1) begin
            u.bp.rom_hi = SEL_R2; u.bp.rom_lo = SEL_R3; u.rom_lo_mode = LO_REG;
            u.a_src = BUS_ROM; u.bp.r2_src = R2_A; u.sc_src = SC_ROM;
            u.ci_ld = 1'b1;
          end else if (step == 5'd2) begin
            u.bp.rom_hi = SEL_R2; u.rom_lo_mode = LO_CI;
            u.a_src = BUS_ROM; u.bp.r2_src = R2_A;
          end else if (int'(step) < int'(N_BOARDS) + 2) begin  // board-to-board carry
            u.bp.rom_hi = SEL_R2; u.rom_lo_mode = LO_INC;
            u.a_src = BUS_ROM; u.bp.r2_src = R2_A;
          end else begin
            u.bp.o_src = O_R2; u.mem_a_we = 1'b1; last = 1'b1;
          end
        end
        OP_SUBL: begin
          unique case (step)
            5'd0: begin
              u.a_src = BUS_MEM; u.b_src = BUS_MEM;
              u.bp.r2_src = R2_A;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = FN_NOT;
            end
            5'd1: begin  // R3 + 1 at the word's low end: look-ahead carries
              u.bp.rom_hi = SEL_R3; u.rom_lo_mode = LO_ZERO;
              u.word_cin = 1'b1; u.ci_ld = 1'b1;
            end
            5'd2: begin
              u.bp.rom_hi = SEL_R3; u.rom_lo_mode = LO_CI; u.a_src = BUS_ROM;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
            end
            5'd3: begin
              u.bp.rom_hi = SEL_R2; u.bp.rom_lo = SEL_R3; u.rom_lo_mode = LO_REG;
              u.a_src = BUS_ROM; u.bp.r2_src = R2_A; u.sc_src = SC_ROM;
              u.ci_ld = 1'b1;
            end
            5'd4: begin
              u.bp.rom_hi = SEL_R2; u.rom_lo_mode = LO_CI;
              u.a_src = BUS_ROM; u.bp.r2_src = R2_A;
            end
            default: begin
              u.bp.o_src = O_R2; u.mem_a_we = 1'b1; last = 1'b1;
            end
          endcase
        end
        OP_LOGIC: begin
          unique case (step)
            5'd0: begin
              u.a_src = BUS_MEM;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
            end
            5'd1: begin
              u.b_src = BUS_MEM;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = cmd.fn;
            end
            default: begin
              u.bp.o_src = O_R3; u.mem_a_we = 1'b1; last = 1'b1;
            end
          endcase
        end
        OP_LOGIC_R3: begin
          u.b_src = BUS_MEM;
          u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = cmd.fn;
          last = 1'b1;
        end
        OP_SHIFT: begin
          u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_ROUTE; u.bp.r3_fn = FN_LOAD;
          u.route_dir  = cmd.dir_down ? RT_DOWN : RT_UP;
          u.route_dist = sh_log;
          u.fill       = cmd.fill;
          u.sticky_clr = (step == 0);
          last = (rem <= (6'd1 << sh_log));
        end
        OP_MUL: begin
          if (step == 0) begin
            u.a_src = BUS_MEM; u.b_src = BUS_MEM;
            u.bp.r1_src = R1_A; u.bp.r2_src = R2_B; u.bp.r0_src = R0_ZERO;
            u.sc_src = SC_ZERO;
          end else if (step <= 5'd16 && step[0]) begin  // conditional add
            u.bp.rom_hi = SEL_R0; u.bp.rom_lo = SEL_R2; u.rom_lo_mode = LO_REG;
            u.a_src = BUS_ROM; u.bp.r0_src = R0_A; u.sc_src = SC_ROM;
            u.cond_mul = 1'b1;
          end else if (step <= 5'd16) begin            // shift SC,R0,R1 right
            u.bp.r0_src = R0_SHIFT; u.bp.r1_src = R1_SHIFT; u.sc_src = SC_ZERO;
          end else if (step == 5'd17) begin
            u.bp.o_src = O_R1; u.mem_a_we = 1'b1;
          end else begin
            u.bp.o_src = O_R0; u.mem_b_we = 1'b1; last = 1'b1;
          end
        end
        OP_FADD: begin
          // Floating point add (see the header): exponent difference,
          // operand swap, alignment, mantissa add, renormalisation, store.
          unique case (step)
            5'd0: begin  // R2 <- X, R3 <- Y in every Stage
              u.a_src = BUS_MEM; u.b_src = BUS_MEM; u.bp.r2_src = R2_A;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = FN_LOAD;
            end
            5'd1: begin  // R0 <- Y, kept for the swap
              u.bp.o_src = O_R3; u.a_src = BUS_O; u.bp.r0_src = R0_A;
            end
            5'd2, 5'd7: begin  // exponent: R3 <- ~R3, SC <- 1
              u.gate_en = 1'b1; u.gate_sel = MS_EXP; u.bp.use_mask = (step == 5'd7);
              u.bp.r3_ld = 1'b1; u.bp.r3_fn = FN_INV_R3; u.sc_src = SC_ONE;
            end
            5'd3, 5'd8: begin  // exponent: R3 <- R3 + SC
              u.gate_en = 1'b1; u.gate_sel = MS_EXP; u.bp.use_mask = (step == 5'd8);
              u.bp.rom_hi = SEL_R3; u.rom_lo_mode = LO_SC; u.a_src = BUS_ROM;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
            end
            5'd4, 5'd9: begin  // exponent: R3 <- R2 + R3, the difference
              u.gate_en = 1'b1; u.gate_sel = MS_EXP; u.bp.use_mask = (step == 5'd9);
              u.bp.rom_hi = SEL_R2; u.bp.rom_lo = SEL_R3; u.rom_lo_mode = LO_REG;
              u.a_src = BUS_ROM;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
            end
            5'd5: begin  // words with a negative difference: m <- 1, R3 <- X
              u.bp.m_src = M_STAGE; u.mask_sel = MS_DNEG;
              u.gate_en = 1'b1; u.gate_sel = MS_DNEG;
              u.bp.o_src = O_R2; u.a_src = BUS_O;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
            end
            5'd6: begin  // ... and R2 <- Y
              u.bp.use_mask = 1'b1;
              u.bp.o_src = O_R0; u.a_src = BUS_O; u.bp.r2_src = R2_A;
            end
            5'd10, 5'd11, 5'd12, 5'd13, 5'd14, 5'd15, 5'd16, 5'd17, 5'd18: begin
              // alignment: mantissa R3 shifted down 1, 2, 4, 8, 8 (bits 0-4
              // of the difference) and 8, 8, 8 (difference of 32 or more)
              u.gate_en  = 1'b1;
              u.gate_sel = (step >= 5'd16) ? MS_DBIG : MS_DBIT;
              u.dbit     = (step >= 5'd14) ? 3'd4 : 3'(step - 5'd10);
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_ROUTE; u.bp.r3_fn = FN_LOAD;
              u.route_dir = RT_DOWN; u.fill = FILL_SIGN;
              u.route_dist = (step >= 5'd13) ? 2'd3 : 2'(step - 5'd10);
              u.sticky_clr = (step == 5'd10);
            end
            5'd19: begin  // mantissa: R1 <- R2 + R3 with look-ahead carries
              u.gate_en = 1'b1; u.gate_sel = MS_MANT;
              u.bp.rom_hi = SEL_R2; u.bp.rom_lo = SEL_R3; u.rom_lo_mode = LO_REG;
              u.a_src = BUS_ROM; u.bp.r1_src = R1_A; u.ci_ld = 1'b1;
            end
            5'd20: begin  // mantissa: R1 <- R1 + CI
              u.gate_en = 1'b1; u.gate_sel = MS_MANT;
              u.bp.rom_hi = SEL_R1; u.rom_lo_mode = LO_CI;
              u.a_src = BUS_ROM; u.bp.r1_src = R1_A;
            end
            5'd21: begin  // mantissa: R3 <- R1; m <- overflow of the word
              u.gate_en = 1'b1; u.gate_sel = MS_MANT;
              u.bp.m_src = M_STAGE; u.mask_sel = MS_OVF;
              u.bp.o_src = O_R1; u.a_src = BUS_O;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
            end
            5'd22: begin  // overflowed words: mantissa down 1, SC <- 1
              u.bp.use_mask = 1'b1;
              u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_ROUTE; u.bp.r3_fn = FN_LOAD;
              u.route_dir = RT_DOWN; u.route_dist = 2'd0; u.fill = FILL_NSIGN;
              u.sc_src = SC_ONE;
            end
            5'd23: begin  // overflowed words: exponent R2 <- R2 + SC
              u.bp.use_mask = 1'b1; u.gate_en = 1'b1; u.gate_sel = MS_EXP;
              u.bp.rom_hi = SEL_R2; u.rom_lo_mode = LO_SC;
              u.a_src = BUS_ROM; u.bp.r2_src = R2_A;
            end
            5'd24: begin  // store the mantissa Stages' R3
              u.gate_en = 1'b1; u.gate_sel = MS_MANT;
              u.bp.o_src = O_R3; u.mem_a_we = 1'b1;
            end
            default: begin  // store the exponent Stages' R2
              u.gate_en = 1'b1; u.gate_sel = MS_EXP;
              u.bp.o_src = O_R2; u.mem_a_we = 1'b1; last = 1'b1;
            end
          endcase
        end
        OP_MICRO: begin
          u = cmd.micro;
          last = 1'b1;
        end
        default: last = 1'b1;
      endcase
    end
    uc_o = u;
  end

  assign done_o = busy && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
      cmd  <= '0;
      op1  <= '0;
      op2  <= '0;
      rem  <= '0;
    end else if (!busy) begin
      if (cmd_valid_i) begin
        busy <= 1'b1;
        step <= '0;
        cmd  <= cmd_i;
        op1  <= op1_i;
        op2  <= op2_i;
        rem  <= cmd_i.shamt;
      end
    end else begin
      step <= step + 5'd1;
      if (cmd.op == OP_SHIFT)
        rem <= (rem > (6'd1 << sh_log)) ? rem - (6'd1 << sh_log) : 6'd0;
      if (last) busy <= 1'b0;
    end
  end

  // A sequence never runs past the multiply's 19 cycles; done only while busy.
  a_step_bound: assert property (@(posedge clk) disable iff (!rst_n) busy |-> int'(step) <= ((N_BOARDS + 2 > 25) ? N_BOARDS + 2 : 25));
  a_done_busy:  assert property (@(posedge clk) disable iff (!rst_n) done_o |-> busy);

endmodule
