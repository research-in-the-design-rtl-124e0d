// tb_bit_processor: random-stimulus check of one Bit Processor.
//
// Every cycle a random legal microinstruction and random input bits are
// applied; a behavioural model kept in this testbench (registers r0-r3, m,
// c and a 16-deep queue list) predicts the registers and the combinational
// outputs, which are compared after each clock. A few directed cases first
// check the full adder truth table and the queue delay for every length.
module tb_bit_processor;
  import rcs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  bp_ctl_t ctl;
  logic en, a, b, route, smask, r0_hi, r1_hi;
  logic [4:0] qlen;
  logic o, r0_o, r1_o, r2_o, r3_o, m_o, eq, rom_hi, rom_lo;
  int checks = 0, failures = 0;

  bit_processor dut (
    .clk, .rst_n, .ctl, .en_i(en), .qlen_i(qlen), .a_i(a), .b_i(b), .route_i(route),
    .smask_i(smask), .r0_hi_i(r0_hi), .r1_hi_i(r1_hi), .o_o(o), .r0_o, .r1_o, .r2_o,
    .r3_o, .m_o, .eq_o(eq), .rom_hi_o(rom_hi), .rom_lo_o(rom_lo));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  bit mr0, mr1, mr2, mr3, mm, mc;
  bit mq [$];

  task automatic check(string what, logic got, bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic bit qhead(int len);
    // element len-1 counted from the newest (front)
    return (mq.size() >= len) ? mq[len-1] : 1'b0;
  endfunction

  task automatic model_step();
    bit x, s, cy, upd, nr0, nr1, nr2, nr3, nm, nc;
    s  = mr2 ^ mr3 ^ mc;
    cy = (mr2 & mr3) | (mr2 & mc) | (mr3 & mc);
    x  = (ctl.r3_opnd == OPND_A) ? a : (ctl.r3_opnd == OPND_B) ? b : route;
    upd = en && (!ctl.use_mask || mm);
    {nr0, nr1, nr2, nr3, nm, nc} = {mr0, mr1, mr2, mr3, mm, mc};
    case (ctl.m_src) M_A: nm = a; M_B: nm = b; M_STAGE: nm = smask; default: ; endcase
    if (upd) begin
      case (ctl.r0_src) R0_A: nr0 = a; R0_B: nr0 = b; R0_SHIFT: nr0 = r0_hi; R0_ZERO: nr0 = 0; default: ; endcase
      case (ctl.r1_src) R1_A: nr1 = a; R1_B: nr1 = b; R1_SUM: nr1 = s; R1_SHIFT: nr1 = r1_hi;
                        R1_ZERO: nr1 = 0; default: ; endcase
      case (ctl.r2_src) R2_A: nr2 = a; R2_B: nr2 = b; R2_Q: nr2 = qhead(int'(qlen)); default: ; endcase
      if (ctl.r3_ld) nr3 = ctl.r3_fn[{mr3, x}];
      case (ctl.c_src) C_CARRY: nc = cy; C_ZERO: nc = 0; C_ONE: nc = 1; C_A: nc = a; default: ; endcase
      if (ctl.q_shift) begin
        mq.push_front(mr1);
        if (mq.size() > QMAX) void'(mq.pop_back());
      end
    end
    {mr0, mr1, mr2, mr3, mm, mc} = {nr0, nr1, nr2, nr3, nm, nc};
  endtask

  function automatic bit sel(reg_sel_e s);
    case (s) SEL_R0: return mr0; SEL_R1: return mr1; SEL_R2: return mr2; default: return mr3; endcase
  endfunction

  task automatic check_outputs();
    bit exp_o;
    check("r0", r0_o, mr0); check("r1", r1_o, mr1); check("r2", r2_o, mr2);
    check("r3", r3_o, mr3); check("m", m_o, mm); check("eq", eq, mr3 == mm);
    case (ctl.o_src)
      O_R0: exp_o = mr0; O_R1: exp_o = mr1; O_R2: exp_o = mr2; O_R3: exp_o = mr3;
      O_C: exp_o = mc; O_EQ: exp_o = (mr3 == mm); default: exp_o = 0;
    endcase
    check("o", o, exp_o);
    check("rom_hi", rom_hi, sel(ctl.rom_hi));
    check("rom_lo", rom_lo, sel(ctl.rom_lo));
  endtask

  task automatic random_ctl();
    ctl = '0;
    ctl.r0_src  = r0_src_e'($urandom_range(0, 4));
    ctl.r1_src  = r1_src_e'($urandom_range(0, 5));
    ctl.r2_src  = r2_src_e'($urandom_range(0, 3));
    ctl.r3_ld   = 1'($urandom);
    ctl.r3_opnd = r3_opnd_e'($urandom_range(0, 2));
    ctl.r3_fn   = 4'($urandom);
    ctl.m_src   = m_src_e'($urandom_range(0, 3));
    ctl.c_src   = c_src_e'($urandom_range(0, 4));
    ctl.q_shift = 1'($urandom);
    ctl.use_mask = ($urandom_range(0, 3) == 0);
    ctl.o_src   = o_src_e'($urandom_range(0, 6));
    ctl.rom_hi  = reg_sel_e'($urandom_range(0, 3));
    ctl.rom_lo  = reg_sel_e'($urandom_range(0, 3));
    {a, b, route, smask, r0_hi, r1_hi} = 6'($urandom);
    en = ($urandom_range(0, 7) != 0);
  endtask

  // Apply ctl for one clock and compare.
  task automatic cycle();
    @(negedge clk);
    check_outputs();       // combinational outputs for this ctl, old state
    model_step();
    @(posedge clk);
    #1;
  endtask

  initial begin
    ctl = '0; en = 1; qlen = 5'd4;
    {a, b, route, smask, r0_hi, r1_hi} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // After reset every register reads 0.
    check("reset r3", r3_o, 1'b0); check("reset m", m_o, 1'b0);

    // Directed: the full adder truth table (r2, r3, c) -> r1, c.
    for (int v = 0; v < 8; v++) begin
      ctl = '0; ctl.r2_src = R2_A; ctl.r3_ld = 1; ctl.r3_opnd = OPND_B; ctl.r3_fn = FN_LOAD;
      ctl.c_src = C_ONE; a = v[2]; b = v[1];
      if (!v[0]) ctl.c_src = C_ZERO;
      cycle();
      ctl = '0; ctl.r1_src = R1_SUM; ctl.c_src = C_CARRY;
      cycle();
      check("fa sum", r1_o, ^v[2:0]);
      ctl = '0; ctl.o_src = O_C;
      #1;
      check("fa carry", o, (v[2] & v[1]) | (v[2] & v[0]) | (v[1] & v[0]));
    end

    // Directed: the queue delays r1 by qlen shifts, for every length.
    for (int len = QMIN; len <= QMAX; len++) begin
      bit pat [$];
      qlen = 5'(len);
      for (int k = 0; k < len + 4; k++) begin
        pat.push_back(1'($urandom));
        ctl = '0; ctl.r1_src = R1_A; a = pat[k];
        cycle();
        ctl = '0; ctl.q_shift = 1; ctl.r2_src = R2_Q;
        cycle();
        if (k >= len) check($sformatf("queue len %0d", len), r2_o, pat[k-len]);
      end
    end

    // Random microinstructions against the model.
    for (int n = 0; n < 4000; n++) begin
      random_ctl();
      qlen = 5'($urandom_range(QMIN, QMAX));
      cycle();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
