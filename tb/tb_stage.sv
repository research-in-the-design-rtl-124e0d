// tb_stage: micro-operation level check of one Stage.
//
// Operands are brought in through the L-buffer and stored in the A and B
// memories, then the document's micro-operation sequences are applied one
// microinstruction per cycle: the 3-cycle add, the 4-cycle subtract, the
// 19-cycle shift-and-add multiply, bit-wise logic on R3, routing shifts with
// the sticky bit, the look-ahead carry correction through CI, Stage masking,
// the Stage gate and the mantissa overflow test. Results are read back
// through the O bus and compared with values computed here.
module tb_stage;
  import rcs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  stage_uc_t uc;
  logic [9:0] addr_a, addr_b;
  logic [7:0] lbuf, up, down, north, south, r3, o;
  logic smask, cin, sc, zero, eq, p, g, v, sticky, ovf;
  logic gate = 1'b1;
  int checks = 0, failures = 0;

  stage #(.MEM_DEPTH(1024)) dut (
    .clk, .rst_n, .uc, .addr_a, .addr_b, .qlen_i(5'd4), .lbuf_i(lbuf), .smask_i(smask), .gate_i(gate),
    .up_i(up), .down_i(down), .north_i(north), .south_i(south), .cin_i(cin),
    .r3_o(r3), .o_o(o), .sc_o(sc), .zero_o(zero), .eq_o(eq), .p_o(p), .g_o(g), .v_o(v),
    .sticky_o(sticky), .ovf_o(ovf), .cinc_i(1'b0), .pinc_o());

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Apply one microinstruction for one clock.
  task automatic uop(stage_uc_t u);
    uc = u;
    @(posedge clk);
    #1;
    uc = UC_NOP;
  endtask

  function automatic stage_uc_t r3_from(bus_src_e s, logic bank_b, logic [3:0] fn);
    stage_uc_t u = UC_NOP;
    u.a_src = s; u.b_src = s;
    u.bp.r3_ld = 1'b1; u.bp.r3_opnd = bank_b ? OPND_B : OPND_A; u.bp.r3_fn = fn;
    return u;
  endfunction

  task automatic store(logic bank_b, int addr, logic [7:0] d);
    stage_uc_t u;
    lbuf = d; addr_a = 10'(addr); addr_b = 10'(addr);
    uop(r3_from(BUS_LBUF, 1'b0, FN_LOAD));
    u = UC_NOP; u.bp.o_src = O_R3; u.mem_a_we = !bank_b; u.mem_b_we = bank_b;
    uop(u);
  endtask

  task automatic read(logic bank_b, int addr, output logic [7:0] d);
    addr_a = 10'(addr); addr_b = 10'(addr);
    uop(r3_from(BUS_MEM, bank_b, FN_LOAD));
    d = r3;
  endtask

  task automatic load_ops(int a1, int a2, logic [3:0] r3fn, sc_src_e scs);
    stage_uc_t u = UC_NOP;
    addr_a = 10'(a1); addr_b = 10'(a2);
    u.a_src = BUS_MEM; u.b_src = BUS_MEM; u.bp.r2_src = R2_A;
    u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = r3fn; u.sc_src = scs;
    uop(u);
  endtask

  function automatic stage_uc_t rom_add(reg_sel_e hi, rom_lo_e lom, reg_sel_e lo, bit to_r3);
    stage_uc_t u = UC_NOP;
    u.bp.rom_hi = hi; u.rom_lo_mode = lom; u.bp.rom_lo = lo;
    u.a_src = BUS_ROM; u.sc_src = SC_ROM;
    if (to_r3) begin u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD; end
    else u.bp.r2_src = R2_A;
    return u;
  endfunction

  function automatic stage_uc_t put_o(o_src_e s, logic bank_b);
    stage_uc_t u = UC_NOP;
    u.bp.o_src = s; u.mem_a_we = !bank_b; u.mem_b_we = bank_b;
    return u;
  endfunction

  initial begin
    logic [7:0] x, y, got, hi8;
    uc = UC_NOP; lbuf = 0; smask = 0; cin = 0;
    {up, down, north, south} = '0; addr_a = 0; addr_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Add: R2<-A[op1], R3<-B[op2]; SC,R2<-ROM[R2,R3]; A[op1]<-R2.
    for (int n = 0; n < 40; n++) begin
      x = 8'($urandom); y = 8'($urandom);
      if (n == 0) begin x = 8'h80; y = 8'h80; end
      store(0, 10, x); store(1, 20, y);
      load_ops(10, 20, FN_LOAD, SC_HOLD);
      uc = rom_add(SEL_R2, LO_REG, SEL_R3, 0);
      #1;
      chk("add p", p, 8'(x + y) == 8'hff);
      chk("add v", v, ($signed(x) + $signed(y)) > 127 || ($signed(x) + $signed(y)) < -128);
      uop(uc);
      chk("add carry", sc, (9'(x) + 9'(y)) >> 8);
      addr_a = 10;
      uop(put_o(O_R2, 0));
      read(0, 10, got);
      chk("add", got, 8'(x + y));
    end

    // Subtract: R2<-A, R3<-~B, SC<-1; SC,R3<-ROM[R3,SC]; SC,R2<-ROM[R2,R3]; store.
    for (int n = 0; n < 40; n++) begin
      x = 8'($urandom); y = 8'($urandom);
      store(0, 11, x); store(1, 21, y);
      load_ops(11, 21, FN_NOT, SC_ONE);
      uop(rom_add(SEL_R3, LO_SC, SEL_R0, 1));
      uop(rom_add(SEL_R2, LO_REG, SEL_R3, 0));
      addr_a = 11;
      uop(put_o(O_R2, 0));
      read(0, 11, got);
      chk("sub", got, 8'(x - y));
    end

    // Multiply: R1<-A, R2<-B, R0<-0, SC<-0; 8 x (conditional add, shift); store.
    for (int n = 0; n < 30; n++) begin
      stage_uc_t u;
      x = 8'($urandom); y = 8'($urandom);
      if (n == 0) begin x = 8'hff; y = 8'hff; end
      store(0, 12, x); store(1, 22, y);
      addr_a = 12; addr_b = 22;
      u = UC_NOP; u.a_src = BUS_MEM; u.b_src = BUS_MEM;
      u.bp.r1_src = R1_A; u.bp.r2_src = R2_B; u.bp.r0_src = R0_ZERO; u.sc_src = SC_ZERO;
      uop(u);
      for (int k = 0; k < 8; k++) begin
        u = UC_NOP; u.bp.rom_hi = SEL_R0; u.bp.rom_lo = SEL_R2; u.rom_lo_mode = LO_REG;
        u.a_src = BUS_ROM; u.bp.r0_src = R0_A; u.sc_src = SC_ROM; u.cond_mul = 1'b1;
        uop(u);
        u = UC_NOP; u.bp.r0_src = R0_SHIFT; u.bp.r1_src = R1_SHIFT; u.sc_src = SC_ZERO;
        uop(u);
      end
      uop(put_o(O_R1, 0));
      uop(put_o(O_R0, 1));
      read(0, 12, got); read(1, 22, hi8);
      chk("mul", {hi8, got}, 16'(x) * 16'(y));
    end

    // Logic on R3 with all 16 functions.
    for (int f = 0; f < 16; f++) begin
      logic [7:0] e;
      x = 8'($urandom); y = 8'($urandom);
      store(0, 13, x); store(1, 23, y);
      read(0, 13, got);
      addr_b = 23;
      uop(r3_from(BUS_MEM, 1'b1, 4'(f)));
      for (int i = 0; i < 8; i++) e[i] = f[{x[i], y[i]}];
      chk($sformatf("logic fn %0d", f), r3, e);
      chk("zero", zero, e == 0);
    end

    // Routing: shifts with neighbour bytes, north/south, and the sticky bit.
    for (int n = 0; n < 40; n++) begin
      stage_uc_t u;
      logic [23:0] cat;
      int d;
      x = 8'($urandom);
      store(0, 14, x);
      read(0, 14, got);
      up = 8'($urandom); down = 8'($urandom); north = 8'($urandom); south = 8'($urandom);
      u = UC_NOP; u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_ROUTE; u.bp.r3_fn = FN_LOAD;
      u.route_dir = route_dir_e'(n % 4); u.route_dist = 2'(n / 4); u.sticky_clr = 1'b1;
      d = 1 << u.route_dist;
      cat = {up, x, down};
      uop(u);
      case (n % 4)
        0: chk("route up", r3, 8'(cat >> (8 - d)));
        1: begin
          chk("route down", r3, 8'(cat >> (8 + d)));
          chk("sticky", sticky, |(x & 8'((1 << d) - 1)));
        end
        2: chk("route north", r3, north);
        default: chk("route south", r3, south);
      endcase
    end

    // Carry correction: CI latches cin, then R2 <- ROM[R2, CI].
    for (int n = 0; n < 10; n++) begin
      stage_uc_t u;
      x = (n < 5) ? 8'hff : 8'($urandom);
      store(0, 15, x);
      load_ops(15, 15, FN_LOAD, SC_HOLD);
      cin = 1'(n);
      u = UC_NOP; u.ci_ld = 1'b1;
      uop(u);
      uop(rom_add(SEL_R2, LO_CI, SEL_R0, 0));
      addr_a = 15;
      uop(put_o(O_R2, 0));
      read(0, 15, got);
      chk("carry correction", got, 8'(x + 8'(n % 2)));
    end

    // Stage mask: m <- 0 for the Stage, then a masked R3 load changes nothing.
    begin
      stage_uc_t u;
      store(0, 16, 8'h5a);
      read(0, 16, got);
      smask = 1'b0;
      u = UC_NOP; u.bp.m_src = M_STAGE;
      uop(u);
      chk("equivalence (r3 vs m=0)", eq, 8'h5a == 8'h00);
      lbuf = 8'hc3;
      u = r3_from(BUS_LBUF, 1'b0, FN_LOAD); u.bp.use_mask = 1'b1;
      uop(u);
      chk("masked", r3, 8'h5a);
      smask = 1'b1;
      u = UC_NOP; u.bp.m_src = M_STAGE;
      uop(u);
      u = r3_from(BUS_LBUF, 1'b0, FN_LOAD); u.bp.use_mask = 1'b1;
      uop(u);
      chk("unmasked", r3, 8'hc3);
      lbuf = 8'hff;
      uop(r3_from(BUS_LBUF, 1'b0, FN_LOAD));
      chk("equivalence (r3 = m = all ones)", eq, 1'b1);
    end

    // Stage gate and the R1 = R2 + R3 overflow test.
    for (int n = 0; n < 40; n++) begin
      stage_uc_t u;
      logic [7:0] r1v;
      x = 8'($urandom); y = 8'($urandom);
      if (n < 2) begin x = 8'h70; y = 8'h70; end
      store(0, 17, x); store(1, 27, y);
      gate = 1'(n % 2);
      load_ops(17, 27, FN_LOAD, SC_HOLD);
      gate = 1'b1;
      if (n % 2 == 0) begin
        chk("gated load holds", r3, y);
        continue;
      end
      u = UC_NOP; u.bp.rom_hi = SEL_R2; u.bp.rom_lo = SEL_R3; u.rom_lo_mode = LO_REG;
      u.a_src = BUS_ROM; u.bp.r1_src = R1_A;
      uop(u);
      r1v = 8'(x + y);
      chk("overflow flag", ovf, (r1v[7] != x[7]) && (r1v[7] != y[7]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
