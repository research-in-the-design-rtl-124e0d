// tb_rcs_board: the Stages of a board working as long words.
//
// For random word configurations (which Stages start a word) it checks:
// long-word addition with the look-ahead carry correction, word shifts of
// every power-of-two distance in both directions with zero, sign and rotate
// fill, the cascaded zero and equivalence flags, and the sum-or of the O
// bus. Operands go in through the 64-bit L-buffer; expected values are
// worked out word by word here with plain integer arithmetic.
module tb_rcs_board;
  import rcs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  stage_uc_t uc;
  logic [9:0] addr_a, addr_b;
  logic [7:0] lsb, smask, zero, eq, cout, v, sc, sticky;
  logic [63:0] lbuf, r3, o;
  logic sum_or;
  int checks = 0, failures = 0;

  rcs_board #(.MEM_DEPTH(1024)) dut (
    .clk, .rst_n, .uc, .addr_a, .addr_b, .qlen_i(5'd4), .word_lsb_i(lsb), .smask_i(smask), .fp_exp_i(8'h00),
    .lbuf_i(lbuf), .north_i(64'h0), .south_i(64'h0), .board_cin_i(1'b0),
    .r3_o(r3), .o_o(o), .sum_or_o(sum_or), .zero_o(zero), .eq_o(eq), .cout_o(cout),
    .v_o(v), .sc_o(sc), .sticky_o(sticky), .board_cout_o());

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (lsb %b)", what, got, exp, lsb);
    end
  endtask

  task automatic uop(stage_uc_t u);
    uc = u;
    @(posedge clk);
    #1;
    uc = UC_NOP;
  endtask

  task automatic r3_lbuf(logic [63:0] d);
    stage_uc_t u = UC_NOP;
    lbuf = d;
    u.a_src = BUS_LBUF; u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
    uop(u);
  endtask

  task automatic store(logic bank_b, int addr, logic [63:0] d);
    stage_uc_t u = UC_NOP;
    r3_lbuf(d);
    addr_a = 10'(addr); addr_b = 10'(addr);
    u.bp.o_src = O_R3; u.mem_a_we = !bank_b; u.mem_b_we = bank_b;
    uop(u);
  endtask

  // Word boundaries: [lo, hi] Stage range of word w.
  function automatic void words(logic [7:0] l, output int nw, output int lo[8], output int hi[8]);
    nw = 0;
    for (int i = 0; i < 8; i++) begin
      if (i == 0 || l[i]) begin lo[nw] = i; nw++; end
      hi[nw-1] = i;
    end
  endfunction

  function automatic logic [63:0] field_mask(int lo, int hi);
    return ((64'd1 << (8 * (hi - lo + 1))) - 64'd1) << (8 * lo);
  endfunction

  initial begin
    logic [63:0] x, y, e;
    int nw, lo[8], hi[8];
    int seen_prop = 0;
    stage_uc_t u;
    uc = UC_NOP; lbuf = 0; smask = '1; lsb = 8'h01; addr_a = 0; addr_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Long-word add: load; SC,R2<-ROM[R2,R3] + CI latch; R2<-ROM[R2,CI]; R2 on O.
    for (int n = 0; n < 60; n++) begin
      lsb = 8'($urandom) | 8'h01;
      if (n < 4) lsb = (n == 0) ? 8'h01 : (n == 1) ? 8'h11 : (n == 2) ? 8'h55 : 8'hff;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      if (n % 3 == 0) y = ~x + 64'd1 + 64'(n);   // long carry chains
      store(0, 1, x); store(1, 2, y);
      addr_a = 1; addr_b = 2;
      u = UC_NOP; u.a_src = BUS_MEM; u.b_src = BUS_MEM; u.bp.r2_src = R2_A;
      u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = FN_LOAD;
      uop(u);
      u = UC_NOP; u.bp.rom_hi = SEL_R2; u.bp.rom_lo = SEL_R3; u.a_src = BUS_ROM;
      u.bp.r2_src = R2_A; u.sc_src = SC_ROM; u.ci_ld = 1'b1;
      begin  // count carries that pass through a whole Stage (sum byte 0xff)
        int cy;
        cy = 0;
        for (int i = 0; i < 8; i++) begin
          int s8;
          if (lsb[i]) cy = 0;
          s8 = int'(x[8*i +: 8]) + int'(y[8*i +: 8]);
          if (cy == 1 && s8 == 255 && i < 7 && !lsb[i+1]) seen_prop++;
          cy = (s8 + cy) > 255;
        end
      end
      uop(u);
      u = UC_NOP; u.bp.rom_hi = SEL_R2; u.rom_lo_mode = LO_CI; u.a_src = BUS_ROM; u.bp.r2_src = R2_A;
      uop(u);
      u = UC_NOP; u.bp.o_src = O_R2;
      uc = u; #1;
      words(lsb, nw, lo, hi);
      e = '0;
      for (int w = 0; w < nw; w++) begin
        logic [63:0] m;
        m = field_mask(lo[w], hi[w]);
        e |= (((x & m) + (y & m)) & m);
      end
      chk("long add", o, e);
      chk("sum-or", sum_or, |e);
      uop(u);
    end
    checks++;
    if (seen_prop == 0) begin failures++; $display("FAIL no carry propagated across a Stage"); end

    // Shifts: every direction, distance and fill.
    for (int n = 0; n < 200; n++) begin
      int d;
      fill_e f;
      logic down;
      lsb = 8'($urandom) | 8'h01;
      x = {$urandom, $urandom};
      r3_lbuf(x);
      d = 1 << (n % 4);
      f = fill_e'((n / 4) % 3);
      down = 1'((n / 12) % 2);
      u = UC_NOP; u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_ROUTE; u.bp.r3_fn = FN_LOAD;
      u.route_dir = down ? RT_DOWN : RT_UP; u.route_dist = 2'(n % 4); u.fill = f;
      uop(u);
      words(lsb, nw, lo, hi);
      e = '0;
      for (int w = 0; w < nw; w++) begin
        int wb, sh;
        logic [63:0] wv, r;
        logic sign;
        wb = 8 * (hi[w] - lo[w] + 1);
        sh = 8 * lo[w];
        wv = (x >> sh) & ((wb == 64) ? '1 : ((64'd1 << wb) - 1));
        sign = wv[wb-1];
        if (!down) begin
          r = wv << d;
          if (f == FILL_WRAP) r |= wv >> (wb - d);
        end else begin
          r = wv >> d;
          if (f == FILL_WRAP) r |= wv << (wb - d);
          if (f == FILL_SIGN && sign) r |= ~(64'hffff_ffff_ffff_ffff >> d);
          if (f == FILL_SIGN && sign && wb < 64) r |= ((64'd1 << wb) - 1) & ~(((64'd1 << wb) - 1) >> d);
        end
        if (wb < 64) r &= (64'd1 << wb) - 1;
        e |= r << sh;
      end
      chk($sformatf("shift %s d=%0d fill=%s", down ? "down" : "up", d, f.name()), r3, e);
    end

    // Cascaded zero / equivalence flags.
    for (int n = 0; n < 60; n++) begin
      logic [7:0] ez, ee;
      lsb = 8'($urandom) | 8'h01;
      x = '0;
      for (int i = 0; i < 8; i++) if ($urandom_range(0, 2) == 0) x[8*i +: 8] = 8'($urandom);
      smask = 8'($urandom);
      u = UC_NOP; u.bp.m_src = M_STAGE;
      uop(u);
      r3_lbuf(x);
      words(lsb, nw, lo, hi);
      for (int w = 0; w < nw; w++)
        for (int i = lo[w]; i <= hi[w]; i++) begin
          logic zall, eall;
          zall = 1; eall = 1;
          for (int k = lo[w]; k <= i; k++) begin
            zall &= (x[8*k +: 8] == 0);
            eall &= (x[8*k +: 8] == {8{smask[k]}});
          end
          ez[i] = zall; ee[i] = eall;
        end
      chk("zero cascade", zero, ez);
      chk("eq cascade", eq, ee);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
