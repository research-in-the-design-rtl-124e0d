// tb_rcs_top: end-to-end run of a board and its sequencer at full size.
//
// The top is used with its default parameters. Operands enter through the
// L-buffer (OP_LOAD) and results leave through the O bus (OP_READ). The test
// runs, with expected values computed here:
// * eight independent 8-bit processors: add (3 cycles), subtract (4),
//   unsigned multiply (19), logic (3, and 1 with the operand in R3);
// * long words of 64 and 32 bits: add with look-ahead carry correction (4
//   cycles), subtract (6), shifts of random distance with zero, sign and
//   rotate fill and the sticky bit;
// * vertical (bit-serial) mode: 64 BPs each add their own 8-bit numbers
//   stored as bit planes, using the BP full adder and carry register;
// * Stage masking, the north route, the q queue and the word zero detect;
// * floating point add on two 32-bit words (8-bit exponent Stage above three
//   mantissa Stages) against an integer model of the same algorithm and
//   against real arithmetic within two units in the last place, covering
//   the operand swap, overflow renormalisation, far-apart exponents and the
//   sticky bit.
// Each mechanism's occurrences are counted; one that never happened counts
// as a failure.
module tb_rcs_top;
  import rcs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, ready, done, rd_valid;
  cmd_t cmd;
  logic [9:0] op1, op2;
  logic [4:0] qlen;
  logic [7:0] fpexp = 8'h00;
  logic [7:0] lsb, smask, zero, eq, cout, v, sc, sticky;
  logic [63:0] lbuf, north, south, r3, o;
  logic sum_or;
  int checks = 0, failures = 0;

  rcs_top dut (
    .clk, .rst_n, .cmd_valid_i(valid), .cmd_ready_o(ready), .cmd_i(cmd), .op1_i(op1),
    .op2_i(op2), .done_o(done), .rd_valid_o(rd_valid), .qlen_i(qlen), .word_lsb_i(lsb),
    .smask_i(smask), .fp_exp_i(fpexp), .lbuf_i(lbuf), .north_i(north), .south_i(south), .board_cin_i(1'b0),
    .r3_o(r3), .o_bus_o(o), .sum_or_o(sum_or), .zero_o(zero), .eq_o(eq), .cout_o(cout),
    .v_o(v), .sc_o(sc), .sticky_o(sticky), .board_cout_o());

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_cla_prop, n_mul_skip, n_mask, n_fill_sign, n_fill_wrap, n_fill_zero, n_sticky,
      n_overflow, n_north, n_queue, n_vertical, n_word_zero, n_logic_r3, n_sum_or,
      n_fp_swap, n_fp_renorm, n_fp_far, n_fp_sticky;

  // Floating point reference: 8-bit exponent above a 24-bit two's
  // complement mantissa (value = mantissa * 2^(exponent - 23)).
  function automatic logic [31:0] fp_ref(logic [31:0] x, logic [31:0] y, output bit st,
                                          output bit swp, output bit ren);
    int ex, ey, d, mx, my, sum;
    ex = int'($signed(x[31:24])); ey = int'($signed(y[31:24]));
    mx = int'($signed(x[23:0]));  my = int'($signed(y[23:0]));
    d = ex - ey;
    swp = (d < 0);
    if (swp) begin int t; t = mx; mx = my; my = t; t = ex; ex = ey; ey = t; d = -d; end
    st = (d >= 31) ? (my != 0 && my != -1) || (my == -1 && d > 0) : ((my & ((1 << d) - 1)) != 0);
    if (d >= 31) my = (my < 0) ? -1 : 0; else my = my >>> d;
    sum = mx + my;
    ren = (sum > 8388607) || (sum < -8388608);
    if (ren) begin st |= sum[0]; sum = sum >>> 1; ex++; end
    return {8'(ex), 24'(sum)};
  endfunction

  function automatic real pow2(int k);
    real r = 1.0;
    for (int i = 0; i < k; i++) r = r * 2.0;
    for (int i = 0; i > k; i--) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp_val(logic [31:0] f);
    int m, ex;
    m = int'($signed(f[23:0])); ex = int'($signed(f[31:24]));
    return real'(m) * pow2(ex - 23);
  endfunction

  function automatic logic [31:0] fp_rand(int emin, int emax);
    logic [23:0] m;
    m = 24'($urandom);
    m[22] = !m[23];                           // normalised: |m| in [1/2, 1)
    return {8'($urandom_range(emin + 64, emax + 64) - 64), m};
  endfunction

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Issue one command; returns the number of cycles it took; captures the
  // O bus if it was a read.
  logic [63:0] rd_data;
  logic [7:0]  last_v;
  task automatic issue(cmd_t c, int a1, int a2, output int cycles);
    @(negedge clk);
    while (!ready) @(negedge clk);
    cmd = c; op1 = 10'(a1); op2 = 10'(a2); valid = 1'b1;
    @(posedge clk); #1;
    valid = 1'b0;
    cycles = 0;
    forever begin
      cycles++;
      if (rd_valid) rd_data = o;
      if (done) begin last_v = v; break; end
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
  endtask

  task automatic op(op_e opc, int a1, int a2, int exp_cycles);
    cmd_t c = '0;
    int cy;
    c.op = opc;
    issue(c, a1, a2, cy);
    chk($sformatf("%s cycles", opc.name()), 64'(cy), 64'(exp_cycles));
  endtask

  task automatic load(logic bank_b, int addr, logic [63:0] d);
    cmd_t c = '0;
    int cy;
    c.op = OP_LOAD; c.bank_b = bank_b;
    lbuf = d;
    issue(c, addr, 0, cy);
  endtask

  task automatic read(logic bank_b, int addr, output logic [63:0] d);
    cmd_t c = '0;
    int cy;
    c.op = OP_READ; c.bank_b = bank_b;
    issue(c, addr, 0, cy);
    d = rd_data;
  endtask

  task automatic micro(stage_uc_t u, int a1, int a2);
    cmd_t c = '0;
    int cy;
    c.op = OP_MICRO; c.micro = u;
    issue(c, a1, a2, cy);
  endtask

  function automatic logic [63:0] per_word(logic [63:0] x, logic [63:0] y, int wbytes, bit sub);
    logic [63:0] r = '0, m;
    for (int w = 0; w < 8 / wbytes; w++) begin
      m = (wbytes == 8) ? '1 : (((64'd1 << (8 * wbytes)) - 1) << (8 * wbytes * w));
      r |= (sub ? ((x & m) - (y & m)) : ((x & m) + (y & m))) & m;
    end
    return r;
  endfunction

  initial begin
    logic [63:0] x, y, got, hi, e;
    stage_uc_t u;
    cmd = '0; op1 = '0; op2 = '0; qlen = 5'd4; lsb = 8'hff; smask = 8'hff;
    lbuf = '0; north = '0; south = '0;
    {n_cla_prop, n_mul_skip, n_mask, n_fill_sign, n_fill_wrap, n_fill_zero, n_sticky,
     n_overflow, n_north, n_queue, n_vertical, n_word_zero, n_logic_r3, n_sum_or,
     n_fp_swap, n_fp_renorm, n_fp_far, n_fp_sticky} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- Eight 8-bit processors ---------------------------------------
    lsb = 8'hff;
    for (int n = 0; n < 12; n++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      if (n == 0) begin x = 64'h7f7f_7f7f_8080_8080; y = x; end
      load(0, 10, x); load(1, 20, y);
      op(OP_ADD, 10, 20, 3);
      read(0, 10, got);
      chk("8-bit add", got, per_word(x, y, 1, 0));
      // Overflow flags of the same addition, sampled in the ROM cycle.
      load(0, 13, x);
      u = UC_NOP; u.a_src = BUS_MEM; u.b_src = BUS_MEM; u.bp.r2_src = R2_A;
      u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = FN_LOAD;
      micro(u, 13, 20);
      u = UC_NOP; u.bp.rom_hi = SEL_R2; u.bp.rom_lo = SEL_R3;
      micro(u, 0, 0);
      for (int i = 0; i < 8; i++) begin
        automatic int s = $signed(x[8*i +: 8]) + $signed(y[8*i +: 8]);
        chk("overflow flag", 64'(last_v[i]), 64'(s > 127 || s < -128));
        n_overflow += last_v[i];
      end
      load(0, 11, x);
      op(OP_SUB, 11, 20, 4);
      read(0, 11, got);
      chk("8-bit subtract", got, per_word(x, y, 1, 1));
      load(0, 12, x); load(1, 22, y);
      op(OP_MUL, 12, 22, 19);
      read(0, 12, got); read(1, 22, hi);
      for (int i = 0; i < 8; i++) begin
        chk("8x8 multiply", {hi[8*i +: 8], got[8*i +: 8]}, 64'(16'(x[8*i +: 8]) * 16'(y[8*i +: 8])));
        n_mul_skip += 8 - $countones(x[8*i +: 8]);
      end
    end
    // Logic: OP1 from memory (3 cycles), then with OP1 already in R3 (1 cycle).
    for (int f = 0; f < 16; f++) begin
      automatic cmd_t c = '0;
      int cy;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      load(0, 30, x); load(1, 31, y);
      c.op = OP_LOGIC; c.fn = 4'(f);
      issue(c, 30, 31, cy);
      chk("logic cycles", 64'(cy), 3);
      for (int i = 0; i < 64; i++) e[i] = f[{x[i], y[i]}];
      read(0, 30, got);
      chk("logic", got, e);
      // R3 now holds e (read leaves the word in R3): R3 <- fn(R3, B[31]).
      c.op = OP_LOGIC_R3;
      issue(c, 0, 31, cy);
      chk("logic in R3 cycles", 64'(cy), 1);
      for (int i = 0; i < 64; i++) e[i] = f[{e[i], y[i]}];
      chk("logic in R3", r3, e);
      n_logic_r3++;
    end

    // ---- Long words: 64-bit and 32-bit ----------------------------------
    for (int n = 0; n < 16; n++) begin
      automatic int wb = (n % 2) ? 4 : 8;
      lsb = (wb == 8) ? 8'h01 : 8'h11;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      if (n % 4 < 2) y = ~x + 64'd3;      // carry through many Stages
      load(0, 40, x); load(1, 41, y);
      op(OP_ADDL, 40, 41, 4);
      read(0, 40, got);
      chk($sformatf("%0d-bit add", 8 * wb), got, per_word(x, y, wb, 0));
      begin
        automatic int cyb = 0;
        for (int i = 0; i < 8; i++) begin
          int s8;
          if (lsb[i]) cyb = 0;
          s8 = int'(x[8*i +: 8]) + int'(y[8*i +: 8]);
          if (cyb == 1 && s8 == 255 && i < 7 && !lsb[i+1]) n_cla_prop++;
          cyb = (s8 + cyb) > 255;
        end
      end
      load(0, 42, x);
      op(OP_SUBL, 42, 41, 6);
      read(0, 42, got);
      chk($sformatf("%0d-bit subtract", 8 * wb), got, per_word(x, y, wb, 1));
    end

    // Shifts of a 64-bit word.
    lsb = 8'h01;
    for (int n = 0; n < 30; n++) begin
      automatic cmd_t c = '0;
      int cy, d;
      logic lost;
      x = {$urandom, $urandom};
      if (n % 2) x[63] = 1'b1;
      load(0, 50, x);
      read(0, 50, got);         // leaves x in R3
      d = $urandom_range(1, 63);
      c.op = OP_SHIFT; c.shamt = 6'(d); c.dir_down = 1'(n % 3 != 0);
      c.fill = fill_e'(n % 3);
      issue(c, 0, 0, cy);
      chk("shift cycles", 64'(cy), 64'(d / 8 + $countones(d % 8)));
      if (!c.dir_down)               e = (c.fill == FILL_WRAP) ? ((x << d) | (x >> (64 - d))) : (x << d);
      else if (c.fill == FILL_WRAP)  e = (x >> d) | (x << (64 - d));
      else if (c.fill == FILL_SIGN)  e = 64'($signed(x) >>> d);
      else                           e = x >> d;
      chk($sformatf("shift %0d %s %s", d, c.dir_down ? "down" : "up", c.fill.name()), r3, e);
      if (c.dir_down) begin
        lost = |(x & ((64'd1 << d) - 1));
        chk("sticky", sticky[0], lost);
        n_sticky += lost;
      end
      case (c.fill) FILL_SIGN: n_fill_sign++; FILL_WRAP: n_fill_wrap++; default: n_fill_zero++; endcase
      if (r3 == 0) begin chk("word zero", zero[7], 1); n_word_zero++; end
      else chk("word zero", zero[7], 0);
    end
    // A shift that clears the whole word: the word zero detect sees it.
    begin
      automatic cmd_t c = '0;
      int cy;
      load(0, 51, 64'h00ff_0000_0000_0000);
      read(0, 51, got);
      c.op = OP_SHIFT; c.shamt = 6'd63; c.dir_down = 1'b1; c.fill = FILL_ZERO;
      issue(c, 0, 0, cy);
      chk("shifted out", r3, 0);
      chk("word zero", zero[7], 1);
      n_word_zero++;
    end

    // ---- Vertical mode: 64 bit-serial 8-bit additions ------------------
    begin
      logic [7:0] xa [64], yb [64], s;
      logic [63:0] plane;
      lsb = 8'hff;
      for (int p = 0; p < 64; p++) begin xa[p] = 8'($urandom); yb[p] = 8'($urandom); end
      for (int k = 0; k < 8; k++) begin
        for (int p = 0; p < 64; p++) plane[p] = xa[p][k];
        load(0, 100 + k, plane);
        for (int p = 0; p < 64; p++) plane[p] = yb[p][k];
        load(1, 200 + k, plane);
      end
      u = UC_NOP; u.bp.c_src = C_ZERO;
      micro(u, 0, 0);
      for (int k = 0; k < 8; k++) begin
        u = UC_NOP; u.a_src = BUS_MEM; u.b_src = BUS_MEM; u.bp.r2_src = R2_A;
        u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_B; u.bp.r3_fn = FN_LOAD;
        micro(u, 100 + k, 200 + k);
        u = UC_NOP; u.bp.r1_src = R1_SUM; u.bp.c_src = C_CARRY;
        micro(u, 0, 0);
        u = UC_NOP; u.bp.o_src = O_R1; u.mem_a_we = 1'b1;
        micro(u, 300 + k, 0);
      end
      for (int k = 0; k < 8; k++) begin
        read(0, 300 + k, plane);
        for (int p = 0; p < 64; p++) s = xa[p] + yb[p];
        for (int p = 0; p < 64; p++) begin
          s = xa[p] + yb[p];
          chk("bit-serial sum plane", 64'(plane[p]), 64'(s[k]));
        end
      end
      n_vertical++;
    end

    // ---- q queue: r1 -> q -> r2 with length 6 ---------------------------
    begin
      logic [63:0] pat [10];
      qlen = 5'd6;
      for (int k = 0; k < 10; k++) begin
        pat[k] = {$urandom, $urandom};
        lbuf = pat[k];
        u = UC_NOP; u.a_src = BUS_LBUF; u.bp.r1_src = R1_A;
        micro(u, 0, 0);
        u = UC_NOP; u.bp.q_shift = 1'b1; u.bp.r2_src = R2_Q;
        micro(u, 0, 0);
        if (k >= 6) begin
          u = UC_NOP; u.bp.o_src = O_R2;
          cmd = '0; cmd.op = OP_MICRO; cmd.micro = u;
          @(negedge clk); valid = 1; @(posedge clk); #1; valid = 0;
          chk("queue delay", o, pat[k-6]);
          @(posedge clk); #1;
          n_queue++;
        end
      end
      qlen = 5'd4;
    end

    // ---- Stage masking and the north route ------------------------------
    begin
      lsb = 8'hff;
      lbuf = 64'h1111_1111_1111_1111;
      u = UC_NOP; u.a_src = BUS_LBUF; u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
      micro(u, 0, 0);
      smask = 8'b1010_0110;
      u = UC_NOP; u.bp.m_src = M_STAGE;
      micro(u, 0, 0);
      north = {$urandom, $urandom};
      u = UC_NOP; u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_ROUTE; u.bp.r3_fn = FN_LOAD;
      u.route_dir = RT_NORTH; u.bp.use_mask = 1'b1;
      micro(u, 0, 0);
      for (int i = 0; i < 8; i++) e[8*i +: 8] = smask[i] ? north[8*i +: 8] : 8'h11;
      chk("masked north route", r3, e);
      n_mask++; n_north++;
      smask = 8'hff;
    end

    // Sum-or of the O bus.
    begin
      u = UC_NOP; u.bp.o_src = O_R3;
      cmd = '0; cmd.op = OP_MICRO; cmd.micro = u;
      @(negedge clk); valid = 1; @(posedge clk); #1; valid = 0;
      chk("sum-or", sum_or, |r3);
      n_sum_or += sum_or;
      @(posedge clk); #1;
    end

    // ---- Floating point add: two 32-bit words per board ------------------
    lsb = 8'b1001_1001; fpexp = 8'b1000_1000;
    for (int n = 0; n < 120; n++) begin
      logic [31:0] fx [2], fy [2], fe [2];
      bit st [2], swp [2], ren [2];
      for (int w = 0; w < 2; w++) begin
        fx[w] = fp_rand(-40, 40); fy[w] = fp_rand(-40, 40);
        case (n % 4)
          0: fy[w][31:24] = fx[w][31:24];                          // equal exponents
          1: fy[w][31:24] = 8'(int'($signed(fx[w][31:24])) + $urandom_range(0, 3) - 1);
          default: ;
        endcase
        if (n % 8 == 0) begin fx[w][23:22] = 2'b01; fy[w][23:22] = 2'b01; end  // overflow
        fe[w] = fp_ref(fx[w], fy[w], st[w], swp[w], ren[w]);
      end
      load(0, 30, {fx[1], fx[0]}); load(1, 31, {fy[1], fy[0]});
      op(OP_FADD, 30, 31, 26);
      e = {24'h0, sticky[4], 3'b0, sticky[0]};
      read(0, 30, got);
      for (int w = 0; w < 2; w++) begin
        real exact, res, ulp;
        chk("fadd", got[32*w +: 32], fe[w]);
        chk("fadd sticky", e[4*w], st[w]);
        exact = fp_val(fx[w]) + fp_val(fy[w]);
        res   = fp_val(got[32*w +: 32]);
        ulp   = pow2(int'($signed(got[32*w+24 +: 8])) - 23);
        checks++;
        if (res - exact > 2.0 * ulp || exact - res > 2.0 * ulp) begin
          failures++;
          if (failures < 20) $display("FAIL fadd value %g + %g = %g, got %g", fp_val(fx[w]), fp_val(fy[w]), exact, res);
        end
        n_fp_swap += swp[w]; n_fp_renorm += ren[w]; n_fp_sticky += st[w];
        if ((int'($signed(fx[w][31:24])) - int'($signed(fy[w][31:24]))) >= 32 ||
            (int'($signed(fy[w][31:24])) - int'($signed(fx[w][31:24]))) >= 32) n_fp_far++;
      end
    end
    fpexp = 8'h00; lsb = 8'hff;

    // ---- Every mechanism must have happened ------------------------------
    $display("mechanisms: cla_prop=%0d mul_skip=%0d mask=%0d fill_sign=%0d fill_wrap=%0d fill_zero=%0d sticky=%0d overflow=%0d north=%0d queue=%0d vertical=%0d word_zero=%0d logic_r3=%0d sum_or=%0d fp_swap=%0d fp_renorm=%0d fp_far=%0d fp_sticky=%0d",
             n_cla_prop, n_mul_skip, n_mask, n_fill_sign, n_fill_wrap, n_fill_zero, n_sticky,
             n_overflow, n_north, n_queue, n_vertical, n_word_zero, n_logic_r3, n_sum_or,
             n_fp_swap, n_fp_renorm, n_fp_far, n_fp_sticky);
    begin
      automatic int cnt [18] = '{n_cla_prop, n_mul_skip, n_mask, n_fill_sign, n_fill_wrap, n_fill_zero,
                       n_sticky, n_overflow, n_north, n_queue, n_vertical, n_word_zero,
                       n_logic_r3, n_sum_or, n_fp_swap, n_fp_renorm, n_fp_far, n_fp_sticky};
      for (int i = 0; i < 18; i++) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
