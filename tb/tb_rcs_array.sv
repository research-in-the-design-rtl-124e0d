// tb_rcs_array: the machine at full size, two boards with the default
// parameters.
//
// Operands enter through each board's L-buffer (OP_LOAD) and results leave
// through the O buses (OP_READ). Expected values are computed here from the
// word layout over all sixteen Stages. The test runs:
// * 128-bit words spanning both boards, added with the carry rippling from
//   board 0 into board 1 (N_BOARDS + 3 = 5 cycles), with and without a
//   carry into board 0;
// * random word layouts where the top word of board 0 continues into the
//   lower Stages of board 1 while other words stay within one board;
// * unchained boards each working on their own words, including the long
//   subtract and the eight 8-bit processors of every board;
// * the north and south routes moving whole 64-bit words between boards;
// * the single-board operations on both boards at once: 8-bit subtract and
//   multiply on all sixteen Stages, logic, 64-bit shifts with sign fill and
//   the sticky bit, and the floating point add on four 32-bit words (two
//   per board) against an integer model of the same algorithm.
// Each mechanism's occurrences are counted; one that never happened counts
// as a failure.
module tb_rcs_array;
  import rcs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, ready, done, rd_valid;
  cmd_t cmd;
  logic [9:0] op1, op2;
  logic [15:0] lsb, smask, zero, eq, cout, v, sc, sticky;
  logic [1:0] chain;
  logic [15:0] fpexp = 16'h0000;
  logic cin;
  logic [127:0] lbuf, r3, o;
  logic [63:0] north, south;
  logic sum_or;
  int checks = 0, failures = 0;

  rcs_array dut (
    .clk, .rst_n, .cmd_valid_i(valid), .cmd_ready_o(ready), .cmd_i(cmd), .op1_i(op1),
    .op2_i(op2), .done_o(done), .rd_valid_o(rd_valid), .qlen_i(5'd4), .word_lsb_i(lsb),
    .chain_i(chain), .smask_i(smask), .fp_exp_i(fpexp), .lbuf_i(lbuf), .north_i(north),
    .south_i(south), .board_cin_i(cin), .r3_o(r3), .o_bus_o(o), .sum_or_o(sum_or),
    .zero_o(zero), .eq_o(eq), .cout_o(cout), .v_o(v), .sc_o(sc), .sticky_o(sticky));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_cross, n_cross_far, n_cin, n_mixed, n_indep, n_north, n_south,
      n_mul, n_sticky, n_fp_swap, n_fp_renorm;

  // Floating point reference: 8-bit exponent above a 24-bit two's
  // complement mantissa; align the smaller operand with truncation, add,
  // and shift right once on mantissa overflow.
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

  function automatic logic [31:0] fp_rand();
    logic [23:0] m;
    m = 24'($urandom);
    m[22] = !m[23];
    return {8'($urandom_range(0, 80) - 40), m};
  endfunction

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %h expected %h (lsb %b chain %b)", what, got, exp, lsb, chain);
    end
  endtask

  logic [127:0] rd_data;
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
      if (done) break;
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
  endtask

  task automatic op(op_e opc, int a1, int a2, int exp_cycles);
    cmd_t c = '0;
    int cy;
    c.op = opc;
    issue(c, a1, a2, cy);
    chk($sformatf("%s cycles", opc.name()), 128'(cy), 128'(exp_cycles));
  endtask

  task automatic load(logic bank_b, int addr, logic [127:0] d);
    cmd_t c = '0;
    int cy;
    c.op = OP_LOAD; c.bank_b = bank_b;
    lbuf = d;
    issue(c, addr, 0, cy);
  endtask

  task automatic read(logic bank_b, int addr, output logic [127:0] d);
    cmd_t c = '0;
    int cy;
    c.op = OP_READ; c.bank_b = bank_b;
    issue(c, addr, 0, cy);
    d = rd_data;
  endtask

  task automatic micro(stage_uc_t u);
    cmd_t c = '0;
    int cy;
    c.op = OP_MICRO; c.micro = u;
    issue(c, 0, 0, cy);
  endtask

  // Word starts over the sixteen Stages as the array sees them.
  function automatic logic [15:0] starts();
    logic [15:0] s = lsb;
    s[0] = !chain[0];
    if (chain[1]) s[8] = 1'b0;
    return s;
  endfunction

  // Word-by-word sum or difference over the whole array; the first word
  // takes the external carry when board 0 is chained to it.
  function automatic logic [127:0] ref_op(logic [127:0] x, logic [127:0] y, bit sub);
    logic [15:0] s = starts();
    logic [127:0] r = '0;
    int lo = 0;
    for (int i = 0; i < 16; i++) begin
      if (i == 15 || s[i+1]) begin
        logic [127:0] m;
        m = ((i == 15 && lo == 0) ? '1 : ((128'd1 << (8 * (i + 1 - lo))) - 128'd1)) << (8 * lo);
        if (sub) r |= ((x & m) - (y & m)) & m;
        else     r |= ((x & m) + (y & m) + ((lo == 0 && chain[0] && cin) ? 128'd1 : 128'd0)) & m;
        lo = i + 1;
      end
    end
    return r;
  endfunction

  initial begin
    logic [127:0] x, y, got, e;
    stage_uc_t u;
    cmd = '0; op1 = '0; op2 = '0; lsb = 16'h0101; smask = '1; chain = 2'b00; cin = 1'b0;
    lbuf = '0; north = '0; south = '0;
    {n_cross, n_cross_far, n_cin, n_mixed, n_indep, n_north, n_south,
     n_mul, n_sticky, n_fp_swap, n_fp_renorm} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- 128-bit words across both boards ------------------------------
    for (int n = 0; n < 40; n++) begin
      lsb = 16'h0101; chain = (n % 4 == 3) ? 2'b11 : 2'b10; cin = (n % 8 == 3);
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      if (n % 2 == 0) y = ~x + 128'(n);           // long carry chains
      if (n % 5 == 1) y = (~x & {64'h0, 64'hffff_ffff_ffff_ffff}) + 128'd1 + (128'($urandom) << 64);
      load(0, 10, x); load(1, 11, y);
      op(OP_ADDL, 10, 11, 5);
      read(0, 10, got);
      e = ref_op(x, y, 0);
      chk("128-bit add", got, e);
      if ({1'b0, x[63:0]} + {1'b0, y[63:0]} + 65'(chain[0] && cin) > 65'h0_ffff_ffff_ffff_ffff)
        n_cross++;
      if (((x[63:0] + y[63:0]) < x[63:0]) && (x[127:64] + y[127:64] == '1)) n_cross_far++;
      if (chain[0] && cin) n_cin++;
    end

    // ---- Mixed layouts: board 0's top word continues into board 1 ------
    for (int n = 0; n < 60; n++) begin
      lsb = 16'($urandom) | 16'h0001;
      chain = 2'b10; cin = 1'b0;
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      if (n % 2 == 0) y = ~x + 128'($urandom_range(1, 3) << (8 * $urandom_range(0, 12)));
      load(0, 20, x); load(1, 21, y);
      op(OP_ADDL, 20, 21, 5);
      read(0, 20, got);
      chk("mixed-layout add", got, ref_op(x, y, 0));
      n_mixed++;
    end

    // ---- Unchained boards: independent words ----------------------------
    for (int n = 0; n < 30; n++) begin
      lsb = 16'($urandom) | 16'h0101;
      if (n % 3 == 0) lsb = 16'hffff;
      chain = 2'b00; cin = 1'b1;                    // ignored while unchained
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      if (n % 2 == 0) y = ~x + 128'd1;
      load(0, 30, x); load(1, 31, y);
      op(OP_ADDL, 30, 31, 5);
      read(0, 30, got);
      chk("per-board add", got, ref_op(x, y, 0));
      load(0, 32, x);
      op(OP_SUBL, 32, 31, 6);
      read(0, 32, got);
      chk("per-board subtract", got, ref_op(x, y, 1));
      if (lsb == 16'hffff) begin
        load(0, 33, x);
        op(OP_ADD, 33, 31, 3);
        read(0, 33, got);
        chk("sixteen 8-bit adds", got, ref_op(x, y, 0));
      end
      n_indep++;
    end

    // ---- North and south routes between the boards ----------------------
    for (int n = 0; n < 10; n++) begin
      logic [127:0] prev;
      lsb = 16'h0101; chain = 2'b00;
      prev = {$urandom, $urandom, $urandom, $urandom};
      north = {$urandom, $urandom}; south = {$urandom, $urandom};
      lbuf = prev;
      u = UC_NOP; u.a_src = BUS_LBUF; u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_A; u.bp.r3_fn = FN_LOAD;
      micro(u);
      chk("load R3", r3, prev);
      u = UC_NOP; u.bp.r3_ld = 1'b1; u.bp.r3_opnd = OPND_ROUTE; u.bp.r3_fn = FN_LOAD;
      u.route_dir = (n % 2 != 0) ? RT_SOUTH : RT_NORTH;
      micro(u);
      if (n % 2 != 0) begin chk("south route", r3, {prev[63:0], south}); n_south++; end
      else       begin chk("north route", r3, {north, prev[127:64]}); n_north++; end
    end

    // ---- Single-board operations on both boards ---------------------------
    chain = 2'b00; cin = 1'b0;
    for (int n = 0; n < 8; n++) begin
      logic [127:0] hi;
      cmd_t c;
      int cy;
      lsb = 16'hffff;
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      load(0, 40, x); load(1, 41, y);
      op(OP_SUB, 40, 41, 4);
      read(0, 40, got);
      chk("sixteen 8-bit subtracts", got, ref_op(x, y, 1));
      load(0, 42, x);
      op(OP_MUL, 42, 41, 19);
      read(0, 42, got); read(1, 41, hi);
      for (int i = 0; i < 16; i++)
        chk("8x8 multiply", 128'({hi[8*i +: 8], got[8*i +: 8]}), 128'(16'(x[8*i +: 8]) * 16'(y[8*i +: 8])));
      n_mul += 16;
      // Logic with OP1 from memory.
      load(0, 43, x); load(1, 44, y);
      c = '0; c.op = OP_LOGIC; c.fn = FN_XOR;
      issue(c, 43, 44, cy);
      chk("logic cycles", 128'(cy), 128'd3);
      read(0, 43, got);
      chk("xor", got, x ^ y);
      // 64-bit word on each board shifted down with sign fill.
      lsb = 16'h0101;
      load(0, 45, x);
      read(0, 45, got);
      c = '0; c.op = OP_SHIFT; c.shamt = 6'($urandom_range(1, 63)); c.dir_down = 1'b1; c.fill = FILL_SIGN;
      issue(c, 0, 0, cy);
      chk("shift cycles", 128'(cy), 128'(int'(c.shamt) / 8 + $countones(c.shamt % 8)));
      chk("per-board sign-fill shift",
          r3, {64'($signed(x[127:64]) >>> c.shamt), 64'($signed(x[63:0]) >>> c.shamt)});
      for (int b = 0; b < 2; b++) begin
        logic lost;
        lost = |(x[64*b +: 64] & ((64'd1 << c.shamt) - 64'd1));
        chk("sticky", 128'(sticky[8*b]), 128'(lost));
        n_sticky += lost;
      end
    end

    // Floating point add: four words, two per board.
    lsb = 16'b1001_1001_1001_1001; fpexp = 16'b1000_1000_1000_1000;
    for (int n = 0; n < 30; n++) begin
      logic [31:0] fx [4], fy [4], fe [4];
      bit st [4], swp [4], ren [4];
      for (int w = 0; w < 4; w++) begin
        fx[w] = fp_rand(); fy[w] = fp_rand();
        if (n % 3 == 0) fy[w][31:24] = fx[w][31:24];
        if (n % 5 == 0) begin fx[w][23:22] = 2'b01; fy[w][23:22] = 2'b01; end
        fe[w] = fp_ref(fx[w], fy[w], st[w], swp[w], ren[w]);
      end
      load(0, 50, {fx[3], fx[2], fx[1], fx[0]}); load(1, 51, {fy[3], fy[2], fy[1], fy[0]});
      op(OP_FADD, 50, 51, 26);
      e = 128'({sticky[12], sticky[8], sticky[4], sticky[0]});
      read(0, 50, got);
      for (int w = 0; w < 4; w++) begin
        chk("fadd", 128'(got[32*w +: 32]), 128'(fe[w]));
        chk("fadd sticky", 128'(e[w]), 128'(st[w]));
        n_fp_swap += swp[w]; n_fp_renorm += ren[w];
      end
    end
    fpexp = 16'h0000;

    // ---- Mechanisms ------------------------------------------------------
    checks += 11;
    if (n_mul == 0)       begin failures++; $display("FAIL no multiply"); end
    if (n_sticky == 0)    begin failures++; $display("FAIL no sticky bit"); end
    if (n_fp_swap == 0)   begin failures++; $display("FAIL no floating point operand swap"); end
    if (n_fp_renorm == 0) begin failures++; $display("FAIL no floating point renormalisation"); end
    if (n_cross == 0)     begin failures++; $display("FAIL no carry crossed boards"); end
    if (n_cross_far == 0) begin failures++; $display("FAIL no carry crossed boards through a full board"); end
    if (n_cin == 0)       begin failures++; $display("FAIL no external carry"); end
    if (n_mixed == 0)     begin failures++; $display("FAIL no mixed layout"); end
    if (n_indep == 0)     begin failures++; $display("FAIL no independent boards"); end
    if (n_north == 0)     begin failures++; $display("FAIL no north route"); end
    if (n_south == 0)     begin failures++; $display("FAIL no south route"); end
    $display("mechanisms: cross=%0d cross_full_board=%0d carry_in=%0d mixed=%0d independent=%0d north=%0d south=%0d mul=%0d sticky=%0d fp_swap=%0d fp_renorm=%0d",
             n_cross, n_cross_far, n_cin, n_mixed, n_indep, n_north, n_south, n_mul, n_sticky,
             n_fp_swap, n_fp_renorm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
