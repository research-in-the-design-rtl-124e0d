// tb_lw_sequencer: lengths and contents of the micro-operation sequences.
//
// Each operation is issued and the cycles up to and including done_o are
// counted against the lengths the design specifies (add 3, subtract 4, long
// add 4, long subtract 6, logic 3 or 1, multiply 19, load/read 2, micro 1,
// floating point add 26,
// shift one cycle per power-of-two step). Inside the sequences it checks
// that the shift steps add up to the distance in the right direction, that
// the multiply has eight conditional adds, the subtract complements OP2
// and seeds SC with 1, that the long add latches the
// look-ahead carry once, that the logic function and a raw microinstruction
// reach the output, that the addresses are held and ready stays low.
module tb_lw_sequencer;
  import rcs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, ready, done, rd_valid;
  cmd_t cmd;
  logic [9:0] op1, op2, aa, ab;
  stage_uc_t uc;
  int checks = 0, failures = 0;

  lw_sequencer #(.MEM_DEPTH(1024)) dut (
    .clk, .rst_n, .cmd_valid_i(valid), .cmd_ready_o(ready), .cmd_i(cmd), .op1_i(op1),
    .op2_i(op2), .uc_o(uc), .addr_a_o(aa), .addr_b_o(ab), .done_o(done), .rd_valid_o(rd_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Statistics of one run.
  int cycles, shift_sum, cond_adds, ci_lds, fn_seen, micro_seen, rd_seen, dir_ok, busy_ready, sc_ones, not_b;

  task automatic run(cmd_t c, int a1, int a2);
    @(negedge clk);
    cmd = c; op1 = 10'(a1); op2 = 10'(a2); valid = 1'b1;
    @(posedge clk); #1;
    valid = 1'b0; cmd = '0; op1 = '0; op2 = '0;
    cycles = 0; shift_sum = 0; cond_adds = 0; ci_lds = 0; fn_seen = 0; micro_seen = 0;
    rd_seen = 0; dir_ok = 1; busy_ready = 0; sc_ones = 0; not_b = 0;
    forever begin
      cycles++;
      if (ready) busy_ready++;
      if (aa != 10'(a1) || ab != 10'(a2)) dir_ok = 0;
      if (uc.bp.r3_opnd == OPND_ROUTE && uc.bp.r3_ld) begin
        shift_sum += 1 << uc.route_dist;
        if (uc.route_dir != (c.dir_down ? RT_DOWN : RT_UP)) dir_ok = 0;
      end
      if (uc.cond_mul) cond_adds++;
      if (uc.sc_src == SC_ONE) sc_ones++;
      if (uc.bp.r3_ld && uc.bp.r3_opnd == OPND_B && uc.bp.r3_fn == FN_NOT) not_b++;
      if (uc.ci_ld) ci_lds++;
      if (uc.bp.r3_ld && uc.bp.r3_opnd == OPND_B && uc.bp.r3_fn == c.fn) fn_seen++;
      if (uc == c.micro && c.op == OP_MICRO) micro_seen++;
      if (rd_valid) rd_seen++;
      if (done) break;
      @(posedge clk); #1;
      if (cycles > 100) break;
    end
    @(posedge clk); #1;
    chk($sformatf("%s ready after", c.op.name()), ready, 1);
  endtask

  initial begin
    cmd_t c;
    cmd = '0; op1 = '0; op2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    c = '0; c.op = OP_ADD;      run(c, 3, 4); chk("add cycles", cycles, 3); chk("addresses", dir_ok, 1);
    c = '0; c.op = OP_SUB;      run(c, 5, 6); chk("sub cycles", cycles, 4);
    chk("sub sets SC for +1", sc_ones, 1); chk("sub complements OP2", not_b, 1);
    c = '0; c.op = OP_ADDL;     run(c, 7, 8); chk("addl cycles", cycles, 4); chk("addl ci", ci_lds, 1);
    c = '0; c.op = OP_SUBL;     run(c, 1, 2); chk("subl cycles", cycles, 6); chk("subl ci", ci_lds, 2);
    c = '0; c.op = OP_MUL;      run(c, 9, 9); chk("mul cycles", cycles, 19); chk("mul adds", cond_adds, 8);
    chk("busy not ready", busy_ready, 0);
    c = '0; c.op = OP_LOAD;     run(c, 2, 0); chk("load cycles", cycles, 2);
    c = '0; c.op = OP_READ;     run(c, 2, 0); chk("read cycles", cycles, 2); chk("read valid", rd_seen, 1);
    for (int f = 0; f < 16; f += 5) begin
      c = '0; c.op = OP_LOGIC; c.fn = 4'(f); run(c, 1, 1);
      chk("logic cycles", cycles, 3); chk("logic fn", fn_seen, 1);
      c = '0; c.op = OP_LOGIC_R3; c.fn = 4'(f); run(c, 1, 1);
      chk("logic r3 cycles", cycles, 1); chk("logic r3 fn", fn_seen, 1);
    end
    c = '0; c.op = OP_FADD; c.dir_down = 1; run(c, 4, 5); chk("fadd cycles", cycles, 26);
    chk("fadd addresses, downward shifts", dir_ok, 1); chk("fadd carry latch", ci_lds, 1);
    c = '0; c.op = OP_MICRO; c.micro = stage_uc_t'($urandom); run(c, 0, 0);
    chk("micro cycles", cycles, 1); chk("micro passes", micro_seen, 1);
    for (int d = 1; d < 64; d += 3) begin
      int expc;
      c = '0; c.op = OP_SHIFT; c.shamt = 6'(d); c.dir_down = 1'(d % 2);
      run(c, 0, 0);
      expc = d / 8 + $countones(d % 8);
      chk($sformatf("shift %0d cycles", d), cycles, expc);
      chk($sformatf("shift %0d distance", d), shift_sum, d);
      chk("shift direction", dir_ok, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
