// tb_stage_flags: zero, equivalence, carry propagate/generate and overflow.
//
// Random operands are added here to form the ROM word the flags see; the
// expected flags are computed from their definitions (p: all sum bits 1,
// g: carry out, v: signed overflow of hi + lo). Zero and all-equal inputs
// are forced often enough to exercise both values of every flag.
module tb_stage_flags;
  logic [7:0] r3, eqb, hi, lo;
  logic [8:0] rom;
  logic zero, eq, p, g, v;
  int checks = 0, failures = 0;
  int seen_p = 0, seen_v = 0, seen_z = 0, seen_e = 0;

  stage_flags dut (.r3_i(r3), .eq_bits_i(eqb), .rom_hi_i(hi), .rom_lo_i(lo), .rom_data_i(rom),
                   .zero_o(zero), .eq_o(eq), .p_o(p), .g_o(g), .v_o(v));

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int n = 0; n < 4000; n++) begin
      {r3, eqb, hi, lo} = $urandom;
      if (n % 4 == 0) r3 = '0;
      if (n % 5 == 0) eqb = '1;
      if (n % 7 == 0) lo = 8'(8'hff - hi);
      rom = 9'(hi) + 9'(lo);
      #1;
      s = $signed(hi) + $signed(lo);
      chk("zero", zero, r3 == 0);
      chk("eq", eq, eqb == 8'hff);
      chk("p", p, rom[7:0] == 8'hff);
      chk("g", g, rom[8]);
      chk("v", v, s > 127 || s < -128);
      seen_p += p; seen_v += v; seen_z += zero; seen_e += eq;
    end
    checks++;
    if (seen_p == 0 || seen_v == 0 || seen_z == 0 || seen_e == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
