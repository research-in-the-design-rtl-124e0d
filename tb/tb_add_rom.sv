// tb_add_rom: exhaustive check of the 64K x 9 ADD ROM.
//
// Every one of the 65536 addresses is applied and the word read back is
// compared with the 9-bit sum of the two address bytes worked out here.
module tb_add_rom;
  logic [15:0] addr;
  logic [8:0]  data;
  int checks = 0, failures = 0;

  add_rom dut (.addr, .data);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int hi = 0; hi < 256; hi++)
      for (int lo = 0; lo < 256; lo++) begin
        addr = {8'(hi), 8'(lo)};
        #1;
        checks++;
        if (data !== 9'(hi + lo)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d: got %0d", hi, lo, data);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
