// add_rom: the Stage's 64K x 9 ADD ROM.
//
// Stage addition is table lookup: the two operand bytes form a 16-bit
// address and the word stored there is the 8-bit two's complement sum plus
// the carry out in bit 8. The document specifies the size and the contents;
// the table is filled at elaboration time from that rule (word[a] = a[15:8]
// + a[7:0]), so no data file is needed. The read is asynchronous, so a
// lookup and the register load it feeds fit in one machine cycle, as the
// document's micro-operation timings need.
module add_rom #(
  parameter int unsigned AW = 16           // address bits: two operand bytes
) (
  input  logic [AW-1:0]   addr,            // {high operand, low operand}
  output logic [AW/2:0]   data             // {carry, sum}
);

  localparam int unsigned DEPTH = 1 << AW;
  localparam int unsigned HW    = AW / 2;

  logic [HW:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++)
      rom[i] = (HW+1)'(i[AW-1:HW]) + (HW+1)'(i[HW-1:0]);
  end

  assign data = rom[addr];

endmodule
