// mem_bank: one of the two BP memory banks (A or B) of a Stage.
//
// Each BP owns a 1 x N bit memory in each bank; the eight of a Stage side by
// side make this DEPTH x 8 bank. Bit i of the word is BP i's memory. Reads
// are asynchronous so an operand can be loaded into a register in the cycle
// it is addressed; writes take the o bus at the rising edge. The two banks
// of a Stage are independent, which gives the two-address operations of the
// document (one operand from each bank in one cycle). The depth is this
// design's choice: the document leaves the BP memory size open.
module mem_bank #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
