// tb_mem_bank: write then read back a memory bank.
//
// Random words are written to every address, then read back asynchronously
// and compared with a copy kept here; a second pass overwrites half of the
// addresses and checks that the others kept their data.
module tb_mem_bank;
  localparam int unsigned DEPTH = 1024;
  logic clk = 1'b0, we = 1'b0;
  logic [9:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  mem_bank #(.DEPTH(DEPTH), .WIDTH(8)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, logic [7:0] d);
    @(negedge clk);
    addr = 10'(a); wdata = d; we = 1'b1;
    ref_mem[a] = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic read_all();
    for (int a = 0; a < DEPTH; a++) begin
      addr = 10'(a);
      #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: got %h expected %h", a, rdata, ref_mem[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, 8'($urandom));
    read_all();
    for (int a = 0; a < DEPTH; a += 2) write(a, 8'($urandom));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
