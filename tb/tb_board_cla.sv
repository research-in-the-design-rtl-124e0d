// tb_board_cla: board carry look-ahead against multi-byte addition.
//
// Random bytes for two operands are added Stage by Stage (each Stage alone,
// as its ROM would), giving the p and g inputs; the carries the look-ahead
// returns must equal the carries of the true multi-byte sum of each word,
// for random word configurations and carry-in values.
module tb_board_cla;
  localparam int N = 8;
  logic [N-1:0] p, g, lsb, c, cout;
  logic cin, bcin;
  int checks = 0, failures = 0;

  board_cla #(.N(N)) dut (.p_i(p), .g_i(g), .lsb_i(lsb), .cin_i(cin), .board_cin_i(bcin),
                          .c_o(c), .cout_o(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a [N], b [N];
    logic [N-1:0] exp_c, exp_co;
    logic carry;
    int s;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = 8'($urandom);
        b[i] = ($urandom_range(0, 2) == 0) ? 8'(8'hff - a[i]) : 8'($urandom);
        s = a[i] + b[i];
        g[i] = s > 255;
        p[i] = 8'(s) == 8'hff;
      end
      lsb = 8'($urandom);
      cin = 1'($urandom); bcin = 1'($urandom);
      // True ripple addition word by word.
      carry = bcin;
      for (int i = 0; i < N; i++) begin
        if (lsb[i]) carry = cin;
        exp_c[i] = carry;
        s = a[i] + b[i] + int'(carry);
        carry = s > 255;
        exp_co[i] = carry;
      end
      #1;
      checks += 2;
      if (c !== exp_c || cout !== exp_co) begin
        failures++;
        if (failures < 10) $display("FAIL lsb %b: c %b exp %b, cout %b exp %b", lsb, c, exp_c, cout, exp_co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
