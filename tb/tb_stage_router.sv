// tb_stage_router: routing of R3 by every direction and distance.
//
// Random R3 and neighbour bytes are applied for each direction and each
// power-of-two distance; the expected byte is formed here from a 24-bit
// concatenation {up, r3, down} shifted by the distance, and the "lost" flag
// from the bits that leave through the low end on a downward shift.
module tb_stage_router;
  import rcs_pkg::*;
  logic [7:0] r3, up, down, north, south, route;
  route_dir_e dir;
  logic [1:0] dlog;
  logic lost;
  int checks = 0, failures = 0;

  stage_router dut (.r3_i(r3), .up_i(up), .down_i(down), .north_i(north), .south_i(south),
                    .dir_i(dir), .dist_i(dlog), .route_o(route), .lost_o(lost));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] cat;
    logic [7:0]  exp_r;
    logic        exp_l;
    int          d;
    for (int n = 0; n < 2000; n++) begin
      {r3, up, down} = 24'($urandom);
      {north, south} = 16'($urandom);
      dir  = route_dir_e'($urandom_range(0, 3));
      dlog = 2'($urandom);
      d    = 1 << dlog;
      cat  = {up, r3, down};
      exp_l = 1'b0;
      case (dir)
        RT_UP:    exp_r = 8'(cat >> (8 - d));
        RT_DOWN: begin
          exp_r = 8'(cat >> (8 + d));
          for (int k = 0; k < d; k++) exp_l |= r3[k];
        end
        RT_NORTH: exp_r = north;
        default:  exp_r = south;
      endcase
      #1;
      checks += 2;
      if (route !== exp_r || lost !== exp_l) begin
        failures++;
        if (failures < 10)
          $display("FAIL dir %s dlog %0d: got %h/%b expected %h/%b", dir.name(), d, route, lost, exp_r, exp_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
