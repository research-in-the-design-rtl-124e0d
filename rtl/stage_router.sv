// stage_router: the routing logic of one Stage.
//
// Routing works through R3, the Stage's source and destination for every
// route. Along the word the router shifts R3 by a power of two (1, 2, 4 or
// 8 bits) towards the most significant end (RT_UP) or the least significant
// end (RT_DOWN); the bits that enter come from the R3 of the neighbouring
// Stage, so chained Stages form one long shift register and a shift by 8
// moves whole bytes between Stages. Perpendicular to the word the router
// takes the R3 byte of the north or south neighbour word unchanged. What
// enters at the two ends of a word (zero, copies of the sign, or the other
// end for a rotate) is decided by the board, which drives `up_i`/`down_i`
// of the end Stages. The document asks for power-of-two connections,
// logical and arithmetic shifts, sign extension and guard-bit handling but
// leaves the network open; this fixed set of distances (1 to 8) is this
// design's choice. Combinational.
module stage_router
  import rcs_pkg::*;
(
  input  logic [STAGE_W-1:0] r3_i,     // this Stage's R3
  input  logic [STAGE_W-1:0] up_i,     // R3 of the next more significant Stage
  input  logic [STAGE_W-1:0] down_i,   // R3 of the next less significant Stage
  input  logic [STAGE_W-1:0] north_i,
  input  logic [STAGE_W-1:0] south_i,
  input  route_dir_e         dir_i,
  input  logic [1:0]         dist_i,   // distance 2**dist_i
  output logic [STAGE_W-1:0] route_o,  // into the BPs' routing inputs
  output logic               lost_o    // a 1 left through the low end (RT_DOWN)
);

  logic [2*STAGE_W-1:0] up_pair, down_pair;
  logic [STAGE_W-1:0]   low_mask;
  int unsigned          d;

  always_comb begin
    d         = 1 << dist_i;
    up_pair   = {r3_i, down_i} << d;
    down_pair = {up_i, r3_i} >> d;
    low_mask  = (STAGE_W'(1) << d) - STAGE_W'(1);
    if (d >= STAGE_W) low_mask = '1;
    lost_o    = 1'b0;
    unique case (dir_i)
      RT_UP:    route_o = up_pair[2*STAGE_W-1:STAGE_W];
      RT_DOWN: begin
        route_o = down_pair[STAGE_W-1:0];
        lost_o  = |(r3_i & low_mask);
      end
      RT_NORTH: route_o = north_i;
      default:  route_o = south_i;
    endcase
  end

endmodule
