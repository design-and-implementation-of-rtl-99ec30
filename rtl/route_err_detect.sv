// route_err_detect: checks that a packet reached this router by a legal path.
//
// Follows the design's three-step check. (1) Did the previous router obey XY
// routing? A packet entering from the west or east must still be on its
// source row and must not have overshot its destination column; one entering
// from the south or north must already be in its destination column and must
// not have overshot its destination row; one entering from the local port
// must have this router as its source. If so there is no error. (2) Otherwise
// the router looks for an unavailable router around it, using the four side
// and the four diagonal availability indications. (3) If one is unavailable
// and the packet is marked as a bypass (looped-back) packet, the detour is
// legal; in every other case a routing error is reported.
// Purely combinational; evaluated once per packet when its route is computed.
module route_err_detect
  import rkt_pkg::*;
#(
  parameter int MY_X = 0,
  parameter int MY_Y = 0
) (
  input  hdr_t              hdr_i,
  input  port_e             arr_port_i,
  input  logic [N_DIR-1:0]  nbr_unavail_i,   // N, E, S, W neighbours
  input  logic [3:0]        diag_unavail_i,  // NE, NW, SE, SW neighbours
  output logic              xy_ok_o,         // previous hop obeyed XY
  output logic              route_err_o
);

  localparam logic [COORD_W-1:0] CX = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(MY_Y);

  always_comb begin
    case (arr_port_i)
      P_W:     xy_ok_o = (hdr_i.src_y == CY) && (CX <= hdr_i.dst_x);
      P_E:     xy_ok_o = (hdr_i.src_y == CY) && (CX >= hdr_i.dst_x);
      P_S:     xy_ok_o = (hdr_i.dst_x == CX) && (CY <= hdr_i.dst_y);
      P_N:     xy_ok_o = (hdr_i.dst_x == CX) && (CY >= hdr_i.dst_y);
      default: xy_ok_o = (hdr_i.src_x == CX) && (hdr_i.src_y == CY);
    endcase
    route_err_o = !xy_ok_o && !((|nbr_unavail_i || |diag_unavail_i) && hdr_i.bypass);
  end

endmodule
