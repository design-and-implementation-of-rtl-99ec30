// routing_logic: output-port selection for the packet at the head of an input buffer.
//
// Ordinary packets follow deterministic XY (dimension-order) routing: first
// along X until the destination column is reached, then along Y, then out of
// the local port. XY routing ignores link availability; a packet whose XY
// neighbour is unavailable is turned around by that side's loopback module,
// which re-enters it with the header's bypass flag set.
// A bypassed packet is routed around the fault: the first available side is
// taken in the order productive-Y, productive-X, then the remaining sides
// N, E, S, W that do not lead away from the destination, then those that do
// (so a packet blocked on its row or column first steps sideways); the side the packet arrived on (no U-turn), sides off the mesh
// and unavailable neighbours are skipped. If no side is usable the XY choice
// is kept. The detour order is this implementation's choice; the design only
// states that the packet takes another path through another port.
// Purely combinational; the input port registers the result.
module routing_logic
  import rkt_pkg::*;
#(
  parameter int MESH_X = 4,
  parameter int MESH_Y = 4,
  parameter int MY_X   = 0,
  parameter int MY_Y   = 0
) (
  input  hdr_t              hdr_i,
  input  port_e             arr_port_i,     // port the packet entered by
  input  logic [N_DIR-1:0]  nbr_unavail_i,  // indexed by port_e (N, E, S, W)
  output port_e             out_port_o
);

  localparam logic [COORD_W-1:0] CX = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(MY_Y);

  // Sides that lead to an existing, available neighbour.
  logic [N_PORT-1:0] usable;
  always_comb begin
    usable = {1'b0, ~nbr_unavail_i};
    if (MY_Y == MESH_Y - 1) usable[P_N] = 1'b0;
    if (MY_X == MESH_X - 1) usable[P_E] = 1'b0;
    if (MY_Y == 0)          usable[P_S] = 1'b0;
    if (MY_X == 0)          usable[P_W] = 1'b0;
    usable[arr_port_i] = 1'b0;
  end

  port_e xy, py, px;
  logic  has_py, has_px;

  always_comb begin
    has_px = (hdr_i.dst_x != CX);
    px     = (hdr_i.dst_x > CX) ? P_E : P_W;
    has_py = (hdr_i.dst_y != CY);
    py     = (hdr_i.dst_y > CY) ? P_N : P_S;
    if (has_px)      xy = px;
    else if (has_py) xy = py;
    else             xy = P_L;
  end

  // Sides that lead away from the destination.
  logic [N_DIR-1:0] away;
  always_comb begin
    away = '0;
    if (has_px) away[2'(opposite(px))] = 1'b1;
    if (has_py) away[2'(opposite(py))] = 1'b1;
  end

  always_comb begin
    out_port_o = xy;
    if (hdr_i.bypass && xy != P_L) begin
      if (has_py && usable[py])      out_port_o = py;
      else if (has_px && usable[px]) out_port_o = px;
      else if (|(usable[N_DIR-1:0] & ~away)) begin
        for (int d = N_DIR - 1; d >= 0; d--)
          if (usable[d] && !away[d]) out_port_o = port_e'(d);
      end else begin
        for (int d = N_DIR - 1; d >= 0; d--)
          if (usable[d]) out_port_o = port_e'(d);
      end
    end
  end

endmodule
