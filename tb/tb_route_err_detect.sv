// tb_route_err_detect: checks the routing error detection of a router at
// (1,1): packets that arrive along a legal XY path, packets that break XY
// with and without the bypass flag, and with and without an unavailable
// side or diagonal neighbour.
module tb_route_err_detect;
  import rkt_pkg::*;

  hdr_t             hdr;
  port_e            arr;
  logic [N_DIR-1:0] unav;
  logic [3:0]       diag;
  logic             xy_ok, err;

  route_err_detect #(.MY_X(1), .MY_Y(1)) dut (
    .hdr_i(hdr), .arr_port_i(arr), .nbr_unavail_i(unav), .diag_unavail_i(diag),
    .xy_ok_o(xy_ok), .route_err_o(err));

  int checks = 0, failures = 0;

  task automatic t(input int sx, input int sy, input int dx, input int dy, input bit byp,
                   input port_e a, input logic [3:0] u, input logic [3:0] dg, input bit e_ok, input bit e_err);
    hdr = '{dst_y: 2'(dy), dst_x: 2'(dx), src_y: 2'(sy), src_x: 2'(sx), bypass: byp};
    arr = a; unav = u; diag = dg;
    #1;
    checks++;
    if (xy_ok !== e_ok || err !== e_err) begin
      failures++;
      $display("FAIL src=(%0d,%0d) dst=(%0d,%0d) byp=%0d arr=%s u=%b d=%b: ok=%b err=%b exp %b %b",
               sx, sy, dx, dy, byp, a.name(), u, dg, xy_ok, err, e_ok, e_err);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // legal XY arrivals
    t(0, 1, 3, 2, 0, P_W, 4'h0, 4'h0, 1, 0);   // moving east on the source row
    t(3, 1, 0, 0, 0, P_E, 4'h0, 4'h0, 1, 0);   // moving west on the source row
    t(0, 0, 1, 3, 0, P_S, 4'h0, 4'h0, 1, 0);   // moving north in the destination column
    t(3, 3, 1, 0, 0, P_N, 4'h0, 4'h0, 1, 0);   // moving south in the destination column
    t(1, 1, 2, 2, 0, P_L, 4'h0, 4'h0, 1, 0);   // injected by the local IP
    // XY broken, no fault around -> error, bypass or not
    t(0, 0, 3, 1, 0, P_W, 4'h0, 4'h0, 0, 1);   // moving east off the source row
    t(0, 0, 3, 1, 1, P_W, 4'h0, 4'h0, 0, 1);
    t(0, 0, 3, 3, 0, P_S, 4'h0, 4'h0, 0, 1);   // moving north outside the destination column
    t(3, 1, 0, 1, 0, P_W, 4'h0, 4'h0, 0, 1);   // overshoot: moving east past a western destination
    t(2, 2, 2, 2, 0, P_L, 4'h0, 4'h0, 0, 1);   // local IP claims another source
    // XY broken, fault around
    t(0, 0, 3, 3, 0, P_S, 4'h2, 4'h0, 0, 1);   // not a bypass packet -> error
    t(0, 0, 3, 3, 1, P_S, 4'h2, 4'h0, 0, 0);   // bypass, side neighbour unavailable
    t(0, 0, 3, 3, 1, P_S, 4'h0, 4'h4, 0, 0);   // bypass, diagonal neighbour unavailable
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
