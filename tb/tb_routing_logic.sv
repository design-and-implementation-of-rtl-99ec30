// tb_routing_logic: checks the routing decision of a router at (1,1) and of a
// corner router at (3,0) in a 4 x 4 mesh: XY routing for ordinary packets,
// and for bypassed packets the detour order (productive Y, productive X, then
// N, E, S, W), skipping the arrival side, unavailable neighbours and sides
// off the mesh.
module tb_routing_logic;
  import rkt_pkg::*;

  hdr_t             hdr;
  port_e            arr;
  logic [N_DIR-1:0] unav;
  port_e            o11, o30;

  routing_logic #(.MY_X(1), .MY_Y(1)) dut11 (.hdr_i(hdr), .arr_port_i(arr), .nbr_unavail_i(unav), .out_port_o(o11));
  routing_logic #(.MY_X(3), .MY_Y(0)) dut30 (.hdr_i(hdr), .arr_port_i(arr), .nbr_unavail_i(unav), .out_port_o(o30));

  int checks = 0, failures = 0;

  task automatic t(input int dx, input int dy, input bit byp, input port_e a, input logic [3:0] u,
                   input port_e e11, input port_e e30);
    hdr = '{dst_y: 2'(dy), dst_x: 2'(dx), src_y: 2'd0, src_x: 2'd0, bypass: byp};
    arr = a;
    unav = u;
    #1;
    checks += 2;
    if (o11 != e11) begin failures++; $display("FAIL (1,1) dst=(%0d,%0d) byp=%0d arr=%s unav=%b: %s exp %s", dx, dy, byp, a.name(), u, o11.name(), e11.name()); end
    if (o30 != e30) begin failures++; $display("FAIL (3,0) dst=(%0d,%0d) byp=%0d arr=%s unav=%b: %s exp %s", dx, dy, byp, a.name(), u, o30.name(), e30.name()); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // XY, availability ignored
    t(3, 3, 0, P_L, 4'b0000, P_E, P_N);
    t(0, 3, 0, P_L, 4'b0010, P_W, P_W);
    t(1, 3, 0, P_S, 4'b0001, P_N, P_W);
    t(1, 0, 0, P_N, 4'b0000, P_S, P_W);
    t(1, 1, 0, P_W, 4'b0000, P_L, P_W);
    t(3, 0, 0, P_W, 4'b0000, P_E, P_L);
    t(3, 2, 0, P_W, 4'b0000, P_E, P_N);
    // bypass: productive Y first
    t(3, 3, 1, P_E, 4'b0010, P_N, P_N);
    // bypass: Y productive but unavailable -> productive X
    t(3, 3, 1, P_L, 4'b0001, P_E, P_W);
    // bypass: same row, X blocked -> first free side N, E, S, W
    t(3, 1, 1, P_E, 4'b0010, P_N, P_N);
    t(3, 1, 1, P_E, 4'b0011, P_S, P_W);
    // bypass: arrival side is never used again
    t(1, 3, 1, P_N, 4'b0000, P_E, P_W);
    // bypass at destination -> local
    t(1, 1, 1, P_E, 4'b1111, P_L, P_W);
    // bypass, nothing usable -> keep XY choice
    t(3, 3, 1, P_S, 4'b1111, P_E, P_N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
