// tb_rkt_switch: tests one RKT switch at (1,1) of a 4 x 4 mesh with 64-bit
// flits (the default width). Links are driven with reference Hamming
// codewords and every flit leaving a side is decoded by the testbench and
// compared with what was sent.
//   1 W -> E pass-through; first flit out exactly N_FLIT + 1 + 3 cycles after
//     the first flit in;
//   2 local IP -> local IP;
//   3 single bit error on the N link: corrected, journalled;
//   4 neighbour E occupied: the packet waits, then leaves;
//   5 two packets fill the W buffer: occ_out[W] rises;
//   6 neighbour E unavailable: the packet is looped back through the E side
//     (occ_out[E] high meanwhile) and leaves north with its bypass flag set;
//   7 fault_i: the switch reports itself unavailable and occupied.
module tb_rkt_switch;
  import rkt_pkg::*;
  import tb_util_pkg::*;

  localparam int W  = 64;
  localparam int CW = W + ref_check_bits(W) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             fault_i = 0;
  logic [N_DIR-1:0] data_request_out, occ_out;
  logic [CW-1:0]    data_out [N_DIR];
  logic             unavailable_out;
  logic [N_DIR-1:0] data_request_in = '0, occ_in = '0, unavailable_in = '0;
  logic [CW-1:0]    data_in  [N_DIR];
  logic [3:0]       diag_unavailable_in = '0;
  logic             ip_in_valid = 0, ip_in_occ, ip_out_valid, ip_out_occ = 0;
  logic [W-1:0]     ip_in_data = '0, ip_out_data;
  logic [15:0]      n_sec, n_ded, n_rerr, n_logged;
  logic [2:0]       jr_idx = '0;
  logic [1:0]       jr_kind;
  port_e            jr_port;

  rkt_switch #(.W(W), .MY_X(1), .MY_Y(1)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // --- output monitor: decoded flits per port (N, E, S, W, L) ---
  logic [W-1:0] rx_q [N_PORT][$];
  longint       rx_t [N_PORT][$];
  int           occ_e_during_loop = 0;

  function automatic logic [W-1:0] ref_data(input logic [CW-1:0] c);
    logic [W-1:0] d;
    int j;
    j = 0;
    for (int pos = 1; pos < CW; pos++)
      if ((pos & (pos - 1)) != 0) begin d[j] = c[pos]; j++; end
    return d;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N_DIR; p++)
      if (data_request_out[p]) begin
        logic [79:0] r;
        r = ref_encode(72'(ref_data(data_out[p])), W);
        if (data_out[p] != r[CW-1:0]) begin
          checks++; failures++;
          $display("FAIL: side %0d sent a codeword that is not valid", p);
        end
        rx_q[p].push_back(ref_data(data_out[p]));
        rx_t[p].push_back(cyc);
      end
    if (ip_out_valid) begin
      rx_q[P_L].push_back(ip_out_data);
      rx_t[P_L].push_back(cyc);
    end
    if (dut.g_port[1].g_side.u_lb.loop_flit && occ_out[P_E]) occ_e_during_loop++;
  end

  function automatic logic [W-1:0] hdr(int sx, int sy, int dx, int dy, int tag);
    hdr_t h;
    h = '{dst_y: 2'(dy), dst_x: 2'(dx), src_y: 2'(sy), src_x: 2'(sx), bypass: 1'b0};
    return {(W-HDR_W)'(tag), h};
  endfunction

  logic [W-1:0] pkt [N_FLIT];
  function automatic void mk(int sx, int sy, int dx, int dy, int tag);
    pkt[0] = hdr(sx, sy, dx, dy, tag);
    for (int k = 1; k < N_FLIT; k++) pkt[k] = {$urandom(), $urandom()};
  endfunction

  // Drive pkt on side s; flip codeword bit fb of flit ff (ff < 0: none).
  // Returns the cycle of the first flit.
  task automatic send_link(input int s, input int ff, input int fb, output longint t0);
    while (occ_out[s]) @(posedge clk);
    for (int k = 0; k < N_FLIT; k++) begin
      logic [79:0] c;
      c = ref_encode(72'(pkt[k]), W);
      if (k == ff) c[fb] = ~c[fb];
      data_request_in[s] <= 1'b1;
      data_in[s]         <= c[CW-1:0];
      @(posedge clk);
      if (k == 0) t0 = cyc;
    end
    data_request_in[s] <= 1'b0;
  endtask

  task automatic send_ip(output longint t0);
    while (ip_in_occ) @(posedge clk);
    for (int k = 0; k < N_FLIT; k++) begin
      ip_in_valid <= 1'b1;
      ip_in_data  <= pkt[k];
      @(posedge clk);
      if (k == 0) t0 = cyc;
    end
    ip_in_valid <= 1'b0;
  endtask

  task automatic expect_out(input int p, input bit byp, input int maxwait, output longint t_first);
    int n;
    n = 0;
    while (rx_q[p].size() < N_FLIT && n < maxwait) begin @(posedge clk); n++; end
    check(rx_q[p].size() == N_FLIT, $sformatf("packet leaves on port %0d", p));
    t_first = 0;
    if (rx_q[p].size() >= N_FLIT) begin
      t_first = rx_t[p][0];
      check(rx_q[p][0][W-1:1] == pkt[0][W-1:1], "header intact");
      check(rx_q[p][0][0] == byp, $sformatf("bypass flag %0d", byp));
      for (int k = 1; k < N_FLIT; k++) check(rx_q[p][k] == pkt[k], $sformatf("flit %0d intact", k));
      for (int k = 0; k < N_FLIT; k++) begin void'(rx_q[p].pop_front()); void'(rx_t[p].pop_front()); end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_in, t_out;
    for (int s = 0; s < N_DIR; s++) data_in[s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1: W -> E, latency
    mk(0, 1, 3, 1, 1);
    send_link(P_W, -1, 0, t_in);
    expect_out(P_E, 0, 100, t_out);
    check(t_out - t_in == N_FLIT + 1 + 3, $sformatf("latency %0d cycles, expected %0d", t_out - t_in, N_FLIT + 1 + 3));

    // 2: local -> local
    mk(1, 1, 1, 1, 2);
    send_ip(t_in);
    expect_out(P_L, 0, 100, t_out);
    check(t_out - t_in == N_FLIT + 1 + 3, "local latency");

    // 3: single error on N input, packet to (1,0) leaves S
    mk(1, 3, 1, 0, 3);
    send_link(P_N, 2, 33, t_in);
    expect_out(P_S, 0, 100, t_out);
    check(n_sec == 1 && n_ded == 0, "single error corrected and counted");
    check(n_rerr == 0, "legal packets raise no routing error");

    // 4: E occupied
    occ_in[P_E] = 1'b1;
    mk(0, 1, 2, 1, 4);
    send_link(P_W, -1, 0, t_in);
    repeat (30) @(posedge clk);
    check(rx_q[P_E].size() == 0, "nothing sent while E occupied");
    occ_in[P_E] = 1'b0;
    expect_out(P_E, 0, 100, t_out);

    // 5: W buffer fills while E is occupied
    occ_in[P_E] = 1'b1;
    mk(0, 1, 3, 1, 5);
    send_link(P_W, -1, 0, t_in);
    check(!occ_out[P_W], "room for the second packet");
    send_link(P_W, -1, 0, t_in);
    repeat (2) @(posedge clk);
    check(occ_out[P_W], "occ_out[W] with two packets held");
    occ_in[P_E] = 1'b0;
    expect_out(P_E, 0, 100, t_out);
    expect_out(P_E, 0, 100, t_out);
    repeat (2) @(posedge clk);
    check(!occ_out[P_W], "occ_out[W] released");

    // 6: E unavailable -> loopback, leave north with bypass flag
    unavailable_in[P_E] = 1'b1;
    repeat (2) @(posedge clk);
    mk(0, 1, 3, 1, 6);
    send_link(P_W, -1, 0, t_in);
    expect_out(P_N, 1, 200, t_out);
    check(occ_e_during_loop == N_FLIT, "occ_out[E] high while looping back");
    check(rx_q[P_E].size() == 0, "nothing sent to the unavailable side");
    check(n_rerr == 0, "looped packet is a legal bypass");
    unavailable_in[P_E] = 1'b0;

    // 7: fault
    fault_i = 1'b1;
    @(posedge clk); @(posedge clk);
    check(unavailable_out && occ_out == 4'hF && ip_in_occ, "faulty switch is unavailable and occupied");
    fault_i = 1'b0;
    @(posedge clk); @(posedge clk);
    check(!unavailable_out && occ_out == 4'h0, "recovered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
