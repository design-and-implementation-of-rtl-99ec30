// tb_rkt_noc: end-to-end test of the 4 x 4 RKT-NoC at its default parameters.
//
// Packets are injected at the local IP ports and at border links and are
// checked flit by flit at the destination IP port against a scoreboard.
// Phases:
//   1 one packet (0,0) -> (2,2), no fault; first-flit latency must be
//     5 switches x (N_FLIT + 1 + 3) cycles;
//   2 the same packet with routers 1 and 5 faulty (the design's routers 2
//     and 6): it must be looped back and delivered around the faults;
//   3 border injection at router 4's west side: one packet with a single bit
//     error (corrected), one with a double error (detected), one whose header
//     breaks XY routing (routing error);
//   4 a burst towards one destination whose IP holds off delivery for a while
//     (occupancy stalls);
//   5 random traffic without faults, then with router 5 (interior) faulty.
// Every mechanism (loopback, bypass delivery, ECC correction, ECC detection,
// routing error, occupancy stall, delivery acknowledge) is counted and must
// occur at least once.
module tb_rkt_noc;
  import rkt_pkg::*;
  import tb_util_pkg::*;

  localparam int W  = 64;
  localparam int MX = 4;
  localparam int MY = 4;
  localparam int NR = MX * MY;
  localparam int CW = W + ref_check_bits(W) + 1;
  localparam int MAXID = 512;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NR-1:0]    fault;
  logic [NR-1:0]    ip_in_valid;
  logic [W-1:0]     ip_in_data  [NR];
  logic [NR-1:0]    ip_in_occ;
  logic [NR-1:0]    ip_out_valid;
  logic [W-1:0]     ip_out_data [NR];
  logic [NR-1:0]    ip_out_occ;
  logic [NR-1:0]    dest_reach;
  logic [N_DIR-1:0] ext_req_in     [NR];
  logic [CW-1:0]    ext_data_in    [NR][N_DIR];
  logic [N_DIR-1:0] ext_occ_in     [NR];
  logic [N_DIR-1:0] ext_unavail_in [NR];
  logic [N_DIR-1:0] ext_req_out    [NR];
  logic [CW-1:0]    ext_data_out   [NR][N_DIR];
  logic [N_DIR-1:0] ext_occ_out    [NR];
  logic [15:0]      n_sec    [NR];
  logic [15:0]      n_ded    [NR];
  logic [15:0]      n_rerr   [NR];
  logic [15:0]      n_logged [NR];
  logic [2:0]       jr_idx   [NR];
  logic [1:0]       jr_kind  [NR];
  port_e            jr_port  [NR];

  rkt_noc dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- scoreboard ----------------
  logic [W-1:0] exp_flit [MAXID][N_FLIT];
  int           exp_dst  [MAXID];
  bit           exp_chk  [MAXID];   // payload checked (false for the double-error packet)
  bit           done     [MAXID];
  longint       inj_cyc  [MAXID];
  longint       arr_cyc  [MAXID];
  int           next_id = 0;
  int           delivered = 0, bypass_deliv = 0, reach_cnt = 0;

  function automatic logic [W-1:0] mk_hdr(int id, int sx, int sy, int dx, int dy);
    hdr_t h;
    h.dst_y = COORD_W'(dy); h.dst_x = COORD_W'(dx);
    h.src_y = COORD_W'(sy); h.src_x = COORD_W'(sx);
    h.bypass = 1'b0;
    return {(W-HDR_W)'(id), h};
  endfunction

  function automatic int new_packet(int sx, int sy, int dx, int dy);
    int id;
    id = next_id++;
    exp_flit[id][0] = mk_hdr(id, sx, sy, dx, dy);
    for (int k = 1; k < N_FLIT; k++)
      exp_flit[id][k] = {16'(id), 4'(k), 12'h5A5, $urandom(), 32'($urandom()) >> 32};
    for (int k = 1; k < N_FLIT; k++)
      exp_flit[id][k][31:0] = $urandom();
    exp_dst[id] = dy * MX + dx;
    exp_chk[id] = 1'b1;
    done[id]    = 1'b0;
    return id;
  endfunction

  // ---------------- local IP drivers ----------------
  int  ip_q   [NR][$];
  int  ip_cur [NR];
  int  ip_k   [NR];
  bit  ip_busy[NR];

  always @(posedge clk) begin
    for (int r = 0; r < NR; r++) begin
      if (!rst_n) begin
        ip_in_valid[r] <= 1'b0;
        ip_busy[r] = 1'b0;
      end else if (ip_busy[r]) begin
        ip_in_valid[r] <= 1'b1;
        ip_in_data[r]  <= exp_flit[ip_cur[r]][ip_k[r]];
        ip_k[r] = ip_k[r] + 1;
        if (ip_k[r] == N_FLIT) ip_busy[r] = 1'b0;
      end else if (ip_q[r].size() > 0 && !ip_in_occ[r]) begin
        ip_cur[r] = ip_q[r].pop_front();
        inj_cyc[ip_cur[r]] = cyc + 1;
        ip_in_valid[r] <= 1'b1;
        ip_in_data[r]  <= exp_flit[ip_cur[r]][0];
        ip_k[r] = 1;
        ip_busy[r] = 1'b1;
      end else begin
        ip_in_valid[r] <= 1'b0;
      end
    end
  end

  // ---------------- receivers ----------------
  int           rx_k  [NR];
  logic [W-1:0] rx_f  [NR][N_FLIT];
  longint       rx_t0 [NR];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < NR; r++) begin
        if (dest_reach[r]) reach_cnt++;
        if (ip_out_valid[r]) begin
          if (rx_k[r] == 0) rx_t0[r] = cyc;
          rx_f[r][rx_k[r]] = ip_out_data[r];
          rx_k[r]++;
          if (rx_k[r] == N_FLIT) begin
            int id;
            hdr_t h;
            rx_k[r] = 0;
            h  = hdr_t'(rx_f[r][0][HDR_W-1:0]);
            id = int'(rx_f[r][0][W-1:HDR_W]);
            if (id >= next_id) begin
              check(1'b0, $sformatf("unknown packet id %0d at router %0d", id, r));
            end else begin
              check(!done[id], $sformatf("packet %0d delivered twice", id));
              check(exp_dst[id] == r, $sformatf("packet %0d at router %0d, expected %0d", id, r, exp_dst[id]));
              if (exp_chk[id]) begin
                check(rx_f[r][0][W-1:1] == exp_flit[id][0][W-1:1], $sformatf("packet %0d header", id));
                for (int k = 1; k < N_FLIT; k++)
                  check(rx_f[r][k] == exp_flit[id][k], $sformatf("packet %0d flit %0d", id, k));
              end
              if (h.bypass) bypass_deliv++;
              done[id] = 1'b1;
              arr_cyc[id] = rx_t0[r];
              delivered++;
            end
          end
        end
      end
    end
  end

  // ---------------- border driver (router 4, west side) ----------------
  localparam int BR = 4;
  task automatic send_border(input int id, input int flip_flit, input int nflip);
    logic [79:0] c;
    while (ext_occ_out[BR][P_W]) @(posedge clk);
    inj_cyc[id] = cyc + 1;
    for (int k = 0; k < N_FLIT; k++) begin
      c = ref_encode(72'(exp_flit[id][k]), W);
      if (k == flip_flit) begin
        c[17] = ~c[17];
        if (nflip > 1) c[40] = ~c[40];
      end
      ext_req_in[BR][P_W]  <= 1'b1;
      ext_data_in[BR][P_W] <= c[CW-1:0];
      @(posedge clk);
    end
    ext_req_in[BR][P_W] <= 1'b0;
  endtask

  // ---------------- mechanism probes ----------------
  int loop_flits [NR];
  int stalls     [NR];
  int edge_out = 0;
  for (genvar r = 0; r < NR; r++) begin : g_probe
    always @(posedge clk) begin
      if (rst_n) begin
        if (dut.g_r[r].u_sw.g_port[0].g_side.u_lb.loop_flit) loop_flits[r]++;
        if (dut.g_r[r].u_sw.g_port[1].g_side.u_lb.loop_flit) loop_flits[r]++;
        if (dut.g_r[r].u_sw.g_port[2].g_side.u_lb.loop_flit) loop_flits[r]++;
        if (dut.g_r[r].u_sw.g_port[3].g_side.u_lb.loop_flit) loop_flits[r]++;
        if (dut.g_r[r].u_sw.g_port[4].u_out.any_cand && !dut.g_r[r].u_sw.g_port[4].u_out.pass_ok_i &&
            !dut.g_r[r].u_sw.g_port[4].u_out.busy_o) stalls[r]++;
        for (int d = 0; d < N_DIR; d++) if (ext_req_out[r][d]) edge_out++;
      end
    end
  end

  function automatic int sum(input int a [NR]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  function automatic int sum16(input logic [15:0] a [NR]);
    int s = 0;
    foreach (a[i]) s += int'(a[i]);
    return s;
  endfunction

  task automatic wait_all(input int max_cycles);
    int n;
    n = 0;
    while (n < max_cycles) begin
      bit all;
      all = 1'b1;
      for (int i = 0; i < next_id; i++) if (!done[i]) all = 1'b0;
      if (all) break;
      @(posedge clk);
      n++;
    end
  endtask

  function automatic int rnd_router(input logic [NR-1:0] avoid);
    int r;
    do r = $urandom_range(NR - 1); while (avoid[r]);
    return r;
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    int id, lat_nf, d0, d1, d2;
    logic [NR-1:0] bad;
    fault       = '0;
    ip_out_occ  = '0;
    for (int r = 0; r < NR; r++) begin
      ext_req_in[r]     = '0;
      ext_occ_in[r]     = '0;
      ext_unavail_in[r] = '0;
      jr_idx[r]         = '0;
      rx_k[r]           = 0;
      ip_in_data[r]     = '0;
      loop_flits[r]     = 0;
      stalls[r]         = 0;
      for (int d = 0; d < N_DIR; d++) ext_data_in[r][d] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // Phase 1: (0,0) -> (2,2) without faults.
    id = new_packet(0, 0, 2, 2);
    ip_q[0].push_back(id);
    wait_all(2000);
    check(done[id], "phase 1 packet delivered");
    lat_nf = int'(arr_cyc[id] - inj_cyc[id]);
    check(lat_nf == 5 * (N_FLIT + 1 + 3), $sformatf("phase 1 latency %0d, expected %0d", lat_nf, 5 * (N_FLIT + 1 + 3)));
    repeat (3) @(posedge clk);
    check(reach_cnt == 1, "destination acknowledge after phase 1");

    // Phase 2: same packet, routers 1 and 5 faulty.
    fault[1] = 1'b1;
    fault[5] = 1'b1;
    repeat (5) @(posedge clk);
    id = new_packet(0, 0, 2, 2);
    ip_q[0].push_back(id);
    wait_all(2000);
    check(done[id], "phase 2 packet delivered around faulty routers");
    check(loop_flits[0] == N_FLIT, $sformatf("phase 2 loopback at router 0: %0d flits", loop_flits[0]));
    check(bypass_deliv == 1, "phase 2 packet arrives marked as bypassed");
    check(sum16(n_rerr) == 0, "no routing error on a legal detour");
    $display("phase 2 latency %0d cycles (fault-free %0d)", arr_cyc[id] - inj_cyc[id], lat_nf);
    fault = '0;
    repeat (5) @(posedge clk);

    // Phase 3: border injection at router 4 west: SEC, DED, routing error.
    d0 = int'(n_sec[BR]); d1 = int'(n_ded[BR]); d2 = int'(n_rerr[BR]);
    id = new_packet(0, 1, 3, 1);
    send_border(id, 2, 1);
    wait_all(2000);
    check(done[id], "single-error packet delivered");
    check(int'(n_sec[BR]) == d0 + 1, "single error corrected and journalled");
    id = new_packet(0, 1, 3, 1);
    exp_chk[id] = 1'b0;
    send_border(id, 1, 2);
    wait_all(2000);
    check(done[id], "double-error packet delivered");
    check(int'(n_ded[BR]) == d1 + 1, "double error detected and journalled");
    id = new_packet(3, 3, 3, 1);
    send_border(id, -1, 0);
    wait_all(2000);
    check(done[id], "misrouted packet delivered");
    check(int'(n_rerr[BR]) == d2 + 1, "routing error detected and journalled");
    jr_idx[BR] = 3'd0;
    #1 check(jr_kind[BR] == 2'd3 && jr_port[BR] == P_W, "journal newest entry: routing error on W");
    jr_idx[BR] = 3'd1;
    #1 check(jr_kind[BR] == 2'd2 && jr_port[BR] == P_W, "journal entry 1: double error on W");
    jr_idx[BR] = 3'd2;
    #1 check(jr_kind[BR] == 2'd1 && jr_port[BR] == P_W, "journal entry 2: single error on W");

    // Phase 4: six packets to router 15 while its IP holds off delivery.
    ip_out_occ[15] = 1'b1;
    foreach (bad[i]) bad[i] = 1'b0;
    for (int s = 0; s < 6; s++) begin
      int sr;
      sr = s * 2;
      id = new_packet(sr % MX, sr / MX, 3, 3);
      ip_q[sr].push_back(id);
    end
    repeat (150) @(posedge clk);
    ip_out_occ[15] = 1'b0;
    wait_all(4000);
    check(stalls[15] > 0, "occupancy stall at router 15");

    // Phase 5a: random traffic, no faults.
    for (int n = 0; n < 120; n++) begin
      int s, t;
      s = rnd_router('0);
      do t = rnd_router('0); while (t == s);
      id = new_packet(s % MX, s / MX, t % MX, t / MX);
      ip_q[s].push_back(id);
      if ($urandom_range(3) == 0) @(posedge clk);
    end
    wait_all(20000);

    // Phase 5b: random traffic around faulty router 5.
    fault[5] = 1'b1;
    bad = '0;
    bad[5] = 1'b1;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      int s, t;
      s = rnd_router(bad);
      do t = rnd_router(bad); while (t == s);
      id = new_packet(s % MX, s / MX, t % MX, t / MX);
      ip_q[s].push_back(id);
      repeat ($urandom_range(6)) @(posedge clk);
    end
    wait_all(20000);
    repeat (3) @(posedge clk);

    for (int i = 0; i < next_id; i++) check(done[i], $sformatf("packet %0d delivered", i));
    check(delivered == next_id, "delivered count");
    check(reach_cnt == next_id, "one destination acknowledge per packet");
    check(edge_out == 0, "no packet left the mesh border");

    $display("mechanisms: packets=%0d loopback_flits=%0d bypass_deliveries=%0d sec=%0d ded=%0d route_err=%0d ip_stall_cycles=%0d acks=%0d",
             next_id, sum(loop_flits), bypass_deliv, sum16(n_sec), sum16(n_ded), sum16(n_rerr), sum(stalls), reach_cnt);
    check(sum(loop_flits) > 0, "loopback happened");
    check(bypass_deliv > 0, "bypass delivery happened");
    check(sum16(n_sec) > 0, "ECC correction happened");
    check(sum16(n_ded) > 0, "ECC detection happened");
    check(sum16(n_rerr) > 0, "routing error detection happened");
    check(sum(stalls) > 0, "occupancy stall happened");
    check(reach_cnt > 0, "destination acknowledge happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
