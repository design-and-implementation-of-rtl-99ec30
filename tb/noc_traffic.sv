// noc_traffic: traffic generator and checker around one rkt_noc instance.
//
// Used by tb_rkt_noc_sizes to run the same test on meshes of several sizes.
// After reset it sends one packet from router 0 to the far corner and checks
// its first-flit latency (8 cycles per switch crossed). It then injects NPKT
// random packets between random routers and checks every flit of every packet
// at its destination IP. With fault_at >= 0 that router is marked faulty from
// the start and is neither source nor destination; the latency check is then
// skipped, since packets may detour. done goes high when all packets have
// arrived (or after a time limit); checks and failures are the running totals.
module noc_traffic
  import rkt_pkg::*;
#(
  parameter int MX   = 2,
  parameter int MY   = 2,
  parameter int NPKT = 60
) (
  input  logic clk,
  input  logic rst_n,
  input  int   fault_at,   // router marked faulty, or -1 for none
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int W  = 64;
  localparam int NR = MX * MY;
  localparam int CW = W + 8;

  logic [NR-1:0]    fault;
  logic [NR-1:0]    ip_in_valid, ip_in_occ, ip_out_valid, dest_reach;
  logic [NR-1:0]    ip_out_occ = '0;
  logic [W-1:0]     ip_in_data  [NR];
  logic [W-1:0]     ip_out_data [NR];
  logic [N_DIR-1:0] ext_req_in [NR], ext_occ_in [NR], ext_unavail_in [NR];
  logic [N_DIR-1:0] ext_req_out [NR], ext_occ_out [NR];
  logic [CW-1:0]    ext_data_in [NR][N_DIR], ext_data_out [NR][N_DIR];
  logic [15:0]      n_sec [NR], n_ded [NR], n_rerr [NR], n_logged [NR];
  logic [2:0]       jr_idx [NR];
  logic [1:0]       jr_kind [NR];
  port_e            jr_port [NR];

  always_comb begin
    fault = '0;
    if (fault_at >= 0) fault[fault_at] = 1'b1;
  end

  rkt_noc #(.W(W), .MESH_X(MX), .MESH_Y(MY)) dut (.*);

  initial begin
    for (int r = 0; r < NR; r++) begin
      ext_req_in[r] = '0; ext_occ_in[r] = '0; ext_unavail_in[r] = '0; jr_idx[r] = '0;
      for (int d = 0; d < N_DIR; d++) ext_data_in[r][d] = '0;
    end
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [W-1:0] flit [NPKT+1][N_FLIT];
  int           dst  [NPKT+1];
  bit           got  [NPKT+1];
  longint       t_in [NPKT+1], t_out [NPKT+1];
  int           q    [NR][$];
  int           cur  [NR], k_tx [NR], k_rx [NR];
  logic [W-1:0] rxf  [NR][N_FLIT];
  int           nrx = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0dx%0d @%0d: %s", MX, MY, cyc, what); end
  endtask

  function automatic void make(input int id, input int s, input int t);
    hdr_t h;
    h = '{dst_y: 2'(t / MX), dst_x: 2'(t % MX), src_y: 2'(s / MX), src_x: 2'(s % MX), bypass: 1'b0};
    flit[id][0] = {(W-HDR_W)'(id), h};
    for (int k = 1; k < N_FLIT; k++) flit[id][k] = {$urandom(), $urandom()};
    dst[id] = t;
    got[id] = 1'b0;
    q[s].push_back(id);
  endfunction

  // drivers
  always @(posedge clk) begin
    for (int r = 0; r < NR; r++) begin
      if (!rst_n) begin
        ip_in_valid[r] <= 1'b0;
        ip_in_data[r]  <= '0;
        k_tx[r] = 0;
      end else if (k_tx[r] > 0) begin
        ip_in_data[r] <= flit[cur[r]][k_tx[r]];
        k_tx[r] = (k_tx[r] + 1) % N_FLIT;
      end else if (q[r].size() > 0 && !ip_in_occ[r]) begin
        cur[r] = q[r].pop_front();
        t_in[cur[r]] = cyc + 1;
        ip_in_valid[r] <= 1'b1;
        ip_in_data[r]  <= flit[cur[r]][0];
        k_tx[r] = 1;
      end else begin
        ip_in_valid[r] <= 1'b0;
      end
    end
  end

  // receivers
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NR; r++) k_rx[r] = 0;
    end else begin
      for (int r = 0; r < NR; r++) if (ip_out_valid[r]) begin
        rxf[r][k_rx[r]] = ip_out_data[r];
        if (k_rx[r] == 0) begin
          int id0;
          id0 = int'(ip_out_data[r][W-1:HDR_W]);
          if (id0 <= NPKT) t_out[id0] = cyc;
        end
        k_rx[r]++;
        if (k_rx[r] == N_FLIT) begin
          int id;
          k_rx[r] = 0;
          id = int'(rxf[r][0][W-1:HDR_W]);
          if (id > NPKT) check(1'b0, "unknown packet");
          else begin
            check(!got[id] && dst[id] == r, $sformatf("packet %0d at router %0d", id, r));
            // bit 0 of the header is the bypass flag, set on a detour
            check(rxf[r][0][W-1:1] == flit[id][0][W-1:1], $sformatf("packet %0d header", id));
            for (int k = 1; k < N_FLIT; k++) check(rxf[r][k] == flit[id][k], $sformatf("packet %0d flit %0d", id, k));
            got[id] = 1'b1;
            nrx++;
          end
        end
      end
    end
  end

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    @(posedge rst_n);
    repeat (3) @(posedge clk);
    // corner to corner, latency
    if (fault_at < 0) begin
      make(NPKT, 0, NR - 1);
      while (!got[NPKT] && cyc < 5000) @(posedge clk);
      check(got[NPKT], "corner packet delivered");
      check(t_out[NPKT] - t_in[NPKT] == 8 * (MX + MY - 1),
            $sformatf("corner latency %0d, expected %0d", t_out[NPKT] - t_in[NPKT], 8 * (MX + MY - 1)));
    end else begin
      got[NPKT] = 1'b1;
      nrx++;
    end
    // random traffic
    for (int n = 0; n < NPKT; n++) begin
      int s, t;
      do s = $urandom_range(NR - 1); while (s == fault_at);
      do t = $urandom_range(NR - 1); while (t == s || t == fault_at);
      make(n, s, t);
      if ($urandom_range(1) == 0) @(posedge clk);
    end
    while (nrx < NPKT + 1 && cyc < 50000) @(posedge clk);
    check(nrx == NPKT + 1, $sformatf("%0d of %0d packets delivered", nrx, NPKT + 1));
    done = 1'b1;
  end

endmodule
