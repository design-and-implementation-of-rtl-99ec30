// rkt_noc: RKT-NoC, a MESH_X x MESH_Y 2-D mesh of RKT switches (4 x 4 by default).
//
// Router r sits at x = r % MESH_X, y = r / MESH_X (x grows east, y grows
// north; router r is the design's router r+1). Neighbouring switches are
// joined side to side: N of (x,y) to S of (x,y+1), E of (x,y) to W of (x+1,y).
// Each switch also sees the unavailable indication of its four diagonal
// neighbours. Sides on the border of the mesh are brought out as ext_* ports
// (indexed [router][side]) so that IP cores or test equipment can be attached
// there; their entries for interior sides are unused (inputs) or zero
// (outputs). Every router's local IP port, fault input and error journal are
// brought out too.
// fault[r] marks router r faulty: it announces itself unavailable and its
// neighbours loop packets back and route around it.
// dest_reach[r] pulses for one cycle when the last flit of a packet leaves
// router r's local port, i.e. when a packet has reached its destination IP.
module rkt_noc
  import rkt_pkg::*;
#(
  parameter int W      = 64,
  parameter int PKTS   = 2,
  parameter int MESH_X = 4,
  parameter int MESH_Y = 4,
  parameter int NR     = MESH_X * MESH_Y,
  parameter int CW     = ham_cw(W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NR-1:0]    fault,
  // local IP ports
  input  logic [NR-1:0]    ip_in_valid,
  input  logic [W-1:0]     ip_in_data  [NR],
  output logic [NR-1:0]    ip_in_occ,
  output logic [NR-1:0]    ip_out_valid,
  output logic [W-1:0]     ip_out_data [NR],
  input  logic [NR-1:0]    ip_out_occ,
  output logic [NR-1:0]    dest_reach,
  // border links
  input  logic [N_DIR-1:0] ext_req_in     [NR],
  input  logic [CW-1:0]    ext_data_in    [NR][N_DIR],
  input  logic [N_DIR-1:0] ext_occ_in     [NR],
  input  logic [N_DIR-1:0] ext_unavail_in [NR],
  output logic [N_DIR-1:0] ext_req_out    [NR],
  output logic [CW-1:0]    ext_data_out   [NR][N_DIR],
  output logic [N_DIR-1:0] ext_occ_out    [NR],
  // error journals
  output logic [15:0]      n_sec    [NR],
  output logic [15:0]      n_ded    [NR],
  output logic [15:0]      n_rerr   [NR],
  output logic [15:0]      n_logged [NR],
  input  logic [2:0]       jr_idx   [NR],
  output logic [1:0]       jr_kind  [NR],
  output port_e            jr_port  [NR]
);

  logic [N_DIR-1:0] req_out  [NR];
  logic [CW-1:0]    dout     [NR][N_DIR];
  logic [N_DIR-1:0] occ_out  [NR];
  logic [NR-1:0]    unav_out;
  logic [N_DIR-1:0] req_in   [NR];
  logic [CW-1:0]    din      [NR][N_DIR];
  logic [N_DIR-1:0] occ_in   [NR];
  logic [N_DIR-1:0] unav_in  [NR];
  logic [3:0]       diag_in  [NR];

  for (genvar r = 0; r < NR; r++) begin : g_r
    localparam int X = r % MESH_X;
    localparam int Y = r / MESH_X;
    // neighbour index per side, -1 when off the mesh
    localparam int NB_N = (Y < MESH_Y - 1) ? r + MESH_X : -1;
    localparam int NB_E = (X < MESH_X - 1) ? r + 1      : -1;
    localparam int NB_S = (Y > 0)          ? r - MESH_X : -1;
    localparam int NB_W = (X > 0)          ? r - 1      : -1;
    localparam int NB [N_DIR] = '{NB_N, NB_E, NB_S, NB_W};
    localparam int DG [4] = '{
      (X < MESH_X - 1 && Y < MESH_Y - 1) ? r + MESH_X + 1 : -1,   // NE
      (X > 0          && Y < MESH_Y - 1) ? r + MESH_X - 1 : -1,   // NW
      (X < MESH_X - 1 && Y > 0)          ? r - MESH_X + 1 : -1,   // SE
      (X > 0          && Y > 0)          ? r - MESH_X - 1 : -1    // SW
    };

    for (genvar d = 0; d < N_DIR; d++) begin : g_d
      localparam int OPP = (d + 2) % N_DIR;   // N<->S, E<->W
      if (NB[d] >= 0) begin : g_link
        assign req_in[r][d]       = req_out[NB[d]][OPP];
        assign din[r][d]          = dout[NB[d]][OPP];
        assign occ_in[r][d]       = occ_out[NB[d]][OPP];
        assign unav_in[r][d]      = unav_out[NB[d]];
        assign ext_req_out[r][d]  = 1'b0;
        assign ext_data_out[r][d] = '0;
        assign ext_occ_out[r][d]  = 1'b0;
      end else begin : g_edge
        assign req_in[r][d]       = ext_req_in[r][d];
        assign din[r][d]          = ext_data_in[r][d];
        assign occ_in[r][d]       = ext_occ_in[r][d];
        assign unav_in[r][d]      = ext_unavail_in[r][d];
        assign ext_req_out[r][d]  = req_out[r][d];
        assign ext_data_out[r][d] = dout[r][d];
        assign ext_occ_out[r][d]  = occ_out[r][d];
      end
    end

    for (genvar g = 0; g < 4; g++) begin : g_dg
      if (DG[g] >= 0) begin : g_on
        assign diag_in[r][g] = unav_out[DG[g]];
      end else begin : g_off
        assign diag_in[r][g] = 1'b0;
      end
    end

    rkt_switch #(
      .W(W), .PKTS(PKTS), .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(X), .MY_Y(Y), .CW(CW)
    ) u_sw (
      .clk                 (clk),
      .rst_n               (rst_n),
      .fault_i             (fault[r]),
      .data_request_out    (req_out[r]),
      .data_out            (dout[r]),
      .occ_out             (occ_out[r]),
      .unavailable_out     (unav_out[r]),
      .data_request_in     (req_in[r]),
      .data_in             (din[r]),
      .occ_in              (occ_in[r]),
      .unavailable_in      (unav_in[r]),
      .diag_unavailable_in (diag_in[r]),
      .ip_in_valid         (ip_in_valid[r]),
      .ip_in_data          (ip_in_data[r]),
      .ip_in_occ           (ip_in_occ[r]),
      .ip_out_valid        (ip_out_valid[r]),
      .ip_out_data         (ip_out_data[r]),
      .ip_out_occ          (ip_out_occ[r]),
      .n_sec               (n_sec[r]),
      .n_ded               (n_ded[r]),
      .n_rerr              (n_rerr[r]),
      .n_logged            (n_logged[r]),
      .jr_idx              (jr_idx[r]),
      .jr_kind             (jr_kind[r]),
      .jr_port             (jr_port[r])
    );

    // Delivery acknowledge: count flits leaving the local port.
    logic [$clog2(N_FLIT)-1:0] dcnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dcnt          <= '0;
        dest_reach[r] <= 1'b0;
      end else begin
        dest_reach[r] <= ip_out_valid[r] && (dcnt == ($clog2(N_FLIT))'(N_FLIT - 1));
        if (ip_out_valid[r]) dcnt <= dcnt + 1'b1;
      end
    end
  end

endmodule
