// rkt_switch: the RKT reliable router switch, one node of a 2-D mesh NoC.
//
// Five ports: four sides (N, E, S, W) to neighbouring switches and a local
// port for the attached IP core or processing element. Every side has a
// loopback module (link interface), an input port (Hamming ECC check and
// correction, store-and-forward input buffer for two 4-flit packets, routing
// logic and routing error detection) and an output FSM with a Hamming
// encoder. The control logic holds the fault status and the availability of
// the neighbours; the error journal records ECC and routing errors.
//
// Packet flow: a packet is received completely (N_FLIT flits), routed XY,
// granted by the output FSM of its side and sent as N_FLIT back-to-back flits.
// If the neighbour on that side is unavailable, the loopback module turns the
// packet back into the same side's input buffer with its bypass flag set, and
// the routing logic then steers it around the fault.
//
// Links: per side, data_out/data_request_out (one flit per cycle, Hamming
// codeword of CW bits), occ_out (this side cannot take a new packet),
// unavailable_out (this router is faulty, same for all sides), and the
// mirror-image inputs. A sender starts a packet only while the receiver's
// occ is low, and then sends it without gaps.
// Minimum latency, first flit in to first flit out of an idle switch:
// N_FLIT (store the packet) + 1 (ECC register) + 3 (route register, grant,
// output register) cycles, i.e. N_flit + Latency_ECC + 3 as the design states.
module rkt_switch
  import rkt_pkg::*;
#(
  parameter int W      = 64,
  parameter int PKTS   = 2,
  parameter int MESH_X = 4,
  parameter int MESH_Y = 4,
  parameter int MY_X   = 0,
  parameter int MY_Y   = 0,
  parameter int CW     = ham_cw(W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fault_i,
  // side links, indexed by port_e (N, E, S, W)
  output logic [N_DIR-1:0] data_request_out,
  output logic [CW-1:0]    data_out [N_DIR],
  output logic [N_DIR-1:0] occ_out,
  output logic             unavailable_out,
  input  logic [N_DIR-1:0] data_request_in,
  input  logic [CW-1:0]    data_in  [N_DIR],
  input  logic [N_DIR-1:0] occ_in,
  input  logic [N_DIR-1:0] unavailable_in,
  input  logic [3:0]       diag_unavailable_in,  // NE, NW, SE, SW
  // local IP port (plain data, no ECC)
  input  logic             ip_in_valid,
  input  logic [W-1:0]     ip_in_data,
  output logic             ip_in_occ,
  output logic             ip_out_valid,
  output logic [W-1:0]     ip_out_data,
  input  logic             ip_out_occ,
  // error journal
  output logic [15:0]      n_sec,
  output logic [15:0]      n_ded,
  output logic [15:0]      n_rerr,
  output logic [15:0]      n_logged,
  input  logic [2:0]       jr_idx,
  output logic [1:0]       jr_kind,
  output port_e            jr_port
);

  logic             en;
  logic [N_DIR-1:0] nbr_unav;
  logic [3:0]       diag_unav;

  rkt_ctrl u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .fault_i        (fault_i),
    .nbr_unavail_i  (unavailable_in),
    .diag_unavail_i (diag_unavailable_in),
    .unavailable_o  (unavailable_out),
    .en_o           (en),
    .nbr_unavail_o  (nbr_unav),
    .diag_unavail_o (diag_unav)
  );

  // Per input port.
  logic [W-1:0]      head     [N_PORT];
  logic [N_PORT-1:0] rt_valid;
  port_e             rt_port  [N_PORT];
  logic [N_PORT-1:0] rx_idle, port_occ, grant_in, pop_in;
  logic [N_PORT-1:0] ev_sec, ev_ded, ev_rerr;
  logic              in_valid [N_PORT];
  logic [CW-1:0]     in_data  [N_PORT];
  logic              in_looped[N_PORT];

  // Per output port.
  logic [N_PORT-1:0] grant_out [N_PORT];
  logic [N_PORT-1:0] pop_out   [N_PORT];
  logic              tx_valid  [N_PORT];
  logic [W-1:0]      tx_data   [N_PORT];
  logic              tx_loop   [N_PORT];
  logic              loop_req  [N_PORT];
  logic              loop_ok   [N_PORT];
  logic              pass_ok   [N_PORT];
  logic              unav_side [N_PORT];

  for (genvar p = 0; p < N_PORT; p++) begin : g_port
    localparam port_e PP = port_e'(p);
    localparam bit    IS_DIR = (p < N_DIR);

    input_port #(
      .W(W), .CW(CW), .PKTS(PKTS), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
      .MY_X(MY_X), .MY_Y(MY_Y), .MY_PORT(PP), .HAS_ECC(IS_DIR)
    ) u_in (
      .clk            (clk),
      .rst_n          (rst_n),
      .in_valid_i     (in_valid[p]),
      .in_data_i      (in_data[p]),
      .in_looped_i    (in_looped[p]),
      .nbr_unavail_i  (nbr_unav),
      .diag_unavail_i (diag_unav),
      .grant_i        (grant_in[p]),
      .pop_i          (pop_in[p]),
      .head_o         (head[p]),
      .rt_valid_o     (rt_valid[p]),
      .rt_port_o      (rt_port[p]),
      .rx_idle_o      (rx_idle[p]),
      .port_occ_o     (port_occ[p]),
      .ev_sec_o       (ev_sec[p]),
      .ev_ded_o       (ev_ded[p]),
      .ev_rerr_o      (ev_rerr[p])
    );

    output_fsm #(.W(W), .MY_PORT(PP)) u_out (
      .clk        (clk),
      .rst_n      (rst_n),
      .en_i       (en),
      .rt_valid_i (rt_valid),
      .rt_port_i  (rt_port),
      .head_i     (head),
      .pass_ok_i  (pass_ok[p]),
      .unavail_i  (unav_side[p]),
      .loop_ok_i  (loop_ok[p]),
      .loop_req_o (loop_req[p]),
      .grant_o    (grant_out[p]),
      .pop_o      (pop_out[p]),
      .tx_valid_o (tx_valid[p]),
      .tx_data_o  (tx_data[p]),
      .tx_loop_o  (tx_loop[p]),
      .busy_o     ()
    );

    if (IS_DIR) begin : g_side
      logic [CW-1:0] tx_code;

      hamming_enc #(.K(W), .CW(CW)) u_enc (
        .data_i (tx_data[p]),
        .code_o (tx_code)
      );

      loopback_module #(.CW(CW)) u_lb (
        .clk              (clk),
        .rst_n            (rst_n),
        .tx_valid_i       (tx_valid[p]),
        .tx_data_i        (tx_code),
        .tx_loop_i        (tx_loop[p]),
        .loop_req_i       (loop_req[p]),
        .loop_ok_o        (loop_ok[p]),
        .pass_ok_o        (pass_ok[p]),
        .data_request_out (data_request_out[p]),
        .data_out         (data_out[p]),
        .occ_out          (occ_out[p]),
        .data_request_in  (data_request_in[p]),
        .data_in          (data_in[p]),
        .occ_in           (occ_in[p]),
        .unavailable_in   (nbr_unav[p]),
        .port_occ_i       (port_occ[p] || !en),
        .rx_idle_i        (rx_idle[p]),
        .in_valid_o       (in_valid[p]),
        .in_data_o        (in_data[p]),
        .in_looped_o      (in_looped[p])
      );
      assign unav_side[p] = nbr_unav[p];
    end else begin : g_local
      assign in_valid[p]  = ip_in_valid;
      assign in_data[p]   = CW'(ip_in_data);
      assign in_looped[p] = 1'b0;
      assign pass_ok[p]   = !ip_out_occ;
      assign loop_ok[p]   = 1'b0;
      assign unav_side[p] = 1'b0;
      assign ip_in_occ    = port_occ[p] || !en;

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          ip_out_valid <= 1'b0;
          ip_out_data  <= '0;
        end else begin
          ip_out_valid <= tx_valid[p];
          if (tx_valid[p]) ip_out_data <= tx_data[p];
        end
      end
    end
  end

  always_comb begin
    grant_in = '0;
    pop_in   = '0;
    for (int o = 0; o < N_PORT; o++) begin
      grant_in |= grant_out[o];
      pop_in   |= pop_out[o];
    end
  end

  error_journal #(.CNT_W(16), .DEPTH(8)) u_journal (
    .clk        (clk),
    .rst_n      (rst_n),
    .ev_sec_i   (ev_sec),
    .ev_ded_i   (ev_ded),
    .ev_rerr_i  (ev_rerr),
    .n_sec_o    (n_sec),
    .n_ded_o    (n_ded),
    .n_rerr_o   (n_rerr),
    .n_logged_o (n_logged),
    .rd_idx_i   (jr_idx),
    .rd_kind_o  (jr_kind),
    .rd_port_o  (jr_port)
  );

endmodule
