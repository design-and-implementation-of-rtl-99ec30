// input_port: one input of the RKT switch (ECC, input buffer, routing logic,
// routing error detection).
//
// Flits arrive from the side's loopback module (link or loopback path). On a
// directional side each codeword is checked and corrected by the Hamming
// decoder and registered (one cycle of ECC latency); the local IP side
// carries plain data and skips the decoder. The header flit of a looped-back
// packet gets its bypass flag set here. The flits then go into the
// store-and-forward input buffer. When a whole packet is at the head and has
// not been claimed, its header is routed and checked in one registered step
// (rt_valid, rt_port, route error event). An output FSM's grant claims the
// packet; it stays claimed until its last flit is popped.
// port_occ tells the neighbour that no further packet fits, counting flits
// still in the ECC register and on the link. ECC and routing-error events are
// one-cycle pulses for the error journal.
module input_port
  import rkt_pkg::*;
#(
  parameter int    W       = 64,
  parameter int    CW      = ham_cw(W),
  parameter int    PKTS    = 2,
  parameter int    MESH_X  = 4,
  parameter int    MESH_Y  = 4,
  parameter int    MY_X    = 0,
  parameter int    MY_Y    = 0,
  parameter port_e MY_PORT = P_N,
  parameter bit    HAS_ECC = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid_i,
  input  logic [CW-1:0]     in_data_i,
  input  logic              in_looped_i,
  input  logic [N_DIR-1:0]  nbr_unavail_i,
  input  logic [3:0]        diag_unavail_i,
  input  logic              grant_i,
  input  logic              pop_i,
  output logic [W-1:0]      head_o,
  output logic              rt_valid_o,
  output port_e             rt_port_o,
  output logic              rx_idle_o,
  output logic              port_occ_o,
  output logic              ev_sec_o,
  output logic              ev_ded_o,
  output logic              ev_rerr_o
);

  localparam int DEPTH = PKTS * N_FLIT;
  localparam int CNTW  = $clog2(DEPTH + 1);

  logic [W-1:0] dec_data;
  logic         dec_sec, dec_ded;

  if (HAS_ECC) begin : g_ecc
    hamming_dec #(.K(W), .CW(CW)) u_dec (
      .code_i (in_data_i),
      .data_o (dec_data),
      .sec_o  (dec_sec),
      .ded_o  (dec_ded)
    );
  end else begin : g_raw
    assign dec_data = in_data_i[W-1:0];
    assign dec_sec  = 1'b0;
    assign dec_ded  = 1'b0;
  end

  // ECC register stage.
  logic                      d_valid;
  logic [W-1:0]              d_data;
  logic [$clog2(N_FLIT)-1:0] rxcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid  <= 1'b0;
      d_data   <= '0;
      rxcnt    <= '0;
      ev_sec_o <= 1'b0;
      ev_ded_o <= 1'b0;
    end else begin
      d_valid  <= in_valid_i;
      ev_sec_o <= in_valid_i && dec_sec;
      ev_ded_o <= in_valid_i && dec_ded;
      if (in_valid_i) begin
        d_data <= dec_data;
        if (rxcnt == '0 && in_looped_i) d_data[0] <= 1'b1;  // header bypass flag
        rxcnt <= rxcnt + 1'b1;
      end
    end
  end

  // Store-and-forward buffer.
  logic            pkt_ready, pop_last;
  logic [CNTW-1:0] count, free;

  input_buffer #(.W(W), .PKTS(PKTS)) u_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (d_valid),
    .wr_data   (d_data),
    .rd_en     (pop_i),
    .rd_data   (head_o),
    .pkt_ready (pkt_ready),
    .pop_last  (pop_last),
    .count     (count),
    .free      (free)
  );

  always_comb begin
    int room;
    room = int'(free) - int'(d_valid) - int'(in_valid_i);
    port_occ_o = room < N_FLIT;
  end
  assign rx_idle_o = (rxcnt == '0) && !d_valid;

  // Routing and routing-error check of the head packet.
  hdr_t  hdr;
  port_e route;
  logic  xy_ok, rerr, claimed;

  assign hdr = hdr_t'(head_o[HDR_W-1:0]);

  routing_logic #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(MY_X), .MY_Y(MY_Y)) u_route (
    .hdr_i         (hdr),
    .arr_port_i    (MY_PORT),
    .nbr_unavail_i (nbr_unavail_i),
    .out_port_o    (route)
  );

  route_err_detect #(.MY_X(MY_X), .MY_Y(MY_Y)) u_rerr (
    .hdr_i          (hdr),
    .arr_port_i     (MY_PORT),
    .nbr_unavail_i  (nbr_unavail_i),
    .diag_unavail_i (diag_unavail_i),
    .xy_ok_o        (xy_ok),
    .route_err_o    (rerr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_valid_o <= 1'b0;
      rt_port_o  <= P_L;
      claimed    <= 1'b0;
      ev_rerr_o  <= 1'b0;
    end else begin
      ev_rerr_o <= 1'b0;
      if (grant_i) begin
        rt_valid_o <= 1'b0;
        claimed    <= 1'b1;
      end else if (pkt_ready && !rt_valid_o && !claimed) begin
        rt_valid_o <= 1'b1;
        rt_port_o  <= route;
        ev_rerr_o  <= rerr;
      end
      if (pop_last) claimed <= 1'b0;
    end
  end

  a_grant_needs_route: assert property (@(posedge clk) disable iff (!rst_n) grant_i |-> rt_valid_o);

endmodule
