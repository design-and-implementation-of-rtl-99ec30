// loopback_module: link interface of one side (N, E, S or W) of the RKT switch.
//
// Every side of the switch talks to its neighbour through one of these. The
// outgoing flits (already Hamming-coded) are registered in an output buffer
// and either sent on the link (data_out with data_request_out) or, when the
// neighbour is unavailable, fed back through a multiplexer into this side's
// own input path (the "data loopback" path), so that the packet re-enters the
// switch and can leave by another side. The incoming path is the multiplexer
// output: normally the link (data_in with data_request_in), during a loopback
// the looped flits, marked with in_looped so the input port sets the
// header's bypass flag.
//
// Control logic, per packet:
//   pass_ok   neighbour available and not occupied: send on the link.
//   loopback  requested by the output FSM (loop_req) when the neighbour is
//             unavailable. occ_out is raised at once so that the neighbour
//             stops sending to this side; once it has been up for two cycles,
//             no flit is arriving, no packet is half received and the input
//             buffer has room for a packet, loop_ok grants the loopback. The
//             N_FLIT looped flits then pass, and occ_out drops again.
// occ_out is the OR of the input port's own occupancy and the loopback hold.
// Timing: one register (the output buffer) between the FSM and the link or
// the loop path. The two-cycle hold, the flow-control meaning of occ and the
// choice to loop back only for an unavailable neighbour (and simply wait for
// an occupied one) are this implementation's.
module loopback_module
  import rkt_pkg::*;
#(
  parameter int CW = 72
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the output FSM of this side
  input  logic          tx_valid_i,
  input  logic [CW-1:0] tx_data_i,
  input  logic          tx_loop_i,
  input  logic          loop_req_i,
  output logic          loop_ok_o,
  output logic          pass_ok_o,
  // link towards the neighbour
  output logic          data_request_out,
  output logic [CW-1:0] data_out,
  output logic          occ_out,
  // link from the neighbour
  input  logic          data_request_in,
  input  logic [CW-1:0] data_in,
  input  logic          occ_in,
  input  logic          unavailable_in,
  // this side's input port
  input  logic          port_occ_i,
  input  logic          rx_idle_i,
  output logic          in_valid_o,
  output logic [CW-1:0] in_data_o,
  output logic          in_looped_o
);

  typedef enum logic [1:0] {LB_IDLE, LB_HOLD, LB_LOOP} lb_state_e;

  lb_state_e              state;
  logic                   held;
  logic [$clog2(N_FLIT):0] nloop;
  logic                   buf_valid, buf_loop;
  logic [CW-1:0]          buf_data;
  logic                   loop_flit;

  // Output buffer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_valid <= 1'b0;
      buf_loop  <= 1'b0;
      buf_data  <= '0;
    end else begin
      buf_valid <= tx_valid_i;
      buf_loop  <= tx_loop_i;
      if (tx_valid_i) buf_data <= tx_data_i;
    end
  end

  assign loop_flit        = buf_valid && buf_loop;
  assign data_request_out = buf_valid && !buf_loop;
  assign data_out         = buf_data;

  assign pass_ok_o = !occ_in && !unavailable_in;
  assign loop_ok_o = (state == LB_HOLD) && held && rx_idle_i && !data_request_in && !port_occ_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LB_IDLE;
      held  <= 1'b0;
      nloop <= '0;
    end else begin
      case (state)
        LB_IDLE: begin
          held  <= 1'b0;
          nloop <= '0;
          if (loop_req_i) state <= LB_HOLD;
        end
        LB_HOLD: begin
          held <= 1'b1;
          if (!loop_req_i)    state <= LB_IDLE;
          else if (loop_ok_o) state <= LB_LOOP;
        end
        default: begin // LB_LOOP
          if (loop_flit) begin
            nloop <= nloop + 1'b1;
            if (nloop == ($clog2(N_FLIT)+1)'(N_FLIT - 1)) state <= LB_IDLE;
          end
        end
      endcase
    end
  end

  assign occ_out = port_occ_i || (state != LB_IDLE);

  // Input multiplexer: link or loopback path.
  always_comb begin
    if (state == LB_LOOP) begin
      in_valid_o  = loop_flit;
      in_data_o   = buf_data;
      in_looped_o = 1'b1;
    end else begin
      in_valid_o  = data_request_in;
      in_data_o   = data_in;
      in_looped_o = 1'b0;
    end
  end

  a_loop_only_when_granted: assert property (@(posedge clk) disable iff (!rst_n)
    loop_flit |-> state == LB_LOOP);
  a_no_link_rx_during_loop: assert property (@(posedge clk) disable iff (!rst_n)
    state == LB_LOOP |-> !data_request_in);

endmodule
