// output_fsm: finite state machine of one output side of the RKT switch.
//
// Each output (N, E, S, W and the local IP port) has one. In IDLE it looks at
// the five input ports; an input requests this output when a whole packet
// sits at the head of its buffer and its registered route names this side.
// Among the requesters it grants one in round-robin order, provided the side
// can take a packet:
//   - pass_ok: the neighbour is available and not occupied, so the packet
//     goes out on the link;
//   - otherwise, if the neighbour is unavailable (directional sides only),
//     loop_req asks the loopback module to turn the packet around and the
//     grant waits for loop_ok.
// After a grant (one cycle) the FSM spends N_FLIT cycles in SEND, popping one
// flit per cycle from the granted input buffer and driving it to tx_data with
// tx_loop telling the loopback module where it goes. grant_o pulses for one
// cycle so the input port can clear its route. en_i = 0 stops new grants
// (faulty router). Round-robin order and the single-flit output register
// (inside the loopback module) are this implementation's choices.
module output_fsm
  import rkt_pkg::*;
#(
  parameter int    W       = 64,
  parameter port_e MY_PORT = P_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_i,
  input  logic [N_PORT-1:0]    rt_valid_i,
  input  port_e                rt_port_i  [N_PORT],
  input  logic [W-1:0]         head_i     [N_PORT],
  input  logic                 pass_ok_i,
  input  logic                 unavail_i,
  input  logic                 loop_ok_i,
  output logic                 loop_req_o,
  output logic [N_PORT-1:0]    grant_o,
  output logic [N_PORT-1:0]    pop_o,
  output logic                 tx_valid_o,
  output logic [W-1:0]         tx_data_o,
  output logic                 tx_loop_o,
  output logic                 busy_o
);

  localparam int IW = $clog2(N_PORT);
  localparam bit IS_DIR = (MY_PORT != P_L);

  typedef enum logic {S_IDLE, S_SEND} st_e;

  st_e                     state;
  logic [IW-1:0]           sel, rr;
  logic                    mode_loop;
  logic [$clog2(N_FLIT)-1:0] cnt;

  logic [N_PORT-1:0] cand;
  logic              any_cand;
  logic [IW-1:0]     pick;
  logic              go_pass, go_loop;

  always_comb begin
    for (int i = 0; i < N_PORT; i++)
      cand[i] = rt_valid_i[i] && (rt_port_i[i] == MY_PORT);
    any_cand = |cand;
    pick = rr;
    for (int k = N_PORT - 1; k >= 0; k--) begin
      int idx;
      idx = (int'(rr) + k) % N_PORT;
      if (cand[idx]) pick = IW'(idx);
    end
  end

  assign go_pass    = en_i && (state == S_IDLE) && any_cand && pass_ok_i;
  assign loop_req_o = IS_DIR && en_i && (state == S_IDLE) && any_cand && unavail_i;
  assign go_loop    = loop_req_o && loop_ok_i;
  assign busy_o     = (state == S_SEND);

  always_comb begin
    grant_o = '0;
    if (go_pass || go_loop) grant_o[pick] = 1'b1;
    pop_o = '0;
    if (state == S_SEND) pop_o[sel] = 1'b1;
  end

  assign tx_valid_o = (state == S_SEND);
  assign tx_data_o  = head_i[sel];
  assign tx_loop_o  = (state == S_SEND) && mode_loop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sel       <= '0;
      rr        <= '0;
      mode_loop <= 1'b0;
      cnt       <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          cnt <= '0;
          if (go_pass || go_loop) begin
            state     <= S_SEND;
            sel       <= pick;
            mode_loop <= go_loop;
          end
        end
        default: begin
          cnt <= cnt + 1'b1;
          if (cnt == ($clog2(N_FLIT))'(N_FLIT - 1)) begin
            state <= S_IDLE;
            rr    <= (sel == IW'(N_PORT - 1)) ? '0 : sel + 1'b1;
          end
        end
      endcase
    end
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_o));

endmodule
