// error_journal: centralized journal of the data-packet errors seen by one switch.
//
// Every input port reports three kinds of event as one-cycle pulses: a single
// bit error corrected by the Hamming decoder (SEC), a double error it could
// only detect (DED), and a routing error from the routing error detection.
// The journal keeps one saturating counter per kind (summed over all ports,
// several events in a cycle all count) and a circular log of the last DEPTH
// events, each entry holding the kind and the input port. When several events
// occur in one cycle only the first (SEC before DED before routing error,
// lower port first) is logged; n_logged counts entries ever written
// (saturating) so a reader can tell how many of the DEPTH entries are valid.
// The entry at rd_idx (0 = most recent) is readable combinationally.
// The design only names this block; its contents are this implementation's.
module error_journal
  import rkt_pkg::*;
#(
  parameter int CNT_W = 16,
  parameter int DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_PORT-1:0]        ev_sec_i,
  input  logic [N_PORT-1:0]        ev_ded_i,
  input  logic [N_PORT-1:0]        ev_rerr_i,
  output logic [CNT_W-1:0]         n_sec_o,
  output logic [CNT_W-1:0]         n_ded_o,
  output logic [CNT_W-1:0]         n_rerr_o,
  output logic [CNT_W-1:0]         n_logged_o,
  input  logic [$clog2(DEPTH)-1:0] rd_idx_i,
  output logic [1:0]               rd_kind_o,   // 1 SEC, 2 DED, 3 routing error
  output port_e                    rd_port_o
);

  localparam int AW = $clog2(DEPTH);

  typedef struct packed {
    logic [1:0] kind;
    port_e      port;
  } entry_t;

  entry_t        log_q [DEPTH];
  logic [AW-1:0] wptr;
  logic          have;
  entry_t        ent;

  function automatic logic [CNT_W-1:0] sat_add(input logic [CNT_W-1:0] a, input int b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + (CNT_W+1)'(b);
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_comb begin
    have = 1'b0;
    ent  = '{kind: 2'd0, port: P_L};
    for (int p = N_PORT - 1; p >= 0; p--)
      if (ev_rerr_i[p]) begin have = 1'b1; ent = '{kind: 2'd3, port: port_e'(p)}; end
    for (int p = N_PORT - 1; p >= 0; p--)
      if (ev_ded_i[p]) begin have = 1'b1; ent = '{kind: 2'd2, port: port_e'(p)}; end
    for (int p = N_PORT - 1; p >= 0; p--)
      if (ev_sec_i[p]) begin have = 1'b1; ent = '{kind: 2'd1, port: port_e'(p)}; end
  end

  always_ff @(posedge clk) begin
    if (have) log_q[wptr] <= ent;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr       <= '0;
      n_sec_o    <= '0;
      n_ded_o    <= '0;
      n_rerr_o   <= '0;
      n_logged_o <= '0;
    end else begin
      n_sec_o  <= sat_add(n_sec_o,  $countones(ev_sec_i));
      n_ded_o  <= sat_add(n_ded_o,  $countones(ev_ded_i));
      n_rerr_o <= sat_add(n_rerr_o, $countones(ev_rerr_i));
      if (have) begin
        wptr       <= wptr + 1'b1;
        n_logged_o <= sat_add(n_logged_o, 1);
      end
    end
  end

  entry_t rd_ent;
  assign rd_ent    = log_q[wptr - AW'(1) - rd_idx_i];
  assign rd_kind_o = rd_ent.kind;
  assign rd_port_o = rd_ent.port;

endmodule
