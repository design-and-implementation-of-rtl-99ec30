// rkt_ctrl: switch-level control logic (availability and fault status).
//
// Holds the router's own fault status and distributes the availability
// information the switch works with. fault_i (the router is to be treated as
// faulty, e.g. set by a test or a health monitor) is registered; while it is
// set the switch announces itself as unavailable to its four side neighbours
// and its four diagonal neighbours (unavailable_o), keeps all its input ports
// occupied and stops granting packets (en_o = 0). The side and diagonal
// indications coming from the neighbours are registered once here before the
// routing logic and the routing error detection use them, so the fault map a
// switch sees is one cycle old. The design shows this block and its
// input/output control signals but does not describe its insides; the
// registering and the halt behaviour are this implementation's.
module rkt_ctrl
  import rkt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fault_i,
  input  logic [N_DIR-1:0]  nbr_unavail_i,
  input  logic [3:0]        diag_unavail_i,
  output logic              unavailable_o,
  output logic              en_o,
  output logic [N_DIR-1:0]  nbr_unavail_o,
  output logic [3:0]        diag_unavail_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unavailable_o  <= 1'b0;
      nbr_unavail_o  <= '0;
      diag_unavail_o <= '0;
    end else begin
      unavailable_o  <= fault_i;
      nbr_unavail_o  <= nbr_unavail_i;
      diag_unavail_o <= diag_unavail_i;
    end
  end

  assign en_o = !unavailable_o;

endmodule
