// input_buffer: store-and-forward packet FIFO of one input port.
//
// Holds PKTS packets of N_FLIT flits (two packets of four flits, as in the
// design's synthesis set-up). Flits are written one per cycle in packet order;
// a packet only counts as ready once all of its flits are stored, which is
// what makes the switch store-and-forward. The head flit is presented
// combinationally on rd_data; rd_en pops it. pkt_ready tells the routing
// stage that a whole packet sits at the head, pop_last marks the pop of the
// last flit of a packet. Writing when full or reading when empty is a
// protocol error and is flagged by assertions.
module input_buffer
  import rkt_pkg::*;
#(
  parameter int W     = 64,
  parameter int PKTS  = 2,
  parameter int DEPTH = PKTS * N_FLIT
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       pkt_ready,
  output logic                       pop_last,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] free
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int FW = $clog2(N_FLIT);

  logic [W-1:0]                 mem [DEPTH];
  logic [AW-1:0]                wptr, rptr;
  logic [FW-1:0]                wflit, rflit;
  logic [$clog2(PKTS+1)-1:0]    pkts;
  logic                         wr_last;

  assign rd_data   = mem[rptr];
  assign pkt_ready = (pkts != '0);
  assign free      = ($clog2(DEPTH+1))'(DEPTH) - count;
  assign wr_last   = wr_en && (wflit == FW'(N_FLIT - 1));
  assign pop_last  = rd_en && (rflit == FW'(N_FLIT - 1));

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      wflit <= '0;
      rflit <= '0;
      count <= '0;
      pkts  <= '0;
    end else begin
      if (wr_en) begin
        wptr  <= inc(wptr);
        wflit <= wflit + 1'b1;
      end
      if (rd_en) begin
        rptr  <= inc(rptr);
        rflit <= rflit + 1'b1;
      end
      count <= count + ($clog2(DEPTH+1))'(wr_en) - ($clog2(DEPTH+1))'(rd_en);
      pkts  <= pkts + ($clog2(PKTS+1))'(wr_last) - ($clog2(PKTS+1))'(pop_last);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (count != ($clog2(DEPTH+1))'(DEPTH) || rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> count != '0);

endmodule
