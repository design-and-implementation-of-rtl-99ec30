// tb_input_buffer: writes packets into the store-and-forward buffer and
// checks that a packet is only announced once complete, that flits come out
// in order, that pop_last marks each packet's end, and that free space is
// tracked up to the full two-packet depth.
module tb_input_buffer;
  import rkt_pkg::*;

  localparam int W = 16, PKTS = 2, DEPTH = PKTS * N_FLIT;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic         pkt_ready, pop_last;
  logic [3:0]   count, free;

  input_buffer #(.W(W), .PKTS(PKTS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1 check(!pkt_ready && free == 4'(DEPTH), "empty after reset");
    // first packet: not ready until the fourth flit is in
    for (int k = 0; k < N_FLIT; k++) begin
      #1 check(!pkt_ready, $sformatf("not ready with %0d flits", k));
      wr_en <= 1; wr_data <= W'(16'h100 + k);
      @(posedge clk);
    end
    wr_en <= 0;
    #1 check(pkt_ready, "ready after four flits");
    check(free == 4'(DEPTH - N_FLIT), "free after one packet");
    // second packet fills the buffer
    for (int k = 0; k < N_FLIT; k++) begin
      wr_en <= 1; wr_data <= W'(16'h200 + k);
      @(posedge clk);
    end
    wr_en <= 0;
    #1 check(free == 0 && count == 4'(DEPTH), "full after two packets");
    // pop first packet, check order and pop_last
    for (int k = 0; k < N_FLIT; k++) begin
      #1 check(rd_data == W'(16'h100 + k), $sformatf("packet 1 flit %0d = %h", k, rd_data));
      rd_en <= 1;
      #1 check(pop_last == (k == N_FLIT - 1), $sformatf("pop_last at flit %0d", k));
      @(posedge clk);
      rd_en <= 0;
    end
    #1 check(pkt_ready, "second packet still ready");
    // simultaneous write of a third packet and read of the second
    for (int k = 0; k < N_FLIT; k++) begin
      #1 check(rd_data == W'(16'h200 + k), $sformatf("packet 2 flit %0d", k));
      rd_en <= 1; wr_en <= 1; wr_data <= W'(16'h300 + k);
      @(posedge clk);
    end
    rd_en <= 0; wr_en <= 0;
    #1 check(pkt_ready && count == 4'(N_FLIT), "third packet ready, one packet held");
    for (int k = 0; k < N_FLIT; k++) begin
      #1 check(rd_data == W'(16'h300 + k), $sformatf("packet 3 flit %0d", k));
      rd_en <= 1;
      @(posedge clk);
      rd_en <= 0;
    end
    #1 check(!pkt_ready && count == 0, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
