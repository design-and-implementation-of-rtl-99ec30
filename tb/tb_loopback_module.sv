// tb_loopback_module: checks one side's link interface.
//   pass:     flits from the output FSM appear on the link one cycle later;
//             pass_ok follows the neighbour's occ and unavailable signals;
//   receive:  link flits reach the input port through the multiplexer;
//   loopback: loop_req raises occ_out at once, loop_ok comes only after two
//             cycles and only when no flit is arriving, the port is idle and
//             has room; the looped flits then reach the input port marked as
//             looped, never the link, and occ_out drops after the last one.
module tb_loopback_module;
  localparam int CW = 22;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          tx_valid_i = 0, tx_loop_i = 0, loop_req_i = 0;
  logic [CW-1:0] tx_data_i = '0;
  logic          loop_ok_o, pass_ok_o;
  logic          data_request_out, occ_out;
  logic [CW-1:0] data_out;
  logic          data_request_in = 0, occ_in = 0, unavailable_in = 0;
  logic [CW-1:0] data_in = '0;
  logic          port_occ_i = 0, rx_idle_i = 1;
  logic          in_valid_o, in_looped_o;
  logic [CW-1:0] in_data_o;

  loopback_module #(.CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // pass_ok
    #1 check(pass_ok_o, "pass_ok with free neighbour");
    occ_in = 1; #1 check(!pass_ok_o, "no pass while neighbour occupied");
    occ_in = 0; unavailable_in = 1; #1 check(!pass_ok_o, "no pass to unavailable neighbour");
    unavailable_in = 0;
    check(!occ_out, "occ_out low when idle");
    port_occ_i = 1; #1 check(occ_out, "occ_out follows the port's occupancy");
    port_occ_i = 0;
    // pass four flits
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      tx_valid_i = 1; tx_data_i = CW'(32'h100 + k);
      @(posedge clk); #1;
      check(data_request_out && data_out == CW'(32'h100 + k), $sformatf("pass flit %0d on link", k));
      check(!in_valid_o, "passed flit not looped");
    end
    @(negedge clk); tx_valid_i = 0;
    @(posedge clk); #1 check(!data_request_out, "link idle after packet");
    // receive from the link
    @(negedge clk); data_request_in = 1; data_in = CW'(32'h2AA);
    #1 check(in_valid_o && in_data_o == CW'(32'h2AA) && !in_looped_o, "link flit to input port");
    @(negedge clk); data_request_in = 0;
    // loopback
    unavailable_in = 1;
    loop_req_i = 1;
    @(posedge clk); #1;
    check(occ_out, "occ_out raised by loop request");
    check(!loop_ok_o, "no loop_ok in first hold cycle");
    rx_idle_i = 0;        // a packet is still being received
    @(posedge clk); #1 check(!loop_ok_o, "no loop_ok while receiving");
    rx_idle_i = 1; port_occ_i = 1;
    #1 check(!loop_ok_o, "no loop_ok without room");
    port_occ_i = 0;
    #1 check(loop_ok_o, "loop_ok once idle with room");
    @(posedge clk); // grant taken
    @(negedge clk); loop_req_i = 0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      tx_valid_i = 1; tx_loop_i = 1; tx_data_i = CW'(32'h300 + k);
      @(posedge clk); #1;
      check(!data_request_out, "looped flit not on link");
      check(in_valid_o && in_looped_o && in_data_o == CW'(32'h300 + k), $sformatf("looped flit %0d to input", k));
      check(occ_out, "occ_out held during loopback");
    end
    @(negedge clk); tx_valid_i = 0; tx_loop_i = 0;
    @(posedge clk); #1 check(!occ_out, "occ_out released after loopback");
    check(!in_valid_o, "input idle after loopback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
