// tb_output_fsm: checks the output FSM of the east side.
//   - only inputs whose route names this side are granted, round-robin;
//   - a grant is followed by N_FLIT cycles of popping the granted input with
//     its head flits on tx_data;
//   - with the neighbour occupied nothing is granted; with it unavailable the
//     FSM raises loop_req and grants only on loop_ok, with tx_loop set;
//   - en_i = 0 blocks grants.
module tb_output_fsm;
  import rkt_pkg::*;

  localparam int W = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              en_i = 1;
  logic [N_PORT-1:0] rt_valid_i = '0;
  port_e             rt_port_i [N_PORT];
  logic [W-1:0]      head_i    [N_PORT];
  logic              pass_ok_i = 1, unavail_i = 0, loop_ok_i = 0;
  logic              loop_req_o;
  logic [N_PORT-1:0] grant_o, pop_o;
  logic              tx_valid_o, tx_loop_o, busy_o;
  logic [W-1:0]      tx_data_o;

  output_fsm #(.W(W), .MY_PORT(P_E)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // expect a grant of input i now, then N_FLIT pops of it
  task automatic expect_packet(input int i, input bit loop);
    #1 check(grant_o == N_PORT'(1 << i), $sformatf("grant input %0d, got %b", i, grant_o));
    @(posedge clk); #2;
    rt_valid_i[i] = 1'b0;
    for (int k = 0; k < N_FLIT; k++) begin
      head_i[i] = W'(i * 16 + k);
      #1 check(tx_valid_o && pop_o == N_PORT'(1 << i) && tx_data_o == W'(i * 16 + k) && tx_loop_o == loop,
               $sformatf("input %0d flit %0d: v=%b pop=%b d=%h loop=%b", i, k, tx_valid_o, pop_o, tx_data_o, tx_loop_o));
      @(posedge clk); #2;
    end
    #1 check(!tx_valid_o && pop_o == 0, "idle after packet");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_PORT; i++) begin rt_port_i[i] = P_N; head_i[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // inputs 0, 2, 4 want E, input 1 wants N
    rt_port_i[0] = P_E; rt_port_i[2] = P_E; rt_port_i[4] = P_E; rt_port_i[1] = P_N;
    rt_valid_i = 5'b10111;
    #1 check(grant_o == 5'b00001, "lowest requester first");
    expect_packet(0, 0);
    // input 0 requests again at once but input 2 is next in turn
    rt_valid_i[0] = 1;
    expect_packet(2, 0);
    expect_packet(4, 0);
    // round robin wraps to input 0 before 2
    rt_valid_i[2] = 1;
    expect_packet(0, 0);
    // neighbour occupied: no grant
    pass_ok_i = 0;
    #1 check(grant_o == 0 && !loop_req_o, "no grant while neighbour occupied");
    @(posedge clk); #2;
    // neighbour unavailable: loop request, grant on loop_ok
    unavail_i = 1;
    #1 check(loop_req_o && grant_o == 0, "loop request, no grant yet");
    @(posedge clk); #2;
    loop_ok_i = 1;
    expect_packet(2, 1);
    loop_ok_i = 0; unavail_i = 0; pass_ok_i = 1;
    // disabled
    rt_valid_i[4] = 1; en_i = 0;
    #1 check(grant_o == 0, "no grant when disabled");
    @(posedge clk); #2;
    en_i = 1;
    expect_packet(4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
