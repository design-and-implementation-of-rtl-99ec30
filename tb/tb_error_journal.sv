// tb_error_journal: drives SEC, DED and routing-error pulses on several ports
// and checks the three counters (all simultaneous events count), the log
// order (newest first, one entry per cycle with SEC before DED before
// routing error and lower ports first) and counter saturation.
module tb_error_journal;
  import rkt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N_PORT-1:0] ev_sec_i = '0, ev_ded_i = '0, ev_rerr_i = '0;
  logic [3:0]        n_sec_o, n_ded_o, n_rerr_o, n_logged_o;
  logic [2:0]        rd_idx_i = '0;
  logic [1:0]        rd_kind_o;
  port_e             rd_port_o;

  error_journal #(.CNT_W(4), .DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(input logic [4:0] s, input logic [4:0] d, input logic [4:0] r);
    @(negedge clk);
    ev_sec_i = s; ev_ded_i = d; ev_rerr_i = r;
    @(negedge clk);
    ev_sec_i = '0; ev_ded_i = '0; ev_rerr_i = '0;
  endtask

  task automatic entry(input int idx, input int kind, input port_e p);
    rd_idx_i = 3'(idx);
    #1 check(rd_kind_o == 2'(kind) && rd_port_o == p, $sformatf("entry %0d: kind %0d port %s, got %0d %s", idx, kind, p.name(), rd_kind_o, rd_port_o.name()));
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    pulse(5'b00010, 5'b0, 5'b0);           // SEC on E
    pulse(5'b0, 5'b01000, 5'b0);           // DED on W
    pulse(5'b0, 5'b0, 5'b10000);           // routing error on L
    pulse(5'b00110, 5'b00001, 5'b00011);   // SEC E,S, DED N, rerr N,E: one entry (SEC E)
    check(n_sec_o == 3 && n_ded_o == 2 && n_rerr_o == 3, $sformatf("counters %0d %0d %0d", n_sec_o, n_ded_o, n_rerr_o));
    check(n_logged_o == 4, "four entries logged");
    entry(0, 1, P_E);
    entry(1, 3, P_L);
    entry(2, 2, P_W);
    entry(3, 1, P_E);
    pulse(5'b0, 5'b0, 5'b01001);           // rerr N and W: logs N
    entry(0, 3, P_N);
    for (int i = 0; i < 20; i++) pulse(5'b11111, 5'b0, 5'b0);
    check(n_sec_o == 4'hF, "SEC counter saturates");
    check(n_logged_o == 4'hF, "logged counter saturates");
    entry(0, 1, P_N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
