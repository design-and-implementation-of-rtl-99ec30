// tb_rkt_noc_faults: one 4 x 4 mesh with a single faulty router, carrying 120
// random packets that avoid the faulty router as source and destination.
// Every packet must arrive intact, so the loopback and bypass routing must get
// around the fault. The faulty router is router 0 (a corner) by default and
// can be chosen with +fault=<r> to try the other positions.
module tb_rkt_noc_faults;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int   fault_at = 0;
  logic done;
  int   checks, failures;

  noc_traffic #(.MX(4), .MY(4), .NPKT(120)) u (.clk, .rst_n, .fault_at, .done, .checks, .failures);

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    void'($value$plusargs("fault=%d", fault_at));
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("faulty router %0d", fault_at);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
