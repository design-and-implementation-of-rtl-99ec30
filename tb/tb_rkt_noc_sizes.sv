// tb_rkt_noc_sizes: runs the evaluated mesh sizes 2 x 2, 3 x 3 and 4 x 4 side
// by side (64-bit flits), each with a corner-to-corner latency check and
// random traffic checked flit by flit (see noc_traffic).
module tb_rkt_noc_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d2, d3, d4;
  int   c2, c3, c4, f2, f3, f4;

  noc_traffic #(.MX(2), .MY(2), .NPKT(60))  u2 (.clk, .rst_n, .fault_at(-1), .done(d2), .checks(c2), .failures(f2));
  noc_traffic #(.MX(3), .MY(3), .NPKT(90))  u3 (.clk, .rst_n, .fault_at(-1), .done(d3), .checks(c3), .failures(f3));
  noc_traffic #(.MX(4), .MY(4), .NPKT(120)) u4 (.clk, .rst_n, .fault_at(-1), .done(d4), .checks(c4), .failures(f4));

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c4, f2 + f3 + f4 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d2 && d3 && d4);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c4, f2 + f3 + f4);
    $finish;
  end
endmodule
