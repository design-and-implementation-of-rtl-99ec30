// tb_rkt_ctrl: checks that the fault status and the neighbour availability
// indications are registered once, and that a faulty router disables itself.
module tb_rkt_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       fault_i = 0;
  logic [3:0] nbr_unavail_i = '0, diag_unavail_i = '0;
  logic       unavailable_o, en_o;
  logic [3:0] nbr_unavail_o, diag_unavail_o;

  rkt_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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
    @(posedge clk); #1;
    check(!unavailable_o && en_o && nbr_unavail_o == 0 && diag_unavail_o == 0, "clean after reset");
    for (int n = 0; n < 30; n++) begin
      logic f, pf;
      logic [3:0] a, b, pa, pb;
      pf = fault_i; pa = nbr_unavail_i; pb = diag_unavail_i;
      f = 1'($urandom()); a = 4'($urandom()); b = 4'($urandom());
      @(negedge clk);
      fault_i = f; nbr_unavail_i = a; diag_unavail_i = b;
      #1 check(unavailable_o == pf && nbr_unavail_o == pa && diag_unavail_o == pb, "outputs wait for the clock");
      @(posedge clk); #1;
      check(unavailable_o == f && en_o == !f, $sformatf("fault %b registered", f));
      check(nbr_unavail_o == a && diag_unavail_o == b, "neighbour indications registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
