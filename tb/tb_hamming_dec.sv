// tb_hamming_dec: feeds hamming_dec with reference codewords that carry no
// error, one flipped bit (every position is tried) or two flipped bits, and
// checks the recovered data and the SEC / DED flags.
module tb_hamming_dec;
  import tb_util_pkg::*;

  localparam int K = 64, C = K + 8;

  logic [C-1:0] code;
  logic [K-1:0] data;
  logic         sec, ded;

  hamming_dec #(.K(K)) dut (.code_i(code), .data_o(data), .sec_o(sec), .ded_o(ded));

  int checks = 0, failures = 0;

  task automatic expect_out(input logic [K-1:0] d, input bit e_sec, input bit e_ded, input bit chk_data, input string what);
    #1;
    checks++;
    if (sec !== e_sec || ded !== e_ded || (chk_data && data !== d)) begin
      failures++;
      $display("FAIL %s: data=%h exp=%h sec=%b ded=%b", what, data, d, sec, ded);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] d;
    logic [79:0]  r;
    int a, b;
    for (int n = 0; n < 60; n++) begin
      d = {$urandom(), $urandom()};
      r = ref_encode(72'(d), K);
      code = r[C-1:0];
      expect_out(d, 0, 0, 1, "clean");
      for (int p = 0; p < C; p++) begin
        code = r[C-1:0];
        code[p] = ~code[p];
        expect_out(d, 1, 0, 1, $sformatf("single flip at %0d", p));
      end
      a = $urandom_range(C - 1);
      do b = $urandom_range(C - 1); while (b == a);
      code = r[C-1:0];
      code[a] = ~code[a];
      code[b] = ~code[b];
      expect_out(d, 0, 1, 0, $sformatf("double flip at %0d,%0d", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
