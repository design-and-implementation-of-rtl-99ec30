// tb_hamming: checks hamming_enc against the reference encoder for 64-bit
// flits (the default) and for 16-bit flits, with corner and random data.
module tb_hamming;
  import tb_util_pkg::*;

  localparam int K1 = 64, C1 = K1 + 8;
  localparam int K2 = 16, C2 = K2 + 6;

  logic [K1-1:0] d1;
  logic [C1-1:0] c1;
  logic [K2-1:0] d2;
  logic [C2-1:0] c2;

  hamming_enc #(.K(K1)) dut1 (.data_i(d1), .code_o(c1));
  hamming_enc #(.K(K2)) dut2 (.data_i(d2), .code_o(c2));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [79:0] r;
    for (int n = 0; n < 400; n++) begin
      case (n)
        0: d1 = '0;
        1: d1 = '1;
        2: d1 = 64'h1;
        3: d1 = 64'h8000_0000_0000_0000;
        default: d1 = {$urandom(), $urandom()};
      endcase
      d2 = d1[15:0] ^ d1[47:32];
      #1;
      r = ref_encode(72'(d1), K1);
      checks++;
      if (c1 !== r[C1-1:0]) begin
        failures++;
        $display("FAIL K=64 data=%h got=%h exp=%h", d1, c1, r[C1-1:0]);
      end
      r = ref_encode(72'(d2), K2);
      checks++;
      if (c2 !== r[C2-1:0]) begin
        failures++;
        $display("FAIL K=16 data=%h got=%h exp=%h", d2, c2, r[C2-1:0]);
      end
      checks++;
      if (^c1 !== 1'b0) begin
        failures++;
        $display("FAIL overall parity not even");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
