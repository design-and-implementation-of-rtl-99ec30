// hamming_enc: Hamming SEC-DED encoder for one flit.
//
// The switch protects every flit that crosses a switch-to-switch link with a
// Hamming code. This block builds the codeword: codeword bit i (1 <= i < CW)
// is Hamming position i; positions that are powers of two hold the check bits,
// the others hold the data bits in ascending order. Check bit 2^k is the even
// parity of all positions whose index has bit k set. Bit 0 is an overall
// parity bit over the whole word, which lets the decoder tell one flipped bit
// (corrected) from two (detected). The Hamming code is the design's; the extra
// overall parity bit is this implementation's choice.
//
// Purely combinational; CW = K + ham_p(K) + 1 (72 bits for K = 64).
module hamming_enc
  import rkt_pkg::*;
#(
  parameter int K  = 64,
  parameter int CW = ham_cw(K)
) (
  input  logic [K-1:0]  data_i,
  output logic [CW-1:0] code_o
);

  localparam int P = ham_p(K);

  always_comb begin
    logic [CW-1:0] c;
    int j;
    c = '0;
    j = 0;
    for (int pos = 1; pos < CW; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        c[pos] = data_i[j];
        j++;
      end
    end
    for (int k = 0; k < P; k++) begin
      logic par;
      par = 1'b0;
      for (int pos = 1; pos < CW; pos++)
        if (((pos >> k) & 1) == 1) par ^= c[pos];
      c[1 << k] = par;
    end
    c[0] = ^c[CW-1:1];
    code_o = c;
  end

endmodule
