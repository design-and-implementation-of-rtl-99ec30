// hamming_dec: Hamming SEC-DED decoder and corrector for one flit.
//
// Counterpart of hamming_enc. The syndrome is the XOR of the indices of all
// set codeword positions; together with the overall parity it classifies the
// word:
//   syndrome 0, parity even  -> no error
//   parity odd               -> one bit flipped; the bit at the syndrome
//                               position is inverted (syndrome 0: only the
//                               overall parity bit was hit) and sec_o is set
//   syndrome != 0, parity even -> two bits flipped; ded_o is set and the data
//                               are passed on uncorrected (likewise for an odd
//                               parity whose syndrome points past the word)
// Purely combinational; the input port registers its outputs (one cycle of
// ECC latency).
module hamming_dec
  import rkt_pkg::*;
#(
  parameter int K  = 64,
  parameter int CW = ham_cw(K)
) (
  input  logic [CW-1:0] code_i,
  output logic [K-1:0]  data_o,
  output logic          sec_o,   // single error seen and corrected
  output logic          ded_o    // double error seen, not correctable
);

  localparam int P = ham_p(K);

  always_comb begin
    logic [P-1:0]  syn;
    logic          par;
    logic [CW-1:0] c;
    int j;
    syn = '0;
    for (int pos = 1; pos < CW; pos++)
      if (code_i[pos]) syn ^= P'(pos);
    par = ^code_i;
    c = code_i;
    sec_o = 1'b0;
    ded_o = 1'b0;
    if (par && int'(syn) < CW) begin
      sec_o = 1'b1;
      if (syn != '0) c[syn] = ~c[syn];
    end else if (syn != '0) begin
      ded_o = 1'b1;
    end
    data_o = '0;
    j = 0;
    for (int pos = 1; pos < CW; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data_o[j] = c[pos];
        j++;
      end
    end
  end

endmodule
