// tb_util_pkg: reference models shared by the testbenches.
//
// ref_encode builds the SEC-DED Hamming codeword the switch links carry,
// written independently of the RTL: it walks the codeword positions once,
// placing data bits at non-power-of-two positions and folding every set
// position index into a running syndrome, which is then written into the
// check-bit positions; bit 0 is the overall parity. ref_check_bits returns
// how many check bits a data width needs.
package tb_util_pkg;

  function automatic int ref_check_bits(input int k);
    int p;
    for (p = 1; (1 << p) < k + p + 1; p++) ;
    return p;
  endfunction

  // Codeword of up to 80 bits for up to 72 data bits.
  function automatic logic [79:0] ref_encode(input logic [71:0] d, input int k);
    logic [79:0] c;
    int p, n, j, syn;
    p = ref_check_bits(k);
    n = k + p + 1;
    c = '0;
    j = 0;
    syn = 0;
    for (int pos = 1; pos < n; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        c[pos] = d[j];
        if (d[j]) syn ^= pos;
        j++;
      end
    end
    for (int b = 0; b < p; b++) c[1 << b] = syn[b];
    c[0] = ^c;
    return c;
  endfunction

endpackage
