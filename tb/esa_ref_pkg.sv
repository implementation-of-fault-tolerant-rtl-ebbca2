// esa_ref_pkg: reference models for the testbenches, written independently
// of the RTL functions.
//
// * poly_sig: signature of a stream of 2-bit words as the remainder of the
//   stream polynomial (word i = d1*x^(N-i) + d0*x^(N-1-i)) divided by
//   x^2 + x + 1, by plain long division over GF(2).
// * The example FSM as a transition table (Gray up/down counter).
// * The 4-bit test pattern LFSR written as a sequence generator.
package esa_ref_pkg;

  localparam int MAXW = 512;

  // Remainder of a stream of n 2-bit words modulo x^2 + x + 1.
  function automatic logic [1:0] poly_sig(input logic [1:0] w [], input int n);
    logic [MAXW+1:0] p;
    p = '0;
    for (int i = 0; i < n; i++) begin
      p[n - i]     ^= w[i][1];
      p[n - 1 - i] ^= w[i][0];
    end
    for (int k = n; k >= 2; k--) begin
      if (p[k]) begin
        p[k]     ^= 1'b1;
        p[k - 1] ^= 1'b1;
        p[k - 2] ^= 1'b1;
      end
    end
    return p[1:0];
  endfunction

  // Value of the stream read as a base-4 number, modulo 3.
  function automatic logic [1:0] mod3_sig(input logic [1:0] w [], input int n);
    int unsigned v;
    v = 0;
    for (int i = 0; i < n; i++) v = (v * 4 + int'(w[i])) % 3;
    return 2'(v);
  endfunction

  // Gray counter: position in the cycle 00,01,11,10.
  function automatic logic [1:0] ref_fsm(input logic x, input logic [1:0] y);
    logic [1:0] gray [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
    int pos;
    pos = 0;
    for (int i = 0; i < 4; i++) if (gray[i] == y) pos = i;
    return x ? gray[(pos + 1) % 4] : gray[(pos + 3) % 4];
  endfunction

  // Test pattern: bit 0 of the Fibonacci LFSR x^4 + x^3 + 1 from seed 0001.
  function automatic logic tpg_bit(input int k);
    logic [3:0] r;
    r = 4'b0001;
    for (int i = 0; i < k; i++) r = {r[2:0], r[3] ^ r[2]};
    return r[0];
  endfunction

endpackage
