// sig_analyzer2: 2-bit parallel signature analyzer (multiple-input
// signature register).
//
// Each enabled clock the register (s1, s0) is shifted once and a 2-bit
// response word d is folded in. The pair (s1, s0) after the shift is the
// remainder of the division of the response stream, read as a polynomial,
// by the generator P(x) = x^2 + x + 1:
//   s1' = d1 ^ s1 ^ s0,   s0' = d0 ^ s1.
// A 2-bit parallel analyzer and the idea of comparing the final remainder
// with a fault-free one follow the built-in self-test scheme; the choice of
// P(x) is this design's (any degree-2 primitive polynomial works the same).
//
// Interface: clear (synchronous, priority over en) empties the register;
// en = 1 shifts in d on the rising edge; sig is the register. One word per
// clock, result visible one clock after the last word.
module sig_analyzer2 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic [1:0] d,
  output logic [1:0] sig
);
  import esa_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sig <= '0;
    else if (clear)  sig <= '0;
    else if (en)     sig <= sa2_next(sig, d);
  end

endmodule
