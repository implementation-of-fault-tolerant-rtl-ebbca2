// mod5_parallel: K-bit parallel residue generator, by default 3 bits per
// clock modulo 5, for any check base G >= 2 through the parameters.
//
// The number is applied as base-2^K digits, most significant digit first,
// one K-bit digit per enabled clock, so the register follows
// r' = (2^K r + d) mod G. The factor 2^K is first replaced by its residue
// C = 2^K mod G (for K = 3, G = 5: C = 3), giving a partial sum
// t = C*r + d of at most (G-1)^2 + 2^K - 1. A short restoring-division
// chain then subtracts G*2^i (i from high to low) wherever it fits; each
// subtraction is an addition of the two's complement, as the correction
// signals of a parallel generator add the 8's complement of the modulus.
// The 3-bit, mod-5 default follows the residue-code scheme; the reduction
// chain is this design's own.
//
// Interface: clear (synchronous, priority over en) starts a new number;
// en = 1 takes digit d on the rising edge; residue is 0..G-1. An n-digit
// (K*n-bit) number takes n clocks, K times fewer than the serial form.
module mod5_parallel #(
  parameter int unsigned  G  = 5,             // check base
  parameter int unsigned  K  = 3,             // bits per digit
  localparam int unsigned RW = $clog2(G),     // residue width
  localparam int unsigned C  = (2 ** K) % G,  // 2^K mod G
  localparam int unsigned TW = $clog2((G - 1) * C + 2 ** K)  // partial-sum width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic [K-1:0]  d,
  output logic [RW-1:0] residue
);
  logic [TW-1:0] t;
  logic [RW-1:0] r_next;

  always_comb begin
    t = TW'(C) * TW'(residue) + TW'(d);
    for (int i = TW - RW; i >= 0; i--) begin
      if ({{RW{1'b0}}, t} >= ((TW + RW)'(G) << i)) t = t + TW'(-((TW + RW)'(G) << i));
    end
    r_next = RW'(t);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      residue <= '0;
    else if (clear)  residue <= '0;
    else if (en)     residue <= r_next;
  end

endmodule
