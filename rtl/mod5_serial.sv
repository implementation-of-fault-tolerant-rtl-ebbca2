// mod5_serial: bit-serial residue generator, modulo 5 by default and for
// any check base G >= 2 through the parameter.
//
// The number is applied most significant bit first, one bit per enabled
// clock. Reading one more bit u doubles the number and adds u, so the
// residue register follows r' = (2r + u) mod G. Since 2r + u < 2G, one
// conditional subtraction of G reduces it. The mod-5 generator and the
// arbitrary check base follow the residue-code scheme; the bit order and
// the clear/enable interface are this design's choices.
//
// Interface: clear (synchronous, priority over en) starts a new number with
// residue 0; en = 1 takes bit u on the rising edge; residue is always the
// residue of the bits taken so far (0..G-1). The residue of an n-bit number
// is ready one clock after its last bit, n clocks after the first.
module mod5_serial #(
  parameter int unsigned G  = 5,              // check base
  localparam int unsigned RW = $clog2(G)      // residue width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic          u,
  output logic [RW-1:0] residue
);
  logic [RW:0]   twice;
  logic [RW-1:0] r_next;

  always_comb begin
    twice  = {residue, u};
    r_next = (twice >= (RW + 1)'(G)) ? RW'(twice - (RW + 1)'(G)) : twice[RW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      residue <= '0;
    else if (clear)  residue <= '0;
    else if (en)     residue <= r_next;
  end

endmodule
