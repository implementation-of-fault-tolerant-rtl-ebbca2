// mod_br1_residue: low-cost residue generator for a check base of the form
// g = b^r - 1.
//
// With b = 2^B_BITS, one group of r base-b digits is a W = r*B_BITS bit
// word, and b^r = 2^W = 1 (mod g). The residue of a number is therefore the
// residue of the sum of its W-bit words, in any order. The generator is a
// W-bit accumulator whose carry out is added back at the low end
// (end-around carry, one's-complement addition), so no division or
// correction table is needed. The all-ones pattern is the second code of 0
// and is shown as 0 on the output.
//
// Interface: clear (synchronous, priority over en) empties the
// accumulator; en = 1 adds word d on the rising edge; residue is 0..g-1.
// One W-bit word per clock. Defaults b = 2, r = 2 (g = 3) are this design's
// choice.
module mod_br1_residue #(
  parameter int unsigned B_BITS = 1,   // log2 of the number-system base b
  parameter int unsigned R      = 2,   // digits per group, g = b^R - 1
  localparam int unsigned W     = B_BITS * R
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] residue
);
  logic [W-1:0] acc;
  logic [W:0]   sum;
  logic [W-1:0] acc_next;

  always_comb begin
    sum      = {1'b0, acc} + {1'b0, d};
    acc_next = sum[W-1:0] + W'(sum[W]);
    residue  = (&acc) ? '0 : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (clear)  acc <= '0;
    else if (en)     acc <= acc_next;
  end

endmodule
