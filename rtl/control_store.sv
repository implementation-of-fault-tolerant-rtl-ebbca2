// control_store: the memory ("PROM") of the microprogrammable FSM.
//
// One word per address {x, y, s}: the next state of the application FSM and
// the next signature of the embedded signature analyzer. The analyzer
// therefore costs no logic of its own: it lives in memory columns that a
// microprogrammed FSM would otherwise leave unused, and its register sits
// next to the state register. Which error-detecting code the analyzer
// computes (polynomial division or residue modulo 3) is set by the contents
// only, chosen by CODE at reset and changeable at run time through the
// write port, which also allows the FSM itself to be reprogrammed.
//
// Interface: reset loads the image for CODE; asynchronous read (raddr -> rdata, the combinational part of
// the Huffman model); synchronous write of wdata at waddr when we = 1.
module control_store #(
  parameter esa_pkg::code_e CODE = esa_pkg::CODE_ALGEBRAIC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  esa_pkg::cs_addr_t raddr,
  output esa_pkg::cs_word_t rdata,
  input  logic              we,
  input  esa_pkg::cs_addr_t waddr,
  input  esa_pkg::cs_word_t wdata
);
  import esa_pkg::*;

  cs_mem_t mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  mem <= cs_image(CODE);
    else if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
