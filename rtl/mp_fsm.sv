// mp_fsm: Moore-type microprogrammable FSM with an embedded signature
// analyzer.
//
// The combinational part of the FSM is the control store, addressed by the
// primary inputs x, the present state y and the present signature s. Each
// clock the state register takes the stored next state and the signature
// register takes the stored next signature, which compresses the present
// state. The state register drives the outputs directly (output-coded Moore
// machine), so the signature sees every response of the machine, and a
// wrong next-state word changes the signature one clock later. Compression
// of the responses in spare memory columns follows the embedded analyzer
// scheme; the output coding, the example application and the choice of the
// compressed word are this design's.
//
// Interface: clear (synchronous) puts the FSM in its initial state 0 and
// empties the signature; x is sampled every clock; y is the state and
// output; sig is the signature; prog_* writes one control store word.
// One transition per clock.
module mp_fsm #(
  parameter esa_pkg::code_e CODE = esa_pkg::CODE_ALGEBRAIC
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic [esa_pkg::NX-1:0]    x,
  output logic [esa_pkg::NS-1:0]    y,
  output logic [esa_pkg::SIG_W-1:0] sig,
  input  logic                      prog_we,
  input  esa_pkg::cs_addr_t         prog_addr,
  input  esa_pkg::cs_word_t         prog_data
);
  import esa_pkg::*;

  cs_addr_t addr;
  cs_word_t word;

  assign addr = '{x: x, y: y, s: sig};

  control_store #(.CODE(CODE)) u_cs (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr (addr),
    .rdata (word),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y   <= '0;
      sig <= '0;
    end else if (clear) begin
      y   <= '0;
      sig <= '0;
    end else begin
      y   <= word.y_next;
      sig <= word.s_next;
    end
  end

endmodule
