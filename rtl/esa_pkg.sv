// esa_pkg: types, sizes and next-state functions shared by the embedded
// signature analyzer design.
//
// The microprogrammable FSM keeps its whole transition function, and the
// transition function of its signature analyzer, in one memory. The memory
// contents are produced here by functions, so that the same hardware can be
// loaded for either kind of error-detecting code:
//   * CODE_ALGEBRAIC  - 2-bit parallel signature analyzer, division by the
//                       generator polynomial P(x) = x^2 + x + 1 over GF(2)
//                       (the polynomial is this design's choice);
//   * CODE_ARITHMETIC - residue of the compressed word stream modulo 3,
//                       the check base 2^2 - 1 of a 2-bit register.
// Memory size and speed do not depend on the code, only the contents do.
//
// The example application FSM is this design's own: a 4-state Moore machine
// whose state register drives its outputs, counting up (x=1) or down (x=0)
// in Gray code.
package esa_pkg;

  // Widths of the microprogrammable FSM.
  localparam int unsigned NX    = 1;  // primary inputs
  localparam int unsigned NS    = 2;  // state bits (also the Moore outputs)
  localparam int unsigned SIG_W = 2;  // signature register ("2-bit analyzer")

  localparam int unsigned CS_AW = NX + NS + SIG_W;  // control store address

  typedef enum logic [0:0] {
    CODE_ALGEBRAIC  = 1'b0,
    CODE_ARITHMETIC = 1'b1
  } code_e;

  // Control store address {x, y, s} and word {y_next, s_next}.
  typedef struct packed {
    logic [NX-1:0]    x;
    logic [NS-1:0]    y;
    logic [SIG_W-1:0] s;
  } cs_addr_t;

  typedef struct packed {
    logic [NS-1:0]    y_next;
    logic [SIG_W-1:0] s_next;
  } cs_word_t;

  localparam int unsigned CS_DEPTH = 1 << CS_AW;
  typedef cs_word_t cs_mem_t [CS_DEPTH];

  // One step of the 2-bit parallel signature analyzer, P(x) = x^2 + x + 1.
  // The state polynomial s1*x + s0 is multiplied by x, reduced modulo P,
  // and the parallel input d1*x + d0 is added.
  function automatic logic [1:0] sa2_next(logic [1:0] s, logic [1:0] d);
    return {d[1] ^ s[1] ^ s[0], d[0] ^ s[1]};
  endfunction

  // One step of the radix-4 residue generator modulo 3: (4*s + d) mod 3.
  // Since 4 = 1 (mod 3) this is (s + d) mod 3; s = 3 is treated as 0.
  function automatic logic [1:0] mod3_next(logic [1:0] s, logic [1:0] d);
    logic [2:0] t;
    t = {1'b0, (s == 2'd3) ? 2'd0 : s} + {1'b0, (d == 2'd3) ? 2'd0 : d};
    return (t >= 3'd3) ? 2'(t - 3'd3) : t[1:0];
  endfunction

  // Example application: Gray-code up/down counter.
  function automatic logic [NS-1:0] app_next(logic [NX-1:0] x, logic [NS-1:0] y);
    unique case (y)
      2'b00:   return x[0] ? 2'b01 : 2'b10;
      2'b01:   return x[0] ? 2'b11 : 2'b00;
      2'b11:   return x[0] ? 2'b10 : 2'b01;
      default: return x[0] ? 2'b00 : 2'b11;
    endcase
  endfunction

  // Word stored at one control store address. The analyzer compresses the
  // present state, which is part of the address, so any wrong next-state
  // word shows up in the signature one clock later.
  function automatic cs_word_t cs_init_word(code_e code, cs_addr_t a);
    cs_word_t w;
    w.y_next = app_next(a.x, a.y);
    w.s_next = (code == CODE_ALGEBRAIC) ? sa2_next(a.s, a.y) : mod3_next(a.s, a.y);
    return w;
  endfunction

  // Whole control store image for one code.
  function automatic cs_mem_t cs_image(code_e code);
    cs_mem_t m;
    for (int unsigned i = 0; i < CS_DEPTH; i++) m[i] = cs_init_word(code, cs_addr_t'(i));
    return m;
  endfunction

endpackage
