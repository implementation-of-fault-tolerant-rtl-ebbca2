// esa_top: microprogrammable FSM with embedded signature analyzer and
// built-in self-test, next to the stand-alone residue generators and the
// stand-alone 2-bit parallel signature analyzer.
//
// Main design: the BIST controller (bist_ctrl) and the microprogrammable
// FSM (mp_fsm) whose control store holds the signature analyzer. In normal
// mode the FSM runs on the primary input x_in. A pulse on test_start clears
// the FSM, drives it from the test pattern generator for TEST_LEN clocks
// and compares the signature with ref_sig; test_pass or test_fail then
// holds the verdict. The control store can be rewritten through prog_*,
// which reprograms the FSM or switches the embedded analyzer from
// polynomial division to the modulo-3 residue code without changing the
// hardware.
//
// Stand-alone blocks, each with its own ports: the 2-bit parallel signature
// analyzer (sa_*), the serial and 3-bit parallel mod-5 residue generators
// (m5s_*, m5p_*) and the mod (b^r - 1) residue generator (mg_*). All share
// clk and the asynchronous active-low reset rst_n.
module esa_top #(
  parameter esa_pkg::code_e CODE     = esa_pkg::CODE_ALGEBRAIC,
  parameter int unsigned    TEST_LEN = 16,
  parameter int unsigned    B_BITS   = 1,
  parameter int unsigned    R        = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // microprogrammable FSM with embedded analyzer
  input  logic [esa_pkg::NX-1:0]    x_in,
  output logic [esa_pkg::NS-1:0]    fsm_y,
  output logic [esa_pkg::SIG_W-1:0] fsm_sig,
  input  logic                      prog_we,
  input  esa_pkg::cs_addr_t         prog_addr,
  input  esa_pkg::cs_word_t         prog_data,
  // self-test
  input  logic                      test_start,
  input  logic [esa_pkg::SIG_W-1:0] ref_sig,
  output logic                      test_busy,
  output logic                      test_done,
  output logic                      test_pass,
  output logic                      test_fail,
  // stand-alone 2-bit parallel signature analyzer
  input  logic                      sa_clear,
  input  logic                      sa_en,
  input  logic [1:0]                sa_d,
  output logic [1:0]                sa_sig,
  // serial mod-5 residue generator
  input  logic                      m5s_clear,
  input  logic                      m5s_en,
  input  logic                      m5s_u,
  output logic [2:0]                m5s_residue,
  // 3-bit parallel mod-5 residue generator
  input  logic                      m5p_clear,
  input  logic                      m5p_en,
  input  logic [2:0]                m5p_d,
  output logic [2:0]                m5p_residue,
  // mod (b^r - 1) residue generator
  input  logic                      mg_clear,
  input  logic                      mg_en,
  input  logic [B_BITS*R-1:0]       mg_d,
  output logic [B_BITS*R-1:0]       mg_residue
);
  import esa_pkg::*;

  logic          test_mode;
  logic          fsm_clear;
  logic          tpg_x;
  logic [NX-1:0] fsm_x;

  bist_ctrl #(.TEST_LEN(TEST_LEN)) u_bist (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (test_start),
    .ref_sig   (ref_sig),
    .sig       (fsm_sig),
    .test_mode (test_mode),
    .fsm_clear (fsm_clear),
    .tpg_x     (tpg_x),
    .busy      (test_busy),
    .done      (test_done),
    .pass      (test_pass),
    .fail      (test_fail)
  );

  assign fsm_x = test_mode ? NX'(tpg_x) : x_in;

  mp_fsm #(.CODE(CODE)) u_fsm (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (fsm_clear),
    .x         (fsm_x),
    .y         (fsm_y),
    .sig       (fsm_sig),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data)
  );

  sig_analyzer2 u_sa (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (sa_clear),
    .en    (sa_en),
    .d     (sa_d),
    .sig   (sa_sig)
  );

  mod5_serial u_m5s (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (m5s_clear),
    .en      (m5s_en),
    .u       (m5s_u),
    .residue (m5s_residue)
  );

  mod5_parallel u_m5p (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (m5p_clear),
    .en      (m5p_en),
    .d       (m5p_d),
    .residue (m5p_residue)
  );

  mod_br1_residue #(.B_BITS(B_BITS), .R(R)) u_mg (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (mg_clear),
    .en      (mg_en),
    .d       (mg_d),
    .residue (mg_residue)
  );

endmodule
